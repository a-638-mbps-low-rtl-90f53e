// fg_unit_tb: random F, G and G_0R operations on all 128 lanes, compared
// with the integer min-sum F and saturating G of the reference model.
module fg_unit_tb;
  import polar_pkg::*;
  import polar_tb_pkg::*;
  localparam int L = PE;
  llr_t a [L], b [L], y [L];
  logic [L-1:0] beta;
  logic is_g, left_zero;
  int checks = 0, failures = 0;

  fg_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int mode;
      mode = t % 3;
      is_g = (mode != 0); left_zero = (mode == 2);
      for (int i = 0; i < L; i++) begin
        // small values mostly, extremes sometimes (saturation)
        a[i] = llr_t'(($urandom % 4 == 0) ? (($urandom % 2) ? 31 : -31) : int'($urandom % 63) - 31);
        b[i] = llr_t'(int'($urandom % 63) - 31);
        beta[i] = 1'($urandom);
      end
      #1;
      for (int i = 0; i < L; i++) begin
        int e;
        e = (mode == 0) ? ref_f(a[i], b[i]) : ref_g(a[i], b[i], (mode == 1) ? beta[i] : 1'b0);
        checks++;
        if (int'(y[i]) != e) begin
          failures++;
          if (failures < 10) $display("mode %0d lane %0d: a=%0d b=%0d beta=%0d y=%0d exp=%0d",
                                      mode, i, a[i], b[i], beta[i], y[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
