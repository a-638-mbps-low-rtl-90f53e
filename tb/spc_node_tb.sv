// spc_node_tb: SPC decoding of random vectors of lengths 2 to 128; with odd
// parity the least reliable (first smallest magnitude) decision must be
// flipped, with even parity the hard decisions are kept.
module spc_node_tb;
  import polar_pkg::*;
  llr_t alpha [PE];
  logic [$clog2(PE+1)-1:0] len_log;
  logic [PE-1:0] beta;
  int checks = 0, failures = 0;
  int n_flip = 0;

  spc_node dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 700; t++) begin
      int n, par, mi, mm;
      logic [PE-1:0] e;
      n = 1 << (1 + t % 7);
      len_log = $bits(len_log)'(1 + t % 7);
      e = '0; par = 0; mi = 0; mm = 1000;
      for (int i = 0; i < PE; i++) begin
        alpha[i] = llr_t'(int'($urandom % 63) - 31);
        if (i < n) begin
          int mg;
          mg = (alpha[i] < 0) ? -int'(alpha[i]) : int'(alpha[i]);
          e[i] = alpha[i] < 0;
          par ^= int'(e[i]);
          if (mg < mm) begin mm = mg; mi = i; end
        end
      end
      if (par != 0) begin e[mi] = ~e[mi]; n_flip++; end
      #1;
      checks++;
      if (beta != e) begin
        failures++;
        if (failures < 10) $display("len %0d: beta %h exp %h", n, beta, e);
      end
    end
    checks++;
    if (n_flip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
