// rep1_node_tb: the length-8 Rep1 (0001 1111) decoder on random LLR vectors,
// compared with the reference model, which decodes the same frozen pattern
// step by step through F, G, repetition / SPC / rate-1 leaves and Combine.
module rep1_node_tb;
  import polar_pkg::*;
  import polar_tb_pkg::*;
  llr_t alpha [8];
  logic [7:0] beta;
  int checks = 0, failures = 0;
  int n_one = 0;

  rep1_node dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask_t m;
    string pat;
    pat = "00011111";
    for (int i = 0; i < N; i++) m[i] = 0;
    for (int i = 0; i < 8; i++) m[i] = (pat[i] == "1");
    for (int t = 0; t < 2000; t++) begin
      ivec_t a;
      bvec_t e;
      logic [7:0] ev;
      a = new[8];
      for (int i = 0; i < 8; i++) begin
        a[i] = int'($urandom % 63) - 31;
        alpha[i] = llr_t'(a[i]);
      end
      e = ref_node(m, 3, 0, a);
      for (int i = 0; i < 8; i++) ev[i] = e[i];
      if (ev[7]) n_one++;
      #1;
      checks++;
      if (beta != ev) begin
        failures++;
        if (failures < 10) $display("beta %b exp %b", beta, ev);
      end
    end
    checks++;
    if (n_one == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
