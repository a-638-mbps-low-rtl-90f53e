// leaf_unit_tb: every leaf type at every length the decoder uses, on random
// LLR words, compared with the reference model decoding the matching frozen
// pattern through F/G and basic leaves.  Lanes above the node length must
// read zero.
module leaf_unit_tb;
  import polar_pkg::*;
  import polar_tb_pkg::*;
  llr_t alpha [PE];
  leaf_e leaf;
  logic [$clog2(PE+1)-1:0] len_log;
  logic [PE-1:0] beta;
  int checks = 0, failures = 0;

  leaf_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frozen pattern of a leaf type at stage s ("1" = information bit)
  function automatic string pattern(leaf_e lf, int s);
    string p;
    p = "";
    for (int i = 0; i < (1 << s); i++)
      case (lf)
        LF_R0:   p = {p, "0"};
        LF_R1:   p = {p, "1"};
        LF_REP:  p = {p, (i == (1 << s) - 1) ? "1" : "0"};
        LF_SPC:  p = {p, (i != 0) ? "1" : "0"};
        default: ;
      endcase
    case (lf)
      LF_REPSPC:  p = "00010111";
      LF_0SPC:    p = "00000111";
      LF_01:      p = "0011";
      LF_001:     p = "00000011";
      LF_REP1:    p = "00011111";
      LF_0REPSPC: p = "0000000000010111";
      default: ;
    endcase
    return p;
  endfunction

  task automatic run(leaf_e lf, int s, int reps);
    mask_t m;
    string p;
    p = pattern(lf, s);
    for (int i = 0; i < N; i++) m[i] = 0;
    for (int i = 0; i < p.len(); i++) m[i] = (p[i] == "1");
    for (int t = 0; t < reps; t++) begin
      ivec_t a;
      bvec_t e;
      logic [PE-1:0] ev;
      a = new[1 << s];
      for (int i = 0; i < PE; i++) begin
        alpha[i] = llr_t'(int'($urandom % 63) - 31);
        if (i < (1 << s)) a[i] = int'(alpha[i]);
      end
      leaf = lf;
      len_log = $bits(len_log)'(s);
      e = ref_node(m, s, 0, a);
      ev = '0;
      for (int i = 0; i < (1 << s); i++) ev[i] = e[i];
      #1;
      checks++;
      if (beta != ev) begin
        failures++;
        if (failures < 10) $display("%s len %0d: beta %h exp %h", lf.name(), 1 << s, beta, ev);
      end
    end
  endtask

  initial begin
    for (int s = 0; s <= LOG_PE; s++) run(LF_R0, s, 5);
    for (int s = 0; s <= LOG_PE; s++) run(LF_R1, s, 50);
    for (int s = 1; s <= 5; s++)      run(LF_REP, s, 200);
    for (int s = 2; s <= LOG_PE; s++) run(LF_SPC, s, 200);
    run(LF_REPSPC, 3, 500);
    run(LF_0SPC, 3, 500);
    run(LF_01, 2, 500);
    run(LF_001, 3, 500);
    run(LF_REP1, 3, 500);
    run(LF_0REPSPC, 4, 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
