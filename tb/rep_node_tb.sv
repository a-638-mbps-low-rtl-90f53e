// rep_node_tb: repetition decoding of random LLR vectors of every length
// from 1 to 32; the decision must be the sign of the sum of the first
// 2**len_log inputs, replicated, with zeros above the node length.
module rep_node_tb;
  import polar_pkg::*;
  llr_t alpha [REP_MAX];
  logic [$clog2(REP_MAX+1)-1:0] len_log;
  logic bit_est;
  logic [REP_MAX-1:0] beta;
  int checks = 0, failures = 0;

  rep_node dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      int sum;
      logic [REP_MAX-1:0] e;
      len_log = $bits(len_log)'(t % 6);
      sum = 0;
      for (int i = 0; i < REP_MAX; i++) begin
        alpha[i] = llr_t'(int'($urandom % 63) - 31);
        if (i < (1 << (t % 6))) sum += int'(alpha[i]);
      end
      for (int i = 0; i < REP_MAX; i++) e[i] = (i < (1 << (t % 6))) && (sum < 0);
      #1;
      checks++;
      if (bit_est != (sum < 0) || beta != e) begin
        failures++;
        if (failures < 10) $display("len %0d sum %0d: bit %0d beta %h exp %h", 1 << (t % 6), sum, bit_est, beta, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
