// beta_ram_tb: random sequences of leaf writes, Combine and Combine_0R
// (from a leaf vector or from the pending right child), checked against a
// bit-level model of Eq. (3); G-side reads of stored left siblings are
// checked chunk by chunk.
module beta_ram_tb;
  import polar_pkg::*;
  logic clk = 0;
  logic [STW-1:0] g_stage, in_stage, res_stage;
  logic [LOG_N-LOG_PE-1:0] g_chunk;
  logic [PE-1:0] g_beta, in_beta;
  logic wr_en = 0, src_cur = 0, do_comb = 0, left_zero = 0, res_left = 0;
  logic [N-1:0] res;
  int checks = 0, failures = 0;
  int n_comb = 0, n_comb0 = 0, n_cur = 0;

  logic [N-1:0] m_bl [LOG_N];
  logic [N-1:0] m_cur;
  bit           m_valid [LOG_N];

  beta_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit cur_valid;
    cur_valid = 0;
    for (int t = 0; t < 3000; t++) begin
      int s, rs;
      logic [N-1:0] v, l, r;
      @(negedge clk);
      s = (t < LOG_PE + 1) ? t : int'($urandom % LOG_N);
      // pick a legal operation
      src_cur   = cur_valid && ($urandom % 3 == 0) && t >= LOG_PE + 1;
      do_comb   = (t >= LOG_PE + 1) && (src_cur || ($urandom % 2 == 0));
      left_zero = do_comb && ($urandom % 4 == 0);
      if (do_comb && !left_zero && !m_valid[s]) left_zero = 1;
      if (!src_cur && s > LOG_PE && !do_comb) s = LOG_PE;
      res_left  = (t < LOG_PE + 1) || ($urandom % 2 == 0);
      for (int i = 0; i < PE / 32; i++) in_beta[i*32 +: 32] = $urandom;
      in_stage = STW'(s);
      wr_en = 1;
      // model
      v = src_cur ? m_cur : N'(in_beta);
      for (int i = 0; i < N; i++) if (i >= (1 << s)) v[i] = 0;
      l = left_zero ? '0 : m_bl[s];
      r = '0;
      if (do_comb) begin
        for (int i = 0; i < (1 << s); i++) begin
          r[i] = l[i] ^ v[i];
          r[i + (1 << s)] = v[i];
        end
        rs = s + 1;
      end else begin
        r = v; rs = s;
      end
      if (rs >= LOG_N) res_left = 0;
      #1;
      checks++;
      if (res != r || int'(res_stage) != rs) begin
        failures++;
        if (failures < 5) $display("t=%0d s=%0d comb=%0d lz=%0d cur=%0d: result mismatch", t, s, do_comb, left_zero, src_cur);
      end
      if (do_comb) begin if (left_zero) n_comb0++; else n_comb++; end
      if (src_cur) n_cur++;
      @(posedge clk);
      m_cur = r; cur_valid = 1;
      if (res_left) begin m_bl[rs] = r; m_valid[rs] = 1; end
      // G-side read of a random stored stage
      @(negedge clk);
      wr_en = 0;
      g_stage = STW'($urandom % LOG_N);
      g_chunk = $bits(g_chunk)'(int'(g_stage) > LOG_PE ? $urandom % (1 << (int'(g_stage) - LOG_PE)) : 0);
      #1;
      if (m_valid[g_stage]) begin
        logic [PE-1:0] e;
        int w;
        w = (1 << int'(g_stage)) < PE ? (1 << int'(g_stage)) : PE;
        e = m_bl[g_stage][int'(g_chunk) * PE +: PE];
        checks++;
        for (int i = 0; i < PE; i++)
          if (i < w && g_beta[i] != e[i]) begin
            failures++;
            if (failures < 5) $display("g read stage %0d chunk %0d lane %0d", g_stage, g_chunk, i);
            break;
          end
      end
    end
    checks++;
    if (n_comb == 0 || n_comb0 == 0 || n_cur == 0) begin failures++; $display("coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
