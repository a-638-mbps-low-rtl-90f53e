// processor_tb: drives single instructions into the processing unit with
// the channel, alpha and beta memories modelled around it, and checks the
// generated addresses and results: F/G/G_0R on the channel (4 chunks), on a
// 512-LLR node (2 chunks), on small nodes within one word, and leaf decoding
// of the node word, and a rate-1 leaf fed by its parent's G in the same
// cycle.
module processor_tb;
  import polar_pkg::*;
  import polar_tb_pkg::*;
  op_e op;
  logic [STW-1:0] stage, g_stage;
  leaf_e leaf;
  logic left_zero, from_g = 0;
  logic [LOG_N-LOG_PE-1:0] chunk;
  logic [$clog2(CH_WORDS)-1:0] ch_addr_a, ch_addr_b;
  ch_llr_t ch_data_a [PE], ch_data_b [PE];
  logic [$clog2(ALPHA_WORDS)-1:0] al_addr_a, al_addr_b, al_wr_addr;
  llr_t al_data_a [PE], al_data_b [PE], al_wr_data [PE];
  logic [PE-1:0] g_beta, leaf_beta;
  int checks = 0, failures = 0;

  processor dut (.*);

  // memory models
  int ch [N];
  int am [ALPHA_WORDS][PE];
  logic [N-1:0] bl [LOG_N];
  always_comb begin
    for (int j = 0; j < PE; j++) begin
      ch_data_a[j] = ch_llr_t'(ch[int'(ch_addr_a) * PE + j]);
      ch_data_b[j] = ch_llr_t'(ch[int'(ch_addr_b) * PE + j]);
      al_data_a[j] = llr_t'(am[al_addr_a][j]);
      al_data_b[j] = llr_t'(am[al_addr_b][j]);
    end
    g_beta = bl[g_stage][int'(chunk) * PE +: PE];
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the LLR vector of the node at stage s as the memories hold it
  function automatic int node_llr(int s, int i);
    if (s == LOG_N) return ch[i];
    if (s > LOG_PE) return am[alpha_addr(s, i / PE)][i % PE];
    return am[alpha_addr(s, 0)][i];
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) ch[i] = int'($urandom % 31) - 15;
      for (int w = 0; w < ALPHA_WORDS; w++)
        for (int j = 0; j < PE; j++) am[w][j] = int'($urandom % 63) - 31;
      for (int s = 0; s < LOG_N; s++)
        for (int i = 0; i < N / 32; i++) bl[s][i*32 +: 32] = $urandom;

      // ---- F / G / G_0R on a random stage
      for (int s = 1; s <= LOG_N; s++) begin
        int mode;
        mode = int'($urandom % 3);
        op = (mode == 0) ? OP_F : OP_G;
        left_zero = (mode == 2);
        stage = STW'(s);
        leaf = LF_R0;
        for (int c = 0; c < fg_cycles_tb(s); c++) begin
          int h, n_out, bad;
          chunk = $bits(chunk)'(c);
          #1;
          h = 1 << (s - 1);
          n_out = (h < PE) ? h : PE;
          bad = 0;
          checks++;
          if (int'(al_wr_addr) != alpha_addr(s - 1, (s - 1 > LOG_PE) ? c : 0)) bad++;
          for (int j = 0; j < n_out; j++) begin
            int i, e;
            i = c * PE + j;
            e = (mode == 0) ? ref_f(node_llr(s, i), node_llr(s, i + h))
                            : ref_g(node_llr(s, i), node_llr(s, i + h),
                                    (mode == 1) ? bl[s-1][i] : 1'b0);
            if (int'(al_wr_data[j]) != e) bad++;
          end
          if (bad != 0) begin
            failures++;
            if (failures < 5) $display("stage %0d mode %0d chunk %0d: %0d mismatches", s, mode, c, bad);
          end
        end
      end

      // ---- fused G -> rate-1 leaf (parent stage ps <= LOG_PE + 1)
      begin
        int ps, h, bad, lz;
        ps = 1 + int'($urandom % (LOG_PE + 1));
        h = 1 << (ps - 1);
        lz = int'($urandom % 2);
        op = OP_LEAF; stage = STW'(ps - 1); leaf = LF_R1; chunk = '0;
        left_zero = 1'(lz); from_g = 1;
        #1;
        bad = 0;
        for (int i = 0; i < h; i++) begin
          int g;
          g = ref_g(node_llr(ps, i), node_llr(ps, i + h), lz ? 1'b0 : bl[ps-1][i]);
          if (leaf_beta[i] != (g < 0)) bad++;
        end
        checks++;
        if (bad != 0) begin
          failures++;
          if (failures < 5) $display("fused G->R1 parent stage %0d: %0d mismatches", ps, bad);
        end
        from_g = 0;
      end

      // ---- leaves on their node word
      begin
        mask_t m;
        ivec_t a;
        bvec_t e;
        logic [PE-1:0] ev;
        int s;
        s = 2 + int'($urandom % 6);
        for (int i = 0; i < N; i++) m[i] = (i < (1 << s)) && (i != 0);   // SPC
        op = OP_LEAF; stage = STW'(s); leaf = LF_SPC; chunk = '0; left_zero = 0;
        a = new[1 << s];
        for (int i = 0; i < (1 << s); i++) a[i] = node_llr(s, i);
        e = ref_node(m, s, 0, a);
        ev = '0;
        for (int i = 0; i < (1 << s); i++) ev[i] = e[i];
        #1;
        checks++;
        if (leaf_beta != ev) begin
          failures++;
          if (failures < 5) $display("SPC leaf stage %0d mismatch", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
