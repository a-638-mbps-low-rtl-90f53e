// polar_decoder_tb: end-to-end test of the decoder at its default size
// (N = 1024, P = 256, 6.5.1 quantization).
//
// Two codes are run back to back, with the program reloaded in between:
//   A: a (1024, 512) code built from Bhattacharyya reliabilities at
//      Eb/N0 = 2.5 dB;
//   B: a code assembled from frozen patterns that exercises every leaf
//      decoder (Rep1, 0RepSPC, 001, RepSPC, 0SPC, 01, Rep up to 32, SPC up
//      to 128, rate-0, rate-1).
// For each code, noiseless frames must decode to the transmitted codeword,
// and noisy frames must match an integer reference model bit for bit.  The
// decoding latency of each frame must equal the cycle count of the program.
// Right-child leaves are fed by their parent's G in the same cycle where
// the node is short enough.  Frames are loaded while others decode; the reader stalls at times so the
// decoder must wait for a free codeword buffer.  Every mechanism (each leaf
// type, back-to-back frames, fused G -> leaf -> Combine, G_0R, Combine_0R, Combine instructions, multi-cycle F/G, loading
// during decoding, loader back-pressure, codeword-buffer stall) is counted
// and must occur at least once.
module polar_decoder_tb;
  import polar_pkg::*;
  import polar_tb_pkg::*;

  localparam int FRAMES_PER_CODE = 12;
  localparam int NCODES = 2;

  logic                          clk = 0, rst_n = 0;
  logic                          prog_we = 0;
  logic [$clog2(PROG_DEPTH)-1:0] prog_addr = '0;
  instr_t                        prog_data;
  logic                          in_valid = 0, in_ready;
  ch_llr_t                       in_llr [LOAD_W];
  logic                          out_valid, out_ready = 0, out_last, busy;
  logic [OUT_W-1:0]              out_data;

  polar_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // frames in flight
  typedef struct { int ch [N]; bit exp [N]; bit tx [N]; bit noiseless; int code; } frame_t;
  frame_t frames [$];
  int     exp_cycles [NCODES];
  int     n_out = 0;

  // -------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------- mechanism counters
  int leaf_seen [10];
  int n_b2b = 0, n_fused = 0, n_g0r = 0, n_c0r = 0, n_comb = 0, n_multi = 0, n_overlap = 0,
      n_backpressure = 0, n_cwstall = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.exec) begin
      if (dut.instr.op == OP_LEAF) leaf_seen[int'(dut.instr.leaf)]++;
      if (dut.instr.op == OP_G && dut.instr.left_zero) n_g0r++;
      if ((dut.instr.op == OP_COMB || (dut.instr.op == OP_LEAF && dut.instr.right_child))
          && dut.instr.left_zero) n_c0r++;
      if (dut.instr.op == OP_COMB) n_comb++;
      if (dut.instr.op == OP_LEAF && dut.instr.from_g) n_fused++;
      if (dut.chunk != 0) n_multi++;
    end
    if (in_valid && in_ready && busy) n_overlap++;
    if (in_valid && !in_ready) n_backpressure++;
    if (!busy && dut.frame_avail && !dut.cw_ready) n_cwstall++;
    if (dut.frame_done && dut.next_avail && dut.next_ready) n_b2b++;
  end

  // -------------------------------------------------------- latency check
  int busy_cnt = 0, frame_idx = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cnt++;
    if (dut.frame_done) begin
      int c;
      c = frames[frame_idx].code;
      checks++;
      if (busy_cnt != exp_cycles[c]) begin
        failures++;
        $display("frame %0d: latency %0d cycles, expected %0d", frame_idx, busy_cnt, exp_cycles[c]);
      end
      busy_cnt = 0;
      frame_idx++;
    end
  end

  // -------------------------------------------------------- output reader
  bit got [N];
  initial begin
    int beat = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      // long pauses now and then so the codeword buffers fill up
      out_ready = (n_out % 5 == 1) ? (($urandom % 40) == 0) : (($urandom % 4) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        for (int j = 0; j < OUT_W; j++) got[beat*OUT_W + j] = out_data[j];
        checks++;
        if (out_last != (beat == N/OUT_W - 1)) begin
          failures++; $display("out_last wrong at beat %0d", beat);
        end
        beat++;
        if (beat == N / OUT_W) begin
          int errs, txerr;
          errs = 0; txerr = 0;
          beat = 0;
          for (int i = 0; i < N; i++) begin
            if (got[i] != frames[n_out].exp[i]) errs++;
            if (got[i] != frames[n_out].tx[i]) txerr++;
          end
          checks++;
          if (errs != 0) begin
            failures++;
            $display("frame %0d (code %0d): %0d bits differ from the reference", n_out, frames[n_out].code, errs);
          end
          if (frames[n_out].noiseless) begin
            checks++;
            if (txerr != 0) begin
              failures++;
              $display("frame %0d: noiseless frame decoded with %0d errors", n_out, txerr);
            end
          end
          n_out++;
        end
      end
    end
  end

  // -------------------------------------------------------- stimulus
  task automatic load_program(instr_t prog [$]);
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = $bits(prog_addr)'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic send_frame(int ch [N]);
    for (int b = 0; b < N / LOAD_W; b++) begin
      @(negedge clk);
      while (($urandom % 8) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int j = 0; j < LOAD_W; j++) in_llr[j] = ch_llr_t'(ch[b*LOAD_W + j]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    mask_t  m [NCODES];
    instr_t prog [$];
    int     info_bits [NCODES];
    construct_code(m[0], N / 2, $exp(-0.5 * $pow(10.0, 0.25)));
    pattern_code(m[1], 7);
    for (int j = 0; j < LOAD_W; j++) in_llr[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int c = 0; c < NCODES; c++) begin
      info_bits[c] = 0;
      foreach (m[c][i]) info_bits[c] += m[c][i];
      compile_code(m[c], prog, exp_cycles[c]);
      $display("code %0d: K = %0d, %0d instructions, %0d cycles per frame",
               c, info_bits[c], prog.size(), exp_cycles[c]);
      checks++;
      if (prog.size() > PROG_DEPTH) begin failures++; $display("program too long"); end
      // wait until the previous code's frames have all been read out
      wait (n_out == frames.size() && !busy);
      load_program(prog);
      for (int f = 0; f < FRAMES_PER_CODE; f++) begin
        frame_t fr;
        real fl [N];
        bit u [N];
        real ebn0;
        ebn0 = 1.5 + 0.5 * (f % 4);
        for (int i = 0; i < N; i++) u[i] = m[c][i] ? 1'($urandom) : 1'b0;
        encode(u, fr.tx);
        fr.noiseless = (f % 3 == 0);
        if (fr.noiseless)
          for (int i = 0; i < N; i++) fr.ch[i] = fr.tx[i] ? -15 : 15;
        else
          channel(fr.tx, sigma_of(ebn0), fr.ch, fl);
        ref_decode(m[c], fr.ch, fr.exp);
        fr.code = c;
        frames.push_back(fr);
        send_frame(fr.ch);
      end
    end
    wait (n_out == frames.size());
    repeat (5) @(posedge clk);

    // every mechanism must have occurred
    for (int l = 0; l < 10; l++) begin
      checks++;
      if (leaf_seen[l] == 0) begin failures++; $display("leaf type %s never executed", leaf_e'(l)); end
    end
    begin
      int cnt [9];
      string nm [9];
      cnt = '{n_b2b, n_fused, n_g0r, n_c0r, n_comb, n_multi, n_overlap, n_backpressure, n_cwstall};
      nm = '{"back-to-back frames", "G->leaf->Combine", "G_0R", "Combine_0R", "Combine", "multi-cycle F/G",
                        "load during decode", "loader back-pressure", "codeword-buffer stall"};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("  %-22s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin failures++; $display("%s never happened", nm[i]); end
      end
    end
    $display("frames decoded: %0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
