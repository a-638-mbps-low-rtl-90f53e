// altered_code_tb: the (1024, 512) workload with and without bit swapping.
//
// A (1024, 512) code is built for Eb/N0 = 2.5 dB, then altered by five bit
// swaps that each trade a weak information bit for a strong frozen bit to
// shorten the decoder program.  Both codes are decoded on the full-size
// decoder at 2.5 dB and noiseless.  Checks: the rate is unchanged, the
// altered code decodes in fewer cycles, every frame's latency equals its
// program's cycle count, every codeword matches the reference decoder, and
// noiseless frames are error-free.  Frame error counts of the two codes are
// printed for comparison.
module altered_code_tb;
  import polar_pkg::*;
  import polar_tb_pkg::*;

  localparam int FRAMES = 24;

  logic                          clk = 0, rst_n = 0;
  logic                          prog_we = 0;
  logic [$clog2(PROG_DEPTH)-1:0] prog_addr = '0;
  instr_t                        prog_data;
  logic                          in_valid = 0, in_ready;
  ch_llr_t                       in_llr [LOAD_W];
  logic                          out_valid, out_ready = 1, out_last, busy;
  logic [OUT_W-1:0]              out_data;

  polar_decoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load_program(instr_t prog [$]);
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = $bits(prog_addr)'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  // decode one frame: load it, time the decoding, read the codeword
  task automatic decode(int ch [N], output bit x [N], output int cycles);
    cycles = 0;
    for (int b = 0; b < N / LOAD_W; b++) begin
      @(negedge clk);
      in_valid = 1;
      for (int j = 0; j < LOAD_W; j++) in_llr[j] = ch_llr_t'(ch[b*LOAD_W + j]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    while (!busy) @(posedge clk);
    while (busy) begin @(posedge clk); cycles++; end
    for (int b = 0; b < N / OUT_W; b++) begin
      while (!out_valid) @(posedge clk);
      for (int j = 0; j < OUT_W; j++) x[b*OUT_W + j] = out_data[j];
      @(posedge clk);
    end
  endtask

  initial begin
    mask_t  m [2];
    instr_t prog [$];
    int     cyc [2], k [2], fer [2];
    real    z0;
    z0 = $exp(-0.5 * $pow(10.0, 0.25));
    construct_code(m[0], N / 2, z0);
    m[1] = alter_code(m[0], 5, 24, z0);
    for (int c = 0; c < 2; c++) begin
      k[c] = 0;
      foreach (m[c][i]) k[c] += m[c][i];
      cyc[c] = code_cycles(m[c]);
    end
    $display("original code: K = %0d, %0d cycles; altered code: K = %0d, %0d cycles",
             k[0], cyc[0], k[1], cyc[1]);
    check(k[1] == k[0], "bit swapping changed the rate");
    check(cyc[1] < cyc[0], "bit swapping did not shorten decoding");

    for (int j = 0; j < LOAD_W; j++) in_llr[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      int ncyc;
      compile_code(m[c], prog, ncyc);
      load_program(prog);
      fer[c] = 0;
      for (int f = 0; f < FRAMES; f++) begin
        bit u [N], tx [N], exp [N], got [N];
        int ch [N], lat, e_ref, e_tx;
        real fl [N];
        for (int i = 0; i < N; i++) u[i] = m[c][i] ? 1'($urandom) : 1'b0;
        encode(u, tx);
        if (f == 0) for (int i = 0; i < N; i++) ch[i] = tx[i] ? -15 : 15;
        else channel(tx, sigma_of(2.5), ch, fl);
        ref_decode(m[c], ch, exp);
        decode(ch, got, lat);
        e_ref = 0; e_tx = 0;
        for (int i = 0; i < N; i++) begin
          e_ref += int'(got[i] != exp[i]);
          e_tx  += int'(got[i] != tx[i]);
        end
        check(lat == cyc[c], $sformatf("code %0d frame %0d latency %0d, expected %0d", c, f, lat, cyc[c]));
        check(e_ref == 0, $sformatf("code %0d frame %0d differs from the reference", c, f));
        if (f == 0) check(e_tx == 0, "noiseless frame decoded with errors");
        if (e_tx != 0) fer[c]++;
      end
    end
    $display("frame errors at 2.5 dB over %0d noisy frames: original %0d, altered %0d",
             FRAMES - 1, fer[0], fer[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
