// error_rate_tb: error-correction performance of the fixed-point decoder.
//
// The original (1024, 512) code and its bit-swapped version are decoded on
// the full-size decoder over BPSK/AWGN at Eb/N0 = 1.5, 2.0, 2.5 and 3.0 dB.
// Every received frame is also decoded by the integer reference (same 6.5.1
// arithmetic) and by a floating-point Fast-SSC model on the unquantized LLRs.
// Checks: every hardware codeword matches the integer reference, a noiseless
// frame per code is error-free, and for each code the frame error count at
// 3.0 dB is below the count at 1.5 dB.  A table of frame error rates
// (hardware fixed point against floating point, original against altered
// code) is printed.
module error_rate_tb;
  import polar_pkg::*;
  import polar_tb_pkg::*;

  localparam int FRAMES = 200;  // per code and Eb/N0 point
  localparam int NPTS   = 4;

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
    repeat (2000000) @(posedge clk);
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
    int     fe_hw [2][NPTS], fe_fl [2][NPTS];
    real    z0;
    z0 = $exp(-0.5 * $pow(10.0, 0.25));
    construct_code(m[0], N / 2, z0);
    m[1] = alter_code(m[0], 5, 24, z0);

    for (int j = 0; j < LOAD_W; j++) in_llr[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      int ncyc;
      compile_code(m[c], prog, ncyc);
      load_program(prog);
      begin
        bit u [N], tx [N], got [N];
        int ch [N], lat, e;
        for (int i = 0; i < N; i++) u[i] = m[c][i] ? 1'($urandom) : 1'b0;
        encode(u, tx);
        for (int i = 0; i < N; i++) ch[i] = tx[i] ? -15 : 15;
        decode(ch, got, lat);
        e = 0;
        for (int i = 0; i < N; i++) e += (got[i] != tx[i]);
        check(e == 0, $sformatf("code %0d noiseless frame has %0d errors", c, e));
      end
      for (int p = 0; p < NPTS; p++) begin
        real ebn0;
        ebn0 = 1.5 + 0.5 * p;
        fe_hw[c][p] = 0;
        fe_fl[c][p] = 0;
        for (int f = 0; f < FRAMES; f++) begin
          bit    u [N], tx [N], exp [N], got [N];
          int    ch [N], lat, e_ref, e_tx, e_fl;
          real   fl [N];
          rvec_t a;
          bvec_t bf;
          for (int i = 0; i < N; i++) u[i] = m[c][i] ? 1'($urandom) : 1'b0;
          encode(u, tx);
          channel(tx, sigma_of(ebn0), ch, fl);
          ref_decode(m[c], ch, exp);
          a = new[N];
          for (int i = 0; i < N; i++) a[i] = fl[i];
          bf = ref_node_real(m[c], LOG_N, 0, a);
          decode(ch, got, lat);
          e_ref = 0; e_tx = 0; e_fl = 0;
          for (int i = 0; i < N; i++) begin
            e_ref += (got[i] != exp[i]);
            e_tx  += (got[i] != tx[i]);
            e_fl  += (bf[i] != tx[i]);
          end
          check(e_ref == 0, $sformatf("code %0d %.1f dB frame %0d: %0d bits differ from reference",
                                      c, ebn0, f, e_ref));
          fe_hw[c][p] += (e_tx != 0);
          fe_fl[c][p] += (e_fl != 0);
        end
      end
      check(fe_hw[c][NPTS-1] < fe_hw[c][0],
            $sformatf("code %0d: %0d frame errors at 3.0 dB, %0d at 1.5 dB",
                      c, fe_hw[c][NPTS-1], fe_hw[c][0]));
    end

    $display("frame error rate over %0d frames per point", FRAMES);
    $display("Eb/N0  original 6.5.1  original float  altered 6.5.1  altered float");
    for (int p = 0; p < NPTS; p++)
      $display("%.1f dB  %13.4f  %14.4f  %13.4f  %13.4f", 1.5 + 0.5 * p,
               real'(fe_hw[0][p]) / FRAMES, real'(fe_fl[0][p]) / FRAMES,
               real'(fe_hw[1][p]) / FRAMES, real'(fe_fl[1][p]) / FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
