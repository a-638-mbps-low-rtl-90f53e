// channel_ram_tb: loads frames through the 32-LLR handshake, checks that
// both buffers fill and then stall the loader, that the decoder side sees
// the frames in order with every LLR in its place, and that a release frees
// a buffer for the next frame; next_avail flags a second loaded frame.
module channel_ram_tb;
  import polar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, frame_avail, next_avail, frame_release = 0;
  ch_llr_t in_llr [LOAD_W];
  logic [$clog2(N/PE)-1:0] rd_addr_a, rd_addr_b;
  ch_llr_t rd_data_a [PE], rd_data_b [PE];
  int checks = 0, failures = 0;
  int frames [$][N];
  int n_stall = 0;

  channel_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load_frame();
    int f [N];
    for (int i = 0; i < N; i++) f[i] = int'($urandom % 32) - 16;
    frames.push_back(f);
    for (int b = 0; b < N / LOAD_W; b++) begin
      @(negedge clk);
      in_valid = 1;
      for (int j = 0; j < LOAD_W; j++) in_llr[j] = ch_llr_t'(f[b*LOAD_W + j]);
      @(posedge clk);
      while (!in_ready) begin n_stall++; @(posedge clk); end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic read_and_release();
    int f [N];
    int bad;
    f = frames.pop_front();
    bad = 0;
    for (int c = 0; c < N / PE / 2; c++) begin
      rd_addr_a = $bits(rd_addr_a)'(c);
      rd_addr_b = $bits(rd_addr_b)'(c + N / PE / 2);
      #1;
      for (int j = 0; j < PE; j++) begin
        if (int'(rd_data_a[j]) != f[c*PE + j]) bad++;
        if (int'(rd_data_b[j]) != f[(c + N/PE/2)*PE + j]) bad++;
      end
    end
    check(bad == 0, "frame contents");
    @(negedge clk) frame_release = 1;
    @(negedge clk) frame_release = 0;
  endtask

  initial begin
    for (int j = 0; j < LOAD_W; j++) in_llr[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!frame_avail && in_ready, "empty after reset");
    load_frame();
    check(frame_avail && in_ready && !next_avail, "one frame loaded, second buffer free");
    load_frame();
    check(frame_avail && !in_ready && next_avail, "both buffers full");
    // a third frame waits until a buffer is released
    fork
      load_frame();
      begin repeat (10) @(negedge clk); read_and_release(); end
    join
    check(n_stall > 0, "loader stalled while both buffers full");
    read_and_release();
    check(frame_avail, "third frame available");
    read_and_release();
    check(!frame_avail && in_ready, "all buffers free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
