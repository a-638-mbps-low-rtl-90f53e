// codeword_ram_tb: writes codewords while others are streamed out, checks
// the 32-bit beats in order with out_last on the final one, that wr_ready
// drops when both buffers are full (next_ready when one is) and returns after a codeword is read.
module codeword_ram_tb;
  import polar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_ready, next_ready, out_valid, out_ready = 0, out_last;
  logic [N-1:0] wr_data;
  logic [OUT_W-1:0] out_data;
  int checks = 0, failures = 0;
  logic [N-1:0] sent [$];

  codeword_ram dut (.*);
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

  task automatic write_cw();
    logic [N-1:0] d;
    for (int i = 0; i < N / 32; i++) d[i*32 +: 32] = $urandom;
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    wr_en = 1; wr_data = d;
    sent.push_back(d);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic read_cw();
    logic [N-1:0] exp, got;
    int beat;
    exp = sent.pop_front();
    beat = 0;
    while (beat < N / OUT_W) begin
      @(negedge clk);
      out_ready = 1'($urandom);
      @(posedge clk);
      if (out_valid && out_ready) begin
        got[beat*OUT_W +: OUT_W] = out_data;
        check(out_last == (beat == N/OUT_W - 1), "out_last");
        beat++;
      end
    end
    @(negedge clk) out_ready = 0;
    check(got == exp, "codeword contents");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(wr_ready && next_ready && !out_valid, "empty after reset");
    write_cw();
    #1 check(wr_ready && !next_ready, "one codeword stored");
    write_cw();
    #1 check(!wr_ready && out_valid, "both buffers full");
    read_cw();
    #1 check(wr_ready, "buffer freed after reading");
    fork
      write_cw();
      read_cw();
    join
    read_cw();
    #1 check(!out_valid && wr_ready, "all read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
