// controller_tb: loads a short program, checks that decoding waits for both
// a channel frame and a free codeword buffer, that F/G on 1024 and 512 LLRs
// repeat for 4 and 2 cycles with the chunk counter stepping, that other
// instructions take one cycle, and that the root result ends the frame
// after exactly the program's cycle count; when the next frame is ready it
// starts in the following cycle.
module controller_tb;
  import polar_pkg::*;
  import polar_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [$clog2(PROG_DEPTH)-1:0] prog_addr;
  instr_t prog_data, instr;
  logic frame_avail = 0, cw_ready = 0, frame_done, busy, exec;
  logic next_avail = 0, next_ready = 0;
  logic [LOG_N-LOG_PE-1:0] chunk;
  int checks = 0, failures = 0;

  controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  instr_t prog [$];
  // expected (pc, chunk) per execution cycle
  int exp_pc [$], exp_chunk [$];

  initial begin
    prog.push_back(mk(OP_F, 10, LF_R0, 0, 0, 0));     // 4 cycles
    prog.push_back(mk(OP_F, 9, LF_R0, 0, 0, 0));      // 2 cycles
    prog.push_back(mk(OP_LEAF, 8, LF_R0, 0, 0, 1));   // 1
    prog.push_back(mk(OP_G, 9, LF_R0, 0, 0, 0));      // 2
    prog.push_back(mk(OP_LEAF, 8, LF_R1, 0, 1, 1));   // 1, result stage 9
    prog.push_back(mk(OP_G, 10, LF_R0, 0, 0, 0));     // 4
    prog.push_back(mk(OP_F, 9, LF_R0, 0, 0, 0));      // 2
    prog.push_back(mk(OP_LEAF, 8, LF_SPC, 0, 0, 1));  // 1
    prog.push_back(mk(OP_G, 9, LF_R0, 0, 0, 0));      // 2
    prog.push_back(mk(OP_LEAF, 8, LF_R1, 0, 1, 0));   // 1, result stage 9
    prog.push_back(mk(OP_COMB, 9, LF_R0, 0, 0, 0));   // 1, root
    foreach (prog[i]) begin
      int n;
      n = (prog[i].op == OP_F || prog[i].op == OP_G) ? fg_cycles_tb(int'(prog[i].stage)) : 1;
      for (int c = 0; c < n; c++) begin exp_pc.push_back(i); exp_chunk.push_back(c); end
    end

    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = $bits(prog_addr)'(i); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 0;

    for (int f = 0; f < 3; f++) begin
      // only a frame, no codeword buffer: must not start
      frame_avail = 1; cw_ready = 0;
      repeat (3) @(negedge clk);
      check(!busy, "started without a free codeword buffer");
      frame_avail = 0; cw_ready = 1;
      repeat (3) @(negedge clk);
      check(!busy, "started without a frame");
      frame_avail = 1;
      @(negedge clk);
      check(busy, "did not start");
      for (int k = 0; k < exp_pc.size(); k++) begin
        check(exec && instr == prog[exp_pc[k]] && int'(chunk) == exp_chunk[k],
              $sformatf("cycle %0d: instruction or chunk", k));
        check(frame_done == (k == exp_pc.size() - 1), $sformatf("cycle %0d: frame_done", k));
        @(negedge clk);
      end
      frame_avail = 0;
      check(!busy, "still busy after the root");
    end
    // back to back: the next frame and buffer are there, so no idle cycle
    frame_avail = 1; cw_ready = 1; next_avail = 1; next_ready = 1;
    @(negedge clk);
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < exp_pc.size(); k++) begin
        check(busy && instr == prog[exp_pc[k]] && int'(chunk) == exp_chunk[k],
              $sformatf("back-to-back frame %0d cycle %0d", f, k));
        @(negedge clk);
      end
    check(busy, "idle between back-to-back frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
