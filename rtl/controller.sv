// controller: instruction memory and sequencer of the decoder.
//
// The decoder tree of the code is a program of instr_t words written through
// the prog_* port while the decoder is idle; any length-N polar code can be
// decoded by loading its program.  When a channel frame is available and a
// codeword buffer is free, the controller runs the program from address 0,
// issuing one instruction per cycle: F and G on a node of 2**s LLRs are
// repeated for fg_cycles(s) cycles with the chunk counter stepping through
// the node, every other instruction takes one cycle.  The instruction whose
// result is the root's bit vector (stage LOG_N) ends the frame: in that cycle
// the codeword is written and the channel buffer released.  If the next
// frame is already loaded and a second codeword buffer is free, the program
// restarts at address 0 in the next cycle, so frames decode back to back and
// throughput is N bits per program cycle count; otherwise the controller
// idles until both are present.  Decoding latency is the program's cycle
// count.
module controller
  import polar_pkg::*;
#(
  parameter int unsigned DEPTH = PROG_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // program load
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  instr_t                   prog_data,
  // frame flow
  input  logic                     frame_avail,
  input  logic                     cw_ready,
  input  logic                     next_avail,   // another frame is loaded
  input  logic                     next_ready,   // another codeword buffer is free
  output logic                     frame_done,   // root written this cycle
  output logic                     busy,
  // to the datapath
  output logic                     exec,
  output instr_t                   instr,
  output logic [LOG_N-LOG_PE-1:0]  chunk
);
  instr_t                   imem [DEPTH];
  logic [$clog2(DEPTH)-1:0] pc;
  logic                     last_chunk;
  logic [STW-1:0]           res_stage;

  always_ff @(posedge clk)
    if (prog_we) imem[prog_addr] <= prog_data;

  assign instr      = imem[pc];
  assign exec       = busy;
  assign last_chunk = (instr.op == OP_F || instr.op == OP_G)
                      ? (int'(chunk) == fg_cycles(int'(instr.stage)) - 1) : 1'b1;
  assign res_stage  = (instr.op == OP_COMB || (instr.op == OP_LEAF && instr.right_child))
                      ? instr.stage + 1'b1 : instr.stage;
  assign frame_done = busy && (instr.op == OP_LEAF || instr.op == OP_COMB)
                      && int'(res_stage) == LOG_N;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      pc    <= '0;
      chunk <= '0;
    end else if (!busy) begin
      pc    <= '0;
      chunk <= '0;
      if (frame_avail && cw_ready) busy <= 1'b1;
    end else if (frame_done) begin
      busy  <= next_avail && next_ready;
      pc    <= '0;
      chunk <= '0;
    end else if (last_chunk) begin
      pc    <= pc + 1'b1;
      chunk <= '0;
    end else begin
      chunk <= chunk + 1'b1;
    end
  end

  a_no_prog_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    prog_we |-> !busy)
    else $error("controller: program written while decoding");
  a_pc_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(pc == '1 && last_chunk && !frame_done))
    else $error("controller: program ran past the end of the instruction memory");
endmodule
