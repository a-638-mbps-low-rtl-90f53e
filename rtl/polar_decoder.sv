// polar_decoder: Fast-SSC decoder for length-1024 polar codes, with the
// dedicated Rep1, 0RepSPC and 001 leaf decoders for low-rate codes.
//
// The decoder walks the pruned decoder tree of the code as a program held in
// the controller.  The processing unit reads LLRs from the channel memory or
// the alpha memory, writes child LLRs to the alpha memory, and hands leaf
// bit-estimates to the beta memory, which combines them up the tree.  The
// root's bit vector, the estimated (systematic) codeword, goes to the
// codeword memory.  Channel LLRs come in 32 per cycle (QC = 5 bits each) and
// the codeword goes out 32 bits per cycle; both memories hold two frames so
// that loading and reading overlap decoding.
//
// Interface
//   prog_we/prog_addr/prog_data  write one instruction (only while !busy)
//   in_valid/in_ready/in_llr     channel LLRs, 32 beats per frame
//   out_valid/out_ready/out_data/out_last  codeword, 32 beats per frame
//   busy                         a frame is being decoded
// Timing: decoding a frame takes exactly the cycle count of its program
// (F/G on 1024 LLRs 4 cycles, on 512 LLRs 2, everything else 1); when the
// next frame is loaded in time, it starts in the following cycle.
module polar_decoder
  import polar_pkg::*;
#(
  parameter int unsigned DEPTH = PROG_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  instr_t                   prog_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  ch_llr_t                  in_llr [LOAD_W],
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [OUT_W-1:0]         out_data,
  output logic                     out_last,
  output logic                     busy
);
  // controller
  logic                          frame_avail, cw_ready, frame_done, exec;
  logic                          next_avail, next_ready;
  instr_t                        instr;
  logic [LOG_N-LOG_PE-1:0]       chunk;
  // channel memory
  logic [$clog2(CH_WORDS)-1:0]   ch_addr_a, ch_addr_b;
  ch_llr_t                       ch_data_a [PE];
  ch_llr_t                       ch_data_b [PE];
  // alpha memory
  logic [$clog2(ALPHA_WORDS)-1:0] al_addr_a, al_addr_b, al_wr_addr;
  llr_t                          al_data_a [PE];
  llr_t                          al_data_b [PE];
  llr_t                          al_wr_data [PE];
  // beta memory
  logic [STW-1:0]                g_stage, res_stage;
  logic [PE-1:0]                 g_beta, leaf_beta;
  logic [N-1:0]                  res;
  logic                          is_fg, is_beta;

  assign is_fg   = exec && (instr.op == OP_F || instr.op == OP_G);
  assign is_beta = exec && (instr.op == OP_LEAF || instr.op == OP_COMB);

  controller #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .frame_avail, .cw_ready, .next_avail, .next_ready, .frame_done, .busy,
    .exec, .instr, .chunk
  );

  channel_ram u_chan (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .frame_avail, .next_avail, .frame_release(frame_done),
    .rd_addr_a(ch_addr_a), .rd_addr_b(ch_addr_b),
    .rd_data_a(ch_data_a), .rd_data_b(ch_data_b)
  );

  processor u_proc (
    .op(instr.op), .stage(instr.stage), .leaf(instr.leaf),
    .left_zero(instr.left_zero), .from_g(instr.from_g), .chunk,
    .ch_addr_a, .ch_addr_b, .ch_data_a, .ch_data_b,
    .al_addr_a, .al_addr_b, .al_data_a, .al_data_b, .al_wr_addr, .al_wr_data,
    .g_stage, .g_beta, .leaf_beta
  );

  alpha_ram u_alpha (
    .clk, .rd_addr_a(al_addr_a), .rd_addr_b(al_addr_b),
    .rd_data_a(al_data_a), .rd_data_b(al_data_b),
    .wr_en(is_fg), .wr_addr(al_wr_addr), .wr_data(al_wr_data)
  );

  beta_ram u_beta (
    .clk, .g_stage, .g_chunk(chunk), .g_beta,
    .wr_en(is_beta), .src_cur(instr.op == OP_COMB), .in_beta(leaf_beta),
    .in_stage(instr.stage),
    .do_comb(instr.op == OP_COMB || instr.right_child),
    .left_zero(instr.left_zero), .res_left(instr.res_left),
    .res, .res_stage
  );

  codeword_ram u_cw (
    .clk, .rst_n, .wr_en(frame_done), .wr_data(res), .wr_ready(cw_ready), .next_ready,
    .out_valid, .out_ready, .out_data, .out_last
  );

  logic unused_res_stage;
  assign unused_res_stage = ^res_stage;
endmodule
