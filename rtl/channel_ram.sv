// channel_ram: double-buffered channel LLR memory together with the channel
// loader that fills it.
//
// The loader accepts LOAD_W = 32 channel LLRs (QC = 5 bits each, 160 bits)
// per cycle on a valid/ready handshake, lowest codeword position first, and
// needs N/LOAD_W = 32 beats per frame.  Two frame buffers let one frame load
// while the other is decoded.  A buffer becomes available to the decoder
// after its last beat; the decoder reads it through two combinational ports
// of PE LLRs (word c holds positions c*PE .. c*PE+PE-1) and hands it back with
// 'frame_release', after which the loader may refill it.  'next_avail' says
// the other buffer already holds the following frame, so the decoder can
// start it in the cycle after the release.  The buffer count,
// handshake and word layout are choices of this design.
module channel_ram
  import polar_pkg::*;
#(
  parameter int unsigned LEN   = N,
  parameter int unsigned BEAT  = LOAD_W,
  parameter int unsigned LANES = PE
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // loader side
  input  logic                            in_valid,
  output logic                            in_ready,
  input  ch_llr_t                         in_llr [BEAT],
  // decoder side
  output logic                            frame_avail,
  output logic                            next_avail,   // the other buffer is full too
  input  logic                            frame_release,
  input  logic [$clog2(LEN/LANES)-1:0]    rd_addr_a,
  input  logic [$clog2(LEN/LANES)-1:0]    rd_addr_b,
  output ch_llr_t                         rd_data_a [LANES],
  output ch_llr_t                         rd_data_b [LANES]
);
  localparam int unsigned BEATS = LEN / BEAT;

  localparam int unsigned WPB   = LANES / BEAT;   // beat words per read word

  // one entry per loaded beat: BEAT LLRs, position j in bits j*QC +: QC
  logic [BEAT*QC-1:0]         mem [2*BEATS];
  logic [1:0]                 full;
  logic                       wr_sel, rd_sel;
  logic [$clog2(BEATS)-1:0]   beat;

  assign in_ready    = ~full[wr_sel];
  assign frame_avail = full[rd_sel];
  assign next_avail  = full[~rd_sel];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      mem[{wr_sel, beat}] <= {<<QC{in_llr}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= '0;
      wr_sel <= 1'b0;
      rd_sel <= 1'b0;
      beat   <= '0;
    end else begin
      if (in_valid && in_ready) begin
        beat <= beat + 1'b1;
        if (int'(beat) == BEATS - 1) begin
          full[wr_sel] <= 1'b1;
          wr_sel       <= ~wr_sel;
        end
      end
      if (frame_release) begin
        full[rd_sel] <= 1'b0;
        rd_sel       <= ~rd_sel;
      end
    end
  end

  always_comb
    for (int w = 0; w < WPB; w++)
      for (int j = 0; j < BEAT; j++) begin
        rd_data_a[w*BEAT + j] = mem[int'(rd_sel) * BEATS + int'(rd_addr_a) * WPB + w][j*QC +: QC];
        rd_data_b[w*BEAT + j] = mem[int'(rd_sel) * BEATS + int'(rd_addr_b) * WPB + w][j*QC +: QC];
      end

  a_release_only_full: assert property (@(posedge clk) disable iff (!rst_n)
    frame_release |-> frame_avail)
    else $error("channel_ram: release of a buffer that holds no frame");
endmodule
