// codeword_ram: double-buffered memory for estimated codewords, read from
// outside the decoder.
//
// The decoder's last Combine writes a whole N-bit codeword estimate in one
// cycle into the free buffer ('wr_ready' says one is free).  The reading side
// streams a stored codeword out OUT_W = 32 bits per beat on a valid/ready
// handshake, lowest position in bit 0 of the first beat, with 'out_last' on
// the final beat; the buffer is then free again.  Two buffers let a codeword
// be read while the next frame is decoded.  'next_ready' says the buffer after
// the one being written is free as well, so a following frame may start at
// once.  Width, handshake and buffer count
// are choices of this design.
module codeword_ram
  import polar_pkg::*;
#(
  parameter int unsigned LEN  = N,
  parameter int unsigned BEAT = OUT_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [LEN-1:0]  wr_data,
  output logic            wr_ready,
  output logic            next_ready,   // the other buffer is free too
  output logic            out_valid,
  input  logic            out_ready,
  output logic [BEAT-1:0] out_data,
  output logic            out_last
);
  localparam int unsigned BEATS = LEN / BEAT;

  logic [LEN-1:0]           mem [2];
  logic [1:0]               full;
  logic                     wr_sel, rd_sel;
  logic [$clog2(BEATS)-1:0] beat;

  assign wr_ready  = ~full[wr_sel];
  assign next_ready = ~full[~wr_sel];
  assign out_valid = full[rd_sel];
  assign out_data  = mem[rd_sel][int'(beat) * BEAT +: BEAT];
  assign out_last  = (int'(beat) == BEATS - 1);

  always_ff @(posedge clk)
    if (wr_en && wr_ready) mem[wr_sel] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= '0;
      wr_sel <= 1'b0;
      rd_sel <= 1'b0;
      beat   <= '0;
    end else begin
      if (wr_en && wr_ready) begin
        full[wr_sel] <= 1'b1;
        wr_sel       <= ~wr_sel;
      end
      if (out_valid && out_ready) begin
        beat <= beat + 1'b1;
        if (out_last) begin
          full[rd_sel] <= 1'b0;
          rd_sel       <= ~rd_sel;
        end
      end
    end
  end

  a_write_only_free: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> wr_ready)
    else $error("codeword_ram: write with both buffers full");
endmodule
