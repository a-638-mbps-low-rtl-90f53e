// alpha_ram_tb: random writes to all words, then reads through both ports
// checked against a shadow copy; a write is visible on the next cycle.
module alpha_ram_tb;
  import polar_pkg::*;
  localparam int W = ALPHA_WORDS;
  logic clk = 0;
  logic [$clog2(W)-1:0] rd_addr_a, rd_addr_b, wr_addr;
  llr_t rd_data_a [PE], rd_data_b [PE], wr_data [PE];
  logic wr_en = 0;
  int checks = 0, failures = 0;
  llr_t shadow [W][PE];
  bit   valid [W];

  alpha_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // check both read ports against the shadow
      rd_addr_a = $bits(rd_addr_a)'($urandom % W);
      rd_addr_b = $bits(rd_addr_b)'($urandom % W);
      #1;
      if (valid[rd_addr_a] && valid[rd_addr_b]) begin
        checks++;
        if (rd_data_a != shadow[rd_addr_a] || rd_data_b != shadow[rd_addr_b]) begin
          failures++;
          if (failures < 5) $display("read mismatch at %0d / %0d", rd_addr_a, rd_addr_b);
        end
      end
      // a random write
      wr_en = 1'($urandom);
      wr_addr = $bits(wr_addr)'((t < W) ? t : $urandom % W);
      if (t < W) wr_en = 1;
      for (int i = 0; i < PE; i++) wr_data[i] = llr_t'($urandom);
      @(posedge clk);
      if (wr_en) begin shadow[wr_addr] = wr_data; valid[wr_addr] = 1; end
      #1 wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
