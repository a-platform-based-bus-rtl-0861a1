// dbf_reg1: 4x4 pixel array that holds the intermediate lines of the block
// currently on the far side of the edge being filtered (Reg1 of the
// bus-interleaved datapath).
//
// Four 32-bit line registers. In each filtering step the 1-D filter reads
// line `idx` (the earlier block's partly filtered line) and the same line is
// overwritten with the later block's intermediate result, so read and write
// use one index in one cycle: the read is combinational and shows the old
// value, the write lands at the clock edge. The array stores lines without
// transposing; which direction a line runs in is decided by the pass
// (rows in the horizontal pass, columns in the vertical pass).
module dbf_reg1
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [1:0] idx,
  input  word_t      wdata,
  output word_t      rdata
);

  word_t mem [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) mem[i] <= '0;
    end else if (we) begin
      mem[idx] <= wdata;
    end
  end

  assign rdata = mem[idx];

endmodule
