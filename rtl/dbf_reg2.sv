// dbf_reg2: 4x4 transposing pixel array (Reg2 of the bus-interleaved
// datapath, Fig. 8 of the method).
//
// Lines of one block come in one per cycle; the same block leaves as the
// transposed lines, one per cycle, while the next block's lines are written
// into the space just vacated, so transposition needs no stall. The array
// alternates between the two fashions named in the method:
//   orient = 0: a line is written into row `idx` and row `idx` is read;
//   orient = 1: a line is written into column `idx` and column `idx` is read.
// A block written with one orientation is read out, transposed, during the
// next block period with the other orientation. The caller toggles `orient`
// once per block (every four lines). Read data is combinational and shows
// the contents before this cycle's write.
module dbf_reg2
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       orient,
  input  logic       we,
  input  logic [1:0] idx,
  input  word_t      wdata,
  output word_t      rdata
);

  pix_t m [4][4];   // m[row][col]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) m[r][c] <= '0;
    end else if (we) begin
      for (int k = 0; k < 4; k++) begin
        if (!orient) m[idx][k] <= wdata[8*k +: 8];
        else         m[k][idx] <= wdata[8*k +: 8];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++)
      rdata[8*k +: 8] = orient ? m[k][idx] : m[idx][k];
  end

endmodule
