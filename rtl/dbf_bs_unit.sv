// dbf_bs_unit: boundary-strength (bS) calculation for all 32 luma edge
// segments of a macroblock, double buffered.
//
// The host first writes the side information of 24 blocks, one 32-bit word
// per block: blocks 0..15 are the current MB in raster order, 16..19 the
// left neighbour MB's right column (top to bottom), 20..23 the upper
// neighbour MB's bottom row (left to right). Word layout:
//   [31] intra coded, [30] non-zero transform coefficients,
//   [29:28] number of reference pictures (motion vectors) used,
//   [27:24] reference picture id, [23:12] mv x, [11:0] mv y (signed,
//   quarter-sample units).
// A `start` pulse then evaluates one edge segment per cycle (32 cycles):
// first the vertical edges 0..3, then the horizontal edges 0..3, each with
// segments 0..3. The decision is the tree of Fig. 4 of the method: intra
// gives 4 on the MB boundary and 3 inside, else coefficients give 2, else a
// different reference picture, a different number of references or a motion
// vector difference of 4 quarter samples or more in either component gives
// 1, else 0. Edges on a picture or slice boundary (left/top not available)
// get 0.
//
// Results go into one of two table banks, so the bS of the next MB can be
// computed while the filter core still works on the current one (the bS
// overlapping of the method). `tbl_valid` says a finished table waits;
// `tbl_take` releases it. `start` is accepted only when `start_ready`.
module dbf_bs_unit
  import dbf_pkg::*;
#(
  parameter int unsigned MV_LIMIT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        side_we,
  input  logic [4:0]  side_idx,
  input  word_t       side_data,
  input  logic        start,
  input  logic        left_avail,
  input  logic        top_avail,
  output logic        start_ready,
  output logic        busy,
  output logic        tbl_valid,
  output bs_table_t   tbl,
  input  logic        tbl_take
);

  word_t     side [24];
  bs_table_t bank [2];
  logic [1:0] full;
  logic       wr_bank, rd_bank;
  logic [4:0] ecnt;
  logic       lavail, tavail;

  // Edge under evaluation
  logic       dir;
  logic [1:0] edg, seg;
  logic [4:0] pidx, qidx;
  word_t      pw, qw;
  bs_t        bs_now;

  function automatic logic mv_far(logic [11:0] a, logic [11:0] b);
    logic signed [12:0] d;
    d = $signed({a[11], a}) - $signed({b[11], b});
    return (d >= 13'sd0 ? d : -d) >= 13'(MV_LIMIT);
  endfunction

  always_comb begin
    dir = ecnt[4];
    edg = ecnt[3:2];
    seg = ecnt[1:0];
    if (!dir) begin   // vertical edge: Q = block (seg, edg)
      qidx = {1'b0, seg, edg};
      pidx = (edg == 0) ? 5'(16 + seg) : {1'b0, seg, edg - 2'd1};
    end else begin    // horizontal edge: Q = block (edg, seg)
      qidx = {1'b0, edg, seg};
      pidx = (edg == 0) ? 5'(20 + seg) : {1'b0, edg - 2'd1, seg};
    end
    pw = side[pidx];
    qw = side[qidx];
    if (edg == 0 && ((!dir && !lavail) || (dir && !tavail)))
      bs_now = 3'd0;
    else if (pw[31] || qw[31])
      bs_now = (edg == 0) ? 3'd4 : 3'd3;
    else if (pw[30] || qw[30])
      bs_now = 3'd2;
    else if ((pw[27:24] != qw[27:24]) || (pw[29:28] != qw[29:28]) ||
             mv_far(pw[23:12], qw[23:12]) || mv_far(pw[11:0], qw[11:0]))
      bs_now = 3'd1;
    else
      bs_now = 3'd0;
  end

  assign start_ready = !busy && !full[wr_bank];
  assign tbl_valid   = full[rd_bank];
  assign tbl         = bank[rd_bank];

  always_ff @(posedge clk) begin
    if (side_we && side_idx < 5'd24) side[side_idx] <= side_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
      ecnt    <= '0;
      busy    <= 1'b0;
      lavail  <= 1'b0;
      tavail  <= 1'b0;
      bank[0] <= '0;
      bank[1] <= '0;
    end else begin
      if (start && start_ready) begin
        busy   <= 1'b1;
        ecnt   <= '0;
        lavail <= left_avail;
        tavail <= top_avail;
      end else if (busy) begin
        if (!dir) bank[wr_bank].bs_v[edg][seg] <= bs_now;
        else      bank[wr_bank].bs_h[edg][seg] <= bs_now;
        ecnt <= ecnt + 5'd1;
        if (ecnt == 5'd31) begin
          busy <= 1'b0;
          full[wr_bank] <= 1'b1;
          wr_bank <= ~wr_bank;
        end
      end
      if (tbl_take && full[rd_bank]) begin
        full[rd_bank] <= 1'b0;
        rd_bank <= ~rd_bank;
      end
    end
  end

endmodule
