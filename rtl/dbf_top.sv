// dbf_top: the de-blocking filter accelerator as an AHB slave of the H.264
// decoder platform (Fig. 1 and Fig. 7 of the method).
//
// The CPU writes each MB's side information, starts the boundary-strength
// unit (dbf_bs_unit), reads back the filtering mode the classifier
// (dbf_mode_class) derived from the bS table together with the number of
// words to move, writes the filter thresholds, starts the MB and then
// streams the mode's blocks in and the filtered blocks out through the DATA
// register (dbf_ahb_slave). The filter core (dbf_core) works on the words as
// they arrive. Because the bS unit has two table banks, the next MB's bS can
// be computed while the current MB is still being filtered.
//
// `start_mb` is taken only when the core is idle and a bS table is ready; it
// consumes that table. `mb_done` pulses when a MB has been filtered (or was
// found to be skip mode), usable as an interrupt. STATUS bit 7 tells whether
// the last MB started had any line that met the filter condition, which lets
// software see that thresholds and bS actually took effect.
module dbf_top
  import dbf_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [31:0] HWDATA,
  input  logic        HREADY,
  output logic [31:0] HRDATA,
  output logic        HREADYOUT,
  output logic        HRESP,
  output logic        mb_done
);

  logic      start_mb, start_bs, left_avail, top_avail, side_we;
  logic [4:0] side_idx;
  word_t     side_data, in_data, out_data;
  params_t   params;
  logic      in_valid, in_ready, out_valid, out_ready;
  logic      bs_start_ready, bs_busy, tbl_valid, tbl_take;
  bs_table_t tbl;
  mode_t     mode;
  logic [2:0] mode_num;
  logic [7:0] words;
  logic      core_busy, core_start, line_filtered;
  logic [7:0] n_done;
  logic      any_filtered;
  logic [31:0] status;

  dbf_ahb_slave u_ahb (
    .HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA, .HREADY,
    .HRDATA, .HREADYOUT, .HRESP,
    .start_mb, .start_bs, .left_avail, .top_avail, .params,
    .side_we, .side_idx, .side_data,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .status
  );

  dbf_bs_unit u_bs (
    .clk(HCLK), .rst_n(HRESETn), .side_we, .side_idx, .side_data,
    .start(start_bs), .left_avail, .top_avail, .start_ready(bs_start_ready),
    .busy(bs_busy), .tbl_valid, .tbl, .tbl_take
  );

  dbf_mode_class u_mode (.tbl, .mode, .mode_num, .words);

  assign core_start = start_mb && tbl_valid && !core_busy;
  assign tbl_take   = core_start;

  dbf_core u_core (
    .clk(HCLK), .rst_n(HRESETn), .start(core_start), .start_mode(mode),
    .start_params(params), .start_bs(tbl), .busy(core_busy), .done(mb_done),
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .line_filtered
  );

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) n_done <= '0;
    else if (mb_done) n_done <= n_done + 8'd1;
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)           any_filtered <= 1'b0;
    else if (core_start)    any_filtered <= 1'b0;
    else if (line_filtered) any_filtered <= 1'b1;
  end

  assign status = {8'd0, n_done, words, any_filtered, mode_num, bs_start_ready, tbl_valid,
                   bs_busy, core_busy};

endmodule
