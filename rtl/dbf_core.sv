// dbf_core: the bus-interleaved de-blocking filter datapath of Fig. 7 of the
// method, without its bus interface.
//
// Blocks: the 1-D adaptive filter (dbf_fir), the intermediate array Reg1
// (dbf_reg1), the transposing array Reg2 (dbf_reg2), the single-ported local
// SRAM (dbf_sram) and the data flow control unit (dbf_ctrl). The multiplexer
// in front of the filter's B input selects the input port in the horizontal
// pass and the SRAM in the vertical pass; the switch after Reg2 sends
// transposed blocks to the SRAM in the horizontal pass and to the output port
// in the vertical pass.
//
// Use: pulse `start` with the MB's filtering mode, thresholds and bS table;
// write the mode's blocks as 32-bit row words on the input stream in the
// horizontal slot order of dbf_pkg; read the filtered blocks as row words
// from the output stream in the vertical slot order; `done` pulses at the
// end. Timing is given in dbf_ctrl.
module dbf_core
  import dbf_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = SRAM_WORDS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  mode_t     start_mode,
  input  params_t   start_params,
  input  bs_table_t start_bs,
  output logic      busy,
  output logic      done,
  input  logic      in_valid,
  output logic      in_ready,
  input  word_t     in_data,
  output logic      out_valid,
  input  logic      out_ready,
  output word_t     out_data,
  output logic      line_filtered   // a line met Eq. (1) in this cycle's step
);

  localparam int unsigned AW = $clog2(SRAM_DEPTH);

  logic          src_sram, reg1_we, reg2_we, reg2_orient, fir_luma, fir_flt;
  logic [1:0]    line;
  bs_t           fir_bs;
  logic [7:0]    fir_alpha, fir_beta;
  logic [4:0]    fir_tc0;
  logic          sram_en, sram_we;
  logic [AW-1:0] sram_addr;
  word_t         sram_rdata, reg1_rdata, reg2_rdata, fir_b_in, fir_a_out, fir_b_out;

  dbf_ctrl #(.SRAM_DEPTH(SRAM_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .start_mode, .start_params, .start_bs, .busy, .done,
    .in_valid, .in_ready, .out_valid, .out_ready,
    .src_sram, .line, .reg1_we, .reg2_we, .reg2_orient,
    .fir_bs, .fir_alpha, .fir_beta, .fir_tc0, .fir_luma,
    .sram_en, .sram_we, .sram_addr
  );

  assign fir_b_in = src_sram ? sram_rdata : in_data;

  dbf_fir u_fir (
    .a_word(reg1_rdata), .b_word(fir_b_in), .bs(fir_bs), .alpha(fir_alpha),
    .beta(fir_beta), .tc0(fir_tc0), .luma(fir_luma),
    .a_out(fir_a_out), .b_out(fir_b_out), .filtered(fir_flt)
  );

  dbf_reg1 u_reg1 (
    .clk, .rst_n, .we(reg1_we), .idx(line), .wdata(fir_b_out), .rdata(reg1_rdata)
  );

  dbf_reg2 u_reg2 (
    .clk, .rst_n, .orient(reg2_orient), .we(reg2_we), .idx(line),
    .wdata(fir_a_out), .rdata(reg2_rdata)
  );

  dbf_sram #(.DEPTH(SRAM_DEPTH)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(reg2_rdata), .rdata(sram_rdata)
  );

  assign out_data      = reg2_rdata;
  assign line_filtered = fir_flt && reg2_we;

endmodule
