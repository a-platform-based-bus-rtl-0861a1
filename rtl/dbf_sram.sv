// dbf_sram: single-ported local SRAM of the de-blocking filter, 32-bit words.
//
// One access per cycle, either a write or a read (never both), with the read
// data registered: the word at `addr` appears on `rdata` in the cycle after
// `en` with `we` low, and stays until the next read. The horizontal pass only
// writes it and the vertical pass only reads it, so one port suffices.
// Written as an array for synthesis to map onto a single-port macro.
module dbf_sram #(
  parameter int unsigned DEPTH = 160,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
