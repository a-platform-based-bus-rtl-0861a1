// dbf_ahb_slave: 32-bit AHB-Lite slave through which the platform CPU drives
// the de-blocking filter accelerator.
//
// Register map (byte offsets; only HADDR[7:0] is decoded, all accesses are
// 32-bit words):
//   0x00 W  CTRL    [0] start filtering the MB whose bS table is ready,
//                   [1] start the bS calculation from the side information,
//                   [2] left MB available, [3] upper MB available (for [1])
//   0x00 R  STATUS  [0] core busy, [1] bS unit busy, [2] bS table ready,
//                   [3] bS unit can start, [6:4] filtering mode of the ready
//                   table (1..7, 0 = skip), [7] the last MB started had at
//                   least one line filtered, [15:8] words the mode moves each
//                   way, [23:16] number of finished MBs (wraps)
//   0x04 RW PARAM0  alpha_y [7:0], beta_y [15:8], alpha_c [23:16], beta_c [31:24]
//   0x08 RW PARAM1  tc0_y for bS 1,2,3 in [4:0],[9:5],[14:10];
//                   tc0_c for bS 1,2,3 in [20:16],[25:21],[30:26]
//   0x0C W  DATA    next input pixel word (wait states while the core cannot
//                   take it)
//   0x0C R  DATA    next filtered pixel word (wait states until one is ready)
//   0x40..0x9C W SIDE[0..23]  bS side information of one block each
// Address and control are taken in the address phase when HREADY is high;
// the write data, the wait states and the read data belong to the data
// phase, as AHB-Lite defines. HRESP is always OKAY. The register map and the
// use of wait states for flow control are this design's choice; the method
// only says the accelerator is a slave on the 32-bit AHB bus with an input
// and an output port.
module dbf_ahb_slave
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
  // to the accelerator
  output logic        start_mb,
  output logic        start_bs,
  output logic        left_avail,
  output logic        top_avail,
  output params_t     params,
  output logic        side_we,
  output logic [4:0]  side_idx,
  output word_t       side_data,
  output logic        in_valid,
  input  logic        in_ready,
  output word_t       in_data,
  input  logic        out_valid,
  output logic        out_ready,
  input  word_t       out_data,
  input  logic [31:0] status
);

  localparam logic [7:0] A_CTRL = 8'h00, A_P0 = 8'h04, A_P1 = 8'h08, A_DATA = 8'h0C;

  logic       d_valid, d_write;
  logic [7:0] d_addr;
  logic       wr_ok;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      d_valid <= 1'b0;
      d_write <= 1'b0;
      d_addr  <= '0;
    end else if (HREADY) begin
      d_valid <= HSEL && HTRANS[1];
      d_write <= HWRITE;
      d_addr  <= HADDR[7:0];
    end
  end

  wire is_data = d_valid && (d_addr == A_DATA);

  always_comb begin
    HREADYOUT = 1'b1;
    if (is_data) HREADYOUT = d_write ? in_ready : out_valid;
    HRESP = 1'b0;
    unique case (d_addr)
      A_CTRL:  HRDATA = status;
      A_P0:    HRDATA = {params.beta_c, params.alpha_c, params.beta_y, params.alpha_y};
      A_P1:    HRDATA = {1'b0, params.tc0_c[2], params.tc0_c[1], params.tc0_c[0],
                         1'b0, params.tc0_y[2], params.tc0_y[1], params.tc0_y[0]};
      A_DATA:  HRDATA = out_data;
      default: HRDATA = '0;
    endcase
    wr_ok      = d_valid && d_write;
    start_mb   = wr_ok && d_addr == A_CTRL && HWDATA[0];
    start_bs   = wr_ok && d_addr == A_CTRL && HWDATA[1];
    left_avail = HWDATA[2];
    top_avail  = HWDATA[3];
    side_we    = wr_ok && d_addr >= 8'h40 && d_addr < 8'hA0;
    side_idx   = 5'((d_addr - 8'h40) >> 2);
    side_data  = HWDATA;
    in_valid   = is_data && d_write;
    in_data    = HWDATA;
    out_ready  = is_data && !d_write;
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      params <= '0;
    end else if (wr_ok) begin
      if (d_addr == A_P0) begin
        params.alpha_y <= HWDATA[7:0];
        params.beta_y  <= HWDATA[15:8];
        params.alpha_c <= HWDATA[23:16];
        params.beta_c  <= HWDATA[31:24];
      end
      if (d_addr == A_P1) begin
        params.tc0_y <= {HWDATA[14:10], HWDATA[9:5], HWDATA[4:0]};
        params.tc0_c <= {HWDATA[30:26], HWDATA[25:21], HWDATA[20:16]};
      end
    end
  end

  // Only word transfers are supported.
  property p_word_size;
    @(posedge HCLK) disable iff (!HRESETn) (HSEL && HTRANS[1] && HREADY) |-> HSIZE == 3'b010;
  endproperty
  a_word_size: assert property (p_word_size);

endmodule
