// tb_dbf_ctrl: self-checking test of the data flow control unit on its own.
// For every filtering mode, with an all-ones bS table, it counts input and
// output handshakes (4 words per moved block each way), checks the SRAM
// write addresses against the horizontal block order and the SRAM read
// addresses against the vertical block order of the reference block list,
// checks that non-zero bS reaches the filter only in the pass that filters
// the mode's edges, and checks the 8*NB+17 cycle latency to done.
module tb_dbf_ctrl;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, busy, done, in_valid, in_ready, out_valid, out_ready;
  mode_t      start_mode;
  params_t    start_params;
  bs_table_t  start_bs;
  logic       src_sram, reg1_we, reg2_we, reg2_orient, fir_luma, sram_en, sram_we;
  logic [1:0] line;
  bs_t        fir_bs;
  logic [7:0] fir_alpha, fir_beta, sram_addr;
  logic [4:0] fir_tc0;

  dbf_ctrl dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bid(blk_t b);
    int base, n;
    base = (b.comp == 0) ? 0 : (b.comp == 1) ? 24 : 32;
    n = (b.comp == 0) ? 4 : 2;
    case (b.kind)
      0: return base + b.c;
      1: return base + n + b.r;
      default: return base + 2 * n + n * b.r + b.c;
    endcase
  endfunction

  initial begin
    blk_t hl[$], vl[$];
    int nin, nout, cyc, nb, bs_h_pass, bs_v_pass;
    int wr_addr[$], rd_addr[$];
    bit l, u, c;
    start = 0; in_valid = 1; out_ready = 1; start_mode = '0; start_params = '0;
    start_bs = '1;
    for (int e = 0; e < 4; e++) for (int s = 0; s < 4; s++) begin
      start_bs.bs_v[e][s] = 3'd1;
      start_bs.bs_h[e][s] = 3'd1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 7; m >= 1; m--) begin
      {l, u, c} = 3'(m);
      block_list(1'b0, l, u, c, hl);
      block_list(1'b1, l, u, c, vl);
      nb = hl.size();
      start_mode = '{left: l, upper: u, cur: c};
      @(negedge clk);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      nin = 0; nout = 0; cyc = 0; bs_h_pass = 0; bs_v_pass = 0;
      wr_addr.delete(); rd_addr.delete();
      while (1) begin
        @(posedge clk);
        cyc++;
        if (in_valid && in_ready) nin++;
        if (out_valid && out_ready) nout++;
        if (sram_en && sram_we) wr_addr.push_back(int'(sram_addr));
        if (sram_en && !sram_we && (rd_addr.size() == 0 || rd_addr[$] != int'(sram_addr)))
          rd_addr.push_back(int'(sram_addr));
        if (fir_bs != 0 && !src_sram) bs_h_pass++;
        if (fir_bs != 0 && src_sram) bs_v_pass++;
        if (done) break;
      end
      checks += 4;
      if (nin != 4 * nb || nout != 4 * nb) begin
        failures++;
        $display("mode %0d: %0d in, %0d out, expected %0d", mode_number(start_mode), nin, nout, 4 * nb);
      end
      // signals are sampled as they were before each edge, so done raised by
      // edge 8*NB+17 after the start edge is seen at edge 8*NB+18
      if (cyc - 1 != 8 * nb + 17) begin
        failures++;
        $display("mode %0d: %0d cycles, expected %0d", mode_number(start_mode), cyc - 1, 8 * nb + 17);
      end
      if ((bs_h_pass != 0) != (l || c) || (bs_v_pass != 0) != (u || c)) begin
        failures++;
        $display("mode %0d: bS steps %0d in horizontal, %0d in vertical pass", mode_number(start_mode),
                 bs_h_pass, bs_v_pass);
      end
      if (wr_addr.size() != 4 * nb || rd_addr.size() != 4 * nb) begin
        failures++;
        $display("mode %0d: %0d SRAM writes, %0d reads", mode_number(start_mode), wr_addr.size(), rd_addr.size());
      end else
        for (int k = 0; k < 4 * nb; k++) begin
          checks += 2;
          if (wr_addr[k] != 4 * bid(hl[k / 4]) + k % 4) begin
            failures++;
            if (failures < 10) $display("write %0d at %0d", k, wr_addr[k]);
          end
          if (rd_addr[k] != 4 * bid(vl[k / 4]) + k % 4) begin
            failures++;
            if (failures < 10) $display("read %0d at %0d", k, rd_addr[k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
