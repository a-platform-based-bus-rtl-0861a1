// tb_dbf_bs_unit: self-checking test of the boundary-strength unit.
// Loads random side information (biased so every bS level occurs), starts
// the calculation and compares all 32 table entries with an independent
// model of the Fig. 4 decision tree. Checks the 32-cycle calculation time,
// that two tables can wait at once (double buffering), that a third start is
// refused until one is taken, and that missing neighbours give bS 0.
module tb_dbf_bs_unit;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       side_we, start, left_avail, top_avail, start_ready, busy, tbl_valid, tbl_take;
  logic [4:0] side_idx;
  word_t      side_data;
  bs_table_t  tbl;

  dbf_bs_unit dut (.*);

  int checks = 0, failures = 0;
  int level_seen [5];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] sw [24];
  int exp_v [2][4][4], exp_h [2][4][4];

  function automatic int rbs(logic [31:0] p, logic [31:0] q, bit mbe);
    int dx, dy;
    dx = int'($signed(p[23:12])) - int'($signed(q[23:12]));
    dy = int'($signed(p[11:0])) - int'($signed(q[11:0]));
    if (p[31] | q[31]) return mbe ? 4 : 3;
    if (p[30] | q[30]) return 2;
    if (p[27:24] != q[27:24] || p[29:28] != q[29:28]) return 1;
    if (iabs(dx) >= 4 || iabs(dy) >= 4) return 1;
    return 0;
  endfunction

  task automatic load_and_start(int slot, bit lav, bit tav);
    logic [31:0] base;
    base = {2'b00, 2'd1, 4'd2, 12'($urandom_range(0, 60) - 30), 12'($urandom_range(0, 60) - 30)};
    for (int i = 0; i < 24; i++) begin
      sw[i] = base;
      case ($urandom_range(0, 9))
        0: sw[i][31] = 1'b1;
        1: sw[i][30] = 1'b1;
        2: sw[i][27:24] = 4'd5;
        3: sw[i][29:28] = 2'd2;
        4: sw[i][23:12] = sw[i][23:12] + 12'($urandom_range(0, 6) - 3);
        5: sw[i][11:0]  = sw[i][11:0] + 12'($urandom_range(0, 10) - 5);
        default: ;
      endcase
      @(negedge clk);
      side_we = 1; side_idx = 5'(i); side_data = sw[i];
    end
    @(negedge clk);
    side_we = 0;
    for (int e = 0; e < 4; e++)
      for (int s = 0; s < 4; s++) begin
        exp_v[slot][e][s] = (e == 0 && !lav) ? 0 : rbs(e == 0 ? sw[16 + s] : sw[4 * s + e - 1], sw[4 * s + e], e == 0);
        exp_h[slot][e][s] = (e == 0 && !tav) ? 0 : rbs(e == 0 ? sw[20 + s] : sw[4 * (e - 1) + s], sw[4 * e + s], e == 0);
      end
    checks++;
    if (!start_ready) begin failures++; $display("start_ready low before start"); end
    start = 1; left_avail = lav; top_avail = tav;
    @(negedge clk);
    start = 0;
  endtask

  task automatic check_table(int slot);
    checks++;
    if (!tbl_valid) begin failures++; $display("no table waiting"); end
    for (int e = 0; e < 4; e++)
      for (int s = 0; s < 4; s++) begin
        checks += 2;
        level_seen[exp_v[slot][e][s]]++;
        level_seen[exp_h[slot][e][s]]++;
        if (int'(tbl.bs_v[e][s]) != exp_v[slot][e][s] || int'(tbl.bs_h[e][s]) != exp_h[slot][e][s]) begin
          failures++;
          if (failures < 10)
            $display("edge %0d seg %0d: got v%0d h%0d expected v%0d h%0d", e, s,
                     tbl.bs_v[e][s], tbl.bs_h[e][s], exp_v[slot][e][s], exp_h[slot][e][s]);
        end
      end
  endtask

  initial begin
    int cyc;
    side_we = 0; start = 0; left_avail = 1; top_avail = 1; tbl_take = 0; side_idx = 0; side_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      load_and_start(0, t != 3, t != 5);
      cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 32) begin failures++; $display("bS took %0d cycles, expected 32", cyc); end
      check_table(0);
      // second table while the first still waits
      load_and_start(1, 1, 1);
      while (busy) @(negedge clk);
      checks++;
      if (start_ready) begin failures++; $display("start accepted with both banks full"); end
      check_table(0);
      tbl_take = 1;
      @(negedge clk);
      tbl_take = 0;
      check_table(1);
      tbl_take = 1;
      @(negedge clk);
      tbl_take = 0;
      checks++;
      if (tbl_valid) begin failures++; $display("table still valid after two takes"); end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (level_seen[k] == 0) begin failures++; $display("bS %0d never produced", k); end
    end
    $display("bS levels 0..4 seen: %0d %0d %0d %0d %0d", level_seen[0], level_seen[1],
             level_seen[2], level_seen[3], level_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
