// tb_dbf_top: end-to-end test of the de-blocking filter accelerator at its
// default sizes, driven the way the platform CPU would drive it over AHB.
//
// For a sequence of macroblocks it writes random side information chosen to
// produce every filtering mode (and picture edges where a neighbour is
// missing), starts the bS unit, reads the mode and word count back from
// STATUS and checks them against an independent model of the bS decision
// tree and the mode table, writes thresholds, starts the MB, streams the
// mode's blocks in with a pipelined AHB burst and reads the filtered blocks
// back, comparing each word with the reference filter of dbf_ref_pkg. While
// a MB is being filtered it already loads the next MB's side information and
// starts its bS calculation (bS overlapping). It counts how often each
// mechanism happened: every mode including skip, bS computed while the core
// filters, output wait states, lines filtered with bS < 4 and with bS = 4,
// chroma lines filtered, and a missing neighbour.
module tb_dbf_top;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        HSEL, HWRITE, HREADYOUT, HRESP, mb_done;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS;
  logic [2:0]  HSIZE;

  dbf_top dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA,
    .HREADY(HREADYOUT), .HRDATA, .HREADYOUT, .HRESP, .mb_done
  );

  localparam int NMB = 20;

  int checks = 0, failures = 0;
  int mode_seen [8];
  int n_overlap = 0, n_wait = 0, n_weak = 0, n_strong = 0, n_chroma = 0, n_noavail = 0;
  int n_done = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors
  always @(posedge clk) begin
    if (dut.bs_busy && dut.core_busy) n_overlap++;
    if (dut.u_core.line_filtered) begin
      if (dut.u_core.fir_bs == 3'd4) n_strong++;
      else n_weak++;
      if (!dut.u_core.fir_luma) n_chroma++;
    end
    if (mb_done) n_done++;
  end

  // ---------------------------------------------------------------- AHB BFM
  task automatic ahb_single(bit wr, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    HSEL = 1; HTRANS = 2'b10; HWRITE = wr; HADDR = a; HSIZE = 3'b010;
    @(negedge clk);
    HTRANS = 2'b00; HSEL = 0;
    HWDATA = wd;
    #1;
    while (!HREADYOUT) begin
      n_wait++;
      @(negedge clk);
      #1;
    end
    rd = HRDATA;
  endtask

  task automatic ahb_write(logic [31:0] a, logic [31:0] wd);
    logic [31:0] dummy;
    ahb_single(1'b1, a, wd, dummy);
  endtask

  task automatic ahb_read(logic [31:0] a, output logic [31:0] rd);
    ahb_single(1'b0, a, 32'h0, rd);
  endtask

  // Pipelined burst on the DATA register: the address phase of word k+1
  // overlaps the data phase of word k.
  task automatic ahb_burst(bit wr, ref word_t words[$]);
    int a, d, n;
    n = words.size();
    a = 0;
    d = -1;
    forever begin
      @(negedge clk);
      HSEL   = (a < n);
      HTRANS = (a < n) ? 2'b10 : 2'b00;
      HWRITE = wr;
      HADDR  = 32'h0C;
      HSIZE  = 3'b010;
      if (wr && d >= 0) HWDATA = words[d];
      #1;
      if (HREADYOUT) begin
        if (!wr && d >= 0) words[d] = HRDATA;
        if (a < n) begin
          d = a;
          a++;
        end else break;
      end else n_wait++;
    end
    HSEL = 0;
    HTRANS = 2'b00;
  endtask

  // ------------------------------------------------- side info and bS model
  typedef struct { bit intra; bit nz; int nref; int refid; int mvx; int mvy; } side_t;
  side_t side [24];

  function automatic logic [31:0] side_word(side_t s);
    return {s.intra, s.nz, 2'(s.nref), 4'(s.refid), 12'(s.mvx), 12'(s.mvy)};
  endfunction

  // Fig. 4 decision tree, with the H.264 motion-vector limit of 4 quarter samples
  function automatic int ref_bs(side_t p, side_t q, bit mb_edge);
    if (p.intra || q.intra) return mb_edge ? 4 : 3;
    if (p.nz || q.nz) return 2;
    if (p.refid != q.refid) return 1;
    if (p.nref != q.nref) return 1;
    if (iabs(p.mvx - q.mvx) >= 4 || iabs(p.mvy - q.mvy) >= 4) return 1;
    return 0;
  endfunction

  int rbs_v [4][4], rbs_h [4][4];   // [edge][segment]

  task automatic ref_bs_table(bit lav, bit tav);
    for (int e = 0; e < 4; e++)
      for (int s = 0; s < 4; s++) begin
        // vertical edge e, block row s
        rbs_v[e][s] = (e == 0 && !lav) ? 0 :
                      ref_bs(e == 0 ? side[16 + s] : side[s * 4 + e - 1], side[s * 4 + e], e == 0);
        // horizontal edge e, block column s
        rbs_h[e][s] = (e == 0 && !tav) ? 0 :
                      ref_bs(e == 0 ? side[20 + s] : side[(e - 1) * 4 + s], side[e * 4 + s], e == 0);
      end
  endtask

  task automatic gen_side(bit l, bit u, bit c);
    side_t base;
    int k;
    base = '{0, 0, 1, 3, $urandom_range(0, 40) - 20, $urandom_range(0, 40) - 20};
    for (int i = 0; i < 24; i++) side[i] = base;
    if (l) begin
      k = 16 + $urandom_range(0, 3);
      case ($urandom_range(0, 2))
        0: side[k].intra = 1;
        1: side[k].nz = 1;
        default: side[k].mvx += 5;
      endcase
    end
    if (u) begin
      k = 20 + $urandom_range(0, 3);
      case ($urandom_range(0, 2))
        0: side[k].intra = 1;
        1: side[k].nz = 1;
        default: side[k].mvy -= 4;
      endcase
    end
    if (c) begin
      k = 4 * $urandom_range(1, 3) + $urandom_range(1, 3);
      case ($urandom_range(0, 4))
        0: side[k].intra = 1;
        1: side[k].nz = 1;
        2: side[k].refid = 7;
        3: side[k].nref = 2;
        default: side[k].mvx -= 6;
      endcase
    end
  endtask

  // ------------------------------------------------------- pixel reference
  int pic [3][20][20];
  int expv [3][20][20];
  int al [2], be [2], tc0 [2][3];
  int n_ref_lines;   // lines the reference filtered in the current MB

  function automatic int rb(int comp, bit vert, int e, int pos);
    if (comp == 0) return vert ? rbs_h[e][pos / 4] : rbs_v[e][pos / 4];
    return vert ? rbs_h[2 * e][pos / 2] : rbs_v[2 * e][pos / 2];
  endfunction

  task automatic make_reference(bit l, bit u, bit cu);
    line8_t ln;
    int n, bs, t0, ci;
    expv = pic;
    n_ref_lines = 0;
    for (int comp = 0; comp < 3; comp++) begin
      n = (comp == 0) ? 4 : 2;
      ci = (comp == 0) ? 0 : 1;
      for (int e = 0; e < n; e++) if (e == 0 ? l : cu)
        for (int y = 0; y < 4 * n; y++) begin
          bs = rb(comp, 0, e, y);
          t0 = (bs >= 1 && bs <= 3) ? tc0[ci][bs - 1] : 0;
          for (int k = 0; k < 8; k++) ln[k] = expv[comp][4 + y][4 * e + k];
          if (ref_filter(ln, bs, al[ci], be[ci], t0, comp == 0)) n_ref_lines++;
          for (int k = 0; k < 8; k++) expv[comp][4 + y][4 * e + k] = ln[k];
        end
      for (int e = 0; e < n; e++) if (e == 0 ? u : cu)
        for (int x = 0; x < 4 * n; x++) begin
          bs = rb(comp, 1, e, x);
          t0 = (bs >= 1 && bs <= 3) ? tc0[ci][bs - 1] : 0;
          for (int k = 0; k < 8; k++) ln[k] = expv[comp][4 * e + k][4 + x];
          if (ref_filter(ln, bs, al[ci], be[ci], t0, comp == 0)) n_ref_lines++;
          for (int k = 0; k < 8; k++) expv[comp][4 * e + k][4 + x] = ln[k];
        end
    end
  endtask

  function automatic word_t row_word(int a [3][20][20], blk_t b, int i);
    int y0, x0;
    word_t wv;
    blk_origin(b, y0, x0);
    for (int k = 0; k < 4; k++) wv[8*k +: 8] = 8'(a[b.comp][y0 + i][x0 + k]);
    return wv;
  endfunction

  task automatic gen_pixels();
    int base;
    for (int comp = 0; comp < 3; comp++)
      for (int by = 0; by < 5; by++)
        for (int bx = 0; bx < 5; bx++) begin
          base = 40 + $urandom_range(0, 160);
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++)
              pic[comp][4 * by + y][4 * bx + x] = base + $urandom_range(0, 4) - 2;
        end
    for (int i = 0; i < 2; i++) begin
      al[i] = $urandom_range(30, 140);
      be[i] = $urandom_range(5, 18);
      for (int j = 0; j < 3; j++) tc0[i][j] = $urandom_range(0, 12);
    end
  endtask

  // ------------------------------------------------------------- the test
  bit [2:0] want [NMB];
  bit       lav [NMB], tav [NMB];

  task automatic load_bs(int m);
    gen_side(want[m][2], want[m][1], want[m][0]);
    for (int i = 0; i < 24; i++) ahb_write(32'h40 + 4 * i, side_word(side[i]));
    ahb_write(32'h00, {28'd0, tav[m], lav[m], 2'b10});
  endtask

  initial begin
    logic [31:0] st, rd;
    int          exp_mode, nb, done_before;
    bit          l, u, cu;
    word_t       words[$];
    blk_t        hl[$], vl[$];

    HSEL = 0; HTRANS = 0; HWRITE = 0; HADDR = 0; HSIZE = 3'b010; HWDATA = 0;
    for (int m = 0; m < NMB; m++) begin
      want[m] = (m < 8) ? 3'(7 - m) : 3'($urandom_range(0, 7));
      lav[m]  = (m == 9) ? 1'b0 : 1'b1;
      tav[m]  = (m == 12) ? 1'b0 : 1'b1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    load_bs(0);
    for (int m = 0; m < NMB; m++) begin
      ref_bs_table(lav[m], tav[m]);
      if (!lav[m] || !tav[m]) n_noavail++;
      l = 0; u = 0; cu = 0;
      for (int s = 0; s < 4; s++) begin
        if (rbs_v[0][s] != 0) l = 1;
        if (rbs_h[0][s] != 0) u = 1;
        for (int e = 1; e < 4; e++) if (rbs_v[e][s] != 0 || rbs_h[e][s] != 0) cu = 1;
      end
      exp_mode = (!l && !u && !cu) ? 0 : (l && u && cu) ? 1 : (!l && u && cu) ? 2 :
                 (l && !u && cu) ? 3 : (!l && !u && cu) ? 4 : (l && u) ? 5 : u ? 6 : 7;
      block_list(1'b0, l, u, cu, hl);
      block_list(1'b1, l, u, cu, vl);
      nb = hl.size();

      // wait for the table and an idle core
      do ahb_read(32'h00, st); while (!st[2] || st[0]);
      checks++;
      if (int'(st[6:4]) != exp_mode || int'(st[15:8]) != 4 * nb) begin
        failures++;
        $display("MB %0d: STATUS mode %0d words %0d, expected mode %0d words %0d",
                 m, st[6:4], st[15:8], exp_mode, 4 * nb);
      end
      mode_seen[exp_mode]++;

      gen_pixels();
      make_reference(l, u, cu);
      ahb_write(32'h04, {8'(be[1]), 8'(al[1]), 8'(be[0]), 8'(al[0])});
      ahb_write(32'h08, {1'b0, 5'(tc0[1][2]), 5'(tc0[1][1]), 5'(tc0[1][0]),
                         1'b0, 5'(tc0[0][2]), 5'(tc0[0][1]), 5'(tc0[0][0])});
      ahb_read(32'h04, rd);
      checks++;
      if (rd[15:0] != {8'(be[0]), 8'(al[0])}) begin
        failures++;
        $display("PARAM0 read back %h", rd);
      end
      done_before = n_done;
      ahb_write(32'h00, 32'h1);

      words.delete();
      for (int b = 0; b < nb; b++)
        for (int i = 0; i < 4; i++) words.push_back(row_word(pic, hl[b], i));
      if (nb > 0) ahb_burst(1'b1, words);

      // overlap: next MB's bS while this one is filtered
      if (m + 1 < NMB) load_bs(m + 1);

      words.delete();
      for (int i = 0; i < 4 * nb; i++) words.push_back('0);
      if (nb > 0) ahb_burst(1'b0, words);
      for (int i = 0; i < 4 * nb; i++) begin
        checks++;
        if (words[i] !== row_word(expv, vl[i / 4], i % 4)) begin
          failures++;
          if (failures < 10)
            $display("MB %0d mode %0d word %0d: got %h expected %h", m, exp_mode, i,
                     words[i], row_word(expv, vl[i / 4], i % 4));
        end
      end
      repeat (2) @(negedge clk);
      checks++;
      if (n_done != done_before + 1) begin
        failures++;
        $display("MB %0d: done pulses %0d", m, n_done - done_before);
      end
      ahb_read(32'h00, rd);
      checks++;
      if (rd[7] != (n_ref_lines > 0)) begin
        failures++;
        $display("MB %0d: STATUS filtered flag %0b, reference filtered %0d lines", m, rd[7],
                 n_ref_lines);
      end
      $display("MB %0d: mode %0d, %0d words each way", m, exp_mode, 4 * nb);
    end

    for (int k = 0; k < 8; k++) begin
      checks++;
      if (mode_seen[k] == 0) begin
        failures++;
        $display("mode %0d never happened", k);
      end
    end
    checks++; if (n_overlap == 0) begin failures++; $display("no bS overlap"); end
    checks++; if (n_wait == 0)    begin failures++; $display("no wait state"); end
    checks++; if (n_weak == 0)    begin failures++; $display("no bS<4 filtering"); end
    checks++; if (n_strong == 0)  begin failures++; $display("no bS=4 filtering"); end
    checks++; if (n_chroma == 0)  begin failures++; $display("no chroma filtering"); end
    checks++; if (n_noavail == 0) begin failures++; $display("no missing neighbour"); end
    $display("modes skip..7: %0d %0d %0d %0d %0d %0d %0d %0d", mode_seen[0], mode_seen[1],
             mode_seen[2], mode_seen[3], mode_seen[4], mode_seen[5], mode_seen[6], mode_seen[7]);
    $display("bS overlap cycles %0d, wait states %0d, lines bS<4 %0d, bS=4 %0d, chroma %0d",
             n_overlap, n_wait, n_weak, n_strong, n_chroma);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
