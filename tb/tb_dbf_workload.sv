// tb_dbf_workload: runs the accelerator at its default sizes on the mode
// mixes of two test sequences and measures the bus cycles spent per
// macroblock (MB), the way a decoder's CPU would see them.
//
// The mixes are the shares of the filtering modes measured for a
// high-motion sequence (Foreman: mode 1 29%, 2 8%, 3 8%, 4 3%, 5 11%, 6 11%,
// 7 19%, skip 21%) and a static one (Akiyo: skip 83%, the rest 1-5% each),
// scaled to whole MB counts and shuffled. Side information is generated so
// that each MB gets its intended mode. The CPU model uses pipelined AHB
// bursts for the side words and the pixel words, single transfers for the
// control registers, and loads the next MB's side information while the
// current MB is being filtered. Every output word is compared with the
// reference filter of dbf_ref_pkg.
//
// Timing checks: for each mix the average number of clock cycles per MB,
// from the first bus transfer to the last word read, must stay within 260,
// the budget of 2560x1280 pictures (12800 MBs) at 30 frames/s on a 100 MHz
// clock. The static mix must cost fewer cycles than the high-motion one, and
// a stream of mode-1 MBs is measured to show the worst case. The core's own
// busy cycles per MB are also reported next to the 8*NB+17 formula.
module tb_dbf_workload;
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

  localparam int NMB_MIX = 100;   // MBs per mode mix
  localparam int BUDGET  = 260;   // 100e6 / (160*80*30), cycles per MB

  int checks = 0, failures = 0;
  int n_wait = 0;
  int cyc = 0, core_cyc = 0;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (dut.core_busy) core_cyc++;
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


  // ------------------------------------------------------------- workloads
  // Pipelined burst of writes to consecutive word addresses.
  task automatic ahb_write_seq(logic [31:0] a0, ref word_t words[$]);
    int a, d, n;
    n = words.size();
    a = 0;
    d = -1;
    forever begin
      @(negedge clk);
      HSEL   = (a < n);
      HTRANS = (a < n) ? 2'b10 : 2'b00;
      HWRITE = 1'b1;
      HADDR  = a0 + 32'(4 * a);
      HSIZE  = 3'b010;
      if (d >= 0) HWDATA = words[d];
      #1;
      if (HREADYOUT) begin
        if (a < n) begin
          d = a;
          a++;
        end else break;
      end else n_wait++;
    end
    HSEL = 0;
    HTRANS = 2'b00;
  endtask

  bit [2:0] want [NMB_MIX];

  task automatic load_bs(int m);
    word_t sw[$];
    gen_side(want[m][2], want[m][1], want[m][0]);
    for (int i = 0; i < 24; i++) sw.push_back(side_word(side[i]));
    ahb_write_seq(32'h40, sw);
    ahb_write(32'h00, 32'h0000_000E);   // start bS, both neighbours available
  endtask

  // mode number 0..7 (0 = skip) to left/upper/current flags
  function automatic bit [2:0] flags_of(int mode);
    case (mode)
      1: return 3'b111;
      2: return 3'b011;
      3: return 3'b101;
      4: return 3'b001;
      5: return 3'b110;
      6: return 3'b010;
      7: return 3'b100;
      default: return 3'b000;
    endcase
  endfunction

  // Run one mix; share[k] is the weight of mode k (0 = skip). Returns the
  // average cycles per MB.
  task automatic run_mix(string name, int share [8], output real avg);
    logic [31:0] st;
    int          total, cnt [8], k, nb, exp_mode, t0, c0, sum_formula, tmp;
    bit          l, u, cu;
    word_t       words[$];
    blk_t        hl[$], vl[$];

    total = 0;
    for (int i = 0; i < 8; i++) total += share[i];
    k = 0;
    for (int i = 0; i < 8; i++) begin
      cnt[i] = (share[i] * NMB_MIX + total / 2) / total;
      for (int j = 0; j < cnt[i] && k < NMB_MIX; j++) want[k++] = flags_of(i);
    end
    while (k < NMB_MIX) want[k++] = 3'b000;
    for (int i = NMB_MIX - 1; i > 0; i--) begin   // shuffle
      int j;
      bit [2:0] t;
      j = $urandom_range(0, i);
      t = want[i]; want[i] = want[j]; want[j] = t;
    end

    sum_formula = 0;
    t0 = cyc;
    c0 = core_cyc;
    load_bs(0);
    for (int m = 0; m < NMB_MIX; m++) begin
      ref_bs_table(1'b1, 1'b1);
      l = 0; u = 0; cu = 0;
      for (int s = 0; s < 4; s++) begin
        if (rbs_v[0][s] != 0) l = 1;
        if (rbs_h[0][s] != 0) u = 1;
        for (int e = 1; e < 4; e++) if (rbs_v[e][s] != 0 || rbs_h[e][s] != 0) cu = 1;
      end
      exp_mode = (!l && !u && !cu) ? 0 : (l && u && cu) ? 1 : (!l && u && cu) ? 2 :
                 (l && !u && cu) ? 3 : (!l && !u && cu) ? 4 : (l && u) ? 5 : u ? 6 : 7;
      checks++;
      if ({l, u, cu} != want[m]) begin
        failures++;
        $display("%s MB %0d: side information gives flags %b, wanted %b", name, m, {l, u, cu}, want[m]);
      end
      block_list(1'b0, l, u, cu, hl);
      block_list(1'b1, l, u, cu, vl);
      nb = hl.size();
      if (nb > 0) sum_formula += 8 * nb + 17;

      do ahb_read(32'h00, st); while (!st[2] || st[0]);
      checks++;
      if (int'(st[6:4]) != exp_mode || int'(st[15:8]) != 4 * nb) begin
        failures++;
        $display("%s MB %0d: STATUS mode %0d words %0d, expected mode %0d words %0d",
                 name, m, st[6:4], st[15:8], exp_mode, 4 * nb);
      end

      gen_pixels();
      make_reference(l, u, cu);
      ahb_write(32'h04, {8'(be[1]), 8'(al[1]), 8'(be[0]), 8'(al[0])});
      ahb_write(32'h08, {1'b0, 5'(tc0[1][2]), 5'(tc0[1][1]), 5'(tc0[1][0]),
                         1'b0, 5'(tc0[0][2]), 5'(tc0[0][1]), 5'(tc0[0][0])});
      ahb_write(32'h00, 32'h1);

      words.delete();
      for (int b = 0; b < nb; b++)
        for (int i = 0; i < 4; i++) words.push_back(row_word(pic, hl[b], i));
      if (nb > 0) ahb_burst(1'b1, words);

      if (m + 1 < NMB_MIX) load_bs(m + 1);

      words.delete();
      for (int i = 0; i < 4 * nb; i++) words.push_back('0);
      if (nb > 0) ahb_burst(1'b0, words);
      for (int i = 0; i < 4 * nb; i++) begin
        checks++;
        if (words[i] !== row_word(expv, vl[i / 4], i % 4)) begin
          failures++;
          if (failures < 10)
            $display("%s MB %0d mode %0d word %0d: got %h expected %h", name, m, exp_mode, i,
                     words[i], row_word(expv, vl[i / 4], i % 4));
        end
      end
    end
    avg = real'(cyc - t0) / NMB_MIX;
    tmp = core_cyc - c0;
    $display("%s: %0d MBs, modes skip..7 = %0d %0d %0d %0d %0d %0d %0d %0d", name, NMB_MIX,
             cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5], cnt[6], cnt[7]);
    $display("%s: %0.1f bus cycles per MB; core busy %0.1f cycles per MB (8*NB+17 gives %0.1f)",
             name, avg, real'(tmp) / NMB_MIX, real'(sum_formula) / NMB_MIX);
    checks++;
    if (tmp < sum_formula) begin
      failures++;
      $display("%s: core busy %0d cycles, fewer than the formula's %0d", name, tmp, sum_formula);
    end
  endtask

  initial begin
    real avg_foreman, avg_akiyo, avg_worst;
    int  mix_foreman [8] = '{21, 29, 8, 8, 3, 11, 11, 19};
    int  mix_akiyo   [8] = '{83, 5, 1, 2, 1, 1, 3, 3};
    int  mix_worst   [8] = '{0, 1, 0, 0, 0, 0, 0, 0};

    HSEL = 0; HTRANS = 0; HWRITE = 0; HADDR = 0; HSIZE = 3'b010; HWDATA = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run_mix("foreman mix", mix_foreman, avg_foreman);
    run_mix("akiyo mix", mix_akiyo, avg_akiyo);
    run_mix("all mode 1", mix_worst, avg_worst);

    checks++;
    if (avg_foreman > real'(BUDGET)) begin
      failures++;
      $display("foreman mix needs %0.1f cycles per MB, budget %0d", avg_foreman, BUDGET);
    end
    checks++;
    if (avg_akiyo > real'(BUDGET)) begin
      failures++;
      $display("akiyo mix needs %0.1f cycles per MB, budget %0d", avg_akiyo, BUDGET);
    end
    checks++;
    if (!(avg_akiyo < avg_foreman && avg_foreman < avg_worst)) begin
      failures++;
      $display("cycles per MB do not follow the amount of data moved");
    end
    $display("2560x1280@30Hz at 100 MHz allows %0d cycles per MB: foreman %0.1f, akiyo %0.1f, all mode 1 %0.1f",
             BUDGET, avg_foreman, avg_akiyo, avg_worst);
    $display("QCIF@15fps at 20 MHz allows %0d cycles per MB", 20000000 / (99 * 15));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
