// tb_dbf_core: self-checking test of the de-blocking filter core.
//
// For every filtering mode (and then random ones) it builds random pixel
// regions with soft block edges, a random bS table and random thresholds,
// computes the expected filtered blocks with the reference model in
// dbf_ref_pkg, streams the mode's blocks into the core in horizontal order
// and compares every output word, in vertical order, with the reference.
// Without back-pressure it also checks the cycle count 8*NB+17 (NB blocks
// moved) from the clock edge that takes start to the edge that raises done. With random gaps on both streams it
// checks that stalls do not change the result. Counts filtered lines and
// strong (bS=4) lines so that both kinds of filtering are seen.
module tb_dbf_core;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      start;
  mode_t     start_mode;
  params_t   start_params;
  bs_table_t start_bs;
  logic      busy, done, in_valid, in_ready, out_valid, out_ready, line_filtered;
  word_t     in_data, out_data;

  dbf_core dut (.*);

  int checks = 0, failures = 0;
  int n_filtered = 0, n_stalls = 0;
  int pic [3][20][20];
  int expv [3][20][20];
  blk_t hlist[$], vlist[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (line_filtered) n_filtered++;

  function automatic int bsv(int comp, int e, int y);
    return (comp == 0) ? int'(start_bs.bs_v[e][y / 4]) : int'(start_bs.bs_v[2 * e][y / 2]);
  endfunction
  function automatic int bsh(int comp, int e, int x);
    return (comp == 0) ? int'(start_bs.bs_h[e][x / 4]) : int'(start_bs.bs_h[2 * e][x / 2]);
  endfunction

  task automatic make_reference(bit l, bit u, bit cu);
    line8_t ln;
    int n, al, be, t0, bs;
    expv = pic;
    for (int comp = 0; comp < 3; comp++) begin
      n  = (comp == 0) ? 4 : 2;
      al = (comp == 0) ? start_params.alpha_y : start_params.alpha_c;
      be = (comp == 0) ? start_params.beta_y  : start_params.beta_c;
      for (int e = 0; e < n; e++) if (e == 0 ? l : cu)
        for (int y = 0; y < 4 * n; y++) begin
          bs = bsv(comp, e, y);
          t0 = (bs >= 1 && bs <= 3) ? ((comp == 0) ? start_params.tc0_y[bs-1] : start_params.tc0_c[bs-1]) : 0;
          for (int k = 0; k < 8; k++) ln[k] = expv[comp][4 + y][4 * e + k];
          void'(ref_filter(ln, bs, al, be, t0, comp == 0));
          for (int k = 0; k < 8; k++) expv[comp][4 + y][4 * e + k] = ln[k];
        end
      for (int e = 0; e < n; e++) if (e == 0 ? u : cu)
        for (int x = 0; x < 4 * n; x++) begin
          bs = bsh(comp, e, x);
          t0 = (bs >= 1 && bs <= 3) ? ((comp == 0) ? start_params.tc0_y[bs-1] : start_params.tc0_c[bs-1]) : 0;
          for (int k = 0; k < 8; k++) ln[k] = expv[comp][4 * e + k][4 + x];
          void'(ref_filter(ln, bs, al, be, t0, comp == 0));
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

  task automatic randomize_mb(bit [2:0] lu);
    int base;
    start_mode = '{left: lu[2], upper: lu[1], cur: lu[0]};
    for (int comp = 0; comp < 3; comp++)
      for (int by = 0; by < 5; by++)
        for (int bx = 0; bx < 5; bx++) begin
          base = 60 + $urandom_range(0, 120);
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++)
              pic[comp][4 * by + y][4 * bx + x] = base + $urandom_range(0, 6) - 3;
        end
    // a few flat-against-saturated blocks exercise the clipping
    if ($urandom_range(0, 3) == 0) pic[0][8][8] = 255;
    start_params.alpha_y = 8'($urandom_range(20, 120));
    start_params.beta_y  = 8'($urandom_range(4, 18));
    start_params.alpha_c = 8'($urandom_range(20, 120));
    start_params.beta_c  = 8'($urandom_range(4, 18));
    for (int i = 0; i < 3; i++) begin
      start_params.tc0_y[i] = 5'($urandom_range(0, 13));
      start_params.tc0_c[i] = 5'($urandom_range(0, 13));
    end
    for (int e = 0; e < 4; e++)
      for (int s = 0; s < 4; s++) begin
        start_bs.bs_v[e][s] = 3'($urandom_range(0, e == 0 ? 4 : 3));
        start_bs.bs_h[e][s] = 3'($urandom_range(0, e == 0 ? 4 : 3));
      end
  endtask

  task automatic run_mb(bit [2:0] lu, bit gaps);
    int nb, cyc, outn;
    bit run_done;
    randomize_mb(lu);
    make_reference(lu[2], lu[1], lu[0]);
    block_list(1'b0, lu[2], lu[1], lu[0], hlist);
    block_list(1'b1, lu[2], lu[1], lu[0], vlist);
    nb = hlist.size();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    outn = 0;
    run_done = (nb == 0);
    fork
      begin : feed
        for (int b = 0; b < nb; b++)
          for (int i = 0; i < 4; i++) begin
            in_valid = 1'b0;
            while (gaps && $urandom_range(0, 3) == 0) begin
              n_stalls++;
              @(negedge clk);
            end
            in_valid = 1'b1;
            in_data  = row_word(pic, hlist[b], i);
            #1;
            while (!in_ready) begin
              @(negedge clk);
              #1;
            end
            @(negedge clk);
          end
        in_valid = 1'b0;
      end
      begin : drain
        while (!run_done) begin
          out_ready = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
          #1;
          if (done) run_done = 1;
          if (out_valid && out_ready) begin
            checks++;
            if (outn >= 4 * nb || out_data !== row_word(expv, vlist[outn / 4], outn % 4)) begin
              failures++;
              if (failures < 10)
                $display("mode %b word %0d: got %h expected %h", lu, outn, out_data,
                         outn < 4 * nb ? row_word(expv, vlist[outn / 4], outn % 4) : 32'h0);
            end
            outn++;
          end
          cyc++;
          @(negedge clk);
        end
      end
    join
    checks++;
    if (outn != 4 * nb) begin
      failures++;
      $display("mode %b: %0d output words, expected %0d", lu, outn, 4 * nb);
    end
    checks++;
    if (4 * nb != int'(mode_words(start_mode))) begin
      failures++;
      $display("mode %b: mode_words %0d, reference %0d", lu, mode_words(start_mode), 4 * nb);
    end
    if (!gaps && nb > 0) begin
      checks++;
      // cyc counts from the edge that takes start to the sample after done
      if (cyc - 2 != 8 * nb + 17) begin
        failures++;
        $display("mode %b: %0d cycles, expected %0d", lu, cyc - 2, 8 * nb + 17);
      end
    end
    $display("mode %0d (L%0b U%0b C%0b): %0d words each way, %0d cycles%s", mode_number(start_mode),
             lu[2], lu[1], lu[0], 4 * nb, cyc - 2, gaps ? " with stalls" : "");
  endtask

  initial begin
    start = 0; in_valid = 0; in_data = '0; out_ready = 1;
    start_mode = '0; start_params = '0; start_bs = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 7; m >= 0; m--) run_mb(3'(m), 1'b0);
    for (int t = 0; t < 12; t++) run_mb(3'($urandom_range(0, 7)), 1'b1);
    checks++;
    if (n_filtered == 0) begin
      failures++;
      $display("no line was ever filtered");
    end
    checks++;
    if (n_stalls == 0) begin
      failures++;
      $display("no input stall happened");
    end
    $display("filtered lines %0d, input stall cycles %0d", n_filtered, n_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
