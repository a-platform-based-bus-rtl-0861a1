// tb_dbf_fir: self-checking test of the 1-D adaptive de-blocking filter.
// Random lines (mostly soft edges, some hard ones) with every bS value, luma
// and chroma, random thresholds; each output is compared with the reference
// filter of dbf_ref_pkg. Also checks a few hand-worked lines and counts how
// often each filter branch (no filtering, bS<4, strong bS=4) was taken.
module tb_dbf_fir;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  word_t      a_word, b_word, a_out, b_out;
  bs_t        bs;
  logic [7:0] alpha, beta;
  logic [4:0] tc0;
  logic       luma, filtered;

  dbf_fir dut (.*);

  int checks = 0, failures = 0, n_skip = 0, n_weak = 0, n_strong = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_line(string what);
    line8_t l;
    word_t ea, eb;
    bit f;
    for (int k = 0; k < 4; k++) begin
      l[k] = a_word[8*k +: 8];
      l[4 + k] = b_word[8*k +: 8];
    end
    f = ref_filter(l, bs, alpha, beta, tc0, luma);
    for (int k = 0; k < 4; k++) begin
      ea[8*k +: 8] = 8'(l[k]);
      eb[8*k +: 8] = 8'(l[4 + k]);
    end
    #1;
    checks++;
    if (a_out !== ea || b_out !== eb || filtered !== f) begin
      failures++;
      if (failures < 10)
        $display("%s: bs=%0d luma=%0d a=%h b=%h -> %h %h, expected %h %h", what, bs, luma,
                 a_word, b_word, a_out, b_out, ea, eb);
    end
    if (!f) n_skip++; else if (bs == 4) n_strong++; else n_weak++;
  endtask

  initial begin
    int base, step;
    // Hand-worked: flat 100 | 104, bS=2, luma, alpha 40, beta 10, tc0 1.
    // delta = clip(-2,2,(4*4 + 0 + 4)>>3 = 2) = 2 -> A0 102, B0 102;
    // A1: (100 + 102 - 200)>>1 = 1 -> 101; B1: (104 + 102 - 208)>>1 = -1 -> 103.
    a_word = {4{8'd100}}; b_word = {4{8'd104}};
    bs = 3'd2; alpha = 8'd40; beta = 8'd10; tc0 = 5'd1; luma = 1'b1;
    #1;
    checks++;
    if (a_out !== 32'h66_65_64_64 || b_out !== 32'h68_68_67_66) begin
      failures++;
      $display("hand case 1: %h %h", a_out, b_out);
    end
    // Strong luma filter, bS=4: p = 100, q = 104 -> A0 = (100+200+200+208+104+4)>>3 = 102,
    // A1 = (100+100+100+104+2)>>2 = 101, B0 = (100+200+208+208+104+4)>>3 = 103
    bs = 3'd4;
    #1;
    checks++;
    if (a_out[31:24] !== 8'd102 || b_out[7:0] !== 8'd103 || a_out[23:16] !== 8'd101) begin
      failures++;
      $display("hand case 2: %h %h", a_out, b_out);
    end
    for (int t = 0; t < 20000; t++) begin
      base = $urandom_range(0, 255);
      step = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 255) - 128 : $urandom_range(0, 16) - 8;
      for (int k = 0; k < 4; k++) begin
        a_word[8*k +: 8] = 8'(clip(0, 255, base + $urandom_range(0, 4) - 2));
        b_word[8*k +: 8] = 8'(clip(0, 255, base + step + $urandom_range(0, 4) - 2));
      end
      bs    = 3'($urandom_range(0, 4));
      alpha = 8'($urandom_range(0, 255));
      beta  = 8'($urandom_range(0, 20));
      tc0   = 5'($urandom_range(0, 25));
      luma  = 1'($urandom_range(0, 1));
      check_line("random");
    end
    checks++;
    if (n_skip == 0 || n_weak == 0 || n_strong == 0) begin
      failures++;
      $display("a filter branch was never taken");
    end
    $display("unfiltered %0d, bS<4 %0d, bS=4 %0d", n_skip, n_weak, n_strong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
