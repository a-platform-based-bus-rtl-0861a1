// tb_dbf_mode_class: self-checking test of the MB filtering-mode classifier.
// For each of the 8 combinations of (left, upper, inside) it builds random
// bS tables with non-zero entries only where that combination allows, and
// checks the mode number against Table I of the method and the word count
// against the block list of the reference model.
module tb_dbf_mode_class;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  bs_table_t  tbl;
  mode_t      mode;
  logic [2:0] mode_num;
  logic [7:0] words;

  dbf_mode_class dut (.*);

  int checks = 0, failures = 0;
  // Table I: mode number for (left, upper, current)
  int table1 [8] = '{0, 4, 6, 2, 7, 3, 5, 1};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t q[$];
    bit l, u, c;
    for (int t = 0; t < 800; t++) begin
      {l, u, c} = 3'(t % 8);
      tbl = '0;
      // random extras, then one guaranteed non-zero entry per wanted class
      for (int s = 0; s < 4; s++) begin
        if (l && $urandom_range(0, 1)) tbl.bs_v[0][s] = 3'($urandom_range(0, 4));
        if (u && $urandom_range(0, 1)) tbl.bs_h[0][s] = 3'($urandom_range(0, 4));
      end
      if (l) tbl.bs_v[0][$urandom_range(0, 3)] = 3'($urandom_range(1, 4));
      if (u) tbl.bs_h[0][$urandom_range(0, 3)] = 3'($urandom_range(1, 4));
      if (c) begin
        if ($urandom_range(0, 1)) tbl.bs_v[$urandom_range(1, 3)][$urandom_range(0, 3)] = 3'($urandom_range(1, 3));
        else                      tbl.bs_h[$urandom_range(1, 3)][$urandom_range(0, 3)] = 3'($urandom_range(1, 3));
      end
      #1;
      block_list(1'b0, l, u, c, q);
      checks++;
      if (int'(mode_num) != table1[{l, u, c}] || int'(words) != 4 * q.size() ||
          mode != '{left: l, upper: u, cur: c}) begin
        failures++;
        if (failures < 10)
          $display("L%0b U%0b C%0b: mode %0d words %0d, expected %0d %0d", l, u, c, mode_num,
                   words, table1[{l, u, c}], 4 * q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
