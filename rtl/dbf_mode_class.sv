// dbf_mode_class: classifies a macroblock into one of the eight filtering
// modes of the adaptive transmission scheme (Table I of the method).
//
// From the MB's bS table it decides whether the left MB boundary (any
// vertical edge-0 segment with bS != 0), the upper MB boundary (any
// horizontal edge-0 segment) and the inside of the MB (any other segment)
// need filtering. The three flags select mode 1..7 or skip (0). It also
// gives the number of 32-bit words the host moves in each direction for
// that mode with this design's block layout (see dbf_pkg). Combinational.
module dbf_mode_class
  import dbf_pkg::*;
(
  input  bs_table_t  tbl,
  output mode_t      mode,
  output logic [2:0] mode_num,
  output logic [7:0] words
);

  always_comb begin
    mode = '0;
    for (int s = 0; s < 4; s++) begin
      if (tbl.bs_v[0][s] != 3'd0) mode.left  = 1'b1;
      if (tbl.bs_h[0][s] != 3'd0) mode.upper = 1'b1;
      for (int e = 1; e < 4; e++)
        if (tbl.bs_v[e][s] != 3'd0 || tbl.bs_h[e][s] != 3'd0) mode.cur = 1'b1;
    end
    mode_num = mode_number(mode);
    words    = mode_words(mode);
  end

endmodule
