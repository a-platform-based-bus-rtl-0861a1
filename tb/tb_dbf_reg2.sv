// tb_dbf_reg2: self-checking test of the transposing 4x4 pixel array.
// Streams random 4x4 blocks through it, one line per cycle, toggling the
// orientation every four lines as the controller does, and checks that each
// block comes out one block period later as its transpose (column k of the
// block as output line k), with no idle cycle between blocks (Fig. 8).
module tb_dbf_reg2;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       orient, we;
  logic [1:0] idx;
  word_t      wdata, rdata;

  dbf_reg2 dut (.*);

  int checks = 0, failures = 0;
  word_t blocks [64][4];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t column(int b, int k);
    word_t c;
    for (int i = 0; i < 4; i++) c[8*i +: 8] = blocks[b][i][8*k +: 8];
    return c;
  endfunction

  initial begin
    orient = 0; we = 0; idx = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 64; b++)
      for (int i = 0; i < 4; i++) blocks[b][i] = $urandom;
    // block b is written in period b; block b-1 is read in the same period
    for (int p = 0; p <= 64; p++)
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        orient = 1'(p & 1);
        idx = 2'(i);
        we = (p < 64);
        wdata = (p < 64) ? blocks[p][i] : '0;
        #1;
        if (p > 0) begin
          checks++;
          if (rdata !== column(p - 1, i)) begin
            failures++;
            if (failures < 10) $display("block %0d line %0d: got %h expected %h", p - 1, i, rdata, column(p - 1, i));
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
