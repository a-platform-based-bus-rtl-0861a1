// tb_dbf_reg1: self-checking test of the 4x4 intermediate pixel array.
// Random writes and reads against a model array; checks that a read in the
// cycle of a write to the same line still shows the old line, and that reset
// clears the array.
module tb_dbf_reg1;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we;
  logic [1:0] idx;
  word_t      wdata, rdata;

  dbf_reg1 dut (.*);

  int checks = 0, failures = 0;
  word_t model [4];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; idx = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) model[i] = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      idx = 2'($urandom_range(0, 3));
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[idx]) begin
        failures++;
        if (failures < 10) $display("line %0d: got %h expected %h", idx, rdata, model[idx]);
      end
      if (we) model[idx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
