// tb_dbf_sram: self-checking test of the single-ported local SRAM at its
// full depth of 160 words. Fills every word, reads all back in random order
// (data one cycle after the read), and checks that the read data holds while
// the SRAM is idle or being written.
module tb_dbf_sram;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        en, we;
  logic [7:0]  addr;
  logic [31:0] wdata, rdata;

  dbf_sram dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [160];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    logic [31:0] last;
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 160; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      a = $urandom_range(0, 159);
      en = 1; we = 0; addr = 8'(a);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h expected %h", a, rdata, model[a]);
      end
      last = rdata;
      // a write elsewhere must not disturb the read data
      en = 1; we = 1; a = $urandom_range(0, 159); addr = 8'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== last) begin failures++; $display("read data changed on a write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
