// tb_dbf_ahb_slave: self-checking test of the AHB-Lite slave interface.
// Writes and reads back the threshold registers, checks the start pulses and
// neighbour flags of CTRL, the side-information write strobes, and the DATA
// register in both directions with a pipelined burst while the accelerator
// side randomly withholds in_ready / out_valid, so wait states occur. Input
// words pushed and output words popped must match the sent sequences.
module tb_dbf_ahb_slave;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        HSEL, HWRITE, HREADYOUT, HRESP;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS;
  logic [2:0]  HSIZE;
  logic        start_mb, start_bs, left_avail, top_avail, side_we, in_valid, in_ready;
  logic        out_valid, out_ready;
  logic [4:0]  side_idx;
  word_t       side_data, in_data, out_data;
  params_t     params;
  logic [31:0] status;

  dbf_ahb_slave dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA,
    .HREADY(HREADYOUT), .HRDATA, .HREADYOUT, .HRESP, .*
  );

  int checks = 0, failures = 0, n_wait = 0;
  word_t pushed[$], to_pop[$];
  int n_start_mb = 0, n_start_bs = 0, n_side = 0;
  logic [31:0] side_seen [24];
  bit avail_seen;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accelerator-side model
  always @(negedge clk) begin
    in_ready  = ($urandom_range(0, 2) != 0);
    out_valid = (to_pop.size() > 0) && ($urandom_range(0, 2) != 0);
    out_data  = (to_pop.size() > 0) ? to_pop[0] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) pushed.push_back(in_data);
    if (out_valid && out_ready) void'(to_pop.pop_front());
    if (start_mb) n_start_mb++;
    if (start_bs) begin n_start_bs++; avail_seen = left_avail && !top_avail; end
    if (side_we) begin n_side++; side_seen[side_idx] = side_data; end
  end

  task automatic single(bit wr, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    HSEL = 1; HTRANS = 2'b10; HWRITE = wr; HADDR = a;
    @(negedge clk);
    HSEL = 0; HTRANS = 2'b00; HWDATA = wd;
    #1;
    while (!HREADYOUT) begin n_wait++; @(negedge clk); #1; end
    rd = HRDATA;
  endtask

  task automatic burst(bit wr, ref word_t words[$]);
    int a, d, n;
    n = words.size(); a = 0; d = -1;
    forever begin
      @(negedge clk);
      HSEL = (a < n); HTRANS = (a < n) ? 2'b10 : 2'b00; HWRITE = wr; HADDR = 32'h0C;
      if (wr && d >= 0) HWDATA = words[d];
      #1;
      if (HREADYOUT) begin
        if (!wr && d >= 0) words[d] = HRDATA;
        if (a < n) begin d = a; a++; end else break;
      end else n_wait++;
    end
    HSEL = 0; HTRANS = 2'b00;
  endtask

  initial begin
    logic [31:0] rd;
    word_t sent[$], got[$];
    HSEL = 0; HTRANS = 0; HWRITE = 0; HADDR = 0; HSIZE = 3'b010; HWDATA = 0;
    status = 32'hA5C3_0F01;
    repeat (2) @(negedge clk);
    rst_n = 1;
    single(1, 32'h04, 32'h12_34_56_78, rd);
    single(1, 32'h08, {1'b0, 5'd9, 5'd8, 5'd7, 1'b0, 5'd3, 5'd2, 5'd1}, rd);
    single(0, 32'h04, 0, rd);
    checks++; if (rd !== 32'h12_34_56_78) begin failures++; $display("PARAM0 %h", rd); end
    checks++;
    if (params.alpha_y !== 8'h78 || params.beta_y !== 8'h56 || params.alpha_c !== 8'h34 ||
        params.beta_c !== 8'h12 || params.tc0_y[2] !== 5'd3 || params.tc0_c[0] !== 5'd7) begin
      failures++; $display("params not as written");
    end
    single(0, 32'h08, 0, rd);
    checks++; if (rd[14:10] !== 5'd3 || rd[30:26] !== 5'd9) begin failures++; $display("PARAM1 %h", rd); end
    single(0, 32'h00, 0, rd);
    checks++; if (rd !== status) begin failures++; $display("STATUS %h", rd); end
    for (int i = 0; i < 24; i++) single(1, 32'h40 + 4 * i, 32'hC0DE_0000 + i, rd);
    single(1, 32'h00, 32'h6, rd);          // start bS, left available, top not
    single(1, 32'h00, 32'h1, rd);          // start MB
    @(negedge clk);
    checks++;
    if (n_side != 24 || n_start_bs != 1 || n_start_mb != 1 || !avail_seen) begin
      failures++; $display("strobes: side %0d bs %0d mb %0d", n_side, n_start_bs, n_start_mb);
    end
    for (int i = 0; i < 24; i++) begin
      checks++;
      if (side_seen[i] !== 32'hC0DE_0000 + i) begin failures++; $display("side %0d = %h", i, side_seen[i]); end
    end
    for (int i = 0; i < 200; i++) sent.push_back($urandom);
    burst(1, sent);
    @(negedge clk);
    checks++;
    if (pushed != sent) begin failures++; $display("pushed words differ (%0d)", pushed.size()); end
    for (int i = 0; i < 200; i++) begin to_pop.push_back(sent[i] ^ 32'h5555_5555); got.push_back('0); end
    burst(0, got);
    for (int i = 0; i < 200; i++) begin
      checks++;
      if (got[i] !== (sent[i] ^ 32'h5555_5555)) begin
        failures++;
        if (failures < 10) $display("read %0d: %h", i, got[i]);
      end
    end
    checks++;
    if (n_wait == 0) begin failures++; $display("no wait state"); end
    checks++;
    if (HRESP !== 1'b0) begin failures++; $display("HRESP not OKAY"); end
    $display("wait states %0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
