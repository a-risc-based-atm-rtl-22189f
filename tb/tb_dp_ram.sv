// tb_dp_ram: dual-port cell memory at its default 65536 words (the CRB
// size). Writes random words through both ports, reads them back through
// the other port with the one-cycle read latency, and compares with a model
// (associative array). Checks the latency: the read data appear at the edge
// after the request and hold while the port is idle.
module tb_dp_ram;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [15:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;

  dp_ram dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [31:0] model [int];

  initial begin
    logic [15:0] ad[$];
    // port A writes, port B reads; port B writes, port A reads
    for (int i = 0; i < 500; i++) begin
      logic [15:0] x, y;
      x = 16'($urandom); y = 16'($urandom);
      if (x == y) y = y + 1;
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = x; a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = y; b_wdata = $urandom;
      model[x] = a_wdata; model[y] = b_wdata;
      ad.push_back(x); ad.push_back(y);
    end
    @(negedge clk); a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    foreach (ad[i]) begin
      @(negedge clk);
      b_en = 1; b_addr = ad[i];
      a_en = 1; a_addr = ad[ad.size() - 1 - i];
      @(posedge clk); #1;
      check(b_rdata == model[ad[i]], "port B reads what was written");
      check(a_rdata == model[ad[ad.size() - 1 - i]], "port A reads what was written");
    end
    // latency and hold
    @(negedge clk); a_en = 1; a_we = 0; a_addr = ad[0];
    @(posedge clk); #1; a_en = 0;
    check(a_rdata == model[ad[0]], "data one edge after the request");
    repeat (3) @(posedge clk); #1;
    check(a_rdata == model[ad[0]], "data held while idle");
    // top word
    @(negedge clk); a_en = 1; a_we = 1; a_addr = 16'hFFFF; a_wdata = 32'h1234_5678;
    @(negedge clk); a_we = 0; b_en = 1; b_addr = 16'hFFFF; a_en = 0;
    @(posedge clk); #1;
    check(b_rdata == 32'h1234_5678, "last word addressable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
