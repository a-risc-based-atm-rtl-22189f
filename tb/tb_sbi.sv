// tb_sbi: Sending Buffer Interface on its own. A bus model plays the DMA and
// the core: it writes the 12 payload words of a cell at offsets 1..12 and
// then the header at offset 0, which completes the cell. A line model with
// a random ready takes the cells and compares the 13 words (header first,
// start mark on it) with what was written. Checks that two cells can be
// held, that a write with both buffers full is held off (s_ready low) until
// the line has taken a cell, the free-buffer status word, and that no word
// is lost or repeated.
module tb_sbi;
  import atm_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        s_valid = 0, s_we = 0, s_ready;
  logic [15:0] s_addr = '0;
  logic [31:0] s_wdata = '0, s_rdata;
  logic        out_valid, out_sop, out_ready = 0;
  logic [31:0] out_data;

  sbi dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  bit          line_on = 0;
  logic [31:0] exp_q[$];
  int          wcnt = 0, cells = 0, bad = 0, held = 0;
  always @(posedge clk) out_ready <= line_on && (($urandom % 3) != 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (exp_q.size() == 0 || out_data != exp_q.pop_front()) bad++;
    if (out_sop != (wcnt == 0)) bad++;
    if (wcnt == 0) cells++;
    wcnt = (wcnt == 12) ? 0 : wcnt + 1;
  end
  always @(posedge clk) if (s_valid && !s_ready) held++;

  task automatic bus_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    s_valid = 1; s_we = 1; s_addr = a; s_wdata = d;
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    #1 s_valid = 0; s_we = 0;
  endtask

  task automatic put_cell();
    logic [31:0] p[12], h;
    h = $urandom;
    foreach (p[j]) p[j] = $urandom;
    exp_q.push_back(h);
    foreach (p[j]) exp_q.push_back(p[j]);
    foreach (p[j]) bus_write(16'(j + 1), p[j]);
    bus_write(16'd0, h);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    s_valid = 1; s_we = 0; s_addr = LB_STATUS;
    @(negedge clk); s_valid = 0;
    check(s_rdata == 1, "a buffer is free after reset");
    // line off: two cells fill both buffers
    put_cell(); put_cell();
    @(negedge clk);
    check(out_valid && out_sop, "first cell offered to the line");
    s_valid = 1; s_we = 0; s_addr = LB_STATUS;
    @(negedge clk); s_valid = 0;
    check(s_rdata == 0, "no free buffer with two cells held");
    // third cell: its first write waits for the line
    fork
      put_cell();
      begin repeat (30) @(posedge clk); check(held > 0, "write held off while both buffers are full"); line_on = 1; end
    join
    for (int k = 0; k < 20; k++) put_cell();
    repeat (400) @(posedge clk);
    check(cells == 23, $sformatf("cells sent %0d / 23", cells));
    check(bad == 0, "every word and start mark as written");
    check(exp_q.size() == 0, "nothing left");
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
