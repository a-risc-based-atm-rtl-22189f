// tb_dma: the DMA on its own, as bus master on a 1024-word memory model
// with a one-clock read latency. Each transfer writes the source, optionally
// a new length, then the destination (which starts it), and the checker
// compares the destination block with the source block. With the bus always
// ready, a 12-word cell payload must take 24 clocks of busy (one read and one
// write cycle per word); with a randomly ready bus the copy must still be
// exact. Also checks that the length keeps its reset value of 12, that a
// length of 0 starts nothing, and that done pulses once per transfer.
module tb_dma;
  import atm_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we = 0;
  logic [1:0]  cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  bus_req_t    m_req;
  logic        m_ready;
  logic [31:0] m_rdata;
  logic        busy, done;

  dma dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  bit          rnd_ready = 0;
  logic [31:0] mem [1024];
  always @(posedge clk) m_ready <= rnd_ready ? (($urandom % 2) == 0) : 1'b1;
  always @(posedge clk) begin
    if (m_req.valid && m_ready) begin
      if (m_req.we) mem[m_req.addr[9:0]] <= m_req.wdata;
      else          m_rdata <= mem[m_req.addr[9:0]];
    end
  end

  int busy_cnt = 0, done_cnt = 0;
  always @(posedge clk) begin
    if (busy && rst_n) busy_cnt <= busy_cnt + 1;
    if (done) done_cnt <= done_cnt + 1;
  end

  task automatic cfg(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic transfer(int src, int dst, int len, bit set_len);
    int b0, d0;
    cfg(2'd0, 32'(src));
    if (set_len) cfg(2'd2, 32'(len));
    b0 = busy_cnt; d0 = done_cnt;
    cfg(2'd1, 32'(dst));
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int i = 0; i < len; i++)
      check(mem[dst + i] == mem[src + i] || (src <= dst + i && dst + i < src + len),
            $sformatf("word %0d copied", i));
    check(done_cnt - d0 == (len > 0 ? 1 : 0), "one done pulse");
    if (!rnd_ready && len > 0)
      check(busy_cnt - b0 == 2 * len, $sformatf("%0d words in %0d clocks", len, busy_cnt - b0));
  endtask

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    m_rdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    transfer(0, 500, 12, 0);          // reset length: one cell payload
    check(busy_cnt == 24, "12-word payload in 24 clocks");
    transfer(100, 600, 12, 0);
    transfer(200, 700, 5, 1);
    transfer(300, 800, 1, 1);
    begin
      int b0;
      b0 = busy_cnt;
      cfg(2'd2, 0);
      cfg(2'd1, 32'd900);
      repeat (3) @(negedge clk);
      check(busy_cnt == b0 && !busy, "length 0 starts nothing");
    end
    rnd_ready = 1;
    for (int k = 0; k < 20; k++) transfer(13 * k, 400 + 13 * k, 12, 1);
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
