// tb_sync_fifo: host/NI FIFO (32 bits, 16 entries, show-ahead). Random
// pushes and pops against a queue model: checks the head word, empty, full
// and count every cycle, that a push into a full FIFO and a pop from an
// empty one change nothing, and that reset empties it.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        push = 0, pop = 0, empty, full;
  logic [31:0] wdata = '0, rdata;
  logic [4:0]  count;

  sync_fifo dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [31:0] q[$];
  int saw_full = 0, saw_empty_pop = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      bit p, o;
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;  // alternate filling and draining phases
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 16), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(rdata == q[0], "head word");
      p = ($urandom % 100) < bias;
      o = ($urandom % 100) < 100 - bias;
      push = p; pop = o; wdata = $urandom;
      if (p && q.size() == 16) saw_full++;
      if (o && q.size() == 0) saw_empty_pop++;
      @(posedge clk); #1;
      begin
        bit can_push, can_pop;
        can_push = p && q.size() < 16;
        can_pop  = o && q.size() > 0;
        if (can_pop) void'(q.pop_front());
        if (can_push) q.push_back(wdata);
      end
    end
    check(saw_full > 0 && saw_empty_pop > 0, "overflow and underflow attempts made");
    @(negedge clk); push = 1; pop = 0; wdata = 32'h55;
    @(negedge clk); push = 0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    check(empty && count == 0, "reset empties the FIFO");
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
