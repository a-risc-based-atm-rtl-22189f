// tb_rbi: Receiving Buffer Interface on its own. A line model sends 13-word
// cells (header word with the start mark, then 12 payload words); a bus
// model plays the core: it polls the status word (offset 15), reads the 13
// words of the cell with one-clock read latency, compares them with the
// cell sent, and releases the buffer by writing the status word. Checks the
// double buffering (a second cell is taken while the first is still held),
// that a cell arriving with both buffers held is dropped and counted while
// the held cells stay intact, the cell_irq status line, and that a release
// with no cell held does nothing.
module tb_rbi;
  import atm_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_sop = 0;
  logic [31:0] in_data = '0;
  logic        s_valid = 0, s_we = 0, s_ready, cell_irq;
  logic [15:0] s_addr = '0, drop_count;
  logic [31:0] s_rdata;

  rbi dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [31:0] sent[$];

  task automatic send(bit keep);
    logic [31:0] w;
    for (int j = 0; j < 13; j++) begin
      @(negedge clk);
      w = $urandom;
      in_valid = 1; in_sop = (j == 0); in_data = w;
      if (keep) sent.push_back(w);
    end
    @(negedge clk); in_valid = 0; in_sop = 0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    s_valid = 1; s_we = 0; s_addr = a;
    @(negedge clk);
    s_valid = 0;
    d = s_rdata;
  endtask

  task automatic release_buf();
    @(negedge clk);
    s_valid = 1; s_we = 1; s_addr = LB_STATUS;
    @(negedge clk);
    s_valid = 0; s_we = 0;
  endtask

  task automatic take_cell();
    logic [31:0] d;
    bus_read(LB_STATUS, d);
    check(d == 1, "status shows a held cell");
    for (int j = 0; j < 13; j++) begin
      bus_read(16'(j), d);
      check(sent.size() > 0 && d == sent.pop_front(), $sformatf("cell word %0d", j));
    end
    release_buf();
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!cell_irq && drop_count == 0, "idle after reset");
    release_buf();                       // nothing held: no effect
    bus_read(LB_STATUS, d);
    check(d == 0, "status 0 with no cell");
    // one cell
    send(1);
    check(cell_irq, "cell_irq after a complete cell");
    take_cell();
    @(negedge clk);
    check(!cell_irq, "cell_irq cleared after release");
    // two cells held, a third dropped
    send(1); send(1);
    check(cell_irq, "two cells held");
    send(0);
    check(drop_count == 1, "third cell dropped and counted");
    take_cell();
    check(cell_irq, "second buffer still held");
    send(1);                             // fills the freed buffer
    take_cell();
    take_cell();
    @(negedge clk);
    check(!cell_irq && sent.size() == 0, "all cells taken");
    // cells back to back with the reader keeping up
    for (int k = 0; k < 10; k++) begin
      send(1);
      take_cell();
    end
    check(drop_count == 1, "no more drops");
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
