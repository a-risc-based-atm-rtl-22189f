// tb_regfile: register file of the NI cores (28 registers, two read ports,
// one write port). Writes random values through the write port and compares
// both combinational read ports with a model array; checks that r0 always
// reads zero, that a write to r0 is ignored, that a disabled write changes
// nothing, and that a read in the writing cycle still shows the old value
// (no write-through: the core forwards in its own datapath).
module tb_regfile;
  localparam int N = 28;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [4:0]  sel_r1 = '0, sel_r2 = '0, sel_wb = '0;
  logic [31:0] out1, out2, data_in = '0;
  logic        we = 0;

  regfile #(.NREGS(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [31:0] model [N];

  initial begin
    // fill every register
    for (int r = 0; r < N; r++) begin
      model[r] = (r == 0) ? 32'h0 : $urandom;
      @(negedge clk);
      we = 1; sel_wb = 5'(r); data_in = (r == 0) ? 32'hFFFF_FFFF : model[r];
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < N; r++) begin
      sel_r1 = 5'(r); sel_r2 = 5'(N - 1 - r); #1;
      check(out1 == model[r], $sformatf("port 1 reads r%0d", r));
      check(out2 == model[N - 1 - r], $sformatf("port 2 reads r%0d", N - 1 - r));
    end
    check(model[0] == 0, "model r0");
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      logic [4:0] w;
      logic [31:0] v;
      bit en;
      @(negedge clk);
      w = 5'($urandom % N); v = $urandom; en = $urandom % 2;
      we = en; sel_wb = w; data_in = v;
      sel_r1 = 5'($urandom % N); sel_r2 = w; #1;
      check(out1 == model[sel_r1], "random read port 1");
      check(out2 == model[w], "read in the writing cycle shows the old value");
      @(posedge clk); #1;
      if (en && w != 0) model[w] = v;
      check(out2 == model[w], "value after the write edge");
    end
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
