// tb_cam: connection CAM (64 entries of key, Start-address, End-address).
// Inserts random keys, checks look-ups of Start and End (zero after insert,
// then the written values), a miss for unknown keys, that write commands
// for an unknown key change nothing, that the CAM reports full after 64
// inserts and ignores a 65th, and that reset clears it. The model is an
// associative array keyed by the connection key.
module tb_cam;
  import atm_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        valid = 0, match, full;
  cam_op_e     op = CAM_RD_START;
  logic [31:0] key = '0, wdata = '0, rdata;

  cam dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [31:0] ms [logic [31:0]];
  logic [31:0] me [logic [31:0]];
  logic [31:0] keys[$];

  task automatic cmd(cam_op_e o, logic [31:0] k, logic [31:0] d);
    @(negedge clk);
    valid = 1; op = o; key = k; wdata = d;
    @(posedge clk); #1;
    valid = 0;
  endtask

  task automatic look(logic [31:0] k);
    @(negedge clk);
    key = k; op = CAM_RD_START; #1;
    check(match == ms.exists(k), $sformatf("match for %h", k));
    check(rdata == (ms.exists(k) ? ms[k] : 32'h0), "Start-address");
    op = CAM_RD_END; #1;
    check(rdata == (me.exists(k) ? me[k] : 32'h0), "End-address");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      logic [31:0] k;
      do k = {$urandom} & 32'h0FFF_FFF0; while (k == 0 || ms.exists(k));
      check(!full, "not full before 64 entries");
      cmd(CAM_INSERT, k, 0);
      ms[k] = 0; me[k] = 0; keys.push_back(k);
    end
    @(negedge clk);
    check(full, "full after 64 entries");
    cmd(CAM_INSERT, 32'h0FFF_FFF0 ^ keys[0] ^ 32'h10, 0);   // ignored: CAM full
    look(32'h0FFF_FFF0 ^ keys[0] ^ 32'h10);
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] k, d;
      int c;
      c = $urandom % 4;
      k = (c == 3) ? ({$urandom} | 32'h1) : keys[$urandom % 64];   // c == 3: unknown key
      d = $urandom;
      if (i % 2 == 0) begin
        cmd(CAM_WR_START, k, d);
        if (ms.exists(k)) ms[k] = d;
      end else begin
        cmd(CAM_WR_END, k, d);
        if (me.exists(k)) me[k] = d;
      end
      look(k);
      look(keys[$urandom % 64]);
    end
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    ms.delete(); me.delete();
    look(keys[5]);
    check(!full, "reset empties the CAM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
