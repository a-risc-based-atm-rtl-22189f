// tb_inst_mem: instruction memory (4096 words). Loads a pseudo-random
// program through the write port, then reads every word back on the
// asynchronous fetch port and checks it against the same generator
// (value = address * 2654435761 xor 5A5A5A5A). Also checks that the fetch
// port follows its address without a clock edge.
module tb_inst_mem;
  localparam int D = 4096;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        prog_we = 0;
  logic [11:0] prog_addr = '0, addr = '0;
  logic [31:0] prog_data = '0, data;

  inst_mem dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic logic [31:0] gen(int a);
    return 32'(a * 32'd2654435761) ^ 32'h5A5A_5A5A;
  endfunction

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 12'(a); prog_data = gen(a);
    end
    @(negedge clk); prog_we = 0;
    for (int a = 0; a < D; a++) begin
      addr = 12'(a); #1;
      check(data == gen(a), $sformatf("word %0d", a));
    end
    // rewrite one word, fetch sees it after the edge
    @(negedge clk); prog_we = 1; prog_addr = 12'd100; prog_data = 32'hCAFE_0001; addr = 12'd100;
    #1 check(data == gen(100), "old word before the write edge");
    @(posedge clk); #1 prog_we = 0;
    check(data == 32'hCAFE_0001, "new word after the write edge");
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
