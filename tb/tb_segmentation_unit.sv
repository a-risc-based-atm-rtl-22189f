// tb_segmentation_unit: segmentation unit with the AAL5 program at its
// default sizes (CSB 49152 words, DMA at three times the core clock).
//
// The host model writes three PDUs (1, 3 and 10 cells of random payload) into
// the CSB through its own port and queues one request per PDU in FIFO5:
// header template, CSB word address, cell count. A line model takes the
// cells with a random ready signal in the first part and with ready held
// high in the second, and compares each 13-word cell with the expected one:
// header with the PT end bit on the last cell only, then the payload words in
// order. With ready held high the spacing of the header writes gives the
// SEP's core cycles per cell (12 with this program: the 24-clock DMA
// transfer overlaps the register instructions), checked against 10..24.
module tb_segmentation_unit;
  import atm_ni_pkg::*;
  import ni_asm_pkg::*;
  import ni_fw_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        prog_we = 0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic        host_csb_en = 0, host_csb_we = 0;
  logic [15:0] host_csb_addr = '0;
  logic [31:0] host_csb_wdata = '0, host_csb_rdata;
  logic        fifo5_push = 0, fifo5_full;
  logic [31:0] fifo5_data = '0;
  logic        out_valid, out_sop, out_ready;
  logic [31:0] out_data;
  logic        ev_retire, ev_stall, ev_fwd, ev_branch, dma_busy;

  segmentation_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // line model
  bit          free_run = 0;
  logic [31:0] exp_q[$];
  int          cells = 0, lasts = 0, wcnt = 0, bad = 0, sop_bad = 0;
  always @(posedge clk) out_ready <= free_run ? 1'b1 : (($urandom % 3) != 0);
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      logic [31:0] e;
      e = exp_q.size() > 0 ? exp_q.pop_front() : ~out_data;
      if (out_data != e) begin
        bad++;
        if (bad < 10) $display("FAIL line word %0d: %h, expected %h", wcnt, out_data, e);
      end
      if (out_sop != (wcnt == 0)) sop_bad++;
      if (wcnt == 0) begin cells++; if (out_data[1]) lasts++; end
      wcnt = (wcnt == 12) ? 0 : wcnt + 1;
    end
  end

  // header commits (store to SBI offset 0), in core cycles
  int core_cycles = 0;
  int hdr_times[$];
  always @(posedge clk) begin
    if (dut.ce) core_cycles <= core_cycles + 1;
    if (dut.u_sbi.s_valid && dut.u_sbi.s_we && dut.u_sbi.s_addr == 16'd0 && dut.u_sbi.s_ready)
      hdr_times.push_back(core_cycles);
  end

  int fwd_n = 0, stall_n = 0;
  always @(posedge clk) begin
    fwd_n   <= fwd_n + int'(ev_fwd);
    stall_n <= stall_n + int'(ev_stall);
  end

  task automatic csb_write(input logic [15:0] a, input logic [31:0] d);
    @(posedge clk); #1;
    host_csb_en = 1; host_csb_we = 1; host_csb_addr = a; host_csb_wdata = d;
    @(posedge clk); #1;
    host_csb_en = 0; host_csb_we = 0;
  endtask

  task automatic push5(input logic [31:0] d);
    @(posedge clk); #1;
    while (fifo5_full) begin @(posedge clk); #1; end
    fifo5_push = 1; fifo5_data = d;
    @(posedge clk); #1;
    fifo5_push = 0;
  endtask

  // write one PDU to the CSB, record its cells, queue the request
  task automatic send_pdu(input logic [31:0] hdr, input int base, input int n);
    logic [31:0] w;
    for (int c = 0; c < n; c++) begin
      exp_q.push_back(hdr | ((c == n - 1) ? 32'h2 : 32'h0));
      for (int j = 0; j < 12; j++) begin
        w = $urandom;
        exp_q.push_back(w);
        csb_write(16'(base + 12 * c + j), w);
      end
    end
    push5(hdr); push5(32'(base)); push5(32'(n));
  endtask

  ni_asm a;
  initial begin : main
    int t0, per;
    a = new();
    sep_aal5(a);
    check(a.hazards == 0, "program assembled without hazards");
    repeat (2) @(posedge clk); #1;
    foreach (a.code[i]) begin
      prog_we = 1; prog_addr = 12'(i); prog_data = a.code[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    rst_n = 1;
    send_pdu(32'h0020_0C80, 0, 1);        // VPI 2, VCI 200
    send_pdu(32'h0030_12C0, 1000, 3);     // VPI 3, VCI 300
    repeat (3000) @(posedge clk);
    check(cells == 4, $sformatf("cells on the line %0d / 4", cells));
    check(stall_n > 0, "SBI back-pressure or DMA held the core");
    // rate stretch: line always ready
    free_run = 1;
    repeat (20) @(posedge clk);
    t0 = hdr_times.size();
    send_pdu(32'h0040_1900, 40000, 10);   // VPI 4, VCI 400, near the CSB end
    repeat (3000) @(posedge clk);
    check(hdr_times.size() - t0 == 10, "ten header writes for the 10-cell PDU");
    if (hdr_times.size() - t0 == 10) begin
      per = (hdr_times[t0 + 9] - hdr_times[t0 + 1]) / 8;
      $display("SEP core cycles per cell: %0d", per);
      check(per >= 10 && per <= 24, "SEP segments a cell within 24 core cycles");
    end
    check(cells == 14, $sformatf("cells on the line %0d / 14", cells));
    check(lasts == 3, "PT end bit on the three last cells only");
    check(bad == 0, "every line word as expected");
    check(sop_bad == 0, "start-of-cell marks on headers only");
    check(exp_q.size() == 0, "nothing left unsent");
    check(fwd_n > 0, "forwarding used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
