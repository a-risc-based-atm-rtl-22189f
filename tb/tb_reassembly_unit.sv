// tb_reassembly_unit: reassembly unit with the AAL5 program, at reduced
// buffer sizes (CRB 4096 words, CB 512 entries, 300 cell slots).
//
// Gives one connection through FIFO3, sends a 4-cell PDU and two SSM cells
// with idle gaps, then 30 cells faster than the REP can take them, so the RBI always holds a
// waiting cell, and measures the REP's core cycles per cell in that stretch
// (release to release of the RBI buffer). The program also serves FIFO3,
// FIFO4 and the interrupt threshold once per cell, so it needs about 40 core
// cycles per SSM cell; the bound checked is 44. The host model checks the FIFO2
// notices, walks the linked lists in the CRB and compares the payloads, and
// returns the slots through FIFO4. Also checks the CB-head pointer the
// program keeps, the CAM contents, and that the DMA moves a payload in
// 12 core cycles (24 unit clocks at CLK_RATIO = 2).
module tb_reassembly_unit;
  import atm_ni_pkg::*;
  import ni_asm_pkg::*;
  import ni_fw_pkg::*;

  localparam int NSLOTS = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        prog_we = 0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic        in_valid = 0, in_sop = 0;
  logic [31:0] in_data = '0;
  logic        host_crb_en = 0, host_crb_we = 0;
  logic [11:0] host_crb_addr = '0;
  logic [31:0] host_crb_wdata = '0, host_crb_rdata;
  logic        fifo1_pop = 0, fifo2_pop = 0, fifo3_push = 0, fifo4_push = 0;
  logic [31:0] fifo1_data, fifo2_data, fifo3_data = '0, fifo4_data = '0;
  logic        fifo1_empty, fifo2_empty, fifo3_full, fifo4_full, host_irq;
  logic [15:0] rbi_drop_count;
  logic        ev_retire, ev_stall, ev_fwd, ev_branch, dma_busy;

  reassembly_unit #(.CRB_WORDS(4096), .CB_WORDS(512)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  localparam logic [31:0] KEY = 32'h0010_0640;   // VPI 1, VCI 100
  logic [31:0] exp_words[$];
  int          exp_len[$];
  int          pdus = 0;
  logic [31:0] freeq[$];

  logic [31:0] cur_key = KEY;
  bit record = 1;   // cleared for the rate stretch, where cells may be dropped
  task automatic send_cell(bit last, int gap);
    logic [31:0] w;
    @(posedge clk); #1;
    in_valid = 1; in_sop = 1; in_data = cur_key | (last ? 32'h2 : 32'h0);
    for (int j = 0; j < 12; j++) begin
      w = $urandom;
      if (record) exp_words.push_back(w);
      @(posedge clk); #1;
      in_sop = 0; in_data = w;
    end
    @(posedge clk); #1;
    in_valid = 0;
    repeat (gap) @(posedge clk);
  endtask

  task automatic crb_read(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk); #1;
    host_crb_en = 1; host_crb_addr = a;
    @(posedge clk); #1;
    host_crb_en = 0;
    d = host_crb_rdata;
  endtask

  initial begin : host
    logic [31:0] k, s, d;
    int n;
    forever begin
      @(posedge clk); #1;
      fifo4_push = 0;
      if (freeq.size() > 0 && !fifo4_full) begin
        fifo4_data = freeq.pop_front(); fifo4_push = 1;
      end else if (!fifo2_empty) begin
        k = fifo2_data; fifo2_pop = 1;
        @(posedge clk); #1; fifo2_pop = 0;
        while (fifo2_empty) begin @(posedge clk); #1; end
        s = fifo2_data; fifo2_pop = 1;
        @(posedge clk); #1; fifo2_pop = 0;
        check(k == KEY, "FIFO2 key");
        n = 0;
        while (s != 0 && n < 100) begin
          for (int j = 0; j < 12; j++) begin
            crb_read(s[11:0] + 12'(j), d);
            if (exp_words.size() > 0) check(d == exp_words.pop_front(), "payload word");
          end
          freeq.push_back(s);
          crb_read(s[11:0] + 12'd12, s);
          n++;
        end
        if (exp_len.size() > 0) check(n == exp_len.pop_front(), "PDU length");
        else check(n == 1, "SSM PDU length");
        pdus++;
      end
    end
  end

  // DMA transfer length in clocks
  int dma_len = 0, dma_run = 0, dma_ok = 0, dma_bad = 0;
  always @(posedge clk) begin
    if (!rst_n) dma_run <= 0;
    else if (dma_busy) dma_run <= dma_run + 1;
    else if (dma_run != 0) begin
      if (dma_run == 24) dma_ok <= dma_ok + 1;
      else begin dma_bad <= dma_bad + 1; $display("DMA run of %0d clocks", dma_run); end
      dma_run <= 0;
    end
  end

  // releases of the RBI buffer (store to the status word)
  int core_cycles = 0;
  int rel_times[$];
  always @(posedge clk) begin
    if (dut.ce) core_cycles <= core_cycles + 1;
    if (dut.u_rbi.s_valid && dut.u_rbi.s_we && dut.u_rbi.s_addr == LB_STATUS)
      rel_times.push_back(core_cycles);
  end

  ni_asm a;
  initial begin : main
    int t0, per, n_rel;
    a = new();
    rep_aal5(a, NSLOTS, 511);
    check(a.hazards == 0, "program assembled without hazards");
    repeat (2) @(posedge clk); #1;
    foreach (a.code[i]) begin
      prog_we = 1; prog_addr = 12'(i); prog_data = a.code[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    rst_n = 1;
    @(posedge clk); #1;
    fifo3_push = 1; fifo3_data = KEY;
    @(posedge clk); #1;
    fifo3_push = 0;
    repeat (NSLOTS * 12 + 100) @(posedge clk);
    check(dut.u_rep.u_rf.regs[7] == NSLOTS, "CB tail after set-up");
    // first cell: unknown connection -> discarded (the cell also makes the
    // program take the new connection from FIFO3)
    cur_key = 32'h0070_3090;
    send_cell(1'b1, 200);
    cur_key = KEY;
    void'(exp_words.pop_front());
    repeat (11) void'(exp_words.pop_front());
    check(dut.u_cam.keys[0] == KEY, "connection inserted in the CAM from FIFO3");
    check(dut.u_rep.u_rf.regs[5] == 0, "discarded cell took no slot");
    // 4-cell PDU and two SSMs
    exp_len.push_back(4);
    send_cell(0, 150); send_cell(0, 150); send_cell(0, 150); send_cell(1, 150);
    exp_len.push_back(1); send_cell(1, 150);
    exp_len.push_back(1); send_cell(1, 150);
    check(dut.u_rep.u_rf.regs[5] == 6, "CB head advanced by six slots");
    check(dut.u_cam.starts[0] == 0, "Start-address cleared after EOM");
    check(rbi_drop_count == 0, "no drops with idle gaps");
    // SSM cells arriving faster than the REP can take them (one every 27
    // core cycles): the RBI always holds a waiting cell, so the spacing of
    // the buffer releases is the REP's own time per cell.
    repeat (400) @(posedge clk);
    record = 0;
    t0 = rel_times.size();
    for (int i = 0; i < 30; i++) send_cell(1, 40);
    repeat (4000) @(posedge clk);
    n_rel = rel_times.size() - t0;
    check(n_rel >= 12, $sformatf("cells taken in the rate stretch: %0d", n_rel));
    per = (rel_times[t0 + n_rel - 1] - rel_times[t0 + 2]) / (n_rel - 3);
    $display("REP core cycles per SSM cell, saturated: %0d (drops %0d)", per, rbi_drop_count);
    check(per <= 44 && per >= 20, "REP takes an SSM cell within 44 core cycles");
    check(rbi_drop_count == 30 - n_rel, "every cell not taken was counted as dropped");
    check(pdus == 3 + n_rel, $sformatf("PDUs delivered %0d", pdus));
    check(dma_ok > 0 && dma_bad == 0, "DMA moves 12 words in 24 clocks (12 core cycles)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
