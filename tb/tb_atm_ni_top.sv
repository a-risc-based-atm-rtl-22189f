// tb_atm_ni_top: end-to-end test of the ATM network interface at its
// default sizes (CRB 65536 words, CSB 49152 words, CB 8192 entries,
// 64 CAM entries, 5040 cell slots).
//
// Loads the AAL5 reassembly and segmentation programs into the two cores,
// then plays the line and the host:
//  * receive: a signalling cell (to FIFO1), cells of an unknown connection
//    (discarded) while three connections are given through FIFO3, then
//    interleaved PDUs on those connections (SSM, BOM/COM/EOM), a burst that
//    overruns the RBI's two buffers, a 4600-cell PDU that fills the CRB past
//    90% (host interrupt), ten single-cell PDUs sent while the host is
//    busy so that FIFO2 fills and the REP waits on it, and discarded cells that let the freed pointers
//    flow back until the interrupt drops. A host model takes every FIFO2 /
//    FIFO1 notice, walks the linked list in the CRB, compares each payload
//    word with what was sent, and returns every slot through FIFO4.
//  * transmit: PDUs of 1, 3 and 10 cells written to the CSB and requested
//    through FIFO5; the line monitor compares headers (PT end bit on the
//    last cell only) and payloads, with the line's ready signal toggling so
//    the SBI fills up.
// Every mechanism is counted, and one that never happened is a failure.
module tb_atm_ni_top;
  import atm_ni_pkg::*;
  import ni_asm_pkg::*;
  import ni_fw_pkg::*;

  localparam int NSLOTS    = 5040;
  localparam int CB_MASK   = 8191;
  localparam int LONG_PDU  = 4600;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        rep_prog_we = 0, sep_prog_we = 0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic        rx_valid = 0, rx_sop = 0;
  logic [31:0] rx_data = '0;
  logic        tx_valid, tx_sop, tx_ready;
  logic [31:0] tx_data;
  logic        host_crb_en = 0, host_crb_we = 0;
  logic [15:0] host_crb_addr = '0;
  logic [31:0] host_crb_wdata = '0, host_crb_rdata;
  logic        host_csb_en = 0, host_csb_we = 0;
  logic [15:0] host_csb_addr = '0;
  logic [31:0] host_csb_wdata = '0, host_csb_rdata;
  logic        fifo1_pop = 0, fifo2_pop = 0, fifo3_push = 0, fifo4_push = 0, fifo5_push = 0;
  logic [31:0] fifo1_data, fifo2_data, fifo3_data = '0, fifo4_data = '0, fifo5_data = '0;
  logic        fifo1_empty, fifo2_empty, fifo3_full, fifo4_full, fifo5_full, host_irq;
  logic [15:0] rbi_drop_count;
  logic [4:0]  rep_ev, sep_ev;

  atm_ni_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic logic [31:0] hdr(int vpi, int vci, int pt);
    return 32'((vpi << 20) | (vci << 4) | (pt << 1));
  endfunction

  // ---------------- expected receive data ----------------
  localparam int NCONN = 4;                 // 0..2 data connections, 3 signalling
  logic [31:0] conn_key [NCONN];
  logic [31:0] exp_words [NCONN][$];
  int          exp_cells [NCONN][$];
  int          pdus_checked = 0, sig_checked = 0, slots_freed = 0;
  int          n_bom = 0, n_com = 0, n_eom = 0, n_ssm = 0, n_lost = 0;
  bit          irq_seen = 0, irq_dropped = 0;

  logic [31:0] freeq[$];

  task automatic send_cell(logic [31:0] h, int c, int gap, bit record);
    logic [31:0] w;
    @(posedge clk); #1;
    rx_valid = 1; rx_sop = 1; rx_data = h;
    for (int j = 0; j < 12; j++) begin
      w = $urandom;
      if (record) exp_words[c].push_back(w);
      @(posedge clk); #1;
      rx_sop = 0; rx_data = w;
    end
    @(posedge clk); #1;
    rx_valid = 0;
    repeat (gap) @(posedge clk);
  endtask

  // send a PDU of n cells on connection c, cell-interleaving is done by caller
  task automatic send_pdu_cell(int c, int idx, int n, int gap);
    logic [31:0] h;
    bit last;
    last = (idx == n - 1);
    h = conn_key[c] | (last ? 32'h2 : 32'h0);
    if (idx == 0) exp_cells[c].push_back(n);
    if (n == 1) n_ssm++;
    else if (idx == 0) n_bom++;
    else if (last) n_eom++;
    else n_com++;
    send_cell(h, c, gap, 1'b1);
  endtask

  // ---------------- host: CRB reads ----------------
  task automatic crb_read(input logic [15:0] a, output logic [31:0] d);
    @(posedge clk); #1;
    host_crb_en = 1; host_crb_we = 0; host_crb_addr = a;
    @(posedge clk); #1;
    host_crb_en = 0;
    d = host_crb_rdata;
  endtask

  task automatic walk(int c, logic [31:0] start, bit is_sig);
    logic [31:0] slot, d, ew;
    int ncell, want;
    slot = start;
    ncell = 0;
    want = is_sig ? 1 : (exp_cells[c].size() > 0 ? exp_cells[c].pop_front() : -1);
    while (slot != 0 && ncell < LONG_PDU + 10) begin
      for (int j = 0; j < 12; j++) begin
        crb_read(slot[15:0] + 16'(j), d);
        ew = exp_words[c].size() > 0 ? exp_words[c].pop_front() : 32'hDEADBEEF;
        if (d != ew) begin
          failures++;
          if (failures < 20) $display("FAIL payload conn %0d cell %0d word %0d: %h != %h", c, ncell, j, d, ew);
        end
        checks++;
      end
      freeq.push_back(slot);
      crb_read(slot[15:0] + 16'd12, slot);
      ncell++;
    end
    check(ncell == want, $sformatf("conn %0d PDU length %0d, expected %0d", c, ncell, want));
  endtask

  function automatic int key_to_conn(logic [31:0] k);
    for (int i = 0; i < NCONN; i++) if (conn_key[i] == k) return i;
    return -1;
  endfunction

  // host receive process: FIFO2 (PDUs) and FIFO1 (signalling)
  initial begin : host_rx
    logic [31:0] k, s;
    int c;
    forever begin
      @(posedge clk); #1;
      if (!fifo2_empty || !fifo1_empty) begin
        bit sig;
        sig = fifo2_empty;
        k = sig ? fifo1_data : fifo2_data;
        if (sig) fifo1_pop = 1; else fifo2_pop = 1;
        @(posedge clk); #1;
        fifo1_pop = 0; fifo2_pop = 0;
        while (sig ? fifo1_empty : fifo2_empty) begin @(posedge clk); #1; end
        s = sig ? fifo1_data : fifo2_data;
        if (sig) fifo1_pop = 1; else fifo2_pop = 1;
        @(posedge clk); #1;
        fifo1_pop = 0; fifo2_pop = 0;
        c = key_to_conn(k);
        check(c >= 0, $sformatf("notice for unknown key %h", k));
        check(sig == (c == 3), "signalling notice on the right FIFO");
        if (c >= 0) begin
          walk(c, s, sig);
          if (sig) sig_checked++; else pdus_checked++;
        end
      end
    end
  end

  // host: return freed slots through FIFO4
  initial begin : host_free
    forever begin
      @(posedge clk); #1;
      fifo4_push = 0;
      if (freeq.size() > 0 && !fifo4_full) begin
        fifo4_data = freeq.pop_front();
        fifo4_push = 1;
        slots_freed++;
      end
    end
  end

  // interrupt watch
  always @(posedge clk) begin
    if (host_irq) irq_seen <= 1;
    if (irq_seen && !host_irq && pdus_checked == 15) irq_dropped <= 1;
  end

  // event counters
  int rep_fwd = 0, rep_stall = 0, rep_br = 0, sep_fwd = 0, sep_stall = 0, sep_br = 0;
  always @(posedge clk) begin
    rep_fwd   <= rep_fwd   + int'(rep_ev[2]);
    rep_stall <= rep_stall + int'(rep_ev[1]);
    rep_br    <= rep_br    + int'(rep_ev[3]);
    sep_fwd   <= sep_fwd   + int'(sep_ev[2]);
    sep_stall <= sep_stall + int'(sep_ev[1]);
    sep_br    <= sep_br    + int'(sep_ev[3]);
  end

  // ---------------- transmit side ----------------
  logic [31:0] tx_exp[$];
  int tx_cells = 0, tx_last = 0, tx_words_bad = 0;
  int tx_wcnt = 0;
  always @(posedge clk) tx_ready <= ($urandom % 4) != 0;
  always @(posedge clk) begin
    if (tx_valid && tx_ready) begin
      logic [31:0] e;
      e = tx_exp.size() > 0 ? tx_exp.pop_front() : 32'hDEADBEEF;
      checks++;
      if (tx_data != e) begin
        failures++;
        if (failures < 20) $display("FAIL tx word %0d: %h != %h", tx_wcnt, tx_data, e);
      end
      checks++;
      if (tx_sop != (tx_wcnt == 0)) failures++;
      if (tx_wcnt == 0) begin
        tx_cells++;
        if (tx_data[1]) tx_last++;
      end
      tx_wcnt = (tx_wcnt == 12) ? 0 : tx_wcnt + 1;
    end
  end

  task automatic seg_pdu(logic [31:0] h, int addr, int n);
    logic [31:0] w;
    for (int i = 0; i < n; i++) begin
      tx_exp.push_back(h | ((i == n - 1) ? 32'h2 : 32'h0));
      for (int j = 0; j < 12; j++) begin
        w = $urandom;
        tx_exp.push_back(w);
        @(posedge clk); #1;
        host_csb_en = 1; host_csb_we = 1;
        host_csb_addr = 16'(addr + i * 12 + j); host_csb_wdata = w;
      end
    end
    @(posedge clk); #1;
    host_csb_en = 0; host_csb_we = 0;
    begin
      logic [31:0] req[3];
      req[0] = h; req[1] = 32'(addr); req[2] = 32'(n);
      for (int i = 0; i < 3; i++) begin
        while (fifo5_full) begin @(posedge clk); #1; end
        fifo5_push = 1; fifo5_data = req[i];
        @(posedge clk); #1;
        fifo5_push = 0;
      end
    end
  endtask

  // ---------------- main ----------------
  ni_asm rep_a, sep_a;
  initial begin : main
    int order[$];
    rep_a = new();
    sep_a = new();
    rep_aal5(rep_a, NSLOTS, CB_MASK);
    sep_aal5(sep_a);
    check(rep_a.hazards == 0 && sep_a.hazards == 0, "programs free of unforwardable hazards");

    conn_key[0] = hdr(1, 100, 0);
    conn_key[1] = hdr(2, 200, 0);
    conn_key[2] = hdr(3, 4000, 0);
    conn_key[3] = hdr(0, 5, 0);        // signalling channel

    repeat (3) @(posedge clk);
    #1;
    foreach (rep_a.code[i]) begin
      rep_prog_we = 1; prog_addr = 12'(i); prog_data = rep_a.code[i];
      @(posedge clk); #1;
    end
    rep_prog_we = 0;
    foreach (sep_a.code[i]) begin
      sep_prog_we = 1; prog_addr = 12'(i); prog_data = sep_a.code[i];
      @(posedge clk); #1;
    end
    sep_prog_we = 0;
    rst_n = 1;

    // host gives three connections
    for (int c = 0; c < 3; c++) begin
      @(posedge clk); #1;
      fifo3_push = 1; fifo3_data = conn_key[c];
    end
    @(posedge clk); #1;
    fifo3_push = 0;

    // transmit requests run alongside
    fork
      begin
        seg_pdu(hdr(9, 900, 0), 0, 1);
        seg_pdu(hdr(9, 901, 0), 100, 3);
        seg_pdu(hdr(9, 902, 0), 16384, 10);
      end
    join_none

    // wait for the REP to fill the circulation buffer
    repeat (NSLOTS * 12 + 200) @(posedge clk);

    // signalling cell, then unknown-connection cells while connections load
    send_pdu_cell(3, 0, 1, 150);
    n_ssm--;
    for (int i = 0; i < 4; i++) begin send_cell(hdr(7, 777, 0), 0, 150, 1'b0); n_lost++; end

    // interleaved PDUs: conn0 3 cells, conn1 SSM, conn2 5 cells, conn1 SSM
    send_pdu_cell(0, 0, 3, 120);
    send_pdu_cell(2, 0, 5, 120);
    send_pdu_cell(1, 0, 1, 120);
    send_pdu_cell(0, 1, 3, 120);
    send_pdu_cell(2, 1, 5, 120);
    send_pdu_cell(2, 2, 5, 120);
    send_pdu_cell(0, 2, 3, 120);
    send_pdu_cell(1, 0, 1, 120);
    send_pdu_cell(2, 3, 5, 120);
    send_pdu_cell(2, 4, 5, 120);

    // burst of back-to-back cells on an unknown connection: RBI overrun
    for (int i = 0; i < 12; i++) send_cell(hdr(7, 778, 0), 0, 0, 1'b0);
    repeat (3000) @(posedge clk);
    check(rbi_drop_count > 0, "RBI dropped cells in the burst");

    // long PDU: fills the CRB past 90%
    for (int i = 0; i < LONG_PDU; i++) send_pdu_cell(1, i, LONG_PDU, 110);
    // ten SSMs while the host is busy walking the long PDU: eight notices
    // fill FIFO2 and the REP waits on the bus until the host pops again
    for (int i = 0; i < 10; i++) send_pdu_cell(0, 0, 1, 110);
    // let the host walk the long PDU, then send discarded cells so the
    // freed pointers flow back to the circulation buffer
    for (int i = 0; i < 400000 && pdus_checked < 15; i++) @(posedge clk);
    check(host_irq, "host interrupt still set while the CRB is over 90% full");
    for (int i = 0; i < 700; i++) begin send_cell(hdr(7, 779, 0), 0, 110, 1'b0); n_lost++; end
    repeat (2000) @(posedge clk);

    // ---------------- results ----------------
    check(pdus_checked == 15, $sformatf("PDUs delivered %0d / 15", pdus_checked));
    check(sig_checked == 1, "signalling cell delivered on FIFO1");
    check(exp_words[0].size() == 0 && exp_words[1].size() == 0 && exp_words[2].size() == 0,
          "all sent payload consumed");
    check(tx_cells == 14, $sformatf("cells sent to the line %0d / 14", tx_cells));
    check(tx_last == 3, "PT end bit on three last cells");
    check(tx_exp.size() == 0, "all transmit words seen");
    $display("mechanisms: BOM %0d COM %0d EOM %0d SSM %0d lost %0d signalling %0d drops %0d",
             n_bom, n_com, n_eom, n_ssm, n_lost, sig_checked, rbi_drop_count);
    $display("REP: fwd %0d stall %0d branch %0d | SEP: fwd %0d stall %0d branch %0d | freed %0d irq %0d/%0d",
             rep_fwd, rep_stall, rep_br, sep_fwd, sep_stall, sep_br, slots_freed, irq_seen, irq_dropped);
    check(n_bom > 0 && n_com > 0 && n_eom > 0 && n_ssm > 0, "all four cell types");
    check(n_lost > 0, "discarded cells");
    check(rep_fwd > 0 && sep_fwd > 0, "forwarding used in both cores");
    check(rep_stall > 0 && sep_stall > 0, "bus waits in both cores");
    check(rep_stall > 1000, "REP held by a full FIFO2");
    check(rep_br > 0 && sep_br > 0, "taken branches in both cores");
    check(slots_freed >= 600, "free pointers returned through FIFO4");
    check(irq_seen, "host interrupt at 90% CRB occupancy");
    check(irq_dropped, "host interrupt released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
