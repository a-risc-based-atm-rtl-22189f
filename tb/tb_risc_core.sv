// tb_risc_core: the NI RISC core on its own, with an instruction memory
// array, a 256-word data memory behind a bus that is ready only part of the
// time, and a CAM. The core's clock enable is random (about 3 cycles in 4),
// as when the core runs slower than its unit's clock.
//
// The program, built with the assembler, exercises every instruction and
// stores its results to data memory: ADD / ADDI / SUB / AND, an ADD with the
// F bit set after its producer (forwarded value) and the same ADD with F
// clear (stale register value), sign extension of ADDI, the branch-delay
// slot, a counted loop with BLE and an accumulating delay slot, signed BGE /
// BLE against registers and immediates, a load forwarded into the next
// instruction, and CAM insert / write Start / write End / look-ups, miss
// included. The checker compares the stored words with values worked out
// here, and requires bus stalls, forwarding and taken branches to have
// happened.
module tb_risc_core;
  import atm_ni_pkg::*;
  import ni_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ce;
  logic [11:0] imem_addr;
  logic [31:0] imem_data;
  bus_req_t    m_req;
  logic        m_ready;
  logic [31:0] m_rdata;
  logic        cam_valid, cam_match, cam_full;
  cam_op_e     cam_op;
  logic [31:0] cam_key, cam_wdata, cam_rdata;
  logic        retire, stall, fwd, br_taken;

  risc_core dut (.*);
  cam u_cam (.clk, .rst_n, .valid(cam_valid), .op(cam_op), .key(cam_key),
             .wdata(cam_wdata), .match(cam_match), .rdata(cam_rdata), .full(cam_full));

  logic [31:0] imem [4096];
  assign imem_data = imem[imem_addr];

  logic [31:0] dmem [256];
  always @(posedge clk) begin
    ce      <= ($urandom % 4) != 0;
    m_ready <= ($urandom % 3) != 0;
    if (m_req.valid && m_ready) begin
      if (m_req.we) dmem[m_req.addr[7:0]] <= m_req.wdata;
      else          m_rdata <= dmem[m_req.addr[7:0]];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int n_stall = 0, n_fwd = 0, n_br = 0, n_ret = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall <= n_stall + int'(stall);
    n_fwd   <= n_fwd + int'(fwd);
    n_br    <= n_br + int'(br_taken);
    n_ret   <= n_ret + int'(retire);
  end

  ni_asm a;
  function automatic void program_build();
    for (int p = 0; p < 2; p++) begin
      a.start_pass(p == 1);
      a.addi(1, 0, 100);
      a.addi(2, 0, 7);
      a.add (3, 1, 2);                 // F = 1: r1 forwarded -> 107
      a.nop ();
      a.sw  (3, 32, 0);                // [32] = 107
      a.addi(4, 0, 1);
      a.nop ();
      a.addi(4, 0, 5);
      a.emit({OP_ADD, 1'b0, 5'd5, 5'd4, 5'd4, 11'd0}, 5);   // F = 0: stale r4 -> 2
      a.add (6, 4, 4);                 // r4 written by now -> 10
      a.nop ();
      a.sw  (5, 33, 0);                // [33] = 2
      a.sw  (6, 34, 0);                // [34] = 10
      a.sub (7, 1, 2);                 // 93
      a.andi(8, 1, 16'h000F);          // 100 & 15 = 4
      a.addi(9, 0, -3);                // sign-extended
      a.sw  (7, 35, 0);
      a.sw  (8, 36, 0);
      a.sw  (9, 37, 0);
      // delay slot
      a.addi(10, 0, 0);
      a.jmp ("l1");
      a.addi(10, 10, 1);               // delay slot: executed
      a.addi(10, 10, 100);             // skipped
      a.label("l1");
      a.nop ();
      a.sw  (10, 38, 0);               // [38] = 1
      // loop: r11 counts to 10, r12 accumulates in the delay slot
      a.addi(11, 0, 0);
      a.addi(12, 0, 0);
      a.label("loop");
      a.addi(11, 11, 1);
      a.blei(11, 9, "loop");
      a.add (12, 12, 11);              // delay slot
      a.nop ();
      a.sw  (12, 39, 0);               // [39] = 55
      // signed compares: r13 = -1
      a.addi(13, 0, -1);
      a.addi(14, 0, 0);
      a.bgei(13, 0, "bad1");           // -1 >= 0: not taken
      a.nop ();
      a.addi(14, 14, 1);
      a.label("bad1");
      a.ble (13, 1, "ok2");            // -1 <= 100: taken
      a.nop ();
      a.addi(14, 14, 16);
      a.label("ok2");
      a.bge (1, 13, "ok3");            // 100 >= -1: taken
      a.nop ();
      a.addi(14, 14, 32);
      a.label("ok3");
      a.beq (1, 2, "bad4");            // 100 == 7: not taken
      a.nop ();
      a.addi(14, 14, 2);
      a.label("bad4");
      a.nop ();
      a.sw  (14, 40, 0);               // [40] = 3
      // load forwarded into the next instruction
      a.lw  (15, 32, 0);
      a.addi(16, 15, 1);               // 108
      a.nop ();
      a.sw  (16, 41, 0);
      // CAM
      a.cam_insert(1);                 // key 100
      a.cam_wr_start(1, 2);            // Start = 7
      a.cam_wr_end(1, 3);              // End = 107
      a.lcam_start(17, 1);
      a.lcam_end(18, 1);
      a.lcam_start(19, 2);             // key 7: miss -> all ones
      a.nop ();
      a.sw  (17, 42, 0);
      a.sw  (18, 43, 0);
      a.sw  (19, 44, 0);
      a.addi(20, 0, 1);
      a.nop ();
      a.sw  (20, 45, 0);               // done flag
      a.label("halt");
      a.jmp ("halt");
      a.nop ();
    end
  endfunction

  initial begin
    int t;
    a = new();
    program_build();
    check(a.hazards == 0, "program has no unforwardable hazard");
    foreach (imem[i]) imem[i] = '0;
    foreach (a.code[i]) imem[i] = a.code[i];
    foreach (dmem[i]) dmem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t = 0;
    while (dmem[45] != 1 && t < 5000) begin @(posedge clk); t++; end
    check(dmem[45] == 1, "program reached its end");
    check(dmem[32] == 107, "ADD with forwarding");
    check(dmem[33] == 2, "F = 0 reads the stale register");
    check(dmem[34] == 10, "ADD after write-back");
    check(dmem[35] == 93, "SUB");
    check(dmem[36] == 4, "AND immediate");
    check(dmem[37] == 32'hFFFF_FFFD, "ADDI sign extension");
    check(dmem[38] == 1, "branch-delay slot executed, next skipped");
    check(dmem[39] == 55, "counted loop with BLE immediate");
    check(dmem[40] == 3, "signed BGE / BLE / BEQ outcomes");
    check(dmem[41] == 108, "load forwarded into next instruction");
    check(dmem[42] == 7, "LCAM Start-address");
    check(dmem[43] == 107, "LCAM End-address");
    check(dmem[44] == 32'hFFFF_FFFF, "LCAM miss");
    $display("stalls %0d forwards %0d taken branches %0d retired %0d", n_stall, n_fwd, n_br, n_ret);
    check(n_stall > 0, "bus stalls happened");
    check(n_fwd > 0, "forwarding happened");
    check(n_br >= 12, "taken branches counted");
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
