// risc_core: three-stage pipelined embedded RISC core of the NI.
//
// The same core runs the reassembly (REP) and segmentation (SEP) protocol
// programs; only the register file size differs (NREGS = 28 or 20).
//
// Pipeline (one instruction per core clock):
//   Fetch          - instruction memory read at the PC into the fetch latch.
//   Decode/Execute - register read, ALU, branch compare and PC redirect, load
//                    and store address on the local bus, CAM access.
//   Write-back     - result (ALU, CAM or loaded word) written to the register
//                    file. Stores, branches and stcam end in decode/execute.
//
// Instruction set (op-code in bits 31:27): ADD, ADDI, SUB, AND (immediate),
// LOAD, STORE, BEQ, BGE, BLE, LCAM, STCAM; encodings in atm_ni_pkg.
// Forwarding: when the F bit (bit 26) of an ALU or branch instruction is set,
// a source register equal to the destination of the instruction now in
// write-back takes that result instead of the register file's stale value.
// The program (the assembler) sets F; with F clear the stale value is read.
// Branches are resolved in decode/execute; the instruction after a branch
// (already fetched) is always executed: a single branch-delay slot.
// A load or store waits while the local bus is not ready (the DMA owns it,
// or the target cannot take the write); fetch and decode hold, write-back
// receives a bubble, and `stall` is high.
//
// `ce` is the core clock enable: the core advances only in cycles where it is
// high, so a unit can clock its DMA at two or three times the core rate from
// one clock. Bus and CAM requests are issued only in `ce` cycles. Read data
// arrive on `m_rdata` one clock after the request and are held for
// write-back.
//
// Follows the design: the three stages, the instruction list, op-codes and
// field positions, F-bit forwarding from write-back, branch-delay
// scheduling, the S and L bits of the CAM instructions. This implementation's
// choices where the design is silent: register 0 reads zero; ADDI and the
// load/store address offset use a sign-extended / zero-extended 16-bit field
// respectively; AND always takes its second operand from IMM16
// (zero-extended); branch compares are signed and a branch with M = 1 compares
// the register in bits 25:21 with the 8-bit immediate in bits 20:13; lcam
// returns all ones when the CAM has no match; the CAM-access S and L bit
// meanings are S = 1 -> Start address (lcam), S = 1,L = 0 -> insert,
// S = 0,L = 1 -> write Start, S = 0,L = 0 -> write End (stcam).
module risc_core
  import atm_ni_pkg::*;
#(
  parameter int unsigned NREGS = 28
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  // instruction memory
  output logic [PC_W-1:0]   imem_addr,
  input  logic [31:0]       imem_data,
  // local bus master
  output bus_req_t          m_req,
  input  logic              m_ready,
  input  logic [XLEN-1:0]   m_rdata,
  // CAM
  output logic              cam_valid,
  output cam_op_e           cam_op,
  output logic [XLEN-1:0]   cam_key,
  output logic [XLEN-1:0]   cam_wdata,
  input  logic              cam_match,
  input  logic [XLEN-1:0]   cam_rdata,
  // events, one core cycle each
  output logic              retire,    // an instruction left decode/execute
  output logic              stall,     // decode/execute waited for the bus
  output logic              fwd,       // a forwarded operand was used
  output logic              br_taken   // a branch was taken
);

  // ------------------------------------------------------------------
  // Pipeline registers
  // ------------------------------------------------------------------
  logic [PC_W-1:0] pc_q;
  logic            de_valid_q;
  logic [31:0]     de_inst_q;
  logic            wb_valid_q;
  logic [4:0]      wb_dest_q;
  logic [XLEN-1:0] wb_val_q;
  logic            wb_load_q;
  logic            rd_pending_q;
  logic [XLEN-1:0] ld_q;

  assign imem_addr = pc_q;

  // ------------------------------------------------------------------
  // Decode
  // ------------------------------------------------------------------
  opcode_e    op;
  logic       fbit;
  logic [4:0] f_25_21, f_20_16, f_15_11;
  logic [15:0] imm16;
  logic [7:0]  imm8;
  logic        mbit, lbit;
  logic [PC_W-1:0] label;

  always_comb begin
    op      = opcode_e'(de_inst_q[31:27]);
    fbit    = de_inst_q[26];
    f_25_21 = de_inst_q[25:21];
    f_20_16 = de_inst_q[20:16];
    f_15_11 = de_inst_q[15:11];
    imm16   = de_inst_q[15:0];
    imm8    = de_inst_q[20:13];
    mbit    = de_inst_q[12];
    lbit    = de_inst_q[15];
    label   = de_inst_q[PC_W-1:0];
  end

  logic       is_alu, is_branch, is_mem, is_cam, writes_rd, can_fwd;
  logic [4:0] ra, rb, rd;

  always_comb begin
    is_alu    = 1'b0;
    is_branch = 1'b0;
    is_mem    = 1'b0;
    is_cam    = 1'b0;
    writes_rd = 1'b0;
    ra = '0;
    rb = '0;
    rd = '0;
    unique case (op)
      OP_ADD, OP_SUB: begin
        is_alu = 1'b1; writes_rd = 1'b1;
        ra = f_15_11; rb = f_20_16; rd = f_25_21;
      end
      OP_ADDI, OP_AND: begin
        is_alu = 1'b1; writes_rd = 1'b1;
        ra = f_20_16; rd = f_25_21;
      end
      OP_BEQ, OP_BGE, OP_BLE: begin
        is_branch = 1'b1;
        ra = f_25_21; rb = f_20_16;
      end
      OP_LOAD: begin
        is_mem = 1'b1; writes_rd = 1'b1;
        ra = f_20_16; rd = f_25_21;
      end
      OP_STORE: begin
        is_mem = 1'b1;
        ra = f_20_16; rb = f_25_21;
      end
      OP_LCAM: begin
        is_cam = 1'b1; writes_rd = 1'b1;
        ra = f_20_16; rd = f_25_21;
      end
      OP_STCAM: begin
        is_cam = 1'b1;
        ra = f_25_21; rb = f_20_16;
      end
      default: ;
    endcase
    can_fwd = is_alu || is_branch;
  end

  // ------------------------------------------------------------------
  // Register file and forwarding
  // ------------------------------------------------------------------
  logic [XLEN-1:0] rf_a, rf_b, wb_value, opa, opb;
  logic            fwd_a, fwd_b;

  assign wb_value = wb_load_q ? (rd_pending_q ? m_rdata : ld_q) : wb_val_q;

  regfile #(.NREGS(NREGS), .XLEN(XLEN)) u_rf (
    .clk     (clk),
    .sel_r1  (ra),
    .sel_r2  (rb),
    .out1    (rf_a),
    .out2    (rf_b),
    .we      (ce && wb_valid_q),
    .sel_wb  (wb_dest_q),
    .data_in (wb_value)
  );

  always_comb begin
    fwd_a = can_fwd && fbit && wb_valid_q && wb_dest_q != 5'd0 && wb_dest_q == ra;
    fwd_b = can_fwd && fbit && wb_valid_q && wb_dest_q != 5'd0 && wb_dest_q == rb &&
            !(is_branch && mbit) && op != OP_ADDI && op != OP_AND;
    opa = fwd_a ? wb_value : rf_a;
    opb = fwd_b ? wb_value : rf_b;
  end

  // ------------------------------------------------------------------
  // Execute
  // ------------------------------------------------------------------
  logic [XLEN-1:0] alu_y, cmp_b;
  logic            taken;

  always_comb begin
    unique case (op)
      OP_ADD:  alu_y = opa + opb;
      OP_SUB:  alu_y = opa - opb;
      OP_ADDI: alu_y = opa + {{(XLEN-16){imm16[15]}}, imm16};
      OP_AND:  alu_y = opa & {{(XLEN-16){1'b0}}, imm16};
      default: alu_y = '0;
    endcase
    cmp_b = mbit ? {{(XLEN-8){1'b0}}, imm8} : opb;
    unique case (op)
      OP_BEQ:  taken = (opa == cmp_b);
      OP_BGE:  taken = ($signed(opa) >= $signed(cmp_b));
      OP_BLE:  taken = ($signed(opa) <= $signed(cmp_b));
      default: taken = 1'b0;
    endcase
    taken = taken && de_valid_q;
  end

  // memory access
  logic mem_req;
  assign mem_req = de_valid_q && is_mem;
  assign stall   = ce && mem_req && !m_ready;

  always_comb begin
    m_req       = '0;
    m_req.valid = ce && mem_req;
    m_req.we    = (op == OP_STORE);
    m_req.addr  = BUS_AW'(opa + {{(XLEN-16){1'b0}}, imm16});
    m_req.wdata = opb;
  end

  // CAM access
  always_comb begin
    cam_valid = ce && de_valid_q && is_cam;
    cam_key   = opa;
    cam_wdata = opb;
    if (op == OP_LCAM) cam_op = fbit ? CAM_RD_START : CAM_RD_END;
    else if (fbit)     cam_op = lbit ? CAM_WR_START : CAM_INSERT;
    else               cam_op = lbit ? CAM_WR_START : CAM_WR_END;
  end

  logic [XLEN-1:0] result;
  assign result = (op == OP_LCAM) ? (cam_match ? cam_rdata : '1) : alu_y;

  assign retire   = ce && de_valid_q && !stall;
  assign fwd      = retire && (fwd_a || fwd_b);
  assign br_taken = retire && taken;

  // ------------------------------------------------------------------
  // Sequential
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q       <= '0;
      de_valid_q <= 1'b0;
      de_inst_q  <= '0;
      wb_valid_q <= 1'b0;
      wb_dest_q  <= '0;
      wb_val_q   <= '0;
      wb_load_q  <= 1'b0;
    end else if (ce) begin
      if (stall) begin
        wb_valid_q <= 1'b0;
      end else begin
        de_inst_q  <= imem_data;
        de_valid_q <= 1'b1;
        pc_q       <= taken ? label : pc_q + 1'b1;
        wb_valid_q <= de_valid_q && writes_rd;
        wb_dest_q  <= rd;
        wb_val_q   <= result;
        wb_load_q  <= (op == OP_LOAD);
      end
    end
  end

  // read data capture, independent of ce
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending_q <= 1'b0;
      ld_q         <= '0;
    end else begin
      rd_pending_q <= m_req.valid && m_ready && !m_req.we;
      if (rd_pending_q) ld_q <= m_rdata;
    end
  end

  // a load or store never shares decode/execute with a CAM access
  a_one_kind: assert property (@(posedge clk) disable iff (!rst_n)
    !(m_req.valid && cam_valid));

endmodule
