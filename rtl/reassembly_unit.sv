// reassembly_unit: receive half of the ATM network interface.
//
// Cells from the line land in the Receiver Buffer Interface (RBI). The
// Reassembly Embedded Processor (REP, a risc_core with 28 registers) reads
// each cell's header, finds the connection in the CAM, takes a free cell slot
// from the Circulation Buffer (CB), has the DMA move the payload from the RBI
// into that slot of the Cell Reassembly Buffer (CRB), and links the slot onto
// the connection's list (the word after the payload is the pointer to the
// next slot, zero at the end). When the last cell of a PDU has arrived, the
// REP pushes the connection identifier and the list's Start-address into
// FIFO2; signalling cells go to FIFO1 at once. The host gives the REP new
// connections through FIFO3 and returns freed slots through FIFO4, and reads
// the reassembled PDUs from the CRB through its own port. The REP drives a
// host interrupt line when the CRB fills up. All protocol decisions are made
// by the program in the instruction memory, loaded through the prog_* port.
//
// Local bus: 32-bit words, 20-bit word address, region in bits 19:16
// (atm_ni_pkg): 0 CRB, 1 RBI, 2 CB, 3 FIFOs and host interrupt, 4 DMA. The
// DMA has the bus while it is busy; the REP's loads and stores wait meanwhile.
// Reads return data one clock after the request. Reading an empty FIFO
// returns 0; writing a full FIFO waits.
//
// Clocking: one clock, the DMA rate. The REP advances every CLK_RATIO-th
// cycle; CLK_RATIO = 2 is the design's reassembly configuration (DMA at twice
// the core clock, e.g. 169 MHz and 85 MHz). The structure follows the
// design's NI architecture; the address map, the FIFO depth, the CAM depth and
// the CB size are this implementation's choices.
module reassembly_unit
  import atm_ni_pkg::*;
#(
  parameter int unsigned NREGS      = 28,
  parameter int unsigned CLK_RATIO  = 2,
  parameter int unsigned IMEM_DEPTH = 4096,
  parameter int unsigned CRB_WORDS  = 65536,
  parameter int unsigned CB_WORDS   = 8192,
  parameter int unsigned CAM_DEPTH  = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load
  input  logic              prog_we,
  input  logic [PC_W-1:0]   prog_addr,
  input  logic [31:0]       prog_data,
  // line side
  input  logic              in_valid,
  input  logic              in_sop,
  input  logic [XLEN-1:0]   in_data,
  // host: CRB port
  input  logic              host_crb_en,
  input  logic              host_crb_we,
  input  logic [$clog2(CRB_WORDS)-1:0] host_crb_addr,
  input  logic [XLEN-1:0]   host_crb_wdata,
  output logic [XLEN-1:0]   host_crb_rdata,
  // host: FIFO1 (signalling notices) and FIFO2 (PDU notices), host pops
  input  logic              fifo1_pop,
  output logic [XLEN-1:0]   fifo1_data,
  output logic              fifo1_empty,
  input  logic              fifo2_pop,
  output logic [XLEN-1:0]   fifo2_data,
  output logic              fifo2_empty,
  // host: FIFO3 (new connections) and FIFO4 (free pointers), host pushes
  input  logic              fifo3_push,
  input  logic [XLEN-1:0]   fifo3_data,
  output logic              fifo3_full,
  input  logic              fifo4_push,
  input  logic [XLEN-1:0]   fifo4_data,
  output logic              fifo4_full,
  // host interrupt (CRB filling up)
  output logic              host_irq,
  // status and events
  output logic [15:0]       rbi_drop_count,
  output logic              ev_retire,
  output logic              ev_stall,
  output logic              ev_fwd,
  output logic              ev_branch,
  output logic              dma_busy
);

  localparam int unsigned CRB_AW = $clog2(CRB_WORDS);
  localparam int unsigned CB_AW  = $clog2(CB_WORDS);
  localparam int unsigned FAW    = $clog2(FIFO_DEPTH);

  // ------------------------------------------------------------------
  // Core clock enable
  // ------------------------------------------------------------------
  logic [3:0] ce_cnt;
  logic       ce;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ce_cnt <= '0;
    else        ce_cnt <= (32'(ce_cnt) == CLK_RATIO - 1) ? '0 : ce_cnt + 4'd1;
  end
  assign ce = (ce_cnt == 4'd0);

  // ------------------------------------------------------------------
  // REP core, instruction memory, CAM
  // ------------------------------------------------------------------
  logic [PC_W-1:0] imem_addr;
  logic [31:0]     imem_data;
  bus_req_t        cpu_req, dma_req, bus;
  logic            cpu_ready, slave_ready;
  logic [XLEN-1:0] bus_rdata;
  logic            cam_valid, cam_match;
  cam_op_e         cam_op;
  logic [XLEN-1:0] cam_key, cam_wdata, cam_rdata;

  inst_mem #(.DEPTH(IMEM_DEPTH), .AW(PC_W)) u_imem (
    .clk, .prog_we, .prog_addr, .prog_data, .addr(imem_addr), .data(imem_data)
  );

  risc_core #(.NREGS(NREGS)) u_rep (
    .clk, .rst_n, .ce,
    .imem_addr, .imem_data,
    .m_req(cpu_req), .m_ready(cpu_ready), .m_rdata(bus_rdata),
    .cam_valid, .cam_op, .cam_key, .cam_wdata, .cam_match, .cam_rdata,
    .retire(ev_retire), .stall(ev_stall), .fwd(ev_fwd), .br_taken(ev_branch)
  );

  cam #(.DEPTH(CAM_DEPTH)) u_cam (
    .clk, .rst_n, .valid(cam_valid), .op(cam_op), .key(cam_key),
    .wdata(cam_wdata), .match(cam_match), .rdata(cam_rdata), .full()
  );

  // ------------------------------------------------------------------
  // Bus arbitration and decode
  // ------------------------------------------------------------------
  logic dma_cfg_we;
  logic dma_done;

  always_comb begin
    bus = dma_busy ? dma_req : cpu_req;
  end
  assign cpu_ready = !dma_busy && slave_ready;

  logic [3:0]  rgn;
  logic [15:0] off;
  logic        acc;
  assign rgn = bus.addr[19:16];
  assign off = bus.addr[15:0];
  assign acc = bus.valid && slave_ready;

  dma u_dma (
    .clk, .rst_n,
    .cfg_we(dma_cfg_we), .cfg_addr(off[1:0]), .cfg_wdata(bus.wdata),
    .m_req(dma_req), .m_ready(slave_ready), .m_rdata(bus_rdata),
    .busy(dma_busy), .done(dma_done)
  );
  assign dma_cfg_we = acc && bus.we && rgn == RGN_DMA && !dma_busy;

  // CRB
  logic [XLEN-1:0] crb_rdata;
  dp_ram #(.DEPTH(CRB_WORDS), .AW(CRB_AW)) u_crb (
    .clk,
    .a_en(acc && rgn == RGN_CELLMEM), .a_we(bus.we), .a_addr(bus.addr[CRB_AW-1:0]),
    .a_wdata(bus.wdata), .a_rdata(crb_rdata),
    .b_en(host_crb_en), .b_we(host_crb_we), .b_addr(host_crb_addr),
    .b_wdata(host_crb_wdata), .b_rdata(host_crb_rdata)
  );

  // CB (circulation buffer of free slot pointers); its host port is unused
  logic [XLEN-1:0] cb_rdata;
  dp_ram #(.DEPTH(CB_WORDS), .AW(CB_AW)) u_cb (
    .clk,
    .a_en(acc && rgn == RGN_CB), .a_we(bus.we), .a_addr(bus.addr[CB_AW-1:0]),
    .a_wdata(bus.wdata), .a_rdata(cb_rdata),
    .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata()
  );

  // RBI
  logic [XLEN-1:0] rbi_rdata;
  logic            rbi_ready, cell_irq;
  rbi u_rbi (
    .clk, .rst_n, .in_valid, .in_sop, .in_data,
    .s_valid(acc && rgn == RGN_LINEBUF), .s_we(bus.we), .s_addr(off),
    .s_ready(rbi_ready), .s_rdata(rbi_rdata),
    .cell_irq, .drop_count(rbi_drop_count)
  );

  // FIFOs
  logic            f1_full, f2_full, f3_empty, f4_empty;
  logic [XLEN-1:0] f3_head, f4_head;
  logic            fifo_sel, f1_push, f2_push, f3_pop, f4_pop;
  logic [XLEN-1:0] fifo_rdata;

  assign fifo_sel = acc && rgn == RGN_FIFO;
  assign f1_push  = fifo_sel && bus.we  && off == FO_FIFO1;
  assign f2_push  = fifo_sel && bus.we  && off == FO_FIFO2;
  assign f3_pop   = fifo_sel && !bus.we && off == FO_FIFO3;
  assign f4_pop   = fifo_sel && !bus.we && off == FO_FIFO4;

  sync_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n, .push(f1_push), .wdata(bus.wdata), .pop(fifo1_pop),
    .rdata(fifo1_data), .empty(fifo1_empty), .full(f1_full), .count()
  );
  sync_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n, .push(f2_push), .wdata(bus.wdata), .pop(fifo2_pop),
    .rdata(fifo2_data), .empty(fifo2_empty), .full(f2_full), .count()
  );
  sync_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo3 (
    .clk, .rst_n, .push(fifo3_push), .wdata(fifo3_data), .pop(f3_pop),
    .rdata(f3_head), .empty(f3_empty), .full(fifo3_full), .count()
  );
  sync_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo4 (
    .clk, .rst_n, .push(fifo4_push), .wdata(fifo4_data), .pop(f4_pop),
    .rdata(f4_head), .empty(f4_empty), .full(fifo4_full), .count()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_rdata <= '0;
      host_irq   <= 1'b0;
    end else if (fifo_sel) begin
      if (bus.we && off == FO_HOSTIRQ) host_irq <= bus.wdata[0];
      if (!bus.we) begin
        unique case (off)
          FO_FIFO3: fifo_rdata <= f3_empty ? '0 : f3_head;
          FO_FIFO4: fifo_rdata <= f4_empty ? '0 : f4_head;
          default:  fifo_rdata <= '0;
        endcase
      end
    end
  end

  // slave ready: only pushes into a full FIFO wait
  always_comb begin
    slave_ready = rbi_ready;
    if (bus.valid && bus.we && rgn == RGN_FIFO) begin
      if (off == FO_FIFO1 && f1_full) slave_ready = 1'b0;
      if (off == FO_FIFO2 && f2_full) slave_ready = 1'b0;
    end
  end

  // read-data return, selected by the region of the previous read
  logic [3:0] rsel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 rsel_q <= '0;
    else if (acc && !bus.we)    rsel_q <= rgn;
  end

  always_comb begin
    unique case (rsel_q)
      RGN_CELLMEM: bus_rdata = crb_rdata;
      RGN_LINEBUF: bus_rdata = rbi_rdata;
      RGN_CB:      bus_rdata = cb_rdata;
      RGN_FIFO:    bus_rdata = fifo_rdata;
      default:     bus_rdata = '0;
    endcase
  end

  // the RBI's signal to the core is visible to the program as its status
  // register; the DMA completion shows as the end of the bus wait
  logic unused;
  assign unused = cell_irq ^ dma_done;

endmodule
