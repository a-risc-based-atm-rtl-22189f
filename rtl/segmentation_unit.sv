// segmentation_unit: transmit half of the ATM network interface.
//
// The host writes a CPCS-PDU into the Cell Segmentation Buffer (CSB) through
// its own port and then pushes a request into FIFO5: the ATM header to use
// (VPI/VCI, PT = 0), the PDU's word address in the CSB and its number of
// cells. The Segmentation Embedded Processor (SEP, a risc_core with 20
// registers) reads the request, and for each cell has the DMA move 12
// payload words from the CSB into the Sending Buffer Interface (SBI), then
// writes the header word itself, with the PT end-of-message bit set on the
// last cell. The SBI sends each completed cell to the line while the next is
// being filled.
//
// Local bus as in reassembly_unit: region 0 CSB, 1 SBI, 3 FIFO5 (read pops,
// 0 when empty), 4 DMA. Clocking: one clock, the DMA rate; the SEP advances
// every CLK_RATIO-th cycle. CLK_RATIO = 3 is the design's segmentation
// configuration (DMA at three times the core clock, e.g. 213 MHz and
// 68-70 MHz). The CSB holds three 64 KB PDUs (49152 words), as in the design;
// the address map and the FIFO depth are this implementation's choices.
module segmentation_unit
  import atm_ni_pkg::*;
#(
  parameter int unsigned NREGS      = 20,
  parameter int unsigned CLK_RATIO  = 3,
  parameter int unsigned IMEM_DEPTH = 4096,
  parameter int unsigned CSB_WORDS  = 49152,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load
  input  logic              prog_we,
  input  logic [PC_W-1:0]   prog_addr,
  input  logic [31:0]       prog_data,
  // host: CSB port
  input  logic              host_csb_en,
  input  logic              host_csb_we,
  input  logic [$clog2(CSB_WORDS)-1:0] host_csb_addr,
  input  logic [XLEN-1:0]   host_csb_wdata,
  output logic [XLEN-1:0]   host_csb_rdata,
  // host: FIFO5 (segmentation requests)
  input  logic              fifo5_push,
  input  logic [XLEN-1:0]   fifo5_data,
  output logic              fifo5_full,
  // line side
  output logic              out_valid,
  output logic              out_sop,
  output logic [XLEN-1:0]   out_data,
  input  logic              out_ready,
  // events
  output logic              ev_retire,
  output logic              ev_stall,
  output logic              ev_fwd,
  output logic              ev_branch,
  output logic              dma_busy
);

  localparam int unsigned CSB_AW = $clog2(CSB_WORDS);

  logic [3:0] ce_cnt;
  logic       ce;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ce_cnt <= '0;
    else        ce_cnt <= (32'(ce_cnt) == CLK_RATIO - 1) ? '0 : ce_cnt + 4'd1;
  end
  assign ce = (ce_cnt == 4'd0);

  logic [PC_W-1:0] imem_addr;
  logic [31:0]     imem_data;
  bus_req_t        cpu_req, dma_req, bus;
  logic            cpu_ready, slave_ready;
  logic [XLEN-1:0] bus_rdata;

  inst_mem #(.DEPTH(IMEM_DEPTH), .AW(PC_W)) u_imem (
    .clk, .prog_we, .prog_addr, .prog_data, .addr(imem_addr), .data(imem_data)
  );

  // The segmentation program uses no CAM: its match input reads "no entry".
  risc_core #(.NREGS(NREGS)) u_sep (
    .clk, .rst_n, .ce,
    .imem_addr, .imem_data,
    .m_req(cpu_req), .m_ready(cpu_ready), .m_rdata(bus_rdata),
    .cam_valid(), .cam_op(), .cam_key(), .cam_wdata(),
    .cam_match(1'b0), .cam_rdata('0),
    .retire(ev_retire), .stall(ev_stall), .fwd(ev_fwd), .br_taken(ev_branch)
  );

  assign bus       = dma_busy ? dma_req : cpu_req;
  assign cpu_ready = !dma_busy && slave_ready;

  logic [3:0]  rgn;
  logic [15:0] off;
  logic        acc;
  assign rgn = bus.addr[19:16];
  assign off = bus.addr[15:0];
  assign acc = bus.valid && slave_ready;

  logic dma_done;
  dma u_dma (
    .clk, .rst_n,
    .cfg_we(acc && bus.we && rgn == RGN_DMA && !dma_busy), .cfg_addr(off[1:0]),
    .cfg_wdata(bus.wdata),
    .m_req(dma_req), .m_ready(slave_ready), .m_rdata(bus_rdata),
    .busy(dma_busy), .done(dma_done)
  );

  logic [XLEN-1:0] csb_rdata;
  dp_ram #(.DEPTH(CSB_WORDS), .AW(CSB_AW)) u_csb (
    .clk,
    .a_en(acc && rgn == RGN_CELLMEM), .a_we(bus.we), .a_addr(bus.addr[CSB_AW-1:0]),
    .a_wdata(bus.wdata), .a_rdata(csb_rdata),
    .b_en(host_csb_en), .b_we(host_csb_we), .b_addr(host_csb_addr),
    .b_wdata(host_csb_wdata), .b_rdata(host_csb_rdata)
  );

  logic            sbi_ready;
  logic [XLEN-1:0] sbi_rdata;
  sbi u_sbi (
    .clk, .rst_n,
    .s_valid(bus.valid && rgn == RGN_LINEBUF), .s_we(bus.we), .s_addr(off),
    .s_wdata(bus.wdata), .s_ready(sbi_ready), .s_rdata(sbi_rdata),
    .out_valid, .out_sop, .out_data, .out_ready
  );
  assign slave_ready = (rgn == RGN_LINEBUF) ? sbi_ready : 1'b1;

  logic            f5_empty, f5_pop;
  logic [XLEN-1:0] f5_head, fifo_rdata;
  assign f5_pop = acc && rgn == RGN_FIFO && !bus.we && off == FO_FIFO5;

  sync_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo5 (
    .clk, .rst_n, .push(fifo5_push), .wdata(fifo5_data), .pop(f5_pop),
    .rdata(f5_head), .empty(f5_empty), .full(fifo5_full), .count()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                    fifo_rdata <= '0;
    else if (acc && rgn == RGN_FIFO && !bus.we)    fifo_rdata <= (off == FO_FIFO5 && !f5_empty) ? f5_head : '0;
  end

  logic [3:0] rsel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              rsel_q <= '0;
    else if (acc && !bus.we) rsel_q <= rgn;
  end

  always_comb begin
    unique case (rsel_q)
      RGN_CELLMEM: bus_rdata = csb_rdata;
      RGN_LINEBUF: bus_rdata = sbi_rdata;
      RGN_FIFO:    bus_rdata = fifo_rdata;
      default:     bus_rdata = '0;
    endcase
  end

  logic unused;
  assign unused = dma_done;

endmodule
