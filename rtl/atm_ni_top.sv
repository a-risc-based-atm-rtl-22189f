// atm_ni_top: RISC-based ATM network interface.
//
// Two independent processing units, one per direction, each built around its
// own embedded three-stage RISC core with a DMA on a 32-bit local bus:
//   reassembly_unit   - line -> RBI -> (REP, CAM, CB, DMA) -> CRB -> host,
//                       with FIFO1/FIFO2 to the host and FIFO3/FIFO4 from it;
//   segmentation_unit - host -> CSB -> (SEP, DMA) -> SBI -> line, with FIFO5
//                       from the host.
// The line side (the SONET framer) and the host bus are outside this design;
// their signals are the ports here. Each core's program is loaded through its
// prog_* port while the unit is in reset or idle. One clock drives both
// units; each core runs at 1/CLK_RATIO of it (2 for reassembly, 3 for
// segmentation, the design's configurations).
module atm_ni_top
  import atm_ni_pkg::*;
#(
  parameter int unsigned CRB_WORDS = 65536,
  parameter int unsigned CSB_WORDS = 49152,
  parameter int unsigned CB_WORDS  = 8192,
  parameter int unsigned CAM_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load for the two cores
  input  logic              rep_prog_we,
  input  logic              sep_prog_we,
  input  logic [PC_W-1:0]   prog_addr,
  input  logic [31:0]       prog_data,
  // line receive (from framer)
  input  logic              rx_valid,
  input  logic              rx_sop,
  input  logic [XLEN-1:0]   rx_data,
  // line transmit (to framer)
  output logic              tx_valid,
  output logic              tx_sop,
  output logic [XLEN-1:0]   tx_data,
  input  logic              tx_ready,
  // host: CRB
  input  logic              host_crb_en,
  input  logic              host_crb_we,
  input  logic [$clog2(CRB_WORDS)-1:0] host_crb_addr,
  input  logic [XLEN-1:0]   host_crb_wdata,
  output logic [XLEN-1:0]   host_crb_rdata,
  // host: CSB
  input  logic              host_csb_en,
  input  logic              host_csb_we,
  input  logic [$clog2(CSB_WORDS)-1:0] host_csb_addr,
  input  logic [XLEN-1:0]   host_csb_wdata,
  output logic [XLEN-1:0]   host_csb_rdata,
  // host: FIFOs
  input  logic              fifo1_pop,
  output logic [XLEN-1:0]   fifo1_data,
  output logic              fifo1_empty,
  input  logic              fifo2_pop,
  output logic [XLEN-1:0]   fifo2_data,
  output logic              fifo2_empty,
  input  logic              fifo3_push,
  input  logic [XLEN-1:0]   fifo3_data,
  output logic              fifo3_full,
  input  logic              fifo4_push,
  input  logic [XLEN-1:0]   fifo4_data,
  output logic              fifo4_full,
  input  logic              fifo5_push,
  input  logic [XLEN-1:0]   fifo5_data,
  output logic              fifo5_full,
  output logic              host_irq,
  // status and per-core events
  output logic [15:0]       rbi_drop_count,
  output logic [4:0]        rep_ev,   // {dma_busy, branch, fwd, stall, retire}
  output logic [4:0]        sep_ev
);

  reassembly_unit #(
    .CRB_WORDS(CRB_WORDS), .CB_WORDS(CB_WORDS), .CAM_DEPTH(CAM_DEPTH)
  ) u_reassembly (
    .clk, .rst_n,
    .prog_we(rep_prog_we), .prog_addr, .prog_data,
    .in_valid(rx_valid), .in_sop(rx_sop), .in_data(rx_data),
    .host_crb_en, .host_crb_we, .host_crb_addr, .host_crb_wdata, .host_crb_rdata,
    .fifo1_pop, .fifo1_data, .fifo1_empty,
    .fifo2_pop, .fifo2_data, .fifo2_empty,
    .fifo3_push, .fifo3_data, .fifo3_full,
    .fifo4_push, .fifo4_data, .fifo4_full,
    .host_irq, .rbi_drop_count,
    .ev_retire(rep_ev[0]), .ev_stall(rep_ev[1]), .ev_fwd(rep_ev[2]),
    .ev_branch(rep_ev[3]), .dma_busy(rep_ev[4])
  );

  segmentation_unit #(
    .CSB_WORDS(CSB_WORDS)
  ) u_segmentation (
    .clk, .rst_n,
    .prog_we(sep_prog_we), .prog_addr, .prog_data,
    .host_csb_en, .host_csb_we, .host_csb_addr, .host_csb_wdata, .host_csb_rdata,
    .fifo5_push, .fifo5_data, .fifo5_full,
    .out_valid(tx_valid), .out_sop(tx_sop), .out_data(tx_data), .out_ready(tx_ready),
    .ev_retire(sep_ev[0]), .ev_stall(sep_ev[1]), .ev_fwd(sep_ev[2]),
    .ev_branch(sep_ev[3]), .dma_busy(sep_ev[4])
  );

endmodule
