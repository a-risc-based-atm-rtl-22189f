// atm_ni_pkg: types and constants shared by the ATM network interface.
//
// Holds the instruction set of the embedded RISC cores (five-bit op-codes and
// the field positions of each instruction format), the local-bus request type
// and the word address map of the two local buses.
//
// The op-codes and the bit positions of the instruction fields follow the
// instruction table and format drawings of the design. The local-bus address
// map, the register offsets inside each region and the 20-bit word address
// are this implementation's own choices.
package atm_ni_pkg;

  localparam int unsigned XLEN   = 32;   // data path and local bus width
  localparam int unsigned BUS_AW = 20;   // local-bus word address width

  // ---------------------------------------------------------------------
  // Instruction set
  // ---------------------------------------------------------------------
  typedef enum logic [4:0] {
    OP_LOAD  = 5'b00001,
    OP_AND   = 5'b00010,
    OP_BLE   = 5'b00011,
    OP_SUB   = 5'b00100,
    OP_STORE = 5'b00101,
    OP_BEQ   = 5'b00110,
    OP_STCAM = 5'b00111,
    OP_BGE   = 5'b01000,
    OP_LCAM  = 5'b01100,
    OP_ADDI  = 5'b01110,
    OP_ADD   = 5'b01111
  } opcode_e;

  // Field positions (bit 31 is the most significant bit of an instruction).
  //   R format   : op[31:27] F[26] DES[25:21] SRR2[20:16] SRR1[15:11]
  //   I format   : op[31:27] F[26] DES[25:21] SRR1[20:16] IMM16[15:0]
  //   branch     : op[31:27] F[26] SRR2[25:21] SRR1/imm[20:13] M[12] label[11:0]
  //   load/store : op[31:27] SRR2[25:21] SRR1[20:16] address[15:0]
  //   lcam       : op[31:27] S[26] DES[25:21] SRR1[20:16]
  //   stcam      : op[31:27] S[26] SRR1[25:21] SRR2[20:16] L[15]
  localparam int unsigned PC_W = 12;     // width of the branch label field

  // CAM operations requested by the lcam / stcam instructions
  typedef enum logic [2:0] {
    CAM_RD_START = 3'd0,
    CAM_RD_END   = 3'd1,
    CAM_INSERT   = 3'd2,
    CAM_WR_START = 3'd3,
    CAM_WR_END   = 3'd4
  } cam_op_e;

  // ---------------------------------------------------------------------
  // Local bus
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [BUS_AW-1:0] addr;
    logic [XLEN-1:0]   wdata;
  } bus_req_t;

  // Region is addr[19:16]; the offset inside the region is addr[15:0].
  localparam logic [3:0] RGN_CELLMEM = 4'h0;  // CRB (reassembly) or CSB (segmentation)
  localparam logic [3:0] RGN_LINEBUF = 4'h1;  // RBI (reassembly) or SBI (segmentation)
  localparam logic [3:0] RGN_CB      = 4'h2;  // circulation buffer (reassembly only)
  localparam logic [3:0] RGN_FIFO    = 4'h3;  // host FIFOs and host status
  localparam logic [3:0] RGN_DMA     = 4'h4;  // DMA registers

  // Offsets in the line-buffer region
  localparam logic [15:0] LB_STATUS  = 16'h000F; // RBI: read 1 = cell ready, write = release
                                                 // SBI: read 1 = a buffer is free
  // Offsets in the FIFO region
  localparam logic [15:0] FO_FIFO1   = 16'h0000; // write: push signalling notice to host
  localparam logic [15:0] FO_FIFO2   = 16'h0001; // write: push PDU notice to host
  localparam logic [15:0] FO_FIFO3   = 16'h0002; // read : pop new connection (0 if empty)
  localparam logic [15:0] FO_FIFO4   = 16'h0003; // read : pop free pointer (0 if empty)
  localparam logic [15:0] FO_FIFO5   = 16'h0004; // read : pop segmentation request word (0 if empty)
  localparam logic [15:0] FO_HOSTIRQ = 16'h0005; // write: host interrupt line (bit 0)
  // Offsets in the DMA region
  localparam logic [15:0] DO_SRC     = 16'h0000; // source word address
  localparam logic [15:0] DO_DST     = 16'h0001; // destination word address; writing starts
  localparam logic [15:0] DO_LEN     = 16'h0002; // block length in words

  // ATM cell as held in the line buffers: word 0 is the header (GFC, VPI,
  // VCI, PT, CLP; the HEC is checked and removed by the framer), words 1..12
  // are the 48-byte payload.
  localparam int unsigned CELL_WORDS = 13;

endpackage
