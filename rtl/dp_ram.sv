// dp_ram: dual-port word memory used for the NI cell buffers.
//
// Port A sits on the unit's 32-bit local bus (RISC core and DMA); port B is
// the host side. Both ports are synchronous: a read returns its word in the
// clock cycle after the request, a write takes effect at the clock edge.
// The same module serves as the Cell Reassembly Buffer (256 KB = 65536
// words), the Cell Segmentation Buffer and the Circulation Buffer of free
// cell-slot pointers; each instance sets DEPTH. If both ports write the same
// word in one cycle, port A wins (a choice of this implementation).
module dp_ram #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: local bus
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: host
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end

endmodule
