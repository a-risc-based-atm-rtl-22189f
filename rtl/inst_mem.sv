// inst_mem: instruction memory of an embedded RISC core.
//
// DEPTH words of 32 bits. The fetch stage reads it combinationally at the
// program counter. A write port lets the host (or a test bench) load the
// protocol program before the core is released from reset. The depth of 4096
// words matches the 12-bit branch label field of the instruction set; the
// design does not state the memory size, and the load port is this
// implementation's choice.
module inst_mem #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = 12
) (
  input  logic          clk,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [31:0]   prog_data,
  input  logic [AW-1:0] addr,
  output logic [31:0]   data
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign data = mem[addr];

endmodule
