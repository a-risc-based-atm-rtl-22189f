// regfile: register file of an embedded RISC core.
//
// Two read ports and one write port, 32-bit words, 5-bit register numbers
// (select R1, select R2, select write-back). Reads are combinational; the
// write happens at the clock edge when `we` (the write-back control) is set.
// A read of the register being written in the same cycle returns the old
// value: the core's forwarding path, not the register file, supplies the new
// one. The number of registers is a parameter: 28 for the reassembly core and
// 20 for the segmentation core, as the design specifies. Register 0 always
// reads zero and register numbers at or above NREGS read zero and ignore
// writes; both are this implementation's choices. No reset: the program
// initialises what it uses.
module regfile #(
  parameter int unsigned NREGS = 28,
  parameter int unsigned XLEN  = 32
) (
  input  logic            clk,
  input  logic [4:0]      sel_r1,
  input  logic [4:0]      sel_r2,
  output logic [XLEN-1:0] out1,
  output logic [XLEN-1:0] out2,
  input  logic            we,
  input  logic [4:0]      sel_wb,
  input  logic [XLEN-1:0] data_in
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && sel_wb != 5'd0 && 32'(sel_wb) < NREGS)
      regs[sel_wb] <= data_in;
  end

  always_comb begin
    out1 = (sel_r1 == 5'd0 || 32'(sel_r1) >= NREGS) ? '0 : regs[sel_r1];
    out2 = (sel_r2 == 5'd0 || 32'(sel_r2) >= NREGS) ? '0 : regs[sel_r2];
  end

endmodule
