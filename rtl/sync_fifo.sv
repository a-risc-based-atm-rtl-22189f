// sync_fifo: one of the five host/NI communication FIFOs.
//
// FIFO1 and FIFO2 carry connection identifiers and start addresses from the
// reassembly core to the host, FIFO3 and FIFO4 carry new connections and
// freed cell pointers from the host to the reassembly core, and FIFO5 carries
// segmentation requests from the host to the segmentation core. Words are 32
// bits. The head word is always visible on `rdata` (show-ahead); `pop`
// removes it, `push` appends `wdata`. A push when full or a pop when empty is
// ignored. The design does not give the depth; 16 words is assumed.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= AW'((32'(wr_ptr) + 1) % DEPTH);
      if (do_pop)  rd_ptr <= AW'((32'(rd_ptr) + 1) % DEPTH);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  assign rdata = mem[rd_ptr];
  assign empty = (count == '0);
  assign full  = (32'(count) == DEPTH);

endmodule
