// rbi: Receiver Buffer Interface between the line and the reassembly unit.
//
// Two cell buffers alternate. The line side writes one cell as 13 32-bit
// words (word 0 the ATM header, words 1..12 the 48-byte payload), the first
// word flagged by `in_sop`, into the buffer being filled. A completed cell
// marks that buffer ready, raises `cell_irq` to the reassembly core, and
// filling moves to the other buffer. The core reads the oldest ready cell
// over the local bus (offsets 0..12; offset 15 reads 1 when a cell is ready)
// and writes offset 15 to release the buffer once the cell has been moved.
// A cell that arrives while both buffers are still held is dropped and
// counted in `drop_count`.
//
// Bus timing: writes and reads are always accepted (`s_ready` = 1); read
// data appear on `s_rdata` in the cycle after the request.
// The double buffer and the signal to the core follow the design; the word
// layout, the status/release register and the drop rule are this
// implementation's choices (the design does not say what happens when both
// buffers are full).
module rbi
  import atm_ni_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // line side (from the framer)
  input  logic            in_valid,
  input  logic            in_sop,
  input  logic [XLEN-1:0] in_data,
  // local bus slave
  input  logic            s_valid,
  input  logic            s_we,
  input  logic [15:0]     s_addr,
  output logic            s_ready,
  output logic [XLEN-1:0] s_rdata,
  // status
  output logic            cell_irq,
  output logic [15:0]     drop_count
);

  logic [XLEN-1:0] buf_mem [2][16];
  logic [1:0]      full;
  logic            fill_sel, rd_sel;
  logic [3:0]      wcnt;
  logic            dropping;
  logic            receiving;

  assign s_ready  = 1'b1;
  assign cell_irq = full[rd_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full       <= '0;
      fill_sel   <= 1'b0;
      rd_sel     <= 1'b0;
      wcnt       <= '0;
      dropping   <= 1'b0;
      receiving  <= 1'b0;
      drop_count <= '0;
      s_rdata    <= '0;
    end else begin
      // line side
      if (in_valid) begin
        if (in_sop) begin
          if (full[fill_sel]) begin
            dropping   <= 1'b1;
            receiving  <= 1'b0;
            drop_count <= drop_count + 16'd1;
          end else begin
            dropping  <= 1'b0;
            receiving <= 1'b1;
            buf_mem[fill_sel][0] <= in_data;
            wcnt <= 4'd1;
          end
        end else if (receiving && !dropping) begin
          buf_mem[fill_sel][wcnt] <= in_data;
          wcnt <= wcnt + 4'd1;
          if (32'(wcnt) == CELL_WORDS - 1) begin
            full[fill_sel] <= 1'b1;
            fill_sel       <= ~fill_sel;
            receiving      <= 1'b0;
          end
        end
      end
      // bus side
      if (s_valid) begin
        if (s_we) begin
          if (s_addr == LB_STATUS && full[rd_sel]) begin
            full[rd_sel] <= 1'b0;
            rd_sel       <= ~rd_sel;
          end
        end else if (s_addr == LB_STATUS) begin
          s_rdata <= {31'd0, full[rd_sel]};
        end else begin
          s_rdata <= buf_mem[rd_sel][s_addr[3:0]];
        end
      end
    end
  end

endmodule
