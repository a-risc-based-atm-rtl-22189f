// sbi: Sending Buffer Interface between the segmentation unit and the line.
//
// Two cell buffers alternate. The segmentation unit fills one buffer over
// the local bus: the DMA writes the 12 payload words at offsets 1..12 and
// the core then writes the ATM header at offset 0, which completes the cell.
// The completed buffer is sent to the line as 13 words (header first,
// `out_sop` on it) while the other buffer is filled. A write that finds both
// buffers occupied is held (`s_ready` = 0) until one has been sent. Offset 15
// reads 1 when a buffer is free to fill.
//
// Line timing: a word is transferred in each cycle where `out_valid` and
// `out_ready` are high. Bus timing: reads return data in the next cycle.
// The two buffers and the send-while-filling behaviour follow the design;
// the word layout and "header write completes the cell" are this
// implementation's choices, taken from the design's order of operations
// (payload moved by DMA first, header sent from a core register after it).
module sbi
  import atm_ni_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // local bus slave
  input  logic            s_valid,
  input  logic            s_we,
  input  logic [15:0]     s_addr,
  input  logic [XLEN-1:0] s_wdata,
  output logic            s_ready,
  output logic [XLEN-1:0] s_rdata,
  // line side (to the framer)
  output logic            out_valid,
  output logic            out_sop,
  output logic [XLEN-1:0] out_data,
  input  logic            out_ready
);

  logic [XLEN-1:0] buf_mem [2][16];
  logic [1:0]      full;
  logic            wr_sel, tx_sel;
  logic [3:0]      tx_cnt;

  // status reads are always accepted; cell writes wait for a free buffer
  assign s_ready   = !(s_we && s_addr != LB_STATUS) || !full[wr_sel];
  assign out_valid = full[tx_sel];
  assign out_sop   = full[tx_sel] && (tx_cnt == 4'd0);
  assign out_data  = buf_mem[tx_sel][tx_cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_sel  <= 1'b0;
      tx_sel  <= 1'b0;
      tx_cnt  <= '0;
      s_rdata <= '0;
    end else begin
      if (s_valid && s_ready) begin
        if (s_we) begin
          if (s_addr != LB_STATUS && s_addr[15:4] == 12'd0 && 32'(s_addr[3:0]) < CELL_WORDS) begin
            buf_mem[wr_sel][s_addr[3:0]] <= s_wdata;
            if (s_addr[3:0] == 4'd0) begin
              full[wr_sel] <= 1'b1;
              wr_sel       <= ~wr_sel;
            end
          end
        end else begin
          s_rdata <= (s_addr == LB_STATUS) ? {31'd0, !full[wr_sel]} : '0;
        end
      end
      if (out_valid && out_ready) begin
        if (32'(tx_cnt) == CELL_WORDS - 1) begin
          tx_cnt       <= '0;
          full[tx_sel] <= 1'b0;
          tx_sel       <= ~tx_sel;
        end else begin
          tx_cnt <= tx_cnt + 4'd1;
        end
      end
    end
  end

endmodule
