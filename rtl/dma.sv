// dma: block-transfer engine on a unit's local bus.
//
// The RISC core programs three registers through the bus: the source word
// address, the block length in words, and the destination word address;
// writing the destination starts the transfer. While `busy` is high the DMA
// owns the local bus and the core waits if it needs the bus. Each word takes
// two DMA clock cycles, as in the design: a read cycle that brings the
// source word to the DMA's data register, then a write cycle that stores it
// at the destination, after which both addresses advance. A 48-byte AAL5
// payload (12 words) thus takes 24 DMA cycles, which is 12 cycles of a RISC
// core clocked at half the DMA's rate. A destination that is not ready (a
// full sending buffer) holds the write cycle.
//
// Bus timing: a request is accepted in the cycle where `m_req.valid` and
// `m_ready` are both high; read data arrive on `m_rdata` in the next cycle.
// The register map (source, destination, length) is this implementation's
// choice; the design gives only that block length and direction are set up.
module dma
  import atm_ni_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register writes from the bus
  input  logic              cfg_we,
  input  logic [1:0]        cfg_addr,
  input  logic [XLEN-1:0]   cfg_wdata,
  // bus master side
  output bus_req_t          m_req,
  input  logic              m_ready,
  input  logic [XLEN-1:0]   m_rdata,
  output logic              busy,
  output logic              done      // one-cycle pulse after the last write
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;

  state_e            state;
  logic [BUS_AW-1:0] src, dst;
  logic [15:0]       len, remaining;
  logic [XLEN-1:0]   data_q;
  logic              wr_first;

  assign busy = (state != S_IDLE);

  always_comb begin
    m_req       = '0;
    m_req.valid = (state == S_READ) || (state == S_WRITE);
    m_req.we    = (state == S_WRITE);
    m_req.addr  = (state == S_WRITE) ? dst : src;
    m_req.wdata = wr_first ? m_rdata : data_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      src       <= '0;
      dst       <= '0;
      len       <= 16'd12;
      remaining <= '0;
      data_q    <= '0;
      wr_first  <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cfg_we) begin
            unique case (cfg_addr)
              2'd0: src <= cfg_wdata[BUS_AW-1:0];
              2'd2: len <= cfg_wdata[15:0];
              2'd1: begin
                dst <= cfg_wdata[BUS_AW-1:0];
                if (len != 16'd0) begin
                  remaining <= len;
                  state     <= S_READ;
                end
              end
              default: ;
            endcase
          end
        end
        S_READ: if (m_ready) begin
          state    <= S_WRITE;
          wr_first <= 1'b1;
        end
        S_WRITE: begin
          if (wr_first) data_q <= m_rdata;
          wr_first <= 1'b0;
          if (m_ready) begin
            src       <= src + 1'b1;
            dst       <= dst + 1'b1;
            remaining <= remaining - 16'd1;
            if (remaining == 16'd1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
