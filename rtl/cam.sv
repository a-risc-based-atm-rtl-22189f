// cam: content addressable memory of active connections (reassembly unit).
//
// Each of DEPTH entries holds a connection identifier (the VC, i.e. VPI and
// VCI, for AAL5, or the VCI and MID for AAL3/4) together with the two
// pointers of that connection's linked list in the cell reassembly buffer:
// the Start-address (head) and the End-address (tail, the location of the
// last node's pointer word). An identifier of zero marks a blank entry.
//
// Operations, selected by `op` while `valid` is high:
//   CAM_RD_START / CAM_RD_END : search for `key`; on a hit `match` is 1 and
//                               `rdata` is the entry's Start or End address.
//   CAM_INSERT                : write `key` into the first blank entry with
//                               both pointers cleared.
//   CAM_WR_START / CAM_WR_END : search for `key`; on a hit write `wdata` as
//                               the entry's Start or End address.
// The search is fully parallel and combinational, so `match` and `rdata` are
// valid in the same cycle as the request; writes take effect at the clock
// edge. These operations and the blank-entry rule follow the design. Its
// number of entries is not given: 64 is assumed. Entries are not removed,
// as in the design. A write-start/end without a hit, or an insert into a full
// CAM, changes nothing.
module cam
  import atm_ni_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned KW    = 32,
  parameter int unsigned VW    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  cam_op_e       op,
  input  logic [KW-1:0] key,
  input  logic [VW-1:0] wdata,
  output logic          match,
  output logic [VW-1:0] rdata,
  output logic          full
);

  logic [KW-1:0] keys   [DEPTH];
  logic [VW-1:0] starts [DEPTH];
  logic [VW-1:0] ends   [DEPTH];

  logic [$clog2(DEPTH)-1:0] hit_idx, free_idx;
  logic                     free_found;

  always_comb begin
    match   = 1'b0;
    hit_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (keys[i] == key && key != '0) begin
        match   = 1'b1;
        hit_idx = i[$clog2(DEPTH)-1:0];
      end
    end
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (keys[i] == '0) begin
        free_found = 1'b1;
        free_idx   = i[$clog2(DEPTH)-1:0];
      end
    end
    rdata = (op == CAM_RD_START) ? starts[hit_idx] : ends[hit_idx];
    if (!match) rdata = '0;
  end

  assign full = !free_found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        keys[i]   <= '0;
        starts[i] <= '0;
        ends[i]   <= '0;
      end
    end else if (valid) begin
      unique case (op)
        CAM_INSERT: if (free_found && key != '0) begin
          keys[free_idx]   <= key;
          starts[free_idx] <= '0;
          ends[free_idx]   <= '0;
        end
        CAM_WR_START: if (match) starts[hit_idx] <= wdata;
        CAM_WR_END:   if (match) ends[hit_idx]   <= wdata;
        default: ;
      endcase
    end
  end

endmodule
