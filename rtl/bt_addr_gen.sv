// bt_addr_gen: address generator / decoder of the BT cache.
//
// Translates the position of one 8x8 block, given in block units relative to
// the top-left corner of the current search range (SR), into
//   * its cache index: {row parity, column parity} of the block, so that the
//     four blocks of any 2x2 group fall into four different indices;
//   * its tag: the MB-grid coordinate (rel_bx/2, rel_by/2) inside the SR;
//   * the absolute block coordinate in the reference frame, used to fetch
//     the block over the system bus on a miss.  The SR of the MB at
//     (mb_x, mb_y) starts SR_H pixels left of and SR_V pixels above that MB,
//     so it may start outside the frame (negative coordinates);
//   * the physical row address inside the index's data memory bank, from
//     the way that hit (or the victim way) and the row 0..7 in the block.
// Index and tag layout follow the document (Fig. 3 and the virtual
// addressing of Sec. 3.1); the bank address layout (way * 8 + row) is this
// design's choice.  Purely combinational.
module bt_addr_gen
  import bt_cache_pkg::*;
#(
  parameter int unsigned N_WAYS = 15,
  parameter int unsigned SR_H   = 64,
  parameter int unsigned SR_V   = 32,
  localparam int unsigned SRW_BLK = (2*SR_H + MB) / BLK,
  localparam int unsigned SRH_BLK = (2*SR_V + MB) / BLK,
  localparam int unsigned RBX_W   = $clog2(SRW_BLK),
  localparam int unsigned RBY_W   = $clog2(SRH_BLK),
  localparam int unsigned TX_W    = $clog2(SRW_BLK / 2),
  localparam int unsigned TY_W    = (SRH_BLK > 2) ? $clog2(SRH_BLK / 2) : 1,
  localparam int unsigned WAY_W   = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned BA_W    = $clog2(N_WAYS * BLK)
) (
  input  logic [RBX_W-1:0]        rel_bx,
  input  logic [RBY_W-1:0]        rel_by,
  input  logic [MBC_W-1:0]        mb_x,
  input  logic [MBC_W-1:0]        mb_y,
  input  logic [WAY_W-1:0]        way,
  input  logic [2:0]              row,
  output logic [1:0]              idx,
  output logic [TX_W-1:0]         tx,
  output logic [TY_W-1:0]         ty,
  output logic signed [ABS_W-1:0] abs_bx,
  output logic signed [ABS_W-1:0] abs_by,
  output logic [BA_W-1:0]         bank_addr
);

  localparam int SR_H_BLK = SR_H / BLK;
  localparam int SR_V_BLK = SR_V / BLK;

  always_comb begin
    idx       = {rel_by[0], rel_bx[0]};
    tx        = TX_W'(rel_bx >> 1);
    ty        = TY_W'(rel_by >> 1);
    abs_bx    = ABS_W'(signed'({1'b0, mb_x, 1'b0})) - ABS_W'(SR_H_BLK) + ABS_W'(rel_bx);
    abs_by    = ABS_W'(signed'({1'b0, mb_y, 1'b0})) - ABS_W'(SR_V_BLK) + ABS_W'(rel_by);
    bank_addr = BA_W'(way) * BA_W'(BLK) + BA_W'(row);
  end

endmodule
