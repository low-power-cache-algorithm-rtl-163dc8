// bt_cache_top: low power Block Translation (BT) cache for fast motion
// estimation, replacing the search-range (SR) memory of an H.264/AVC motion
// estimation (ME) engine.
//
// Instead of loading the whole search range for every macroblock (MB), the
// cache holds only the 8x8 blocks of reference pixels that the fast ME is
// expected to visit.  The STP prefetching engine requests the blocks along
// the predicted search trajectory of the MB; the cache controller looks them
// up in an n-way set associative tag memory (n = capacity in MBs) and fetches
// only missing blocks from the reference frame memory.  The ME logic then
// reads 2x2 groups of blocks from the four data banks in parallel.  With
// Cache Miss Hiding (CMH) on, a miss on the ME path is not fetched at all:
// the ME is told to stop and keep its best result.  Unused ways can be
// switched off (power gating).  The partition follows the published
// architecture: cache controller with tag memory, address generator and
// prefetching engine; cache data memory; the ME logic and the reference
// frame memory outside, on ports.
//
// Defaults: 15 ways (15 MBs of cache) and a (+-64, +-32) search range, the
// D1 setting; CIF uses 10 ways and (+-32, +-16), set by parameters, and the
// number of powered ways can also be lowered at run time through cfg_ways.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   * cfg_load/cfg_ways/cfg_cmh_en: number of powered ways, CMH on/off.
//   * mb_start with mb_x/mb_y and the neighbouring MVs nb_mv: a new MB.
//     The cache slides (or flushes) its SR, then prefetches.
//   * me_req_*: 2x2 block group reads of the ME logic; me_resp_* returns 8
//     rows of the four blocks (TL, TR, BL, BR), or one beat with
//     me_resp_miss set when CMH hid a miss.
//   * me_done/me_init_type/me_final_mv: end of the MB's search, used for the
//     search trajectory vector of the next MB.
//   * ref_*: block requests and 8 row beats from the reference frame memory.
// Timing of each path is given in bt_cache_ctrl and stp_prefetch.
module bt_cache_top
  import bt_cache_pkg::*;
#(
  parameter int unsigned N_WAYS = 15,
  parameter int unsigned SR_H   = 64,
  parameter int unsigned SR_V   = 32,
  localparam int unsigned SRW_BLK = (2*SR_H + MB) / BLK,
  localparam int unsigned SRH_BLK = (2*SR_V + MB) / BLK,
  localparam int unsigned RBX_W   = $clog2(SRW_BLK),
  localparam int unsigned RBY_W   = $clog2(SRH_BLK),
  localparam int unsigned BA_W    = $clog2(N_WAYS * BLK),
  localparam int unsigned WC_W    = $clog2(N_WAYS + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_load,
  input  logic [WC_W-1:0]         cfg_ways,
  input  logic                    cfg_cmh_en,
  output logic [N_WAYS-1:0]       way_pwr,
  input  logic                    mb_start,
  input  logic [MBC_W-1:0]        mb_x,
  input  logic [MBC_W-1:0]        mb_y,
  input  mv_t [2:0]               nb_mv,
  output mv_t [N_PRED-1:0]        pred,
  output mv_t [N_PRED-1:0]        stv,
  output logic                    pf_busy,
  input  logic                    me_req_valid,
  output logic                    me_req_ready,
  input  logic [RBX_W-1:0]        me_req_bx,
  input  logic [RBY_W-1:0]        me_req_by,
  output logic                    me_resp_valid,
  output logic                    me_resp_miss,
  output logic [2:0]              me_resp_row,
  output logic                    me_resp_last,
  output row_t [N_IDX-1:0]        me_resp_data,
  input  logic                    me_done,
  input  logic [2:0]              me_init_type,
  input  mv_t                     me_final_mv,
  output logic                    ref_req_valid,
  input  logic                    ref_req_ready,
  output logic signed [ABS_W-1:0] ref_req_bx,
  output logic signed [ABS_W-1:0] ref_req_by,
  input  logic                    ref_rdata_valid,
  input  row_t                    ref_rdata,
  output logic                    idle,
  output bt_stats_t               stats
);

  logic                       pf_start;
  logic                       pf_req_valid, pf_req_ready;
  logic [RBX_W-1:0]           pf_req_bx;
  logic [RBY_W-1:0]           pf_req_by;
  logic                       dm_wr_en, dm_rd_en;
  logic [1:0]                 dm_wr_idx;
  logic [BA_W-1:0]            dm_wr_addr;
  row_t                       dm_wr_data;
  logic [N_IDX-1:0][BA_W-1:0] dm_rd_addr;
  row_t [N_IDX-1:0]           dm_rd_data;

  bt_cache_ctrl #(.N_WAYS(N_WAYS), .SR_H(SR_H), .SR_V(SR_V)) u_ctrl (
    .clk, .rst_n,
    .cfg_load, .cfg_ways, .cfg_cmh_en, .way_pwr,
    .mb_start, .mb_x, .mb_y, .pf_start,
    .pf_req_valid, .pf_req_ready, .pf_req_bx, .pf_req_by,
    .me_req_valid, .me_req_ready, .me_req_bx, .me_req_by,
    .me_resp_valid, .me_resp_miss, .me_resp_row, .me_resp_last, .me_resp_data,
    .ref_req_valid, .ref_req_ready, .ref_req_bx, .ref_req_by,
    .ref_rdata_valid, .ref_rdata,
    .dm_wr_en, .dm_wr_idx, .dm_wr_addr, .dm_wr_data,
    .dm_rd_en, .dm_rd_addr, .dm_rd_data,
    .idle, .stats
  );

  stp_prefetch #(.SR_H(SR_H), .SR_V(SR_V)) u_pf (
    .clk, .rst_n,
    .start(pf_start), .nb_mv,
    .me_done, .me_init_type, .me_final_mv,
    .req_valid(pf_req_valid), .req_ready(pf_req_ready),
    .req_bx(pf_req_bx), .req_by(pf_req_by),
    .busy(pf_busy), .pred, .stv
  );

  bt_data_mem #(.N_WAYS(N_WAYS)) u_dm (
    .clk, .way_pwr,
    .wr_en(dm_wr_en), .wr_idx(dm_wr_idx), .wr_addr(dm_wr_addr), .wr_data(dm_wr_data),
    .rd_en(dm_rd_en), .rd_addr(dm_rd_addr), .rd_data(dm_rd_data)
  );

endmodule
