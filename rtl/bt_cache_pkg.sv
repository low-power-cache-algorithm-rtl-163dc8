// bt_cache_pkg: shared constants and types of the Block Translation (BT) cache
// for fast motion estimation.
//
// The cache stores search-range (SR) pixels in 8x8 blocks.  Every 8x8 block
// has an index (0..3) given by its position inside the 16x16 macroblock (MB)
// grid: index = {block row parity, block column parity}, so that any 2x2
// group of neighbouring blocks holds one block of each index and can be read
// in parallel.  The tag of a block is its MB-grid coordinate (x, y) relative
// to the top-left corner of the current search range.  Block, MB and pixel
// sizes are fixed by the H.264/AVC macroblock structure; all other sizes are
// module parameters.
package bt_cache_pkg;

  localparam int unsigned PIX_W   = 8;          // luma sample width
  localparam int unsigned BLK     = 8;          // cache block is BLK x BLK pixels
  localparam int unsigned MB      = 16;         // macroblock edge in pixels
  localparam int unsigned ROW_W   = BLK * PIX_W; // one block row, 64 bits
  localparam int unsigned N_IDX   = 4;          // cache indices (blocks per MB)
  localparam int unsigned MV_W    = 9;          // signed MV / STV component width
  localparam int unsigned ABS_W   = 10;         // signed absolute block coordinate
  localparam int unsigned MBC_W   = 7;          // MB column / row number in frame
  localparam int unsigned N_PRED  = 6;          // MV predictor types (Fig. 5 set)

  typedef logic [ROW_W-1:0] row_t;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // Order of the MV predictor types held by the prefetching engine.
  typedef enum logic [2:0] {
    PRED_MINX_MINY = 3'd0,
    PRED_MAXX_MINY = 3'd1,
    PRED_MED       = 3'd2,
    PRED_MINX_MAXY = 3'd3,
    PRED_MAXX_MAXY = 3'd4,
    PRED_ORIGIN    = 3'd5
  } pred_type_e;

  // Position of a block inside a 2x2 group read by the ME data path.
  typedef enum logic [1:0] {
    POS_TL = 2'd0, POS_TR = 2'd1, POS_BL = 2'd2, POS_BR = 2'd3
  } grp_pos_e;

  // Event counters of the cache controller.  `refill` counts 8x8 blocks
  // written into the cache: the cache writing bandwidth.
  typedef struct packed {
    logic [31:0] pf_req;    // prefetch lookups
    logic [31:0] pf_miss;   // prefetch lookups that missed
    logic [31:0] me_req;    // ME group reads
    logic [31:0] me_miss;   // ME group reads with at least one missing block
    logic [31:0] cmh_term;  // ME reads answered with a miss (CMH)
    logic [31:0] refill;    // blocks fetched from the reference frame
    logic [31:0] evict;     // refills that replaced a valid block
    logic [31:0] shift;     // SR slid one MB to the right
    logic [31:0] flush;     // SR restarted (new MB row or jump)
  } bt_stats_t;

endpackage
