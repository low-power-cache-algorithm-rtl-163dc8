// bt_tag_mem: cache tag memory of the BT cache, with the parallel tag compare.
//
// The cache holds N_IDX = 4 sets (one per block position inside a macroblock)
// of N_WAYS ways; N_WAYS is the cache capacity in macroblocks.  Every entry is
// a valid bit V and a tag T = (tx, ty): the MB-grid coordinate of the 8x8
// block relative to the top-left corner of the current search range (virtual
// addressing).  A lookup compares the requested tag with all ways of the
// selected set at once and returns the hit way; the four sets are looked up
// in parallel so that a 2x2 group of blocks is resolved in one cycle.
//
// When the search range slides one MB to the right (`shift`), every tag's x
// is decremented, and entries whose x would go negative are invalidated
// because they have left the search range.  `flush` clears every valid bit;
// ways whose power is gated off (`way_pwr` low) lose their contents and are
// invalidated as well.  One victim per set is offered by bt_victim_sel.
//
// Timing: lookups and victims are combinational from the registered tags;
// `shift`, `flush` and the write port act on the next clock edge, flush
// having priority over shift and shift over a write in the same cycle.
// The organisation, tag meaning, decrement and invalidation follow the
// document; priorities and reset values are this design's choices.
module bt_tag_mem
  import bt_cache_pkg::*;
#(
  parameter int unsigned N_WAYS = 15,
  parameter int unsigned TX_W   = 4,
  parameter int unsigned TY_W   = 3,
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N_WAYS-1:0]                 way_pwr,
  input  logic                              shift,
  input  logic                              flush,
  // parallel lookup, one request per set
  input  logic [N_IDX-1:0][TX_W-1:0]        lk_tx,
  input  logic [N_IDX-1:0][TY_W-1:0]        lk_ty,
  output logic [N_IDX-1:0]                  lk_hit,
  output logic [N_IDX-1:0][WAY_W-1:0]       lk_way,
  // tag write after a refill
  input  logic                              wr_en,
  input  logic [1:0]                        wr_idx,
  input  logic [WAY_W-1:0]                  wr_way,
  input  logic [TX_W-1:0]                   wr_tx,
  input  logic [TY_W-1:0]                   wr_ty,
  // replacement candidates
  output logic [N_IDX-1:0][WAY_W-1:0]       victim,
  output logic [N_IDX-1:0]                  victim_dirty,
  // number of valid entries (for statistics and tests)
  output logic [$clog2(N_IDX*N_WAYS+1)-1:0] valid_count
);

  logic [N_IDX-1:0][N_WAYS-1:0]           v_q;
  logic [N_IDX-1:0][N_WAYS-1:0][TX_W-1:0] tx_q;
  logic [N_IDX-1:0][N_WAYS-1:0][TY_W-1:0] ty_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q  <= '0;
      tx_q <= '0;
      ty_q <= '0;
    end else begin
      if (flush) begin
        v_q <= '0;
      end else if (shift) begin
        for (int unsigned s = 0; s < N_IDX; s++) begin
          for (int unsigned w = 0; w < N_WAYS; w++) begin
            tx_q[s][w] <= tx_q[s][w] - TX_W'(1);
            if (tx_q[s][w] == '0) v_q[s][w] <= 1'b0;
          end
        end
      end else if (wr_en) begin
        v_q [wr_idx][wr_way] <= 1'b1;
        tx_q[wr_idx][wr_way] <= wr_tx;
        ty_q[wr_idx][wr_way] <= wr_ty;
      end
      // gated ways lose their data
      for (int unsigned s = 0; s < N_IDX; s++) begin
        for (int unsigned w = 0; w < N_WAYS; w++) begin
          if (!way_pwr[w]) v_q[s][w] <= 1'b0;
        end
      end
    end
  end

  // parallel compare of all ways of each set
  always_comb begin
    for (int unsigned s = 0; s < N_IDX; s++) begin
      lk_hit[s] = 1'b0;
      lk_way[s] = '0;
      for (int unsigned w = 0; w < N_WAYS; w++) begin
        if (v_q[s][w] && way_pwr[w] && tx_q[s][w] == lk_tx[s] && ty_q[s][w] == lk_ty[s]
            && !lk_hit[s]) begin
          lk_hit[s] = 1'b1;
          lk_way[s] = WAY_W'(w);
        end
      end
    end
  end

  always_comb begin
    valid_count = '0;
    for (int unsigned s = 0; s < N_IDX; s++)
      for (int unsigned w = 0; w < N_WAYS; w++)
        valid_count += $bits(valid_count)'(v_q[s][w]);
  end

  for (genvar s = 0; s < N_IDX; s++) begin : g_victim
    bt_victim_sel #(.N_WAYS(N_WAYS), .TX_W(TX_W)) u_victim (
      .way_valid   (v_q[s]),
      .way_pwr     (way_pwr),
      .way_tx      (tx_q[s]),
      .victim      (victim[s]),
      .victim_dirty(victim_dirty[s])
    );
  end

endmodule
