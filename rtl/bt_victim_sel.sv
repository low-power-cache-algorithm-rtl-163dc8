// bt_victim_sel: replacement choice for one set (one cache index) of the BT cache.
//
// Because macroblocks are coded in raster order and the search range slides
// right by one MB per MB, the block with the smallest x coordinate is the one
// least likely to be used again, so it is replaced first (this rule is the
// document's).  Before any valid block is evicted an empty way is used, and
// only powered ways are candidates (both are this design's choices).  Ties
// go to the lowest way number.
//
// Interface: purely combinational.  `way_valid`, `way_pwr` and `way_tx` are
// the valid bit, power enable and tag x coordinate of every way of the set;
// `victim` is the chosen way and `victim_dirty` is 1 when it holds a valid
// block that will be overwritten.
module bt_victim_sel #(
  parameter int unsigned N_WAYS = 15,
  parameter int unsigned TX_W   = 4,
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic [N_WAYS-1:0]           way_valid,
  input  logic [N_WAYS-1:0]           way_pwr,
  input  logic [N_WAYS-1:0][TX_W-1:0] way_tx,
  output logic [WAY_W-1:0]            victim,
  output logic                        victim_dirty
);

  logic            found_free;
  logic [WAY_W-1:0] free_way;
  logic            found_used;
  logic [WAY_W-1:0] min_way;
  logic [TX_W-1:0] min_tx;

  always_comb begin
    found_free = 1'b0;
    free_way   = '0;
    found_used = 1'b0;
    min_way    = '0;
    min_tx     = '1;
    for (int unsigned w = 0; w < N_WAYS; w++) begin
      if (way_pwr[w]) begin
        if (!way_valid[w]) begin
          if (!found_free) begin
            found_free = 1'b1;
            free_way   = WAY_W'(w);
          end
        end else if (!found_used || (way_tx[w] < min_tx)) begin
          found_used = 1'b1;
          min_tx     = way_tx[w];
          min_way    = WAY_W'(w);
        end
      end
    end
    if (found_free) begin
      victim       = free_way;
      victim_dirty = 1'b0;
    end else begin
      victim       = min_way;
      victim_dirty = found_used;
    end
  end

endmodule
