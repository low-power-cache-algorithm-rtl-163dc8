// bt_cache_ctrl: cache controller of the BT cache.
//
// The controller owns the tag memory, the address generators and the power
// gating control, and serves two data paths (document, Sec. 4, Fig. 7):
//   * the prefetching data path: single 8x8 block requests from the STP
//     prefetching engine.  A hit ends the request; a miss fetches the block
//     from the reference frame memory over the system bus and writes it into
//     the cache data memory and the tag memory;
//   * the ME data path: the ME logic reads a 2x2 group of 8x8 blocks, whose
//     top-left block is (bx, by) in SR block units.  The four blocks lie in
//     four different indices, so all four tags are compared in one cycle and
//     the four data banks are read in parallel, one row of each block per
//     cycle for 8 cycles.  If a block misses and Cache Miss Hiding (CMH) is
//     on, the request is answered at once with a miss and no memory access,
//     so the ME logic can stop the search and keep its best result so far;
//     with CMH off the missing blocks are fetched first, then read.
// Replacement takes, in the set of the missing block, a free powered way or
// else the block with the smallest x coordinate (bt_victim_sel).
//
// Macroblock changes: `mb_start` with the new MB position is held until the
// controller is idle.  If the new MB is the right neighbour of the previous
// one the search range slid by one MB, so all tags' x are decremented and
// the blocks that left the SR are invalidated; otherwise (new MB row, first
// MB) the tags are flushed.  Then `pf_start` starts the prefetching engine.
//
// Timing: requests are accepted (valid/ready) only when idle, one at a time;
// ME requests have priority over prefetch requests.  The tag lookup is done
// in the cycle after acceptance.  Counting clock edges from the one that
// accepts an ME request, a hit group's row 0 is sampled at edge 3 and rows
// 1..7 at the following edges (`me_resp_last` on row 7); a CMH miss is
// sampled at edge 2 (one beat, `me_resp_miss` and `me_resp_last` set).  A refill issues one bus
// request and then writes each of the 8 rows as it arrives on
// `ref_rdata_valid`.  The data path split, tag compare, virtual-address
// update, replacement rule and CMH are the document's; the handshakes,
// priorities, latencies, the shift-or-flush rule and the counters are this
// design's choices.
module bt_cache_ctrl
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
  localparam int unsigned BA_W    = $clog2(N_WAYS * BLK),
  localparam int unsigned WC_W    = $clog2(N_WAYS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration
  input  logic                       cfg_load,
  input  logic [WC_W-1:0]            cfg_ways,
  input  logic                       cfg_cmh_en,
  output logic [N_WAYS-1:0]          way_pwr,
  // macroblock sequencing
  input  logic                       mb_start,
  input  logic [MBC_W-1:0]           mb_x,
  input  logic [MBC_W-1:0]           mb_y,
  output logic                       pf_start,
  // prefetching data path
  input  logic                       pf_req_valid,
  output logic                       pf_req_ready,
  input  logic [RBX_W-1:0]           pf_req_bx,
  input  logic [RBY_W-1:0]           pf_req_by,
  // ME data path
  input  logic                       me_req_valid,
  output logic                       me_req_ready,
  input  logic [RBX_W-1:0]           me_req_bx,
  input  logic [RBY_W-1:0]           me_req_by,
  output logic                       me_resp_valid,
  output logic                       me_resp_miss,
  output logic [2:0]                 me_resp_row,
  output logic                       me_resp_last,
  output row_t [N_IDX-1:0]           me_resp_data,
  // system bus to the reference frame memory
  output logic                       ref_req_valid,
  input  logic                       ref_req_ready,
  output logic signed [ABS_W-1:0]    ref_req_bx,
  output logic signed [ABS_W-1:0]    ref_req_by,
  input  logic                       ref_rdata_valid,
  input  row_t                       ref_rdata,
  // cache data memory
  output logic                       dm_wr_en,
  output logic [1:0]                 dm_wr_idx,
  output logic [BA_W-1:0]            dm_wr_addr,
  output row_t                       dm_wr_data,
  output logic                       dm_rd_en,
  output logic [N_IDX-1:0][BA_W-1:0] dm_rd_addr,
  input  row_t [N_IDX-1:0]           dm_rd_data,
  // status
  output logic                       idle,
  output bt_stats_t                  stats
);

  typedef enum logic [2:0] {
    S_IDLE, S_PF_LOOK, S_ME_LOOK, S_ME_READ, S_REF_REQ, S_REF_DATA
  } state_e;

  state_e            state_q;
  logic              ret_me_q;       // refill returns to the ME lookup
  logic              mb_pend_q;
  logic [MBC_W-1:0]  mb_x_q, mb_y_q, cur_x_q, cur_y_q;
  logic              cur_ok_q;       // cur_x_q/cur_y_q hold a started MB
  logic [RBX_W-1:0]  rq_bx_q;
  logic [RBY_W-1:0]  rq_by_q;
  logic [2:0]        row_q;
  logic [RBX_W-1:0]  rf_bx_q;
  logic [RBY_W-1:0]  rf_by_q;
  logic [WAY_W-1:0]  rf_way_q;
  logic [2:0]        rf_row_q;

  // ---------------------------------------------------------------- power
  bt_power_ctrl #(.N_WAYS(N_WAYS)) u_pwr (
    .clk, .rst_n, .cfg_load, .cfg_ways, .way_pwr, .ways_active()
  );

  // ------------------------------------------------ addresses of the group
  logic [N_IDX-1:0][RBX_W-1:0]        pos_bx;
  logic [N_IDX-1:0][RBY_W-1:0]        pos_by;
  logic [N_IDX-1:0][1:0]              pos_idx;
  logic [N_IDX-1:0][TX_W-1:0]         pos_tx;
  logic [N_IDX-1:0][TY_W-1:0]         pos_ty;
  logic [N_IDX-1:0][WAY_W-1:0]        pos_way;
  logic [N_IDX-1:0][BA_W-1:0]         pos_addr;
  logic [N_IDX-1:0]                   pos_hit;

  logic [N_IDX-1:0][TX_W-1:0]         lk_tx;
  logic [N_IDX-1:0][TY_W-1:0]         lk_ty;
  logic [N_IDX-1:0]                   lk_hit;
  logic [N_IDX-1:0][WAY_W-1:0]        lk_way;
  logic [N_IDX-1:0][WAY_W-1:0]        victim;
  logic [N_IDX-1:0]                   victim_dirty;

  always_comb begin
    pos_bx[POS_TL] = rq_bx_q;          pos_by[POS_TL] = rq_by_q;
    pos_bx[POS_TR] = rq_bx_q + 1'b1;   pos_by[POS_TR] = rq_by_q;
    pos_bx[POS_BL] = rq_bx_q;          pos_by[POS_BL] = rq_by_q + 1'b1;
    pos_bx[POS_BR] = rq_bx_q + 1'b1;   pos_by[POS_BR] = rq_by_q + 1'b1;
  end

  for (genvar p = 0; p < N_IDX; p++) begin : g_pos
    assign pos_way[p] = lk_way[pos_idx[p]];
    assign pos_hit[p] = lk_hit[pos_idx[p]];
    bt_addr_gen #(.N_WAYS(N_WAYS), .SR_H(SR_H), .SR_V(SR_V)) u_ag (
      .rel_bx(pos_bx[p]), .rel_by(pos_by[p]), .mb_x(cur_x_q), .mb_y(cur_y_q),
      .way(pos_way[p]), .row(row_q),
      .idx(pos_idx[p]), .tx(pos_tx[p]), .ty(pos_ty[p]),
      .abs_bx(), .abs_by(), .bank_addr(pos_addr[p])
    );
  end

  // the block being refilled
  logic [1:0]      rf_idx;
  logic [TX_W-1:0] rf_tx;
  logic [TY_W-1:0] rf_ty;
  logic [BA_W-1:0] rf_addr;
  bt_addr_gen #(.N_WAYS(N_WAYS), .SR_H(SR_H), .SR_V(SR_V)) u_ag_rf (
    .rel_bx(rf_bx_q), .rel_by(rf_by_q), .mb_x(cur_x_q), .mb_y(cur_y_q),
    .way(rf_way_q), .row(rf_row_q),
    .idx(rf_idx), .tx(rf_tx), .ty(rf_ty),
    .abs_bx(ref_req_bx), .abs_by(ref_req_by), .bank_addr(rf_addr)
  );

  // route each position's tag to the set of its index; a prefetch lookup
  // uses the top-left position only
  always_comb begin
    lk_tx = '0;
    lk_ty = '0;
    for (int unsigned p = 0; p < N_IDX; p++) begin
      if (p == 0 || state_q != S_PF_LOOK) begin
        lk_tx[pos_idx[p]] = pos_tx[p];
        lk_ty[pos_idx[p]] = pos_ty[p];
      end
    end
  end

  // ------------------------------------------------------------ tag memory
  logic shift, flush, tag_wr;
  logic next_is_right;

  assign next_is_right = cur_ok_q && (mb_y_q == cur_y_q) && (mb_x_q == cur_x_q + 1'b1);
  assign shift  = (state_q == S_IDLE) && mb_pend_q && next_is_right;
  assign flush  = (state_q == S_IDLE) && mb_pend_q && !next_is_right;
  assign tag_wr = (state_q == S_REF_DATA) && ref_rdata_valid && (rf_row_q == 3'd7);

  bt_tag_mem #(.N_WAYS(N_WAYS), .TX_W(TX_W), .TY_W(TY_W)) u_tag (
    .clk, .rst_n, .way_pwr, .shift, .flush,
    .lk_tx, .lk_ty, .lk_hit, .lk_way,
    .wr_en(tag_wr), .wr_idx(rf_idx), .wr_way(rf_way_q), .wr_tx(rf_tx), .wr_ty(rf_ty),
    .victim, .victim_dirty, .valid_count()
  );

  // ----------------------------------------------------- handshake outputs
  assign idle          = (state_q == S_IDLE) && !mb_pend_q;
  assign me_req_ready  = idle;
  assign pf_req_ready  = idle && !me_req_valid;
  assign ref_req_valid = (state_q == S_REF_REQ);

  // first missing position of the ME group
  logic [1:0] miss_pos;
  always_comb begin
    miss_pos = '0;
    for (int p = N_IDX - 1; p >= 0; p--)
      if (!pos_hit[p]) miss_pos = 2'(p);
  end

  // data memory ports
  assign dm_wr_en   = (state_q == S_REF_DATA) && ref_rdata_valid;
  assign dm_wr_idx  = rf_idx;
  assign dm_wr_addr = rf_addr;
  assign dm_wr_data = ref_rdata;
  assign dm_rd_en   = (state_q == S_ME_READ);
  always_comb begin
    dm_rd_addr = '0;
    for (int unsigned p = 0; p < N_IDX; p++) dm_rd_addr[pos_idx[p]] = pos_addr[p];
  end

  // read response pipeline: data arrive one cycle after the read
  logic                  rd_q;
  logic [2:0]            rd_row_q;
  logic [N_IDX-1:0][1:0] rd_map_q;
  logic                  cmh_q;

  assign me_resp_valid = rd_q || cmh_q;
  assign me_resp_miss  = cmh_q;
  assign me_resp_row   = rd_row_q;
  assign me_resp_last  = cmh_q || (rd_q && rd_row_q == 3'd7);
  always_comb begin
    for (int unsigned p = 0; p < N_IDX; p++)
      me_resp_data[p] = rd_q ? dm_rd_data[rd_map_q[p]] : '0;
  end

  // ------------------------------------------------------------------ FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      ret_me_q  <= 1'b0;
      mb_pend_q <= 1'b0;
      mb_x_q    <= '0;  mb_y_q  <= '0;
      cur_x_q   <= '0;  cur_y_q <= '0;
      cur_ok_q  <= 1'b0;
      rq_bx_q   <= '0;  rq_by_q <= '0;
      row_q     <= '0;
      rf_bx_q   <= '0;  rf_by_q <= '0;
      rf_way_q  <= '0;  rf_row_q <= '0;
      rd_q      <= 1'b0; rd_row_q <= '0; rd_map_q <= '0;
      cmh_q     <= 1'b0;
      pf_start  <= 1'b0;
      stats     <= '0;
    end else begin
      pf_start <= 1'b0;
      cmh_q    <= 1'b0;
      rd_q     <= 1'b0;
      if (mb_start) begin
        mb_pend_q <= 1'b1;
        mb_x_q    <= mb_x;
        mb_y_q    <= mb_y;
      end
      unique case (state_q)
        S_IDLE: begin
          if (mb_pend_q) begin
            if (!mb_start) mb_pend_q <= 1'b0;
            cur_x_q  <= mb_x_q;
            cur_y_q  <= mb_y_q;
            cur_ok_q <= 1'b1;
            pf_start <= 1'b1;
            if (next_is_right) stats.shift <= stats.shift + 1;
            else               stats.flush <= stats.flush + 1;
          end else if (me_req_valid) begin
            rq_bx_q <= me_req_bx;
            rq_by_q <= me_req_by;
            stats.me_req <= stats.me_req + 1;
            state_q <= S_ME_LOOK;
          end else if (pf_req_valid) begin
            rq_bx_q <= pf_req_bx;
            rq_by_q <= pf_req_by;
            stats.pf_req <= stats.pf_req + 1;
            state_q <= S_PF_LOOK;
          end
        end
        S_PF_LOOK: begin
          if (pos_hit[POS_TL]) begin
            state_q <= S_IDLE;
          end else begin
            stats.pf_miss <= stats.pf_miss + 1;
            rf_bx_q  <= pos_bx[POS_TL];
            rf_by_q  <= pos_by[POS_TL];
            rf_way_q <= victim[pos_idx[POS_TL]];
            if (victim_dirty[pos_idx[POS_TL]]) stats.evict <= stats.evict + 1;
            ret_me_q <= 1'b0;
            state_q  <= S_REF_REQ;
          end
        end
        S_ME_LOOK: begin
          if (&pos_hit) begin
            row_q   <= '0;
            state_q <= S_ME_READ;
          end else if (cmh_applies(cfg_cmh_en, ret_me_q)) begin
            stats.me_miss  <= stats.me_miss + 1;
            stats.cmh_term <= stats.cmh_term + 1;
            cmh_q   <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            if (!ret_me_q) stats.me_miss <= stats.me_miss + 1;
            rf_bx_q  <= pos_bx[miss_pos];
            rf_by_q  <= pos_by[miss_pos];
            rf_way_q <= victim[pos_idx[miss_pos]];
            if (victim_dirty[pos_idx[miss_pos]]) stats.evict <= stats.evict + 1;
            ret_me_q <= 1'b1;
            state_q  <= S_REF_REQ;
          end
        end
        S_ME_READ: begin
          rd_q     <= 1'b1;
          rd_row_q <= row_q;
          for (int unsigned p = 0; p < N_IDX; p++) rd_map_q[p] <= pos_idx[p];
          row_q    <= row_q + 1'b1;
          if (row_q == 3'd7) begin
            ret_me_q <= 1'b0;
            state_q  <= S_IDLE;
          end
        end
        S_REF_REQ: begin
          if (ref_req_ready) begin
            rf_row_q <= '0;
            state_q  <= S_REF_DATA;
          end
        end
        S_REF_DATA: begin
          if (ref_rdata_valid) begin
            rf_row_q <= rf_row_q + 1'b1;
            if (rf_row_q == 3'd7) begin
              stats.refill <= stats.refill + 1;
              state_q <= ret_me_q ? S_ME_LOOK : S_IDLE;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // CMH applies to the first lookup of an ME request only; a request that
  // is already being refilled (CMH switched on meanwhile) completes.
  function automatic logic cmh_applies(logic en, logic refilling);
    return en && !refilling;
  endfunction

  // ------------------------------------------------------------ assertions
  a_me_in_sr: assert property (@(posedge clk) disable iff (!rst_n)
    me_req_valid && me_req_ready |->
      (32'(me_req_bx) <= SRW_BLK - 2) && (32'(me_req_by) <= SRH_BLK - 2));
  a_pf_in_sr: assert property (@(posedge clk) disable iff (!rst_n)
    pf_req_valid && pf_req_ready |->
      (32'(pf_req_bx) < SRW_BLK) && (32'(pf_req_by) < SRH_BLK));
  a_ref_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ref_req_valid && !ref_req_ready |=> ref_req_valid && $stable(ref_req_bx) && $stable(ref_req_by));

endmodule
