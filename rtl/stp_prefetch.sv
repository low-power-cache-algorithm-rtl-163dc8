// stp_prefetch: Search Trajectory Prediction (STP) prefetching engine.
//
// Fast ME (here a four-step search) starts at an MV predictor and walks to
// its final MV; the straight line from start to end is the search
// trajectory (ST) vector.  The ST vectors of neighbouring macroblocks are
// very similar, so the ST of the current MB from predictor P is predicted by
// the ST vector the previous MB had from the predictor of the same kind
// (document, Sec. 3.2, Fig. 5, Fig. 6(a)).
//
// Operation, per macroblock:
//   * `start` latches the six predictors formed by mv_pred_gen from the
//     neighbouring MVs `nb_mv`.
//   * For each predictor P in pred_type_e order, with ST vector S stored for
//     that kind, the engine takes the 16x16 candidates at P and at P + S
//     (both clamped into the search range), forms the smallest rectangle of
//     8x8 blocks that covers both, and requests every block of it, row by
//     row, on the `req_*` valid/ready port (block coordinates relative to
//     the SR's top-left corner).  Blocks already cached simply hit in the
//     cache controller.
//   * When the ME of the MB ends (`me_done`), it reports which predictor
//     kind it started from and its final MV; the engine stores
//     final MV - predictor as the new ST vector of that kind (the STV
//     calculation of Fig. 7).  Kinds that were not used keep their vector.
// The prediction rule and the 8x8-block granularity are the document's; the
// exact region (bounding box of the two candidates), the request order, the
// sticky vectors of unused kinds and the zero reset are this design's.
//
// Timing: one cycle per predictor to compute its region, then one request
// per cycle while `req_ready` is high.  `busy` is high from `start` until
// the last request of the last predictor has been accepted.
module stp_prefetch
  import bt_cache_pkg::*;
#(
  parameter int unsigned SR_H = 64,
  parameter int unsigned SR_V = 32,
  localparam int unsigned SRW_BLK = (2*SR_H + MB) / BLK,
  localparam int unsigned SRH_BLK = (2*SR_V + MB) / BLK,
  localparam int unsigned RBX_W   = $clog2(SRW_BLK),
  localparam int unsigned RBY_W   = $clog2(SRH_BLK)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  mv_t [2:0]        nb_mv,
  // ST vector update at the end of the MB's ME
  input  logic             me_done,
  input  logic [2:0]       me_init_type,
  input  mv_t              me_final_mv,
  // block requests to the cache controller
  output logic             req_valid,
  input  logic             req_ready,
  output logic [RBX_W-1:0] req_bx,
  output logic [RBY_W-1:0] req_by,
  output logic             busy,
  // predictors of the current MB and stored ST vectors
  output mv_t [N_PRED-1:0] pred,
  output mv_t [N_PRED-1:0] stv
);

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_ISSUE} state_e;

  state_e           state_q;
  mv_t [N_PRED-1:0] pred_new;
  logic [2:0]       k_q;
  logic [RBX_W-1:0] bx_lo_q, bx_hi_q, bx_q;
  logic [RBY_W-1:0] by_hi_q, by_q;

  mv_pred_gen u_pred (.nb_mv(nb_mv), .pred(pred_new));

  // clamp one MV component to the search range, return the candidate's
  // top-left pixel inside the SR
  function automatic int unsigned pix_pos(int v, int unsigned sr);
    int c;
    c = v;
    if (c < -int'(sr)) c = -int'(sr);
    if (c >  int'(sr)) c =  int'(sr);
    return $unsigned(c + int'(sr));
  endfunction

  int unsigned px, ex, py, ey;
  logic [RBX_W-1:0] lo_x, hi_x;
  logic [RBY_W-1:0] lo_y, hi_y;

  always_comb begin
    px = pix_pos(int'(pred[k_q].x), SR_H);
    py = pix_pos(int'(pred[k_q].y), SR_V);
    ex = pix_pos(int'(pred[k_q].x) + int'(stv[k_q].x), SR_H);
    ey = pix_pos(int'(pred[k_q].y) + int'(stv[k_q].y), SR_V);
    lo_x = RBX_W'(((px < ex) ? px : ex) / BLK);
    hi_x = RBX_W'((((px > ex) ? px : ex) + MB - 1) / BLK);
    lo_y = RBY_W'(((py < ey) ? py : ey) / BLK);
    hi_y = RBY_W'((((py > ey) ? py : ey) + MB - 1) / BLK);
  end

  assign req_valid = (state_q == S_ISSUE);
  assign req_bx    = bx_q;
  assign req_by    = by_q;
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      k_q     <= '0;
      pred    <= '0;
      stv     <= '0;
      bx_lo_q <= '0; bx_hi_q <= '0; bx_q <= '0;
      by_hi_q <= '0; by_q <= '0;
    end else begin
      if (me_done && me_init_type < 3'(N_PRED)) begin
        stv[me_init_type].x <= me_final_mv.x - pred[me_init_type].x;
        stv[me_init_type].y <= me_final_mv.y - pred[me_init_type].y;
      end
      if (start) begin
        pred    <= pred_new;
        k_q     <= '0;
        state_q <= S_CALC;
      end else begin
        unique case (state_q)
          S_IDLE: ;
          S_CALC: begin
            bx_lo_q <= lo_x;  bx_hi_q <= hi_x;  bx_q <= lo_x;
            by_hi_q <= hi_y;  by_q <= lo_y;
            state_q <= S_ISSUE;
          end
          S_ISSUE: if (req_ready) begin
            if (bx_q != bx_hi_q) begin
              bx_q <= bx_q + 1'b1;
            end else if (by_q != by_hi_q) begin
              bx_q <= bx_lo_q;
              by_q <= by_q + 1'b1;
            end else if (k_q != 3'(N_PRED - 1)) begin
              k_q     <= k_q + 1'b1;
              state_q <= S_CALC;
            end else begin
              state_q <= S_IDLE;
            end
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

endmodule
