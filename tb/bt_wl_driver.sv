// bt_wl_driver: one BT cache with its reference frame memory model and a
// motion estimation model, driven through a fixed synthetic sequence.
// Used by tb_bt_cache_workload to run the same motion through several cache
// configurations.
//
// Sequence: ROWS MB rows of COLS MBs each.  The target motion of MB (x, y)
// is a deterministic function of (x, y): a slowly varying pan plus a jump
// every seventh MB, scaled to the search range.  For each MB the model
// starts the MB, waits for prefetching, then walks from the predictor
// closest to the target towards it in steps of at most 4 pixels (about
// the search-point count of a four-step search), reading each 16x16
// candidate as 2x2 block groups and checking every pixel.  A CMH miss ends
// the walk.  `done` rises at the end; the counters are then final.
module bt_wl_driver
  import bt_cache_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int N_WAYS = 15,
  parameter int SR_H   = 64,
  parameter int SR_V   = 32,
  parameter bit CMH    = 1'b0,
  parameter int COLS   = 20,
  parameter int ROWS   = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   n_mb,
  output int   refills,
  output int   cmh_terms,
  output int   checks,
  output int   failures
);
  localparam int WC_W = $clog2(N_WAYS + 1);
  localparam int GX_MAX = (2 * SR_H + 16) / 8 - 2;
  localparam int GY_MAX = (2 * SR_V + 16) / 8 - 2;
  localparam int RBX_W = $clog2((2 * SR_H + 16) / 8);
  localparam int RBY_W = $clog2((2 * SR_V + 16) / 8);

  logic cfg_load; logic [WC_W-1:0] cfg_ways; logic [N_WAYS-1:0] way_pwr;
  logic mb_start; logic [6:0] mb_x, mb_y;
  mv_t [2:0] nb; mv_t [N_PRED-1:0] pred, stv;
  logic pf_busy;
  logic me_valid, me_ready; logic [RBX_W-1:0] me_bx; logic [RBY_W-1:0] me_by;
  logic resp_valid, resp_miss, resp_last; logic [2:0] resp_row; row_t [3:0] resp_data;
  logic me_done; logic [2:0] me_type; mv_t final_mv;
  logic ref_valid, ref_ready, ref_dv; logic signed [ABS_W-1:0] ref_bx, ref_by; row_t ref_data;
  logic idle; bt_stats_t st; int n_ref;
  int cur_mx, cur_my;

  bt_cache_top #(.N_WAYS(N_WAYS), .SR_H(SR_H), .SR_V(SR_V)) dut (
    .clk, .rst_n, .cfg_load, .cfg_ways, .cfg_cmh_en(CMH), .way_pwr,
    .mb_start, .mb_x, .mb_y, .nb_mv(nb), .pred, .stv, .pf_busy,
    .me_req_valid(me_valid), .me_req_ready(me_ready), .me_req_bx(me_bx), .me_req_by(me_by),
    .me_resp_valid(resp_valid), .me_resp_miss(resp_miss), .me_resp_row(resp_row),
    .me_resp_last(resp_last), .me_resp_data(resp_data),
    .me_done, .me_init_type(me_type), .me_final_mv(final_mv),
    .ref_req_valid(ref_valid), .ref_req_ready(ref_ready), .ref_req_bx(ref_bx), .ref_req_by(ref_by),
    .ref_rdata_valid(ref_dv), .ref_rdata(ref_data), .idle, .stats(st));

  ref_frame_mem_model #(.LAT(6), .GAPS(1'b0)) u_ref (.clk, .rst_n, .req_valid(ref_valid),
    .req_ready(ref_ready), .req_bx(ref_bx), .req_by(ref_by), .rdata_valid(ref_dv),
    .rdata(ref_data), .n_req(n_ref));

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic int absi(int v); return v < 0 ? -v : v; endfunction
  function automatic int mn3(int a, int b, int c); int m; m = a < b ? a : b; return c < m ? c : m; endfunction
  function automatic int mx3(int a, int b, int c); int m; m = a > b ? a : b; return c > m ? c : m; endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d ways, SR %0d/%0d, CMH %0d] %s", N_WAYS, SR_H, SR_V, CMH, what); end
  endtask

  task automatic read_group(int gx, int gy, output bit miss);
    @(negedge clk);
    me_bx = RBX_W'(gx); me_by = RBY_W'(gy); me_valid = 1;
    do @(posedge clk); while (!me_ready);
    #1 me_valid = 0;
    miss = 0;
    forever begin
      @(posedge clk);
      if (resp_valid) begin
        if (resp_miss) begin miss = 1; break; end
        for (int p = 0; p < 4; p++)
          chk(resp_data[p] == ref_row(2 * cur_mx - SR_H / 8 + gx + (p % 2),
                                      2 * cur_my - SR_V / 8 + gy + (p / 2), int'(resp_row)), "pixel data");
        if (resp_last) break;
      end
    end
  endtask

  task automatic read_candidate(int mx, int my, output bit miss);
    int px, py, gx[2], gy[2], nx, ny;
    px = mx + SR_H; py = my + SR_V;
    nx = (px % 8 != 0) ? 2 : 1; ny = (py % 8 != 0) ? 2 : 1;
    gx[0] = clampi(px / 8, 0, GX_MAX); gx[1] = clampi(px / 8 + 1, 0, GX_MAX);
    gy[0] = clampi(py / 8, 0, GY_MAX); gy[1] = clampi(py / 8 + 1, 0, GY_MAX);
    miss = 0;
    for (int j = 0; j < ny && !miss; j++)
      for (int i = 0; i < nx && !miss; i++) read_group(gx[i], gy[j], miss);
  endtask

  int left_x, left_y;

  initial begin
    cfg_load = 0; cfg_ways = WC_W'(N_WAYS); mb_start = 0; mb_x = 0; mb_y = 0; nb = '0;
    me_valid = 0; me_bx = 0; me_by = 0; me_done = 0; me_type = 0; final_mv = '0;
    done = 0; n_mb = 0; refills = 0; cmh_terms = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    for (int y = 0; y < ROWS; y++) begin
      left_x = 0; left_y = 0;
      for (int x = 0; x < COLS; x++) begin
        int ax[3], ay[3], px[N_PRED], py[N_PRED], lx, hx, ly, hy, tx, ty, best, bd, cx, cy, steps;
        bit miss;
        // target motion: pan that drifts with x, jump every 7th MB
        tx = ((x * 3) % 11) - 5 + y * 2;
        ty = ((x * 5) % 7) - 3;
        if ((x + y) % 7 == 6) begin tx = tx + SR_H / 2; ty = ty - SR_V / 2; end
        tx = clampi(tx, -SR_H, SR_H); ty = clampi(ty, -SR_V, SR_V);
        ax = '{left_x, left_x + 1, left_x - 2};
        ay = '{left_y, left_y - 1, left_y + 1};
        for (int i = 0; i < 3; i++) begin nb[i].x = MV_W'(ax[i]); nb[i].y = MV_W'(ay[i]); end
        lx = mn3(ax[0], ax[1], ax[2]); hx = mx3(ax[0], ax[1], ax[2]);
        ly = mn3(ay[0], ay[1], ay[2]); hy = mx3(ay[0], ay[1], ay[2]);
        px = '{lx, hx, ax[0] + ax[1] + ax[2] - lx - hx, lx, hx, 0};
        py = '{ly, ly, ay[0] + ay[1] + ay[2] - ly - hy, hy, hy, 0};
        @(negedge clk);
        mb_x = 7'(x + 1); mb_y = 7'(y + 1); mb_start = 1;
        @(negedge clk); mb_start = 0;
        cur_mx = x + 1; cur_my = y + 1;
        do @(negedge clk); while (!pf_busy);
        while (pf_busy) @(negedge clk);
        best = 0; bd = 1 << 30;
        for (int k = 0; k < N_PRED; k++)
          if (absi(px[k] - tx) + absi(py[k] - ty) < bd) begin bd = absi(px[k] - tx) + absi(py[k] - ty); best = k; end
        cx = clampi(px[best], -SR_H, SR_H); cy = clampi(py[best], -SR_V, SR_V);
        read_candidate(cx, cy, miss);
        steps = 0;
        while (!miss && (cx != tx || cy != ty) && steps < 16) begin
          int nx, ny;
          nx = cx + clampi(tx - cx, -4, 4); ny = cy + clampi(ty - cy, -4, 4);
          read_candidate(nx, ny, miss);
          if (!miss) begin cx = nx; cy = ny; end
          steps++;
        end
        @(negedge clk);
        me_type = 3'(best); final_mv.x = MV_W'(cx); final_mv.y = MV_W'(cy); me_done = 1;
        @(negedge clk); me_done = 0;
        left_x = cx; left_y = cy;
        n_mb++;
      end
    end
    repeat (5) @(negedge clk);
    refills = int'(st.refill);
    cmh_terms = int'(st.cmh_term);
    chk(refills == n_ref, "refill count equals bus requests");
    done = 1;
  end
endmodule
