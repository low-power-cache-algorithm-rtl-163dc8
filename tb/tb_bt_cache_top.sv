// tb_bt_cache_top: end-to-end test of the BT cache at its default size
// (15 ways, +-64 x +-32 search range, the D1 setting).
//
// A motion estimation model drives the cache over two MB rows.  For every
// MB it starts the MB with neighbouring MVs, lets the STP prefetching run
// (for some MBs overlapped with the search), then walks a search trajectory
// from the predictor closest to a target motion towards that target, in
// steps of at most 4 pixels, reading every 16x16 candidate as 2x2 block
// groups.  All returned pixels are checked against the reference frame
// formula.  With Cache Miss Hiding on, an ME miss ends the search at the
// last good point.  The MB ends with me_done, which updates the ST vector.
// Part of the run uses 10 powered ways (power gating).
//
// Counted mechanisms, each of which must happen at least once: SR shift,
// SR flush, prefetch miss with refill, prefetch hit, ME hit, ME miss
// refilled (CMH off), ME miss hidden (CMH on), eviction, ME request
// arriving while the prefetcher is busy (arbitration), ME stalled by a
// refill, power gating, ST vector update.
module tb_bt_cache_top;
  import bt_cache_pkg::*;
  import tb_ref_pkg::*;
  localparam int SRH = 64, SRV = 32;

  logic clk = 0, rst_n = 0;
  logic cfg_load, cfg_cmh;
  logic [3:0] cfg_ways;
  logic [14:0] way_pwr;
  logic mb_start; logic [6:0] mb_x, mb_y;
  mv_t [2:0] nb;
  mv_t [N_PRED-1:0] pred, stv;
  logic pf_busy;
  logic me_valid, me_ready; logic [4:0] me_bx; logic [3:0] me_by;
  logic resp_valid, resp_miss, resp_last; logic [2:0] resp_row;
  row_t [3:0] resp_data;
  logic me_done; logic [2:0] me_type; mv_t final_mv;
  logic ref_valid, ref_ready, ref_dv;
  logic signed [ABS_W-1:0] ref_bx, ref_by;
  row_t ref_data;
  logic idle;
  bt_stats_t st;
  int n_ref;

  int checks = 0, failures = 0;
  int cur_mx, cur_my;
  int n_arbit = 0, n_stall = 0, n_gate = 0, n_stv = 0, n_me_hit = 0, n_me_groups = 0;
  int n_pf_hit;

  bt_cache_top dut (
    .clk, .rst_n, .cfg_load, .cfg_ways, .cfg_cmh_en(cfg_cmh), .way_pwr,
    .mb_start, .mb_x, .mb_y, .nb_mv(nb), .pred, .stv, .pf_busy,
    .me_req_valid(me_valid), .me_req_ready(me_ready), .me_req_bx(me_bx), .me_req_by(me_by),
    .me_resp_valid(resp_valid), .me_resp_miss(resp_miss), .me_resp_row(resp_row),
    .me_resp_last(resp_last), .me_resp_data(resp_data),
    .me_done, .me_init_type(me_type), .me_final_mv(final_mv),
    .ref_req_valid(ref_valid), .ref_req_ready(ref_ready), .ref_req_bx(ref_bx), .ref_req_by(ref_by),
    .ref_rdata_valid(ref_dv), .ref_rdata(ref_data), .idle, .stats(st));

  ref_frame_mem_model #(.LAT(6), .GAPS(1'b1)) u_ref (.clk, .rst_n, .req_valid(ref_valid),
    .req_ready(ref_ready), .req_bx(ref_bx), .req_by(ref_by), .rdata_valid(ref_dv),
    .rdata(ref_data), .n_req(n_ref));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (me_valid && pf_busy) n_arbit++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic int absi(int v); return v < 0 ? -v : v; endfunction

  // read one 2x2 group; returns 1 on a hidden miss
  task automatic read_group(int gx, int gy, output bit miss);
    int acc;
    bit first;
    @(negedge clk);
    me_bx = 5'(gx); me_by = 4'(gy); me_valid = 1;
    do @(posedge clk); while (!me_ready);
    acc = cyc;
    #1 me_valid = 0;
    n_me_groups++;
    miss = 0;
    first = 1;
    forever begin
      @(posedge clk);
      if (resp_valid) begin
        if (first) begin
          // 3 edges for a hit; more means the ME waited for a refill
          if (cyc - acc > 3) n_stall++;
          chk(cyc - acc >= (resp_miss ? 2 : 3), "response latency");
          first = 0;
        end
        if (resp_miss) begin miss = 1; break; end
        for (int p = 0; p < 4; p++) begin
          int ax, ay;
          ax = 2 * cur_mx - SRH / 8 + gx + (p % 2);
          ay = 2 * cur_my - SRV / 8 + gy + (p / 2);
          chk(resp_data[p] == ref_row(ax, ay, int'(resp_row)),
              $sformatf("data mb(%0d,%0d) grp(%0d,%0d) pos %0d row %0d", cur_mx, cur_my, gx, gy, p, resp_row));
        end
        if (resp_last) break;
      end
    end
  endtask

  // read the 16x16 candidate at MV (mx, my); returns 1 on a hidden miss
  task automatic read_candidate(int mx, int my, output bit miss);
    int px, py, gx[2], gy[2], nx, ny;
    px = mx + SRH; py = my + SRV;
    gx[0] = px / 8; gy[0] = py / 8;
    nx = (px % 8 != 0) ? 2 : 1; ny = (py % 8 != 0) ? 2 : 1;
    gx[1] = clampi(gx[0] + 1, 0, (2 * SRH + 16) / 8 - 2);
    gy[1] = clampi(gy[0] + 1, 0, (2 * SRV + 16) / 8 - 2);
    gx[0] = clampi(gx[0], 0, (2 * SRH + 16) / 8 - 2);
    gy[0] = clampi(gy[0], 0, (2 * SRV + 16) / 8 - 2);
    miss = 0;
    for (int j = 0; j < ny && !miss; j++)
      for (int i = 0; i < nx && !miss; i++) begin
        bit m;
        read_group(gx[i], gy[j], m);
        if (m) miss = 1; else n_me_hit++;
      end
  endtask

  function automatic int mn3(int a, int b, int c); int m; m = a < b ? a : b; return c < m ? c : m; endfunction
  function automatic int mx3(int a, int b, int c); int m; m = a > b ? a : b; return c > m ? c : m; endfunction

  int left_x, left_y;

  task automatic run_mb(int x, int y, bit overlap, int tgt_x, int tgt_y);
    int ax[3], ay[3], px[N_PRED], py[N_PRED], lx, hx, ly, hy;
    int best, bd, cx, cy, steps;
    bit miss;
    ax = '{left_x, left_x + 2, left_x - 3};
    ay = '{left_y, left_y - 1, left_y + 2};
    for (int i = 0; i < 3; i++) begin nb[i].x = MV_W'(ax[i]); nb[i].y = MV_W'(ay[i]); end
    lx = mn3(ax[0], ax[1], ax[2]); hx = mx3(ax[0], ax[1], ax[2]);
    ly = mn3(ay[0], ay[1], ay[2]); hy = mx3(ay[0], ay[1], ay[2]);
    px = '{lx, hx, ax[0] + ax[1] + ax[2] - lx - hx, lx, hx, 0};
    py = '{ly, ly, ay[0] + ay[1] + ay[2] - ly - hy, hy, hy, 0};
    mb_x = 7'(x); mb_y = 7'(y); mb_start = 1;
    @(negedge clk); mb_start = 0;
    cur_mx = x; cur_my = y;
    // wait until the SR moved and the predictors are latched
    do @(negedge clk); while (!pf_busy);
    for (int k = 0; k < N_PRED; k++) begin
      mv_t v; logic signed [MV_W-1:0] vx, vy;
      v = pred[k]; vx = v.x; vy = v.y;
      chk(int'(vx) == px[k] && int'(vy) == py[k], $sformatf("predictor %0d", k));
    end
    if (!overlap) while (pf_busy) @(negedge clk);
    // initial point: predictor closest to the target
    best = 0; bd = 1 << 30;
    for (int k = 0; k < N_PRED; k++)
      if (absi(px[k] - tgt_x) + absi(py[k] - tgt_y) < bd) begin
        bd = absi(px[k] - tgt_x) + absi(py[k] - tgt_y); best = k;
      end
    cx = clampi(px[best], -SRH, SRH); cy = clampi(py[best], -SRV, SRV);
    read_candidate(cx, cy, miss);
    steps = 0;
    while (!miss && (cx != tgt_x || cy != tgt_y) && steps < 12) begin
      int nx, ny;
      nx = cx + clampi(tgt_x - cx, -4, 4);
      ny = cy + clampi(tgt_y - cy, -4, 4);
      read_candidate(nx, ny, miss);
      if (!miss) begin cx = nx; cy = ny; end
      steps++;
    end
    while (pf_busy) @(negedge clk);
    me_type = 3'(best); final_mv.x = MV_W'(cx); final_mv.y = MV_W'(cy);
    me_done = 1;
    @(negedge clk);
    me_done = 0;
    if (cx != px[best] || cy != py[best]) n_stv++;
    left_x = cx; left_y = cy;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_mb;
    cfg_load = 0; cfg_ways = 4'd15; cfg_cmh = 0; mb_start = 0; mb_x = 0; mb_y = 0; nb = '0;
    me_valid = 0; me_bx = 0; me_by = 0; me_done = 0; me_type = 0; final_mv = '0;
    left_x = 0; left_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    n_mb = 0;
    // row 1: 15 ways, CMH off for the first half, then on
    for (int x = 2; x < 18; x++) begin
      int tx, ty;
      cfg_cmh = (x >= 10);
      tx = 6 + ((x * 5) % 7) - 3;  ty = -2 + (x % 3);
      if (x % 5 == 4) begin tx = -40 + x; ty = 20; end   // sudden motion change
      run_mb(x, 1, x % 3 == 0, clampi(tx, -SRH, SRH), clampi(ty, -SRV, SRV));
      n_mb++;
    end
    // row 2: 10 ways powered (the CIF cache size), CMH on
    cfg_ways = 4'd10; cfg_load = 1;
    @(negedge clk); cfg_load = 0;
    if (way_pwr == 15'h03ff) n_gate++;
    left_x = 0; left_y = 0;
    for (int x = 2; x < 12; x++) begin
      int tx, ty;
      tx = -5 + (x % 4); ty = 3 - (x % 5);
      if (x % 4 == 3) begin tx = 30; ty = -25; end
      run_mb(x, 2, x % 2 == 0, tx, ty);
      n_mb++;
    end
    repeat (20) @(negedge clk);

    n_pf_hit = int'(st.pf_req - st.pf_miss);
    $display("MBs=%0d refilled blocks=%0d (%0.2f MB per MB) prefetch req=%0d miss=%0d ME groups=%0d miss=%0d CMH=%0d evict=%0d shift=%0d flush=%0d",
             n_mb, st.refill, real'(st.refill) / 4.0 / real'(n_mb), st.pf_req, st.pf_miss, st.me_req,
             st.me_miss, st.cmh_term, st.evict, st.shift, st.flush);
    chk(st.refill == 32'(n_ref), "every refill is one bus request");
    chk(st.me_req == 32'(n_me_groups), $sformatf("ME group count %0d vs %0d", st.me_req, n_me_groups));
    chk(st.shift == 32'(n_mb - 2), "one shift per MB except row starts");
    chk(st.flush == 32'd2, "one flush per row");
    chk(st.shift > 0,                    "mechanism: SR shift");
    chk(st.flush > 0,                    "mechanism: SR flush");
    chk(st.pf_miss > 0,                  "mechanism: prefetch miss");
    chk(n_pf_hit > 0,                    "mechanism: prefetch hit");
    chk(n_me_hit > 0,                    "mechanism: ME hit");
    chk(st.me_miss > st.cmh_term,        "mechanism: ME miss refilled (CMH off)");
    chk(st.cmh_term > 0,                 "mechanism: ME miss hidden (CMH on)");
    chk(st.evict > 0,                    "mechanism: eviction");
    chk(n_arbit > 0,                     "mechanism: ME / prefetch arbitration");
    chk(n_stall > 0,                     "mechanism: ME stalled by a refill");
    chk(n_gate > 0,                      "mechanism: power gating");
    chk(n_stv > 0,                       "mechanism: ST vector update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
