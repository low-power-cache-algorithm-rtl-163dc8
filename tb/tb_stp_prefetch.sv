// tb_stp_prefetch: self-checking test of the STP prefetching engine.
// Runs several macroblocks.  For each, the expected request sequence is
// built independently: for each of the six predictors, the blocks of the
// rectangle covering the 16x16 candidates at the predictor and at predictor
// + stored ST vector (clamped to the +-64/+-32 search range), row by row.
// The engine's requests are compared one by one under random backpressure,
// the ST vector update (final MV - predictor) is checked after each ME end,
// and with no backpressure the time to finish is checked against one cycle
// per predictor plus one per block.
module tb_stp_prefetch;
  import bt_cache_pkg::*;
  localparam int SRH = 64, SRV = 32;
  logic clk = 0, rst_n = 0;
  logic start, me_done, req_valid, req_ready, busy;
  logic [2:0] me_type;
  mv_t [2:0] nb;
  mv_t final_mv;
  logic [4:0] req_bx; logic [3:0] req_by;
  mv_t [N_PRED-1:0] pred, stv;
  int checks = 0, failures = 0;
  int m_stv_x[N_PRED], m_stv_y[N_PRED];
  int exp_bx[$], exp_by[$];

  stp_prefetch #(.SR_H(SRH), .SR_V(SRV)) dut (
    .clk, .rst_n, .start, .nb_mv(nb), .me_done, .me_init_type(me_type), .me_final_mv(final_mv),
    .req_valid, .req_ready, .req_bx, .req_by, .busy, .pred, .stv);

  always #5 clk = ~clk;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int mn3(int a, int b, int c); int m; m = a < b ? a : b; return c < m ? c : m; endfunction
  function automatic int mx3(int a, int b, int c); int m; m = a > b ? a : b; return c > m ? c : m; endfunction

  task automatic build_expected(int ax[3], int ay[3], output int px[N_PRED], output int py[N_PRED]);
    int lx, hx, ly, hy;
    lx = mn3(ax[0], ax[1], ax[2]); hx = mx3(ax[0], ax[1], ax[2]);
    ly = mn3(ay[0], ay[1], ay[2]); hy = mx3(ay[0], ay[1], ay[2]);
    px = '{lx, hx, ax[0] + ax[1] + ax[2] - lx - hx, lx, hx, 0};
    py = '{ly, ly, ay[0] + ay[1] + ay[2] - ly - hy, hy, hy, 0};
    exp_bx.delete(); exp_by.delete();
    for (int k = 0; k < N_PRED; k++) begin
      int sx, sy, ex, ey, x0, x1, y0, y1;
      sx = clampi(px[k], -SRH, SRH) + SRH;
      sy = clampi(py[k], -SRV, SRV) + SRV;
      ex = clampi(px[k] + m_stv_x[k], -SRH, SRH) + SRH;
      ey = clampi(py[k] + m_stv_y[k], -SRV, SRV) + SRV;
      x0 = (sx < ex ? sx : ex) / 8;  x1 = ((sx > ex ? sx : ex) + 15) / 8;
      y0 = (sy < ey ? sy : ey) / 8;  y1 = ((sy > ey ? sy : ey) + 15) / 8;
      for (int y = y0; y <= y1; y++)
        for (int x = x0; x <= x1; x++) begin
          exp_bx.push_back(x); exp_by.push_back(y);
        end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; me_done = 0; req_ready = 0; me_type = 0; final_mv = '0; nb = '0;
    for (int k = 0; k < N_PRED; k++) begin m_stv_x[k] = 0; m_stv_y[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int mbn = 0; mbn < 40; mbn++) begin
      int ax[3], ay[3], px[N_PRED], py[N_PRED];
      int got, cycles, t, fx, fy;
      bit bp;
      bp = (mbn % 2 == 1);
      for (int i = 0; i < 3; i++) begin
        ax[i] = $urandom_range(0, 40) - 20;
        ay[i] = $urandom_range(0, 20) - 10;
        if (mbn == 5) begin ax[i] = 70 - i; ay[i] = -40 + i; end   // outside the SR: clamped
        nb[i].x = MV_W'(ax[i]); nb[i].y = MV_W'(ay[i]);
      end
      build_expected(ax, ay, px, py);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      got = 0; cycles = 1;
      while (busy) begin
        req_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
        #1;
        if (req_valid && req_ready) begin
          checks++;
          if (got >= exp_bx.size() || int'(req_bx) != exp_bx[got] || int'(req_by) != exp_by[got]) begin
            failures++;
            $display("FAIL mb %0d req %0d: (%0d,%0d) expected (%0d,%0d)", mbn, got, req_bx, req_by,
                     got < exp_bx.size() ? exp_bx[got] : -1, got < exp_by.size() ? exp_by[got] : -1);
          end
          got++;
        end
        @(negedge clk);
        cycles++;
      end
      req_ready = 0;
      checks++;
      if (got != exp_bx.size()) begin
        failures++;
        $display("FAIL mb %0d: %0d requests, expected %0d", mbn, got, exp_bx.size());
      end
      if (!bp) begin
        // one region cycle per predictor, one request per cycle, + start
        checks++;
        if (cycles != N_PRED + exp_bx.size() + 1) begin
          failures++;
          $display("FAIL mb %0d: %0d cycles expected %0d", mbn, cycles, N_PRED + exp_bx.size() + 1);
        end
      end
      // end of ME: random start type and final MV
      t = $urandom_range(0, N_PRED - 1);
      fx = px[t] + $urandom_range(0, 16) - 8;
      fy = py[t] + $urandom_range(0, 16) - 8;
      me_type = 3'(t); final_mv.x = MV_W'(fx); final_mv.y = MV_W'(fy);
      me_done = 1;
      @(negedge clk);
      me_done = 0;
      m_stv_x[t] = fx - px[t];
      m_stv_y[t] = fy - py[t];
      for (int k = 0; k < N_PRED; k++) begin
        mv_t v;
        logic signed [MV_W-1:0] vx, vy;
        v = stv[k]; vx = v.x; vy = v.y;
        checks++;
        if (int'(vx) != m_stv_x[k] || int'(vy) != m_stv_y[k]) begin
          failures++;
          $display("FAIL mb %0d stv[%0d] = (%0d,%0d) expected (%0d,%0d)", mbn, k, vx, vy, m_stv_x[k], m_stv_y[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
