// tb_mv_pred_gen: self-checking test of the six MV predictors.
// Random neighbour MVs; expected min, max and median are found by sorting.
module tb_mv_pred_gen;
  import bt_cache_pkg::*;
  mv_t [2:0] nb;
  mv_t [N_PRED-1:0] pred;
  int checks = 0, failures = 0;

  mv_pred_gen dut (.nb_mv(nb), .pred(pred));

  function automatic void sort3(int a, int b, int c, output int lo, output int md, output int hi);
    int t;
    if (a > b) begin t = a; a = b; b = t; end
    if (b > c) begin t = b; b = c; c = t; end
    if (a > b) begin t = a; a = b; b = t; end
    lo = a; md = b; hi = c;
  endfunction

  task automatic chk(int idx, int ex, int ey);
    mv_t p;
    logic signed [MV_W-1:0] px, py;
    p  = pred[idx];
    px = p.x;
    py = p.y;
    checks++;
    if (int'(px) != ex || int'(py) != ey) begin
      failures++;
      $display("FAIL pred %0d = (%0d,%0d) expected (%0d,%0d)", idx, px, py, ex, ey);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int ax[3], ay[3];
      int lx, mx, hx, ly, my, hy;
      for (int k = 0; k < 3; k++) begin
        ax[k] = (i < 10) ? (k - 1) * i : $urandom_range(0, 128) - 64;
        ay[k] = (i < 10) ? (1 - k) * i : $urandom_range(0, 64) - 32;
        nb[k].x = MV_W'(ax[k]);
        nb[k].y = MV_W'(ay[k]);
      end
      #1;
      sort3(ax[0], ax[1], ax[2], lx, mx, hx);
      sort3(ay[0], ay[1], ay[2], ly, my, hy);
      chk(PRED_MINX_MINY, lx, ly);
      chk(PRED_MAXX_MINY, hx, ly);
      chk(PRED_MED,       mx, my);
      chk(PRED_MINX_MAXY, lx, hy);
      chk(PRED_MAXX_MAXY, hx, hy);
      chk(PRED_ORIGIN,    0,  0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
