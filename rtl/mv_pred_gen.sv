// mv_pred_gen: the MV predictors used as initial search points (Fig. 5).
//
// From the set P of neighbouring motion vectors (left, top and top-right
// macroblocks) it forms six predictors, in pred_type_e order:
//   (min x, min y), (max x, min y), (median x, median y),
//   (min x, max y), (max x, max y) and the origin (0, 0).
// Each component is taken independently over the three neighbours.  The set
// of predictors is the document's (Fig. 5); that P holds exactly these three
// neighbours is this design's choice (an unavailable neighbour should be
// given as the zero vector).  Purely combinational.
module mv_pred_gen
  import bt_cache_pkg::*;
(
  input  mv_t [2:0]        nb_mv,
  output mv_t [N_PRED-1:0] pred
);

  typedef logic signed [MV_W-1:0] comp_t;

  function automatic comp_t min3(comp_t a, comp_t b, comp_t c);
    comp_t m;
    m = (a < b) ? a : b;
    return (c < m) ? c : m;
  endfunction

  function automatic comp_t max3(comp_t a, comp_t b, comp_t c);
    comp_t m;
    m = (a > b) ? a : b;
    return (c > m) ? c : m;
  endfunction

  function automatic comp_t med3(comp_t a, comp_t b, comp_t c);
    return comp_t'(a + b + c - min3(a, b, c) - max3(a, b, c));
  endfunction

  comp_t minx, maxx, medx, miny, maxy, medy;

  always_comb begin
    minx = min3(nb_mv[0].x, nb_mv[1].x, nb_mv[2].x);
    maxx = max3(nb_mv[0].x, nb_mv[1].x, nb_mv[2].x);
    medx = med3(nb_mv[0].x, nb_mv[1].x, nb_mv[2].x);
    miny = min3(nb_mv[0].y, nb_mv[1].y, nb_mv[2].y);
    maxy = max3(nb_mv[0].y, nb_mv[1].y, nb_mv[2].y);
    medy = med3(nb_mv[0].y, nb_mv[1].y, nb_mv[2].y);
    pred[PRED_MINX_MINY] = '{x: minx, y: miny};
    pred[PRED_MAXX_MINY] = '{x: maxx, y: miny};
    pred[PRED_MED]       = '{x: medx, y: medy};
    pred[PRED_MINX_MAXY] = '{x: minx, y: maxy};
    pred[PRED_MAXX_MAXY] = '{x: maxx, y: maxy};
    pred[PRED_ORIGIN]    = '{x: '0,   y: '0};
  end

endmodule
