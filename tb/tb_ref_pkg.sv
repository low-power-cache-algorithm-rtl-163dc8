// tb_ref_pkg: reference frame content shared by the testbenches.
// The reference frame is defined by a formula, so any pixel, including the
// padding outside the picture, can be recomputed to check the cache data:
//   pixel(x, y) = ((x * 7 + y * 13 + ((x * y) >> 3)) ^ 8'h5A) mod 256
// A block row packs 8 pixels, leftmost pixel in bits 7:0.
package tb_ref_pkg;
  import bt_cache_pkg::*;

  function automatic logic [7:0] ref_pixel(int x, int y);
    int v;
    v = x * 7 + y * 13 + ((x * y) >>> 3);
    return 8'(v) ^ 8'h5A;
  endfunction

  // row `row` of the 8x8 block at absolute block coordinate (bx, by)
  function automatic row_t ref_row(int bx, int by, int row);
    row_t r;
    for (int i = 0; i < 8; i++) r[8*i +: 8] = ref_pixel(bx * 8 + i, by * 8 + row);
    return r;
  endfunction
endpackage
