// tb_bt_addr_gen: self-checking test of the block address translation.
// Sweeps every block of the D1 search range for several MB positions and
// checks index, tag, absolute block coordinate and bank address.
module tb_bt_addr_gen;
  import bt_cache_pkg::*;
  logic [4:0] bx; logic [3:0] by;
  logic [6:0] mx, my;
  logic [3:0] way; logic [2:0] row;
  logic [1:0] idx; logic [3:0] tx; logic [2:0] ty;
  logic signed [ABS_W-1:0] ax, ay;
  logic [6:0] ba;
  int checks = 0, failures = 0;

  bt_addr_gen #(.N_WAYS(15), .SR_H(64), .SR_V(32)) dut (
    .rel_bx(bx), .rel_by(by), .mb_x(mx), .mb_y(my), .way(way), .row(row),
    .idx(idx), .tx(tx), .ty(ty), .abs_bx(ax), .abs_by(ay), .bank_addr(ba));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mbs[4][2] = '{'{0, 0}, '{5, 3}, '{44, 35}, '{20, 1}};
    foreach (mbs[m]) begin
      for (int y = 0; y < 10; y++) begin
        for (int x = 0; x < 18; x++) begin
          int px, py, e_idx;
          bx = 5'(x); by = 4'(y); mx = 7'(mbs[m][0]); my = 7'(mbs[m][1]);
          way = 4'($urandom_range(0, 14)); row = 3'($urandom_range(0, 7));
          #1;
          // pixel position of the block in the frame: SR starts 64 left, 32 up
          px = mbs[m][0] * 16 - 64 + x * 8;
          py = mbs[m][1] * 16 - 32 + y * 8;
          // Fig. 3: A=0 B=1 / D=2 E=3 inside an MB
          e_idx = ((y % 2) * 2) + (x % 2);
          checks++;
          if (int'(idx) != e_idx || int'(tx) != x / 2 || int'(ty) != y / 2 ||
              int'(ax) * 8 != px || int'(ay) * 8 != py ||
              int'(ba) != int'(way) * 8 + int'(row)) begin
            failures++;
            $display("FAIL mb(%0d,%0d) blk(%0d,%0d): idx=%0d tag=(%0d,%0d) abs=(%0d,%0d) ba=%0d",
                     mbs[m][0], mbs[m][1], x, y, idx, tx, ty, ax, ay, ba);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
