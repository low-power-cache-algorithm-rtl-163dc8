// tb_bt_cache_ctrl: self-checking directed test of the cache controller,
// with the cache data memory and a reference frame memory model attached.
// Two ways only, so that replacement happens after a few refills.  Checks:
// flush on the first MB, prefetch miss + refill and later hit, the absolute
// address sent to the reference memory, an ME group read with CMH off
// (refill of the missing blocks, then 8 rows of the right pixels), an ME
// miss with CMH on (answered at once, nothing fetched), the SR shift
// to the next MB (blocks found at x - 1 MB without refill, blocks at x = 0
// dropped), replacement of the block with the smallest x, power gating of a
// way, and the latencies: row 0 of a hit is sampled 3 clock edges after the
// edge that accepts the request, a CMH miss 2 edges after it.
module tb_bt_cache_ctrl;
  import bt_cache_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 2, SRH = 64, SRV = 32;
  localparam int BAW = $clog2(N * 8);

  logic clk = 0, rst_n = 0;
  logic cfg_load, cfg_cmh;
  logic [1:0] cfg_ways;
  logic [N-1:0] way_pwr;
  logic mb_start, pf_start;
  logic [6:0] mb_x, mb_y;
  logic pf_valid, pf_ready, me_valid, me_ready;
  logic [4:0] pf_bx, me_bx; logic [3:0] pf_by, me_by;
  logic resp_valid, resp_miss, resp_last;
  logic [2:0] resp_row;
  row_t [3:0] resp_data;
  logic ref_valid, ref_ready, ref_dv;
  logic signed [ABS_W-1:0] ref_bx, ref_by;
  row_t ref_data;
  logic dm_we, dm_re;
  logic [1:0] dm_widx;
  logic [BAW-1:0] dm_waddr;
  logic [3:0][BAW-1:0] dm_raddr;
  row_t dm_wdata;
  row_t [3:0] dm_rdata;
  logic idle;
  bt_stats_t st;
  int n_ref;
  int checks = 0, failures = 0;
  int cyc = 0;
  int cur_mx, cur_my;
  int last_ref_bx, last_ref_by;

  bt_cache_ctrl #(.N_WAYS(N), .SR_H(SRH), .SR_V(SRV)) dut (
    .clk, .rst_n, .cfg_load, .cfg_ways, .cfg_cmh_en(cfg_cmh), .way_pwr,
    .mb_start, .mb_x, .mb_y, .pf_start,
    .pf_req_valid(pf_valid), .pf_req_ready(pf_ready), .pf_req_bx(pf_bx), .pf_req_by(pf_by),
    .me_req_valid(me_valid), .me_req_ready(me_ready), .me_req_bx(me_bx), .me_req_by(me_by),
    .me_resp_valid(resp_valid), .me_resp_miss(resp_miss), .me_resp_row(resp_row),
    .me_resp_last(resp_last), .me_resp_data(resp_data),
    .ref_req_valid(ref_valid), .ref_req_ready(ref_ready), .ref_req_bx(ref_bx), .ref_req_by(ref_by),
    .ref_rdata_valid(ref_dv), .ref_rdata(ref_data),
    .dm_wr_en(dm_we), .dm_wr_idx(dm_widx), .dm_wr_addr(dm_waddr), .dm_wr_data(dm_wdata),
    .dm_rd_en(dm_re), .dm_rd_addr(dm_raddr), .dm_rd_data(dm_rdata),
    .idle, .stats(st));

  bt_data_mem #(.N_WAYS(N)) u_dm (.clk, .way_pwr, .wr_en(dm_we), .wr_idx(dm_widx),
    .wr_addr(dm_waddr), .wr_data(dm_wdata), .rd_en(dm_re), .rd_addr(dm_raddr), .rd_data(dm_rdata));

  ref_frame_mem_model #(.LAT(3), .GAPS(1'b1)) u_ref (.clk, .rst_n, .req_valid(ref_valid),
    .req_ready(ref_ready), .req_bx(ref_bx), .req_by(ref_by), .rdata_valid(ref_dv),
    .rdata(ref_data), .n_req(n_ref));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ref_valid && ref_ready) begin last_ref_bx <= int'(ref_bx); last_ref_by <= int'(ref_by); end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (!idle);
  endtask

  task automatic new_mb(int x, int y);
    mb_x = 7'(x); mb_y = 7'(y); mb_start = 1;
    @(negedge clk);
    mb_start = 0;
    cur_mx = x; cur_my = y;
    wait_idle();
  endtask

  task automatic prefetch(int bx, int by);
    pf_bx = 5'(bx); pf_by = 4'(by); pf_valid = 1;
    do @(posedge clk); while (!pf_ready);
    #1 pf_valid = 0;
    wait_idle();
  endtask

  // ME read of the group at (bx, by); returns 1 if answered with a miss
  task automatic me_read(int bx, int by, output bit miss, output int lat);
    int acc, rows;
    me_bx = 5'(bx); me_by = 4'(by); me_valid = 1;
    do @(posedge clk); while (!me_ready);
    acc = cyc;
    #1 me_valid = 0;
    rows = 0; miss = 0; lat = -1;
    forever begin
      @(posedge clk);
      if (resp_valid) begin
        if (lat < 0) lat = cyc - acc;
        if (resp_miss) begin miss = 1; break; end
        for (int p = 0; p < 4; p++) begin
          int ax, ay;
          ax = 2 * cur_mx - SRH / 8 + bx + (p % 2);
          ay = 2 * cur_my - SRV / 8 + by + (p / 2);
          chk(resp_data[p] == ref_row(ax, ay, int'(resp_row)) && int'(resp_row) == rows,
              $sformatf("ME data grp(%0d,%0d) pos %0d row %0d got %h exp %h", bx, by, p, resp_row, resp_data[p], ref_row(ax, ay, int'(resp_row))));
        end
        rows++;
        if (resp_last) break;
      end
    end
    if (!miss) chk(rows == 8, "8 rows returned");
    wait_idle();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit miss; int lat, r0;
    cfg_load = 0; cfg_ways = 2'd2; cfg_cmh = 0; mb_start = 0; mb_x = 0; mb_y = 0;
    pf_valid = 0; pf_bx = 0; pf_by = 0; me_valid = 0; me_bx = 0; me_by = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // first MB: flush, prefetch start
    mb_x = 7'd5; mb_y = 7'd3; mb_start = 1;
    @(negedge clk); mb_start = 0;
    @(posedge clk); #1;
    chk(pf_start == 1'b1 || st.flush == 1, "prefetch started after first MB");
    cur_mx = 5; cur_my = 3;
    wait_idle();
    chk(st.flush == 1 && st.shift == 0, "first MB flushes");

    // prefetch miss then hit
    prefetch(3, 2);
    chk(n_ref == 1 && st.pf_miss == 1 && st.refill == 1, "prefetch miss refills");
    chk(last_ref_bx == 2 * 5 - 8 + 3 && last_ref_by == 2 * 3 - 4 + 2, "absolute block address");
    prefetch(3, 2);
    chk(n_ref == 1 && st.pf_req == 2 && st.pf_miss == 1, "prefetch hit does not refill");

    // ME read with CMH off: (2,2) (3,2) (2,3) (3,3); (3,2) is cached
    me_read(2, 2, miss, lat);
    chk(!miss && n_ref == 4 && st.me_miss == 1, "ME miss without CMH fetches 3 blocks");
    me_read(2, 2, miss, lat);
    chk(!miss && n_ref == 4 && lat == 3, $sformatf("ME hit, latency %0d", lat));

    // CMH on: a miss is answered at once and nothing is fetched
    cfg_cmh = 1;
    me_read(10, 6, miss, lat);
    chk(miss && n_ref == 4 && lat == 2 && st.cmh_term == 1, "CMH hides the miss");
    me_read(2, 2, miss, lat);
    chk(!miss, "hit with CMH on");
    cfg_cmh = 0;

    // next MB to the right: SR slides by 2 blocks
    new_mb(6, 3);
    chk(st.shift == 1, "shift on the right neighbour");
    me_read(0, 2, miss, lat);
    chk(!miss && n_ref == 4, "blocks found at x - 1 MB after the shift");
    // one more MB: the group now sits at x = -2 blocks and is dropped
    new_mb(7, 3);
    r0 = n_ref;
    prefetch(0, 2);
    chk(n_ref == r0 + 1, "shifted-out block is no longer cached");

    // replacement: set 0 (even x, even y) with two ways
    new_mb(0, 1);
    chk(st.flush == 2, "new MB row flushes");
    prefetch(4, 0);   // x = 2 MB
    prefetch(0, 0);   // x = 0 MB
    r0 = st.evict;
    prefetch(8, 0);   // x = 4 MB: evicts the x = 0 block
    chk(st.evict == r0 + 1, "third block of a 2-way set evicts");
    r0 = n_ref;
    prefetch(4, 0);
    chk(n_ref == r0, "block with larger x kept");
    prefetch(0, 0);
    chk(n_ref == r0 + 1, "block with smallest x was the victim");

    // power gating: one way left, the block in way 1 is lost
    cfg_ways = 2'd1; cfg_load = 1;
    @(negedge clk); cfg_load = 0;
    chk(way_pwr == 2'b01, "way 1 gated");
    r0 = n_ref;
    prefetch(4, 0); prefetch(8, 0); prefetch(0, 0);
    chk(n_ref - r0 >= 2, "one way holds one block per set");
    cfg_ways = 2'd2; cfg_load = 1;
    @(negedge clk); cfg_load = 0;

    // data after refills with evictions are still right
    me_read(0, 0, miss, lat);
    chk(!miss, "final read");

    $display("stats: pf_req=%0d pf_miss=%0d me_req=%0d me_miss=%0d cmh=%0d refill=%0d evict=%0d shift=%0d flush=%0d",
             st.pf_req, st.pf_miss, st.me_req, st.me_miss, st.cmh_term, st.refill, st.evict, st.shift, st.flush);
    chk(st.refill == 32'(n_ref), "refill counter matches bus requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
