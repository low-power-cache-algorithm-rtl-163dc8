// tb_bt_cache_workload: cache write bandwidth of the CIF and D1 settings,
// with Cache Miss Hiding off and on, on one synthetic motion sequence.
//
// Four caches run side by side on the same sequence (bt_wl_driver):
//   CIF: 10 ways, search range +-32 x +-16;  D1: 15 ways, +-64 x +-32;
// each with CMH off and with CMH on.  Each reports the cache write
// bandwidth in MBs written per MB (refilled 8x8 blocks / 4 / MBs).  Every
// pixel read is checked; in addition CMH must never write more than the
// same cache without CMH, and the CMH runs must hide at least one miss.
// The numbers depend on the synthetic motion and are not those of real
// video.
module tb_bt_cache_workload;
  logic clk = 0, rst_n = 0;
  logic d0, d1, d2, d3;
  int m0, m1, m2, m3, r0, r1, r2, r3, t0, t1, t2, t3;
  int c0, c1, c2, c3, f0, f1, f2, f3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bt_wl_driver #(.N_WAYS(10), .SR_H(32), .SR_V(16), .CMH(1'b0)) u_cif_off (
    .clk, .rst_n, .done(d0), .n_mb(m0), .refills(r0), .cmh_terms(t0), .checks(c0), .failures(f0));
  bt_wl_driver #(.N_WAYS(10), .SR_H(32), .SR_V(16), .CMH(1'b1)) u_cif_on (
    .clk, .rst_n, .done(d1), .n_mb(m1), .refills(r1), .cmh_terms(t1), .checks(c1), .failures(f1));
  bt_wl_driver #(.N_WAYS(15), .SR_H(64), .SR_V(32), .CMH(1'b0)) u_d1_off (
    .clk, .rst_n, .done(d2), .n_mb(m2), .refills(r2), .cmh_terms(t2), .checks(c2), .failures(f2));
  bt_wl_driver #(.N_WAYS(15), .SR_H(64), .SR_V(32), .CMH(1'b1)) u_d1_on (
    .clk, .rst_n, .done(d3), .n_mb(m3), .refills(r3), .cmh_terms(t3), .checks(c3), .failures(f3));

  function automatic real bw(int refills, int mbs);
    return real'(refills) / 4.0 / real'(mbs);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2 && d3);
    $display("CIF 10 ways: CMH off %0.2f MB/MB, CMH on %0.2f MB/MB (%0d misses hidden), %0d MBs",
             bw(r0, m0), bw(r1, m1), t1, m1);
    $display("D1  15 ways: CMH off %0.2f MB/MB, CMH on %0.2f MB/MB (%0d misses hidden), %0d MBs",
             bw(r2, m2), bw(r3, m3), t3, m3);
    checks = c0 + c1 + c2 + c3;
    failures += f0 + f1 + f2 + f3;
    checks += 4;
    if (r1 > r0) begin failures++; $display("FAIL CIF: CMH wrote more than without CMH"); end
    if (r3 > r2) begin failures++; $display("FAIL D1: CMH wrote more than without CMH"); end
    if (t1 == 0) begin failures++; $display("FAIL CIF: no miss hidden"); end
    if (t3 == 0) begin failures++; $display("FAIL D1: no miss hidden"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
