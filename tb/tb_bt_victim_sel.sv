// tb_bt_victim_sel: self-checking test of the replacement choice.
// Directed cases (free way first, smallest x, ties, gated ways) followed by
// random sets compared with a reference written from the replacement rule.
module tb_bt_victim_sel;
  localparam int N = 15;
  localparam int TXW = 4;

  logic [N-1:0]          valid, pwr;
  logic [N-1:0][TXW-1:0] tx;
  logic [3:0]            victim;
  logic                  dirty;
  int checks = 0, failures = 0;

  bt_victim_sel #(.N_WAYS(N), .TX_W(TXW)) dut (
    .way_valid(valid), .way_pwr(pwr), .way_tx(tx), .victim(victim), .victim_dirty(dirty));

  task automatic expect_victim(int exp_way, bit exp_dirty, string what);
    #1;
    checks++;
    if (victim != 4'(exp_way) || dirty != exp_dirty) begin
      failures++;
      $display("FAIL %s: victim=%0d dirty=%0d expected %0d %0d", what, victim, dirty, exp_way, exp_dirty);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // all valid, way 6 has the smallest x
    pwr = '1; valid = '1;
    for (int w = 0; w < N; w++) tx[w] = 4'(8 - (w % 5));
    tx[6] = 4'd1;
    expect_victim(6, 1, "smallest x");
    // tie on smallest x goes to the lower way
    tx[2] = 4'd1;
    expect_victim(2, 1, "tie");
    // a free way is taken before any valid one
    valid[11] = 1'b0;
    expect_victim(11, 0, "free way");
    // a free way that is gated does not count
    pwr[11] = 1'b0;
    expect_victim(2, 1, "gated free way");
    // a gated way with the smallest x is not chosen
    pwr[2] = 1'b0;
    expect_victim(6, 1, "gated small way");
    // random sets
    for (int i = 0; i < 2000; i++) begin
      int ew; bit ed; int mn;
      // half of the sets are full, so the smallest-x rule decides
      valid = (i % 2 == 0) ? '1 : N'($urandom); pwr = N'($urandom) | N'(1);
      for (int w = 0; w < N; w++) tx[w] = TXW'($urandom_range(0, 8));
      ew = -1; ed = 0;
      for (int w = 0; w < N; w++) if (pwr[w] && !valid[w] && ew < 0) ew = w;
      if (ew < 0) begin
        mn = 99; ew = 0;
        for (int w = 0; w < N; w++)
          if (pwr[w] && valid[w] && int'(tx[w]) < mn) begin mn = int'(tx[w]); ew = w; ed = 1; end
      end
      expect_victim(ew, ed, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
