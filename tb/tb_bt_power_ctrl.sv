// tb_bt_power_ctrl: self-checking test of the way power gating control.
// Loads every way count 0 .. 15 and checks the thermometer enable, the
// clamp to 1 .. N_WAYS, the one-cycle load latency and the reset state.
module tb_bt_power_ctrl;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, load = 0;
  logic [3:0] ways;
  logic [N-1:0] pwr;
  logic [3:0] active;
  int checks = 0, failures = 0;

  bt_power_ctrl #(.N_WAYS(N)) dut (.clk, .rst_n, .cfg_load(load), .cfg_ways(ways),
                                   .way_pwr(pwr), .ways_active(active));
  always #5 clk = ~clk;

  task automatic check(logic [N-1:0] ep, int ea, string what);
    checks++;
    if (pwr !== ep || active !== 4'(ea)) begin
      failures++;
      $display("FAIL %s: pwr=%b active=%0d expected %b %0d", what, pwr, active, ep, ea);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ways = 4'd3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check('1, N, "reset");
    for (int n = 0; n < 16; n++) begin
      int e;
      logic [N-1:0] ep;
      e = (n == 0) ? 1 : n;
      ep = '0;
      for (int w = 0; w < e; w++) ep[w] = 1'b1;
      ways = 4'(n); load = 1;
      @(negedge clk);
      load = 0;
      check(ep, e, "load");
      ways = 4'(15 - n);
      @(negedge clk);
      check(ep, e, "hold without load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
