// bt_power_ctrl: power gating control of the BT cache ways.
//
// The cache controller can run with fewer ways than are built, depending on
// the frame size or a power limit, and switch off the memory of the unused
// ways (document, Sec. 4).  This block turns the requested number of active
// ways into a per-way power enable: ways 0 .. n-1 stay on, the others are
// gated.  The request is clamped to 1 .. N_WAYS so the cache never loses its
// last way.  Ways that are switched off lose their contents; the tag memory
// invalidates them.
//
// Interface: `cfg_ways` is sampled when `cfg_load` is high and takes effect
// on the next clock edge; `way_pwr` and `ways_active` are registered.  After
// reset every way is on.  Keeping the lowest ways on, the clamp and the load
// strobe are this design's choices.
module bt_power_ctrl #(
  parameter int unsigned N_WAYS = 15,
  localparam int unsigned WC_W  = $clog2(N_WAYS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,
  input  logic [WC_W-1:0]   cfg_ways,
  output logic [N_WAYS-1:0] way_pwr,
  output logic [WC_W-1:0]   ways_active
);

  logic [WC_W-1:0] n_clamped;

  always_comb begin
    if (cfg_ways == '0)                   n_clamped = WC_W'(1);
    else if (cfg_ways > WC_W'(N_WAYS))    n_clamped = WC_W'(N_WAYS);
    else                                  n_clamped = cfg_ways;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      way_pwr     <= '1;
      ways_active <= WC_W'(N_WAYS);
    end else if (cfg_load) begin
      ways_active <= n_clamped;
      for (int unsigned w = 0; w < N_WAYS; w++)
        way_pwr[w] <= (WC_W'(w) < n_clamped);
    end
  end

endmodule
