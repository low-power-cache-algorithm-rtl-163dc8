// bt_data_mem: cache data memory of the BT cache (the search-range memory).
//
// Four banks, one per cache index, so that the four 8x8 blocks of any 2x2
// block group (one block of each index) are read in the same cycle, which is
// the MB-based parallel access of the document.  Each bank holds N_WAYS
// blocks of 8 rows of 8 pixels; word address = way * 8 + row.
//
// Write port: one 64-bit block row per cycle into one bank (refills).
// Read port: when `rd_en` is high, every bank reads its own address and the
// rows appear on `rd_data` one cycle later (synchronous read).
// Ways whose `way_pwr` bit is low are power gated: writes to them are
// dropped and reads return zero, as a switched-off array would not deliver
// data.  The bank split follows the document; the read latency, the address
// layout and the gated-read value are this design's choices.
module bt_data_mem
  import bt_cache_pkg::*;
#(
  parameter int unsigned N_WAYS = 15,
  localparam int unsigned DEPTH = N_WAYS * BLK,
  localparam int unsigned BA_W  = $clog2(DEPTH),
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic                         clk,
  input  logic [N_WAYS-1:0]            way_pwr,
  input  logic                         wr_en,
  input  logic [1:0]                   wr_idx,
  input  logic [BA_W-1:0]              wr_addr,
  input  row_t                         wr_data,
  input  logic                         rd_en,
  input  logic [N_IDX-1:0][BA_W-1:0]   rd_addr,
  output row_t [N_IDX-1:0]             rd_data
);

  for (genvar b = 0; b < N_IDX; b++) begin : g_bank
    row_t mem [DEPTH];
    logic [WAY_W-1:0] wway, rway;
    logic             wpwr, rpwr;

    assign wway = WAY_W'(wr_addr / BA_W'(BLK));
    assign rway = WAY_W'(rd_addr[b] / BA_W'(BLK));
    assign wpwr = (32'(wr_addr) < DEPTH) && way_pwr[wway];
    assign rpwr = (32'(rd_addr[b]) < DEPTH) && way_pwr[rway];

    always_ff @(posedge clk) begin
      if (wr_en && wr_idx == 2'(b) && wpwr) mem[wr_addr] <= wr_data;
    end

    always_ff @(posedge clk) begin
      if (rd_en) begin
        rd_data[b] <= rpwr ? mem[rd_addr[b]] : '0;
      end
    end
  end

endmodule
