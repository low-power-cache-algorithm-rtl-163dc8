// ref_frame_mem_model: behavioural model of the external reference frame
// memory on the system bus, for simulation only.  It accepts one 8x8 block
// request at a time (valid/ready, absolute block coordinates) and, after
// LAT cycles, returns the 8 rows of the block on consecutive cycles, or with
// random one-cycle gaps when GAPS is set.  Pixel values come from the
// formula in tb_ref_pkg.  `n_req` counts the block requests served.
module ref_frame_mem_model
  import bt_cache_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int LAT  = 4,
  parameter bit GAPS = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic signed [ABS_W-1:0] req_bx,
  input  logic signed [ABS_W-1:0] req_by,
  output logic                    rdata_valid,
  output row_t                    rdata,
  output int                      n_req
);
  int bx, by, wait_c, row;
  bit busy;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 0; rdata_valid <= 0; rdata <= '0; n_req <= 0;
      bx <= 0; by <= 0; wait_c <= 0; row <= 0;
    end else begin
      rdata_valid <= 0;
      if (!busy) begin
        if (req_valid) begin
          busy <= 1; bx <= int'(req_bx); by <= int'(req_by); wait_c <= LAT; row <= 0;
          n_req <= n_req + 1;
        end
      end else if (wait_c > 0) begin
        wait_c <= wait_c - 1;
      end else if (!GAPS || $urandom_range(0, 3) != 0) begin
        rdata_valid <= 1;
        rdata <= ref_row(bx, by, row);
        row <= row + 1;
        if (row == 7) busy <= 0;
      end
    end
  end
endmodule
