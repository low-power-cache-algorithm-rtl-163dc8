// tb_bt_data_mem: self-checking test of the four-bank cache data memory.
// Fills every row of every bank, then mixes random single-row writes with
// parallel four-bank reads and checks the data one cycle after each read,
// including reads and writes of power-gated ways (read as zero, write lost).
module tb_bt_data_mem;
  import bt_cache_pkg::*;
  localparam int N = 15, D = N * 8;
  logic clk = 0;
  logic [N-1:0] pwr;
  logic wr_en, rd_en;
  logic [1:0] wr_idx;
  logic [6:0] wr_addr;
  row_t wr_data;
  logic [3:0][6:0] rd_addr;
  row_t [3:0] rd_data;
  row_t model [4][D];
  int checks = 0, failures = 0;

  bt_data_mem #(.N_WAYS(N)) dut (.clk, .way_pwr(pwr), .wr_en, .wr_idx, .wr_addr, .wr_data,
                                 .rd_en, .rd_addr, .rd_data);
  always #5 clk = ~clk;

  function automatic row_t rnd_row();
    return {$urandom, $urandom};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pwr = '1; wr_en = 0; rd_en = 0; wr_idx = 0; wr_addr = 0; wr_data = 0; rd_addr = '0;
    @(negedge clk);
    for (int b = 0; b < 4; b++) for (int a = 0; a < D; a++) begin
      wr_en = 1; wr_idx = 2'(b); wr_addr = 7'(a); wr_data = rnd_row();
      model[b][a] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 4000; i++) begin
      row_t exp_d [4];
      // occasionally gate ways 10..14
      if (i % 500 == 250) pwr = 15'h03ff;
      if (i % 500 == 0)   pwr = '1;
      wr_en = ($urandom_range(0, 1) == 1);
      wr_idx = 2'($urandom_range(0, 3));
      wr_addr = 7'($urandom_range(0, D - 1));
      wr_data = rnd_row();
      rd_en = 1;
      for (int b = 0; b < 4; b++) begin
        rd_addr[b] = 7'($urandom_range(0, D - 1));
        exp_d[b] = pwr[rd_addr[b] / 8] ? model[b][rd_addr[b]] : '0;
      end
      @(negedge clk);
      if (wr_en && pwr[wr_addr / 8]) model[wr_idx][wr_addr] = wr_data;
      rd_en = 0; wr_en = 0;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (rd_data[b] !== exp_d[b]) begin
          failures++;
          $display("FAIL bank %0d addr %0d: %h expected %h", b, rd_addr[b], rd_data[b], exp_d[b]);
        end
      end
      // read data must hold while rd_en is low
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (rd_data[b] !== exp_d[b]) begin failures++; $display("FAIL hold bank %0d", b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
