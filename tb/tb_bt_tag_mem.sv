// tb_bt_tag_mem: self-checking test of the tag memory.
// A reference model of the tag array (valid, x, y per set and way) follows
// random writes, SR shifts, flushes and power gating changes.  After every
// operation, random lookups on all four sets and the victims of all sets are
// compared with the model: a lookup hits the first powered valid way with an
// equal tag; shifting decrements x and drops blocks whose x was 0.
module tb_bt_tag_mem;
  localparam int N = 15, S = 4, TXW = 4, TYW = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] pwr;
  logic shift, flush, wr;
  logic [S-1:0][TXW-1:0] lk_tx;
  logic [S-1:0][TYW-1:0] lk_ty;
  logic [S-1:0] lk_hit;
  logic [S-1:0][3:0] lk_way;
  logic [1:0] wr_idx; logic [3:0] wr_way; logic [TXW-1:0] wr_tx; logic [TYW-1:0] wr_ty;
  logic [S-1:0][3:0] victim;
  logic [S-1:0] vdirty;
  logic [5:0] vcount;

  bit m_v [S][N];
  int m_x [S][N];
  int m_y [S][N];
  int checks = 0, failures = 0;
  int n_shift_inval = 0;

  bt_tag_mem #(.N_WAYS(N), .TX_W(TXW), .TY_W(TYW)) dut (
    .clk, .rst_n, .way_pwr(pwr), .shift, .flush,
    .lk_tx, .lk_ty, .lk_hit, .lk_way,
    .wr_en(wr), .wr_idx, .wr_way, .wr_tx, .wr_ty,
    .victim, .victim_dirty(vdirty), .valid_count(vcount));

  always #5 clk = ~clk;

  task automatic compare();
    int cnt;
    for (int r = 0; r < 8; r++) begin
      for (int s = 0; s < S; s++) begin
        int w0 = $urandom_range(0, N - 1);
        // half of the lookups ask for a tag that is stored somewhere
        if (r % 2 == 0) begin lk_tx[s] = TXW'(m_x[s][w0]); lk_ty[s] = TYW'(m_y[s][w0]); end
        else begin lk_tx[s] = TXW'($urandom_range(0, 8)); lk_ty[s] = TYW'($urandom_range(0, 4)); end
      end
      #1;
      for (int s = 0; s < S; s++) begin
        int ew = -1;
        for (int w = 0; w < N; w++)
          if (ew < 0 && m_v[s][w] && pwr[w] && m_x[s][w] == int'(lk_tx[s]) && m_y[s][w] == int'(lk_ty[s])) ew = w;
        checks++;
        if (lk_hit[s] != (ew >= 0) || (ew >= 0 && int'(lk_way[s]) != ew)) begin
          failures++;
          $display("FAIL lookup set %0d (%0d,%0d): hit=%0d way=%0d expected way %0d",
                   s, lk_tx[s], lk_ty[s], lk_hit[s], lk_way[s], ew);
        end
      end
    end
    cnt = 0;
    for (int s = 0; s < S; s++) begin
      int ew = -1, mn = 99; bit ed = 0;
      for (int w = 0; w < N; w++) if (ew < 0 && pwr[w] && !m_v[s][w]) ew = w;
      if (ew < 0)
        for (int w = 0; w < N; w++)
          if (pwr[w] && m_x[s][w] < mn) begin mn = m_x[s][w]; ew = w; ed = 1; end
      checks++;
      if (int'(victim[s]) != ew || vdirty[s] != ed) begin
        failures++;
        $display("FAIL victim set %0d: %0d/%0d expected %0d/%0d", s, victim[s], vdirty[s], ew, ed);
      end
      for (int w = 0; w < N; w++) cnt += int'(m_v[s][w]);
    end
    checks++;
    if (int'(vcount) != cnt) begin
      failures++;
      $display("FAIL valid count %0d expected %0d", vcount, cnt);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pwr = '1; shift = 0; flush = 0; wr = 0;
    wr_idx = '0; wr_way = '0; wr_tx = '0; wr_ty = '0;
    lk_tx = '0; lk_ty = '0;
    foreach (m_v[s, w]) begin m_v[s][w] = 0; m_x[s][w] = 0; m_y[s][w] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 3000; i++) begin
      int op;
      op = $urandom_range(0, 99);
      @(negedge clk);
      if (op < 70) begin
        int s, w, x, y;
        s = $urandom_range(0, 3); w = $urandom_range(0, N - 1);
        x = $urandom_range(0, 8); y = $urandom_range(0, 4);
        wr = 1; wr_idx = 2'(s); wr_way = 4'(w); wr_tx = TXW'(x); wr_ty = TYW'(y);
        @(posedge clk); #1 wr = 0;
        m_v[s][w] = pwr[w]; m_x[s][w] = x; m_y[s][w] = y;
      end else if (op < 90) begin
        shift = 1;
        @(posedge clk); #1 shift = 0;
        for (int s = 0; s < S; s++) for (int w = 0; w < N; w++) begin
          if (m_x[s][w] == 0) begin
            if (m_v[s][w]) n_shift_inval++;
            m_v[s][w] = 0;
          end
          m_x[s][w] = (m_x[s][w] + 15) % 16;
        end
      end else if (op < 93) begin
        flush = 1;
        @(posedge clk); #1 flush = 0;
        foreach (m_v[s, w]) m_v[s][w] = 0;
      end else begin
        int n;
        n = $urandom_range(1, N);
        for (int w = 0; w < N; w++) pwr[w] = (w < n);
        @(posedge clk); #1;
        foreach (m_v[s, w]) if (!pwr[w]) m_v[s][w] = 0;
      end
      compare();
    end
    checks++;
    if (n_shift_inval == 0) begin
      failures++;
      $display("FAIL no block was invalidated by a shift");
    end
    $display("shift invalidations: %0d", n_shift_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
