// End-to-end test of cnn_accel_top at its default parameters.
//
// Runs bands through the whole accelerator: filters and feature-map rows are
// sent as bus beats, the band is started, and every pooled result vector is
// compared with a convolution + max-pooling reference computed here from the
// same random data. Bands cover: 3x3 with 2x2 pooling (both Cache L1
// sub-modules, row starts, regime, drains), 5x5 with 2x2 pooling (two-chunk
// columns, three beats per window), 1x1 without pooling (bypass only) and a
// 3x3 band started before its data arrive (filter wait and Cache L2 misses).
// For a band without misses the busy time is checked against the schedule:
// per row 3*C clocks for the first output and C for each further one.
// Each mechanism must be seen at least once.
module tb_cnn_accel_top;
  import cnn_pkg::*;

  localparam int N  = N_PAR;
  localparam int MAXC = 8;
  localparam int MAXW = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] cfg_k; logic [8:0] cfg_ch_in; logic [9:0] cfg_out_w; logic [1:0] cfg_pool;
  logic start = 0, busy, done, fm_clear = 0, filt_clear = 0;
  logic s_valid = 0, s_ready, s_dest = 0; logic [BUS_W-1:0] s_data = '0;
  logic m_valid, m_ready = 1, res_overflow;
  logic [N*ACC_W-1:0] m_data;
  logic [31:0] cnt_busy, cnt_miss, cnt_row_start, cnt_regime, cnt_bypass;

  cnn_accel_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // data of the current band
  int fm [6][MAXC][MAXW];
  int wt [N][MAXC][25];
  longint expv [MAXW][N];
  int n_exp, n_got;

  // mechanism counters
  int ev_row_start = 0, ev_regime = 0, ev_bypass = 0, ev_miss = 0, ev_pool = 0,
      ev_sub1 = 0, ev_k5 = 0, ev_k1 = 0, ev_drain = 0, ev_filt_wait = 0;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect results
  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready) begin
      if (n_got < n_exp) begin
        for (int f = 0; f < N; f++) begin
          longint got;
          got = longint'($signed(m_data[f*ACC_W +: ACC_W]));
          checks++;
          if (got != expv[n_got][f]) begin
            failures++;
            if (failures < 10)
              $display("mismatch result %0d filter %0d: got %0d expected %0d", n_got, f, got, expv[n_got][f]);
          end
        end
      end else begin
        failures++;
        $display("unexpected extra result");
      end
      n_got <= n_got + 1;
    end
  end

  // Bus stimulus is driven on the falling edge (callers start there).
  task automatic send_beat(input logic dest, input logic [BUS_W-1:0] d);
    while (!s_ready) @(negedge clk);
    s_valid = 1; s_dest = dest; s_data = d;
    @(negedge clk);
    s_valid = 0;
  endtask

  task automatic send_filters(input int k, input int ch);
    for (int c = 0; c < ch; c++) begin
      logic [N*KK*B_FILT-1:0] word;
      word = '0;
      for (int f = 0; f < N; f++)
        for (int kk = 0; kk < k*k; kk++)
          word[(f*KK + kk)*B_FILT +: B_FILT] = B_FILT'(wt[f][c][kk]);
      for (int b = 0; b < N*KK*B_FILT/BUS_W; b++) send_beat(1'b1, word[b*BUS_W +: BUS_W]);
    end
  endtask

  task automatic send_fm(input int rows, input int ch, input int w, input int gap);
    logic [BUS_W-1:0] beat;
    int e;
    e = 0; beat = '0;
    for (int x = 0; x < w; x++)
      for (int c = 0; c < ch; c++)
        for (int r = 0; r < rows; r++) begin
          beat[e*B_IN +: B_IN] = B_IN'(fm[r][c][x]);
          e++;
          if (e == BUS_W/B_IN) begin
            send_beat(1'b0, beat);
            repeat (gap) @(negedge clk);
            e = 0; beat = '0;
          end
        end
    if (e != 0) send_beat(1'b0, beat);
  endtask

  task automatic make_band(input int k, input int pool, input int ch, input int ow);
    int rows, w;
    rows = k + pool - 1; w = ow + k - 1;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < ch; c++)
        for (int x = 0; x < w; x++) fm[r][c][x] = int'($urandom_range(0, 2000)) - 1000;
    for (int f = 0; f < N; f++)
      for (int c = 0; c < ch; c++)
        for (int kk = 0; kk < 25; kk++) wt[f][c][kk] = int'($urandom_range(0, 255)) - 128;
    // reference: convolution then max pooling in grid order
    n_exp = 0;
    for (int g = 0; g < ow/pool; g++) begin
      for (int f = 0; f < N; f++) begin
        longint best;
        best = 0;
        for (int pr = 0; pr < pool; pr++)
          for (int pc = 0; pc < pool; pc++) begin
            longint s;
            s = 0;
            for (int c = 0; c < ch; c++)
              for (int r = 0; r < k; r++)
                for (int j = 0; j < k; j++)
                  s += longint'(fm[pr + r][c][g*pool + pc + j]) * longint'(wt[f][c][r*k + j]);
            if ((pr == 0 && pc == 0) || s > best) best = s;
          end
        expv[g][f] = best;
      end
      n_exp++;
    end
  endtask

  // One band. preload = 1: data first, then start; 0: start first, data later.
  task automatic run_band(input int k, input int pool, input int ch, input int ow,
                          input bit preload, input int gap);
    int rows, w;
    longint t0;
    rows = k + pool - 1; w = ow + k - 1;
    make_band(k, pool, ch, ow);
    n_got = 0;
    @(negedge clk);
    cfg_k = 3'(k); cfg_pool = 2'(pool); cfg_ch_in = 9'(ch); cfg_out_w = 10'(ow);
    @(negedge clk);
    filt_clear = 1; fm_clear = 1;
    @(negedge clk);
    filt_clear = 0; fm_clear = 0;
    if (preload) begin
      send_filters(k, ch);
      send_fm(rows, ch, w, 0);
      while (int'(dut.cols_filled) < w) @(negedge clk);   // all columns in Cache L2
      start = 1; @(negedge clk); start = 0;
    end else begin
      start = 1; @(negedge clk); start = 0;
      repeat (5) @(negedge clk);
      send_filters(k, ch);
      send_fm(rows, ch, w, gap);
    end
    t0 = cycle;
    while (!done) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (n_got != n_exp) begin
      failures++;
      $display("band k=%0d pool=%0d: %0d results, expected %0d", k, pool, n_got, n_exp);
    end
    checks++;
    if (res_overflow) begin failures++; $display("result FIFO overflow"); end
    ev_row_start += int'(cnt_row_start);
    ev_regime    += int'(cnt_regime);
    ev_bypass    += int'(cnt_bypass);
    if (!preload) ev_miss += int'(cnt_miss);
    if (pool == 2) ev_pool++;
    if (pool == 2 && k > 1) ev_sub1++;
    if (k == 5) ev_k5++;
    if (k == 1) ev_k1++;
    if (pool == 2 && k > 1) ev_drain++;
    if (!preload && cnt_miss > 0) ev_filt_wait++;
    // busy time of a band without misses
    if (preload) begin
      int issue, expect_busy;
      int per_ch_start, per_ch_reg;
      per_ch_start = (k == 1) ? 1 : k * ((k + 2) / 3);
      per_ch_reg   = (k == 1) ? 1 : ((k == 5) ? 3 : 1);
      issue = pool * (per_ch_start * ch + (ow - 1) * per_ch_reg * ch);
      if (k == 5) issue -= pool * (per_ch_reg - ((k + 2) / 3));  // a row's last window is followed by a drain instead
      expect_busy = 1 + issue + ((pool == 2 && k > 1) ? 8 : 0) + 12;
      checks++;
      if (int'(cnt_busy) != expect_busy || cnt_miss != 0) begin
        failures++;
        $display("band k=%0d pool=%0d ch=%0d ow=%0d: busy %0d clocks (miss %0d), expected %0d",
                 k, pool, ch, ow, cnt_busy, cnt_miss, expect_busy);
      end
      checks++;
      if ((k > 1) && int'(cnt_row_start) != pool) begin
        failures++; $display("row starts %0d, expected %0d", cnt_row_start, pool);
      end
    end
    $display("band k=%0d pool=%0d ch=%0d ow=%0d preload=%0d: busy=%0d miss=%0d rowstart=%0d regime=%0d bypass=%0d results=%0d",
             k, pool, ch, ow, preload, cnt_busy, cnt_miss, cnt_row_start, cnt_regime, cnt_bypass, n_got);
  endtask

  initial begin
    cfg_k = 3; cfg_ch_in = 1; cfg_out_w = 2; cfg_pool = 1;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_band(3, 2, 4, 6, 1'b1, 0);
    run_band(5, 2, 3, 4, 1'b1, 0);
    run_band(1, 1, 5, 4, 1'b1, 0);
    run_band(3, 1, 3, 8, 1'b1, 0);
    run_band(3, 1, 3, 8, 1'b0, 2);
    run_band(5, 2, 2, 6, 1'b0, 1);

    checks += 10;
    if (ev_row_start == 0) begin failures++; $display("no row start seen"); end
    if (ev_regime    == 0) begin failures++; $display("no regime output seen"); end
    if (ev_bypass    == 0) begin failures++; $display("no bypass chunk seen"); end
    if (ev_miss      == 0) begin failures++; $display("no Cache L2 miss seen"); end
    if (ev_pool      == 0) begin failures++; $display("no pooling band"); end
    if (ev_sub1      == 0) begin failures++; $display("second sub-module never used"); end
    if (ev_k5        == 0) begin failures++; $display("no 5x5 band"); end
    if (ev_k1        == 0) begin failures++; $display("no 1x1 band"); end
    if (ev_drain     == 0) begin failures++; $display("no drain"); end
    if (ev_filt_wait == 0) begin failures++; $display("no wait for data"); end
    $display("mechanisms: row_start=%0d regime=%0d bypass=%0d miss=%0d pool=%0d sub1=%0d k5=%0d k1=%0d drain=%0d wait=%0d",
             ev_row_start, ev_regime, ev_bypass, ev_miss, ev_pool, ev_sub1, ev_k5, ev_k1, ev_drain, ev_filt_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
