// Workload test of cnn_accel_top at its default parameters: bands taken from
// the cloud-detection network the accelerator was built for (512 x 512 x 3
// input, a 5x5 first layer with 2x2 pooling, then triplets of 3x3, 1x1, 3x3
// layers, stride 1).
//
// Five bands are run at full size, each compared result by result with a
// convolution + max-pooling reference computed here from random data:
//   - first layer: 5x5, 3 channels, 512-wide input (508 outputs), 2x2
//     pooling, three consecutive bands as a layer is driven: the filters are
//     loaded once, and the third band is started before its rows arrive, so
//     the schedule stalls on Cache L2 misses while the rows stream in;
//   - a 3x3 layer with 256 input channels (the largest 3x3 channel count of
//     the network) and 2x2 pooling, 58-wide input (56 outputs);
//   - a 1x1 layer with 256 input channels, 58 outputs, no pooling.
// The channel counts of the layers after the first are not known apart from
// the 256 maximum, and the widths assume no padding; both are this test's
// choice. For each preloaded band the busy time is checked against the
// schedule: a row start reads every window column of every channel, after
// that one column per channel. For 3x3 layers the extra time of a row start
// over one output of the wide-port design equals ceil(C*9/3) - floor(C*9/9)
// clocks, which is checked too. The whole run takes a few seconds.
module tb_workload_cloudscout;
  import cnn_pkg::*;

  localparam int N  = N_PAR;
  localparam int MAXC = 256;
  localparam int MAXW = 512;

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
  int rs_extra_3x3 = -1;
  bit keep_filters = 0;   // next band reuses the filters already in the Filters Cache
  int ev_row_start = 0, ev_regime = 0, ev_bypass = 0, ev_miss = 0, ev_pool = 0,
      ev_sub1 = 0, ev_k5 = 0, ev_k1 = 0, ev_drain = 0, ev_filt_wait = 0;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
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
    if (!keep_filters)
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
    filt_clear = !keep_filters; fm_clear = 1;
    @(negedge clk);
    filt_clear = 0; fm_clear = 0;
    if (preload) begin
      if (!keep_filters) send_filters(k, ch);
      send_fm(rows, ch, w, 0);
      while (int'(dut.cols_filled) < w) @(negedge clk);   // all columns in Cache L2
      start = 1; @(negedge clk); start = 0;
    end else begin
      start = 1; @(negedge clk); start = 0;
      repeat (5) @(negedge clk);
      if (!keep_filters) send_filters(k, ch);
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
      if (k == 3 && int'(cnt_busy) == expect_busy)
        rs_extra_3x3 = (int'(cnt_busy) - 1 - 8 - 12 - pool * ow * ch) / pool;
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
    run_band(5, 2, 3, 508, 1'b1, 0);
    // two more bands of the same layer: the filters stay loaded; the last band
    // is started before its rows arrive, so it waits on Cache L2 as it goes
    keep_filters = 1;
    run_band(5, 2, 3, 508, 1'b1, 0);
    run_band(5, 2, 3, 508, 1'b0, 0);
    keep_filters = 0;
    checks++;
    if (ev_miss == 0) begin failures++; $display("streamed band saw no Cache L2 miss"); end
    run_band(3, 2, 256, 56, 1'b1, 0);
    run_band(1, 1, 256, 58, 1'b1, 0);
    // row-start slowdown of a 3x3 layer: measured extra clocks per row start
    checks++;
    if (rs_extra_3x3 != (256*9 + 2)/3 - (256*9)/9) begin
      failures++;
      $display("3x3 row-start extra %0d clocks, expected %0d", rs_extra_3x3, (256*9 + 2)/3 - (256*9)/9);
    end
    $display("3x3 row-start extra clocks per row: %0d", rs_extra_3x3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
