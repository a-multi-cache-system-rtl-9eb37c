// Test of scheduler.
//
// An independent model lists, for a band, every Cache L2 read the schedule
// must issue, in order: pooling-grid order of outputs, channels in order,
// whole windows column by column at a row start (bypass and Cache L1), only
// the new column afterwards (Cache L1), columns split into chunks of 3 rows,
// the sub-module select, the kernel positions of bypass chunks and the last
// flag. Each issued read is compared with the next entry. Bands with data
// present must take exactly the expected number of busy clocks (row start
// cost 3*C (3x3) or 10*C (5x5), regime C or 3*C, drains); bands where the
// filters and columns arrive late must never read a missing column, must count
// miss clocks, and must still issue the same sequence. done and the Cache L1
// flush must pulse together at the end.
module tb_scheduler;
  import cnn_pkg::*;

  localparam int IH = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_k = 3'd3;
  logic [8:0] cfg_ch_in = 9'd1;
  logic [9:0] cfg_out_w = 10'd2;
  logic [1:0] cfg_pool = 2'd1;
  logic start = 0, busy, done;
  logic [10:0] cols_filled = '0;
  logic [8:0] filt_loaded = '0;
  logic rd_en, rd_byp, rd_l1, l1_flush;
  logic [3:0] rd_row;
  logic [1:0] rd_n;
  logic [CH_W-1:0] rd_ch;
  logic [9:0] rd_x;
  logic [0:0] rd_sel;
  logic [IH-1:0][KIDX_W-1:0] rd_kidx;
  logic [IH-1:0] rd_kidx_en;
  beat_tag_t rd_tag;
  logic [31:0] cnt_busy, cnt_miss, cnt_row_start, cnt_regime, cnt_bypass;

  scheduler dut (.*);

  int checks = 0, failures = 0;

  typedef struct {
    int row, n, ch, x, sel;
    bit byp, l1, last;
    int kidx [IH];
  } rd_t;
  rd_t exp_q [$];
  int n_done = 0, n_flush = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (done) n_done++;
      if (l1_flush) n_flush++;
      if (done != l1_flush) begin failures++; $display("done and flush apart"); end
      if (rd_en) begin
        checks++;
        if (int'(rd_x) >= int'(cols_filled)) begin failures++; $display("read of missing column %0d", rd_x); end
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected read");
        end else begin
          rd_t e;
          bit ok;
          e = exp_q.pop_front();
          ok = (int'(rd_row) == e.row) && (int'(rd_n) == e.n) && (int'(rd_ch) == e.ch) &&
               (int'(rd_x) == e.x) && (rd_byp == e.byp) && (rd_l1 == e.l1) &&
               (rd_tag.last == e.last) && (int'(rd_tag.ch) == e.ch) && (e.l1 == 0 || int'(rd_sel) == e.sel);
          if (e.byp)
            for (int i = 0; i < e.n; i++) if (!rd_kidx_en[i] || int'(rd_kidx[i]) != e.kidx[i]) ok = 0;
          if (!ok) begin
            failures++;
            if (failures < 10)
              $display("read mismatch: got row %0d n %0d ch %0d x %0d byp %0d l1 %0d last %0d, expected row %0d n %0d ch %0d x %0d byp %0d l1 %0d last %0d",
                       rd_row, rd_n, rd_ch, rd_x, rd_byp, rd_l1, rd_tag.last, e.row, e.n, e.ch, e.x, e.byp, e.l1, e.last);
          end
        end
      end
    end
  end

  // Expected read sequence of a band.
  task automatic model(input int k, input int pool, input int ch, input int ow);
    int nch;
    nch = (k + IH - 1) / IH;
    for (int g = 0; g < ow / pool; g++)
      for (int pr = 0; pr < pool; pr++)
        for (int pc = 0; pc < pool; pc++) begin
          int x;
          bit ld;
          x = g * pool + pc;
          ld = (k > 1) && (x == 0);
          for (int c = 0; c < ch; c++)
            for (int j = 0; j < (ld ? k : 1); j++)
              for (int h = 0; h < nch; h++) begin
                rd_t e;
                e.row = pr + h * IH;
                e.n   = (k - h * IH < IH) ? k - h * IH : IH;
                e.ch  = c;
                e.x   = (k == 1) ? x : (ld ? j : x + k - 1);
                e.sel = pr;
                e.byp = ld || (k == 1);
                e.l1  = (k > 1);
                e.last = (c == ch - 1) && (!ld || j == k - 1) && (h == nch - 1);
                for (int i = 0; i < IH; i++) e.kidx[i] = (k == 1) ? 0 : (h * IH + i) * k + j;
                exp_q.push_back(e);
              end
        end
  endtask

  task automatic band(input int k, input int pool, input int ch, input int ow, input bit late);
    int w, dn;
    w = ow + k - 1;
    model(k, pool, ch, ow);
    cfg_k = 3'(k); cfg_pool = 2'(pool); cfg_ch_in = 9'(ch); cfg_out_w = 10'(ow);
    dn = n_done;
    if (late) begin
      cols_filled = '0; filt_loaded = '0;
    end else begin
      cols_filled = 11'(w); filt_loaded = 9'(ch);
    end
    start = 1; @(negedge clk); start = 0;
    if (late) begin
      repeat (15) @(negedge clk);
      filt_loaded = 9'(ch);
      while (int'(cols_filled) < w) begin
        repeat (7) @(negedge clk);
        cols_filled = cols_filled + 1'b1;
      end
    end
    while (busy) @(negedge clk);
    @(negedge clk);
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("%0d reads missing", exp_q.size()); exp_q.delete(); end
    if (n_done != dn + 1) begin failures++; $display("done count"); end
    if (late && cnt_miss == 0) begin failures++; $display("no miss counted"); end
    if (!late) begin
      int per_start, per_reg, issue, expect_busy;
      per_start = (k == 1) ? 1 : k * ((k + 2) / 3);
      per_reg   = (k == 5) ? 3 : 1;
      issue = pool * (per_start * ch + (ow - 1) * per_reg * ch);
      if (k == 5) issue -= pool * (per_reg - 2);
      expect_busy = 1 + issue + ((pool == 2 && k > 1) ? 8 : 0) + 12;
      checks += 2;
      if (int'(cnt_busy) != expect_busy || cnt_miss != 0) begin
        failures++; $display("k=%0d pool=%0d ch=%0d ow=%0d: busy %0d, expected %0d", k, pool, ch, ow, cnt_busy, expect_busy);
      end
      if (k > 1 && (int'(cnt_row_start) != pool || int'(cnt_regime) != pool * (ow - 1))) begin
        failures++; $display("row starts %0d regime %0d", cnt_row_start, cnt_regime);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    band(3, 1, 4, 10, 0);
    band(3, 2, 3, 8, 0);
    band(5, 2, 3, 6, 0);
    band(5, 1, 2, 5, 0);
    band(1, 1, 6, 7, 0);
    band(1, 2, 3, 6, 0);
    band(3, 2, 5, 6, 1);
    band(5, 2, 3, 4, 1);
    band(1, 1, 4, 5, 1);
    band(3, 1, 256, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
