// Test of cache_l1_submodule (3x3, IWP = 1, depth 8).
//
// Feeds whole rows the way the scheduler does: at the row start FW columns per
// channel (no output allowed), then one new column per channel and step. Every
// window that comes out is compared with the FWxFH slice of a random reference
// feature map, and must appear exactly one clock after its beat. Rows are run
// with 3 channels and with 1 channel (back-to-back accesses of the same word),
// separated by a flush.
module tb_cache_l1_submodule;

  localparam int FW = 3, FH = 3, B = 16, DEPTH = 8, TAG_W = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] cfg_ch_in = 4'd3;
  logic flush = 0, in_valid = 0;
  logic [FH-1:0][B-1:0] in_col = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid, loading, running;
  logic [FW*FH-1:0][B-1:0] out_win;
  logic [TAG_W-1:0] out_tag;

  cache_l1_submodule #(.FW(FW), .FH(FH), .IWP(1), .DEPTH(DEPTH), .B(B), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [B-1:0] fm [DEPTH][32][FH];
  logic [FW*FH-1:0][B-1:0] exp_q [$];
  logic [TAG_W-1:0] tag_q [$];
  longint when_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected window at %0d", cycle);
      end else begin
        logic [FW*FH-1:0][B-1:0] e;
        longint t;
        logic [TAG_W-1:0] tg;
        e = exp_q.pop_front(); t = when_q.pop_front(); tg = tag_q.pop_front();
        if (out_win !== e || out_tag !== tg) begin
          failures++; $display("window mismatch at %0d: got %h expected %h", cycle, out_win, e);
        end
        checks++;
        if (t != cycle) begin failures++; $display("latency: window at %0d, expected %0d", cycle, t); end
      end
    end
  end

  task automatic beat(input int c, input int x, input bit expect_out);
    for (int r = 0; r < FH; r++) in_col[r] = fm[c][x][r];
    in_tag = TAG_W'($urandom);
    in_valid = 1;
    if (expect_out) begin
      logic [FW*FH-1:0][B-1:0] e;
      for (int r = 0; r < FH; r++)
        for (int j = 0; j < FW; j++) e[r*FW + j] = fm[c][x - FW + 1 + j][r];
      exp_q.push_back(e); tag_q.push_back(in_tag); when_q.push_back(cycle + 1);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic run_row(input int ch, input int w, input int gap);
    for (int c = 0; c < ch; c++)
      for (int x = 0; x < w; x++)
        for (int r = 0; r < FH; r++) fm[c][x][r] = B'($urandom);
    cfg_ch_in = 4'(ch);
    // row start: FW columns per channel, no output
    for (int c = 0; c < ch; c++)
      for (int x = 0; x < FW; x++) beat(c, x, 1'b0);
    checks++;
    if (!running) begin failures++; $display("not in regime after the load phase"); end
    // regime: one new column per channel per step
    for (int x = FW; x < w; x++)
      for (int c = 0; c < ch; c++) begin
        beat(c, x, 1'b1);
        repeat (gap) @(negedge clk);
      end
    repeat (3) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0;
    checks++;
    if (loading || running) begin failures++; $display("not idle after flush"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (loading || running || out_valid) begin failures++; $display("not idle after reset"); end
    run_row(3, 12, 0);
    run_row(1, 10, 0);
    run_row(8, 6, 1);
    run_row(2, 9, 0);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d windows missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
