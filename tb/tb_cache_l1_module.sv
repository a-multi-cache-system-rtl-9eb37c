// Test of cache_l1_module (3x3, two sub-modules, depth 4).
//
// Two output rows are processed interleaved in 2x2 pooling-grid order:
// (row 0, x), (row 0, x+1), (row 1, x), (row 1, x+1), ... Each row's beats go
// to its own sub-module through in_sel; windows are checked against a random
// reference per row, one clock after their beat. Mixing up the rows or the
// select would corrupt the windows. A flush ends each band.
module tb_cache_l1_module;

  localparam int FW = 3, FH = 3, B = 16, DEPTH = 4, TAG_W = 9, N_SUB = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_ch_in = 3'd3;
  logic flush = 0, in_valid = 0;
  logic [0:0] in_sel = '0;
  logic [FH-1:0][B-1:0] in_col = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid;
  logic [FW*FH-1:0][B-1:0] out_win;
  logic [TAG_W-1:0] out_tag;

  cache_l1_module #(.FW(FW), .FH(FH), .N_SUB(N_SUB), .DEPTH(DEPTH), .B(B), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [B-1:0] fm [N_SUB][DEPTH][32][FH];
  logic [FW*FH-1:0][B-1:0] exp_q [$];
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
        failures++; $display("unexpected window");
      end else begin
        logic [FW*FH-1:0][B-1:0] e; longint w;
        e = exp_q.pop_front(); w = when_q.pop_front();
        if (out_win !== e || w != cycle) begin
          failures++; $display("window mismatch at %0d: got %h expected %h", cycle, out_win, e);
        end
      end
    end
  end

  task automatic beat(input int s, input int c, input int x, input bit expect_out);
    for (int r = 0; r < FH; r++) in_col[r] = fm[s][c][x][r];
    in_sel = 1'(s);
    in_valid = 1;
    if (expect_out) begin
      logic [FW*FH-1:0][B-1:0] e;
      for (int r = 0; r < FH; r++)
        for (int j = 0; j < FW; j++) e[r*FW + j] = fm[s][c][x - FW + 1 + j][r];
      exp_q.push_back(e); when_q.push_back(cycle + 1);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // one output (row s, column ox) in the scheduler's order
  task automatic output_step(input int s, input int ox, input int ch);
    if (ox == 0) begin
      for (int c = 0; c < ch; c++)
        for (int j = 0; j < FW; j++) beat(s, c, j, 1'b0);
    end else begin
      for (int c = 0; c < ch; c++) beat(s, c, ox + FW - 1, 1'b1);
    end
  endtask

  task automatic band(input int ch, input int ow);
    for (int s = 0; s < N_SUB; s++)
      for (int c = 0; c < ch; c++)
        for (int x = 0; x < ow + FW - 1; x++)
          for (int r = 0; r < FH; r++) fm[s][c][x][r] = B'($urandom);
    cfg_ch_in = 3'(ch);
    for (int g = 0; g < ow / 2; g++)
      for (int s = 0; s < N_SUB; s++)
        for (int pc = 0; pc < 2; pc++) output_step(s, 2*g + pc, ch);
    repeat (2) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    band(3, 8);
    band(1, 6);
    band(4, 4);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d windows missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
