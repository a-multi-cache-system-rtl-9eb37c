// Test of cache_l1_system with its default sizes (3x3: two sub-modules of
// depth 256, 5x5: two sub-modules of depth 3).
//
// Cache L2 chunks of up to 3 rows are fed in the scheduler's order for two
// interleaved output rows (2x2 pooling grid), first for a 5x5 layer (columns
// split 3 + 2) and then for a 3x3 layer. The kernel size selects the module;
// every window on the 25-element output bus is compared with the reference
// (3x3 windows in elements 0..8, zero above) two clocks after the chunk that
// completed its column, together with its tag.
module tb_cache_l1_system;

  localparam int B = 16, TAG_W = 9, IH = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_k = 3'd5;
  logic [8:0] cfg_ch_in = 9'd3;
  logic flush = 0, in_valid = 0;
  logic [0:0] in_sel = '0;
  logic [IH-1:0][B-1:0] in_data = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid;
  logic [24:0][B-1:0] out_win;
  logic [TAG_W-1:0] out_tag;

  cache_l1_system dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [B-1:0] fm [2][256][40][5];
  logic [24:0][B-1:0] exp_q [$];
  logic [TAG_W-1:0] tag_q [$];
  longint when_q [$];
  int n5 = 0, n3 = 0;

  initial begin
    repeat (50000) @(posedge clk);
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
        logic [24:0][B-1:0] e; logic [TAG_W-1:0] t; longint w;
        e = exp_q.pop_front(); t = tag_q.pop_front(); w = when_q.pop_front();
        if (out_win !== e || out_tag !== t || w != cycle) begin
          failures++; $display("window mismatch at %0d (expected at %0d): got %h expected %h", cycle, w, out_win, e);
        end
        if (cfg_k == 3'd5) n5++; else n3++;
      end
    end
  end

  // send one column (row s, channel c, column x) as chunks
  task automatic column(input int k, input int s, input int c, input int x, input bit expect_out);
    for (int h = 0; h * IH < k; h++) begin
      for (int i = 0; i < IH; i++) in_data[i] = (h*IH + i < k) ? fm[s][c][x][h*IH + i] : '0;
      in_sel = 1'(s);
      in_tag = TAG_W'($urandom);
      in_valid = 1;
      if ((h + 1) * IH >= k && expect_out) begin
        logic [24:0][B-1:0] e;
        e = '0;
        for (int r = 0; r < k; r++)
          for (int j = 0; j < k; j++) e[r*k + j] = fm[s][c][x - k + 1 + j][r];
        exp_q.push_back(e); tag_q.push_back(in_tag); when_q.push_back(cycle + 2);
      end
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  task automatic band(input int k, input int ch, input int ow);
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < ch; c++)
        for (int x = 0; x < ow + k - 1; x++)
          for (int r = 0; r < k; r++) fm[s][c][x][r] = B'($urandom);
    cfg_k = 3'(k); cfg_ch_in = 9'(ch);
    for (int g = 0; g < ow / 2; g++)
      for (int s = 0; s < 2; s++)
        for (int pc = 0; pc < 2; pc++) begin
          int ox;
          ox = 2*g + pc;
          if (ox == 0) begin
            for (int c = 0; c < ch; c++)
              for (int j = 0; j < k; j++) column(k, s, c, j, 1'b0);
          end else begin
            for (int c = 0; c < ch; c++) column(k, s, c, ox + k - 1, 1'b1);
          end
        end
    repeat (4) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    band(5, 3, 6);
    band(3, 5, 8);
    band(5, 1, 4);
    band(3, 200, 4);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("%0d windows missing", exp_q.size()); end
    if (n5 == 0 || n3 == 0) begin failures++; $display("a kernel size produced no window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
