// Test of filters_cache at its default size (256 words of 64 x 25 x 8 bits,
// 128-bit beats, 100 beats per word).
//
// Layer A loads all 256 words with idle clocks between some beats; loaded_ch
// must count every completed word. All words are read back (one clock after
// rd_en) and compared. Layer B clears the cache and loads 3 words: the count
// restarts and the new words replace the old ones. The reload time of a layer
// is checked as Ch_in x 100 beats.
module tb_filters_cache;

  localparam int DEPTH = 256, W = 64*25*8, BUS_W = 128, BEATS = W / BUS_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, wr_valid = 0;
  logic [BUS_W-1:0] wr_data = '0;
  logic [8:0] loaded_ch;
  logic rd_en = 0;
  logic [7:0] rd_addr = '0;
  logic [W-1:0] rd_word;

  filters_cache dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [DEPTH];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int n, input bit gaps);
    int beats;
    beats = 0;
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (loaded_ch != 0) begin failures++; $display("count not cleared"); end
    for (int a = 0; a < n; a++) begin
      for (int i = 0; i < W/32; i++) ref_mem[a][i*32 +: 32] = $urandom;
      for (int b = 0; b < BEATS; b++) begin
        wr_data = ref_mem[a][b*BUS_W +: BUS_W]; wr_valid = 1;
        @(negedge clk);
        wr_valid = 0;
        beats++;
        if (gaps && $urandom_range(0, 7) == 0) @(negedge clk);
        if (b == BEATS - 2) begin
          checks++;
          if (int'(loaded_ch) != a) begin failures++; $display("loaded_ch %0d early", loaded_ch); end
        end
      end
      checks++;
      if (int'(loaded_ch) != a + 1) begin failures++; $display("loaded_ch %0d, expected %0d", loaded_ch, a + 1); end
    end
    checks++;
    if (beats != n * BEATS) begin failures++; $display("reload took %0d beats", beats); end
  endtask

  task automatic check_word(input int a);
    rd_addr = 8'(a); rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_word !== ref_mem[a]) begin
      failures++;
      if (failures < 5) $display("word %0d differs", a);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load(DEPTH, 1'b1);
    for (int a = 0; a < DEPTH; a++) check_word(a);
    load(3, 1'b0);
    for (int a = 0; a < 3; a++) check_word(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
