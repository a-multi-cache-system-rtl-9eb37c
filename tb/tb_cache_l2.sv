// Test of cache_l2 at its default size (3 banks of 110,592 elements).
//
// A band of random elements (rows x channels x columns) is written as a
// column-major stream, with idle clocks in between; cols_filled must count
// each column exactly when its last element has been written. Then every
// chunk the scheduler can ask for (top row 0..rows-n, n = 1..3 rows, every
// channel and column) is read and compared, one clock after rd_en, with zeros
// in the lanes beyond n. A second band with 256 channels reaches deep
// addresses; clear must empty the fill count.
module tb_cache_l2;

  localparam int IH = 3, B = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [8:0] cfg_ch_in = 9'd3;
  logic [3:0] cfg_rows = 4'd4;
  logic clear = 0, wr_valid = 0;
  logic [B-1:0] wr_data = '0;
  logic [10:0] cols_filled;
  logic rd_en = 0;
  logic [3:0] rd_row = '0;
  logic [1:0] rd_n = 2'd1;
  logic [8:0] rd_ch = '0;
  logic [9:0] rd_x = '0;
  logic rd_valid;
  logic [IH-1:0][B-1:0] rd_data;

  cache_l2 dut (.*);

  int checks = 0, failures = 0;

  logic [B-1:0] fm [6][256][64];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_band(input int rows, input int ch, input int w);
    for (int x = 0; x < w; x++)
      for (int c = 0; c < ch; c++)
        for (int r = 0; r < rows; r++) fm[r][c][x] = B'($urandom);
    cfg_rows = 4'(rows); cfg_ch_in = 9'(ch);
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (cols_filled != 0) begin failures++; $display("fill count not cleared"); end
    for (int x = 0; x < w; x++) begin
      for (int c = 0; c < ch; c++)
        for (int r = 0; r < rows; r++) begin
          checks++;
          if (int'(cols_filled) != x) begin
            failures++; $display("cols_filled %0d while writing column %0d", cols_filled, x);
          end
          wr_data = fm[r][c][x]; wr_valid = 1;
          @(negedge clk);
          wr_valid = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
    end
    checks++;
    if (int'(cols_filled) != w) begin failures++; $display("cols_filled %0d, expected %0d", cols_filled, w); end
  endtask

  task automatic read_chunk(input int row, input int n, input int c, input int x);
    rd_row = 4'(row); rd_n = 2'(n); rd_ch = 9'(c); rd_x = 10'(x); rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (!rd_valid) begin failures++; $display("rd_valid missing"); end
    for (int i = 0; i < IH; i++) begin
      logic [B-1:0] e;
      e = (i < n) ? fm[row + i][c][x] : '0;
      checks++;
      if (rd_data[i] !== e) begin
        failures++;
        if (failures < 10) $display("read row %0d n %0d ch %0d x %0d lane %0d: got %h expected %h", row, n, c, x, i, rd_data[i], e);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    write_band(6, 3, 20);
    for (int x = 0; x < 20; x++)
      for (int c = 0; c < 3; c++)
        for (int n = 1; n <= 3; n++)
          for (int row = 0; row + n <= 6; row++) read_chunk(row, n, c, x);
    write_band(4, 256, 8);
    for (int k = 0; k < 3000; k++) begin
      int n, row;
      n = $urandom_range(1, 3);
      row = $urandom_range(0, 4 - n);
      read_chunk(row, n, $urandom_range(0, 255), $urandom_range(0, 7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
