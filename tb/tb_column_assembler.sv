// Test of column_assembler (FH_MAX = 5, IH = 3).
//
// For kernel heights 5, 3, 4, 2 and 1 random columns are sent as chunks of IH
// rows (top first, the remainder last), with and without idle clocks between
// chunks. Each assembled column must equal the sent one (zero above the kernel
// height), carry the tag of its last chunk and appear one clock after it.
module tb_column_assembler;

  localparam int FH_MAX = 5, IH = 3, B = 16, TAG_W = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_fh = 3'd5;
  logic in_valid = 0;
  logic [IH-1:0][B-1:0] in_data = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid;
  logic [FH_MAX-1:0][B-1:0] out_col;
  logic [TAG_W-1:0] out_tag;

  column_assembler #(.FH_MAX(FH_MAX), .IH(IH), .B(B), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [FH_MAX-1:0][B-1:0] exp_q [$];
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
        failures++; $display("unexpected column");
      end else begin
        logic [FH_MAX-1:0][B-1:0] e; logic [TAG_W-1:0] t; longint w;
        e = exp_q.pop_front(); t = tag_q.pop_front(); w = when_q.pop_front();
        if (out_col !== e || out_tag !== t || w != cycle) begin
          failures++;
          $display("column mismatch at %0d (expected at %0d): got %h/%h expected %h/%h", cycle, w, out_col, out_tag, e, t);
        end
      end
    end
  end

  task automatic send_column(input int fh, input int gap);
    logic [FH_MAX-1:0][B-1:0] col;
    col = '0;
    for (int r = 0; r < fh; r++) col[r] = B'($urandom);
    cfg_fh = 3'(fh);
    for (int h = 0; h * IH < fh; h++) begin
      for (int i = 0; i < IH; i++)
        in_data[i] = (h*IH + i < fh) ? col[h*IH + i] : B'($urandom);  // unused lanes hold junk
      in_tag = TAG_W'($urandom);
      in_valid = 1;
      if ((h + 1) * IH >= fh) begin
        exp_q.push_back(col); tag_q.push_back(in_tag); when_q.push_back(cycle + 1);
      end
      @(negedge clk);
      in_valid = 0;
      repeat (gap) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) send_column(5, 0);
    for (int n = 0; n < 10; n++) send_column(5, n % 3);
    for (int n = 0; n < 20; n++) send_column(3, 0);
    for (int n = 0; n < 10; n++) send_column(4, 1);
    for (int n = 0; n < 10; n++) send_column(2, 0);
    for (int n = 0; n < 10; n++) send_column(1, 0);
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d columns missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
