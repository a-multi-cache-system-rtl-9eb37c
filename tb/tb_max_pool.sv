// Test of max_pool at its default size (64 channels of 40 bits).
//
// With cfg_pool = 2 every four consecutive inputs must give one output, the
// per-channel signed maximum, one clock after the fourth input; negative and
// mixed-sign values are included. With cfg_pool = 1 every input passes
// through. Inputs arrive with random idle clocks in between.
module tb_max_pool;

  localparam int N = 64, ACCW = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] cfg_pool = 2'd2;
  logic in_valid = 0;
  logic [N-1:0][ACCW-1:0] in_vec = '0;
  logic out_valid;
  logic [N-1:0][ACCW-1:0] out_vec;

  max_pool dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  longint exp_q [$];
  longint when_q [$];
  int n_out = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (when_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        longint w;
        w = when_q.pop_front();
        if (w != cycle) begin failures++; $display("output at %0d, expected %0d", cycle, w); end
        for (int f = 0; f < N; f++) begin
          longint e;
          e = exp_q.pop_front();
          checks++;
          if (longint'($signed(out_vec[f])) != e) begin
            failures++;
            if (failures < 10) $display("channel %0d: got %0d expected %0d", f, $signed(out_vec[f]), e);
          end
        end
      end
    end
  end

  task automatic window(input int p);
    longint best [N];
    for (int n = 0; n < p*p; n++) begin
      for (int f = 0; f < N; f++) begin
        longint v;
        v = longint'($urandom_range(0, 2000000)) - 1000000;
        if ($urandom_range(0, 3) == 0) v = v * 100000;
        in_vec[f] = ACCW'(v);
        if (n == 0 || v > best[f]) best[f] = v;
      end
      in_valid = 1;
      if (n == p*p - 1) begin
        for (int f = 0; f < N; f++) exp_q.push_back(best[f]);
        when_q.push_back(cycle + 1);
      end
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_pool = 2'd2;
    for (int w = 0; w < 30; w++) window(2);
    cfg_pool = 2'd1;
    for (int w = 0; w < 20; w++) window(1);
    repeat (3) @(negedge clk);
    checks += 2;
    if (when_q.size() != 0) begin failures++; $display("%0d outputs missing", when_q.size()); end
    if (n_out != 50) begin failures++; $display("%0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
