// Test of axi_interface at its default size (128-bit beats, 1024-entry input
// FIFO, 16-entry result FIFO).
//
// A random mix of feature-map and filter beats is pushed, including a long
// burst of feature beats that fills the input FIFO (s_ready must drop and no
// beat may be lost). Filter beats must reach the Filters Cache side unchanged
// and in order; feature beats must reach the Cache L2 side as eight 16-bit
// elements, lowest first. Result vectors must leave in order under random
// m_ready, and a result pushed into a full result FIFO must raise
// res_overflow.
module tb_axi_interface;

  localparam int BUS_W = 128, B = 16, RES_W = 2560;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid = 0, s_ready, s_dest = 0;
  logic [BUS_W-1:0] s_data = '0;
  logic fm_valid, flt_valid;
  logic [B-1:0] fm_data;
  logic [BUS_W-1:0] flt_data;
  logic res_valid = 0, res_overflow;
  logic [RES_W-1:0] res_data = '0;
  logic m_valid, m_ready = 0;
  logic [RES_W-1:0] m_data;

  axi_interface dut (.*);

  int checks = 0, failures = 0;
  logic [B-1:0] fm_q [$];
  logic [BUS_W-1:0] flt_q [$];
  logic [RES_W-1:0] res_q [$];
  bit saw_full = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (!s_ready) saw_full = 1;
      if (fm_valid) begin
        checks++;
        if (fm_q.size() == 0 || fm_data !== fm_q[0]) begin
          failures++; if (failures < 10) $display("feature element mismatch");
        end
        if (fm_q.size() != 0) void'(fm_q.pop_front());
      end
      if (flt_valid) begin
        checks++;
        if (flt_q.size() == 0 || flt_data !== flt_q[0]) begin
          failures++; if (failures < 10) $display("filter beat mismatch");
        end
        if (flt_q.size() != 0) void'(flt_q.pop_front());
      end
      if (m_valid && m_ready) begin
        checks++;
        if (res_q.size() == 0 || m_data !== res_q[0]) begin
          failures++; if (failures < 10) $display("result mismatch");
        end
        if (res_q.size() != 0) void'(res_q.pop_front());
      end
    end
  end

  task automatic push(input logic dest);
    logic [BUS_W-1:0] d;
    for (int i = 0; i < BUS_W/32; i++) d[i*32 +: 32] = $urandom;
    while (!s_ready) @(negedge clk);
    s_valid = 1; s_dest = dest; s_data = d;
    if (dest) flt_q.push_back(d);
    else for (int e = 0; e < BUS_W/B; e++) fm_q.push_back(d[e*B +: B]);
    @(negedge clk);
    s_valid = 0;
  endtask

  task automatic result();
    logic [RES_W-1:0] d;
    for (int i = 0; i < RES_W/32; i++) d[i*32 +: 32] = $urandom;
    res_valid = 1; res_data = d;
    res_q.push_back(d);
    @(negedge clk);
    res_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) push(1'($urandom_range(0, 1)));
    for (int n = 0; n < 1200; n++) push(1'b0);
    for (int n = 0; n < 200; n++) push(1'b1);
    while (fm_q.size() != 0 || flt_q.size() != 0) @(negedge clk);
    checks++;
    if (!saw_full) begin failures++; $display("input FIFO never became full"); end
    // results with random m_ready
    fork
      begin
        for (int n = 0; n < 40; n++) begin
          result();
          repeat ($urandom_range(0, 3)) @(negedge clk);
        end
      end
      begin
        repeat (400) begin
          m_ready = 1'($urandom_range(0, 3) != 0);
          @(negedge clk);
        end
      end
    join
    m_ready = 1;
    repeat (20) @(negedge clk);
    checks += 2;
    if (res_q.size() != 0) begin failures++; $display("%0d results missing", res_q.size()); end
    if (res_overflow) begin failures++; $display("unexpected overflow"); end
    // overflow: 17 results with nobody reading
    m_ready = 0;
    for (int n = 0; n < 17; n++) result();
    checks++;
    if (!res_overflow) begin failures++; $display("overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
