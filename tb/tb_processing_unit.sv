// Test of processing_unit at its default size (64 filters x 9 lanes).
//
// The testbench plays the Filters Cache (word of the requested channel one
// clock after filt_addr) with random signed weights. Outputs are built from a
// random number of beats with random channels, kernel positions and lane
// enables, sometimes with idle clocks between beats; the expected sums are
// computed here. Each result must match for all 64 filters and appear two
// clocks after the beat with last set; extreme values check the signed
// arithmetic.
module tb_processing_unit;
  import cnn_pkg::*;

  localparam int N = 64, P = 9, B = 16, BF = 8, ACCW = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic [P-1:0][B-1:0] in_data = '0;
  logic [P-1:0][KIDX_W-1:0] in_kidx = '0;
  logic [P-1:0] in_en = '0;
  beat_tag_t in_tag = '0;
  logic filt_rd_en;
  logic [CH_W-1:0] filt_addr;
  logic [N*KK*BF-1:0] filt_word;
  logic out_valid;
  logic [N-1:0][ACCW-1:0] out_acc;

  processing_unit dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [N*KK*BF-1:0] wmem [16];
  always @(posedge clk) if (filt_rd_en) filt_word <= wmem[filt_addr[3:0]];

  longint acc_ref [N];
  longint exp_q [$];     // N values per expected output
  longint when_q [$];
  int n_out = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        longint e [N];
        longint w;
        for (int f = 0; f < N; f++) e[f] = exp_q.pop_front();
        w = when_q.pop_front();
        if (w != cycle) begin failures++; $display("output at %0d, expected %0d", cycle, w); end
        for (int f = 0; f < N; f++) begin
          checks++;
          if (longint'($signed(out_acc[f])) != e[f]) begin
            failures++;
            if (failures < 10) $display("filter %0d: got %0d expected %0d", f, $signed(out_acc[f]), e[f]);
          end
        end
      end
    end
  end

  function automatic int wt(input int ch, input int f, input int k);
    return int'($signed(wmem[ch][(f*KK + k)*BF +: BF]));
  endfunction

  task automatic send(input bit last, input bit extreme);
    int ch;
    ch = $urandom_range(0, 15);
    for (int i = 0; i < P; i++) begin
      in_data[i] = extreme ? ((i % 2) ? 16'h8000 : 16'h7fff) : B'($urandom);
      in_kidx[i] = KIDX_W'($urandom_range(0, KK - 1));
      in_en[i]   = extreme ? 1'b1 : 1'($urandom);
    end
    in_tag.ch = CH_W'(ch); in_tag.last = last;
    for (int f = 0; f < N; f++)
      for (int i = 0; i < P; i++)
        if (in_en[i]) acc_ref[f] += longint'($signed(in_data[i])) * longint'(wt(ch, f, int'(in_kidx[i])));
    if (last) begin
      for (int f = 0; f < N; f++) exp_q.push_back(acc_ref[f]);
      when_q.push_back(cycle + 2);
      for (int f = 0; f < N; f++) acc_ref[f] = 0;
    end
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    for (int c = 0; c < 16; c++)
      for (int i = 0; i < N*KK*BF/32; i++) wmem[c][i*32 +: 32] = $urandom;
    for (int i = 0; i < KK; i++) wmem[15][i*BF +: BF] = 8'h80;   // filter 0 of channel 15: -128
    for (int f = 0; f < N; f++) acc_ref[f] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int o = 0; o < 60; o++) begin
      int nb;
      nb = $urandom_range(1, 12);
      for (int b = 0; b < nb; b++) begin
        send(b == nb - 1, o % 10 == 9);
        if ($urandom_range(0, 4) == 0) @(negedge clk);
      end
    end
    repeat (4) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    if (n_out != 60) begin failures++; $display("%0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
