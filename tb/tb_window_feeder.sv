// Test of window_feeder (P = 9 lanes, IH = 3 bypass lanes).
//
// 3x3 windows must leave as one beat with kernel positions 0..8; 5x5 windows
// as three beats (positions 0..8, 9..17, 18..24 with the last two lanes off),
// the last flag only on the final beat, busy high until then; bypass chunks as
// one beat with lanes 0..2 carrying the chunk and its kernel positions. Every
// beat is compared with a model of the expected beats, which must start one
// clock after the input.
module tb_window_feeder;
  import cnn_pkg::*;

  localparam int B = 16, P = 9, IH = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_k = 3'd3;
  logic byp_valid = 0;
  logic [IH-1:0][B-1:0] byp_data = '0;
  logic [IH-1:0][KIDX_W-1:0] byp_kidx = '0;
  logic [IH-1:0] byp_en = '0;
  beat_tag_t byp_tag = '0;
  logic win_valid = 0;
  logic [KK-1:0][B-1:0] win_data = '0;
  beat_tag_t win_tag = '0;
  logic out_valid;
  logic [P-1:0][B-1:0] out_data;
  logic [P-1:0][KIDX_W-1:0] out_kidx;
  logic [P-1:0] out_en;
  beat_tag_t out_tag;
  logic busy;

  window_feeder dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [P-1:0][B-1:0] d;
    logic [P-1:0][KIDX_W-1:0] k;
    logic [P-1:0] en;
    beat_tag_t t;
    longint when;
  } beat_t;
  beat_t exp_q [$];
  int n_beats = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      n_beats++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected beat");
      end else begin
        beat_t e;
        logic ok;
        e = exp_q.pop_front();
        ok = (out_en === e.en) && (out_tag === e.t) && (e.when == cycle);
        for (int i = 0; i < P; i++)
          if (e.en[i] && (out_data[i] !== e.d[i] || out_kidx[i] !== e.k[i])) ok = 0;
        if (!ok) begin
          failures++;
          $display("beat mismatch at %0d (expected at %0d): en %b/%b tag %h/%h", cycle, e.when, out_en, e.en, out_tag, e.t);
        end
      end
    end
  end

  task automatic send_window(input int k, input bit last);
    int nb;
    for (int i = 0; i < KK; i++) win_data[i] = B'($urandom);
    win_tag.ch = CH_W'($urandom); win_tag.last = last;
    cfg_k = 3'(k);
    nb = (k*k + P - 1) / P;
    for (int b = 0; b < nb; b++) begin
      beat_t e;
      for (int i = 0; i < P; i++) begin
        int kk;
        kk = b*P + i;
        e.en[i] = (kk < k*k);
        e.k[i]  = KIDX_W'(kk < KK ? kk : 0);
        e.d[i]  = (kk < KK) ? win_data[kk < KK ? kk : 0] : '0;
      end
      e.t.ch = win_tag.ch; e.t.last = last && (b == nb - 1);
      e.when = cycle + 1 + b;
      exp_q.push_back(e);
    end
    win_valid = 1;
    @(negedge clk);
    win_valid = 0;
    for (int b = 1; b < nb; b++) begin
      checks++;
      if (!busy) begin failures++; $display("busy low while cutting a window"); end
      @(negedge clk);
    end
    checks++;
    if (busy) begin failures++; $display("busy still high"); end
  endtask

  task automatic send_bypass(input int n);
    beat_t e;
    for (int i = 0; i < IH; i++) begin
      byp_data[i] = B'($urandom);
      byp_kidx[i] = KIDX_W'($urandom_range(0, 24));
      byp_en[i]   = (i < n);
    end
    byp_tag = beat_tag_t'($urandom);
    e.en = '0; e.d = '0; e.k = '0;
    for (int i = 0; i < IH; i++) begin
      e.en[i] = byp_en[i]; e.d[i] = byp_data[i]; e.k[i] = byp_kidx[i];
    end
    e.t = byp_tag; e.when = cycle + 1;
    exp_q.push_back(e);
    byp_valid = 1;
    @(negedge clk);
    byp_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) send_window(3, n % 4 == 3);
    for (int n = 0; n < 20; n++) send_window(5, n % 3 == 2);
    for (int n = 0; n < 20; n++) send_bypass($urandom_range(1, 3));
    for (int n = 0; n < 10; n++) begin
      send_bypass(3);
      send_window(5, 1'b1);
      send_window(3, 1'b0);
    end
    repeat (3) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("%0d beats missing", exp_q.size()); end
    if (n_beats != 20 + 60 + 20 + 10*5) begin failures++; $display("%0d beats", n_beats); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
