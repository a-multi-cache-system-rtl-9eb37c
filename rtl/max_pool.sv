// Max pooling of convolution outputs that arrive in pooling-grid order.
//
// When a P x P max pooling follows a convolution, the scheduler produces the
// outputs grid by grid: the P*P outputs of one pooling window arrive one after
// the other (for P = 2: row 0 columns x, x+1, then row 1 columns x, x+1). The
// pooling then needs no line buffer, only a running maximum per output channel
// that is emitted after every cfg_pool^2 inputs. cfg_pool = 1 passes every
// input through. The grid order follows the design; the rest is this
// implementation's.
//
// Interface: N signed ACCW-bit values per input beat. Timing: the result is
// registered, out_valid one clock after the last input of a window.
module max_pool #(
  parameter int N    = 64,
  parameter int ACCW = 40
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [1:0]             cfg_pool,   // 1 or 2
  input  logic                   in_valid,
  input  logic [N-1:0][ACCW-1:0] in_vec,
  output logic                   out_valid,
  output logic [N-1:0][ACCW-1:0] out_vec
);

  logic [2:0]             cnt;       // inputs of the window seen so far
  logic [N-1:0][ACCW-1:0] run_max, nxt;
  logic                   window_end;

  assign window_end = (cnt == 3'(int'(cfg_pool) * int'(cfg_pool) - 1));

  always_comb begin
    for (int f = 0; f < N; f++) begin
      if (cnt == '0 || $signed(in_vec[f]) > $signed(run_max[f])) nxt[f] = in_vec[f];
      else                                                       nxt[f] = run_max[f];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      run_max   <= '0;
      out_valid <= 1'b0;
      out_vec   <= '0;
    end else begin
      out_valid <= in_valid && window_end;
      if (in_valid) begin
        if (window_end) begin
          cnt     <= '0;
          out_vec <= nxt;
        end else begin
          cnt     <= cnt + 1'b1;
          run_max <= nxt;
        end
      end
    end
  end

  a_pool: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (cfg_pool == 2'd1 || cfg_pool == 2'd2));

endmodule
