// Window feeder: the multiplexer in front of the Processing Unit.
//
// The Processing Unit takes P beats of up to P elements (P = P_elem = 9), each
// element tagged with the kernel position k (k = r*K + j) it multiplies. Two
// sources reach it:
//   * bypass - at the start of a row the Cache L1 is still empty, so the chunk
//     just read from Cache L2 (up to IH elements, P'_elem) goes straight to the
//     Processing Unit, with the kernel positions supplied by the scheduler;
//   * window - in the regime the Cache L1 returns a whole KxK window; the feeder
//     cuts it into ceil(K*K/P) beats of consecutive kernel positions (one beat
//     for 3x3, three for 5x5).
// The last flag of a window's tag is kept only on its final beat, so the
// Processing Unit closes an output after the whole window.
//
// The two sources must not overlap: a new window or bypass chunk may only
// arrive when busy is low (the scheduler spaces its reads accordingly; an
// assertion checks it). Timing: output registered, the first beat of an input
// leaves one clock after it arrives. Choosing which source and the chunking are
// this implementation's reading of the multiplexer drawn in the design.
module window_feeder
  import cnn_pkg::*;
#(
  parameter int B  = 16,
  parameter int P  = 9,
  parameter int IH = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [2:0]                cfg_k,
  // bypass chunk from Cache L2
  input  logic                      byp_valid,
  input  logic [IH-1:0][B-1:0]      byp_data,
  input  logic [IH-1:0][KIDX_W-1:0] byp_kidx,
  input  logic [IH-1:0]             byp_en,
  input  beat_tag_t                 byp_tag,
  // window from Cache L1
  input  logic                      win_valid,
  input  logic [KK-1:0][B-1:0]      win_data,
  input  beat_tag_t                 win_tag,
  // beat to the Processing Unit
  output logic                      out_valid,
  output logic [P-1:0][B-1:0]       out_data,
  output logic [P-1:0][KIDX_W-1:0]  out_kidx,
  output logic [P-1:0]              out_en,
  output beat_tag_t                 out_tag,
  output logic                      busy
);

  logic [KK-1:0][B-1:0] hold;
  beat_tag_t            hold_tag;
  logic [2:0]           chunk;     // next chunk to send
  logic [2:0]           nchunk;    // chunks of the current window
  logic [2:0]           rem;       // chunks still to send
  logic [5:0]           kk_cfg;

  assign kk_cfg = 6'(cfg_k) * 6'(cfg_k);
  assign busy   = (rem != '0);

  function automatic logic [2:0] chunks_of(input logic [5:0] kk);
    return 3'((int'(kk) + P - 1) / P);
  endfunction

  // Beat n of window w: lanes carry kernel positions n*P .. n*P+P-1.
  task automatic emit(input logic [KK-1:0][B-1:0] w, input logic [2:0] n,
                      input beat_tag_t t, input logic final_beat);
    for (int i = 0; i < P; i++) begin
      int k;
      k = int'(n) * P + i;
      out_en[i]   <= (k < int'(kk_cfg));
      out_kidx[i] <= KIDX_W'((k < KK) ? k : 0);
      out_data[i] <= (k < KK) ? w[(k < KK) ? k : 0] : '0;
    end
    out_tag.ch   <= t.ch;
    out_tag.last <= t.last && final_beat;
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_en    <= '0;
      out_data  <= '0;
      out_kidx  <= '0;
      out_tag   <= '0;
      rem       <= '0;
      chunk     <= '0;
      nchunk    <= '0;
      hold      <= '0;
      hold_tag  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (win_valid) begin
        hold     <= win_data;
        hold_tag <= win_tag;
        nchunk   <= chunks_of(kk_cfg);
        chunk    <= 3'd1;
        rem      <= chunks_of(kk_cfg) - 3'd1;
        out_valid <= 1'b1;
        emit(win_data, 3'd0, win_tag, chunks_of(kk_cfg) == 3'd1);
      end else if (rem != '0) begin
        out_valid <= 1'b1;
        emit(hold, chunk, hold_tag, chunk == nchunk - 3'd1);
        chunk <= chunk + 3'd1;
        rem   <= rem - 3'd1;
      end else if (byp_valid) begin
        out_valid <= 1'b1;
        for (int i = 0; i < P; i++) begin
          out_en[i]   <= (i < IH) ? byp_en[(i < IH) ? i : 0] : 1'b0;
          out_kidx[i] <= (i < IH) ? byp_kidx[(i < IH) ? i : 0] : '0;
          out_data[i] <= (i < IH) ? byp_data[(i < IH) ? i : 0] : '0;
        end
        out_tag <= byp_tag;
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(win_valid && byp_valid) && !((win_valid || byp_valid) && busy));

endmodule
