// Processing Unit: multiply-accumulate array of the accelerator.
//
// Each beat carries up to P input elements (signed, B bits) of one input
// channel, each tagged with its kernel position k. The unit reads that
// channel's word from the Filters Cache and, for every one of the N_PAR output
// channels f, adds sum_i data[i] * w[f][kidx[i]] to accumulator f: N_PAR * P
// multipliers (64 x 9 = 576 by default, the design's MAC count). Beats of one
// output may come in any grouping (bypass chunks at a row start, whole or cut
// windows in the regime) and in any channel order; the beat whose tag has last
// set closes the output, which is then emitted and the accumulators cleared.
//
// The design gives the unit's role (convolution by MAC blocks, DSP count);
// the beat format, accumulator width and pipeline are this implementation's.
// No activation or re-quantisation is applied: outputs are raw ACC_W-bit sums.
//
// Timing: filt_addr is driven combinationally from the incoming beat; the
// Filters Cache answers one clock later, when the products are formed; the
// output vector is registered, so out_valid follows the last beat by 2 clocks.
module processing_unit
  import cnn_pkg::*;
#(
  parameter int N     = 64,
  parameter int P     = 9,
  parameter int B     = 16,
  parameter int BF    = 8,
  parameter int ACCW  = 40
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [P-1:0][B-1:0]       in_data,
  input  logic [P-1:0][KIDX_W-1:0]  in_kidx,
  input  logic [P-1:0]              in_en,
  input  beat_tag_t                 in_tag,
  // Filters Cache read port
  output logic                      filt_rd_en,
  output logic [CH_W-1:0]           filt_addr,
  input  logic [N*KK*BF-1:0]        filt_word,
  // results
  output logic                      out_valid,
  output logic [N-1:0][ACCW-1:0]    out_acc
);

  logic                      s_valid, s_last;
  logic [P-1:0][B-1:0]       s_data;
  logic [P-1:0][KIDX_W-1:0]  s_kidx;
  logic [P-1:0]              s_en;
  logic [N-1:0][ACCW-1:0]    acc, acc_next;

  assign filt_rd_en = in_valid;
  assign filt_addr  = in_tag.ch;

  always_comb begin
    for (int f = 0; f < N; f++) begin
      logic signed [ACCW-1:0] sum;
      logic [KK-1:0][BF-1:0]  wf;      // the KK weights of filter f
      wf  = filt_word[f*KK*BF +: KK*BF];
      sum = '0;
      for (int i = 0; i < P; i++) begin
        logic signed [B+BF-1:0] prod;
        prod = $signed(s_data[i]) * $signed(wf[s_kidx[i]]);
        if (s_en[i]) sum = sum + ACCW'(prod);
      end
      acc_next[f] = acc[f] + sum;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid   <= 1'b0;
      s_last    <= 1'b0;
      s_data    <= '0;
      s_kidx    <= '0;
      s_en      <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_acc   <= '0;
    end else begin
      s_valid   <= in_valid;
      s_last    <= in_valid && in_tag.last;
      if (in_valid) begin
        s_data <= in_data;
        s_kidx <= in_kidx;
        s_en   <= in_en;
      end
      out_valid <= s_valid && s_last;
      if (s_valid) begin
        if (s_last) begin
          out_acc <= acc_next;
          acc     <= '0;
        end else begin
          acc <= acc_next;
        end
      end
    end
  end

  a_kidx: assert property (@(posedge clk) disable iff (!rst_n)
    s_valid |-> (s_kidx[0] < KIDX_W'(KK)));

endmodule
