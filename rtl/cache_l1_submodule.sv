// Cache L1 sub-module: data re-use buffer for one row of convolution outputs.
//
// While a filter of width FW slides by one step along a row, all but IWP of its
// FW columns were already read for the previous output. The sub-module keeps,
// for every input channel, the last FW-IWP columns (FH elements each) in a
// memory of DEPTH words of (FW-IWP)*FH*B bits (depth Ch_in, width
// (F_w - I'_w) * F_h * b_in, as in the sizing equations of the design). Each
// beat brings the IWP new columns of one channel; the sub-module returns the
// full FW x FH window and shifts the stored columns.
//
// Behaviour per row (follows the design):
//   IDLE  - empty; the first beat starts the load phase.
//   LOAD  - start of a row: for channel 0, 1, ... cfg_ch_in-1 it receives the
//           FW/IWP beats of that channel's first window (column-wise order) and
//           stores them, producing no output.
//   RUN   - regime: one beat per channel, channels in order, each producing a
//           complete window on out_win.
//   flush - returns to IDLE, ready for a new row.
//
// Interface: in_col holds IWP columns, element cc*FH + r (column cc, kernel row
// r). out_win holds the window, element r*FW + j, column j = 0 the leftmost.
// in_tag is carried unchanged to out_tag. Timing: out_valid/out_win appear one
// clock after the accepted in_valid; one beat per clock is sustained, also for
// cfg_ch_in = 1 (a read-after-write bypass covers back-to-back accesses to the
// same word). The channel order, the one-beat-per-channel rate and the
// forwarding path are choices of this implementation.
module cache_l1_submodule #(
  parameter int FW    = 3,
  parameter int FH    = 3,
  parameter int IWP   = 1,
  parameter int DEPTH = 256,
  parameter int B     = 16,
  parameter int TAG_W = 9
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(DEPTH+1)-1:0]  cfg_ch_in,   // channels of the layer, 1..DEPTH
  input  logic                        flush,
  input  logic                        in_valid,
  input  logic [IWP*FH-1:0][B-1:0]    in_col,
  input  logic [TAG_W-1:0]            in_tag,
  output logic                        out_valid,
  output logic [FW*FH-1:0][B-1:0]     out_win,
  output logic [TAG_W-1:0]            out_tag,
  output logic                        loading,     // in LOAD state
  output logic                        running      // in RUN state
);

  localparam int KEEP   = FW - IWP;           // stored columns
  localparam int WORD_W = KEEP * FH * B;
  localparam int AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW     = $clog2(DEPTH + 1);
  localparam int BEATS  = FW / IWP;           // load beats per channel
  localparam int BW     = (BEATS > 1) ? $clog2(BEATS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_t;

  state_t          state;
  logic [AW-1:0]   ch_cnt;
  logic [BW-1:0]   beat_cnt;

  logic [WORD_W-1:0] mem [DEPTH];

  // Stage A registers (beat accepted in the previous clock)
  logic              a_valid, a_run, a_fwd;
  logic [AW-1:0]     a_ch;
  logic [IWP*FH-1:0][B-1:0] a_col;
  logic [TAG_W-1:0]  a_tag;
  logic [WORD_W-1:0] a_rdata, a_fwd_data;

  logic [WORD_W-1:0] old_word, new_word;
  logic [FW*FH-1:0][B-1:0] win;

  assign loading = (state == S_LOAD);
  assign running = (state == S_RUN);

  // Window assembly: stored columns first, then the new ones.
  always_comb begin
    old_word = a_fwd ? a_fwd_data : a_rdata;
    for (int j = 0; j < FW; j++) begin
      for (int r = 0; r < FH; r++) begin
        if (j < KEEP) win[r*FW + j] = old_word[(j*FH + r)*B +: B];
        else          win[r*FW + j] = a_col[(j-KEEP)*FH + r];
      end
    end
    for (int j = 0; j < KEEP; j++)
      for (int r = 0; r < FH; r++)
        new_word[(j*FH + r)*B +: B] = win[r*FW + j + IWP];
  end

  assign out_valid = a_valid && a_run;
  assign out_win   = win;
  assign out_tag   = a_tag;

  // Memory: synchronous read in stage A, write-back of the shifted word in stage B.
  always_ff @(posedge clk) begin
    if (in_valid) a_rdata <= mem[ch_cnt];
    if (a_valid)  mem[a_ch] <= new_word;
    a_fwd_data <= new_word;
    a_col      <= in_col;
    a_tag      <= in_tag;
    a_ch       <= ch_cnt;
  end

  // Control: state, channel and column counters.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ch_cnt   <= '0;
      beat_cnt <= '0;
      a_valid  <= 1'b0;
      a_run    <= 1'b0;
      a_fwd    <= 1'b0;
    end else begin
      a_valid <= in_valid && !flush;
      a_run   <= (state == S_RUN);
      a_fwd   <= a_valid && (a_ch == ch_cnt);
      if (flush) begin
        state    <= S_IDLE;
        ch_cnt   <= '0;
        beat_cnt <= '0;
      end else if (in_valid) begin
        unique case (state)
          S_IDLE, S_LOAD: begin
            state <= S_LOAD;
            if (beat_cnt == BW'(BEATS - 1)) begin
              beat_cnt <= '0;
              if (CW'(ch_cnt) == cfg_ch_in - 1'b1) begin
                ch_cnt <= '0;
                state  <= S_RUN;
              end else begin
                ch_cnt <= ch_cnt + 1'b1;
              end
            end else begin
              beat_cnt <= beat_cnt + 1'b1;
            end
          end
          S_RUN: begin
            if (CW'(ch_cnt) == cfg_ch_in - 1'b1) ch_cnt <= '0;
            else                                 ch_cnt <= ch_cnt + 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // Parameter check at elaboration.
  if (!(FW > IWP && FW % IWP == 0)) begin : g_bad_fw
    $error("cache_l1_submodule: FW must be a multiple of IWP and larger than it");
  end

  // The configured channel count must fit the memory.
  a_cfg_range: assert property (@(posedge clk) disable iff (!rst_n)
                                in_valid |-> (cfg_ch_in >= 1 && cfg_ch_in <= CW'(DEPTH)));

endmodule
