// Scheduler: the deterministic read order of the accelerator.
//
// One run computes a band of cfg_pool output rows (all cfg_out_w columns, for
// the N_PAR output channels of the Processing Unit). Outputs are produced in
// max-pooling grid order: for each grid position, output row pr = 0..P-1, and
// inside it column pc = 0..P-1 (P = cfg_pool, 1 when no pooling follows). For
// each output the input channels are visited in order and accumulated.
//
// What is read from Cache L2 for one output and one channel (stride 1):
//   * 1x1 layer: the single element; it goes to the Processing Unit (bypass).
//   * KxK, first output of a row (x = 0): the whole window, column by column
//     (j = 0..K-1), each column in chunks of IH rows (IH, then K mod IH).
//     Every chunk goes to the Processing Unit (bypass) and to the Cache L1,
//     which is being loaded. This is the slower start of each row.
//   * KxK, later outputs (regime): only the new column x+K-1, in chunks; the
//     Cache L1 completes the window. If the Processing Unit needs more beats
//     for a window than Cache L2 needs chunks (5x5: 3 beats, 2 chunks), idle
//     clocks are inserted so windows never overlap.
// The output row inside the grid selects the Cache L1 sub-module (rd_sel).
//
// Miss condition: a read of a column that Cache L2 does not hold yet
// (column >= cols_filled), or a start before the layer's filters are loaded,
// freezes the schedule; nothing is issued until the data is there.
// Before the first output of the second and later rows of the band the
// scheduler waits DRAIN clocks so that bypass beats cannot overtake windows
// still inside the Cache L1 path; at the end it waits END_DRAIN clocks, flushes
// the Cache L1 sub-modules and pulses done.
//
// Timing per channel, no misses: 1x1 one clock; 3x3 three clocks at a row
// start and one in the regime; 5x5 ten clocks at a row start and three in the
// regime. Counters report busy clocks, miss clocks, row starts, regime outputs
// and bypass chunks for the whole run.
//
// The grid order, the column-wise order at a row start and the chunking of
// columns follow the design; the drains, idle clocks and counters are this
// implementation's.
module scheduler
  import cnn_pkg::*;
#(
  parameter int IH        = 3,
  parameter int P         = 9,
  parameter int CHW       = 9,
  parameter int XW        = 10,
  parameter int DRAIN     = 8,
  parameter int END_DRAIN = 12
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // layer / band configuration, held while busy
  input  logic [2:0]                cfg_k,       // 1, 3 or 5
  input  logic [CHW-1:0]            cfg_ch_in,
  input  logic [XW-1:0]             cfg_out_w,   // multiple of cfg_pool
  input  logic [1:0]                cfg_pool,    // 1 or 2
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  // data availability
  input  logic [XW:0]               cols_filled,
  input  logic [CHW-1:0]            filt_loaded,
  // Cache L2 read and routing of the chunk (valid with rd_en)
  output logic                      rd_en,
  output logic [3:0]                rd_row,
  output logic [$clog2(IH+1)-1:0]   rd_n,
  output logic [CH_W-1:0]           rd_ch,
  output logic [XW-1:0]             rd_x,
  output logic                      rd_byp,
  output logic                      rd_l1,
  output logic [0:0]                rd_sel,
  output logic [IH-1:0][KIDX_W-1:0] rd_kidx,
  output logic [IH-1:0]             rd_kidx_en,
  output beat_tag_t                 rd_tag,
  output logic                      l1_flush,
  // statistics of the run
  output logic [31:0]               cnt_busy,
  output logic [31:0]               cnt_miss,
  output logic [31:0]               cnt_row_start,
  output logic [31:0]               cnt_regime,
  output logic [31:0]               cnt_bypass
);

  typedef enum logic [2:0] {S_IDLE, S_WAITF, S_ISSUE, S_BUBBLE, S_DRAIN, S_END} state_t;

  state_t         state;
  logic [XW-1:0]  gx;          // grid position
  logic [1:0]     pr, pc;      // row / column inside the grid
  logic [CHW-1:0] c;           // channel
  logic [2:0]     j;           // column of the window (row start only)
  logic [1:0]     h;           // chunk of the column
  logic [2:0]     bub;         // idle clocks left
  logic [4:0]     dcnt;        // drain clocks left

  logic [XW-1:0]  x, xc;
  logic           load, miss, last_chunk, last_col, last_ch, last_out;
  logic [1:0]     nchunks;
  logic [2:0]     bubbles;
  logic [2:0]     jj;
  logic [XW-1:0]  grids;

  always_comb begin
    x        = XW'(int'(gx) * int'(cfg_pool) + int'(pc));
    load     = (cfg_k != 3'd1) && (x == '0);
    nchunks  = 2'((int'(cfg_k) + IH - 1) / IH);
    bubbles  = (cfg_k == 3'd5 && !load) ?
               3'(((25 + P - 1) / P) - ((5 + IH - 1) / IH)) : 3'd0;
    jj       = (cfg_k == 3'd1) ? 3'd0 : (load ? j : cfg_k - 3'd1);
    xc       = (cfg_k == 3'd1) ? x : (load ? XW'(j) : x + XW'(cfg_k) - XW'(1));
    grids    = XW'(int'(cfg_out_w) / int'(cfg_pool));
    miss     = ((XW+1)'(xc) >= cols_filled);
    last_chunk = (h == nchunks - 2'd1);
    last_col   = !load || (j == cfg_k - 3'd1);
    last_ch    = (c == cfg_ch_in - 1'b1);
    last_out   = (pc == 2'(cfg_pool - 1)) && (pr == 2'(cfg_pool - 1)) && (gx == grids - 1'b1);

    rd_en    = (state == S_ISSUE) && !miss;
    rd_row   = 4'(int'(pr) + int'(h) * IH);
    rd_n     = ($bits(rd_n))'((int'(cfg_k) - int'(h) * IH < IH) ? int'(cfg_k) - int'(h) * IH : IH);
    rd_ch    = CH_W'(c);
    rd_x     = xc;
    rd_byp   = load || (cfg_k == 3'd1);
    rd_l1    = (cfg_k != 3'd1);
    rd_sel   = pr[0];
    for (int i = 0; i < IH; i++) begin
      int r;
      r = int'(h) * IH + i;
      rd_kidx_en[i] = (i < int'(rd_n));
      rd_kidx[i]    = KIDX_W'((r < int'(cfg_k)) ? r * int'(cfg_k) + int'(jj) : 0);
    end
    rd_tag.ch   = CH_W'(c);
    rd_tag.last = last_chunk && last_col && last_ch;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      {gx, pr, pc, c, j, h, bub, dcnt} <= '0;
      done     <= 1'b0;
      l1_flush <= 1'b0;
      cnt_busy <= '0; cnt_miss <= '0; cnt_row_start <= '0; cnt_regime <= '0; cnt_bypass <= '0;
    end else begin
      done     <= 1'b0;
      l1_flush <= 1'b0;
      if (busy) cnt_busy <= cnt_busy + 1;
      unique case (state)
        S_IDLE: if (start) begin
          {gx, pr, pc, c, j, h, bub, dcnt} <= '0;
          cnt_busy <= '0; cnt_miss <= '0; cnt_row_start <= '0; cnt_regime <= '0; cnt_bypass <= '0;
          state <= S_WAITF;
        end
        S_WAITF: begin
          if (filt_loaded >= cfg_ch_in) state <= S_ISSUE;
          else cnt_miss <= cnt_miss + 1;
        end
        S_ISSUE: begin
          if (miss) begin
            cnt_miss <= cnt_miss + 1;
          end else begin
            if (rd_byp) cnt_bypass <= cnt_bypass + 1;
            if (c == '0 && j == '0 && h == '0 && cfg_k != 3'd1) begin
              if (load) cnt_row_start <= cnt_row_start + 1;
              else      cnt_regime    <= cnt_regime + 1;
            end
            if (!last_chunk) begin
              h <= h + 1'b1;
            end else begin
              h <= '0;
              if (bubbles != '0) begin
                bub   <= bubbles;
                state <= S_BUBBLE;
              end
              if (!last_col) begin
                j <= j + 1'b1;
              end else begin
                j <= '0;
                if (!last_ch) begin
                  c <= c + 1'b1;
                end else begin
                  c <= '0;
                  // next output in grid order
                  if (last_out) begin
                    dcnt  <= 5'(END_DRAIN);
                    state <= S_END;
                  end else begin
                    if (pc != 2'(cfg_pool - 1)) pc <= pc + 1'b1;
                    else begin
                      pc <= '0;
                      if (pr != 2'(cfg_pool - 1)) pr <= pr + 1'b1;
                      else begin
                        pr <= '0;
                        gx <= gx + 1'b1;
                      end
                    end
                    // the next output starts a row: let the Cache L1 path drain
                    if (cfg_k != 3'd1 && gx == '0 && pc == 2'(cfg_pool - 1)
                        && pr != 2'(cfg_pool - 1)) begin
                      dcnt  <= 5'(DRAIN);
                      state <= S_DRAIN;
                    end
                  end
                end
              end
            end
          end
        end
        S_BUBBLE: begin
          if (bub == 3'd1) state <= S_ISSUE;
          bub <= bub - 1'b1;
        end
        S_DRAIN: begin
          if (dcnt == 5'd1) state <= S_ISSUE;
          dcnt <= dcnt - 1'b1;
        end
        S_END: begin
          if (dcnt == 5'd1) begin
            state    <= S_IDLE;
            done     <= 1'b1;
            l1_flush <= 1'b1;
          end
          dcnt <= dcnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cfg: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ((cfg_k == 3'd1 || cfg_k == 3'd3 || cfg_k == 3'd5) && cfg_ch_in != '0
               && (cfg_pool == 2'd1 || cfg_pool == 2'd2) && cfg_out_w != '0));

endmodule
