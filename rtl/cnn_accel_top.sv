// Convolution accelerator with a multi-level on-chip cache system.
//
// Feature maps and filters stay in external memory and arrive over the bus
// (axi_interface). Input rows of the current band go to Cache L2, the current
// layer's filters to the Filters Cache. The scheduler reads Cache L2 in a fixed
// order: at the start of each output row whole windows (bypass to the
// Processing Unit while the Cache L1 loads), afterwards one new column per
// channel and output, which the Cache L1 system turns back into whole windows.
// Cache L2 therefore only has to deliver P'_elem = 3 elements per clock
// instead of P_elem = 9. The window feeder passes bypass chunks or Cache L1
// windows to the Processing Unit (N_PAR x 9 MACs), whose outputs are max-pooled
// in grid order and queued back to the bus.
//
// Operation: load the filters (filt_clear, then filter beats), clear Cache L2
// (fm_clear), set cfg_* for the band and pulse start; feature-map beats may
// keep arriving while the band is computed (misses freeze the schedule). A band
// is cfg_pool output rows of cfg_out_w columns; a layer is a sequence of bands
// sharing the filters. Results (N_PAR values of ACC_W bits per pooled output,
// output channel f at bits [f*ACC_W +: ACC_W]) leave on m_valid/m_data in grid
// order.
//
// The block structure follows the design (Cache L2, Cache L1 system, Filters
// Cache, multiplexer, Processing Unit, AXI interface); band-level control,
// single clock, stream formats and the Processing Unit's parallelism are this
// implementation's choices.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int N          = N_PAR,
  parameter int L2_DEPTH   = 110592,    // elements per Cache L2 bank (3 banks)
  parameter int FILT_DEPTH = MAX_CH,
  parameter int DEPTH3     = MAX_CH,
  parameter int DEPTH5     = CH5_MAX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration of the band
  input  logic [2:0]           cfg_k,
  input  logic [8:0]           cfg_ch_in,
  input  logic [9:0]           cfg_out_w,
  input  logic [1:0]           cfg_pool,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic                 fm_clear,
  input  logic                 filt_clear,
  // bus side
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic [BUS_W-1:0]     s_data,
  input  logic                 s_dest,
  output logic                 m_valid,
  input  logic                 m_ready,
  output logic [N*ACC_W-1:0]   m_data,
  output logic                 res_overflow,
  // statistics
  output logic [31:0]          cnt_busy,
  output logic [31:0]          cnt_miss,
  output logic [31:0]          cnt_row_start,
  output logic [31:0]          cnt_regime,
  output logic [31:0]          cnt_bypass
);

  // bus -> caches
  logic                fm_valid, flt_valid;
  logic [B_IN-1:0]     fm_data;
  logic [BUS_W-1:0]    flt_data;
  logic [10:0]         cols_filled;
  logic [$clog2(FILT_DEPTH+1)-1:0] filt_loaded;

  // scheduler
  logic                      rd_en, rd_byp, rd_l1, l1_flush;
  logic [3:0]                rd_row;
  logic [1:0]                rd_n;
  logic [CH_W-1:0]           rd_ch;
  logic [9:0]                rd_x;
  logic [0:0]                rd_sel;
  logic [I_H-1:0][KIDX_W-1:0] rd_kidx;
  logic [I_H-1:0]            rd_kidx_en;
  beat_tag_t                 rd_tag;

  // Cache L2 output and the routing record delayed to match it
  logic                      l2_valid;
  logic [I_H-1:0][B_IN-1:0]  l2_data;
  logic                      q_byp, q_l1;
  logic [0:0]                q_sel;
  logic [I_H-1:0][KIDX_W-1:0] q_kidx;
  logic [I_H-1:0]            q_kidx_en;
  beat_tag_t                 q_tag;

  // Cache L1 system
  logic                      l1_valid;
  logic [KK-1:0][B_IN-1:0]   l1_win;
  logic [TAG_W-1:0]          l1_tag;

  // Processing Unit
  logic                      pu_valid;
  logic [P_ELEM-1:0][B_IN-1:0]   pu_data;
  logic [P_ELEM-1:0][KIDX_W-1:0] pu_kidx;
  logic [P_ELEM-1:0]         pu_en;
  beat_tag_t                 pu_tag;
  logic                      feeder_busy;
  logic                      filt_rd_en;
  logic [CH_W-1:0]           filt_addr;
  logic [N*KK*B_FILT-1:0]    filt_word;
  logic                      acc_valid, pool_valid;
  logic [N-1:0][ACC_W-1:0]   acc_vec, pool_vec;

  axi_interface #(
    .BUS_W(BUS_W), .B(B_IN), .IN_DEPTH(1024), .RES_W(N*ACC_W), .RES_DEPTH(16)
  ) u_axi (
    .clk, .rst_n,
    .s_valid, .s_ready, .s_data, .s_dest,
    .fm_valid, .fm_data, .flt_valid, .flt_data,
    .res_valid(pool_valid), .res_data(pool_vec), .res_overflow,
    .m_valid, .m_ready, .m_data
  );

  cache_l2 #(
    .IH(I_H), .B(B_IN), .RPB(2), .BANK_DEPTH(L2_DEPTH), .CHW(9), .XW(10)
  ) u_l2 (
    .clk, .rst_n,
    .cfg_ch_in (cfg_ch_in),
    .cfg_rows  (4'(int'(cfg_k) + int'(cfg_pool) - 1)),
    .clear     (fm_clear),
    .wr_valid  (fm_valid),
    .wr_data   (fm_data),
    .cols_filled(cols_filled),
    .rd_en, .rd_row, .rd_n, .rd_ch(9'(rd_ch)), .rd_x,
    .rd_valid  (l2_valid),
    .rd_data   (l2_data)
  );

  filters_cache #(
    .DEPTH(FILT_DEPTH), .N_PAR(N), .KK(KK), .BF(B_FILT), .BUS_W(BUS_W)
  ) u_filt (
    .clk, .rst_n,
    .clear    (filt_clear),
    .wr_valid (flt_valid),
    .wr_data  (flt_data),
    .loaded_ch(filt_loaded),
    .rd_en    (filt_rd_en),
    .rd_addr  ($clog2(FILT_DEPTH)'(filt_addr)),
    .rd_word  (filt_word)
  );

  scheduler #(
    .IH(I_H), .P(P_ELEM), .CHW(9), .XW(10)
  ) u_sched (
    .clk, .rst_n,
    .cfg_k, .cfg_ch_in, .cfg_out_w, .cfg_pool,
    .start, .busy, .done,
    .cols_filled,
    .filt_loaded(9'(filt_loaded)),
    .rd_en, .rd_row, .rd_n, .rd_ch, .rd_x,
    .rd_byp, .rd_l1, .rd_sel, .rd_kidx, .rd_kidx_en, .rd_tag,
    .l1_flush,
    .cnt_busy, .cnt_miss, .cnt_row_start, .cnt_regime, .cnt_bypass
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_byp <= 1'b0;
      q_l1  <= 1'b0;
      q_sel <= '0;
      q_kidx <= '0;
      q_kidx_en <= '0;
      q_tag <= '0;
    end else begin
      q_byp     <= rd_en && rd_byp;
      q_l1      <= rd_en && rd_l1;
      q_sel     <= rd_sel;
      q_kidx    <= rd_kidx;
      q_kidx_en <= rd_kidx_en;
      q_tag     <= rd_tag;
    end
  end

  cache_l1_system #(
    .B(B_IN), .TAG_W(TAG_W), .IH(I_H), .DEPTH3(DEPTH3), .N3(N_SUB), .DEPTH5(DEPTH5), .N5(N_SUB)
  ) u_l1 (
    .clk, .rst_n,
    .cfg_k, .cfg_ch_in ($clog2(DEPTH3+1)'(cfg_ch_in)),
    .flush    (l1_flush),
    .in_valid (l2_valid && q_l1),
    .in_sel   (q_sel),
    .in_data  (l2_data),
    .in_tag   (q_tag),
    .out_valid(l1_valid),
    .out_win  (l1_win),
    .out_tag  (l1_tag)
  );

  window_feeder #(.B(B_IN), .P(P_ELEM), .IH(I_H)) u_feed (
    .clk, .rst_n, .cfg_k,
    .byp_valid(l2_valid && q_byp),
    .byp_data (l2_data),
    .byp_kidx (q_kidx),
    .byp_en   (q_kidx_en),
    .byp_tag  (q_tag),
    .win_valid(l1_valid),
    .win_data (l1_win),
    .win_tag  (beat_tag_t'(l1_tag)),
    .out_valid(pu_valid),
    .out_data (pu_data),
    .out_kidx (pu_kidx),
    .out_en   (pu_en),
    .out_tag  (pu_tag),
    .busy     (feeder_busy)
  );

  processing_unit #(.N(N), .P(P_ELEM), .B(B_IN), .BF(B_FILT), .ACCW(ACC_W)) u_pu (
    .clk, .rst_n,
    .in_valid (pu_valid),
    .in_data  (pu_data),
    .in_kidx  (pu_kidx),
    .in_en    (pu_en),
    .in_tag   (pu_tag),
    .filt_rd_en,
    .filt_addr,
    .filt_word,
    .out_valid(acc_valid),
    .out_acc  (acc_vec)
  );

  max_pool #(.N(N), .ACCW(ACC_W)) u_pool (
    .clk, .rst_n, .cfg_pool,
    .in_valid (acc_valid),
    .in_vec   (acc_vec),
    .out_valid(pool_valid),
    .out_vec  (pool_vec)
  );

  // The scheduler keeps bypass chunks and windows apart.
  a_feeder_free: assert property (@(posedge clk) disable iff (!rst_n)
    (l2_valid && q_byp) |-> !feeder_busy);

endmodule
