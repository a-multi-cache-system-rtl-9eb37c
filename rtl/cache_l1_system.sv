// Cache L1 system: data re-use for every kernel size of the network.
//
// Cache L2 chunks (up to IH elements of one kernel column per clock) first go
// through the column assembler, which rebuilds whole columns. The kernel size
// of the layer (cfg_k) then selects the module of that size: a 3x3 module with
// N3 sub-modules of depth DEPTH3 and a 5x5 module with N5 sub-modules of depth
// DEPTH5. For the CloudScout network these are two 3x3 sub-modules (largest
// Ch_in 256) and two 5x5 sub-modules (largest Ch_in 3), i.e. four sub-modules.
// 1x1 layers have no re-use and never enter this block. The output multiplexer,
// also driven by cfg_k, returns the window of the active module on a bus of
// KMAX*KMAX elements; a KxK window uses elements 0..K*K-1 in the order
// r*K + j (kernel row r, column j).
//
// in_sel picks the sub-module (the output row inside the max-pooling grid).
// Timing: a window leaves two clocks after the chunk that completed its column
// (one clock in the assembler, one in the sub-module). The module arrangement
// follows the design; bus widths and latencies are this implementation's.
module cache_l1_system #(
  parameter int B      = 16,
  parameter int TAG_W  = 9,
  parameter int IH     = 3,
  parameter int DEPTH3 = 256,
  parameter int N3     = 2,
  parameter int DEPTH5 = 3,
  parameter int N5     = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [2:0]                    cfg_k,       // 3 or 5
  input  logic [$clog2(DEPTH3+1)-1:0]   cfg_ch_in,
  input  logic                          flush,
  input  logic                          in_valid,
  input  logic [0:0]                    in_sel,
  input  logic [IH-1:0][B-1:0]          in_data,
  input  logic [TAG_W-1:0]              in_tag,
  output logic                          out_valid,
  output logic [24:0][B-1:0]            out_win,
  output logic [TAG_W-1:0]              out_tag
);

  localparam int C5W = $clog2(DEPTH5 + 1);

  logic                 col_valid;
  logic [4:0][B-1:0]    col;
  logic [TAG_W-1:0]     col_tag;
  logic [2:0]           k_q;
  logic [0:0]           in_sel_q;

  logic                 v3, v5;
  logic [8:0][B-1:0]    w3;
  logic [24:0][B-1:0]   w5;
  logic [TAG_W-1:0]     t3, t5;

  column_assembler #(.FH_MAX(5), .IH(IH), .B(B), .TAG_W(TAG_W)) u_asm (
    .clk, .rst_n,
    .cfg_fh   (cfg_k),
    .in_valid (in_valid),
    .in_data  (in_data),
    .in_tag   (in_tag),
    .out_valid(col_valid),
    .out_col  (col),
    .out_tag  (col_tag)
  );

  cache_l1_module #(.FW(3), .FH(3), .N_SUB(N3), .DEPTH(DEPTH3), .B(B), .TAG_W(TAG_W)) u_m3 (
    .clk, .rst_n,
    .cfg_ch_in(cfg_ch_in),
    .flush    (flush),
    .in_valid (col_valid && cfg_k == 3'd3),
    .in_sel   (in_sel_q),
    .in_col   (col[2:0]),
    .in_tag   (col_tag),
    .out_valid(v3),
    .out_win  (w3),
    .out_tag  (t3)
  );

  cache_l1_module #(.FW(5), .FH(5), .N_SUB(N5), .DEPTH(DEPTH5), .B(B), .TAG_W(TAG_W)) u_m5 (
    .clk, .rst_n,
    .cfg_ch_in(C5W'(cfg_ch_in)),
    .flush    (flush),
    .in_valid (col_valid && cfg_k == 3'd5),
    .in_sel   (in_sel_q),
    .in_col   (col),
    .in_tag   (col_tag),
    .out_valid(v5),
    .out_win  (w5),
    .out_tag  (t5)
  );

  // The row select travels with the chunk through the assembler register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_sel_q <= '0;
      k_q      <= 3'd3;
    end else begin
      if (in_valid) in_sel_q <= in_sel;
      k_q <= cfg_k;
    end
  end

  always_comb begin
    out_win = '0;
    if (k_q == 3'd5) begin
      out_valid = v5;
      out_win   = w5;
      out_tag   = t5;
    end else begin
      out_valid = v3;
      out_win[8:0] = w3;
      out_tag   = t3;
    end
  end

  a_one_module: assert property (@(posedge clk) disable iff (!rst_n) !(v3 && v5));
  a_kernel: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid |-> (cfg_k == 3'd3 || cfg_k == 3'd5));
  a_ch5: assert property (@(posedge clk) disable iff (!rst_n)
                          (in_valid && cfg_k == 3'd5) |-> (int'(cfg_ch_in) <= DEPTH5));

endmodule
