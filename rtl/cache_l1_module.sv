// Cache L1 module for one kernel size (for example the "3x3 Module").
//
// A convolution followed by P x P max pooling computes P output rows in an
// interleaved order, and a sub-module can only follow one row. The module
// therefore holds N_SUB sub-modules (N_sub = max P_q over the layers of this
// kernel size) and steers each beat to the sub-module of its output row with
// in_sel; the outputs are merged back by the same, delayed, selection. All
// sub-modules are sized for the worst layer of this kernel size (DEPTH = the
// largest Ch_in). flush returns every sub-module to idle at the end of a band
// of rows.
//
// Interface and timing are those of cache_l1_submodule: in_col is one column
// of FH elements, out_win the FW x FH window (element r*FW + j), one clock of
// latency. The structure (demux, sub-modules, mux) follows the design; the
// select encoding is this implementation's own.
module cache_l1_module #(
  parameter int FW    = 3,
  parameter int FH    = 3,
  parameter int N_SUB = 2,
  parameter int DEPTH = 256,
  parameter int B     = 16,
  parameter int TAG_W = 9
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [$clog2(DEPTH+1)-1:0]             cfg_ch_in,
  input  logic                                   flush,
  input  logic                                   in_valid,
  input  logic [(N_SUB > 1 ? $clog2(N_SUB) : 1)-1:0] in_sel,
  input  logic [FH-1:0][B-1:0]                   in_col,
  input  logic [TAG_W-1:0]                       in_tag,
  output logic                                   out_valid,
  output logic [FW*FH-1:0][B-1:0]                out_win,
  output logic [TAG_W-1:0]                       out_tag
);

  localparam int SW = (N_SUB > 1) ? $clog2(N_SUB) : 1;

  logic [N_SUB-1:0]                   sub_valid;
  logic [N_SUB-1:0][FW*FH-1:0][B-1:0] sub_win;
  logic [N_SUB-1:0][TAG_W-1:0]        sub_tag;
  logic [SW-1:0]                      sel_q;

  for (genvar s = 0; s < N_SUB; s++) begin : g_sub
    logic ld_unused, run_unused;
    cache_l1_submodule #(
      .FW(FW), .FH(FH), .IWP(1), .DEPTH(DEPTH), .B(B), .TAG_W(TAG_W)
    ) u_sub (
      .clk, .rst_n, .cfg_ch_in, .flush,
      .in_valid (in_valid && (in_sel == SW'(s))),
      .in_col   (in_col),
      .in_tag   (in_tag),
      .out_valid(sub_valid[s]),
      .out_win  (sub_win[s]),
      .out_tag  (sub_tag[s]),
      .loading  (ld_unused),
      .running  (run_unused)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sel_q <= '0;
    else if (in_valid) sel_q <= in_sel;
  end

  always_comb begin
    out_valid = 1'b0;
    out_win   = sub_win[0];
    out_tag   = sub_tag[0];
    for (int s = 0; s < N_SUB; s++) begin
      if (sel_q == SW'(s)) begin
        out_valid = sub_valid[s];
        out_win   = sub_win[s];
        out_tag   = sub_tag[s];
      end
    end
  end

  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n)
                                in_valid |-> (int'(in_sel) < N_SUB));

endmodule
