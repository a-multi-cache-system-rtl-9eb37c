// Bus-side interface of the accelerator.
//
// Input: beats of BUS_W bits from the memory bus enter a FIFO together with a
// destination bit (s_dest = 0 feature-map data, 1 filter data). At the FIFO
// output a demultiplexer routes them: filter beats go unchanged to the Filters
// Cache (one per clock), feature-map beats are split into BUS_W/B elements
// that go to Cache L2 one per clock, lowest element first. s_ready is low while
// the FIFO is full.
//
// Output: result vectors of the Processing Unit (after pooling) are queued in
// a second FIFO and offered on m_valid/m_data until m_ready takes them.
// res_overflow flags a result that found this FIFO full (it is dropped).
//
// The design names an AXI interface with communication FIFOs and a
// demultiplexer to the two caches; the burst/address side of AXI belongs to
// the bus and is not modelled, and the two clock domains of the original
// (200 MHz bus, 115.4 MHz accelerator) are merged into one clock here.
// Widths, FIFO depths and the destination bit are this implementation's.
module axi_interface #(
  parameter int BUS_W     = 128,
  parameter int B         = 16,
  parameter int IN_DEPTH  = 1024,
  parameter int RES_W     = 2560,
  parameter int RES_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the bus
  input  logic               s_valid,
  output logic               s_ready,
  input  logic [BUS_W-1:0]   s_data,
  input  logic               s_dest,
  // to Cache L2
  output logic               fm_valid,
  output logic [B-1:0]       fm_data,
  // to the Filters Cache
  output logic               flt_valid,
  output logic [BUS_W-1:0]   flt_data,
  // results from the datapath
  input  logic               res_valid,
  input  logic [RES_W-1:0]   res_data,
  output logic               res_overflow,
  // to the bus
  output logic               m_valid,
  input  logic               m_ready,
  output logic [RES_W-1:0]   m_data
);

  localparam int EPB = BUS_W / B;              // elements per beat
  localparam int EW  = (EPB > 1) ? $clog2(EPB) : 1;

  logic              in_full, in_empty, in_pop;
  logic [BUS_W:0]    in_dout;
  logic [EW-1:0]     elem;
  logic              head_dest;
  logic [BUS_W-1:0]  head_data;
  logic              res_full, res_empty;
  logic [$clog2(IN_DEPTH):0]  in_count_unused;
  logic [$clog2(RES_DEPTH):0] res_count_unused;

  sync_fifo #(.W(BUS_W+1), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .push (s_valid && !in_full),
    .din  ({s_dest, s_data}),
    .full (in_full),
    .pop  (in_pop),
    .dout (in_dout),
    .empty(in_empty),
    .count(in_count_unused)
  );

  assign s_ready   = !in_full;
  assign head_dest = in_dout[BUS_W];
  assign head_data = in_dout[BUS_W-1:0];

  always_comb begin
    flt_valid = !in_empty && head_dest;
    flt_data  = head_data;
    fm_valid  = !in_empty && !head_dest;
    fm_data   = head_data[int'(elem)*B +: B];
    in_pop    = flt_valid || (fm_valid && elem == EW'(EPB - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) elem <= '0;
    else if (fm_valid) elem <= (elem == EW'(EPB - 1)) ? '0 : elem + 1'b1;
  end

  sync_fifo #(.W(RES_W), .DEPTH(RES_DEPTH)) u_res_fifo (
    .clk, .rst_n,
    .push (res_valid && !res_full),
    .din  (res_data),
    .full (res_full),
    .pop  (m_valid && m_ready),
    .dout (m_data),
    .empty(res_empty),
    .count(res_count_unused)
  );

  assign m_valid = !res_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) res_overflow <= 1'b0;
    else if (res_valid && res_full) res_overflow <= 1'b1;
  end

endmodule
