// Cache L2: on-chip buffer for the input feature map rows of the band being
// processed.
//
// The feature maps live in external memory; for each band of output rows the
// needed input rows (kernel height + pooling rows - 1, all channels, full
// width) are streamed in through the AXI interface. Writes arrive as a plain
// element stream in column-major order: for x = 0, 1, ...; for channel c; for
// band row r. The buffer counts them and tells the scheduler how many complete
// columns (all rows and channels of one x) it holds (cols_filled); a read that
// needs a column beyond that is the miss condition, on which the scheduler
// freezes the datapath.
//
// Reads return up to IH vertically adjacent elements of one column of one
// channel per clock (P'_elem = I_ch * I'_w * I_h elements). To serve IH
// different rows in one clock, rows are interleaved over IH banks (row r in
// bank r mod IH, slot r / IH), so any IH consecutive rows hit distinct banks.
// Bank word address: (x * cfg_ch_in + c) * RPB + r / IH.
//
// Sizes: 3 banks of BANK_DEPTH elements; the default 3 x 110,592 x 16 bit =
// 5,308,416 bit equals the design's 18 UltraRAMs (5.06 Mbit). Banking, write
// order and fill counting are this implementation's choices.
//
// Timing: rd_data is valid one clock after rd_en (synchronous bank read).
// clear (synchronous) restarts the write stream and empties the fill count.
module cache_l2 #(
  parameter int IH         = 3,
  parameter int B          = 16,
  parameter int RPB        = 2,        // band rows per bank (IH*RPB rows in all)
  parameter int BANK_DEPTH = 110592,
  parameter int CHW        = 9,        // width of channel counts
  parameter int XW         = 10        // width of column indices
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [CHW-1:0]          cfg_ch_in,    // channels, >= 1
  input  logic [3:0]              cfg_rows,     // rows in the band, 1..IH*RPB
  input  logic                    clear,
  // write stream
  input  logic                    wr_valid,
  input  logic [B-1:0]            wr_data,
  output logic [XW:0]             cols_filled,
  // read port
  input  logic                    rd_en,
  input  logic [3:0]              rd_row,       // top row of the chunk
  input  logic [$clog2(IH+1)-1:0] rd_n,         // rows in the chunk, 1..IH
  input  logic [CHW-1:0]          rd_ch,
  input  logic [XW-1:0]           rd_x,
  output logic                    rd_valid,
  output logic [IH-1:0][B-1:0]    rd_data
);

  localparam int AW = $clog2(BANK_DEPTH);
  localparam int NW = $clog2(IH + 1);

  logic [B-1:0] bank [IH][BANK_DEPTH];

  // ---------------- write side ----------------
  logic [XW-1:0]  w_x;
  logic [CHW-1:0] w_c;
  logic [3:0]     w_r;
  logic [AW-1:0]  w_addr;
  logic [$clog2(IH)-1:0] w_bank;

  always_comb begin
    w_bank = $bits(w_bank)'(int'(w_r) % IH);
    w_addr = AW'((int'(w_x) * int'(cfg_ch_in) + int'(w_c)) * RPB + int'(w_r) / IH);
  end

  always_ff @(posedge clk) begin
    if (wr_valid) bank[w_bank][w_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      w_x         <= '0;
      w_c         <= '0;
      w_r         <= '0;
      cols_filled <= '0;
    end else if (wr_valid) begin
      if (w_r == cfg_rows - 1'b1) begin
        w_r <= '0;
        if (w_c == cfg_ch_in - 1'b1) begin
          w_c         <= '0;
          w_x         <= w_x + 1'b1;
          cols_filled <= cols_filled + 1'b1;
        end else begin
          w_c <= w_c + 1'b1;
        end
      end else begin
        w_r <= w_r + 1'b1;
      end
    end
  end

  // ---------------- read side ----------------
  logic [IH-1:0][B-1:0] bank_q;
  logic [IH-1:0][AW-1:0] r_addr;
  logic [3:0]            row_q;
  logic [NW-1:0]         n_q;

  // Each bank b serves the lane whose row falls into it.
  always_comb begin
    for (int b = 0; b < IH; b++) begin
      r_addr[b] = '0;
      for (int i = 0; i < IH; i++) begin
        if ((int'(rd_row) + i) % IH == b)
          r_addr[b] = AW'((int'(rd_x) * int'(cfg_ch_in) + int'(rd_ch)) * RPB
                          + (int'(rd_row) + i) / IH);
      end
    end
  end

  for (genvar b = 0; b < IH; b++) begin : g_rd
    always_ff @(posedge clk) begin
      if (rd_en) bank_q[b] <= bank[b][r_addr[b]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      row_q    <= '0;
      n_q      <= '0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) begin
        row_q <= rd_row;
        n_q   <= rd_n;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < IH; i++) begin
      rd_data[i] = '0;
      for (int b = 0; b < IH; b++)
        if ((int'(row_q) + i) % IH == b && i < int'(n_q)) rd_data[i] = bank_q[b];
    end
  end

  a_wr_range: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> (int'(w_addr) < BANK_DEPTH && int'(w_r) < IH*RPB));
  a_rd_rows: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> (rd_n >= 1 && int'(rd_row) + int'(rd_n) <= IH*RPB));

endmodule
