// Filters Cache: on-chip storage for the filters of the layer under process.
//
// Instead of keeping every filter of the network on chip, only the current
// layer's filters are held; between layers they are reloaded from external
// memory over the bus. Depth and word follow the sizing rule of the design:
// DEPTH = largest Ch_in of any layer, one word per input channel holding that
// channel's kernel (up to KK = F_w * F_h weights). The word is widened by
// N_PAR because the Processing Unit computes N_PAR output channels at once
// (that parallelism is this implementation's choice): weight k of filter f is
// at bits [(f*KK + k)*BF +: BF]; a KxK kernel uses k = r*K + j, the rest are
// ignored.
//
// Loading: clear, then BUS_W-bit beats; BEATS = N_PAR*KK*BF/BUS_W consecutive
// beats form one word (first beat in the lowest bits), words are written to
// addresses 0, 1, 2, ... and loaded_ch counts the complete words. Reload time
// per layer is therefore Ch_in * BEATS bus beats.
//
// Timing: rd_word is valid one clock after rd_addr is presented with rd_en.
module filters_cache #(
  parameter int DEPTH = 256,
  parameter int N_PAR = 64,
  parameter int KK    = 25,
  parameter int BF    = 8,
  parameter int BUS_W = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          wr_valid,
  input  logic [BUS_W-1:0]              wr_data,
  output logic [$clog2(DEPTH+1)-1:0]    loaded_ch,
  input  logic                          rd_en,
  input  logic [$clog2(DEPTH)-1:0]      rd_addr,
  output logic [N_PAR*KK*BF-1:0]        rd_word
);

  localparam int W     = N_PAR * KK * BF;
  localparam int BEATS = W / BUS_W;
  localparam int BTW   = $clog2(BEATS + 1);
  localparam int AW    = $clog2(DEPTH);

  logic [W-1:0]     mem [DEPTH];
  logic [W-1:BUS_W] shreg;     // beats received so far (the oldest leaves at the bottom)
  logic [BTW-1:0]   beat;
  logic [AW-1:0]    w_addr;
  logic [W-1:0]     w_word;

  assign w_word = {wr_data, shreg[W-1:BUS_W]};

  always_ff @(posedge clk) begin
    if (wr_valid) shreg <= w_word[W-1:BUS_W];
    if (wr_valid && beat == BTW'(BEATS - 1)) mem[w_addr] <= w_word;
    if (rd_en) rd_word <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      beat      <= '0;
      w_addr    <= '0;
      loaded_ch <= '0;
    end else if (wr_valid) begin
      if (beat == BTW'(BEATS - 1)) begin
        beat      <= '0;
        w_addr    <= w_addr + 1'b1;
        loaded_ch <= loaded_ch + 1'b1;
      end else begin
        beat <= beat + 1'b1;
      end
    end
  end

  // Parameter check at elaboration.
  if (W % BUS_W != 0) begin : g_bad_w
    $error("filters_cache: word must be a whole number of beats");
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> (int'(loaded_ch) < DEPTH));

endmodule
