// Column assembler between Cache L2 and the Cache L1 sub-modules.
//
// Cache L2 delivers at most IH elements of one kernel column per clock. When
// the kernel height cfg_fh is larger than IH, a column arrives as several
// chunks: IH elements as long as possible and cfg_fh mod IH at the end (top
// rows first). This block collects the chunks and hands the sub-modules one
// complete column of cfg_fh elements, so the sub-module always sees whole
// columns and IH can be sized freely. This is the control circuit the design
// places in front of the sub-modules; its registers and handshake are this
// implementation's own.
//
// Interface: in_data element i of a chunk is kernel row (chunk*IH + i); only
// rows below cfg_fh are used. out_col element r is kernel row r; elements at
// r >= cfg_fh are zero. out_tag is the tag of the chunk that completed the
// column. Timing: out_valid rises one clock after the last chunk of a column.
// Reset (synchronous, active low) empties the partial column.
module column_assembler #(
  parameter int FH_MAX = 5,
  parameter int IH     = 3,
  parameter int B      = 16,
  parameter int TAG_W  = 9
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(FH_MAX+1)-1:0]   cfg_fh,
  input  logic                          in_valid,
  input  logic [IH-1:0][B-1:0]          in_data,
  input  logic [TAG_W-1:0]              in_tag,
  output logic                          out_valid,
  output logic [FH_MAX-1:0][B-1:0]      out_col,
  output logic [TAG_W-1:0]              out_tag
);

  localparam int OW = $clog2(FH_MAX + IH + 1);

  logic [OW-1:0]               off;      // rows already collected
  logic [FH_MAX-1:0][B-1:0]    part, merged;
  logic                        done;

  always_comb begin
    merged = part;
    for (int i = 0; i < IH; i++)
      for (int r = 0; r < FH_MAX; r++)
        if (OW'(r) == off + OW'(i) && OW'(r) < OW'(cfg_fh)) merged[r] = in_data[i];
    done = (off + OW'(IH) >= OW'(cfg_fh));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      off       <= '0;
      part      <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid && done;
      if (in_valid) begin
        if (done) begin
          off     <= '0;
          part    <= '0;
          out_col <= merged;
          out_tag <= in_tag;
        end else begin
          off  <= off + OW'(IH);
          part <= merged;
        end
      end
    end
  end

  a_cfg_fh: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid |-> (int'(cfg_fh) >= 1 && int'(cfg_fh) <= FH_MAX));

endmodule
