// Shared constants and types of the CNN accelerator with a Cache L2 / Cache L1 /
// Filters Cache memory hierarchy.
//
// The numbers marked "design value" are the configuration of the CloudScout
// accelerator this RTL reproduces (16-bit activations, I_ch = 1, I_h = 3,
// I_w = 3 reduced to I'_w = 1 by the Cache L1, so 9 elements per step without
// and 3 with the Cache L1). Values marked "chosen" are not fixed by that design
// and were picked here; they are listed in README.md.
package cnn_pkg;

  // Element widths
  localparam int B_IN   = 16;  // design value: activation bits b_in
  localparam int B_FILT = 8;   // chosen: filter bits b_filter
  localparam int ACC_W  = 40;  // chosen: accumulator width (16x8 products, 25x256 terms)

  // Scheduling parameters
  localparam int I_CH     = 1;                  // design value
  localparam int I_H      = 3;                  // design value
  localparam int I_W      = 3;                  // design value
  localparam int I_WP     = 1;                  // design value: I'_w
  localparam int P_ELEM   = I_CH * I_W * I_H;   // elements per clock into the Processing Unit: 9
  localparam int P_ELEM_P = I_CH * I_WP * I_H;  // elements per clock out of Cache L2: 3 (documents the port width; the modules derive it from I_H, so it is not referenced)

  // Network limits
  localparam int KMAX     = 5;            // largest kernel with data re-use (5x5)
  localparam int KK       = KMAX * KMAX;  // largest window, elements
  localparam int MAX_CH   = 256;          // design value: max Ch_in of the 3x3 layers
  localparam int CH5_MAX  = 3;            // design value: max Ch_in of the 5x5 layers
  localparam int N_SUB    = 2;            // design value: max pooling grid P_q
  localparam int CH_W     = $clog2(MAX_CH);
  localparam int KIDX_W   = $clog2(KK);

  // Processing Unit and bus
  localparam int N_PAR    = 64;           // chosen: filters computed in parallel (64 x 9 = 576 MACs)
  localparam int BUS_W    = 128;          // chosen: AXI data width b_width

  // Side information that travels with every beat towards the Processing Unit:
  // the input channel (selects the Filters Cache word) and the end of an output.
  typedef struct packed {
    logic            last;
    logic [CH_W-1:0] ch;
  } beat_tag_t;

  localparam int TAG_W = $bits(beat_tag_t);

endpackage
