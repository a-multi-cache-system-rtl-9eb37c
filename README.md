# Multi-cache convolution accelerator

A CNN accelerator on an FPGA usually keeps the feature map it is working on
(or a band of its rows) in on-chip RAM. It reads that RAM wide enough to feed
every multiplier on every clock. For a 3x3 window read in one go, that means
P_elem = 9 elements per clock. The port width, not the data volume, then sets
how many RAM blocks are needed, because each block contributes only a few
bits of port.

This design cuts the read port of that big feature-map store to
P'_elem = 3 elements per clock: one column of a 3-row window. It gets the
full 9-element windows back from a small re-use buffer, the **Cache L1**.
Two neighbouring outputs of a stride-1 convolution share all but one window
column. So after the first output of a row, only the new column has to come
from the big store; the other columns are already in the Cache L1. The cost
is a slower start of every output row, when the Cache L1 is empty.

A second, simpler idea keeps only the current layer's filters on chip, in
the **Filters Cache**. Each layer's filters are reloaded from external memory
before the layer starts.

Around those two caches sits a complete band-level datapath:

- a stream front end;
- the big feature-map store (**Cache L2**);
- a scheduler that generates the read order;
- a multiplexer that chooses between direct (bypass) data and Cache L1
  windows;
- a Processing Unit with 64 filters x 9 multipliers;
- max pooling.

The whole thing is written as synthesizable SystemVerilog-2017. It runs in
one clock domain with a synchronous active-low reset.

## Data path

```
 bus beats ──► axi_interface ──┬─► (elements) cache_l2 ──3 elements/clk──┬──────────────► window_feeder ─9─► processing_unit ─► max_pool ─► axi_interface ─► results
 (s_dest)                      │                                         │    bypass          ▲                   ▲
                               │                                         └─► cache_l1_system ─┘ 25-elem window    │
                               └─► (beats) filters_cache ─────────────────────────────────────── weights ──────────┘
                                         scheduler: read order, routing, sub-module select, flushes, stalls
```

| Module | Role |
|---|---|
| `cnn_pkg` | Shared widths and constants, and the beat tag `{last, ch}` |
| `axi_interface` | Input FIFO (1024 beats), routing by `s_dest`, beat-to-element serialiser, result FIFO (16 vectors) |
| `cache_l2` | Band store: 3 row-interleaved banks of 110,592 x 16 bit; reads any 3 consecutive rows of one column and channel per clock |
| `scheduler` | One band per `start`: walks grid positions, channels and window columns; stalls on missing data |
| `column_assembler` | Joins 3+2 chunks into a 5-high column for 5x5 layers |
| `cache_l1_submodule` | The re-use buffer for one output row and one filter size |
| `cache_l1_module` | N_sub sub-modules of one filter size, selected by the output row |
| `cache_l1_system` | Column assembler plus a 3x3 module and a 5x5 module, selected by the kernel size |
| `window_feeder` | Bypass or window; cuts a 25-element window into 3 beats of 9 |
| `filters_cache` | One word per input channel: 64 filters x 25 weights x 8 bit |
| `processing_unit` | 64 x 9 signed MACs; accumulates over kernel positions and channels |
| `max_pool` | Running maximum over P x P consecutive outputs |
| `sync_fifo` | First-word-fall-through FIFO used by the front end |
| `cnn_accel_top` | Wires the above together |

## The Cache L1 system

This is the part that makes the narrow Cache L2 port work. It is also the
part most worth understanding before changing anything.

### One sub-module, 3x3 filter

Each input channel of the layer has one memory word in the
`cache_l1_submodule`. The word holds the F_w - I'_w = 2 most recent columns
of that channel's window, F_h = 3 elements each. The memory is therefore
Ch_in words deep and (F_w - I'_w) * F_h * b_in = 96 bits wide. The
sub-module has two phases.

**Row start (LOAD).** The first output of an output row has nothing to
re-use. The scheduler reads all three columns of the window for every
channel: channel 0 columns 0, 1, 2, then channel 1, and so on. Each read is
one clock of 3 elements. These reads go to the Processing Unit directly, as
*bypass* beats, so the first output is computed while the sub-module stores
columns 1 and 2 of each channel. The sub-module produces no output in this
phase. It counts Ch_in * F_w/I'_w beats and then enters RUN.

**Regime (RUN).** For each later output, the scheduler reads one new column
per channel, x + F_w - 1. The sub-module does the following for each one:

- reads the channel's word;
- builds the window from the two stored columns plus the new one;
- outputs the window one clock after the input;
- writes back the word shifted by one column, dropping the oldest column.

Channel c is read again only Ch_in clocks later. With one channel the read
and the write of the same word fall on consecutive clocks, so a
read-after-write forward is built in.

**Flush.** `flush` returns the sub-module to LOAD. The scheduler flushes all
sub-modules at the end of a band; the next band's first row then starts
clean.

**Cost.** For a 3x3 layer, a row start takes F_w = 3 clocks per channel
instead of one. Each output row therefore loses 2 * Ch_in clocks. In return,
the Cache L2 port is a third as wide.

### 5x5 filters and the column assembler

The Cache L2 port delivers I_h = 3 rows. A 5-high column is therefore read
in two chunks, the top 3 rows and then the bottom 2. `column_assembler`
joins them and releases the column one clock after the second chunk.

- A 5x5 row start takes 5 columns x 2 chunks = 10 clocks per channel.
- In the regime, the new column takes 2 clocks, and the window it completes
  needs 3 beats of 9 in the Processing Unit. The scheduler inserts one idle
  clock per channel, so a 5x5 regime output takes 3 clocks per channel.

The 5x5 sub-module is only 3 words deep, because the largest 5x5 layer
has 3 input channels. Each word is 4 x 5 x 16 = 320 bits.

### Several output rows at once: N_sub

When a 2x2 max pool follows the layer, the schedule computes two output rows
together, in pooling-grid order:

1. (row 0, col 0)
2. (row 0, col 1)
3. (row 1, col 0)
4. (row 1, col 1)
5. then the next grid position.

Each of those output rows has its own sliding window. So each filter size
gets N_sub = max pooling size = 2 sub-modules (`cache_l1_module`). The
"output row" select steers each column to the sub-module of its row, and
picks that sub-module's window at the output. The select is delayed by the
sub-module latency for the output mux.

### Kernel size select

`cache_l1_system` holds the column assembler and one module for each filter
size: 3x3 with 2 x 256 words, and 5x5 with 2 x 3 words. `cfg_k` chooses
which module is written and which drives the 25-element output. A 3x3
window uses elements 0..8, and the rest are zero. Element `r*K + j` is
window row r, column j. 1x1 layers have no re-use and never touch the
Cache L1 system.

Latency: the window appears 2 clocks after the chunk that completes it. One
clock is the assembler and one is the sub-module.

### Memory of the Cache L1 system

The size follows from the sub-module formula:

M = sum over filter sizes of (F_w - I'_w) * F_h * max Ch_in * b_in * N_sub

With the defaults this is 2 * 3 * 256 * 16 * 2 + 4 * 5 * 3 * 16 * 2
= 49,152 + 1,920 bits, about 0.051 Mbit. The source design reports 0.105 Mbit
for its implementation. That number evidently counts whole memory primitives
(3 block RAMs plus distributed RAM); the register-level count is the one
built here.

## Cache L2: the band store

A band is the set of input rows needed for the output rows computed together:
F_h + P - 1 rows (3x3 with pooling: 4; 5x5 with pooling: 6). Elements arrive
in this order:

1. column x;
2. within a column, channel c;
3. within a channel, band row r.

A counter tracks how many complete columns (all rows, all channels) have
been written (`cols_filled`). The scheduler compares every read against that
count. A read of a column not yet written is a **miss**: the schedule
freezes until the column arrives, so a band may be started before its data.

Storage is I_h = 3 banks, with band row r in bank r mod 3. Any 3 consecutive
rows are therefore in different banks and come out in one clock. The address
within a bank is `(x*Ch_in + c)*2 + r/3`, so each bank holds 2 band rows. The
limit per band is `W * Ch_in <= 55,296` (bank depth 110,592 / 2). The total
is 3 x 110,592 x 16 bit = 5.3 Mbit, close to the 5.06 Mbit of the source
design. Read latency is one clock. Lanes beyond `rd_n` read as zero.

## The scheduler

The scheduler runs one band per `start` pulse. Its loops, outermost first:

1. grid position;
2. output row in the grid, which selects the sub-module;
3. output column in the grid;
4. input channel;
5. window column;
6. chunk.

It issues at most one Cache L2 read per clock. With each read it sends a
routing record that says:

- whether the data goes to bypass, the Cache L1, or both (row start);
- which sub-module receives it;
- which kernel positions the 3 elements have;
- the tag: channel, and a last flag on the final beat of an output.

The top registers the record for one clock so that it lines up with the
Cache L2 data.

Clocks per output and per channel, with no misses:

| Layer | Row start | Regime |
|---|---|---|
| 1x1 | 1 | 1 |
| 3x3 | 3 | 1 |
| 5x5 | 10 | 3 |

Busy time for a band without misses, as checked by the testbenches:

```
busy = 1 + P * Ch * (start + (out_w - 1) * regime) [5x5: - P*(3-2)] + (P==2 && K>1 ? 8 : 0) + 12
```

The extra terms come from two drains. Before the first output of the second
row of a grid, the scheduler waits 8 clocks. This keeps a row-start bypass
beat from overtaking a window still inside the Cache L1 path. At the end of
the band it waits 12 clocks, flushes the Cache L1 and pulses `done`.

For 3x3 the extra time of a row start is 2 * Ch clocks. That equals
ceil(9 Ch / 3) - floor(9 Ch / 9) clocks, the slowdown expected from narrowing
the port. For 5x5 the closed form gives 25 - 8 = 17 clocks at 3 channels. This
design takes 21, because a 5-high column costs two reads even though the
second one carries only 2 elements.

Stalls:

- A start waits until the Filters Cache holds `cfg_ch_in` channel words.
- A read waits while its column is not yet in Cache L2.

Five 32-bit counters report the clocks of each kind: busy, miss, row-start
reads, regime reads and bypass reads.

## Filters Cache

The Filters Cache has one word per input channel of the current layer, up
to 256 words. A word holds the weights of all 64 filters for that channel,
25 positions each, 8-bit signed. Weight (filter f, position r*K+j) sits at
bits `(f*25 + r*K + j)*8`.

- **Load.** A word is loaded as 100 consecutive 128-bit bus beats, lowest
  bits first. `loaded_ch` counts complete words.
- **Read.** The Processing Unit reads the word of the channel in the beat
  tag. Read latency is one clock.
- **Reload cost.** Reloading a layer takes 100 x Ch_in clocks at one beat
  per clock. Only the weights actually used would need
  F_w * F_h * 64 * 8 / 128 clocks per channel. That is 36 for a 3x3 layer
  and 100 for a 5x5 layer, so the padding costs 3x3 layers time as well as
  memory.

## Window feeder, Processing Unit, pooling

**Window feeder.** The feeder is the multiplexer in front of the Processing
Unit. Bypass chunks carry 3 elements on lanes 0..2. Cache L1 windows are cut
into ceil(K^2/9) beats of 9 elements. The last flag rides only on the final
beat of an output's final channel. `busy` tells the top that a 5x5 window is
still being cut, and an assertion checks that no new window arrives
meanwhile.

**Processing Unit.** The Processing Unit has 64 filters x 9 lanes. Each lane
multiplies its element by the weight at its kernel position, 16 x 8 bit
signed. The products are summed into a 40-bit accumulator per filter. On the
last beat the 64 sums are output, 2 clocks later. There is no bias,
activation or rescaling.

**Max pooling.** The pooling stage takes P^2 consecutive result vectors,
which the grid order makes one pooling window. It outputs their element-wise
signed maximum. P = 1 passes every vector through.

## Using the top

1. Reset with `rst_n` low for a few clocks.
2. Set `cfg_k` (1, 3, 5), `cfg_ch_in`, `cfg_out_w` (a multiple of
   `cfg_pool`) and `cfg_pool` (1 or 2). Hold them for the whole band.
3. Pulse `filt_clear` and send the filters: `s_dest = 1`, 100 beats per
   channel.
4. Pulse `fm_clear` and send the band: `s_dest = 0`, eight 16-bit elements
   per beat, element 0 in the low bits, in the column / channel / row order
   above. The band has `out_w + K - 1` columns.
5. Pulse `start`. Data may still be arriving. Wait for `done`.
6. Results come out on `m_valid`/`m_data` (ready/valid), one vector per
   pooled output, in column order. Output channel f is at
   `m_data[f*40 +: 40]`. `res_overflow` is sticky and means results were
   lost because `m_ready` was held low too long.

A layer is a sequence of bands that share the filters. A layer with more
than 64 output channels needs a pass per 64 filters. Both loops belong to
whoever drives the top.

Main parameters (the defaults are the source design's numbers where it
gives them):

| Parameter | Default | Meaning |
|---|---|---|
| `I_H`, `I_WP` | 3, 1 | rows and columns per Cache L2 read (P'_elem = 3) |
| `P_ELEM` | 9 | Processing Unit lanes per filter |
| `B_IN` | 16 | feature-map bits |
| `B_FILT` | 8 | weight bits (own choice) |
| `MAX_CH` | 256 | largest Ch_in of 3x3 and 1x1 layers; Filters Cache depth |
| `CH5_MAX` | 3 | largest Ch_in of 5x5 layers |
| `N_SUB` | 2 | sub-modules per filter size = largest pooling size |
| `N_PAR` | 64 | filters in parallel (64 x 9 = 576 MACs) |
| `L2_DEPTH` | 110,592 | words per Cache L2 bank |

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against a
reference model written in the testbench and ends with a
`TB_RESULT checks=N failures=M` line.

- **`tb_cnn_accel_top`** runs the top at its default parameters, end to end.
  It covers six bands:
  - 3x3 with pooling;
  - 5x5 with pooling;
  - 1x1;
  - 3x3 without pooling;
  - two bands started before their data, giving misses and the wait for
    filters.

  It checks every result vector against a convolution plus max-pooling
  reference, checks the busy-time formula, and requires each mechanism
  (row start, regime, bypass, miss, second sub-module, drain, 5x5, 1x1) to
  occur.
- **`tb_workload_cloudscout`** runs full-size bands of the network the
  design was made for:
  - three consecutive bands of the 512-wide 5x5 first layer, 3 channels,
    2x2 pooling, with the filters loaded once; the last band streams its
    rows in while computing;
  - a 256-channel 3x3 band with pooling;
  - a 256-channel 1x1 band.

  It checks the results and the row-start slowdown.

Each of these runs in seconds. To run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
    rtl/cnn_pkg.sv tb/tb_cnn_accel_top.sv --top-module tb_cnn_accel_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

## Where this departs from the source design, and limits

- **Band-level control only.** One `start` computes one band. Several things
  are left to the driver:
  - the band loop over a layer;
  - passes over more than 64 filters;
  - the layer sequence;
  - the external-memory addressing.

  The two fully connected layers of the target network are not supported.
- **Front end.** There is one clock, where the source design has a 115.4 MHz
  accelerator clock and a 200 MHz bus clock. Its ports are valid/ready
  streams with a destination bit, not an AXI master with addresses and
  bursts.
- **Processing Unit.** Only the multiply-accumulate part is built: no bias,
  activation or quantisation. The 64 x 9 arrangement is inferred from the
  576 multipliers of the source design.
- **Filters Cache.** The cache is sized as depth = largest channel count
  and width = largest filter: 25 weights for every filter, so
  256 x 64 x 25 x 8 = 3.28 Mbit. The source design's implemented cache is
  about 1.2 Mbit. That matches the largest per-layer product instead:
  256 channels x 9 weights x 8 bit x 64 filters. Reaching that size needs a
  word layout that changes with the filter size (one 3x3 channel per word,
  several words per 5x5 channel). It is not done here.
- **Convolution geometry.** Stride 1 only, and no padding: the driver sends
  padded rows if it needs them.
- **Filter sizes and channel parallelism.** Only filter sizes 1, 3 and 5 are
  supported. The same chunked-column method would carry over to 7x7 or
  11x11 with a larger assembler and another Cache L1 module. One input
  channel is processed per step (I_ch = 1); processing several channels in
  parallel would repeat the Cache L1 path per channel.
- **5x5 row start.** The row start costs 10 clocks per channel, not the
  ideal 25/3 (see the scheduler section).
- **Cache L1 size.** The Cache L1 size is the register-level count (0.051
  Mbit), not the reported primitive count (0.105 Mbit).
- **Other networks.** LeNet-5, NiN and VGG-16 need other parameter values:
  `CH5_MAX` up to 192, `MAX_CH` 512, and other bit widths. The defaults
  hold the target network only.
- **Lint warning.** Verilator reports `P_ELEM_P` in `cnn_pkg` as unused. It
  documents P'_elem = I_ch * I'_w * I_h = 3, the Cache L2 port width that the
  other modules derive from `I_H`.
