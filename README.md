# Configurable variable-point streaming FFT (8 / 16 / 32 / 64 points)

A continuous stream of complex samples (16-bit I and Q, one per clock) is cut
into frames. Each frame is transformed by an FFT whose length N is chosen
*per frame* from 64, 32, 16 or 8 points. The length can change between two
frames while the stream keeps running. There is no zero-padding to a fixed
size, no faster clock for short transforms, and no regenerated core.

The idea comes from the architecture in "Hardware design of Real time
Configurable Variable point FFT for multi-rate applications". The FFT is
built as a chain of frame buffers. Each butterfly stage processes one frame
while the next frame is being buffered, so the processing takes no time
beyond the buffering. Every twiddle factor sits in an ordinary memory that
the design can read and change, not inside a closed core. Changing N then
only changes counters, address masks and a twiddle start address.

## Data flow: a chain of ping-pong frame buffers

```
 in ──► col 0 ──► stage 0 ──► col 1 ──► stage 1 ──► ... ──► col 5 ──► stage 5 ──► col 6 ──► out
        (2 banks)  add/sub      (2 banks)                    (2 banks)              output
                   ×W, /2                                                          buffer
                      ▲            ▲                                  ▲
                      └────────────┴──── twiddle memory (120 words) ──┘
```

* **Columns** (`pingpong_buf`): each column holds two banks of 64 words. A
  bank is a RAM with one write port and two read ports (`dual_out_ram`), and
  one word holds one I/Q pair. While one bank of a column fills, the other is
  read. Columns 0 to 5 feed the six butterfly stages. Column 6 is the output
  buffer. There are 14 banks in all.
* **Stages** (`fft_stage`): stage *s* reads a whole frame from column *s*,
  one sample per clock. It writes the results to the same addresses of
  column *s+1*.
* **Short transforms use fewer stages.** A frame of N = 2^L points passes
  through stages 0 to L-1 only. Stage L-1 writes the frame straight into the
  output buffer, so a 16-point frame never touches stages 4 and 5.

## How one stage computes a butterfly serially

The flow graph is radix-2 decimation in frequency (DIF), computed in place.
At stage *s* of an N-point transform, the span is h = N / 2^(s+1). Sample
k is paired with sample k XOR h. The stage runs a counter k = 0..N-1 and
reads two RAM ports in the same cycle:

| port | address | data |
|---|---|---|
| A (serial) | k | x[k] |
| B (partner) | k XOR h | x[k XOR h] |

The bit `k AND h` is the *enable*. It chooses both the operation and the
output:

* enable = 0, the upper half of a butterfly group:
  y[k] = (x[k] + x[k+h]) / 2.
* enable = 1, the lower half:
  y[k] = (x[k-h] - x[k]) · W / 2, where W = W_N^((k mod h)·2^s).

For 8 points (h = 4, 2, 1), stage 0 reads port B at 4,5,6,7,0,1,2,3 while
port A counts 0..7. The first four outputs are sums. The last four are
differences times W_8^0, W_8^1, W_8^2 and W_8^3.

Each result goes to address k of the next column. After L stages the frame
holds the spectrum in **bit-reversed order**: serial position p holds bin
bitrev_L(p). The output buffer is read out serially in that order, and
`out_bin` gives the bin number of each output word.

Pipeline inside a stage: the RAM and twiddle reads are registered. The
add/subtract (`signed_addsub`), the complex multiply (`cmult`: four real
multipliers and two adders) and the scaling (`scaler`) are combinational.
Each result is therefore written one cycle after its read. Upper outputs
skip the multiplier, because their twiddle is 1.

## Twiddle memory

`twiddle_mem` stores, for each order N, the N factors
W_N^k = cos(2πk/N) − j·sin(2πk/N), k = 0..N−1. These are the second column
of the N×N DFT matrix. The four regions together take 64+32+16+8 = 120 words:

| order | point_sel | region start |
|---|---|---|
| 64 | 00 | 0 |
| 32 | 01 | 64 |
| 16 | 10 | 96 |
| 8  | 11 | 112 |

Stage *s* reads the word at start + (k mod h)·2^s. It keeps the start
address of its current frame in its own `start_addr_reg`. Values are Q1.15
(scaled by 32767, rounded to nearest) and are computed at elaboration from
the formula above. No data file is needed. All six stages read at the same
time, so the table has six read ports. A synthesis tool builds these as
replicated ROMs.

## Changing the order on the fly

`point_sel` is sampled on the first sample of every input frame
(`config_regs`). The order is then stored as a tag next to the frame in
every bank it passes through. Each stage, the output read-out and the
twiddle start address all take N from the tag of the frame they are working
on. Frames of different lengths can therefore be in the pipeline at the same
time. `order_change` pulses when a frame starts with an order different from
the one before it.

`sync_ctrl` is the synchronization and data-flow logic. For every bank it
keeps a state: FREE, FILL, FULL or READ. Each column has a write pointer and
a read pointer. From these it makes all the RAM enables:

* A stage starts when three things hold: its read bank is FULL, it is idle,
  and its destination bank is free. A destination bank also counts as free
  when it is in its last read cycle, because the first new write comes one
  cycle later. On start, the stage claims both banks.
* A frame goes to the output buffer early, from stage L-1, only once all
  later columns are empty. This keeps a short frame from overtaking a long
  frame that is still in the pipeline, so frames leave in the order they
  arrived.
* **Limit of two banks per column.** At a change to a *larger* N, and at a
  fixed N, the stream never stops. At a change to a *smaller* N, the short
  frame fills its bank before the long frame has left the other bank. The
  input then has no free bank, so `in_ready` goes low until one frees up.
  For example, when two 8-point frames follow a 64-point frame, the second
  of them waits until the 64-point frame has been read out of column 0.
  Absorbing such a change without a hold-off would need
  deeper buffering. This design does not add it.

## Numbers, latency and rate

* **Scaling.** Each stage halves its result, rounding half up, and
  saturates to 16 bits. The output is therefore X[k]/N. A full-scale real
  tone of amplitude A shows up as A/2 in its bin, for example 16383 for
  32767.
* **Throughput.** At a fixed order, one sample goes in and one comes out per
  clock, and a frame leaves every N cycles. Each of the two output banks
  therefore delivers a frame every 2N cycles: 6.4 µs for 16 points and
  25.6 µs for 64 points at a 5 MHz clock.
* **Latency.** The first output sample of a frame comes
  N + log2(N)·(N+1) + 1 cycles after its first input sample. That is N to
  fill the input bank, N+1 per stage (N reads plus the registered read), and
  1 for the output read. For 16 points this is 85 cycles; for 64 points it
  is 455.

## Interface (`var_fft_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset of all control state |
| in_valid / in_ready | in / out | 1 | input handshake (in_ready is low only in the case above) |
| in_data | in | cplx_t (2×16) | input sample {re, im}, signed |
| point_sel | in | 2 | order of a frame, sampled on its first sample |
| out_valid | out | 1 | output word valid |
| out_data | out | cplx_t | X[k]/N |
| out_bin | out | 6 | k of this word (bit-reversed output order) |
| out_order | out | 2 | order of the frame being output |
| out_first / out_last | out | 1 | first / last word of a frame |
| order_change | out | 1 | one-cycle pulse when a frame of a new order starts |

Widths and sizes are constants in `fft_pkg`: DW = 16, TW = 16 and LMAX = 6
(64 points). Changing LMAX also needs the region table in
`order_tw_base` and the order loop in `twiddle_mem` to be extended.

## Design choices and departures from the published architecture

The published description gives the block structure, the serial/partner
addressing, the four-multiplier complex product, the one-table twiddle store
and the per-frame reconfiguration. The following points are this design's
own:

* **Sizes and encodings.**
  * Sample width is 16 bits, twiddle format is Q1.15, and the scaling is
    ÷2 per stage with rounding and saturation.
  * The point_sel codes 00 = 64 and 10 = 16 follow the published waveforms.
    The codes 01 = 32 and 11 = 8 are chosen here.
  * The published waveforms show peak outputs of 2047 (16 points) and 511
    (64 points) for a full-scale tone. The scaling behind those values is
    not known, and this design does not reproduce them.
* **Latency.** The published latency figure is N·log2(N), counted from the
  start of processing. Here it is N + log2(N)·(N+1) + 1 cycles, counted from
  the first input sample. The difference is the input buffering plus one
  registered RAM read per stage.
* **RAM count.** There are two banks for each of the log2(64) stages plus an
  output buffer pair, 14 banks in all.
* **Order changes.**
  * The `in_ready` hold-off at a change to a smaller order is this design's.
    The published description claims reconfiguration without any lag and
    does not discuss this case.
  * Frames leave in arrival order (the no-overtaking rule) as a design
    choice.
* **Alternatives not built.** The published text mentions three options that
  are not implemented:
  * a three-multiplier complex product;
  * deriving lower-order twiddles from the 64-point table;
  * a single 64-word twiddle memory rewritten on each order change.
* **Resource figures.** Block-memory and DSP counts reported for the
  original FPGA build are not matched, because the widths behind them are
  not known.

## Files

| file | block |
|---|---|
| `rtl/fft_pkg.sv` | shared types (`cplx_t`, `twid_t`, `order_t`), sizes, order helpers |
| `rtl/var_fft_top.sv` | top: wires the columns, stages, twiddle memory and control |
| `rtl/sync_ctrl.sv` | bank states, stage starts, output read-out |
| `rtl/config_regs.sv` | per-frame order register |
| `rtl/fft_stage.sv` | one butterfly stage (address logic, enable, datapath) |
| `rtl/signed_addsub.sv`, `rtl/cmult.sv`, `rtl/scaler.sv` | stage datapath parts |
| `rtl/start_addr_reg.sv` | twiddle start address of a stage's frame |
| `rtl/twiddle_mem.sv` | 120-word twiddle table, one read port per stage |
| `rtl/pingpong_buf.sv`, `rtl/dual_out_ram.sv` | frame buffer column and RAM bank |
| `tb/tb_<block>.sv` | self-checking testbench of each block |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog counts a failure if the run hangs. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/fft_pkg.sv tb/tb_var_fft_top.sv --top-module tb_var_fft_top
./obj_dir/Vtb_var_fft_top
```

What the testbenches cover:

* **`tb_var_fft_top`**, end to end at the full size:
  * streams 120 frames that cover all four orders, switches up and down, and
    includes DC, fs/2 and fs/4 test tones;
  * leaves random one-cycle gaps in `in_valid` during the last ten frames;
  * compares every output word with a floating-point DFT/N, within 4 LSB;
  * checks `out_bin`, the framing and the first-frame latency;
  * checks the N-cycle frame spacing at a fixed order (16 and 64 points) and the fs/4 peak at
    serial position 2 (bin 4 of 16, bin 16 of 64);
  * counts order changes, input hold-offs and early exits to the output
    buffer, and fails if any of them never happened.
* **`tb_tone_loopback`** plays DC, fs/2 and fs/4 tones in a continuous
  loop, first at 16 points and then at 64. It checks the expected spectrum of
  every frame: A in bin 0 or N/2, or A/2 in bins N/4 and 3N/4. It also checks
  the N-cycle frame spacing, and that repeated frames come out identical.
* **`tb_sync_ctrl`** drives the controller with behavioural stage models
  and follows frame numbers through the banks. It checks that no bank is
  overwritten while still unread, that each frame visits the right stages,
  that frames leave in order, and the latency.
* **`tb_fft_stage`** checks a stage bit-exactly against recomputed
  butterflies, including the partner addresses and the write timing.
* The other testbenches check each part on its own: the RAMs, the scaling
  and the twiddle table entries.

All testbenches pass. What has not been verified:

* timing closure at any clock rate;
* long runs at one order beyond the frames listed above.
