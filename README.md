# Rank-difference weighing-selection image processor

Many nonlinear image filters need the pixels of a small window sorted
first. Median, minimum and maximum (erosion and dilation), other order
statistics, and their complements all depend only on how the pixel values
rank. This processor sorts the nine pixels of every 3x3 window once. It then
forms every output function as a **weighted sum**, either over the sorted
values (the *ranks*) or over the gaps between neighbouring ranks (the *rank
differences*). A control vector of ten weights selects the function. A
one-hot vector picks one rank. A run of ones over the differences gives a
complement. Fractional weights give averages of ranks, and signed weights
give contrasts. Changing the function means changing the weights; the
hardware stays the same.

The RTL contains three processors, built from the same cells:

| module  | what it is |
|---------|------------|
| `dmip3` | The main image processor. Pixels arrive one per clock in raster order. It searches the windows itself, sorts them in a pipelined sorting network and produces two weighted outputs, one over the ranks and one over the rank differences. One result per clock. |
| `dmip1` | A parallel-input variant. Ten signals arrive per clock, go through the same sorting network, and a rank code picks one of them. |
| `mrp`   | A relational preprocessor with an *iterative* sorting node. A ten-channel sample-and-hold bank is sorted in place by two rows of cells in five clocks, in direct or inverse order, and then a rank multiplexer picks one rank. It uses far fewer cells than the pipelined network, at the cost of six clocks per vector. |

`mip_top` places the three side by side, each with its own ports.

## Ranks, differences and the auxiliary channel

The sorting nodes have ten channels: the nine window pixels plus an
**auxiliary channel tied to 0**. After sorting in descending order:

    Ds(0) >= Ds(1) >= ... >= Ds(8) >= Ds(9) = 0

`Ds(0)` is the window maximum, `Ds(4)` the median and `Ds(8)` the minimum.
With a reference level `D` (the top of the range, normally 255), the rank
differences are:

    Dr(0) = D - Ds(0)
    Dr(r) = Ds(r-1) - Ds(r)      r = 1..9      (so Dr(9) = Ds(8))

These ten differences always add up to `D`. A partial sum of them is
therefore a complement: `Dr(0) + ... + Dr(k) = D - Ds(k)`. The two outputs
are:

    output 1:  F1 = sum_{r=0..9} Ys(r) * Ds(r)
    output 2:  F2 = sum_{r=0..9} Yd(r) * Dr(r)

Example control vectors (weights listed for r = 0..9):

| vector | on | result |
|--------|----|--------|
| `0 0 0 0 1 0 0 0 0 0` | ranks | median |
| `1 0 0 0 0 0 0 0 0 0` | ranks | maximum (dilation) |
| `0 0 0 0 0 0 0 0 1 0` | ranks | minimum (erosion) |
| `0 0 0 0 .5 .5 0 0 0 0` | ranks | mean of ranks 4 and 5 |
| `0 0 0 .25 .25 .25 .25 0 0 0` | ranks | mean of the four middle ranks |
| `0 1 2 3 4 5 5 5 5 5` | ranks | rank-weighted sum |
| `1 1 1 1 1 0 0 0 0 0` | differences | D - median (complement of the median) |
| `1 0 0 0 0 0 0 0 0 0` | differences | D - maximum |
| `0 0 0 0 0 0 1 0 0 0` | differences | Ds(5) - Ds(6), the gap between two ranks |
| `0 0 1 1 1 1 1 0 0 0` | differences | Ds(1) - Ds(6), the spread of ranks 1..6 |
| `0 1 1 1 1 -1 -1 -1 -1 0` | differences | a signed contrast of the upper and lower ranks |

### Number formats

Pixels are 8-bit unsigned. Weights are 8-bit two's complement with 2
fractional bits, so they run from -32 to 31.75 in steps of 0.25. Enter a
weight as `4 * value`: for example, 0.25 is `1`, 1 is `4` and -1 is `-4`.
Rank differences are 9-bit signed. A difference is negative only if `D` is
set below the window maximum.

Each output comes in two forms:
- `f*_acc`: the exact sum, 21-bit signed, still with 2 fractional bits.
- `f*_pix`: the sum rounded to the nearest integer (halves round up) and
  clamped to 0..255, ready to be stored as an output pixel.

## The sorting network (`wave_sorter`)

The network is a regular "wave" structure: every layer is a row of N/2
identical compare-exchange cells (`cmp_swap`). Each cell routes the larger
input to its upper line and the smaller to its lower line. The layers
alternate between two pairings:

    even layers:  (0,1) (2,3) (4,5) (6,7) (8,9)
    odd layers:   (1,2) (3,4) (5,6) (7,8) + ring cell (0,9)

The *ring cell* closes each odd layer, so that it also has N/2 = 5 cells and
every layer is the same. It compares the top channel with the bottom channel
and sends the larger value to the top. That is a normal comparator for a
descending sort, so it can never spoil the order.

For ten channels there are **N-1 = 9 layers, 45 cells**. Nine layers are not
enough to sort ten arbitrary values. They are enough here because the
auxiliary channel already holds the lowest level and sits in the last
position. Effectively, nine odd-even transposition rounds sort the nine
pixels, and nine rounds are sufficient for nine values. If you use
`wave_sorter` on ten unconstrained values, set `N_LAYERS = N`. The testbench
checks both cases, using every zero-one input pattern (which by the zero-one
principle covers all inputs) plus random vectors.

Every layer ends in a register. A new window can therefore enter on every
clock, and the sorted vector appears nine clocks later. `swaps` outputs the
comparator states of every layer. They are enough to rebuild the permutation
the network applied, but nothing in the processors uses them.

## The window search (`window_buffer`)

Pixels stream in raster order, one per clock when `pix_valid` is high. `sof`
marks the first pixel of a frame and restarts the row and column counters,
even in the middle of a frame. Two shift registers, each one image row long
(`IMG_W` pixels), hold the two previous rows. A 3x3 bank of registers holds
the current window.

When the pixel at (row, col) arrives, with row >= 2 and col >= 2, the window
centred on (row-1, col-1) is output one clock later, together with its centre
coordinates. Border pixels produce no result, so a 64x64 frame yields 62x62
results. Holding `pix_valid` low stalls the buffer. The pipeline behind the
buffer never stalls: every window simply travels through it.

## Timing of `dmip3`

| stage | clocks |
|-------|--------|
| window register | 1 |
| sorting network | 9 |
| rank differences | 0 (combinational) |
| weighted sums, output register | 1 |

A result appears with `out_valid` **11 clocks** after the pixel that completes
its window. Results come at one per clock, with `out_x`/`out_y` (the window
centre) and `out_eof` (the last result of the frame) aligned to them. `ranks`
carries the sorted window of the same result. `ys`, `yd` and `d_ref` are
plain inputs that are expected to stay fixed over a frame. They are read as
each window leaves the sorter, 10 clocks after its last pixel arrived.

## The iterative sorting node (`iter_sorter`, `mrp`)

The iterative node keeps the ten values in a sample-and-hold bank
(`shd_bank`). Two fixed rows of five cells sit behind the bank:

- row A pairs (0,1)...(8,9);
- row B pairs (1,2)...(7,8) plus the ring cell (0,9).

On each clock the output of row B is written back into the bank. One clock
therefore performs two layers of the network, and five clocks perform ten
layers. Ten odd-even transposition rounds sort any ten values, so no
auxiliary channel is needed here.

- **Timing:** `start` samples `x_in` on the next edge. Five rewriting clocks
  follow. `done` rises **six clocks after start**, and the result is held
  until the next start. A `start` that arrives while the node is `busy` is
  ignored.
- **Direction:** `descending = 1` gives direct order (rank 0 is the maximum);
  `descending = 0` gives inverse order (rank 0 is the minimum). The direction
  must be held during a sort, and an assertion checks this.
- **Rank multiplexer:** in `mrp`, `rank_mux` selects rank r when bit r of the
  one-hot `rank_sel` is set.
- **Cost:** the node uses ten cells where the pipelined network uses 45. The
  price is one result per six clocks instead of one per clock.

## Parallel-input variant (`dmip1`)

`dmip1` takes ten signals at once, normally nine pixels and a 0. It sorts
them in `wave_sorter` and registers the rank chosen by a one-hot code. The
result appears 10 clocks after the input, one per clock.

## Origin and departures

This RTL follows a published design for rank-based image processors. The
following come from that design:
- the sorting structures: the layered wave network with N/2 cells per layer
  and N-1 layers, and the iterative node of two cell rows over a
  sample-and-hold bank with five iterations;
- the ten-channel organisation: nine pixels plus one auxiliary channel;
- the rank-difference definitions and the two weighted-sum outputs;
- the example control vectors;
- the 64x64 image and 3x3 window.

The following are choices made here, because the source leaves them open:
- The auxiliary channel is held at 0. The source names an auxiliary channel,
  and its last difference is the lowest pixel rank, but it does not state
  the auxiliary level.
- Where the ring cell is placed, and the fact that N-1 layers are enough only
  because of the auxiliary channel.
- A register after every sorting layer, which sets the latencies of 11
  clocks (`dmip3`) and 10 clocks (`dmip1`). The source states only a
  processing cycle of 25 ns (40 MHz pixel rate) for its FPGA build; the clock
  rate of this RTL has not been measured on any device.
- Row shift registers for the window search, in place of a full-frame store.
- No results for border pixels.
- The weight format, and the rounding and clamping of the pixel outputs.
- The `sof` / `pix_valid` stream interface and the asynchronous active-low
  reset `rst_n`, which clears every register.
- The control vectors are plain ports. The source does not describe how
  control commands are loaded.

The published analog implementation uses current-mirror cells,
sample-and-hold circuits, clock generators and converters. Here each sorting
cell is a digital comparator with a multiplexer, and each sample-and-hold
circuit is a register. No analog behaviour is modelled.

Colour images need one `dmip3` per colour component.

## Parameters

All defaults live in `mip_pkg`: `PIX_W = 8`, `N_CH = 10`, `IMG_W = IMG_H = 64`,
`WGT_W = 8`, `WGT_FRAC = 2`. The modules take them as parameters (`W`, `N`,
`IMG_W`, `IMG_H`, `WGT_W`, `WGT_FRAC`, `ACC_W`).

- The window size is fixed at 3x3: `window_buffer` builds a 3x3 window and
  `dmip3` feeds nine pixels plus the auxiliary channel.
- `wave_sorter` and `iter_sorter` work for any N. For odd N, the ring cell
  is replaced by a pass-through.
- Changing `IMG_W` changes only the row buffers and the coordinate widths.

## Files

| file | content |
|------|---------|
| `rtl/mip_pkg.sv` | shared sizes and the accumulator-width function |
| `rtl/cmp_swap.sv` | max/min compare-exchange cell with direction and state output |
| `rtl/wave_sorter.sv` | pipelined wave sorting network |
| `rtl/window_buffer.sv` | row buffers and 3x3 window search |
| `rtl/rank_diff.sv` | rank differences |
| `rtl/rank_weigher.sv` | weighted-sum switching node |
| `rtl/rank_mux.sv` | one-hot rank multiplexer |
| `rtl/shd_bank.sv` | sample-and-hold register bank |
| `rtl/iter_sorter.sv` | iterative sorting node |
| `rtl/mrp.sv` | iterative node plus rank multiplexer |
| `rtl/dmip1.sv` | parallel-input processor |
| `rtl/dmip3.sv` | serial-input processor with two weighted outputs |
| `rtl/mip_top.sv` | the three processors side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/mip_ref_pkg.sv` | reference model used by the processor testbenches |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the testbench hangs. Example with Verilator
5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/mip_pkg.sv tb/mip_ref_pkg.sv tb/tb_mip_top.sv --top-module tb_mip_top
    ./obj_dir/Vtb_mip_top

For another testbench, replace `tb_mip_top` with its name.

What the testbenches cover:
- **`tb_mip_top`** runs all three processors at the default sizes and
  compares every result against the reference model. `dmip3` processes three
  64x64 frames and one frame that is cut short and restarted by `sof`.
- It also counts how often each mechanism occurs and fails if any count is
  zero. The mechanisms are: stream stalls, border skips, a frame restart,
  rank selection, complements, fractional and negative weights, clamping at
  both ends, direct and inverse iterative sorts, and the parallel path.
- **Sorters:** `tb_wave_sorter` and `tb_iter_sorter` try every zero-one input.
- **Latencies:** every pipeline testbench checks the exact latency (11, 10,
  9 and 6 clocks).

All testbenches pass. A full run of `tb_mip_top` takes well under a second.
