# NLC layer tile accelerator

A Non-Linear Convolution (NLC) layer is a convolution whose kernel is not a
constant. For every output pixel `(i,j)` and output channel `l` the layer first
*computes* a `W1 x W1 x K` kernel `v_{i,j,l}` from the input neighbourhood of
that pixel. It does this with an ordinary convolution by a bank of fixed
weights `u` (Conv1), an activation function (AF) and a normalization of the
whole kernel (Norm). It then applies that kernel to the same neighbourhood
(Conv2):

```
v_{i,j,l}(n,m,p) = Norm_{n,m,p}( AF( sum_{r,s,q} x(i+r, j+s, q) * u_{n,m,p,l}(r,s,q) ) )
y(i,j,l)         = sum_{n,m,p} x(i+n, j+m, p) * v_{i,j,l}(n,m,p)
```

Here `x` is the zero-padded input with `K` channels, `r,s < W2`, `n,m < W1`,
`p,q < K`. Compared with a CNN layer this needs two sets of weights and two
convolutions, and it creates a large intermediate result: `W1*W1*K` weights per
output pixel and channel. That is 162 bytes per output pixel for a 3-channel
layer with 3x3 windows and 6 outputs. Moving this to external memory would
dominate the memory traffic. This design therefore keeps all space-variant
weights on chip. It computes the layer tile by tile: a `T_Ho x T_Wo` block of
output pixels, `T_L` output channels at a time. The tile sizes are chosen
offline, by a mapping search that minimises off-chip accesses within an
on-chip memory budget. They are given to the hardware at run time.

The RTL is SystemVerilog-2017 and synthesizable. Its top module is
`nlc_accelerator`.

## Architecture

```
 host I/O write ──┬──> data mem (input tile + halo) ──> data dispatcher ──┐ a (27 pixels)
                  └──> fixed-weights mem ───────────────── u word ──┐     │
                                                                    v     v
 s-v weights accumulator ─── v word (Conv2) ──────────────────> PE array (27 MACs)
        ^   ^                                                         │ dot product
        │   └── AF/Norm: normalize set, write back <── read set ──┐   │
        └────── Conv1: AF(result), gathered per set <─────────────┼───┤
                                                                  │   └─> output pixel accumulator ──> host I/O read
 start/cfg ──> control unit (capacity check, loop nest, phases) ──┘
```

| module | role |
|---|---|
| `nlc_accelerator` | top: wiring, the weight operand select, host port |
| `control_unit` | checks that the tile fits, runs the three phases and their loop nests |
| `data_mem` | padded input tile, one word of K channels per position |
| `fw_mem` | fixed weights: one word of `W2*W2*K` weights per `(l,n,m,p)` |
| `data_dispatcher` | fetches the window around a pixel once, presents it in Conv1 or Conv2 lane order |
| `pe_array` | 27 multipliers and an adder tree, two pipeline stages, shared by both convolutions |
| `af_norm` | AF on every Conv1 result; Norm engine for whole weight sets (uses `seq_divider`) |
| `svw_accumulator` | space-variant weights, one word of `W1*W1*K` weights per `(i,j,l)` |
| `opx_accumulator` | output pixels of the tile, requantized to 8 bits |
| `nlc_pkg` | shared types (`tile_cfg_t`, phase and mode enums) and the number-format functions |

### One tile, three phases

Only one convolution runs at a time, so a single 27-MAC array serves both.
The AF and Norm unit sits between the array and the weight store.

1. **Conv1.** For each pixel `(i,j)` of the tile, the dispatcher reads the
   3x3 window of K-channel positions from the data mem into a register. This
   takes 9 reads. Then, for each `l < T_L` and each of the 27 weight positions
   `g = (n,m,p)`, one PE-array pass multiplies the window by fixed-weight word
   `l*27 + g`. That pass gives one raw weight `v_{i,j,l}(n,m,p)`, which goes
   through AF and into lane `g` of a gather register. After lane 26 the whole
   set is written to the s-v weight store. Each window is reused for
   `27*T_L` passes.
2. **Norm.** Normalizing a weight needs the whole set it belongs to. So Norm
   starts only after Conv1 has finished the tile. For each stored set, the
   engine reads the word, sums it, forms a reciprocal with a 25-cycle divider,
   scales all 27 lanes in parallel and writes the word back.
3. **Conv2.** For each pixel the window is fetched again. Then, for each `l`,
   one pass multiplies it by the normalized set of `(i,j,l)`. The result is
   requantized into the output pixel store.

Between pixels, the control unit waits four cycles for the PE pipeline to
empty before the window register is refilled.

### Number formats and the concrete AF and Norm

The layer definition leaves the activation and normalization functions to the
application. This design fixes them as follows (all in `nlc_pkg`):

| quantity | format |
|---|---|
| input pixel `x` | unsigned 8 bit |
| fixed weight `u` | signed 8 bit |
| PE product / sum | 8u x 9s -> 18 bit, sum of 27 -> 23 bit signed |
| AF | `v = clamp(max(0, sum) >> af_shift, 0, 255)`; `af_shift` (0..31) is set per tile |
| Norm | `S = sum of the 27 v`; `v' = min(255, (v * floor(2^24 / S)) >> 16)`: the set sums to about 1.0 in unsigned Q0.8; a set with `S = 0` stays all zero |
| output `y` | `clamp((sum of x * v') >> 8, 0, 255)`, unsigned 8 bit |

All stored data are 8 bits wide. AF is applied *before* a Conv1 result is
stored, so that an 8-bit store is enough. A set with a single non-zero weight
normalizes to 255 in that lane, which is just under 1.0. To use a different
AF or Norm, change `af_relu_q`, `norm_scale` and the engine in `af_norm.sv`.
The testbenches' reference models need the same change.

## Buffers and tile sizes

Each buffer is sized for the largest tile it must hold:

| buffer | contents per tile | default size |
|---|---|---|
| data mem | `(T_Ho+2) x (T_Wo+2)` positions x K bytes | 514 x 13 x 3 = 20,046 B |
| fixed weights | `T_L x 27` words x 27 B | 6 x 27 x 27 = 4,374 B |
| s-v weights | `T_Ho x T_Wo x T_L` words x 27 B | 912,384 B |
| output pixels | `T_Ho x T_Wo x T_L` B | 33,792 B |

The parameters `BUF_THO`, `BUF_TWO` and `BUF_TL` (default 512, 11, 6) set
these sizes. `K`, `W1` and `W2` (default 3, 3, 3) set the layer shape. The
defaults are the largest mapping of the reference evaluation: a
512 x 512 x 3 layer with 3x3 windows and 6 outputs under a 1 MB budget. Its
total of 970,596 B matches the on-chip size that mapping was reported with.
The s-v weight store accounts for 94 % of the total.

The tile actually run is set per start through `cfg.tho`, `cfg.two` and
`cfg.tl`. The control unit accepts any non-empty tile whose three
requirements fit the three buffers. Otherwise it pulses `done` with `cfg_err`
high and does nothing. So all five reported optimal mappings run on the
default build:

| budget | `<T_Ho, T_Wo>`, `T_L` | on-chip bytes needed | tiles per 512x512x6 layer |
|---|---|---|---|
| 50 KB | <27, 20>, 3 | 49,461 | 988 |
| 100 KB | <43, 26>, 3 | 99,879 | 480 |
| 256 KB | <104, 14>, 6 | 254,070 | 185 |
| 0.5 MB | <262, 11>, 6 | 498,846 | 94 |
| 1 MB | <512, 11>, 6 | 970,596 | 47 |

To build for a smaller FPGA budget, set the `BUF_*` parameters to that row.
Tiles at the image border are simply run with smaller run-time sizes.

## Using it

Reset is active low and asynchronous. The memories are not reset. Between
tiles the host, or a DMA engine in front of it, does the following:

1. **Write the padded input tile.** Use `io_wr_target = TGT_DATA`,
   `io_wr_addr = row * (T_Wo+2) + col` and `io_wr_lane = channel`, for rows
   `0..T_Ho+1` and columns `0..T_Wo+1`. Padded row 0 is one above the tile's
   first output row. Image borders must be written as zeros: the hardware
   does not pad.
2. **Write the fixed weights** of the tile's `T_L` channels. Use
   `io_wr_target = TGT_FW`, `io_wr_addr = l*27 + (n*3 + m)*3 + p` and
   `io_wr_lane = (r*3 + s)*3 + q`.
3. **Start the tile.** Set `cfg` and pulse `start` for one cycle. `busy` stays
   high until `done` pulses.
4. **Read the outputs.** Read output `(i,j,l)` at
   `io_rd_addr = (i*T_Wo + j)*T_L + l`. The data is valid in
   `io_rd_data`/`io_rd_valid` one cycle after `io_rd_en`.

Writes and reads are one byte per cycle. The host must not touch the port
while `busy`; an assertion checks this. Loading the next tile does not overlap
the computation of the current one.

Tile time is roughly `T_Ho*T_Wo*(27*T_L + 18)` cycles for Conv1, 31 cycles per
set for Norm (5 for an all-zero set) and `T_Ho*T_Wo*(T_L + 18)` cycles for
Conv2. The full 512 x 11 x 6 tile of the end-to-end test took 2,038,785
cycles from `start` to `done`. The PE array is busy in about half of them.
Norm takes about 45 % of the time, because its divider is sequential.

The whole 512 x 512 x 6 layer with the 1 MB mapping is 47 tiles. It keeps
the accelerator busy for 101.7 M cycles, about 0.5 s at 200 MHz. The host
moves 1.14 MB in and 1.57 MB out over the byte-wide port. Each output pixel
is read back as a separate byte, and the halo rows are loaded again for each
tile.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

- `tb_nlc_accelerator` runs the top at its default parameters. Its reference
  model is written independently in plain integer arithmetic. It runs four
  tiles: 3x4x3; one that is too large and must be rejected; 5x2x2; and the
  full 512x11x6. Weights are crafted so that the following all occur at least
  once: AF clamping to zero, AF saturation, all-zero sets and single-weight
  sets. It checks every output pixel and the number of PE passes per phase
  (`T_Ho*T_Wo*T_L*27` for Conv1, `T_Ho*T_Wo*T_L` for Conv2).
- `tb_nlc_layer` computes a complete layer tile by tile, acting as the host.
  It includes border tiles and zero padding at the image edges, and compares
  the assembled output image with the layer computed directly. It runs the
  full 512 x 512 x 3 -> 6 layer with the 1 MB mapping, then all five
  mappings on a 64 x 64 image. It takes about 90 s.
- `tb_control_unit` compares the full event stream (window loads, weight
  reads, Norm starts) with the loop nest. It also checks the rejection of
  oversized and empty tiles.
- `tb_data_dispatcher` checks window contents, lane order and fetch latency.
  It runs both 3/3 windows and `W1 = 5, W2 = 3`.
- `tb_af_norm` checks AF and Norm, including zero and saturating sets, and
  the Norm latency (30 cycles, or 4 for a zero set).
- `tb_pe_array` checks products and latency; `tb_svw_accumulator` checks
  lane gathering; `tb_opx_accumulator` checks requantization; `tb_data_mem`
  and `tb_fw_mem` check lane writes.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/nlc_pkg.sv tb/tb_nlc_accelerator.sv \
          --top-module tb_nlc_accelerator -o sim
./obj_dir/sim +verilator+rand+reset+2
```

The end-to-end test takes a few seconds.

## What is this design's own, and what it leaves out

These points follow the layer definition and the reference architecture:
- the Conv1 / AF / Norm / Conv2 computation and its loop nest;
- the rule that normalization waits until the whole set exists;
- the space-variant weights staying on chip;
- the eight blocks and how they connect;
- 8-bit data everywhere;
- the buffer sizing equations and the mapping table.

These are this design's own choices:
- the number formats and the concrete AF and Norm;
- the PE parallelism: 27 MACs that reduce one whole window per cycle. The
  architecture only fixes the MAC count in terms of unrolling factors.
  Each pass therefore forms a finished dot product. The two "accumulator"
  stores gather and hold results; they never add partial sums.
- the memory word layouts, window reuse and loop order within a tile;
- the pipeline and drain, and the sequential divider;
- the host port and the `start`/`done` protocol;
- the capacity check.

Not included:
- the external memory;
- the DMA that moves tiles;
- any double buffering of tile loads;
- the mapping search itself, which is offline software.

`W1` and `W2` must be odd. With different sizes, the smaller window is centred
in the larger one.
