# RCM: a reconfigurable 2D-convolution module for mixed-precision DNNs

Mixed-precision quantization gives every layer of a neural network the
smallest bit-width that keeps its accuracy: 16 bits for one layer, 8 or 4
for the next. A convolution engine built from plain 16-bit multipliers
wastes most of its datapath on such layers. This module computes one
convolution tile for `OC_MAX` output channels in parallel. Each multiplier
can work in one of three modes:

| mode (`cfg`) | N | element width | one MAC unit, one cycle computes |
|---|---|---|---|
| `CFG_16X` | 1 | 16 bit | `x[i]*w[i]` |
| `CFG_8X`  | 2 | 8 bit  | `x[i]*w[i] + x[i+1]*w[i+1]` |
| `CFG_4X`  | 4 | 4 bit  | `x[i]*w[i] + ... + x[i+3]*w[i+3]` |

So at 8 and 4 bits an output pixel needs N times fewer MAC cycles. The
products are summed inside the multiplier (a "Sum-Together" multiplier), so
the accumulator, the output path and the controller are the same in every
mode. All elements are signed two's-complement numbers.
Narrower precisions fit in the same modes: a 3-bit element is stored
sign-extended to 4 bits, and a 6-bit one to 8 bits. Mode `16/N` therefore
covers every width from 1 to `16/N` bits.

## Block structure

```
            host (CPU / DMA, not part of the RTL)
   f_*  |                 w_* |                           ^ o_*
        v                     v                           |
 rcm_feature_buffer    rcm_weight_buffer          rcm_output_buffer
 2 sets x banks A_F..D_F   2 sets x banks A_W..D_W   2 sets, 32-bit
        |  4 x 16b           |  4 x OC_MAX*16b           ^ OC_MAX x 32b
        v                    v                           |
        +----> rcm_concat ---+             result register (in rcm_top)
                op1, op2[OC_MAX]                          ^
                      v                                   |
               rcm_mac_array: OC_MAX x rcm_mac_unit ------+
                                 (rcm_st_mult + accumulator)
   rcm_ctrl (loop counters, overhead cycles) --> rcm_addr_gen (addresses)
```

| file | what it is |
|---|---|
| `rtl/rcm_pkg.sv` | mode enum `rcm_cfg_e`, widths, overhead constants `O1 = 2`, `O2 = 5` |
| `rtl/rcm_st_mult.sv` | the reconfigurable (Sum-Together) multiplier |
| `rtl/rcm_mac_unit.sv` | multiplier plus accumulator |
| `rtl/rcm_mac_array.sv` | `OC_MAX` MAC units, shared `op1` |
| `rtl/rcm_sdp_ram.sv` | simple dual-port RAM with 4-bit (or wider) write lanes |
| `rtl/rcm_feature_buffer.sv` | double-buffered feature banks A_F..D_F |
| `rtl/rcm_weight_buffer.sv` | double-buffered weight banks A_W..D_W, one lane group per filter |
| `rtl/rcm_output_buffer.sv` | double-buffered 32-bit output memory |
| `rtl/rcm_addr_gen.sv` | loop position to buffer addresses |
| `rtl/rcm_concat.sv` | builds `op1`/`op2` from bank words, per mode |
| `rtl/rcm_ctrl.sv` | loop controller and handshake |
| `rtl/rcm_top.sv` | the module |

## The multiplier

`op1` and `op2` are 16 bits wide and are split into four 4-bit chunks,
`f3 f2 f1 f0` and `w3 w2 w1 w0`, where `f3` and `w3` are the most
significant. The modes compute:

| mode | `y` (32 bit) |
|---|---|
| 16x | `f[3:0] * w[3:0]` |
| 8x  | `f[3:2]*w[1:0] + f[1:0]*w[3:2]` |
| 4x  | `f3*w0 + f2*w1 + f1*w2 + f0*w3` |

The high elements of `op1` are paired with the low elements of `op2`. For
this reason the concatenating logic packs the weights in reverse channel
order.

Inside, `rcm_st_mult` is a grid of sixteen 5x5 signed multipliers, one per
chunk pair. The mode decides three things:
- which chunk products are used: all 16 in 16x, the cross-half ones in 8x,
  the anti-diagonal `j+l = 3` in 4x;
- how far each product is shifted: `4*(j+l)`, `4*(j+l-2)` or 0;
- which chunks are sign-extended: the top chunk of each element.

The internal arrangement is this implementation's own. Only the table
above is given for the original.

## Filling the buffers: chunk placement and word layout

This part matters most for anyone writing the host software. The buffers
store 4-bit chunks. How an element is split over the four banks depends on
the mode of the tile:

| mode | bank A | bank B | bank C | bank D |
|---|---|---|---|---|
| 16x | bits 15:12 | bits 11:8 | bits 7:4 | bits 3:0 |
| 8x  | unused | unused | bits 7:4 | bits 3:0 |
| 4x  | unused | unused | unused | bits 3:0 |

Weights use the same scheme in banks A_W..D_W. The host writes one chunk
per cycle:

- Feature `(x, y, channel c)` goes through `f_we`, `f_set`, `f_bank`,
  `f_pix = y*W_MAX + x`, `f_ch = c` and `f_data`.
- Weight `(kernel position k = ky*KS + kx, channel c, filter o)` goes
  through `w_we`, `w_set`, `w_bank`, `w_k`, `w_ch`, `w_oc` and `w_data`.
  The kernel position uses the tile's run-time `KS`, not `KS_MAX`.

Inside each bank, one word holds four consecutive input channels. Feature
word `p*IC_MAX/4 + c/4` holds pixel `p` and channels `c..c+3`, with channel
`c` in lane `c%4`. One read therefore yields everything a mode needs:
- 16x: one chunk from each of the four banks;
- 8x: two channels from C and D;
- 4x: four channels from D.

The weight banks are also interleaved over filters. A weight word is
`OC_MAX*16` bits wide, and filter `o` sits in bits `16*o+15 : 16*o`. A
single read therefore feeds every MAC unit.

From the bank words, `rcm_concat` forms the operands as follows. `i` is the
current channel, a multiple of N; `&` is concatenation with the most
significant chunk first.

| mode | `op1` | `op2` (per filter) |
|---|---|---|
| 16x | `A_F[i] & B_F[i] & C_F[i] & D_F[i]` | `A_W[i] & B_W[i] & C_W[i] & D_W[i]` |
| 8x | `C_F[i] & D_F[i] & C_F[i+1] & D_F[i+1]` | `C_W[i+1] & D_W[i+1] & C_W[i] & D_W[i]` |
| 4x | `D_F[i] & D_F[i+1] & D_F[i+2] & D_F[i+3]` | `D_W[i+3] & D_W[i+2] & D_W[i+1] & D_W[i]` |

## Running a tile

1. Fill a feature set and a weight set.
2. Pulse `start` for one cycle while `busy` is low, with these inputs:
   - `cfg`: the mode;
   - `ow`, `oh`: output width and height;
   - `ic`: the number of input channels;
   - `ks`: the kernel size;
   - `fset`, `wset`, `oset`: the buffer sets to use.
   All of these are latched at start.
3. Output `(x, y, o)` is written to output set `oset`:

   `sum over ky, kx < ks, c < ic of  feature(x+kx, y+ky, c) * weight(ky*ks+kx, c, o)`

   The sum wraps to 32 bits. The convolution has stride 1 and no implicit
   padding, so the tile must already contain its padding.
4. `done` pulses once when the tile is finished. Read the results with
   `o_re`, `o_set`, `o_pix = y*W_MAX + x` and `o_oc`. `o_data` is valid on
   the next cycle.

Because every memory is double-buffered, the host can fill the next tile
and read the previous results while a tile computes. The host must not
write the sets that are in use; the RTL does not check this.

Rules for a tile, checked by an assertion in `rcm_ctrl`:
- `ic` is non-zero, at most `IC_MAX`, and a multiple of N;
- `1 <= ks <= KS_MAX`;
- `ow + ks - 1 <= W_MAX` and `oh + ks - 1 <= H_MAX`.

A layer larger than the buffers is split into tiles. Partial sums across
input-channel tiles have to be added by the host.

## Timing

`busy` stays high for exactly

    OH * (O1 + OW * (O2 + IC/N * KS^2))     with O1 = 2, O2 = 5

cycles. This matches the control-overhead model that comes with the
original design. The speed-up over 16x is therefore

    s(N) = (O1 + OW*(O2 + IC*KS^2)) / (O1 + OW*(O2 + IC/N*KS^2))

It approaches N for large `IC*KS^2` and is lowest for point-wise (`KS = 1`)
tiles. The overhead cycles are spent as follows:
- each output row: 2 setup cycles (`O1`);
- each pixel: clear the accumulators, then the `IC/N * KS^2` MAC cycles,
  then drain (the last buffer read arrives), cast (results into the output
  register), write (one output-buffer word for all `OC_MAX` channels) and
  advance (`O2` = 5 cycles in all).

In a MAC cycle the buffers are addressed, and the next cycle the words go
through `rcm_concat` into the accumulators. The buffers read synchronously
with one cycle of latency.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W_MAX`, `H_MAX` | 18 | largest input tile width and height |
| `KS_MAX` | 7 | largest kernel size |
| `IC_MAX` | 32 | input channels held per tile (multiple of 4) |
| `OC_MAX` | 32 | MAC units = output channels computed in parallel |
| `ACC_W` | 32 | accumulator width; the result is cast (truncated) to 32 bits |

Of these, 18 and 7 come from a survey of popular networks: 7x7 kernels
appear in ResNet, and 18x18 tiles limit both the number of iterations and
the buffer area. The original design was explored with `IC_MAX` and
`OC_MAX` in {4, 8, 16, 32}. The default 32/32 is the largest point of that
exploration that was optimal in every precision mode.

At the defaults the storage is:
- feature buffer: 2 x 4 x 2592 words of 16 bits;
- weight buffer: 2 x 4 x 392 words of 512 bits;
- output buffer: 2 x 324 words of 1024 bits.

Sizing examples:
- **3x3 layer, 16x16x256 input, 256 filters.** This needs 64 tiles of
  14x14 outputs, 8 over input channels times 8 over filters. That is
  3.68 M / 1.87 M / 0.97 M cycles in 16x / 8x / 4x.
- **Point-wise layer, 7x7x1024 input, 1024 filters.** This needs 1024
  tiles: 1.87 M / 1.07 M / 0.67 M cycles in 16x / 8x / 4x.

## Where this RTL makes its own choices

- **Signed operands.** Elements are signed two's complement in all modes.
- **Accumulator width.** 32 bits, so the "cast to 32 bits" is the
  identity. A wider `ACC_W` is truncated.
- **Output buffer.** It is double-buffered, and it is written one whole
  pixel (all `OC_MAX` results) per cycle. Without the wide write the
  per-pixel overhead could not stay at five cycles.
- **Buffer word layout.** Four channels per feature word, and full
  interleaving of weights over filters.
- **Controller.** The host interface, the start/busy/done handshake and
  the output-height loop (`oh`) are this design's own. The use of the
  overhead cycles is its own too; only their number is reproduced.
- **No cross-tile accumulation.** Results over input-channel tiles are
  not added inside the module.
- **Memories.** They are plain synthesizable arrays (`rcm_sdp_ram`). A
  real chip would use SRAM macros.
- **Reset.** `rst_n` is an active-low asynchronous reset for registers
  only. Memory contents are undefined after power-up.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Shared reference functions live in
`tb/tb_rcm_ref_pkg.sv`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rcm_pkg.sv tb/tb_rcm_ref_pkg.sv tb/tb_rcm_top.sv --top-module tb_rcm_top
./obj_dir/Vtb_rcm_top
```

Replace `tb_rcm_top` with any other testbench name. The two end-to-end
benches act as the host:
1. They generate random signed tensors.
2. They place the chunks as in the table above and fill the unused banks
   with junk.
3. They chain tiles, so that one set of each buffer is filled and the
   previous results are read while the other set computes.
4. They compare every output with a direct convolution and check the
   cycle count against the formula.

- `tb_rcm_top` runs at a reduced size (`W_MAX=6, H_MAX=5, KS_MAX=3,
  IC_MAX=8, OC_MAX=4`). Its six tiles cover every mode, `KS` = 1, 2 and 3,
  and both buffer sets.
- `tb_rcm_top_full` runs the default configuration. It computes five full
  tiles: 14x14 outputs x 32 filters at `KS = 3` in every mode, a 7x7 kernel
  and an 18x18 point-wise tile. It takes a couple of seconds.
- The block testbenches compare against element-level models. Examples:
  the multiplier against signed 16/8/4-bit dot products, and the
  controller against the loop order and the latency formula.
- `tb_rcm_layers` runs two whole layers at the default configuration, tile
  by tile, and adds the partial sums over input-channel tiles itself:
  - a 3x3 layer of 16x16x256 -> 256 in 4x mode: 64 tiles, 967,680 busy
    cycles;
  - a point-wise layer of 7x7x1024 -> 1024 in 8x mode: 1024 tiles,
    1,068,032 busy cycles.
  Every output is checked. The run takes about half a minute.
- `tb_rcm_speedup` measures the speed-up at `OW = 18` over `IC` in
  {4, 8, 16, 32}, `KS` in {1, 3, 5, 7} and `N` = 2, 4 on the controller
  alone. It uses a 24-wide instance, because `OW = 18` with `KS > 1` does
  not fit the 18-wide default buffers. The 64 cycle counts follow the
  formula exactly. 24 of the 32 speed-ups agree to two decimals with the
  values published for the original design. The other eight are published
  higher than the formula gives: 4x with `KS` = 3 and 5 at `IC >= 8` (for
  example 3.34 against 3.85 for `KS = 3`, `IC = 8`), and 8x with `KS = 7`
  at `IC` = 8 and 16 (1.97 against 1.95, 1.99 against 1.98).
