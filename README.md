# Half-precision 3x3 convolution accelerator for an HPS + FPGA system

This is the FPGA side of a small CNN accelerator for a Cyclone V SoC
(ARM hard processor + FPGA). It runs the convolution layers of a VGG-11
network trained on CIFAR-10 (32 x 32 RGB images, 10 classes) in IEEE 754
half precision. The processor keeps the network and does everything
except the multiply-accumulate work. For one convolution it copies a 3x3
kernel, its bias and one input feature map into an on-chip memory and
starts the FPGA. The FPGA slides the kernel over the map with zero padding
and writes an output map of the same size into a second on-chip memory,
which the processor copies back. One run is one input channel against one
kernel; the host sums the channels and applies ReLU and pooling.

The RTL follows the structure of a CSEE 4840 (Columbia, Spring 2022)
final-project report: three state machines (`readOCM`, `convOpt`,
`writeOCM`) around nine half-precision multipliers and one adder. Their
ports and state lists come from that report. The report only describes
the insides of these blocks in outline, so the memory layout, the
handshakes, the rounding and the cycle timing below are this
implementation's own, chosen to match what the report shows. The
processor, its DMA controllers and its register (PIO) cores are vendor
parts and are not included. Their connections are ports of the top module.

## System view

```
 host SDRAM --DMA--> [ocm_in  port s1]            [ocm_out port s1] --DMA--> host SDRAM
                     [ocm_in  port s2]            [ocm_out port s2]
                          |  bytes                      ^  bytes
                          v                             |
                       readOCM ---- windows ----> convOpt ---- results ----> writeOCM
                       (kernel,                   (9 x float_multi,
                        3x3 windows)               1 x float_adder)
```

`cnn_main` (top) = two `onchip_ram` instances + `conv_pipeline`
(= `readOCM` + `convOpt` + `writeOCM`). Everything runs on one 50 MHz
clock with a synchronous, active-high reset.

Host-side ports of `cnn_main`. In the original system each is a PIO
register on the processor's lightweight bridge:

| port | dir | meaning |
|---|---|---|
| `start` | in | rising edge: kernel and map are in `ocm_in` (`image_sent_ocm`) |
| `read_length[15:0]` | in | bytes of kernel + bias, normally 20; the map starts at this byte |
| `feat_map_dim[5:0]` | in | map width = height, 1..63 |
| `finish` | out | every output value has been written |
| `write_length[15:0]` | out | results written since reset |
| `fpga_stat[8:0]` | out | `{readOCM, convOpt, writeOCM}` state numbers |
| `ocm_in_*` | in | DMA-side byte write port of the input memory |
| `ocm_out_*` | in/out | DMA-side byte read port of the output memory (data one cycle after the address) |

## Memory layout

All values are little-endian half precision (low byte at the lower
address).

Input memory (`ocm_in`, 4096 bytes):

| bytes | contents |
|---|---|
| 0 .. 17 | kernel taps 0..8, row-major (tap 0 = top-left) |
| 18 .. 19 | bias |
| `read_length` .. | the dim x dim input map, row-major |

Output memory (`ocm_out`, 4096 bytes): the dim x dim result map,
row-major, from byte 0.

A 32 x 32 map takes 2 KiB, so the largest VGG-11 map on CIFAR-10 fits.
So does the 6-bit dimension limit of 63, as long as 20 + 2*dim^2 bytes
is at most 4096, i.e. dim up to 45. The memories decode only the low 12
address bits, so a larger map would wrap around.

## Arithmetic

`float_multi` and `float_adder` are purely combinational, as in the
original design (which shows no registers in them). Both work the same
way: form the exact result as an integer, then round once with
`fp16_pkg::fp16_round()`.

- **Multiplier:** the 11 x 11-bit significand product is exact (22 bits).
- **Adder:** every half-precision number is a multiple of 2^-24. Both
  operands are therefore shifted onto that grid (at most 40 bits) and
  added or subtracted exactly, with no guard-bit bookkeeping.
- **Rounding:** round to nearest, ties to even. Subnormals are produced
  and accepted. Overflow gives infinity; NaN inputs and invalid
  operations (inf x 0, inf - inf) give 16'h7E00. x + (-x) gives +0.

The original report fixes the format (1 sign, 5 exponent, 10 fraction
bits) but not the rounding. Round-to-nearest-even is this design's
choice.

One output value is

```
acc = bias
for k in 0..8:  acc = round(acc + round(w[k] * x[k]))
```

It is rounded after every step, in tap order. Results are bit-exact to
this sequence. They are not the exactly rounded 10-term sum.

## The window reader (`readOCM`)

This is the most involved block. States, as numbered on `debug_state`:

| # | state | what happens |
|---|---|---|
| 0 | reset | wait for a `start` rising edge |
| 1 | prepare weights | latch `min(read_length, 20)` |
| 2 | read weights | one byte address per cycle; each byte is captured one cycle later into `weight_bias` |
| 3 | wait | `in_data_ready` = 1; wait for a `start_fm` rising edge |
| 4 | prepare pixel | store the high byte of the previous pixel; if the next window pixel lies outside the map store 0 (padding, one cycle) or else compute its address |
| 5 | read low byte | address on the bus |
| 6 | read high byte | address + 1 on the bus, low byte captured |
| 7 | window done | `finish_fm` = 1 until the next request |

For request `conv_idx = row*dim + col`, the window element `e` (0..8,
row-major) is pixel `(row + e/3 - 1, col + e%3 - 1)`. It sits in
`feat_map_in[16e+15:16e]`. Pixels inside the map cost three cycles;
padded ones cost one. The whole request takes `2 + 3*inside + padded`
cycles after the `start_fm` edge: 29 in the interior. A new `start`
edge in state 3 or 7 reloads the kernel.

## The convolution engine (`convOpt`)

`convOpt` steps through the output positions 0 .. dim*dim-1:

1. raise `start_fm` (request a window) and hold it until `finish_fm`;
2. latch the window; set `acc` to the bias;
3. nine cycles of accumulation (`add_idx` 0..8), with the nine products
   computed in parallel from the latched window;
4. raise `start_out` and hold it until `writeOCM` pulses `finish_out`;
5. next position, or state 7 with `finish` = 1.

Both request lines are low between requests, so every request is a
rising edge. The receivers detect it with a registered copy of the line.
`conv_pipeline` states these rules as concurrent assertions: one request
outstanding at a time, no window request before the kernel is loaded,
`finish_out` only during a result request, and a window request dropped
only after the window is complete.
`finish` stays high until `in_data_ready` drops, which happens when the
host raises `start` for the next map.

`feat_map_out` keeps the nine-word width of the window bus. The result
is in word 0 and the rest is zero. `writeOCM` has an `OUT_WORDS`
parameter (1..9) for writing more words per request; the pipeline uses 1.

## Result writer (`writeOCM`)

On a `start_out` edge, `writeOCM` writes `2*OUT_WORDS` bytes, one per
cycle, low byte first. They go to `out_idx * 2*OUT_WORDS`. It then
pulses `finish_out` and increments `count`. Latency: `2*OUT_WORDS + 1`
cycles from the edge to `finish_out`.

## Timing

Per interior output position: about 45 cycles. That is 1 request + 29
window read + 1 latch + 9 accumulate + 1 request + 4 write + 1 next, with
small handshake overheads. Border positions are cheaper.

A full 32 x 32 map measures 44,320 cycles from `start` to `finish`,
including the 20-byte kernel load. At 50 MHz that is 886 us. The
original report gives 840 us for its version of the same operation, and
the end-to-end testbench checks the cycle count against that figure to
within 25%.

## Where this departs from the original

- Only the FPGA fabric logic is here. The hard processor, the two DMA
  controllers and the PIO registers are replaced by ports.
  `h2f_start`, `f2h_start`, `h2f_buf_offset`, `f2h_buf_offset` and
  `f2h_finish` existed in the original register map. Their use in the
  FPGA is not known, so they are not implemented.
- The on-chip memories are plain RTL arrays with two byte-wide ports and
  one cycle of read latency, not the vendor memory core. Their size
  (4 KiB each) is the original address span. The original reports
  73,728 block-memory bits in total; these two memories use 65,536.
- The original's synthesized pipeline wrapper was called `tbOpt`. Here
  it is `conv_pipeline`, and the top level is `cnn_main`.
- An earlier pipelined variant of the original (about 472 us per map) is
  not built. Only the later design, with nine multipliers and one adder,
  is here.
- Behaviour read from the original's waveform rather than its text:
  - row-major windows with one pixel of zero padding;
  - element and weight word 0 at the least significant bits;
  - low byte first;
  - `readOCM` ending in state 7 with `finish_fm` high;
  - `writeOCM` idling in state 1.
- At the end of a run, the original's waveform shows `start_fm` still
  high; here it is low.
- Which weight word holds the bias (word 9), the memory address of the
  map (`read_length`) and the output address layout are this design's
  choices.

## Files

`rtl/`:

- `fp16_pkg.sv`: half-precision type and rounding function
- `float_multi.sv`, `float_adder.sv`: combinational arithmetic
- `onchip_ram.sv`: dual-port byte memory
- `readOCM.sv`, `convOpt.sv`, `writeOCM.sv`: the three state machines
- `conv_pipeline.sv`: the three machines wired together
- `cnn_main.sv`: top level

`tb/`: one self-checking testbench per module (`tb_<module>.sv`) and
`fp16_ref_pkg.sv`. The package holds the reference arithmetic: a
double-precision model that rounds by scaling, independent of the RTL's
integer rounding. Each testbench prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
`tb_cnn_main` runs the top at its default sizes:

- a 32 x 32 map, then a 7 x 7 map with a new kernel and a 24-byte kernel
  block;
- every output value is checked;
- it counts kernel loads, window requests, padded border windows, result
  writes and completed maps;
- it checks the run time.

`tb_vgg11_workload` runs convolution-layer work from VGG-11 as a host
would:

- one output channel of the first layer: three 32 x 32 input channels,
  three accelerator runs, with the partial maps summed and passed through
  ReLU in the testbench;
- one map of each smaller size used by the later layers (16, 8, 4 and 2).

Measured run times: 44,320 cycles for 32 x 32, 10,912 for 16 x 16, 2,656
for 8 x 8, 640 for 4 x 4 and 160 for 2 x 2.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fp16_pkg.sv tb/fp16_ref_pkg.sv tb/tb_cnn_main.sv \
    --top-module tb_cnn_main -o sim
./obj_dir/sim
```

Replace `tb_cnn_main` with any other testbench name to run that one. The
full-size test takes well under a second. To lint a module:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/fp16_pkg.sv rtl/cnn_main.sv
```

The remaining lint warnings are unused bits: the sign bit in the
classification helpers, and the upper address bits of the 4 KiB
memories.
