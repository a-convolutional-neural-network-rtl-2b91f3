# A three-channel convolution accelerator for small FPGAs

This is synthesizable SystemVerilog for a small convolutional neural network
accelerator. It is meant for a Zynq-7000 class device (an ARM processor and a
few hundred DSP slices and block RAMs). The processor keeps control. It writes
feature maps and weights into on-chip RAMs over AXI, then issues one 32-bit
instruction per convolution layer. The programmable logic runs that layer
across three input channels at once. Each channel has its own 25-multiplier
array and adder chain. The result goes through an optional piecewise-linear
activation (Hard-Sigmoid or Hard-Swish) and is written back to another group
of on-chip RAMs. The next layer can read it from there, so intermediate maps
never have to go back to the processor.

The architecture follows the paper "A Convolutional Neural Network
Accelerator Based on FPGA" (J. Zou, Q. Tang, C. He). That paper fixes these
points:

- the multiplier array, adder chain and serial-to-parallel shift register;
- the two activation pipelines;
- the field widths of the instruction;
- the sizes of the seven RAMs.

It leaves open how data is scheduled through the engine, the number formats,
the instruction encodings and the bus interface. This design makes its own
choices there, and every such choice is listed in
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
               AXI4 (from the processor)
                        |
                   axi_slave ---- instruction register -> instr_decoder
                        |                                       |
   +--------------------+--------------------+                  v
   | FM-RAM1..3         P-RAM        FMC-RAM1..3           conv_engine
   | 102400x8 each      20480x8      53248x8 each    (address generator,
   +--------- port A: processor, port B: engine ---------  collector, write-back)
                                                             |   |   |
                                                    conv_unit x3  activation_unit
                                     parallel_data -> sync_fifo -+
                                     parallel_data -> sync_fifo -+-> mult_array -> accumulator
```

| Module | Role |
|---|---|
| `cnn_accel_top` | AXI slave, seven `dp_bram`s, control registers, decoder, engine |
| `axi_slave` | AXI4 bursts to a one-word-per-cycle memory port |
| `dp_bram` | true dual-port RAM, one cycle read latency |
| `instr_decoder` | instruction fields plus derived K, K*K, padding, stride, output size |
| `conv_engine` | runs one instruction: address generation, three conv units, channel sums, rescale, activation, write-back |
| `conv_unit` | one channel: two `parallel_data` + two `sync_fifo` + `mult_array` + `accumulator` |
| `parallel_data` | shift register collecting K*K serial bytes into one parallel word |
| `mult_array` | 25 signed 8x8 multipliers, 16-bit products, registered |
| `accumulator` | chain of 24 adders (first adds two products, each next adds one more), output register |
| `activation_unit` | selects none / `hard_sigmoid` (2 stages) / `hard_swish` (3 stages), aligned to 3 cycles |
| `cnn_pkg` | instruction struct, operation and activation enums, format constants |

## How a layer is computed

This is the part to understand before changing anything.

**Data layout.** Input channel `c` lives in source bank `c mod 3`, at offset
`(c div 3)*N*N + y*N + x`. Output channel (filter) `f` is written to
destination bank `f mod 3`, at offset `(f div 3)*OUT*OUT + y*OUT + x`. The
destination uses the same rule as the source, so the output of one layer is
already laid out as the input of the next. Weight `(f, c, ky, kx)` is at
P-RAM address `((f*C + c)*K + ky)*K + kx`. A normal instruction reads the
FM-RAMs and writes the FMC-RAMs. A *reverse* instruction (operation code bit 3
set) does the opposite, so layers can ping-pong between the two groups.

**Loop nest.** The engine walks through the layer in this order:

```
for f in filters:
  for each output row, output column:
    for g in channel groups (channels 3g, 3g+1, 3g+2):
      3*K*K cycles:
        cycles 0..K*K-1  : read pixel (ky,kx) of the window from all three
                           source banks at once (zero for padding and for
                           channels >= C)
        every cycle      : read one weight from P-RAM, K*K for unit 0,
                           then K*K for unit 1, then K*K for unit 2
```

The P-RAM address simply increments through this loop. At each new output
pixel it jumps back to the start of the filter's weights. RAM reads take one
cycle, so a one-cycle tag pipeline marks which conv unit the returning byte
is for and whether it must be replaced by zero.

**Conv units.** Each unit packs its K*K feature bytes and its K*K weights
into two words. When both FIFOs hold a word, it multiplies them lane by lane
and sums the products. The result appears 5 cycles after the unit's last
byte. The units finish one after another (unit 0 first), one result per
group, in order. The conv units never stall the schedule: each FIFO holds at
most one word. An assertion checks this.

**Collector.** Results of units 0 and 1 are latched. When unit 2 delivers,
the three are added to the pixel's running sum. After the last channel group
the sum is finished:

1. It is rescaled from the product format to the 8-bit activation format:
   round half up, shift right by 6, saturate to [-128, 127].
2. It goes through the activation unit (3 cycles).
3. It is written to the destination bank, with an address that was piped
   alongside.

`done` pulses after the last write.

**Run time.** A layer takes exactly `F * OUT^2 * ceil(C/3) * 3*K*K` cycles
plus about 10 cycles of pipeline tail. The testbenches check this. The
engine therefore does one multiply-accumulate per cycle on average, although
it has 75 multipliers. See [Performance](#performance).

## Instruction word

The field widths are fixed (4 + 7 + 9 + 9 + 1 + 1 + 1 = 32). The order, flag
meanings and codes are this design's own.

| Bits | Field | Meaning |
|---|---|---|
| 31:28 | type | `1` conv, `2` conv + Hard-Sigmoid, `3` conv + Hard-Swish; `9`, `A`, `B`: the same, reverse direction. Others: ignored |
| 27:21 | N | input feature map size (square, 1..127) |
| 20:12 | C | input channels (1..511) |
| 11:3 | F | filters = output channels (1..511) |
| 2 | filter size | 0: 3x3, 1: 5x5 |
| 1 | fill | 0: no padding, 1: (K-1)/2 zero pixels on each side |
| 0 | step | 0: stride 1, 1: stride 2 |

The output size is `(N + 2P - K)/S + 1`. An instruction whose map is smaller
than the kernel, or that has C = 0 or F = 0, is ignored. Nothing checks that
a layer fits in the RAMs. Keeping `ceil(C/3)*N*N <= 102400`, the
corresponding destination total within 53248 (or 102400 when reversed), and
`F*C*K*K <= 20480` is the software's job.

## Address map

Each 32-bit AXI word carries one RAM byte in bits [7:0]. RAM entry `i` of a
region is at `base + 4*i`. Writes use only byte lane 0 (`WSTRB[0]`).

| Base | Region |
|---|---|
| `0x000000`, `0x100000`, `0x200000` | FM-RAM1, 2, 3 (102400 entries each) |
| `0x300000` | P-RAM (20480 entries) |
| `0x400000`, `0x500000`, `0x600000` | FMC-RAM1, 2, 3 (53248 entries each) |
| `0x700000` | instruction: a write starts it if the engine is idle |
| `0x700004` | status: bit 0 busy, bit 1 done (cleared by the next instruction write) |

`irq` pulses for one cycle when an instruction completes. The slave handles
one burst at a time. It supports INCR and FIXED bursts (WRAP is treated as
INCR) and always answers OKAY. Writes move one beat per cycle and reads one
beat per three cycles. Do not access the RAMs a running instruction uses: the
processor's port and the engine's port are independent.

## Number formats

- Feature maps are 8-bit two's complement with 4 fraction bits (range
  -8 .. 7.9375). Weights are 8-bit with 6 fraction bits (-2 .. 1.984).
  Change them with `ACT_FRAC` and `W_FRAC` in `cnn_pkg`.
- Products are 16 bits with 10 fraction bits. The adder chain is 21 bits
  wide, so 25 products cannot overflow. Partial sums over channel groups
  are 32 bits. There is no bias term.
- Hard-Sigmoid is `clamp((x+3)/6, 0, 1)`, with 1.0 = 16. Its pipeline is:
  add 3, then divide by 6, rounded half up.
- Hard-Swish is `0` for x <= -3, `x` for x >= 3, and `(x^2 + 3x)/6` in
  between. Its pipeline is: square and 3x, then add, then divide, rounded
  half away from zero. In this format, dividing by 6 removes one scale
  factor as well, so it is a division by 96.

## Performance

The multiplier array can take 25 products per channel per cycle. The engine
gives it one window per channel every 3*K*K cycles. The limit is the single
8-bit read port of the P-RAM, which must deliver a fresh K*K weight set for
each of the three units and each output pixel.

For comparison, the published figures are 10.6 / 12.7 / 14.1 GOPS at
150 / 180 / 200 MHz. At 200 MHz that is about 35 multiply-accumulates per
cycle. This RTL reaches 1 per cycle, which is 0.4 GOPS at 200 MHz. Getting
closer needs weight reuse across output pixels (keep the weight word in the
conv unit), or wider parameter storage, together with sliding-window reuse
in the feature-map shift register. The published description does not say
how its rate was achieved, so this design leaves that out.

Sizing for LeNet-5 on MNIST (standard layer sizes):

- **First convolution** (28x28x1, six 5x5 filters): fits easily. In
  simulation it runs in 259 211 cycles.
- **Second convolution**: fits.
- **400->120 fully connected layer** (as a 5x5 convolution): its 48 000
  weights exceed the 20 480-byte P-RAM, so it must be split into three
  instructions.
- **1x1 layers**: not supported directly. The only kernels are 3x3 and 5x5.

## Departures and own choices

Departures from the published design:

- **Throughput**: see [Performance](#performance).
- **Pooling.** The published design computes pooling on the same arrays, but
  does not say which pooling or how it is selected. No pooling is built;
  pool on the processor.
- **Control signals.** The published simulation shows control signals such
  as `parallel_end`, `parallel_ready` and `fm2_pool_end` whose behaviour is
  not described. They are not reproduced. The `parallel_data` handshake
  (`data_valid`, `ready`, `fifo_full`, `parallel_data_valid`, `cnt_data`,
  `data_full_flag`) is this design's own.
- **Word size.** The parallel words are sized for 5x5 (25 lanes). A 3x3
  kernel uses the lowest 9 lanes. The published waveform shows a 3x3
  (72-bit) configuration.
- **Accumulator width.** The adder chain is 21 bits wide, where the
  published waveform shows 16.
- **Activation precision.** The activation error figures in the paper
  (about 6e-4 and 8e-4 average) imply a finer output format than the 4
  fraction bits used here, so they are not reproduced. The testbenches
  instead check bit-exact agreement with the rounded real-valued functions.

This design's own choices, where the published description is silent:

- the data layout and loop order;
- the reverse direction;
- the operation codes and flag meanings;
- the number formats and rounding;
- the AXI address map and control registers;
- FIFO depth 4;
- asynchronous active-low reset;
- one RAM byte per AXI word.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Each also has a watchdog. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cnn_pkg.sv tb/conv_ref_pkg.sv tb/tb_cnn_accel_top.sv \
    --top-module tb_cnn_accel_top
./obj_dir/Vtb_cnn_accel_top
```

Replace the last file and the top module name to run another testbench.

| Testbench | What it establishes |
|---|---|
| `tb_cnn_accel_top` | Full design at default sizes, driven only over AXI. Three layers, each read back and compared value by value with a direct convolution: LeNet-5 conv1 with Hard-Swish; the chained second layer in reverse direction with Hard-Sigmoid; a padded stride-2 3x3 layer with saturating sums. Also checks run time against the schedule and counts every mechanism. About 1.2 M cycles, a few seconds. |
| `tb_conv_engine` | Engine with behavioural RAMs. Six layers cover both kernel sizes, padding, stride 2, C not a multiple of 3, F > 3, all activations, both directions and saturation. Exact cycle-count bounds. |
| `tb_conv_unit` | Random 3x3 and 5x5 windows. Results exact, 5-cycle latency. |
| `tb_parallel_data`, `tb_sync_fifo`, `tb_mult_array`, `tb_accumulator` | Lane order, hold on full FIFO, back-to-back words; FIFO against a queue model; all products and sums exact, one-cycle latency. |
| `tb_hard_sigmoid`, `tb_hard_swish`, `tb_activation_unit` | All 256 input codes against the real-valued definitions; 2-, 3- and 3-cycle latency. |
| `tb_instr_decoder`, `tb_dp_bram`, `tb_axi_slave` | Random instructions; random dual-port traffic; random bursts with stalls on all AXI channels. |

`tb/conv_ref_pkg.sv` holds the reference arithmetic, written from the
definitions and not from the RTL. `tb/axi_master_bfm.sv` is the AXI master
model used by the top-level and AXI testbenches.

## Synthesis notes

- The RAMs are plain arrays written for block-RAM inference: one read/write
  port per `always_ff`, with a registered read.
- The multipliers are written as `*` on 16-bit sign-extended operands, to be
  mapped onto DSP slices.
- The accumulator's adder chain is combinational within one cycle. On an
  FPGA, each adder should map to a DSP post-adder or cascade. If it does
  not meet timing, pipeline the chain and add the extra latency to the
  engine's tag pipeline.
- `cnn_accel_top` holds about 3.9 Mbit of RAM, which fits the 4.9 Mbit of
  block RAM of an XC7Z020.
