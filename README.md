# FSDB: a folded-store hybrid compute-in-ROM/SRAM core

Read-only memory is far denser than SRAM, so a compute-in-memory (CiM) core
that keeps a whole network's weights in ROM avoids nearly all off-chip weight
traffic. The price is that ROM weights can never change. FSDB splits every
weight in two:

* a **3-bit magnitude** (`mag`), fixed in ROM, and
* a **sign bit** and a **shift bit**, held in small trainable SRAM.

Changing only the sign and shift bits turns one stored magnitude `M` into one of
four weights: `M`, `M-4`, `8M` or `8(M-8)`. Retraining those bits lets a fixed
ROM serve new kernels, new tasks and even other network architectures. This RTL
implements the digital core that computes with such weights: 16 CiM banks, each
computing a 144-term dot product (16 input channels x 3 x 3 kernel) with
activations fed in bit-serially.

## Weight encoding

| mode | shift | value | range |
|------|-------|-------|-------|
| W8A8 (folded store) | 0 | `mag - 4*sign` | -4 .. 7 |
| W8A8 (folded store) | 1 | `8*(mag - 8*sign)` | -64 .. 56 |
| W4A8 | (all 0) | `mag - 8*sign` (plain 4-bit two's complement) | -8 .. 7 |

So an 8-bit-range weight needs only three ROM bits. The quantizer that picks
these values (step 1 near zero, then coarser steps out to ±64) is a training-time
method and is not part of the hardware. `fsdb_pkg::fold_weight` gives the
decoded value.

SRAM is further saved by the **N:M mapping**: N ROM words share M SRAM rows of
sign/shift bits. This build uses 4:1, so the 256-word ROM is paired with 64
sign rows and 64 shift rows per bank. A job names the ROM word, the shift row
and the sign row separately, so any combination can be used.

## How one dot product is computed

Activations are unsigned (1 to 8 bits) and enter MSB first, one bit plane of
all 144 activations per cycle. The same plane goes to all 16 banks. For bit
plane `a_b` a bank computes

```
psum = (sum_i a_b[i]*mag[i]) << MagShift  -  (sum_i a_b[i]*sign[i]) << SignShift
mac  = first bit ? psum : 2*mac + psum          (first cycle of a bit)
mac  = mac + psum                               (second cycle, W8A8 only)
```

The ROM and SRAM sums use separate hardware. The sign bit never touches the ROM
side. Its weight (-4, -8 or -64) is applied purely by the sign shifter.

**W4A8** uses one cycle per activation bit, with Mask Ctrl low, MagShift 0 and
SignShift 3. All shift bits are zero, so every activation passes.

**W8A8** uses two cycles per activation bit, and this is the dynamic-broaden
part:

1. Mask Ctrl is high, MagShift 3 and SignShift 6. Each bank's *activation
   masker* passes only activations whose weight has shift = 1. The partial sum
   is `sum 8*(mag - 8*sign)`.
2. Mask Ctrl is low, MagShift 0 and SignShift 2. Only activations of shift = 0
   weights pass. The partial sum is `sum (mag - 4*sign)`.

Both partial sums belong to the same activation bit. The MAC doubles only
before the first of them.

The masker computes `masked[i] = act[i] & (shift[i] ? mask : ~mask)`, written
as a multiplexer followed by a NOR on the inverted activation.

## Timing

```
cycle            t      t+1      t+2
activation bit   b      ...
PSUM register           psum(b)
MAC register                     mac incl. b
```

* A vector takes `abits` cycles in W4A8 and `2*abits` in W8A8.
* Its result reaches the output buffer two cycles after its last bit.
* Vectors of one job stream back to back: one result every 8 cycles (W4A8) or
  every 16 cycles (W8A8).
* Changing the weight set costs exactly **one reload cycle**. In that cycle
  the sign and shift rows are copied from the weight buffer into the banks'
  cells and the new ROM address is latched. No activation is fed, and the
  previous job's last results drain through the pipeline meanwhile. The
  controller accepts the next job in the last streaming cycle of the current
  one, so jobs follow each other with no other gap.

First result latency, counted from the clock edge that accepts a job, is
`1 + abits*(1 or 2) + 2` cycles. The testbenches check all of these counts.

## Blocks

| file | block |
|------|-------|
| `fsdb_pkg.sv` | geometry, `step_t` per-cycle control, `job_t`, weight decoding, ROM contents |
| `fsdb_top.sv` | the core: controller, buffers, 16 maskers, 16 banks |
| `fsdb_ctrl.sv` | global controller: job handshake, reload, bit-serial sequencing, result write-back |
| `fsdb_act_buf.sv` | 16 activation vectors of 144 x 8 bits, read one bit plane at a time |
| `fsdb_wt_buf.sv` | 64 rows of shift bits and 64 rows of sign bits, for all 16 banks |
| `fsdb_act_masker.sv` | 144 shift cells of one bank and the mask gating |
| `fsdb_bank.sv` | one hybrid bank: ROM macro, SRAM macro, two barrel shifters, shift-accumulator |
| `fsdb_rom_macro.sv` | 144 ROM slices; three 144-input 1-bit adder trees, one per magnitude bit, merged by <<2/<<1 |
| `fsdb_rom_slice.sv` | one 256 x 3-bit ROM slice written as constant logic |
| `fsdb_sram_macro.sv` | 144 sign cells; pair-LUT MAC engine; pruned adder tree |
| `fsdb_adder_tree.sv` | binary adder tree, built level by level, with an optional width cap |
| `fsdb_barrel_shift.sv` | logarithmic left shifter (magnitude and sign shifters) |
| `fsdb_shift_acc.sv` | PSUM and MAC pipeline registers |
| `fsdb_out_buf.sv` | 16 rows x 16 bank results |

### SRAM macro: pair LUTs and the pruned tree

This is the part most likely to surprise a user. The 144 sign bits are taken in
72 pairs. For each pair the two signs are pre-added, and the pair's two
activation bits select 0, the first sign, the second sign or their sum, giving
2 bits. The 72 results go into an adder tree whose output is only
`SIGN_SUM_W = 5` bits wide instead of the exact 8. Every node drops the bits
above 5, so the macro returns the exact sign count **modulo 32**. The count
covers only the weights that are negative *and* whose activation bit is one.
With sparse activations and mostly non-negative weights it stays below 32, and
results are exact. With dense signs it wraps and the MAC is wrong. The saving is
paid for with an accuracy assumption about the data. Set `SIGN_SUM_W = 8` on
`fsdb_top` (or on a bank) for an exact tree. The end-to-end testbench runs
one job that wraps on purpose and checks the wrapped value.

The published pruned tree also narrows some inner stages. This RTL caps only
the output width, which keeps the result well defined: an exact sum modulo 32.

### ROM contents

The silicon ROM holds a trained network. Here every slice returns
`fsdb_pkg::rom_mag(seed, bank, slice, addr)`, a fixed xorshift pattern in which
about half of the magnitudes are zero. It is written as constant logic, so a
synthesis tool turns it into a look-up table, which is also how the real ROM is
built. To put a real network in, replace that function (or the slice body)
with the network's table. `ROM_SEED` on the top selects another pattern.

## Using the core

1. Write the activation vectors: `act_we`, `act_waddr`, and `act_wdata` with
   144 activations of 8 bits each.
2. Write the shift rows (`wt_sel = 0`) and sign rows (`wt_sel = 1`): one bank's
   144 bits per write, with `wt_waddr` and `wt_wbank`.
3. Offer a `job_t` with `job_valid` and keep it stable until `job_ready`. A
   job has these fields:
   * `mode`: `MODE_W4A8` or `MODE_W8A8`.
   * `abits`: the activation precision, 1 to 8.
   * `rom_addr`, `sf_addr`, `sg_addr`: the weight set.
   * `act_addr` and `num_vec`: up to 16 consecutive vectors.
   * `out_addr`: the first output row.

   Assertions check the handshake, `abits` and `num_vec`.
4. `out_we`/`out_waddr` pulse as each row of 16 results is written. Read
   them with `out_raddr`/`out_rdata`, as signed 24-bit values. `busy` falls
   when the last row is written.

In W4A8 mode, point `sf_addr` at an all-zero shift row.

Clock `clk`; active-low asynchronous reset `rst_n` clears the cells, the
pipeline and the controller. The buffers are not reset.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_fsdb_top` runs the full-size core at its
default parameters. It runs four jobs:

* W4A8;
* W8A8, accepted back to back after the W4A8 job;
* W8A8 with 4-bit activations;
* a deliberately wrapping dense-sign job.

It compares all 160 results with a reference built from the weight definition,
checks the latencies, and checks that each mechanism occurred. It finishes in
well under a second. Example with plain Verilator:

```
verilator --binary --timing --assert --top-module tb_fsdb_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/fsdb_pkg.sv tb/tb_fsdb_top.sv
./obj_dir/Vtb_fsdb_top
```

Replace `tb_fsdb_top` with `tb_fsdb_bank`, `tb_fsdb_ctrl`, and so on for
the others.

`tb_fsdb_conv_layer` runs a complete 3x3 convolution layer on the core:
16 to 16 channels, a 7x7 feature map, padding 1. Each output pixel's window
is packed into one activation vector, and the results are compared with a
direct convolution. The layer runs three times:

* W8A8;
* W8A8 again with different sign/shift rows over the same ROM word. This is
  the kernel-broadening use case, and its outputs must change;
* W4A8.

Each pass takes 4 jobs of at most 16 pixels. It needs 392 or 784 compute
cycles plus 4 reload cycles.

## Fixed sizes and capacity

| quantity | value |
|----------|-------|
| banks | 16 |
| operands per bank | 144 |
| ROM | 144 slices x 256 words x 3 bits per bank, 1.77 Mbit in all |
| sign/shift rows | 64 each per bank |
| activation buffer | 16 vectors |
| output buffer | 16 x 16 results of 24 bits |

The ROM holds 589,824 weights. That is far fewer than a ResNet-18 (about
11 million convolution weights). The density figures quoted for this kind of
design count LUT compression of the ROM, which does not change the number of
addressable weights in RTL. A full network therefore needs more cores, or a
deeper ROM (`ROM_DEPTH` in the package).

## Departures and choices

* The following are design choices where the architecture leaves the details
  open:
  * activations are unsigned;
  * the job format and handshake;
  * the buffer depths and port widths;
  * 24-bit results;
  * reset behaviour.
* The ROM MAC path is exact (10 bits). A 6-bit register is drawn for it in the
  published diagram without any pruning being described, so it is not used.
* Reloading takes one idle cycle, as in the published timing diagram. The
  "compute-reload ping-pong" mentioned for model expansion is not modelled;
  it would hide that cycle behind computation.
* The 4:1 N:M ratio is built. 16:1 needs only 16 of the 64 rows. 1:1 would
  need a 256-row weight buffer (`NM_RATIO` in the package).
* Mapping of 1x1 or 5x5 kernels, and of layers larger than one job, onto the
  144-operand groups is left to software.
* Not included:
  * the wordline drivers (analog);
  * the I/O pads;
  * the BF16 floating-point block that runs the first convolution and the
    non-linear layers. It is only named in the architecture, with no interface.
