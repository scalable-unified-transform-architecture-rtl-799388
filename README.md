# Unified systolic transform engine for H.264/AVC 4x4 and 2x2 transforms

An H.264/AVC codec transforms every 4x4 block of prediction residuals with an
integer approximation of the DCT (and inverts it in the decoder), and applies a
second-level Hadamard transform to the DC coefficients: a 4x4 Hadamard for the
sixteen luma DCs of an intra-16x16 macroblock, and a 2x2 Hadamard for each of
the two chroma components. This RTL computes all four of these transforms on
one small systolic array of 16 adders. Every kernel entry is +-1, +-2 or +-1/2,
so a processing element needs no multiplier, only a one-place shift and a
negation.

The array can also be built with only two rows or one row of PEs (the 2x4 and
1x4 setups), which saves area and makes a 4x4 transform take two or four times
as many cycles.

The design is a processor peripheral: software writes residue lines into a 4 kB
local RAM, writes a job descriptor into a register, sets START, and reads the
results back from the same RAM.

## The transforms

All four are separable, `Y = A X A^T`, with these kernels `A`:

| code | transform | A |
|---|---|---|
| 00 | 4x4 forward integer DCT | `[1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]` |
| 01 | 4x4 inverse integer DCT | `[1 1 1 1/2; 1 1/2 -1 -1; 1 -1/2 -1 1; 1 -1 1 -1/2]` |
| 10 | 4x4 Hadamard | `[1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]` |
| 11 | two 2x2 Hadamards | `[1 1; 1 -1]`, applied to two 2x2 blocks side by side |

The `1/2` entries are arithmetic right shifts of the input, exactly as the
H.264 inverse core transform writes them (`d1>>1`, `d3>>1`), and the inverse is
computed rows first, then columns, as the standard specifies, so the results
are bit-exact. Scaling and rounding (`(x+32)>>6`, the quantiser's factors, the
`/2` of the luma DC) belong to quantisation and are not part of this engine.

## How one engine does a 2-D transform

The 2-D transform is split into two 1-D passes (row-column decomposition).

**The array.** A 4x4 grid of processing elements (PEs). Data enters only at the
top: column `c` receives element `c` of a vector and hands it down one row per
cycle. Partial sums start at zero on the left and move one column right per
cycle. PE `(r,c)` adds `A[r][c] * x` to the sum passing through, so the
register at the right end of row `r` ends up holding coefficient `r` of the
vector's 1-D transform. Element `c` enters one cycle after element `c-1`; with
this skew a new vector can enter every cycle and the four rows work on four
different vectors at once, as a diagonal wavefront.

**First pass.** The four lines of a block (its rows) enter as four vectors.
Row `i` of the array produces, over four consecutive cycles, coefficient `i`
of each of the four rows: that is column `i` of the intermediate matrix `M`.

**The memory-free transposition.** The second pass must transform the columns
of `M`, i.e. feed column `i` of `M` as a vector, element `l` into array column
`l`. Because of the wavefront skew, the element that array column `l` needs in
the second pass appears at row `i`'s output in exactly the cycle column `l`
needs it. So the transposition switch is only multiplexers: column `l` picks
the output of row `i`, where `i` is the index of the vector it is being fed. No
transposition memory is needed and no cycle is lost: the second pass directly
follows the first, and the next block follows the second pass.

**The 2x2 pair.** For the 2x2 Hadamard the array is split: columns 0-1 handle
one 2x2 block and columns 2-3 another. The PE in column 2 ignores the incoming
partial sum, so row sums end at column 1 for the left block and at column 3 for
the right one; rows 2-3 stay idle. Two extra 2:1 multiplexers route the left
block's column-1 outputs back to columns 0-1. A pair takes four vector slots.

**Control.** A small token travels with every vector, entering at the top-left
PE and spreading right and down in step with the data: valid (CALC), clear
(CLR), first-vector-of-block (NEW_4x4T), transform type (TYPE_T), the pass
and the vector index. Each PE picks its coefficient from the token's type and
its own coordinates, the input buffer knows from the token when to release an
element to its column, and the transposition multiplexers use its index as
select. Nothing else is broadcast, so different transform types can follow each
other back to back.

**Timing.** With the first vector of a 4x4 block entering PE(0,0) in cycle `t`,
the last result line is ready in cycle `t+14`. Back to back, the engine
completes one 4x4 block every 8 cycles (16 MAC operations per cycle, 128 per
block) and one pair of 2x2 transforms every 4 cycles. Counted as 1-D
coefficients that is 4 per cycle.

## Smaller setups: 2x4 and 1x4 PEs

The parameter `ROWS` (4, 2 or 1; on `uta_ip_core`, `uta_kernel` and the blocks
inside) removes PE rows. Everything else keeps its size.

- **Sweeps.** A 4x4 transform needs four kernel rows, and a 2x2 pair needs two.
  With fewer PE rows, each vector goes through the array several times in a row
  (one *sweep* per group of kernel rows). In sweep `s`, PE row `r` computes
  kernel row `r + ROWS*s`. The sweep number travels in the token, so each PE
  still picks its coefficient locally. The input buffer presents the same
  element once per sweep and removes it after the last one.
- **Variable delay elements** (`uta_vde`, inside the transposition switch).
  With fewer rows, a first-pass result leaves the array before the second pass
  needs it, so it has to be held. The VDE has one register per (array column,
  kernel row). A register is written when its value leaves the array and read
  when the second pass feeds that column. A multiplexer bypasses the registers
  whenever a transform needs only one sweep: always in the 4x4 setup, and for
  the 2x2 pair in the 2x4 setup.
- **Result order.** In the 2x4 setup, two result rows can complete in the same
  cycle. The packer then holds the later one for a cycle, so lines still leave
  in order, one per cycle.

| setup | cycles per 4x4 block | cycles per 2x2 pair | latency, first vector to last line |
|---|---|---|---|
| 4x4 | 8 | 4 | 14 |
| 2x4 | 16 | 4 | 21 |
| 1x4 | 32 | 8 | 35 |

No setup stalls mid-block: every held value is written at least one cycle
before it is used.

## Around the array

- **Input buffer** (`uta_input_buffer`): one 4-entry FIFO per column. A whole
  64-bit line (four 16-bit elements) is loaded in one cycle; the columns are
  emptied one cycle apart to follow the wavefront. In the second pass the
  column's multiplexer passes the transposition switch's value instead.
- **Control unit** (`uta_kernel_ctrl`): starts a job with one CLR sweep, then
  starts a block whenever the input buffer holds all its lines (4, or 2 for a
  2x2 pair), so a block's passes never stall midway. The array idles only when
  data is missing. `done` (END) pulses after the job's last result line.
- **Result packer** (`uta_result_packer`): collects the second-pass outputs of
  each row into a result line and presents it in the cycle the last value
  appears. Results are truncated from the 32-bit internal width to 16 bits.
- **Global enable**: `en` low freezes the array, the buffer's outputs and the
  control unit; the job continues where it stopped.

## The peripheral (`uta_ip_core`)

```
 register port --> uta_ctrl_regs --START/EN/config--> uta_agu ---> uta_dpram <--> system RAM port
                                                        |  ^         | port B
                                                        v  |         v
                                                     uta_kernel (input buffer, PE array,
                                                                 transposition switch, control)
```

Memory layout: a 4x4 block is four consecutive lines, row `r` in line `r`,
element `c` in bits `[16c+15:16c]`, two's complement. A 2x2 pair uses two lines:
left block in elements 0-1, right block in elements 2-3. Results use the same
layout at the destination.

The RAM is 512 lines of 64 bits, true dual-port: port A for the system (byte
write enables), port B for the engine. 4 kB holds two macroblocks' input and
output (about 408 lines), so software can fill one half while the engine works
on the other.

The AGU reads a job's lines in order from the source line and writes results in
order from the destination line. A result line must be written in the cycle it
appears, so writes win port B and reads use the free cycles, issued only while
the input buffer has room. Because reads and writes share port B, a stream of
4x4 blocks from RAM runs at about 10.5 cycles per block instead of the
engine's 8 (16.5 and 32.4 in the 2x4 and 1x4 setups, where the engine is the
limit).

Registers (byte offsets, 32 bits):

| offset | register | contents |
|---|---|---|
| 0x00 | core status (r) | [0] busy, [1] done (sticky, cleared by START) |
| 0x04 | set control (w) | control \|= data |
| 0x08 | clear control (w) | control &= ~data |
| 0x0C | control status (r) | control bits: [0] EN, [1] START (self-clearing once the job is accepted, which needs EN and an idle engine), [2] SRST (one-cycle engine reset) |
| 0x10 | core configuration (r/w) | [1:0] array setup (read back only), [3:2] transform code, [10:4] blocks-1, [19:11] source line, [28:20] destination line |
| 0x14 | clock configuration (r/w) | word for an external clock generator, output as `clk_cfg` |
| 0x18 | debug (r) | result lines written since reset |

A job: write the blocks into the RAM, write 0x10, write 0x3 to 0x04 (EN and
START), poll 0x00 until done is set and busy clear, read the results.

## What is not here, and where it departs from the source architecture

- **Choosing the setup.** In the source architecture a configuration register
  selects the setup while the system runs (on an FPGA, by reconfiguring the
  device). Here the setup is fixed when the core is built (`ROWS`). The
  register's setup field is only stored and read back.
- **Clock generator.** The original core has its own programmable clock
  generator so the engine can run faster than the processor. Here everything
  runs on one clock; the clock configuration register only drives `clk_cfg`.
- **Bus protocols.** The register port and the RAM's system port are plain
  synchronous ports. A processor-bus slave adapter must be added to attach them
  to a specific bus.
- **Own choices**: register bit layout and job descriptor, memory line layout,
  RAM read-first behaviour, the result packer, truncation to 16 bits, the
  control unit's start rule, using the token's vector index as the
  transposition select, the sweep order of the smaller setups, and the layout
  of the delay elements. The source gives neither the number nor the timing of
  the delay elements. Its drawings place, after each column's 4:1
  multiplexer, a two-register and a one-register stage with bypass
  multiplexers, feeding back through the input buffer. Here the delay elements
  are 16 registers addressed by (column, kernel row), written straight from
  the row outputs. That needs more registers but no fixed delay schedule.
  The architecture resets the transposition switch's control logic with
  NEW_4x4T. Here the delay registers are written by position, so NEW_4x4T
  travels with the data but nothing uses it.
- **Throughput claims.** 4 coefficients per cycle counts both 1-D passes. In
  finished 2-D results the 4x4 array gives 2 per cycle: at 318 MHz that is
  enough for 1080p at 30 fps (luma plus chroma) but about 19 fps of 4320x7680
  luma, not real-time UHD.

## Files

| file | what |
|---|---|
| `rtl/uta_pkg.sv` | transform codes, token type, kernel coefficient table |
| `rtl/uta_pe.sv` | processing element |
| `rtl/uta_pe_array.sv` | systolic array of ROWS x 4 PEs |
| `rtl/uta_input_buffer.sv` | per-column line FIFOs and feed multiplexers |
| `rtl/uta_transpose_switch.sv` | memory-free transposition multiplexers |
| `rtl/uta_vde.sv` | variable delay elements of the switch (2x4 and 1x4 setups) |
| `rtl/uta_kernel_ctrl.sv` | token issue, job sequencing |
| `rtl/uta_result_packer.sv` | second-pass outputs to result lines |
| `rtl/uta_kernel.sv` | the transform engine |
| `rtl/uta_agu.sv`, `rtl/uta_dpram.sv`, `rtl/uta_ctrl_regs.sv` | address generation, local RAM, registers |
| `rtl/uta_ip_core.sv` | top level: the peripheral |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_uta_ref_pkg.sv` holds reference transforms |
| `tb/tb_uta_kernel_run.sv` | kernel test for any setup, used by `tb_uta_kernel`, `tb_uta_kernel_2x4`, `tb_uta_kernel_1x4` |
| `tb/tb_uta_ip_core_2x4.sv`, `tb/tb_uta_ip_core_1x4.sv` | the whole-peripheral test in the smaller setups |
| `tb/tb_uta_macroblock.sv` | one macroblock's transforms through the peripheral, with cycle counts |
| `tb/tb_uta_kernel_ctrl_run.sv` | control-unit test for one setup, run for all three by `tb_uta_kernel_ctrl` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example the end-to-end test of the whole peripheral:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/uta_pkg.sv tb/tb_uta_ref_pkg.sv tb/tb_uta_ip_core.sv \
  --top-module tb_uta_ip_core
./obj_dir/Vtb_uta_ip_core
```

The two packages are named explicitly; `-y` lets verilator find every other
module by its file name, including the shared harnesses. Replace the last file
and the top name to run another testbench. `-Wno-fatal` keeps width warnings in
the testbenches from stopping the build; they are still printed.

`tb_uta_ip_core` loads random blocks of every transform type through the RAM
port, runs jobs through the registers, and compares every result with
reference transforms written from the textbook definitions
(`tb_uta_ref_pkg.sv`). It pauses a job with EN, soft-resets one, runs a
32-block job while the next job's input is written (double buffering), and
counts how often the engine starved for input, ran blocks back to back, fed the
second pass through the switch, used the 2x2 mode and swept CLR. It fails if any
of these never happened. `tb_uta_kernel` checks the 14-cycle latency and the
8-cycle block rate on the engine alone. `tb_uta_kernel_2x4` and
`tb_uta_kernel_1x4` check the same for the smaller setups. Testbenches with `$urandom` stimulus
rely on the simulator's seed; they pass for any seed.

`tb_uta_macroblock` uses the core the way codec software would, on one
4:2:0 macroblock of synthetic residuals. It runs a 24-block forward DCT, then
the 4x4 Hadamard of the 16 luma DC coefficients and the 2x2 Hadamards of the
chroma DCs, then a 24-block inverse DCT. Measured from the START write to DONE:

| job | cycles |
|---|---|
| 24 blocks, forward or inverse DCT | 252 (10.5 per block) |
| one 4x4 block, any type | 23 |
| one 2x2 pair | 15 |
