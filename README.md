# A coarse-grained reconfigurable baseband processor

Wireless receivers spend most of their digital effort on the same few
operations, applied once per *degree of freedom* of the channel (a time
sample, a subcarrier, an antenna). FIR filters, auto- and cross-correlation,
de-spreading, matrix-vector products, Euclidean distances and FFT butterflies
are all the same complex multiply-add-accumulate with small variations. This
processor builds that shared datapath as one large configurable unit, the
**DOF unit**. It is not built from word-level ALUs and multipliers as most
reconfigurable arrays are. Because the unit works on complex numbers, one
set of control bits drives four real multipliers at once. That cuts the
control and memory traffic per operation.

The array has these parts:

* four DOF units;
* a 10-stage CORDIC for trigonometry and normalisation;
* a small maximum-likelihood (ML) accelerator that searches for a maximum or minimum;
* a dual-core 16-bit ALU for the leftover arithmetic and for event detection;
* two interconnect units that form a time-multiplexed crossbar;
* an 8 KB data memory and an 8 KB coefficient memory;
* a control unit with an 8 KB configuration memory and an 8 KB ALU instruction memory.

This repository holds synthesizable SystemVerilog for all of these parts, with
a self-checking testbench for each.

## Block diagram and clocking

```
            host port                          ext_in (one word per fast cycle)
               |                                   |
   +-----------v-----------+   +------------+      |
   | control unit          |   | data mem   |--+   |     coefficient mem --+
   |  cfg mem, ALU mem     |   | 1R + 1W    |  |   |                       |
   +---+-------------------+   +-----^------+  v   v                       v
       | hard cfg, soft bits,        |      +-------------------------------------+
       | ALU instructions, ce        |      | icn_to_dp: 4 buses x 4 slots        |
       v                             |      | -> held operands, one per unit input|
   (all units)                       |      +---+-----+-----+-----+----+----+-----+
                                     |          |     |     |     |    |    |
                                     |        DOF0  DOF1  DOF2  DOF3 CORDIC ML  ALU
                                     |          |     |     |     |    |    |
                                     |      +---v-----v-----v-----v----v----v-----+
                                     +------| icn_from_dp: memory-write bus,      |
                                            | feedback bus (back to icn_to_dp)    |
                                            +-------------------------------------+
```

The design has two rates. The memories, the crossbar, the ALU and the
control unit do something every clock, the *fast cycle*. The DOF, CORDIC and
ML units do one operation every four clocks, the *slow cycle*. They are
enabled by `ce`, which the control unit raises in the last fast cycle of each
slow cycle. The prototype numbers are 200 MHz and 50 MHz. Here that ratio is
a clock enable on a single clock, not two clocks.

The 4:1 ratio is what makes the crossbar cheap. Each bus is one 32-bit word
wide (a complex number with 16-bit real and imaginary parts) and carries four
words per slow cycle, called slots 0 to 3. There are four source buses:
data-memory read, coefficient-memory read, external input and feedback. The
feedback bus carries unit outputs back to unit inputs. This lets units be
chained into a pipeline without going through memory.

## The DOF unit (`dof_unit`)

This is the part to understand first. One slow cycle computes:

```
p    = x0 * COP1(x1)                       complex, 32-bit real/imag parts
a    = acc ? A : (COP2(x2) <<< x2_shift)   27 bits
sum  = a + (COPp(p) >>> 5)                 27-bit adder
A   <= sum                                 accumulator register
z2  <= sat16(sum >>> shift)
z1  <= sat16((sum >>> shift) + COP3(x3))
z3  <= sat16(p >>> 15)
```

`COP` is a complex operator that outputs one of x, -x, jx, -jx, jx* or -jx*.
It only swaps and negates, so it costs almost nothing. It can rotate by 0, 90, 180 or 270 degrees, which is all that
de-spreading needs. Because the COP codes here are hard bits, a code that
changes every chip is instead fed as a coefficient to the multiplier. There is no plain conjugate x*. Correlation gets one with two COPs:
`x0 * conj(x1) = -j * (x0 * (j x1*))`, that is `cop_x1 = JC` and
`cop_p = NJ`.

The unit is set up with 21 hard bits per function (`dof_hard_t`: four COP
codes, the output shift, the x2 alignment). It also takes one soft bit per
slow cycle, `acc`: 1 accumulates, 0 loads a new start value from x2. Common
mappings:

| operation | x0 | x1 (COP) | product COP | x2 | acc |
|---|---|---|---|---|---|
| FIR / inner product | sample | tap (x) | x | 0 | 0 first, then 1 |
| correlation | sample | reference (jx*) | -jx | 0 | 0 first, then 1 |
| energy, Euclidean distance | d | same d (jx*) | -jx | 0 | 0 |
| DIT butterfly A ± W·B | B | W (x) | x or -x | A, `x2_shift = 10` | 0 |
| de-spreading | sample | code chip ±1 or ±j, stored as ±32767 | x | 0 | 0 first, then 1 |
| radix-4 butterfly, output k | input m | W·(-j)^(mk) | x | 0 | 0 first, then 1 |

In load mode the x2 operand is always added. To start from zero, route a zero
word to x2, for example one crossbar slot that carries zero.

Every output is registered together with the accumulator. All inputs
therefore reach all outputs exactly one slow cycle later. This matches the
rule that the accumulator register is the only pipeline stage and the unit
has a latency of one cycle. Some fixed-point details are this design's own
choices:

* the 32-bit product enters the 27-bit adder with its 5 LSBs dropped;
* x2 is left-aligned by 0 to 15 bits (10 matches a Q15 twiddle);
* outputs saturate to 16 bits.

## The crossbar and the flow of a stream

`icn_to_dp` stores the word on every bus in the register for its slot. Once
slot 3 has arrived, all 16 words (4 buses × 4 slots) are copied into a hold
bank in one step. Every unit input has a 4-bit hard select (bus, slot) that
picks one held word. `icn_from_dp` does the opposite. In fast cycle *p* it
puts one chosen unit output on the memory-write bus, which is written at
`wr_ptr + p` if that slot is enabled. It puts another chosen output on the
feedback bus, which is registered.

`mem_agu` generates the addresses. In slot *p* of a slow cycle it reads the
data memory at `rd_ptr + p` and the coefficient memory at `cm_ptr + p`. The
pointers advance by a per-function step after each slow cycle. A step of 1
gives a sliding window, for example four correlation lags in parallel. A
step of 2 or 4 streams pairs or quads. A step of 0 keeps a fixed address,
for example an accumulator result that is overwritten until it is final.

Counting slow cycles from the start of a function:

| slow cycle | what happens to the data read in cycle j |
|---|---|
| j | read from memory, slot p in fast cycle p |
| j+1 | committed to the unit inputs at the end of fast cycle 0, computed at the end of the cycle using the soft bits of cycle j+1 |
| j+2 | written to memory at `wr_ptr(j+2) + p`, or placed on the feedback bus |
| j+3 | a fed-back value is a unit input again and is computed at the end of j+3 |

A program must therefore give the soft bit for the sample read in cycle j in
cycle j+1. It must also run each function two slow cycles longer than it
reads data. This matches the packing of a write base `wr_base = out - 2*wr_step`.

## Programs: hard and soft control (`control_unit`)

Control is split in two:

* **Hard bits** configure the whole array for one function: COP codes, shifts, crossbar selects, CORDIC and ML modes, and memory pointers. They are loaded by a fixed-length instruction at the start of the function.
* **Soft bits** change every cycle: DOF accumulate, ML restart and the two ALU instructions. Only the groups that the function enables are stored, so this stream has a variable length.

Configuration memory image (32-bit words):

```
word 0      [31:30] op (1 = run, 0 = halt)   [29] stop on ALU exception
            [28:23] enabled soft groups {ALU, ML, DOF3, DOF2, DOF1, DOF0}
            [15:0]  length of the function in slow cycles
word 1      [10:0]  ALU program start      [18:11] ALU program length
words 2-9   hard_cfg_t (247 bits), least significant word first
then        the soft stream: per slow cycle, one bit per enabled group among
            DOF0..DOF3, ML, packed from bit 0 upward; the next function
            begins at the next word
```

The ALU instruction memory holds one word per fast cycle: core 0 in bits
[13:0] and core 1 in bits [27:14]. The ALU program loops over its length for
as long as the function runs.

The host interface works like this:

1. While `busy` is low, write the four memories with `host_we` and `host_sel`.
2. Pulse `start`. The program runs from word 0.
3. `done` rises when the program reaches a halt.
4. Read the data memory through `host_addr` and `host_rdata`. The data comes one clock after the address.

Fetching each function takes about 20 fast cycles, and the array is idle
during that time.

## The other units

* **CORDIC (`cordic_unit`)** has ten micro-rotation stages, all evaluated in one slow cycle, with 12-bit adders and shifters. Its result is registered.
  * With `vec = 0` it rotates: (x, y) = (1/K, 0) and angle z give cos z and sin z.
  * With `vec = 1` it returns the magnitude K·|v| and the phase of v.
  * Input x and y are Q1.15. Output x and y are Q2.14, and the gain K ≈ 1.647 is not removed. Angles are 16-bit binary (π = 2¹⁵).
  * The input magnitude must stay below about 1.2.
  * Tested error: below 0.008 in magnitude. Angles are within 0.006 + 0.004/|v| rad.
* **ML accelerator (`ml_unit`)** keeps a running maximum (or minimum, `ml_min`) of its input. It subtracts the stored value from the input, tests the sign, and loads the input when it is a new extreme. The `restart` soft bit starts a new search. Outputs are the stored value and a new-extreme flag, which is placed in the imaginary part of its crossbar word.
* **Dual-core ALU (`dual_alu`, `alu_core`)** has two 16-bit cores that share eight registers.
  * Instruction format: `{op[4:0], rd, rs1, rs2}`.
  * Operations: SHL, SHR (arithmetic), ABS, ADD, SUB, INC, DEC, six signed comparisons (EQ NE GT GE LT LE) that write 0 or 1, and six logic operations (AND OR XOR NOT NAND NOR). Code 0 is NOP.
  * r7 is the crossbar port: reading it gives the ALU's operand, and writing it sets the ALU's output.
  * A comparison that is true and writes r7 raises the exception. If the function has its stop bit set, the control unit ends that function at the end of the slow cycle. This is how a packet detector hands control back without polling.
* **Memories**: `data_mem` has one read port and one write port, both synchronous, and reads return the old data. `coef_mem` has a single port. Both are 2048 × 32 bits, and the data memory module is also used for the two control memories.

## How far to trust it, and where it is this design's own

These parts are taken from the original description:

* the unit set and counts;
* the structure of the DOF datapath, its widths (16/32/27) and its 21 hard bits;
* the COP operator set;
* the choice of CORDIC design (10 spatial stages of 12 bits);
* the structure of the ML accelerator;
* the ALU's 19 operations, 14-bit instructions and shared registers;
* the memory sizes and port types;
* the time-multiplexed crossbar with a feedback path;
* the split into hard and soft control;
* the ALU exception.

These are this implementation's own choices:

* every encoding: COP codes, opcodes, crossbar selects, the configuration format;
* the memory pointer scheme;
* the fixed-point scaling inside the DOF and CORDIC units;
* saturation;
* the register-file size and the r7 port;
* the rule that raises the exception;
* the control unit's state machine;
* using one clock with an enable.

Known differences from the prototype:

* Hard control takes 247 bits, against 183 in the prototype. The crossbar's operand selects (80 bits) and the memory pointers (45 bits) are wider than the prototype's encodings, which are not known.
* The interconnect from the datapath uses exactly 36 bits, as in the prototype.
* The DOF unit has one soft bit, as in the prototype's control-bit table. The prototype's prose mentions four.
* The CORDIC has no direct arcsine or arccosine mode, because how the prototype computes them is not known.
* Units connect only through the crossbar. There are no direct links between neighbouring DOF units.
* The 12-unit grid shown in the architecture overview is built as the 4-unit prototype.
* The COP operators are hard bits. A de-spreading code that changes every chip therefore goes through the multiplier as a ±1 or ±j coefficient. The original description does de-spreading with a phase-rotating operator in place of the multiplier.
* Packet detection by cross-correlation is tested with a 3-sample preamble, chained over three DOF units.
  * A longer chain, plus the ML and ALU hops, would need more than the 4 feedback slots of one slow cycle.
  * Longer preambles need a correlation that accumulates over several cycles, as in the four-lag correlation test.
* The prototype reports a CORDIC precision of 0.19 %. This CORDIC is checked only to 0.008 in magnitude, about 0.5 % of its output scale.
* Gate counts, power and timing closure at 50/200 MHz have not been checked.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. The package has to be read first, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/bb_pkg.sv rtl/*.sv \
    tb/tb_baseband_top.sv --top-module tb_baseband_top
./obj_dir/Vtb_baseband_top
```

* `tb_baseband_top` runs the whole processor at its default size. It loads a five-function program and checks each result against a model:
  * a 32-tap correlation at four lags;
  * a 16-butterfly radix-2 FFT stage;
  * CORDIC vectoring of samples from the external port;
  * loading a threshold into the ALU;
  * packet detection (energy, then ML maximum, then ALU threshold), which must stop on the exception in exactly the predicted slow cycle.

  It also counts reconfigurations, accumulations, feedback transfers, external-port use, CORDIC results, new ML maxima and exceptions, and fails if any of them never happened. The run takes well under a second.
* `tb_fft_workloads` runs two FFT workloads on the whole processor:
  * a complete 16-point radix-4 FFT in 8 functions, compared with a floating-point DFT;
  * one radix-2 stage of two streams at once, with exact results.
* `tb_sync_workload` detects a packet. DOF0 to DOF2 form a chained cross-correlation with a preamble, passing partial sums over the feedback bus. The ML unit keeps the running maximum, and the ALU raises the exception. The test checks every correlation value and the exact slow cycle of the stop.
* `tb_<unit>` tests each block on its own against independent integer or real-number models, with random and corner-case stimulus.

## Files

| file | content |
|---|---|
| `rtl/bb_pkg.sv` | widths, complex type, COP and opcode enums, configuration structs |
| `rtl/baseband_top.sv` | the processor |
| `rtl/control_unit.sv` | program sequencer, hard/soft control, slow-cycle enable |
| `rtl/dof_unit.sv`, `rtl/cop.sv` | DOF datapath and complex operator |
| `rtl/cordic_unit.sv` | CORDIC |
| `rtl/ml_unit.sv` | ML accelerator |
| `rtl/dual_alu.sv`, `rtl/alu_core.sv` | dual-core ALU |
| `rtl/icn_to_dp.sv`, `rtl/icn_from_dp.sv` | time-multiplexed crossbar |
| `rtl/mem_agu.sv`, `rtl/data_mem.sv`, `rtl/coef_mem.sv` | memories and addressing |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fft_workloads.sv`, `tb/tb_sync_workload.sv` | workloads run on the whole processor |
