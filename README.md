# SHARC-style DSP core with a MIPS floating-point pipeline

This is a digital signal processor built around one observation: DSP code
spends its time in short loops that multiply and accumulate. So the machine
has to deliver three things every cycle: an instruction, a sample and a
coefficient. It also has to do a multiply-add on them in that same cycle.
The design has two engines that share this goal:

* a **fixed-point DSP core**. It has a 40-bit accumulator datapath, a
  single-cycle multiply-accumulate unit (MAU) around a 17 x 17 radix-4 Booth
  multiplier, a -16..31 barrel shifter, an exponent encoder and a
  compare-select unit. Two auxiliary-register address generators feed it
  from a data RAM that serves two reads per cycle.
* a **five-stage MIPS floating-point pipeline** (IF, ID, EX, MEM, WB). It
  executes the single- and double-precision instructions `add`, `sub`, `mul`
  and `div.s`, the six-way compares `c.cond`, the loads and stores `lwc1` and
  `swc1`, and the branches `bc1t` and `bc1f`. It fetches through a 32-entry
  instruction cache, so a loop body reaches the core without using the
  program bus. This is the "Super Harvard" idea.

All sizes default to the values of the original design:

| Item | Size |
|---|---|
| Accumulators | two, 40 bits each (8 guard + 16 high + 16 low) |
| Multiplier | 17 x 17 |
| Auxiliary registers | 8 |
| ARAUs | 2 |
| Program ROM | 2k x 32 |
| Data RAM | 10k x 32 |
| Instruction cache | 32 instructions |

## How the pieces fit

```
sharc_top
├── dsp_core                 fixed-point engine, one decoded control word per cycle
│   ├── dagen                AR0..AR7, DP, SP, two ARAUs -> DAB, CAB
│   ├── data_ram (16-bit)    read port 0 = DB (at DAB), read port 1 = CB (at CAB), write = EB (at DAB)
│   └── dsp_cpu              T reg, sign controls, MAU, ALU, ACCA/ACCB, shifter, EXP, CSSU
│       ├── mau -> booth_mul17
│       ├── alu40, barrel_shifter, exp_encoder, cssu
├── mips_fp_pipeline         floating-point engine
│   ├── pagen                PC, +4, next-PC select
│   ├── icache               32 lines, direct mapped
│   ├── fp_regfile           $f0..$f31, doubles in even/odd pairs
│   └── fp_addsub, fp_mul, fp_div, fp_cmp  (single and double instances)
├── prog_rom (2k x 32)       program memory of the pipeline, with a load port
└── data_ram (10k x 32)      data memory of the pipeline
```

The two engines are independent. They do not share buses or memory, and
each has its own ports on `sharc_top`. The original description does not
say how they would be coupled.

## The fixed-point core

### Buses and the single-cycle MAC

The core moves data on four 16-bit buses:

* **CB** and **DB** read operands from data memory.
* **PB** carries an immediate from the program bus.
* **EB** writes a result back to data memory.

Each cycle, port D of `dagen` puts an address on DAB and port C puts one on
CAB. The RAM returns both words in that same cycle on DB and CB. So a FIR
inner step `MAC *AR1+, *AR2+, A` takes exactly one cycle. It reads the sample
and the coefficient, multiplies them, adds the product to ACCA and
post-increments both pointers.

### The control word

The fixed-point instruction set is not available, so no decoder is built.
Instead, `dsp_core` takes a decoded control word, `dsp_pkg::core_ctrl_t`,
every cycle. The control word has three parts:

* `dag_d` and `dag_c` give the addressing mode of each ARAU and the post-modify of its AR.
* `mem_we` stores EB at the DAB address.
* `cpu` (`cpu_ctrl_t`) sets every multiplexer of the datapath. It holds the
  mode bits `frct`, `sxm` and `ovm`, the multiplier sources, the MAU addend,
  the ALU operation and sources, the shifter source, count and kind, the
  MIN/MAX choice and the accumulator write. `mau_par` makes it a parallel
  instruction such as `LD||MAC`. The selected result (for example a load
  through the ALU) goes to the destination accumulator. In the same cycle
  the MAU result goes to the other accumulator.

Whoever adds an instruction decoder only has to produce this word.

### Datapath order inside `dsp_cpu`

* **Sign controls.** Every 16-bit operand is widened before use: to 40 bits
  for the ALU and the shifter, to 17 bits for the multiplier. `sxm = 1`
  widens by sign and `sxm = 0` by zeros. This is why the multiplier is
  17 x 17: unsigned 16-bit data also fits as a positive 17-bit number.
* **MAU.** It computes `Y = ±(X · Y') (·2 if frct) + {0 | ACCA | ACCB}`. X
  comes from T, DB or the high word of ACCA. Y' comes from CB, DB or PB. The
  40-bit sum then passes ROUND (add 2^15, clear the low 16 bits) and SAT
  (clamp to 0x00_7FFF_FFFF .. 0xFF_8000_0000 when `ovm = 1`).
* **Shifter and ALU.** The shifter takes CB, DB, PB, ACCA or ACCB. Its output
  can feed the ALU's B input, so "shift an operand, then add" is one cycle:
  `ADD #4568h, 8, A, B` gives `B = A + 0x456800`. The shifter also drives EB
  through the MSW/LSW select, which gives a shifted store of either half. A
  shift count of -32 is outside the legal range -16..31. It means "use T as
  the count", which is how normalisation works: `EXP` writes T, and the next
  shift uses T.
* **EXP encoder.** It gives the left shift that moves the first non-sign bit
  of a 40-bit accumulator to bit 30: the number of redundant sign bits minus
  8. The result lies in -8 .. 31. A zero accumulator gives 0.
* **CSSU.** It writes MAX or MIN of ACCA and ACCB (compared signed) to an
  accumulator. `pick_b` reports which one won; on a tie, A wins.
* **ALU.** It works on 40 bits and has the operations ADD, SUB, AND, OR, XOR,
  PASSB (load) and NOT. `ovf` flags a 40-bit overflow. With `ovm`, arithmetic
  results are clamped to the 32-bit range.

Everything up to the accumulators and T is combinational. ACCA, ACCB and T
change on the rising clock edge.

### The Booth multiplier (`booth_mul17`)

The multiplier is recoded into 9 radix-4 digits in {-2, -1, 0, +1, +2}. It is
read three bits at a time, with one bit of overlap. Each digit selects 0,
±X or ±2X, placed two bits further left than the digit before. A negative
digit is formed as the one's complement of the multiple plus a 1. All these
1s are collected in a tenth "correction" row. The ten rows are reduced by
rows of 3:2 carry-save adders until two remain, and one adder finishes the
product. The original shows the three stages (encoder, partial-product
generator, Wallace tree of CSAs). The order of the reduction is this
implementation's own choice.

### Addressing (`dagen`)

| Mode | Address | Side effect |
|---|---|---|
| absolute | 16-bit `offs` | — |
| direct | `{DP[8:0], offs[6:0]}` | — |
| indirect | `ARn` | ARn += 1, -= 1, += AR0, -= AR0, ±AR0 with reverse carry, or +1, -1, +AR0 modulo BK |
| memory-mapped | `{9'b0, offs[6:0]}` | — |
| stack push / pop | SP-1 / SP | SP pre-decrement / post-increment (port D only) |

Short and long immediates carry their operand on PB and need no address.

The reverse-carry update is `bitrev(bitrev(AR) ± bitrev(AR0))`. It walks a
buffer in bit-reversed order, as an FFT needs. With AR0 = N/2, an 8-point
buffer is visited as 0, 4, 2, 6, 1, 5, 3, 7.

The modulo post-modifies are the modulus logic that the original draws beside
each address generator. They keep ARn inside a circular buffer of BK words,
where BK is loaded from PB with `bk_we`. The buffer starts at an address
whose low k bits are zero, with 2^k the smallest power of two >= BK. Stepping
past the last word wraps to the first, and stepping back from the first
wraps to the last. With BK = 5 and AR = base + 2, +1 visits 2, 3, 4, 0, 1, ...
A delay line for a FIR filter can use this without moving any samples.

If both ARAUs modify the same AR in one cycle, port D wins. An explicit AR
load (`ar_we`) wins over both.

## The floating-point pipeline

### Stages

| Stage | Work |
|---|---|
| IF | Sends PC to the instruction cache. On a miss, the line is refilled from program memory in that cycle. IF then stalls one cycle and sends a bubble to ID. |
| ID | Decodes. Reads the FP register file: a pair for doubles, the even register holding the low word. Reads the integer base register and sign-extends the immediate. |
| EX | One combinational cycle in the FP units: add/sub, mul, div (single only) and compare. Also computes base + offset and the branch target PC + 4 + 4·offset. A compare writes the FP condition flag `fcc` at the end of EX. |
| MEM | `lwc1` reads data memory and `swc1` writes it. A taken `bc1t`/`bc1f` redirects the PC from here, as in the classic datapath. |
| WB | Writes the FP register or register pair. |

### No interlocks: scheduling rules for software

The pipeline detects no hazards and forwards nothing. The register file
writes in the first half of a cycle and reads in the second half. The rules
that follow are:

* A value produced by instruction *i* can be read by instruction *i+3* or
  later. Put two independent instructions or NOPs in between. This holds
  for `lwc1` too.
* A branch may directly follow the compare that sets `fcc`.
* A taken branch squashes the three instructions behind it (IF, ID, EX).
  There are no delay slots. A taken branch costs three cycles.
* An instruction-cache miss costs one cycle. Each line holds one
  instruction, so the first pass through a loop costs one extra cycle per
  instruction. Later passes run at one instruction per cycle.

### Encodings

The R, I and J formats are the standard MIPS ones. FP arithmetic uses the
coprocessor-1 layout, and all values except the compare are the MIPS
architecture's:

| Instruction | Encoding |
|---|---|
| `add/sub/mul/div.fmt fd, fs, ft` | `0x11 | fmt | ft | fs | fd | funct`, with fmt S = 0x10, D = 0x11 and funct 0, 1, 2, 3 |
| `c.cond.fmt fs, ft` | funct `0b110ccc`, with ccc = 0 eq, 1 ne, 2 lt, 3 le, 4 gt, 5 ge |
| `bc1t / bc1f offset` | `0x11 | 0x08 | 0000t | offset16` |
| `lwc1 / swc1 ft, off(base)` | opcode 0x31 / 0x39 |

Everything else, including the all-zero word, executes as a NOP.

`div.d` is not in the original's instruction list, so only the single-precision
divide is provided; the `div` funct with fmt D executes as a NOP.

The compare codes above are this design's own. MIPS itself encodes only
eq/lt/le and their unordered forms.

### Integer base registers

`lwc1` and `swc1` take their base from an integer register, but the
instruction set has no integer instructions. The 32 integer registers are
therefore loaded through the `gpr_we/gpr_wa/gpr_wd` port. `$0` always reads
0. Reset clears the integer registers, so load them after releasing reset.

### Arithmetic

The FP units implement IEEE-754 single and double formats, except for the
limits listed here:

* Rounding is round-to-nearest-even.
* Subnormal inputs are treated as zero, and results below the normal range
  flush to zero.
* An overflow gives infinity.
* A NaN input, `inf - inf`, `0 × inf`, `0/0` and `inf/inf` give the default
  quiet NaN.
* `x/0` gives infinity.
* Comparisons treat +0 and -0 as equal. Every comparison with a NaN is false
  except `ne`.

`fp_addsub`, `fp_mul` and `fp_cmp` take the parameters `EW`/`FW` and are
instantiated for both widths. `fp_div` does one wide integer division in a
single cycle. This is the simplest correct divider. It is also the one that
would limit the clock.

## Memories and the instruction cache

* **`data_ram`** has two asynchronous read ports and one write port, written
  on the clock edge. A read of the word being written returns the old value.
  Addresses at or above the depth read as zero and are ignored on write. The
  64k-word space above the internal RAM belongs to external memory, which
  is not modelled.
* **`prog_rom`** is read asynchronously. It has a load port so that a program
  can be placed in it. In `sharc_top`, hold `mips_rst_n` low while loading.
* **`icache`** is direct mapped, with LINES one-word lines. The index is the
  word address mod LINES and the tag is the rest. The valid bits clear at
  reset. A hit returns the word in the same cycle.

## Where this departs from the original, and what is missing

* **Bus width.** The CPU figure of the original shows 16-bit buses, while
  its text speaks of 32-bit memories. The fixed-point core follows the
  figure: its RAM instance is 16 bits wide and 10k deep. The floating-point
  side uses 32-bit words.
* **Shift before add.** The original text puts the shifter after the ALU.
  Its `ADD #4568, 8, A, B` example shifts the operand first. This design
  feeds the shifter into the ALU, which makes that example one cycle and
  avoids a combinational loop.
* **Pipeline stages.** The original also names a floating-point pipeline of
  I, D, F1, F2, F3 stages. This design follows the drawn MIPS datapath
  instead, with one-cycle FP units in EX.
* **Not built.** The following are only named or quoted in the original, so
  there is no RTL for them:
  * the fixed-point instruction decoder (211 instructions);
  * the MMU/EXTMMU memory interfaces and external memory;
  * the serial and parallel I/O ports;
  * the loop and status logic of a program sequencer.
* **Workloads.** The original runs a G.726 ADPCM encoder (1,700 program
  words, which would fit the 2k ROM) and an MP3 decoder (12k program and 27k
  data words, which would need the external memory). Neither can run here:
  both are fixed-point programs for the missing decoder.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself if it runs too long.
The FP testbenches use `tb/fp_ref_pkg.sv`. It computes reference results in
double precision and rounds them to single with round-to-nearest-even. That
rounding is exact for +, -, × and ÷ of single operands.

For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dsp_pkg.sv rtl/mips_pkg.sv tb/tb_sharc_top.sv --top-module tb_sharc_top -o sim
./obj_dir/sim
```

`tb_sharc_top` runs the whole processor at its default sizes. It includes:

* a 16-tap FIR, checked to take 16 cycles;
* a saturating MAC, a 40-bit ALU overflow, EXP and MAX;
* a bit-reversed read walk;
* a 5-tap FIR over a circular delay line, in which each step is an
  `LD||MAC` that loads the sample into A and accumulates into B;
* a floating-point program loaded into the ROM, covering every arithmetic
  instruction, loads and stores, and a compare-and-branch loop run from the
  cache.

It counts each of these mechanisms and fails if one never happened.
`tb_mips_fp_pipeline` also checks that a squashed store never reaches
memory. `tb_dsp_cpu` reproduces the `ADD #4568, 8, A, B` example: A = 0x1200
gives B = 0x457A00.

Simulation has two states, so every register that is read is reset. The
memories are not reset: write before you read.
