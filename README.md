# Multicore GF(2^n) cryptoprocessor with reconfigurable MALU cores

Elliptic-curve (ECC) and genus-2 hyperelliptic-curve (HECC) scalar
multiplication over binary fields comes down to long sequences of field
multiplications and additions. This processor runs all of them with a single
instruction,

    MALU(&R, &A, &B, &C, &D):   R = A·(B + D) + C  mod P(x)

executed on several identical **MALU cores** (Modular Arithmetic Logic Units).
A hardware scheduler looks at a small window of queued MALU instructions,
finds the ones that do not depend on each other and starts them together, one
per core. The same cores can also be chained so that two, three or six of them
act as one wider multiplier, which is how a processor built from 97-bit cores
handles 163-, 283- or 571-bit fields. The field size and the reduction
polynomial P are programmable, and the point or divisor formulas are software:
MALU sequences held in a micro-code RAM and started by a host CPU.

The default build is six cores of 97 × 12 bits (`MALU_97x12`: a 97-bit field,
12 bits of the multiplier consumed per clock), one 32-entry register file per
core, an issue window of six instructions, at most four instructions per issue
and a 1-Kbyte micro-code RAM.

## Block structure

```
 host CPU ──32b instr + 32b data──► main_ctrl ──MALU / CALL──► ibc ──► MALU cores 0..5
          ◄──host_full, dout──────  (FIFO,       ──CFG────────────────► (config regs)
                                     decode)     ──STORE/LOAD─► dbc ─► register files 0..5
                                                 ──UWRITE─────► ucode_ram ─► ibc
```

| file | block |
|---|---|
| `cp_pkg.sv` | constants, instruction and configuration types, host encodings |
| `malu.sv` | one slice of the digit-serial multiplier, with chain ports |
| `malu_core.sv` | FSM around a slice: read operands, execute, wait for its write slot, write back; configuration register |
| `rf4r1w.sv` | 32 × 98-bit register file, four read ports, one write port |
| `ucode_ram.sv` | 256 × 32-bit micro-code RAM |
| `iqb.sv` | instruction queue buffer with out-of-order removal |
| `ilp_sched.sv` | dependency check over the window (combinational) |
| `ibc.sv` | instruction bus controller: micro-code streaming, issue, write slots |
| `dbc.sv` | data bus controller: 32-bit STORE/LOAD between host and register files |
| `main_ctrl.sv`, `sync_fifo.sv` | host instruction buffer and decoder |
| `cryptoproc.sv` | top level: wiring, core chains, write bus |

## The data path: one multiplier, sliced

A MALU computes A·B mod P most-significant bit first. Each step does

    T ← x·T + a_i·B + m_i·P,      m_i = the coefficient pushed out of the top of T

so T never grows beyond the field. Twelve steps are unrolled per clock, so a
product takes ⌈N/12⌉ cycles (9 for N = 97). B + D is formed once when the
operands are loaded and C is added to the final T; that is what makes
A(B+D)+C cost no more than A·B.

**Slices and chaining.** A core holds a 98-bit slice (n + 1 bits for n = 97)
of every operand. In each of the twelve steps two bit vectors cross the slice
boundaries:

* `m`, the reduction bits, made by the top slice of a group from its own top
  bit and used by every slice below it to decide whether to add its part of P;
* `q`, the bit each slice shifts out at its top, shifted into the bottom of
  the slice above (the carry of x·T).

The bits of A have to reach every slice as well. The A registers of a group
are linked into one shift register (`a_top_out` → `a_chain_in`, upwards) and
the top slice broadcasts the current 12-bit digit downwards (`digit_out` →
`digit_in`). A core with `cfg1 = 1` takes m and the digit from the core above
it (core c − 1); a core with `cfg1 = 0` heads a group. Core 0 always heads a
group, and the i-th core of a group holds slice i, slice 0 being the most
significant. With g cores per group the data path is g·98 bits wide and takes
fields up to g·98 − 1 bits:

| cores per group | groups | field sizes | issue width | cycles per MALU |
|---|---|---|---|---|
| 1 | 6 | N ≤ 97 | 4 | ⌈N/12⌉ (9 for 97) |
| 2 | 3 | N ≤ 195 | 3 | 14 for 163, 17 for 193 |
| 3 | 2 | N ≤ 293 | 2 | 24 for 283 |
| 6 | 1 | N ≤ 587 | 1 | 48 for 571 |

Within one clock `m` travels down and `q` travels up a group step by step;
there is no loop at bit level, but a long group makes a long combinational
path, and lint tools report the slice-to-slice vectors as a loop.

**Operand alignment.** The reduction bit is always the top bit of the
group, whatever N is. Every value (operands, results and P itself) is
therefore kept multiplied by x^s, s = g·98 − N, i.e. left-aligned in its g
slices. Then A·(B·x^s) mod (P·x^s) = x^s·(A·B mod P), so results come out in
the same form. The A register is scanned from its top for exactly N bits: the
first cycle shifts by 12 − pad and its digit carries pad = 12·⌈N/12⌉ − N
leading zeros, later cycles shift by 12. The host does the alignment when it
stores values and undoes it when it loads them. P is stored without its x^N
term. Register 0 of every register file must hold P.

## Register files and the write bus

Each core reads its four operands from its own 4R1W register file in a single
cycle. The files are copies of one another: every write is broadcast to each
file holding the same slice (with independent cores, to all six). Only one
value is written per cycle. When a group writes, its g cores put their g
slices on the bus in the same cycle. 32 registers cover HECC; ECC needs 16.

## Issuing instructions

The instruction bus controller (`ibc`) keeps up to six queued MALU
instructions, taken from the host or streamed from micro-code at one per
cycle. When all cores can accept work, it scans the window oldest first. The
oldest instruction always issues. A later one issues too unless one of these
holds:

* it reads a register that an older instruction in the window writes (that
  instruction is still pending or is in the same bundle), or
* it writes a register that an older instruction left behind still reads.

At most min(4, number of groups) instructions issue together. The k-th one, in
program order, goes to the k-th group and gets write slot k. Writes therefore
come one per cycle in program order. A bundle of l instructions takes

    1 read cycle + ⌈N/12⌉ execute cycles + l write cycles,

and the next bundle issues during the last write, so bundles follow each other
every ⌈N/12⌉ + l + 1 cycles. Bundles never overlap, so each bundle's reads see
every result of the bundle before it.

**Write-after-write is not checked.** A program must not write the same
register twice within a window without reading it in between, or a later
write could land before an earlier one. The routines used in the tests
respect this. A chain such as `s = s·s; s = s·s` is safe, because each
instruction reads the previous result.

## Host interface and instruction encoding

The host writes an instruction word and a data word together (`host_valid`)
while `host_full` is low. LOAD results come back on `host_dout` with
`host_dout_valid`. `busy` stays high until everything sent has finished.
`activity` reports what the issue logic does each cycle, for performance
monitoring.

| op [31:28] | name | fields | data word |
|---|---|---|---|
| 1 | MALU | [24:20] &R, [19:15] &A, [14:10] &B, [9:5] &C, [4:0] &D | – |
| 2 | CALL | [16:8] length 1..256, [7:0] start address | – |
| 3 | CFG | [26:24] core | [0] cfg1, [25:16] field size N |
| 4 | STORE | [26:24] slice, [10:8] word (32-bit part), [4:0] register | the word |
| 5 | LOAD | [26:24] slice, [10:8] word, [4:0] register | – |
| 6 | UWRITE | [7:0] micro-code address | micro-code word (a MALU word) |

CFG, STORE, LOAD and UWRITE wait until the queue is empty and the cores are
idle, so their effects keep program order. A 98-bit slice is four 32-bit
words. STORE writes slice `slice` in every file that holds that slice; LOAD
reads it from core `slice`. All cores of a group must be given the same N.
Constant registers holding 0 and 1 are useful. AB + C is written as
MALU(R, A, B, C, zero), an addition B + C as MALU(R, one, B, C, zero), and a
squaring as MALU(R, A, A, zero, zero).

A typical session: CFG every core, STORE P into register 0 and the curve data
into other registers, UWRITE the point-operation routines once, then one CALL
per key bit, then LOADs.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=… failures=…`.

* `tb_cryptoproc` is the end-to-end test at the default size. For five
  configurations (six single cores at N = 97 and 83, three pairs at 163,
  two triples at 283, one six-core chain at 571), it runs random MALU
  programs, partly direct and partly from micro-code. It loads all 32
  registers back and compares them with a sequential software model. It also
  checks the bundle period ⌈N/12⌉ + l + 1 and requires every mechanism to
  occur: 1- to 4-way bundles, out-of-order issue, dependency stalls, a full
  queue, a full host buffer, micro-code streaming and each chain length.
* `tb_ecc` runs complete scalar multiplications at the default size, over
  GF(2^163), GF(2^193), GF(2^283) and GF(2^571), with standard reduction
  polynomials. The cores are set up as three pairs, three pairs, two triples
  and one six-core chain. Each field runs two programs. ECC_M is a
  Montgomery ladder in López–Dahab x-only coordinates, with two
  12-instruction ladder-step routines. ECC is NAF double-and-add in
  López–Dahab projective coordinates, with a 10-instruction doubling and two
  13-instruction additions (for +P and −P). Both finish with an Itoh–Tsujii
  inversion and the conversion to affine coordinates. Each result is
  compared with affine double-and-add on a random curve, using independent
  textbook formulas. The measured cycle counts are in the next section.
* `tb_malu` and `tb_malu_core` check the data path alone and chained, for
  random field sizes, against a bit-serial model. They also check the
  ⌈N/12⌉ latency and the write-slot timing.
* `tb_ibc` checks every bundle against the dependency rules, the window, the
  group size and the slot order. `tb_iqb`, `tb_rf4r1w`, `tb_ucode_ram`,
  `tb_dbc` and `tb_main_ctrl` compare their blocks with simple models.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_cryptoproc rtl/cp_pkg.sv tb/tb_cryptoproc.sv
./obj_dir/Vtb_cryptoproc
```

Replace `cryptoproc` by `ecc` for the workloads, or by a block name. All of
these finish in seconds. `-Wno-fatal` is needed because Verilator reports
the m/q chain between slices as circular logic; it is not a real loop (see
the data-path section and the header of `cryptoproc.sv`).

## Measured performance

Clock cycles for one scalar multiplication with a random full-length key,
from `tb_ecc` at the default size. Each figure includes the final inversion;
the cycles for the inversion alone are in brackets. The reference figures
are the published ones for the same six-core 97 × 12 build.

| field | cores | ECC_M here | ECC_M published | ECC (NAF) here | ECC published |
|---|---|---|---|---|---|
| 163 | 3 × 2 | 16,999 (2,884) | 15,730 | 18,435 (2,901) | 22,030 |
| 193 | 3 × 2 | 23,583 (3,975) | 21,779 | 25,476 (3,995) | 30,656 |
| 283 | 2 × 3 | 53,597 (7,882) | 47,815 | 62,316 (7,909) | 58,980 |
| 571 | 1 × 6 | 371,710 (29,704) | 393,394 | 445,310 (29,804) | 450,319 |

The published inversion times (9.4, 13.2, 26.1 and 99.8 µs at 292 MHz)
correspond to about 2,745, 3,854, 7,621 and 29,142 cycles. The inversion
is a fixed sequence of MALU instructions, so it compares the hardware alone,
and it agrees to within about 5 %. The point routines here are different
software from the published ones, so the totals can only be compared
roughly. At 292 MHz, ECC_M163 takes about 58 µs on this build.

## Where this RTL departs from, or adds to, the original architecture

* **Slice width.** Slices and register words are n + 1 = 98 bits. The
  original describes 97-bit register files, yet it chains six cores to
  587 = 6·98 − 1 bits, which only fits in 98-bit words.
* **Own choices where the original is silent.** These include the left
  alignment of operands, the A-register chain and the digit broadcast, P
  fixed in register 0, the host encodings and the data word sent with every
  instruction, the slice addressing of STORE/LOAD, the micro-code loading
  (UWRITE), the 4-entry host FIFO, a queue depth equal to the window, the
  rule that the k-th instruction goes to the k-th group, and non-overlapped
  bundles.
* **Not built.** Two alternatives are not built: the paired 16-entry
  register files that join into one 32-entry file (the lower-cost
  configuration), and the A·B + C-only variant of the instruction.
* **Routines.** The point and divisor routines are software. Only their
  lengths are published: ECC 15 + 10, ECC Montgomery 6 + 7 and HECC
  61 + 39 MALU instructions for addition and doubling. The ECC routines in
  `tb_ecc` are this design's own sequences: 6 + 6 for the ladder step and
  13 + 10 for the projective addition and doubling. No HECC divisor
  routines are provided.
* **Fixed-field builds.** These builds (for example four cores of 163 bits
  with a ROM) are parameter changes (`NCORE`, `W`) plus a fixed P, and are
  not set up here.
* **Inversion.** The host sends the Itoh–Tsujii inversion as direct MALU
  instructions. For N ≥ 283 it is longer than the 256-word micro-code RAM,
  so it could not be kept there anyway.
* **Timing.** Chained groups have a combinational path through every slice
  of the group in each cycle. No timing closure has been done.

## Parameters

`cryptoproc` takes `NCORE` (6), `W` (98, slice width), `D_W` (12, digit),
`DEPTH` (32 registers), `WIN` (6, issue window) and `LM` (4, maximum bundle).
The micro-code RAM size and the field-size width come from `cp_pkg`.
Instruction encodings assume 32 registers and at most eight cores.
