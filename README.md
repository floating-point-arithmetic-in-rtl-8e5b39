# Floating-point function units for a transport-triggered processor

A transport-triggered architecture (TTA) has no instructions in the usual
sense: the program only moves data between ports. Writing an operand port
loads an operand. Writing the *trigger* port starts an operation. The
result appears in the unit's output register a fixed number of cycles later
and stays there until the next operation on that unit overwrites it. A
processor built this way lives or dies by its function units. Each must be
fully pipelined, have a fixed latency, and never make the program wait.

This repository holds a set of such floating-point units in synthesizable
SystemVerilog:

* single precision: adder/subtractor, multiplier, divider, square root,
  comparator, float/integer converter, and a fused multiply-adder (FMA)
  whose latency is set by parameters;
* half precision: adder/subtractor, multiplier, FMA, comparator, inverse
  square root, and a single/half converter;
* a small accelerator with five one-cycle helper operations. With them the
  FMA can do division and square root in software, accurately enough that
  the large dedicated divider and square-root units can be left out.

The units do not follow full IEEE-754. They implement the arithmetic of the
OpenCL *embedded profile*, which is much cheaper:

* results are rounded toward zero (truncated);
* subnormal inputs are read as zero and subnormal results are flushed to
  zero;
* INF and NaN are still produced and propagated as IEEE-754 prescribes. A NaN
  result is always the quiet NaN `0x7fc00000` (`0x7e00` in half precision);
* overflow gives INF.

## The function-unit contract

Every unit has the same port set: `clk`, active-low asynchronous reset
`rstx`, global lock `glock`, trigger `t1data/t1load` (with `t1opcode` when the
unit has several operations), operands `o1data/o1load` (and `o2data/o2load`
for the FMA), and the result `r1data`.

* **Operand port registers** (`fu_operand_reg`). An operand port keeps the
  last value written to it. If the operand and the trigger are written in the
  same cycle, the new value is used: it is forwarded past the register. So a
  program can load a constant operand once and trigger many times.
* **Shadow registers.** At the trigger edge the unit copies the trigger value,
  the operation code and the operands into its first pipeline register. The
  port registers can then be rewritten at once while the operation runs.
* **Latency.** Latency L means that the trigger edge is edge 1 and the result
  can be read just after edge L. One operation can start every cycle.
* **Output hold.** Every pipeline register (`fu_pipe_stage`) carries a valid
  bit, and data moves only alongside it. A result register therefore changes
  only when an operation reaches it. Idle cycles leave it alone.
* **glock** freezes every register of the unit, port registers included. A
  trigger written while `glock` is high is not taken. The processor stalls
  the whole datapath this way, for example on a cache miss.

Operation codes are numbered in the alphabetical order of the operation
names, as the processor toolchain expects. One result of that rule looks odd.
The single-precision comparator's operations sort as `... NEF NEGF`, but the
half-precision ones sort as `... NEGH NEH`. So codes 6 and 7 mean opposite
things in the two comparators, and `fpu_hp_compare` swaps them back before the
shared compare logic.

| unit | module | operations (code order) | latency |
|---|---|---|---|
| add/sub | `fpu_sp_add_sub` | ADDF, SUBF (t1 ± o1) | 5 (parameter) |
| multiply | `fpu_sp_mul` | MULF | 5 (parameter) |
| divide | `fpu_sp_div` | DIVF (t1 / o1) | 15 |
| square root | `fpu_sp_sqrt` | SQRTF | 26 |
| compare | `fpu_sp_compare` | ABSF EQF GEF GTF LEF LTF NEF NEGF | 1 |
| convert | `fpu_sp_convert` | CFI CFIU CIF CIFU | 4 |
| FMA | `fpu_sp_mac_v2` | ADDF MACF MSUF MULF SUBF | 6 (2..6) |
| accelerator | `fpu_sp_accel` | INITDIV INITSQRT MULP2 RECIPA RSQRTA | 1 |
| half add/sub | `fpadd_fpsub` | ADDH SUBH | 2 |
| half multiply | `fpmul` | MULH | 2 |
| half FMA | `fpmac_v2` | as the FMA | 6 (2..6) |
| half compare | `fpu_hp_compare` | ABSH EQH GEH GTH LEH LTH NEGH NEH | 1 |
| half 1/sqrt | `invsqrth` | one operation | 5 |
| single/half | `fpu_chf_cfh` | CFH CHF | 1 |

Comparisons return 1 or 0 in bit 0. Any comparison with a NaN is false,
except NE. ABS and NEG only change the sign bit. Float-to-integer conversion
truncates and saturates, NaN converts to 0, and negative values converted to
unsigned give 0.

## Inside the units

The adder, multiplier and FMA share their arithmetic cores (`fp_add_core`,
`fp_mul_core`). The parameters `mw` (significand bits) and `ew` (exponent
bits) set the format. The half-precision units are the single-precision
modules instantiated with `mw = 10, ew = 5` and 16-bit ports.

**Adder.** The operand of larger magnitude is found with a full magnitude
compare and always becomes the minuend. The significand difference can then
never go negative, so no two's-complement negation is needed. The smaller
operand is aligned with three guard bits and a sticky bit. After the add or
subtract, a leading-zero count normalizes the result, and it is truncated.
The core is combinational. It sits between the shadow register and a
delay line of `latency - 1` registers, so the latency parameter only sets the
pipeline depth.

**Divider** (latency ⌈mw/2⌉ + 3 = 15). It finds two quotient bits per stage
(base 4). Stage 2 computes the divisor multiples D, 2D and 3D once, and they
travel down the pipeline beside the partial remainder. Each of the 12
iteration stages shifts the remainder left by two bits, subtracts D, 2D and 3D
in parallel, and keeps the largest difference that is not negative. That
choice gives the next quotient digit (0 to 3). Twelve stages give the 24
quotient bits plus a guard bit. A final stage packs the result.

**Square root** (latency mw + 3 = 26). It finds one root bit per stage. Each
stage brings two more radicand bits into the partial remainder, compares it
with 4q + 1 (q is the root so far), and either subtracts and appends a 1 or
appends a 0. That is one subtractor and one multiplexer per stage. An odd
exponent is handled first, by doubling the significand before the exponent is
halved.

**Fused multiply-adder** (`fpu_sp_mac_v2`). All five operations map onto A +
B·C with a single truncation:

* ADD: B·1;
* MUL: −0 + B·C. Adding −0 keeps the sign of a zero product;
* SUB and MSU: the sign of B is flipped.

The 48-bit product is exact, and the addition reuses the adder's method. There
are six register levels:

1. the shadow register;
2. after the significand multiply;
3. after alignment;
4. after the add;
5. after normalization;
6. the output register.

Parameters `bypass_2` … `bypass_5` turn levels 2 to 5 into wires, one cycle
each. This gives latencies 2 to 6 from one source. The values reported for FPGA
targets are 3 to 6 for single precision and 3 or 4 for half precision. One
FMA is smaller than an adder plus a multiplier. It needs about one more
pipeline stage to reach the same clock rate.

**Half-precision inverse square root** (`invsqrth`, latency 5). The start
value is the classic bit trick `y0 = 0x59BA − (x >> 1)` on the 16-bit
pattern. One Newton step in fixed point, `y1 = y0 (1.5 − 0.5 x y0²)`, brings
the error to about 0.2 %.

**Single/half converter.** It rebiases the exponent and truncates or pads the
significand. Values too large for half precision become INF, and values too
small become zero. A NaN stays a NaN even when its payload bits are cut off.

## Division and square root in software

Dedicated divider and square-root units are large. In the FPGA results they
take about as much logic as five FMA units. The alternative is to run
Newton–Raphson and Goldschmidt iterations on the FMA. Truncating arithmetic
with flushed subnormals makes this fragile at the edges of the exponent
range, where the quotient of two large numbers may underflow to zero. The
accelerator `fpu_sp_accel` fixes that with five one-cycle operations. The
iterations then run on significands near 1, and the exponent is put back at
the end:

| op | inputs | results |
|---|---|---|
| INITDIV | a (t1), b (o1) | r1 = a′ and r2 = b′, the significands with exponent 0. r3 = c = ±2^(ea−eb). Then a/b = c·a′/b′. For special cases, a′ = b′ = 1 and c is the final answer. |
| INITSQRT | b | r1 = b′ ∈ [1,4), b scaled by a power of four. r3 = c = 2^n. Then √b = c·√b′. |
| MULP2 | x, p | x·p, where p is a power of two, 0, INF or NaN. Only the exponents are added. |
| RECIPA | b | an approximation of 1/b′ from a 256-entry, 8-bit table |
| RSQRTA | b | an approximation of 1/√b′ from two 64-entry, 7-bit tables, one per exponent parity |

The square-root tables depend on the parity of the exponent, because scaling
by 2 (unlike scaling by 4) changes the significand of the root. The tables are
not stored data. They are computed during elaboration by constant functions.
Each entry is the function's value at the centre of its input interval:

* RECIPA entry i: `2^(2k+2) / (2^(k+1) + 2i + 1) − 2^k`, with k = 8;
* RSQRTA entry: `isqrt(2^(2k+j+3) / M) − 2^k`, with k = 7 and j = 6;
* here `M = 2^(j+1) + 2i + 1`, doubled for an odd exponent.

Both results are returned as a float with exponent −1. The parameters
`recip_lut_bits` and `rsqrt_lut_bits` change the table sizes.

These are the three division procedures and the square root. MSU computes
t1 − o1·o2 and MAC computes t1 + o1·o2:

```
DivideFast:   a',b',c = INITDIV(a,b); y = RECIPA(b)
              q0 = a'y ; e = 1 - b'y          (independent)
              q1 = q0 e + q0 ; e1 = e e       (independent)
              q2 = q1 e1 + q1 ; return MULP2(q2, c)
DivideMedium: q0, e as above ; q1 = q0 e + q0
              r = a' - b' q1 ; Q = r y + q1 ; return MULP2(Q, c)
DivideSlow:   e = 1 - b'y0 ; y1 = y0 e + y0 ; e1 = e e
              y2 = y1 e1 + y1 ; q = a' y2 ; r = a' - b' q
              Q = r y2 + q ; return MULP2(Q, c)
Square root:  b',c = INITSQRT(b); y = RSQRTA(b)
              g = b'y ; h = y/2 ; r = 1/2 - h g
              g1 = g r + g ; h1 = h r + h ; d = b' - g1 g1
              g2 = h1 d + g1 ; return MULP2(g2, c)
```

The end-to-end testbench runs all four through the top level. It compares
each result with the exactly computed, truncated value:

| procedure | FMA ops | max error | max error (bound) | cycles with 2 FMA | cycles here (1 FMA) |
|---|---|---|---|---|---|
| DivideFast | 5 | 2 ulp | 4 | 21 | 23 |
| DivideMedium | 5 | 2 ulp | 2 | 27 | 28 |
| DivideSlow | 7 | 1 ulp | 2 | 39 | 40 |
| square root | 7 | 1 ulp | 2 | 33 | 35 |

The "max error" column was observed on a few hundred random operands each.
The "bound" column is the limit the testbench enforces. The OpenCL
embedded-profile limits are 2.5 ulp for division and 3 ulp for square root.
The hardware divider gives one result per cycle at latency 15.

The cycle counts assume FMA latency 6 and a one-cycle accelerator. The
top level has one single-precision FMA, so two independent operations issue
one cycle apart. That adds one cycle per such pair: 2, 1, 1 and 2 cycles for
the four procedures. With two FMA units, DivideMedium reaches about 0.4
divisions per cycle.

## Top level

`fpu_suite` holds one instance of every unit side by side. It is the
function-unit side of a processor. The interconnect, register files and
instruction control come from a processor generator and are not part of this
RTL.

* `req[i]` (type `fu_req_t` from `fpu_pkg`) carries unit i's port writes:
  `t1load`, `t1opcode`, `t1data`, `o1load`, `o1data`, `o2load`, `o2data`.
* `r1[i]` is unit i's result register. The `FU_*` constants in `fpu_pkg` give
  the unit numbers.
* `acc_r2` and `acc_r3` are the accelerator's second and third results.
* The half-precision units use the low 16 bits of the buses, and their
  results are zero-extended.

All units share `clk`, `rstx` and `glock`.

## Where this design makes its own choices

* **Divider iteration count.** The divider uses 12 base-4 iterations. A
  description of 11 iterations would give only 22 quotient bits, one short of
  a full significand. Twelve iterations match the latency of 15 given for the
  unit.
* **Pipeline stages.** Within each unit, the placement of logic in pipeline
  stages is this design's own. Only the latencies are fixed.
* **Port behaviour.** The global lock input, the asynchronous reset, and
  forwarding of an operand written in the trigger cycle are conventions of
  this implementation.
* **Accelerator mapping.** The exact operand and result mapping of the
  accelerator is this design's own: three result ports, and out-of-range
  scale factors clamped to 0 or INF.
* **Special cases.** The details are chosen to follow IEEE-754:
  `sqrt(−0) = −0`, NaN converts to integer 0, INF saturates, and
  comparisons with NaN are false.
* **Not included.** A wrapped third-party FPU that was compared against is
  not included.

## Verification

Each unit has a self-checking testbench in `tb/`, named `tb_<module>`. The
operand-register testbench is `tb_fu_interface`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs.

* **Reference values.** The testbenches compute them independently in double
  precision (`tb/fp_ref_pkg.sv`). Operands are chosen so that the double
  result is exact, and it is then truncated to the unit's format.
* **What they drive.** Operations are issued back to back, one per cycle, and
  each result is checked exactly at its latency, which also checks the
  latency.
* **What they cover.** The tests include special values, overflow,
  underflow, stalls and output hold. `tb_fpu_sp_mac_v2` also runs a copy with
  copies with one, two and three bypassed stages (latencies 5, 4
  and 3), and `tb_fpmac_v2` does the same at latencies 4 and 3.
* **End-to-end test.** `tb_fpu_suite` drives the top level at its default
  parameters. It counts, and requires, every mechanism:
  * the latency of all 14 units;
  * parallel pipelined streams on five units;
  * the four software algorithms above, with their cycle counts;
  * stalls, operand registers, same-cycle forwarding and output hold;
  * overflow, NaN/INF and subnormal flushing;
  * the half comparator's swapped codes.

To run one testbench with Verilator (from the repository root):

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    tb/fp_ref_pkg.sv rtl/fpu_pkg.sv tb/tb_fpu_suite.sv --top-module tb_fpu_suite -Mdir obj -o sim && obj/sim
```

Use the same command for any other `tb_*` module. Modules are found in `rtl/`
by file name. `-Wno-fatal` keeps Verilator's width and unused-signal lint
warnings from stopping the build; none of them is a functional problem.
