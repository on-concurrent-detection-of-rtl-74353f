# Multiple-parity concurrent error detection for GF(2^m) polynomial basis multipliers

A finite-field multiplier is often the largest block in an elliptic-curve or
other GF(2^m) crypto accelerator. That makes it the most likely place for a
fault, and a fault that yields a wrong but valid-looking field element can go
unnoticed. This RTL implements bit-serial and bit-parallel polynomial basis
(PB) multipliers for GF(2^m) that check themselves while they work. Every
word in the datapath carries a k-bit parity vector next to its m data bits.
Each arithmetic module predicts the parity of its own output from the parity
of its inputs. A checker regenerates the parity of the real output and raises
`error` when the two disagree.

A single parity bit catches only errors of odd weight. Here the word is cut
into k parts with one parity bit each. An error escapes only if it has even
weight in every part. For k = 8 and m = 163 that leaves about 1 in 256 random
multi-bit errors undetected. Every odd-weight error is caught. The hardware
cost grows roughly linearly in k, and the bit-serial multiplier needs no
extra clock cycle.

The defaults are m = 163, k = 8 and the NIST reduction polynomial
F(x) = x^163 + x^7 + x^6 + x^3 + 1. All three are parameters.

## Arithmetic

Let α be a root of the irreducible polynomial F(x) of degree m. An element A
is the vector (a_0 … a_{m-1}) of its coefficients on 1, α, …, α^{m-1}. In
every port, bit i holds a_i. A product is built from three operations:

| module | computes | gates (data path) |
|---|---|---|
| `alpha_mul` | αA mod F: shift up one place, then add a_{m-1}·F | one XOR per nonzero f_i, i ≥ 1 |
| `sm_p` (SM) | b_i·A, a GF(2) scalar times a field element | m AND |
| `va_p` (VA) | A + B | m XOR |

C = AB mod F = Σ b_i·A^(i), where A^(0) = A and A^(i) = α·A^(i-1). The
bit-serial multiplier evaluates one term per clock. The bit-parallel
multiplier unrolls all m terms into rows of logic.

## Parity parts and encoded words

The m bits are split into k consecutive parts. When k does not divide m, the
first (m mod k) parts are one bit longer. For m = 163 and k = 8, parts 0–2
hold 21 bits and parts 3–7 hold 20 bits. `pb_ced_pkg` gives the bounds:
`part_start`, `part_end` and `part_len`. Parity bit j is the XOR of part j.
A datapath word is therefore m + k bits wide: {parity[k-1:0], data[m-1:0]}.

## Parity prediction: the part that needs care

**SM and VA.** Parity is linear over GF(2), so the predictions are immediate:
P(b·A) = b·P(A) (k AND gates) and P(A+B) = P(A) + P(B) (k XOR gates).

**α-Mul** (`alpha_mul_ppc`). Multiplying by α moves every bit up one place,
and some bits cross a part boundary. Let part j span bits s_j … e_j. Bit
a_{e_j} leaves the part, and a_{s_j−1} enters it from the part below
(nothing enters part 0). The reduction then adds a_{m-1} at every position
where F has a one. Part j therefore gains a_{m-1} times the parity of part j
of F. So:

    P(A'_j) = P(A_j) + a_{e_j} + a_{s_j−1} + a_{m-1}·P(F_j)

P(F_j) is a constant worked out from F during elaboration, so its AND gate
disappears. For the default polynomial every P(F_j) is 0 (for every k from 2
to 20), and the reduction term vanishes. That costs at most three XOR gates
per part.

Two details matter for coverage:

* The prediction takes the *incoming* parity vector P(A_j). It never
  recomputes the parity from the data. An error already present in a word is
  carried forward, not quietly repaired.
* An error can change its pattern as it passes through α-Mul. For example, a
  two-bit error can cross a part boundary. A pattern that was detectable can
  then become undetectable. For that reason the checkers are placed so that
  an error reaches a checker before it passes through another α-Mul module.
  See below.

### Interleaved parts (`PART = PART_VERTICAL`)

Instead of consecutive runs, part j can be the interleaved bits j, j+k,
j+2k, …. Multiplying by α then moves *all* of part j−1 into part j, and the
prediction gets cheaper:

    P(A'_j) = P(A_{(j−1) mod k}) + a_{m-1}·P(F_j)   (+ a_{m-1} for j = m mod k)

The last term removes a_{m-1}, which leaves the field instead of moving to
position m. That is at most one XOR per part, against up to three for
consecutive parts. The detection probability is the same. The data path is
identical, and only the parity generators and the α-Mul predictor change.
The default stays `PART_HORIZONTAL`, the partitioning for which the scheme's
overhead and fault-injection results are given. For the default polynomial,
interleaving gives odd parity in parts 0, 3, 6 and 7 of F, so four of the
eight predictor bits carry the reduction term.

`parity_gen` forms the actual k-bit parity with one XOR tree per part.
`parity_checker` compares that parity with the predicted one bit by bit and
ORs the differences into `err`. It also outputs the generated parity
(`p_gen`) so that the generator can be reused.

## Bit-serial multiplier (`ced_serial_mult`)

```
            +-------------+   D (A^(i), P)    +--------+       +--------+   C (partial, P)
 a,P(a) --> | register D  |------------------>|  SM-P  |------>|  VA-P  |---> register C --+--> c
            +-------------+        |          +--------+  L2   +--------+  L3              |
                 ^                 v              ^ b_i                                    v
                 |           alpha-Mul-P --L1--+  |                                 parity checker --> error
                 +-----------------------------+  register B (shift right)                 ^
                                                                   a (load cycle) ----mux--+
```

* `serial_mult_ppc` holds the registers. D holds the encoded A^(i). C holds
  the partial product and its predicted parity. B is a shift register that
  supplies b_i, least significant bit first.
* One round per clock. C ← C + b_i·D and D ← α·D. Both are done on encoded
  words.
* There is a single checker, on register C. That is the end of the round,
  after the VA-P module. Its parity generator is shared. In the load cycle it
  encodes operand `a`, and P(a) is written into register D. In every later
  cycle it checks register C. Operand encoding therefore costs no extra cycle
  and no second generator.
* Why one checker at the end of the round is enough: within a round, an error
  at the α-Mul, SM or VA output reaches C through SM-P and VA-P. Those modules
  either pass the error unchanged or (SM with b_i = 0) clear it. No α-Mul sits
  in between. The argument assumes at most one multi-bit error per round.

Timing:

```
clk      _|‾|_|‾|_|‾|_ ... _|‾|_|‾|_
load     ‾‾‾‾|______________________      a, b sampled at this edge (load cycle)
round        0   1   2  ...  m-1  m
done     ______________________|‾‾‾‾      m cycles after the load cycle, holds until next load
error    flag over every round, valid together with done
```

`load` is honoured in any state and restarts the multiplier. `error` is a
sticky flag that `load` clears, ORed with the current comparison (`err_now`).
With `done` high, `error` therefore covers every round including the last.
`round` counts the completed rounds.

## Bit-parallel multiplier (`ced_parallel_mult`)

`parallel_mult_ppc` unrolls the rounds into m rows. Row 0 holds the encoded
operand and one SM-P. Each row i ≥ 1 adds an α-Mul-P (A^(i) from A^(i−1)),
an SM-P (b_i·A^(i)) and a VA-P (partial sum S_i = S_{i−1} + b_i·A^(i)). That
makes m−1 α-Mul-P, m SM-P and m−1 VA-P modules. A `parity_gen` encodes
operand A. One `parity_checker` sits on every row's partial sum. The row
i < m−1 checker sits on the accumulating input of the next VA-P, and the row
m−1 checker on the product, so there are m checkers in all. `row_err` shows
which checkers fired, and `error` is their OR. The block is purely
combinational. The product and the error flag settle after the propagation
delay, and there is no clock.

The rows form a long XOR chain: m rows of (m+k)-bit logic plus m checkers,
so at m = 163 the parallel multiplier is much larger than the serial one,
which reuses one row and one checker for all m rounds.

## What is and is not detected

Let e be the error on a checked word: m data bits plus k parity bits. Group
it into k parts, each holding the part's data bits plus its parity bit.

* If any part has odd weight, the error is detected. This includes every
  odd-weight error and every single-bit error.
* If every part has even weight, the error passes. If each bit is in error
  independently with probability p, the detection probability is

      Pr_D = 1 − [ (((1 − 2p)^(m/k + 1) + 1) / 2)^k − (1 − p)^(m+k) ]

  For p = 1/2 this is 1 − 2^−k, about 0.996 for k = 8.
* An error that only reaches register D or A^(i) is masked when b_i = 0. It
  can then pass through α-Mul. The detection guarantee covers at most one
  multi-bit error per round (serial) or per row (parallel).

The parity predictors, generators and checkers are assumed fault free. In a
real deployment they would have to be built self-checking, which this RTL
does not do. Errors in the *carried* parity bits (registers, wires) are
modelled and detected like data errors.

## Fault injection hooks

`fault_inj` is a per-bit multiplexer. It passes either the fault-free value
or a stuck-at value (`en` = 1 selects `val`). Each multiplier has one on the
{parity, data} output of its α-Mul-P, SM-P and VA-P modules:

* serial: `fi_loc` selects the location, and the fault is active in every
  running round while `fi_loc` ≠ `LOC_NONE`. The testbenches hold it for one
  round.
* parallel: `fi_row` and `fi_loc` select one location of one row.

`fi_en` and `fi_val` (m+k bits each) give the stuck-at mask and values. Tie
`fi_loc` to `LOC_NONE` in normal use, and synthesis then drops the
multiplexers. The original evaluation injected stuck-at faults on the pins of
individual gates. Here faults sit on module outputs, which is equivalent for
the error model of "an error vector added to a module's output".

## Files

| file | contents |
|---|---|
| `rtl/pb_ced_pkg.sv` | part bounds, parity of F's parts, `fi_loc_e` |
| `rtl/alpha_mul.sv`, `rtl/alpha_mul_ppc.sv`, `rtl/alpha_mul_p.sv` | α-Mul, its parity predictor, both together |
| `rtl/sm_p.sv`, `rtl/va_p.sv` | scalar multiply and vector add with parity |
| `rtl/parity_gen.sv`, `rtl/parity_checker.sv` | k-bit parity generator; checker |
| `rtl/fault_inj.sv` | stuck-at injection multiplexer |
| `rtl/serial_mult_ppc.sv`, `rtl/ced_serial_mult.sv` | bit-serial datapath; complete with checker |
| `rtl/parallel_mult_ppc.sv`, `rtl/ced_parallel_mult.sv` | bit-parallel datapath; complete with checkers |
| `rtl/pb_ced_top.sv` | both multipliers side by side (`ser_*`, `par_*` ports) |
| `tb/tb_ref_pkg.sv` | reference GF(2^m) arithmetic and parity for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fault_campaign.sv` | stuck-at fault campaign on both multipliers |
| `tb/tb_ced_serial_vertical.sv` | bit-serial multiplier with interleaved parts, faults included |

Parameters on every module: `M` (field degree), `K` (parts, 1 ≤ K ≤ M),
`F` (F(x) − x^m as an M-bit constant), and on every module that forms or
predicts parity, `PART` (`PART_HORIZONTAL` or `PART_VERTICAL`). For another field, set all three
consistently, e.g. `M=283, F=283'h10A1` for x^283+x^12+x^7+x^5+1 or
`M=233, F=(233'd1<<74)|1` for x^233+x^74+1. `M` up to 1024 is accepted.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pb_ced_top \
    -y rtl -y tb +libext+.sv rtl/pb_ced_pkg.sv tb/tb_ref_pkg.sv tb/tb_pb_ced_top.sv
./obj_dir/Vtb_pb_ced_top
```

Replace `tb_pb_ced_top` with any other testbench name. The testbenches that
build the m = 163 parallel multiplier take about a minute to compile.

What the testbenches establish:

* Every arithmetic module is compared with an independent reference model.
  The reference multiplies in Horner order, most significant bit first, the
  opposite of the hardware. It covers the default field and also GF(2^233)
  with F = x^233+x^74+1, where two parts of F have odd parity and the
  reduction term of the α-Mul prediction is exercised. The predictor is also
  checked for k = 1, 7 and 20, and for interleaved parts with k = 7 and 8.
  `tb_ced_serial_vertical` repeats the bit-serial fault tests with interleaved
  parts.
* In both multipliers the carried parity equals the true parity of every
  partial result, and the serial latency is exactly m cycles after the load
  cycle.
* Faults at the SM-P or VA-P output of any round or row are handled exactly
  as predicted. The flag rises exactly when some part of the injected error
  has odd weight. The product equals the true product plus the data error.
  Checkers before the faulty row stay quiet.
* `tb_pb_ced_top` runs both multipliers at the default parameters. It counts
  each mechanism and fails if any never happens: operand encoding, b_i = 0
  and b_i = 1 rounds, reduction, restart, detection, and an even-in-every-part
  error escaping.
* `tb_fault_campaign` injects, into one round or row, every single-bit
  stuck-at fault at the 3·(m+k) = 513 sites, plus random multi-bit faults.
  Every single-bit fault that corrupts the product is detected. Of the
  multi-bit faults that corrupt the product, 99.6–99.7 % were detected in
  longer runs, close to the 1 − 2^−8 the code predicts. The testbench requires
  at least 98 %.

## Departures and choices

* **Unequal parts.** The α-Mul prediction above is the general form, using
  each part's own bounds. The closed form usually quoted assumes k divides m,
  which the default m = 163, k = 8 does not satisfy.
* **Check placement in the parallel multiplier.** The rule is one checker
  before the accumulating input of every VA-P and one after the last. This is
  read as a checker on each row's partial sum. It matches "a checker at the
  end of every row", the counterpart of the serial end-of-round checker.
* **Handshake, reset and error reporting** are this design's choice. The
  interface uses `load`/`done`, an asynchronous active-low reset, and a
  sticky error flag cleared by `load`.
* **Fault injection** sits on module outputs, not on gate pins, and stays in
  the RTL as a test hook.
* **Interleaved parts with k not dividing m.** The predictor's extra
  a_{m-1} term goes to part m mod k, which is part 0 when k divides m.
* **Not built:** self-checking versions of the predictors, generators and
  checkers.
* The area and clock-period overheads reported for the scheme come from an
  FPGA implementation and are not reproduced here.
