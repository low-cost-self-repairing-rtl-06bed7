# Self-repairing binary signed-digit adders

A binary signed-digit (BSD) adder adds two N-digit numbers in constant time,
because no carry travels further than one or two digit positions. This
repository holds three fault-tolerant versions of such an adder. Each one
detects an error in its own result, repairs it, and says where the fault is.

They all rest on one property. A BSD adder built from self-dual logic
computes the bitwise complement of its result when every input bit is
complemented. Suppose one line is stuck at 0 or 1, or holds a wrong value
for several cycles (a multi-cycle transient). That line now carries a wrong
value for one of the two input polarities and the right value for the other.
So when an error indicator fires, the adder runs the same addition again with
complemented operands and complements the second result. The answer is then
correct, and no spare hardware was needed.

Comparing the two results also locates the fault. Where the adder is healthy,
each bit of the second result is the complement of the first. The bits that
come out *equal* in both passes are the ones the fault touched.

The three variants differ in how errors are detected and located:

| variant | error detection | fault localization |
|---|---|---|
| SBSA-PaP (`sbsa_pap`) | two word-parity identities around a parity-prediction adder | number of equal bits gives the fault class |
| SBSA-PCP (`sbsa_pcp`) | one error line per full adder, plus one word-parity check of the operand lines | error lines name the full adder; the lowest equal bit names the faulty operand digit |
| SBSA-IBP (`sbsa_ibp`) | one error line per full adder, plus one parity check per operand digit | every error line is a location; several faults are located at once |

`sbsa_top` places the three side by side on shared clock, reset and operand
inputs. Each variant keeps its own handshake, parity inputs, fault masks and
results.

## Number format

A digit is two wires `(p, n)` with value `p - n`: +1 = `10`, -1 = `01`, and
0 = `00` or `11`. The type is `bsd_pkg::bsd_digit_t`, and a word is a packed
array `bsd_digit_t [N-1:0]` with digit 0 least significant. An N-digit sum
has N+1 digits.

Inverting both wires of a digit negates it, so the bitwise complement of a
word is its negation. The recomputation step relies on this. Complementing
a digit also keeps its parity `p ^ n`. The operand parities can therefore be
applied unchanged in both passes.

Both zero codes are legal on every input. Sums also contain both codes.
Compare values with `p - n`, not bit patterns.

## The self-checking full-adder adder (PCP and IBP datapath)

`bsd_dr_adder` is a double-recoding BSD adder. It has two rows of full
adders per digit.

- **First row.** `FA1(a.p, ~a.n, b.p)` gives the sum bit `s_i` and the
  carry `h_(i+1)`. Together they satisfy `2*h_(i+1) + s_i = a_i + b_i.p + 1`.
- **Second row.** `FA2(s_i, ~b.n, h_i)` gives `zp_i`. Its carry-out,
  inverted, is `c_(i+1)`.
- **Sum digit.** `z_i = (p = zp_i, n = c_i)`.
- **Top digit.** `z_N = (p = h_N, n = c_N)`.
- **Boundary inputs.** `h_0` and `c_0` are 0 in the normal pass and 1 in
  the complemented pass. This keeps the whole circuit self-dual, including
  digit 0.

Every full adder is an `sc_full_adder`. Its sum and carry use separate gates,
so one internal fault can corrupt only one of them. It has an equivalence
tester `Eqt`, which is 1 when the three inputs are not all equal. The error
flag is `Ef = Sum ^ Cout ^ Eqt`:

- Sum equals Cout exactly when all three inputs are equal.
- So a fault-free adder always gives `Ef = 0`.
- A wrong Sum or a wrong Cout always gives `Ef = 1`.

The flags form the vectors `e1` (first row) and `e2` (second row).

A full adder's own flag cannot see a wrong operand line. Input checking
covers those lines:

- **PCP** (`pcp_input_checker`) checks that
  `P(A) ^ P(B) ^ XOR(s_i) ^ XOR(~b_i.n) = 0`.
  `P(X)` is the XOR of all bits of a word.
  The `~a.n` lines add one constant per digit, and those cancel out.
- **IBP** (`ibp_input_checker`) checks each operand digit against its own
  parity bit: `ie_a[i] = P(a_i) ^ a_i.p ^ a_i.n`.

## The parity-prediction adder (PaP datapath)

`pap_sc_adder` is a two-stage BSD adder. It is checked by two parity
identities.

**ADD1** (`bsd_add1`) runs at digit i. It looks at `a_i + b_i` and at the
sum of the digit pair below, `a_(i-1) + b_(i-1)`. From these it chooses a
carry `c_i` and an interim sum `w_i`, so that `a_i + b_i = 2*c_i + w_i`:

| a_i + b_i | digit pair below | c_i | w_i |
|---|---|---|---|
| +2 | any | +1 | 0 |
| +1 | sum > 0 | +1 | -1 |
| +1 | sum <= 0 | 0 | +1 |
| 0 | any | 0 | 0 |
| -1 | sum < 0 | -1 | +1 |
| -1 | sum >= 0 | 0 | -1 |
| -2 | any | -1 | 0 |

**ADD2** (`bsd_add2`) forms `z_i = w_i + c_(i-1)`. The table guarantees
that this sum never leaves -1..+1. The top digit is `z_N = c_(N-1)`.

There is one subtlety. The values alone do not make the adder self-dual;
the bit encodings must as well. Each ADD stage picks a reference bit: `a.p`
for ADD1 and `w.p` for ADD2.

- If the reference bit is 0, the stage outputs the plain code of the value.
- If the reference bit is 1, it outputs the complement of the plain code of
  the negated value.

Complementing every input flips the reference bit and negates every value.
Each output bit is therefore complemented.

Two error indicators compare parities:

- **EI1:** `P(W) = P(A) ^ P(B)`.
- **EI2:** `P(Z) = P(W) ^ P(C)`.

`pap_parity_predict` predicts `P(C)` from the operands. It takes the parity
of the non-zero carries that the ADD1 table gives.

## Recomputation and decision

`recompute_seq` drives all three variants. It has four states:
IDLE → PASS1 → (PASS2 if an error fired) → DONE.

The datapath works as follows:

1. It registers the operands and parities when they are accepted.
2. In PASS1 it computes the sum with the true operands and stores the
   result and the error lines.
3. Only if an error fired, it runs PASS2. Here it complements the operands
   and drives the boundary inputs with 1, then stores the second result and
   whether an error fired again.

The decision logic (`pap_localizer`, `pcp_localizer`, `ibp_localizer`) then
compares the two results bit by bit. "Equal bits" are the bits where they
agree.

| first pass | second pass | equal bits | status | result |
|---|---|---|---|---|
| no error | — | — | `ST_OK` | first result |
| error | no error | none | `ST_TRANSIENT` | complement of second |
| error | no error | some | `ST_CORRECTED` + location | complement of second |
| error | error | none | `ST_CHECKER_FAIL` (an error line itself is faulty) | complement of second |
| error | error | some | `ST_MULTI_FAULT` (not correctable) | complement of second, not to be trusted |

How each variant locates the fault:

- **PaP** reports the class from the number of equal bits:
  - 1 bit: type 1, 2 or 3;
  - 2 bits: type 2 or 3;
  - 3 or more: type 3.

  It also gives the mask and count of the equal bits.
- **PCP** has two cases:
  - If any adder error line fired in the first pass, it reports those full
    adders.
  - Otherwise it reports the operand digit of the lowest equal bit pair.

  This works because a fault in operand digit i always damages `z_i`, and
  can also damage up to two digits above it.
- **IBP** reports the first-pass error lines directly: full adders
  (`loc_e1`, `loc_e2`) and operand digits (`loc_ia`, `loc_ib`). Several may
  be set at once.

A note on `ST_TRANSIENT` versus `ST_CORRECTED`:

- `ST_TRANSIENT` means that an error fired but no sum bit was damaged.
  Typically the glitch was on an error line.
- A first-pass-only fault that *did* damage the sum leaves equal bits, so it
  is reported as `ST_CORRECTED`.
- In both cases the result is right.

## Interface and timing

Each variant (and each prefixed port group of `sbsa_top`) has:

| port | meaning |
|---|---|
| `in_valid` / `in_ready` | offer an operand pair; accepted on a rising edge when both are high. `in_ready` is high only when idle |
| `a`, `b` | operands, `bsd_digit_t [N-1:0]` |
| `pa`, `pb` | PaP and PCP: word parities P(A), P(B). IBP: per-digit parities `[N-1:0]` |
| `out_valid` | one-cycle strobe; `z`, `status` and the location outputs are valid with it |
| `z` | corrected sum, `bsd_digit_t [N:0]` |

The handshake and its timing:

- Only one addition is in flight at a time.
- The result comes 2 cycles after acceptance when no error fires, and 3
  cycles when the complemented pass runs.
- The next operand pair can be offered in the cycle after `out_valid`.
- Reset is synchronous and active low.

The default size is `N = 128` digits. All widths follow from `N`.

### Fault-injection ports

Every datapath exposes `flt_*_sa0` / `flt_*_sa1` masks. A set bit forces the
matching line to 0 or 1 (`(x & ~sa0) | sa1`), in both passes. **Tie them all
to zero in use.** They exist so that stuck-at faults can be placed on
specific lines:

- operand lines;
- full-adder sum and carry outputs;
- ADD1 outputs;
- sum lines;
- the error and check lines themselves, to model a faulty checker.

The bit order is given in the opening comment of each module. An operand
line mask has four bits per digit: `a.p, a.n, b.p, b.n`.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=… failures=…` and ends on its own. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/bsd_pkg.sv tb/tb_bsd_pkg.sv rtl/*.sv tb/tb_sbsa_top.sv \
  --top-module tb_sbsa_top -o sim
./obj_dir/sim
```

`tb_bsd_pkg` holds the testbench helpers: random BSD words, integer values
and parities.

`tb_sbsa_top` runs all three variants at `N = 128`. It injects these
scenarios:

- no fault;
- operand faults;
- adder faults;
- first-pass-only faults and glitches;
- stuck checker lines;
- multiple faults.

It compares every result with the integer sum and checks the 2/3-cycle
latency. It also counts each mechanism: correction, transient, checker
failure, multiple fault, each kind of localization, and each PaP fault
class. It fails if any of them never happened.

`tb_sbsa_sizes` runs the same RTL at 8, 16, 32 and 64 digits. Each size is
driven by `tb/sbsa_size_run.sv`, which runs fault-free, operand-fault and
adder-fault additions.

## Where this RTL makes its own choices

The arithmetic, the self-checking full adder, the parity identities, the
input checks and the three decision algorithms follow the published design.
The following are choices made here:

- **Clocking and handshake.** The original describes combinational adders
  and algorithms without a clock. The sequencer, the valid/ready handshake,
  the operand registers and the 2/3-cycle timing are this design's.
- **Top digit and boundary inputs.** The choice of `z_N = (h_N, c_N)`, and
  of driving `h_0`/`c_0` (and the PaP boundary digit) with the pass polarity.
- **PaP insides.** Only the values of ADD1/ADD2 are given. The gate-level
  logic, the self-dual bit encodings and the P(C) predictor were built here
  to match them.
- **Checker failure versus multiple faults in IBP.** When errors fire in
  both passes, IBP uses the same equal-bit test as the other two variants.
- **PCP priority.** If both adder and input errors fire, the adder error
  lines are reported.
- **Faults are modelled as stuck lines.** A multi-cycle transient that
  spans both passes behaves like a stuck-at fault.
- **Fault-injection ports.** They are test hooks that the original does
  not have.

The shifted-operand recomputation scheme that these designs are compared
against is not included.
