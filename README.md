# T-structure: duplication with correction under a weighted-transitions sum code

A combinational circuit that must keep producing correct outputs when one of
its parts computes wrongly is usually triplicated and voted (2-out-of-3
majority). The T-structure gets the same single-fault masking from **two**
copies of the device plus a cheap checker on one of them:

- copy **F1** and copy **F2** of the device F(x) compute the same M outputs;
- a prediction block **H(x)** computes, from the inputs alone, the check bits
  that F2's outputs should carry under the *weighted-transitions sum code*
  T(M, M-1);
- a **checker** re-encodes F2's actual outputs and compares them with H(x),
  raising `u` on any mismatch;
- a **correction circuit** produces the output: F2's value when the check
  passes, F1's value when it fails.

Whichever single block (F1, F2 or H) is wrong, the output is right, with one
exception: an error that inverts *all* M outputs of F2 at once is invisible to
the code and reaches the output. The checker replaces the third copy of a
majority scheme, which pays off when H(x) plus the checker is smaller than
F(x).

The RTL implements the generic structure for any M, and the published worked
example (a 4-input, 5-output device) as the top level.

## The weighted-transitions sum code T(m, k)

Number the data bits f1 .. fm. Between each pair of neighbours f_i, f_(i+1)
there is a *transition*, active when the two bits differ. Transition i gets
weight 2^(i-1). The check value W is the sum of the weights of the active
transitions, written in binary in k = m - 1 check bits.

Because the weights are distinct powers of two, bit i of W is just the
activity of transition i, so the encoder is a row of XOR gates:

    h_i = f_i xor f_(i+1),   i = 1 .. m-1

(equivalently, h is the reflected Gray code of f without its top bit).

**What it detects.** Two data vectors have the same check vector only when
every transition is the same in both, i.e. when they are equal or one is the
bitwise inverse of the other. So every error of multiplicity 1 .. m-1 is
detected, and only the all-bits inversion (multiplicity m) is missed. A parity
bit, by comparison, misses every error of even multiplicity. The code suits
circuits in which no internal signal can flip all outputs at once; that is a
property of the protected device, not something the RTL can enforce.

## How the correction decides

Signals, for M outputs:

| signal | formula | gates |
|---|---|---|
| `e[i]` | `f1[i] ^ f2[i]` | M XOR |
| `u` | `OR_i( (f2[i] ^ f2[i+1]) ^ h[i] )` | 2(M-1) XOR, one (M-1)-input OR |
| `f[i]` | `f1[i] ^ (e[i] & ~u)` | M AND with inverted input, M XOR |

For M = 5 this is 18 XOR, 5 AND and one 4-input OR.

`f[i] = f1[i] ^ (e[i] & ~u)` is a multiplexer in disguise: with `u = 0`,
every output where F1 disagrees with F2 is flipped, so `f = f2`; with `u = 1`,
nothing is flipped, so `f = f1`. The consequences for a single faulty block:

| faulty block | `u` | `e` | output |
|---|---|---|---|
| none | 0 | 0 | correct |
| F1 (any error) | 0 | ≠ 0 | F2's value, correct |
| F2, not all bits inverted | 1 | ≠ 0 | F1's value, correct |
| F2, all M bits inverted | 0 | all ones | **wrong** (inverted) |
| H(x) (any error) | 1 | 0 | F1's value, correct |

`e` and `u` are also diagnostic: `u = 1` names F2 or H as suspect, and
`u = 0` with `e ≠ 0` names F1. Two faulty blocks at once are outside what the
structure promises.

## The worked example

The top level protects a 4-input, 5-output device given by its truth table
(bit 0 is x1 / f1 / h1):

| x4..x1 | f5..f1 | W | h4..h1 |
|---|---|---|---|
| 0000 | 01101 | 11 | 1011 |
| 0001 | 01110 | 9 | 1001 |
| 0010 | 10111 | 12 | 1100 |
| 0011 | 00010 | 3 | 0011 |
| 0100 | 10110 | 13 | 1101 |
| 0101 | 00100 | 6 | 0110 |
| 0110 | 11001 | 5 | 0101 |
| 0111 | 11001 | 5 | 0101 |
| 1000 | 11000 | 4 | 0100 |
| 1001 | 10100 | 14 | 1110 |
| 1010 | 11010 | 7 | 0111 |
| 1011 | 01011 | 14 | 1110 |
| 1100 | 00111 | 4 | 0100 |
| 1101 | 11111 | 0 | 0000 |
| 1110 | 01000 | 12 | 1100 |
| 1111 | 00110 | 5 | 0101 |

H(x) is the right-hand column as a function of x. The published table prints
W = 12 (1100) for x = 1011, while the active transitions it lists for that row
(t3,2, t4,3, t5,4) and the encoding rule give 14 (1110). The RTL uses 14;
with 12 the fault-free device would raise a false check error on that input.

`example_f` and `example_h` are written as 16-entry lookups. In a real
implementation they are two separately synthesised logic networks; keeping
H(x) independent of F(x) is what lets the checker see F's faults.

## Modules

    t_structure_top            worked example (M = 5, N = 4), fault-injection inputs
    ├── example_f  (x2)        device F(x): copies F1 and F2
    ├── example_h              check-bit predictor H(x)
    └── t_corrector #(M)       generic correction and control
        ├── tcode_checker #(M) encoder + comparison with H + OR -> u
        │   └── tcode_encoder #(M)   h_i = f_i ^ f_(i+1)
        ├── output_comparator #(M)   e = f1 ^ f2
        └── correction_circuit #(M)  f = f1 ^ (e & ~u)
    tstruct_pkg                sizes (EX_N = 4, EX_M = 5, EX_K = 4) and vector types

Everything is combinational: no clock, no reset, no registers, zero latency.
Outputs settle one propagation delay after the inputs change.

### `t_structure_top` ports

| port | dir | width | meaning |
|---|---|---|---|
| `x` | in | 4 | inputs x4..x1 |
| `fault_f1` | in | 5 | error mask XORed onto F1's outputs |
| `fault_f2` | in | 5 | error mask XORed onto F2's outputs |
| `fault_h` | in | 4 | error mask XORed onto H(x)'s outputs |
| `f` | out | 5 | corrected outputs f5..f1 |
| `e` | out | 5 | per-output disagreement of the copies |
| `u` | out | 1 | T-code check error |

The three `fault_*` inputs are not part of the published structure. They let
a testbench place an error of any multiplicity on any block. Tie them to zero
in use; synthesis then removes the XORs.

### Reusing the structure for another device

Instantiate `t_corrector #(.M(m))` with two copies of your device on `f1` and
`f2`, and an H(x) block on `h` that computes `h[i] = F_i(x) ^ F_(i+1)(x)` as
its own function of x (minimise it separately; do not build it from the
outputs of a copy of F). Check first that no internal node of F can invert all
m outputs at once, or the T-code will not see that fault.

## Choices made in this RTL

- **Which copy is checked.** The published description puts the code check on
  one copy and applies the correction XORs to the other, without a drawing to
  fix which is which. Here the check watches F2 and the correction XORs act on
  F1, which is the only assignment under which the gate list gives single-fault
  masking.
- **Single-rail check signal.** `u` is a plain OR of the check-bit mismatches,
  matching the gate count of the published area estimate. No self-checking
  two-rail checker is used, so a fault in the checker or the output XORs
  themselves is not covered; the structure relies on these few gates being
  reliable.
- **Check value for x = 1011** is 14, not the printed 12 (see above).
- **Lookups** for F(x) and H(x) instead of gate networks.
- **Fault-injection ports** on the top (see above).

## What is not here

The majority (2-out-of-3) structure and the parity-checked duplication
structure are the schemes the T-structure is compared against; they are not
implemented. The published area comparison over 25 MCNC benchmark circuits
cannot be reproduced: their functions are not part of this design. The generic
`t_corrector` accepts any M, so any of them can be protected once its F(x) and
H(x) are supplied.

## Testbenches and simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=F` and stops on a watchdog if it hangs.
`tb/tb_ref_pkg.sv` holds the example's truth table and an integer-arithmetic
weighted-sum function used as the independent reference.

| testbench | what it covers |
|---|---|
| `tb_tcode_encoder` | all vectors at M = 5 and M = 8 against the weight sum and the Gray-code form; over all vector pairs, equal check vectors only for complementary data |
| `tb_tcode_checker` | all 512 (f, h) pairs; every error mask on every vector is caught except the full inversion |
| `tb_output_comparator`, `tb_correction_circuit` | exhaustive |
| `tb_example_f`, `tb_example_h` | all 16 rows; H equals the code of F |
| `tb_t_corrector` | M = 5 and M = 8: random inputs against a model, then random single-block faults must be masked |
| `tb_t_structure_top` | end to end at the design's only size: every input with no fault and with every non-zero mask on F1, F2 and H (1248 cases); counts each mechanism (fault-free, F1 corrected, F2 masked, H masked, undetectable full inversion) and fails if any never occurs |

Run one with Verilator 5 from the repository root, for example:

    verilator --binary --timing --assert -Wall -Wno-fatal \
        rtl/tstruct_pkg.sv tb/tb_ref_pkg.sv rtl/*_f.sv rtl/*_h.sv \
        rtl/tcode_encoder.sv rtl/tcode_checker.sv rtl/output_comparator.sv \
        rtl/correction_circuit.sv rtl/t_corrector.sv rtl/t_structure_top.sv \
        tb/tb_t_structure_top.sv --top-module tb_t_structure_top
    ./obj_dir/Vtb_t_structure_top

Each testbench runs in well under a second.
