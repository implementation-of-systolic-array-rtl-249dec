# Systolic SVM classifier with a multiplierless kernel

This is a support vector machine (SVM) classifier for two-feature samples. It
evaluates the trained decision function

    score_c = b_c + sum over support vectors i of class c of  alpha_i * y_i * K(x, sv_i)
    class   = argmax_c score_c            (one against all; y_i = +1 or -1)

in hardware, without general multipliers where it can avoid them. Each element of the test vector
is recoded into **canonic signed digits (CSD)**. Every product with it then becomes a short
sequence of shifted additions and subtractions. The support vectors sit in a **systolic chain
of processing elements (PEs)**, one support vector per PE. A test vector enters the chain every
clock cycle and moves one PE per cycle. The running class sums travel alongside it. The
classification leaves the far end of the chain.

Three classifiers are built from the same array and sit side by side in `svm_top`:

| instance | problem | PEs (support vectors) | classes | kernel |
|---|---|---|---|---|
| `lin_*` | binary, linearly separable (iris setosa / non-setosa) | 8 (3 + 5) | 2 | linear `x.sv` |
| `nl_*`  | binary, not linearly separable | 24 (12 + 12) | 2 | polynomial `(1 + x.sv)^4` |
| `mc_*`  | three classes | 74 (12 + 30 + 32) | 3 | linear `x.sv` |

The support vectors, alphas, labels and biases come from offline training. They are loaded
through a write port, so the same hardware runs any trained model of these sizes.

## Number formats

| quantity | format |
|---|---|
| test-vector and support-vector elements | 13-bit two's complement, 8 fraction bits (Q5.8, range -16 .. +15.996) |
| alpha | 16-bit two's complement, 8 fraction bits (Q8.8); only alpha >= 0 is meaningful |
| kernel values, products, class sums, biases, scores | 64-bit two's complement, 8 fraction bits |

Every product of two Q.8 values is shifted right by 8 bits. This arithmetic shift rounds
towards minus infinity. Nothing saturates: a value that leaves the 64-bit range wraps around.
For Q5.8 inputs this can only happen with the polynomial kernel, and then only for element
magnitudes near the top of the range.

## CSD recoding (`csd_encoder`)

A CSD word has digits in {-1, 0, +1}. No two adjacent digits are non-zero. For a given value
the form is unique, and it has the fewest non-zero digits of any signed-digit form. On average
that is about a third fewer than plain binary. Each digit is carried in two bits, a sign bit
`xis` and a magnitude bit `xim`:

| digit | xis xim |
|---|---|
| 0  | 00 |
| +1 | 01 |
| -1 | 11 |

The encoder is combinational. It scans the word from the LSB with a carry `c` (initially 0),
treating the bit above the MSB as a copy of the sign bit:

    digit i is non-zero  <=>  x[i] xor c
    digit i is negative  <=>  non-zero and x[i+1] = 1
    next carry            =   majority(x[i], x[i+1], c)

Every W-bit two's complement value, including -2^(W-1), fits in W digits. Examples in Q5.8
(bit 8 is the units digit):

| value | binary | xis | xim | digits |
|---|---|---|---|---|
| 4.2 (stored as 1075/256) | 00100.00110011 | 0000000010001 | 0010001010101 | 4 + 1/4 - 1/16 + 1/64 - 1/256 |
| 4.5 | 00100.10000000 | 0000000000000 | 0010010000000 | 4 + 1/2 |
| 5.5 | 00101.10000000 | 0001010000000 | 0101010000000 | 8 - 2 - 1/2 |
| 6   | 00110.00000000 | 0001000000000 | 0101000000000 | 8 - 2 |
| 3   | 00011.00000000 | 0000100000000 | 0010100000000 | 4 - 1 |

`csd_mult` forms a product from a CSD word `a` and a plain operand `b`. It adds `b << i` for
each +1 digit and subtracts it for each -1 digit, then drops the fraction bits. The same unit
serves twice in each PE:

- 13 digits x 13 bits, for test-vector element times support-vector element;
- 16 digits x 64 bits, for alpha times kernel value.

## Processing element (`svm_pe`) and the chain (`svm_classifier`)

```
 in_x --> CSD --> reg --> PE0 --> PE1 --> ... --> PE(N-1) --> decision --> out_class, out_score
                  |         |                          |          |
               cycle 1   cycle 2                  cycle N+1   cycle N+2
```

In a cycle with `valid_i` high, a PE does four things:

1. It computes the kernel of the CSD test vector with its stored support vector (`ml_kernel`).
   The linear kernel is `prod_0 + prod_1`, two `csd_mult` products. The polynomial kernel
   raises `1 + x.sv` to the power 4 with ordinary multipliers. Each of the three
   multiplications is truncated back to Q.8. The dot product inside it is still
   multiplierless.
2. It multiplies the kernel value by alpha. Alpha was recoded to CSD when it was written.
3. It negates the result if the label is -1.
4. It adds the result to the sum of its own class and passes the other class sums through
   unchanged.

It registers the test vector, the class sums and `valid` for the next PE. The first PE sees
all class sums at zero. The support vectors of a class may sit anywhere in the chain, because
each PE holds its own class tag.

**Timing.** A test vector presented with `in_valid` in cycle t produces `out_valid`,
`out_class` and `out_score` in cycle t + NUM_SV + 2:

| classifier | latency |
|---|---|
| binary linear | 10 cycles |
| binary non-linear | 26 cycles |
| multiclass | 76 cycles |

A new test vector may be presented every cycle. There is no back-pressure. The chain
registers only move when `valid` is high.

The critical path is one PE: a 13-digit add/subtract chain, a 64-bit adder and a 16-digit
add/subtract chain. In the polynomial classifier, three 64 x 64-bit multiplications come on
top of that. Neither path is pipelined.

## Decision (`svm_decision`)

The decision unit adds the stored bias of each class to the incoming class sums. It registers
all scores and the index of the largest one. Ties go to the lower index. For the binary
classifiers the scores of the two classes are kept apart in the same way: each class's
support vectors and bias form its own decision function, and the larger one wins. For a single
class, the sign of its score is the usual SVM `sign(sum + b)`.

## Loading a trained model

Every configuration write takes one clock. Reset clears all alphas, labels and biases, so an
unwritten PE contributes nothing.

- **Support vectors.** Hold `cfg_we` high with `cfg_addr = i` (0 .. NUM_SV-1), `cfg_sv` (two
  Q5.8 elements), `cfg_alpha` (Q8.8), `cfg_neg` (1 for label -1) and `cfg_class`.
- **Biases.** Hold `bias_we` high with `bias_class` and `bias_val` (64-bit Q.8).

Write before streaming test vectors. A write while vectors are in flight affects those vectors
from the written PE onward. In `svm_top` each classifier has its own set of these ports,
prefixed `lin_`, `nl_` or `mc_`. All three share `clk` and the asynchronous active-low `rst_n`.

## Design choices

The following points are this implementation's own choices, where the architecture left
them open:

- the Q8.8 alpha format, the 64-bit accumulators and the truncating (floor) fraction handling;
- the test vector reaches the PEs one after another through the chain rather than all at
  once, and the class sums travel down the chain with it. This gives one result per cycle
  and a latency of NUM_SV + 2;
- per-PE class tags, bias registers in the decision unit, and the configuration write ports;
- multiplierless (CSD) multiplication by alpha as well as by the test vector. The linear and
  multiclass designs are meant to need no hardware multipliers at all.

The non-linear classifier does use multipliers, for the fourth power only. Its 24 PEs hold 72
of the 64 x 64-bit products.

The numbers of support vectors and classes, the kernel types, the polynomial degree, the
13-bit Q5.8 CSD word and the (xis, xim) digit encoding are taken from the reference
description of the architecture. No trained model comes with the RTL.

## Files

`rtl/`:

| file | content |
|---|---|
| `svm_pkg.sv` | widths, `csd_t`, `kernel_e` |
| `csd_encoder.sv` | CSD recoding |
| `csd_mult.sv` | shift-and-add multiplier |
| `ml_kernel.sv` | linear or polynomial kernel |
| `svm_pe.sv` | processing element |
| `svm_decision.sv` | bias addition and argmax |
| `svm_classifier.sv` | one complete classifier; defaults are the 74-PE, 3-class one |
| `svm_top.sv` | the three classifiers |

`tb/`:

| file | content |
|---|---|
| `tb_svm_ref_pkg.sv` | reference arithmetic written independently of the RTL (NAF loop for CSD, plain 64-bit products) |
| `tb_svm_agent.sv` | loads random models into one classifier, streams test vectors and checks every score, class and the exact latency |
| `tb_csd_encoder.sv` | all 2^13 and 2^16 inputs, plus the example table above |
| `tb_csd_mult.sv`, `tb_ml_kernel.sv`, `tb_svm_pe.sv`, `tb_svm_decision.sv` | random checks of each unit |
| `tb_svm_classifier.sv` | 6-PE 3-class linear and 4-PE polynomial arrays |
| `tb_svm_top.sv` | `svm_top` at its full default sizes |

`tb_svm_top.sv` runs all three classifiers at once. Each gets two random models and 400 test
vectors per model. The testbench also counts that every mechanism occurred: negative CSD
digits, label -1, back-to-back and idle input, reload, and every class winning.

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with plain Verilator from the
repository root, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/svm_pkg.sv tb/tb_svm_ref_pkg.sv tb/tb_svm_top.sv --top-module tb_svm_top
    ./obj_dir/Vtb_svm_top

Building the full-size top takes about a minute; the simulation itself takes well under a
second.

## How far to trust it

- Every unit is checked against an independently written model. The multipliers and the
  kernel get random operands, the encoder gets all inputs, and the classifiers get random
  models with exact-latency checks.
- The tests use random models, not trained ones. Classification accuracy on real data sets
  has therefore not been measured. It depends only on the trained values and on Q5.8
  quantisation. The iris features, at most 7.9 cm, fit the Q5.8 range.
- In the polynomial tests, elements stay below 8 in magnitude so that the 64-bit reference
  cannot overflow. Larger elements can wrap in the hardware as well.
- No timing closure or FPGA resource figures are claimed for this RTL.
