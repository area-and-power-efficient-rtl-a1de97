# Fixed-point delayed-LMS adaptive filter with ripple-carry adders

An LMS adaptive filter keeps adjusting its FIR coefficients so that its output
follows a desired signal. It takes an input sample x_n and a desired sample d_n,
computes the output y_n = Σ w(i)·x_(n-i) and the error e_n = d_n − y_n, and then
moves each weight along the error gradient: w(i) ← w(i) + μ·e·x_(n-i). In hardware
the feedback loop is the problem. The next weights depend on an error that
depends on the current weights, so the whole inner product, subtraction and
update would have to fit in one clock period. The *delayed* LMS (DLMS) algorithm
breaks the loop. It updates the weights with an error that is a few samples old,
so the loop can be pipelined. The price is a small slowdown in convergence.

This RTL implements such a DLMS filter in the following form:

* **Multipliers as 2-bit partial-product generators (PPGs).** The input word is
  split into radix-4 digits. Each digit picks 0, a, 2a or 3a of the other operand
  through a small decoder and AND/OR selection. No array multiplier is used.
* **Partial products added by place value.** In the filter-output path, the
  partial products with the same digit position from all taps are added first.
  Only then are the place values combined by shifting. This keeps most adders
  narrow.
* **Shared sub-expressions in the weight update.** All taps multiply the same
  scaled error μ·e. Its multiples 3μe and −μe are computed once and shared by
  every tap.
* **Ripple-carry adders throughout.** Every addition is a chain of full adders.
  This is the smallest and lowest-power adder structure. Its cost is a delay that
  grows linearly with the word length, t = (n−1)·t_carry + t_sum. The choice
  targets area and power, not clock speed.

## Top level and timing

```
          x_n ─┬──────────────────────────────────► error_computation_block ──► y_n
               │                      d_n ────────►   (PPGs, adder trees,      
               │                                       shift-add tree, d − y) ──[D]──► e
               │                                             ▲ weights               │
               └──[D]── x ──► weight_update_block ───────────┘◄──────────────────────┘
```

`dlms_top` takes one (x, d) pair per clock. There is no handshake. With the
default `PIPE = 0`:

| cycle | what happens |
|---|---|
| n | y_n is formed combinationally from x_n .. x_(n-3) and the current weights; e_n = sat(d_n − y_n) is registered |
| n+1 | the weight-update block registers μ·e_n (and its multiples) and x_n |
| n+2 | each tap computes μ·e_n·x_(n-i) and accumulates; the register updates at the end of the cycle |
| n+3 | the new weights are used |

This gives the update rule **w_(n+1) = w_n + μ·e_(n-2)·x_(n-2)**, an
adaptation delay of 2. The testbench measures this directly. After reset, a
single impulse reaches the weights three clocks after it is applied.

`PIPE = 1` adds one row of pipeline latches in the error-computation block,
between the adder trees and the shift-add tree. This roughly halves the longest
combinational path. The cost is one more cycle on y and e, and the adaptation
delay becomes 3.

Ports of `dlms_top`: `x_in[L]`, `d_in[W]`, `y_out[W]`, `e_out[W]` (registered
error), `sat_out` (that error was clipped), and `weights[N_TAPS*W]` with w(i) at
`[i*W +: W]`. Reset is asynchronous and active low. It clears all weights to
zero, along with every register.

## Number formats

| signal | width | format | value |
|---|---|---|---|
| x | L = 8 | Q1.7 | x / 128 |
| w, d, y, e | W = 16 | Q2.14 | v / 16384 (range ±2) |
| μ | — | 2^−MU_SHIFT, MU_SHIFT = 4 | 1/16 |

* **Inner product.** The sum is kept at full precision, W + L + log2 N = 26 bits.
  The 7 fraction bits of x are then dropped by an arithmetic shift, which rounds
  toward −∞.
* **Output y.** Saturated to 16 bits.
* **Error e.** Computed as d minus the *unsaturated* sum, then saturated to
  16 bits. Saturating the error stops a large transient from wrapping around and
  pushing the weights the wrong way.
* **Scaled error μ·e.** An arithmetic right shift of e by MU_SHIFT.
* **Weight update.** The product μe·x (W + L bits) is shifted right by 7 and
  added to the weight. Weights wrap modulo 2^16 and are not saturated. With the
  error saturated and μ = 1/16, an increment stays below 2^11.

## The partial-product generator (the unusual part)

`ppg` multiplies an operand a by an L-bit two's-complement word x without a
multiplier array. x is cut into L/2 two-bit digits u = x[2j+1:2j].

1. `dec23` turns a digit into three select lines:
   b0 = u0·u1 (digit 3), b1 = u0·¬u1 (digit 1), b2 = ¬u0·u1 (digit 2).
   Digit 0 raises none of them.
2. `aoc` (AND-OR cell) ANDs each of three words with one select line and ORs
   the results. At most one line is high, so the output is exactly one of the
   words, or zero.
3. For the lower digits the three words are a, 2a and 3a. The **top digit**
   carries the sign of x. Read as signed, it is 0, 1, −2 or −1, so its cell is
   fed a, −2a and −a instead. Then Σ_j p_j·4^j = a·x exactly, and signed input
   samples need no correction term.

The five multiples (a, 2a, 3a, −a, −2a) come from `pp_multiples`.
2a and −2a are one-bit shifts. 3a = a + 2a and −a = ¬a + 1 are each one
ripple-carry adder. All five are sign-extended to W + 2 bits, the smallest
width that holds 3a and −2a for every a.

* In the **error-computation block**, every tap has its own `pp_multiples` for
  its weight.
* In the **weight-update block**, a single `pp_multiples` serves all taps.
  Its outputs μe, 3μe and −μe are registered. 2μe and −2μe are taken from those
  registers by a shift.

## Adder network of the error-computation block

For N = 4 taps and L = 8 the network works as follows:

* **Input.** The four PPGs give 16 partial products p_ij, for tap i and digit j.
* **Adder trees.** `adder_tree` instance j adds p_0j..p_3j in two stages
  (p_0j + p_1j, p_2j + p_3j, then the two sums). Its result is q_j.
* **Shift-add tree.** `shift_add_tree` computes q_0 + (q_1 << 2) and
  q_2 + (q_3 << 2). It then adds these two with the second one shifted by << 4.
* **General case.** An adder tree has log2 N stages, and stage s of the
  shift-add tree shifts by 2^s. N and L/2 must be powers of two.

In the **weight-update block**, each tap has its own PPG and its own shift-add
tree. No adder tree is needed, since every tap multiplies by the same μe.
After the shift-add tree comes a W-bit ripple-carry adder and a weight register.

## Modules

| module | role |
|---|---|
| `dlms_top` | the filter: error-computation block, weight-update block, x alignment register(s) |
| `error_computation_block` | input delay line, N × (`pp_multiples` + `ppg`), L/2 × `adder_tree`, `shift_add_tree`, subtract, saturate, error register |
| `weight_update_block` | μe shift, shared `pp_multiples` + registers, x delay line, N × (`ppg` + `shift_add_tree` + accumulator) |
| `ppg` | L/2 × (`dec23` + `aoc`) |
| `dec23`, `aoc` | decoder and AND-OR cell of a PPG |
| `pp_multiples` | a, 2a, 3a, −a, −2a of one operand |
| `adder_tree`, `shift_add_tree` | the two adder networks |
| `sat_trunc` | saturation of y and e to W bits |
| `rca`, `full_adder` | the ripple-carry adder and its cell |
| `lms_pkg` | default sizes |

Parameters (defaults): `N_TAPS = 4`, `L = 8`, `W = 16`, `MU_SHIFT = 4`,
`PIPE = 0`. `N_TAPS` and `L/2` must be powers of two.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=… failures=…`.

* **Arithmetic leaf cells.** `full_adder`, `dec23`: exhaustive. `rca`:
  exhaustive at 8 bits.
* **Multiplier and adder networks.** `aoc`, `ppg`, `adder_tree` and
  `shift_add_tree` are checked against integer arithmetic, with random operands
  and the extreme values.
* **Error-computation block.** Checked every cycle against an integer model.
  This covers y, e and the saturation flag, including the one-cycle error
  latency and the `PIPE = 1` variant.
* **Weight-update block.** Checked every cycle against a model of its two
  register stages. An impulse test pins the two-clock latency.
* **`tb_dlms_top`** runs the full filter at the default parameters against a
  cycle-level model. It checks y, e and all weights on every clock, in four
  phases:
  * an impulse, which checks the adaptation delay;
  * identification of a 4-tap FIR plant, where the mean |e| drops from about
    1800 to about 16 LSB and every weight ends within 200 LSB of the plant;
  * a burst of full-scale desired samples, which makes the error saturate;
  * a change of plant, after which the filter re-converges.

  The test also counts saturations, negative top digits and weight updates, and
  fails if any of them never occurred.
* **`tb_dlms_top_n8`** runs the same test with 8 taps.
* **`tb_dlms_top_pipe`** runs the same test with `PIPE = 1`.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lms_pkg.sv tb/tb_dlms_top.sv --top-module tb_dlms_top
./obj_dir/Vtb_dlms_top
```

Every testbench finishes in well under a second of simulation time.

## Where this RTL departs from, or goes beyond, the published architecture

* **Word lengths and formats.** W = 16, the Q formats, the rounding by
  truncation, the saturation of y and e, and μ = 1/16 are choices made here. The
  architecture fixes only L = 8 for its worked example and the W + 2 width of the
  partial products.
* **Filter length.** The default is N = 4, the size of the worked adder-network
  example. The efficiency comparison of the architecture refers to N = 8. That is
  `N_TAPS = 8`, exercised by `tb_dlms_top_n8`.
* **Pipeline latches.** The architecture marks every stage boundary of the
  adder trees and shift-add tree as a possible latch position, but does not say
  which ones are kept. Here none are kept by default. `PIPE = 1` offers one row,
  after the adder trees. The adaptation delays that result (2, or 3 with
  `PIPE = 1`) follow from these choices.
* **Adder widths.** Within one tree, all adders are as wide as the tree's
  output, and the inputs are sign-extended. A hand-optimised version would grow
  the width stage by stage. This costs a little area and changes no result.
* **Bit-level pruning.** The architecture mentions a variant that drops
  low-order bits to save area. It is not described in enough detail to build,
  and is not included.
* **Comparison adders.** The carry-save adder version used as a comparison
  point is not included.
* **Gate counts and power.** The reported figures of about 5.5 k gates and
  41 mW come from a vendor FPGA flow of unstated size and device. They cannot be
  compared with this RTL directly.
