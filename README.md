# Iterative computation networks: a zero-latency FIR filter and streaming polynomial arithmetic

A filter, a polynomial multiplier or a polynomial divider can all be built
from three parts: a multiplier by a constant, a two-input adder, and a unit
delay Z (a register clocked once per sample). What differs between good and bad
networks is where the delays go. This library holds six such networks. They
were derived by writing each network as an expression in the delay operator Z
and rewriting that expression until the network had:

* one multiply plus one add as its critical path, whatever the number of taps;
* no delay between the newest input and the output that depends on it;
* identical repeated stages.

Every network takes one sample or coefficient per clock cycle and gives one
result in the same cycle.

| network | module | computes | result appears |
|---|---|---|---|
| FIR filter | `fir_d` | y_n = Σ_{i=1..N} a_i x_{n−i} | y_{n+1} in the cycle x_n is applied |
| polynomial multiplier | `poly_mul` | Y = A·X, A fixed of degree C | y_n with x_n (LSB first), or y_{n+C} with x_n (MSB first) |
| sum of products, two chains | `poly_sop` | W = A·X + B·Y | w_{n+C} with x_n, y_n |
| sum of products, one chain | `poly_sop_comb` | the same with half the registers | w_{n+C} with x_n, y_n |
| polynomial divider | `poly_div` | X = Y / A and the remainder R | x_j with y_j, after C start-up cycles |
| multiply-divide | `poly_muldiv` | S = A·X / B and the remainder | s_j with x_j |

`icn_top` puts all six side by side, with separate ports. They share only
`clk` and `rst_n`.

## Reading the Z notation

Let X be the stream x_1, x_2, … of samples, one per cycle. Z X is the same
stream one cycle later: (Z X)_n = x_{n−1}. In hardware Z is one register
(`z_delay`). Z^k is k registers in a row. Z^−1 would mean looking one cycle
into the future: it cannot be applied to an input, but it may appear where it
cancels a Z. A product a·X is a multiplier by the constant a. Z distributes over
sums and leaves constants unchanged. So an expression such as

    S = a_1 X + Z (a_2 X + Z (a_3 X + Z (a_4 X)))

reads directly as a network. In this example, a_4 X is formed and delayed. It
is added to a_3 X, and that sum is delayed. The same repeats for a_2 X, and a_1 X
is added at the end. Counting the Z factors in front of each product gives the
delay it sees. Moving Z factors around an expression moves registers around
the network without changing what it computes. Every network below was
obtained that way.

## The FIR filter (`fir_d`, `fir_d_cell`)

The textbook filter y_n = Σ a_i x_{n−i} becomes a row of N modules
(`fir_d_cell`). The sample x is broadcast to all modules in the same cycle.
Module i forms a_i·x and adds the partial sum of module i+1 after one
register:

    s_out(i) = a_i · x + Z s_out(i+1),      s_out(N+1) = 0
    s = s_out(1) = Σ_{i=1..N} Z^{i−1} a_i X = Z^−1 Y

The partial sums flow right to left and pass one register per module. The
further a product is from the output end, the more cycles it waits. The
register count gives exactly the delay that tap needs. Because of this, x
needs no delay line, and a_1 x_n reaches the output in the cycle x_n
arrives. The output is therefore s_n = y_{n+1}: the filter is one cycle
*ahead* of the definition, which sums only older samples. The critical path is
one multiplier and one adder, independent of N. The filter holds N registers,
all on the partial-sum line.

Two obvious variants do not work:

* Accumulating left to right with the same registers needs matching
  registers on the x line. It then becomes N−2 cycles late and needs 3N
  registers.
* Accumulating right to left while keeping those registers on the x line
  gives tap i a delay of 3(i−1) cycles instead of i−1. The result is no
  longer the filter.

The right-most module has a register whose input is the constant zero. It is
kept so that all modules are identical; a synthesis tool may remove it.

Widths: samples and coefficients are signed `XW` = `CW` = 16 bits. Partial
sums are `SW` = XW + CW + ⌈log2 N⌉ = 34 bits. The filter is therefore exact
and cannot overflow.

## Polynomial multiplication (`poly_mul`)

The coefficients of a product, y_n = Σ_{i=0..C} a_i x_{n−i}, follow the filter
formula with one more tap (a_0). They are computed by C+1 stages. Each stage
adds its product to the delayed output of the stage on its left, and the
left-most stage adds zero:

* `msb_first = 0`: the stages hold a_C … a_0 from left to right, and
  Y = Σ Z^i a_i X. Coefficient x_0 goes in first, and y_n comes out in the
  cycle x_n goes in.
* `msb_first = 1`: the stages hold a_0 … a_C, and the output is
  Z^−C Y = Σ_j Z^−j a_{C−j} X. Coefficient x_m goes in first. When x_n is
  applied, y_{n+C} comes out, so the leading coefficient y_{m+C} appears in
  the first cycle. In this order the same register "delays" towards lower
  powers of t, which is why it is written Z^−1.

Both orders use the same registers and adders. `msb_first` only reverses the
order in which the coefficients reach the stages, through one multiplexer per
stage. Change it only while the network is clear.

**One operation:** the product of a degree-m X has m+C+1 coefficients. The
sequence is as follows:

1. Clear the registers with `clr`. Alternatively, apply C zero inputs (the
   outputs during those cycles are meaningless).
2. Apply x in m+1 cycles.
3. Apply C more zeros to *run out* the last C coefficients of Y.

## Sums of products (`poly_sop`, `poly_sop_comb`)

The network W = A·X + B·Y can be built as two most-significant-first
multipliers followed by one adder (`poly_sop`, 2C registers). Z distributes
over addition:

    Z^−C W = Σ_j Z^−j [ a_{C−j} X + b_{C−j} Y ]

So the two chains can share their registers. In `poly_sop_comb` each stage has
a three-input adder, and the network has C registers. Both modules give the
same outputs in the same cycles.

## Polynomial division (`poly_div`)

This is the least obvious network. Division has to start at the most
significant end: the quotient's leading coefficient is y_{m+C} / a_C. The
most-significant-first multiplication can be solved for X:

    a_C X = Z^−C Y − Σ_{i=1..C} Z^−i a_{C−i} X
          = Σ_{i=1..C} Z^−i [ −a_{C−i} X + (Y if i = C) ]

Every X on the right-hand side carries at least one register. The network can
therefore feed its own output back without a combinational loop:

* Y enters the left-most of C stages.
* Stage k subtracts a_k·x and feeds a register.
* The last register times a_C^−1 is the quotient coefficient x, which goes
  back to all stages.

Timing, after the registers are cleared:

| cycle | input | output x |
|---|---|---|
| 0 … C−1 | y_{m+C} … y_{m+1} | zero, not a quotient coefficient |
| C … m+C | y_m … y_0 | x_m … x_0 (x_j in the same cycle as y_j) |
| after the last edge | — | `rem[k]` = r_k, the remainder R = Y − A·X |

Clear the registers before the operation. If A divides Y, the registers are
all zero at the end and `rem_zero` is set. If they are not, Y was not a
multiple of A, and their contents are the coefficients r_0 … r_{C−1} of the
remainder. Multiplying X by A with `poly_mul` in most-significant-first order
and feeding the product into `poly_div` returns X with a zero remainder. The
top-level testbench checks this cycle by cycle.

## Multiply and divide in one pass (`poly_muldiv`)

The multiplier and the divider merge into one network that computes
S = A·X / B:

    S = b_C^−1 { a_C X + Σ_{i=1..C} Z^−i [ a_{C−i} X − b_{C−i} S ] }

Stage k adds a_k x − b_k s. The last stage adds a_C x to the last register,
and the sum times b_C^−1 is s. When the registers are cleared first, s_j
appears with x_j. After x_0 the registers hold the remainder of A·X divided by
B, all zero when B divides A·X. Further zero inputs continue the expansion of
A·X / B in falling powers of t.

## Arithmetic: words modulo 2^16

The networks themselves do not fix a number system. All polynomial networks
here use 16-bit words with wrap-around, so they compute in the integers
modulo 2^16. In that ring a coefficient has an inverse exactly when it is
odd. The dividers therefore need:

* an odd leading coefficient (a_C, b_C);
* its inverse modulo 2^16 on a separate input (`a_inv`, `b_inv`). This is the
  constant of the a_C^−1 multiplier.

`icn_pkg::inv_mod2w` computes the inverse by Newton iteration,
x ← x·(2 − a·x), starting from x = a. It is correct for 3 bits at the start
and doubles each step. An assertion in each divider checks a_C · a_inv ≡ 1
whenever the network is enabled. Under these conditions quotient and
remainder are exact. With fixed-point data instead, the same structure
applies, but the divider's results are then rounded.

The FIR filter is signed, with partial sums wide enough never to overflow.

## Interface conventions

All modules share the same conventions:

* `clk`: every register is clocked on the rising edge.
* `rst_n`: asynchronous, active low. It clears every register.
* `en`: the network advances one step on a rising edge while `en` is high.
  While it is low, all registers hold their values, so a stream can pause for
  any number of cycles.
* `clr`: synchronous clear of all registers. It takes priority over `en`.
* Coefficients are input ports (unpacked arrays, `a[i]` = a_i; in `fir_d`,
  `a[i-1]` = a_i). They are meant to stay constant during an operation.
* Outputs are combinational functions of the current input and the register
  contents. There is no output register. A user who needs one adds it and
  gains one cycle of latency.

Combinational depth from input to register:

| module | depth |
|---|---|
| `fir_d`, `poly_mul`, `poly_sop_comb` | one multiply and one add |
| `poly_sop` | one multiply and two adds, to the output |
| `poly_div` | from a register: multiply by a_inv, multiply by a_k, subtract |
| `poly_muldiv` | from x: multiply by a_C, add, multiply by b_inv, multiply by b_k, add |

In the dividers the feedback multiplier is on the critical path. This is part
of the network, not a flaw of the implementation.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` (`fir_d`, `icn_top`) | 4 | number of filter taps, the size the filter is drawn at |
| `C` (polynomial modules, `icn_top`) | 3 | degree of the fixed polynomials, the size the networks are drawn at |
| `W`, `XW`, `CW` | 16 | word width, this design's choice |
| `SW` | XW+CW+⌈log2 N⌉ | FIR partial-sum width |

The defaults live in `icn_pkg`. Other sizes are set through the
parameters. The testbenches run N = 4 and N = 9, and C = 3. The degree m of the streamed polynomial
is not a parameter: X and Y stream through, so any m works.

## Files

| file | contents |
|---|---|
| `rtl/icn_pkg.sv` | default sizes, modular inverse function |
| `rtl/z_delay.sv` | the Z register with enable and clear |
| `rtl/fir_d_cell.sv`, `rtl/fir_d.sv` | FIR module and filter |
| `rtl/poly_mul.sv` | multiplier, both coefficient orders |
| `rtl/poly_sop.sv`, `rtl/poly_sop_comb.sv` | sums of products (`poly_sop` uses two `poly_mul`) |
| `rtl/poly_div.sv`, `rtl/poly_muldiv.sv` | divider, multiply-divide |
| `rtl/icn_top.sv` | all networks side by side |
| `tb/poly_ref_pkg.sv` | reference polynomial arithmetic for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. A
watchdog ends a run that hangs and counts a failure. For example, with
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/icn_pkg.sv tb/poly_ref_pkg.sv tb/tb_icn_top.sv --top-module tb_icn_top
    ./obj_dir/Vtb_icn_top

Replace `tb_icn_top` with any other testbench name. Every testbench finishes in
well under a second.

What the testbenches compare against:

* **`tb_fir_d`**
  * Reference: a sample history and direct evaluation of the sum, every
    cycle, over 3000 cycles with random pauses and clears.
  * Sizes: N = 4 and N = 9.
  * Also an impulse response.
* **`tb_poly_mul`**
  * Reference: convolution in the testbench.
  * Covers both orders, both ways of clearing, run-out, and random pauses.
* **`tb_poly_sop`, `tb_poly_sop_comb`**
  * Reference: the convolutions added.
* **`tb_poly_div`**
  * Setup: dividends built as Y = A·X + R from a known quotient and
    remainder.
  * Checks: the quotient cycle by cycle, the remainder in the registers, and
    `rem_zero`.
* **`tb_poly_muldiv`**
  * Reference: A·X, divided by B with long division in the testbench.
  * Half of the cases are exact.
* **`tb_icn_top`**
  * Runs all six networks at the default sizes through the top module.
  * Includes the multiply-then-divide round trip.
  * Counts each mechanism and fails if one never occurred: pause, clear,
    clearing by zeros, run-out, both orders, exact and inexact division.

## Scope and departures

The following are this design's choices:

* 16-bit words, and arithmetic modulo 2^16 for the polynomial networks.
* The enable, clear and reset controls.
* Coefficients on ports rather than hard-wired constants.
* The inverse of the leading coefficient supplied as an input.
* The remainder outputs and the `rem_zero` flag of `poly_div` and
  `poly_muldiv`.
* One `poly_mul` serving both coefficient orders.

The network structures, the coefficient orders and the cycle relations
between input and output are as derived above.

The filter derivation passes through other networks that are not included:

* a direct N-input sum;
* the same sum broken into a left-to-right adder chain;
* that chain pipelined with extra registers on both lines;
* an adder tree.

Each of them is worse than `fir_d` in rate, latency or register count.
