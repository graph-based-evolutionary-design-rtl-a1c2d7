# Counter-tree arithmetic circuits built from circuit graphs

This project builds arithmetic circuits from a small library of arithmetic
*nodes* wired into a data-flow graph. For combinational circuits the nodes are
3-2 counters, signed-weight 3-2 counters, fixed shifts and a final
carry-propagate adder. For bit-serial circuits they are a full adder, a half
adder and a 1-bit register. A node has no fixed gate-level form. Its logic is
worked out from the operands that reach it: which digit positions of each
input can be non-zero, and whether each digit counts positively or negatively.
A 3-2 counter whose digit position receives three live bits becomes a full
adder there. With two live bits it is a half adder, with one a wire, and with
none there is no logic at all.

Graphs of this kind can be found automatically, for example by an
evolutionary search that mutates and recombines whole graphs. The SystemVerilog
here implements the node library and five circuits made from it:

| circuit | module | what it computes |
|---|---|---|
| constant-coefficient multiplier | `const_coeff_mult` | `y = R*x`, 16-bit unsigned `x`, `R = 10075` by default, combinational |
| 3-2 counter example graph | `example_graph_fig2` | `y = 9x + ((4x)^(2x)^x)` on a 4-bit `x`, combinational |
| bit-serial example graph | `example_bitserial_fig3` | `2y = 3x1 + x2 - w4 - w5 + w8` on bit streams |
| n-operand bit-serial adder | `bs_multiop_adder` | `y = x1 + ... + xn`, n = 8 by default (2 and up) |
| bit-serial multiply-adder | `bs_multiply_adder` | `y = 3*x1 + 5*x2` (coefficients are parameters) |

`egg_top` places all five side by side. They share only `clk` and `rst`.

## Digits with attributes: active and sign masks

Every vector in a counter tree stands for the integer

    val(v) = sum over active digits i of  (SGN[i] ? -1 : +1) * v[i] * 2^i

Two masks travel with each vector as **parameters, not signals**:

* `ACT` marks the digits that can be non-zero. For example, `x << 3` of a
  16-bit `x` has `ACT = 0x7FFF8`.
* `SGN` marks digits of negative weight. This is the signed-weight (SW)
  representation. A negative partial product `-(x << k)` is simply `x << k`
  with all its `SGN` bits set. It needs no sign extension and no
  two's-complement step.

`egg_pkg` holds the elaboration-time functions that propagate the masks
through a counter with inputs `a`, `b`, `c`:

* `c_active`: the carry is live at digit `i+1` if two or three inputs are
  live at digit `i`.
* `s_active`: the sum is live wherever any input is live.
* `c_sign` and `s_sign`: the output signs, given by the rule below.

A module receives its input masks as parameters and builds only the logic
those masks require. The tree generators call the same functions, so every
node knows the masks of its inputs.

### The signed-weight 3-2 counter (`sw_counter32`)

For each digit, let `m` be the majority sign of the live inputs. A tie
between one positive and one negative input counts as positive. The node
works in three steps:

1. It inverts the inputs whose sign is not `m` and feeds the bits to an
   ordinary full adder (or half adder).
2. The **carry** is the adder's carry and has sign `m`.
3. The **sum** is the XOR of the *original* bits. It has sign `m` if all live
   inputs agree, and the opposite sign if they are mixed.

Example: two positive bits `p1`, `p2` and one negative bit `n` give
`p1 + p2 - n = 2*maj(p1, p2, ~n) - (p1 ^ p2 ^ n)`. This holds for all eight
input combinations. Only the output sign masks depend on the input signs.
The gates are always those of one full adder.

The plain `counter32` is the same node for unsigned operands. It is written
case by case: nothing, wire, half adder or full adder, depending on the
number of live inputs.

Both counters return the carry vector with its weight already applied:
`c_out[i+1]` is the carry of digit `i`, so `c_out + s_out` equals the sum of
the inputs. The carry out of the top digit is dropped, so all results are
exact modulo `2^W`.

### The final stage adder (`final_stage_adder`)

The adder turns the last two SW vectors into an ordinary binary number. It
uses `-d = (1 - d) - 1`:

1. It inverts every negative digit.
2. It adds the constant `BIAS = -sum(2^i)` over all negative live digits of
   both inputs, which cancels the offsets.
3. It adds the three operands in one carry-propagate addition (`+`).

The result is modulo `2^OW`.

## Constant-coefficient multiplier (`const_coeff_mult`)

1. At elaboration, `R` is recoded into canonic signed-digit (CSD) form: digits
   -1/0/+1, no two adjacent digits non-zero, fewest non-zero digits
   (`egg_pkg::csd_pos` / `csd_neg`).
2. Every non-zero digit `d_k` gives a partial product `x << k` with the sign
   of `d_k`.
3. The partial products are reduced level by level. Each level takes its
   operands in groups of three from index 0 upwards. Group `j` becomes a
   `sw_counter32` whose carry becomes operand `2j` of the next level and whose
   sum becomes operand `2j+1`. Any one or two operands left over pass straight
   down.
4. When at most two operands remain, `final_stage_adder` produces the
   product.

For the default `R = 10075`:

    10075 = 2^13 + 2^11 - 2^7 - 2^5 - 2^2 - 2^0       (plain binary has 9 ones)
    6 partial products -> 4 -> 3 -> 2 operands: 3 counter levels, then the FSA
    y is 16 + clog2(10076) = 30 bits

Internal vectors are `OW+2` bits wide. Every step is exact modulo
`2^(OW+2)`, and because `0 <= R*x < 2^OW` the low `OW` bits are the exact
product. `R` may be any value from 1 up (`R = 1` gives one partial product
and no counter level). The mask functions limit the internal width to 64
bits. `R` may have at most 31 non-zero CSD digits (`MAXOPS`).

The tree is a regular Wallace-style tree. An automatic graph search can find
irregular trees, for example ones where an SW counter's outputs branch and
are shared by a later stage. Such a tree can have a lower area-delay product.
This RTL does not reproduce one.

**Signed multiplicand.** With `X_SIGNED = 1`, `x` and `y` are two's
complement. Such an input is just an SW vector whose top digit has negative
weight. That digit's sign therefore flips in every partial product, and
nothing else changes: there is still no sign extension. The range
`-2^(N-1)*R .. (2^(N-1)-1)*R` fits in the same `OW` bits. The default is
unsigned.

## The two example graphs

**`example_graph_fig2`** is a three-counter graph on a 4-bit unsigned input:

    C1 + S1 = 4x + 2x + x
    C2 + S2 = S1 + x + x
    C3 + S3 = C1 + C2 + 2*S2
    y       = C3 + S3          (final stage adder)

Eliminating the intermediate vectors gives `y = 9x + S1`. Counter 2 adds
`x + x`, so `C2 = 2x` and `S2 = S1`. Since `S1 = 4x ^ 2x ^ x`, the graph is
*not* a constant multiplier. It shows how a candidate graph is turned into
gates and what its function is.

**`example_bitserial_fig3`** applies the same idea to bit streams. It has two
full adders, a half adder and two registers:

    w3 = 2*x1 (register)        2*w5 + w6 = x1 + w3 + w4   (FA)
    w9 = 2*w8 (register)        2*w4 + w7 = x2 + w9        (HA)
                                2*y  + w8 = w5 + w6 + w7   (FA)

This gives `2y = 3*x1 + x2 - w4 - w5 + w8`. The carries `w4`, `w5` and `y`
are used directly, without a register, so the circuit is not an adder. The
streams `w4`, `w5` and `w8` are module outputs, so the relation can be
watched.

Once the inputs are zero, the loop `w8 -> register -> HA -> FA -> w8` can
keep a 1 going for ever. The stream `...1111` is a negative number when bit
streams are read as 2-adic integers. The relation therefore holds modulo
`2^T` over `T` observed cycles. If a word starts with the register holding
`w9(0)`, that value is added on the right-hand side. Both testbenches check
the relation in this form.

## Bit-serial adders

All bit-serial circuits follow the same conventions:

* Streams are LSB first, one bit per rising edge of `clk`.
* Multiplying a stream by 2 is one cycle of delay (`bs_register`).
* An output bit of weight `2^t` appears combinationally in the cycle where
  the input bits of weight `2^t` are applied, so latency is 0 cycles.
* `rst` is synchronous and active high. It clears every register.

**`bs_multiop_adder`** adds `NOPS` streams. In each cycle the pool holds:

* the `NOPS` input bits,
* the `NOPS-1` carries saved in the previous cycle.

All of these bits have the same weight. `NOPS-1` full adders reduce the
`2*NOPS-1` bits to a single output bit. Each full adder's carry goes through
its own register into the next cycle's pool. The pool is consumed as a
queue: adder `j` takes entries `3j..3j+2` and appends its sum. This forms a
Wallace-like tree about `log3(2*NOPS)` full adders deep. With `NOPS = 2` it
is the classic serial adder.

A sum of `B`-bit words needs `B + clog2(NOPS)` cycles. Zeros fed in those
extra cycles flush every carry register back to 0, so the next word can
follow without a reset.

**`bs_multiply_adder`** works as follows:

* Each input passes through a chain of `bs_register`s.
* Every set bit `b` of its coefficient taps the chain after `b` registers,
  giving `2^b * x`.
* The taps go to a `bs_multiop_adder`.

For `3*x1 + 5*x2` the taps are `x1`, `2*x1`, `x2` and `4*x2`: three
registers and a 4-operand adder. A word takes `B + clog2(K1+K2+1)` cycles.

## Top level (`egg_top`)

| ports | circuit |
|---|---|
| `mult_x[15:0]` -> `mult_y[29:0]` | multiplier, `R = MULT_R` |
| `g2_x[3:0]` -> `g2_y[7:0]` | 3-2 counter example graph |
| `g3_x1`, `g3_x2` -> `g3_y`, `g3_w4`, `g3_w5`, `g3_w8` | bit-serial example graph |
| `add_x[7:0]` -> `add_y` | `ADD_NOPS`-operand bit-serial adder |
| `madd_x1`, `madd_x2` -> `madd_y` | multiply-adder `MADD_K1*x1 + MADD_K2*x2` |

The parameters are `MULT_N = 16`, `MULT_R = 10075`, `ADD_NOPS = 8`,
`MADD_K1 = 3` and `MADD_K2 = 5`. After synthesis the top is about 560
word-level cells and 15 flip-flops.

## How far to trust it, and what is this design's own

**Verified by simulation:**

* The multiplier gives the exact product for `R = 10075`, for thirteen
  further 16-bit coefficients (971, 8967, 12345, 19444, 23719, 27937, 32168,
  33591, 41123, 45995, 57091, 59077, 61073) and for `R = 1` and `R = 3`.
  Each coefficient was tested with random and corner-case inputs. Five of
  them were also tested with a signed `x`.
* The bit-serial adders give exact sums for 2 to 10 operands, with words
  back to back.
* The multiply-adder gives exact results for `(3, 5)` and `(7, 2)`.
* Both example graphs match their equations.

Every testbench has been shown to fail on a deliberately broken copy of its
module.

**Taken from the method:**

* the node types and their equations,
* the rule that a counter digit becomes wire, half adder or full adder by
  its number of live inputs,
* signed-weight operands whose negative digits need no sign extension,
* a final adder with bias cancellation,
* the two example graphs,
* the target functions: a 16-bit multiplier by 10075, n-operand bit-serial
  adders for n = 2 to 10, and `3*x1 + 5*x2`.

**This design's own choices:**

* Reduction topologies. The multiplier tree, the adder tree and the
  multiply-adder taps are regular constructions, not the output of a graph
  search. Area (counted as interconnections) and delay will differ from
  those of searched graphs.
* The internal construction of the SW counter: inversion of minority-sign
  inputs, with ties counted as positive.
* The bias folded into a single constant operand of the final adder.
* CSD recoding of the coefficient.
* Unsigned multiplicand by default, and the `X_SIGNED` option.
* All vector widths.
* The synchronous reset.
* LSB-first stream order and zero latency.
* The extra `w4`/`w5`/`w8` outputs of the bit-serial example.
* Fixed shifts are index offsets inside the modules, not modules of their
  own, since they contain no logic.
* Counter outputs that branch to several later nodes are ordinary fan-out.
  There is no separate "2-way/3-way branch" counter node.

The graph search itself (fitness evaluation, crossover, mutation, selection)
is software and is not part of this RTL.

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/egg_pkg.sv \
        tb/tb_egg_top.sv --top-module tb_egg_top -Mdir obj_tb_egg_top
    ./obj_tb_egg_top/Vtb_egg_top

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package
must be named first. `-Wno-fatal` keeps the few remaining lint warnings
(unused top carry bits, which are dropped on purpose) from stopping the
build.

Swap in any other testbench:

| testbench | covers |
|---|---|
| `tb_egg_pkg` | CSD recoding, mask rules, tree layout of 10075 |
| `tb_counter32` | 3-2 counter with wire, half adder and full adder digits |
| `tb_sw_counter32` | SW counter over five sign patterns |
| `tb_final_stage_adder` | final adder, mixed signs |
| `tb_const_coeff_mult` | multiplier for 16 coefficients |
| `tb_example_graph_fig2` | counter example graph, exhaustive |
| `tb_bs_full_adder`, `tb_bs_half_adder`, `tb_bs_register` | bit-serial nodes |
| `tb_example_bitserial_fig3` | bit-serial example graph and its relation |
| `tb_bs_multiop_adder` | n = 2..10 operands |
| `tb_bs_multiply_adder` | `(3, 5)` and `(7, 2)` |
| `tb_egg_top` | the whole top at default parameters, all circuits at once |

`tb_egg_top` also counts these events and fails if one never happens:

* a product wider than the input,
* a non-zero nonlinear term in the counter graph,
* the bit-serial loop holding a 1,
* carries flushed after an adder word,
* carries flushed after a multiply-adder word,
* words back to back without reset.

All testbenches finish in well under a second.

## Changing it

* **Another coefficient or input width:** set `R` and `N` on
  `const_coeff_mult`, or `MULT_R` and `MULT_N` on `egg_top`. The CSD digits,
  the tree, all masks and the output width `N + clog2(R+1)` follow
  automatically. `N + clog2(R+1) + 2` must stay at or below 64.
* **Another operand count:** set `NOPS` (at least 2).
* **Another multiply-adder:** set `K1` and `K2`. There must be at least two
  set bits between them.
* **Different tree shapes:** the grouping rule lives in two places:
  `egg_pkg::tree_mask` / `tree_nops` / `tree_levels` (masks) and the
  `g_lvl` generate loop of `const_coeff_mult` (wiring). Change both together.
