# Adders on split even/odd Manchester carry chains

A Manchester carry chain (MCC) computes the carries of a carry look-ahead
adder as one chain of pass transistors (or domino stages): carry `i` waits for
carry `i-1`. This design breaks that dependency. The carry recurrence is
unrolled once, so that every carry depends only on the carry **two** positions
below it. The even bit positions then form one carry chain and the odd
positions a second one. The two chains do not depend on each other and run
side by side, so an 8-bit adder needs two 4-stage chains instead of one
8-stage chain. Each chain is a multi-output gate: every stage's carry is tapped
off and used.

On top of this 8-bit adder core sit two larger adders, each built from two of
these adders:

* a **residue (modulo-M) adder**, two adders and a multiplexer;
* a **one-digit BCD adder**, a binary add followed by a "+6 when over 9"
  correction.

All of it is combinational logic. The circuit this describes is meant for
clocked domino gates, which precharge and then evaluate. The RTL gives the
logic function those gates evaluate; it does not model the precharge phase.

## The carry recurrence

Per bit `i` of the operands `a`, `b`:

| signal | formula | meaning |
|---|---|---|
| `g_i` | `a_i & b_i` | generate |
| `p_i` | `a_i ^ b_i` | XOR propagate (also the half sum) |
| `t_i` | `a_i \| b_i` | OR propagate ("transmit": does not kill a carry) |

The usual recurrence is `c_i = g_i + t_i·c_(i-1)`. Substituting it into
itself once, and using the fact that `g_i = 1` implies `t_i = 1`, gives

```
c_i = t_i · h_i
h_i = G_i + P_i · h_(i-2)
G_i = g_i + g_(i-1)                 (new generate)
P_i = p_i · p_(i-1) · t_(i-2)       (new propagate)
```

`h_i` is the "intermediate carry" that the chains produce. The true carry
needs one more AND with `t_i`. This is done where the sum is formed, outside
the chain.

Why the `p` (XOR) factors in `P_i`? They do not change the logic value of
`h_i`: every case they exclude is already covered by `G_i`. What they buy is
that `G_i` and `P_i` are **never 1 at the same time**, because a position never
both generates and XOR-propagates. In a domino chain this means the generate
and propagate pull-down paths never fight, so no node discharges falsely. The
testbench `tb_new_gp_gen` checks both properties exhaustively: mutual
exclusion, and the fact that `t_i·h_i` equals the true carry of `a+b+cin`.

### Boundary positions

Positions 0 and 1 have no neighbour at `i-1` or `i-2`. This design takes
`g_(-1) = 0` and `p_(-1) = t_(-2) = 1`:

```
G_0 = g_0          P_0 = p_0
G_1 = g_1 + g_0    P_1 = p_1 · p_0
```

The adder's carry-in enters at the foot of **both** chains:

```
even chain:  h_0 = G_0 + P_0·cin,   h_2 = G_2 + P_2·h_0,  h_4 = ..., h_6 = ...
odd chain:   h_1 = G_1 + P_1·cin,   h_3 = G_3 + P_3·h_1,  h_5 = ..., h_7 = ...
```

Sum bits: `s_0 = p_0 ^ cin` and `s_i = p_i ^ c_(i-1)` with `c_i = t_i·h_i`.
The carry out is `c_7`.

## Modules

| module | role |
|---|---|
| `mcc_pkg` | shared defaults: 8-bit core, 4-stage chains, BCD digit constants |
| `gp_gen` | `g`, `p`, `t` per bit |
| `new_gp_gen` | `G_i`, `P_i` |
| `mcc_carry_chain` | one multi-output chain: `h_k = G_k + P_k·h_(k-1)`, all taps out; instantiated once for even and once for odd positions |
| `sum_gen` | `c_i = t_i·h_i`, `s_i = p_i ^ c_(i-1)`, carry out |
| `mcc_cla` | the adder: the four blocks above wired together |
| `residue_adder` | `(a + b) mod M` from two `mcc_cla` and a mux |
| `bcd_adder` | one BCD digit from two `mcc_cla` |
| `hs_adders_top` | the three adders side by side |

`mcc_cla` ports: `a`, `b` (`WIDTH`), `cin`. Outputs: `s` (`WIDTH`), `cout`,
and `c` (`WIDTH`), the carry out of **every** position. The multi-output
chains make these intermediate carries available at no extra cost, and the BCD
adder uses one of them. `WIDTH` must be even. It defaults to 8, and then the
chains are 4 stages long. Other even widths work (a 16-bit instance is tested),
but the chains get `WIDTH/2` stages long.

## Residue adder

`residue_adder #(N = 8, M = 6)` computes `r = (a + b) mod M`:

1. First adder: `{c1, s1} = a + b`.
2. Second adder: `{c2, s2} = s1 + (2^N − M)`. The constant is the N-bit two's
   complement of `M`, so this computes `s1 − M`.
3. If `c1 | c2`, then `a + b ≥ M` and the result is `s2`; otherwise it is
   `s1`. The output `corrected` is `c1 | c2`.

`c1` is needed when `a + b` overflows N bits. With the default `M = 6` this
cannot happen; with a modulus close to `2^N` (e.g. 251) it does. The result
is correct whenever `a + b < 2M`, which covers all operands below `M`. `M` is
an elaboration-time constant in `2 .. 2^N`. The default of 6 is the modulus of
the example the adder is presented with. For real use, set `M` to the modulus
of your residue system.

## BCD adder

`bcd_adder #(CLA_WIDTH = 8)` adds two decimal digits and a carry-in:

1. The digits sit in the low four bits of an 8-bit `mcc_cla`, with the upper
   bits zero. This gives the binary digit sum `z[3:0]`. The carry out of bit 3,
   `z4`, is read from the adder's per-position carry output `c[3]`.
2. `k = z4 | (z[3:0] > 9)`. Either way the binary sum (10..19) is not a
   decimal digit.
3. A second `mcc_cla` adds `0110` to `z[3:0]` when `k` is set, and `0000`
   otherwise. Its low four bits are the sum digit `s`; `k` is the decimal carry
   out `cout`.

The upper four bits of both 8-bit cores always carry zeros. Synthesis removes
them. They exist because the design puts this adder on the 8-bit core.
`CLA_WIDTH` can be any even value of 6 or more. Operands above 9 are outside
the adder's range.

## Top level and timing

`hs_adders_top #(WIDTH = 8, RES_M = 6)` brings out the three adders' ports
with prefixes `cla_`, `res_` and `bcd_`. Nothing is shared between them.
There are no clocks, resets or registers. Outputs are a combinational function
of the inputs, so an adder can be placed between registers of a surrounding
pipeline as needed. The logic depth of the carry path is that of a
`WIDTH/2`-stage chain plus the `t·h` AND and the sum XOR. The residue and BCD
adders add a second adder and a mux or compare in series.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_gp_gen` | all 8-bit operand pairs, each bit against AND/XOR/OR |
| `tb_new_gp_gen` | all operand pairs: `G`/`P` definitions, mutual exclusion, and `t_i·h_i` = true carry for both carry-ins |
| `tb_mcc_carry_chain` | all 2^9 inputs of a 4-stage chain against a generate-and-propagate path search |
| `tb_sum_gen` | all operand pairs; `h` is random where `t_i = 0` (the cell must ignore it there) |
| `tb_mcc_cla` | 8-bit exhaustive (sum, carry out, every carry); 16-bit random with forced full-length propagates |
| `tb_residue_adder` | moduli 6, 200, 251, 256, every operand pair below the modulus |
| `tb_bcd_adder` | all digit pairs and carry-ins, on 8-bit and 16-bit cores |
| `tb_hs_adders_top` | end to end through two tops (moduli 6 and 251). Counts each mechanism and fails if one never occurs: carry-in effect, full-length carry propagation, carry out, residue taken from the first adder, from the second adder by `c2`, and by first-adder overflow `c1`, BCD with no correction, with a correction for sums 10..15, and with a correction from a binary carry |
| `tb_hs_adders_full` | the top at its default parameters through all additions of all three adders |
| `tb_worked_examples` | the published 4-bit examples (bits listed LSB first): 14+8 and 13+9 on the carry chains, 2+9 mod 6 on the residue adder (also on the 8-bit default), and 1+4 in BCD. It checks both sums and per-position carries |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_mcc_cla \
          rtl/mcc_pkg.sv tb/tb_mcc_cla.sv
./obj_dir/Vtb_mcc_cla
```

Each finishes in well under a second.

## Where this departs from, or fills in, the source description

* **Domino clocking** (precharge/evaluate) is not modelled. The RTL is the
  logic the gates evaluate, and synthesis will map it to whatever cell style
  the library has. The multi-output structure survives only as the tapped
  chain outputs `h` and the per-position carries `c`.
* **The new propagate** is taken as `P_i = p_i·p_(i-1)·t_(i-2)`. This is the
  form for which the stated mutual exclusion of `G_i` and `P_i` holds.
* **Boundaries**: `g_(-1) = 0` and `p_(-1) = t_(-2) = 1`, with the carry-in at
  the foot of both chains, as described above. The true carry is `c_i = t_i·h_i`.
* **BCD correction test**: "sum over 9" is taken to include a binary carry out
  of the digit (sums 16..19).
* **Residue modulus** is a parameter, fixed at elaboration. Operand range:
  `a + b < 2M`.
* **Carry-in of the BCD adder** is this design's addition, so that digits can
  be chained.
* **Not included**: the conventional single-chain 4-bit MCC. It serves only as
  a point of comparison for speed and power. Those figures (delay and power in
  a 180 nm process) are circuit-level results that the RTL cannot reproduce.
