# Word-serial multiplier-squarer for GF(2^k)

Elliptic-curve and exponentiation algorithms spend most of their time in two
finite-field operations on the same operand: a product `A*B mod H` and a square
`A*A mod H`. This core computes both in a single pass over the operands.
Squaring comes almost free, because both results accumulate multiples of the
same shifted copies of `A`. Only `l` bit-columns of logic are built; a k-bit
field (k = 409 by default) is processed as `L = ceil(k/l)` words of `l` bits
(l = 32 by default), one word per clock cycle. Area grows with `l`, and
latency with `k/l`. That makes the core a fit for small embedded
crypto engines with a 32-bit word.

The architecture (a bipartite multiply-square loop mapped by a non-linear
schedule onto a 1 x l semi-systolic array, followed by a 1 x l post-processing
array) is a published one. The RTL here follows it: the processing elements,
the FIFO sizes and the control timing. Where the published description leaves
something open, the choice made here is stated below and in the opening
comment of each file.

## The arithmetic

The polynomial basis is used: `A = sum a_j x^j`, with `H` monic of degree k.
The core needs two reduction constants, both k bits:

* `h`: the coefficients of `x^k mod H`, i.e. `H` without its leading term;
* `hp` (H'): `x^(k+1) mod H`, which the user supplies precomputed
  (`hp = (h << 1) ^ (h[k-1] ? h : 0)`, truncated to k bits).

The multiplier bits are split into even and odd positions, so each loop
iteration consumes two bits of `B` (for the product) and two bits of `A`
(for the square). With `g = ceil(k/2)` iterations:

```
A0 = A; C = D = Q = R = 0
for i = 1 .. g:
    C ^= b[2i-2]*A ; D ^= b[2i-1]*A       (product, even and odd bits)
    Q ^= a[2i-2]*A ; R ^= a[2i-1]*A       (square, same A, A's own bits)
    A  = A * x^2 mod H
P = (C + x*D) mod H
S = (Q + x*R) mod H
```

Bit by bit, `A * x^2 mod H` is `a'_j = a_{j-2} ^ a_{k-2} h_j ^ a_{k-1} h'_j`,
so every column needs only its neighbour two places to the right plus the two
top bits of `A`. Those two bits are broadcast to every column. The final
step is `p_j = c_j ^ d_{k-1} h_j ^ d_{j-1}`, and likewise `s_j`. When k is
odd, the last iteration uses `b_k = a_k = 0`.

## From columns to words

Column `j` of the k-column computation is handled by processing element (PE)
`m = (k-1-j) mod l`. The columns are grouped into words from the most
significant end. If `l` does not divide `k`, the operands are padded at the
bottom with `gamma = L*l - k` zero columns. Those columns stay zero
throughout (their `h`, `h'` are zero). Iteration `i` occupies `L`
consecutive cycles (time instances `n = (i-1)L+1 .. iL`), processing word 0
(most significant) first. After `g` iterations, `L` more cycles run the
post-processing array. One operation therefore takes

    (g + 1) * L cycles      k = 409: l = 32 -> 2678, l = 16 -> 5356, l = 8 -> 10712

Between iterations, the words of `A, C, D, Q, R, H, H'` circulate through
FIFOs of depth `L`: a word leaves the array and comes back exactly when the
same word of the next iteration is processed.

### The two-column shift across word boundaries (FIFO-a, FIFO-dd, FIFO-rd)

This is the least obvious part of the design. The rightmost two PEs of word
`t` need `a_{j-2}`, which lies in word `t+1`: the two most significant bits of
the next lower word. In the same iteration, word `t+1` has not been seen yet.
The previous iteration did see it, one cycle after word `t`. So:

* every cycle, the new top two bits of the word (`a_d`, `a_e`, from PEs 0 and
  1) enter **FIFO-a**, 2 bits wide and `L-1` deep. They come back one cycle
  earlier than the full word, in the slot of word `t` of the next iteration.
* the array's A input is therefore `l+2` bits: `{FIFO-A word, FIFO-a bits}`.
  During the first iteration it comes from the input register, which also
  provides 2 bits of look-ahead.
* in the last word of an iteration those two bits lie below column 0. The
  `v` strobe (active low) forces them to zero through two AND gates.

The post-processing step has the same problem one column narrower (`d_{j-1}`).
**FIFO-dd** and **FIFO-rd** (1 bit, `L-1` deep) carry the top bit of each
D and R word, and the post-processing array's `v` gate zeroes it in the last
word.

### Broadcast bits and their keepers

`a_{k-1}` and `a_{k-2}` are the top bits of word 0, so they are visible only
in the first cycle of an iteration. In that cycle (`u = 0`, active low), the
leftmost PE drives them onto a horizontal line to all PEs. In the published
circuit this is a pair of tri-state buffers. Here it is a drive-enable, and a
small keeper register holds the line for the remaining `L-1` words. The
post-processing array does the same for `d_{k-1}` and `r_{k-1}`. The four
loop bits `b_{2i-2}, b_{2i-1}, a_{2i-2}, a_{2i-1}` come from `bit_sched`. It
holds copies of `B` and `A` that shift down by two at the end of each
iteration; their low bits are the four flip-flops feeding the broadcast.

## Control timeline

Time instance `n` runs from 1 to `(g+1)L`, and `t` is the word within the
iteration:

| strobe | active at | effect |
|---|---|---|
| `in_sel` | `1 <= n <= L` | M_a, M_h, M_h' take words from the input registers |
| `fifo_clr` | start cycle | FIFO-C/D/Q/R hold zero words (initial C, D, Q, R) |
| `ss_u_n = 0` | `n = (i-1)L+1`, `i <= g` | broadcast `a_{k-1}`, `a_{k-2}` |
| `ss_v_n = 0` | `n = iL`, `i <= g` | zero `a_{-1}`, `a_{-2}`; next bit pair |
| `pp_en` | `gL+1 <= n <= (g+1)L` | post-processing pass gates open, P/S load |
| `pp_u_n = 0` | `n = gL+1` | broadcast `d_{k-1}`, `r_{k-1}` |
| `pp_v_n = 0` | `n = (g+1)L` | zero `d_{-1}`, `r_{-1}` |

## Interface (`gf2k_msq_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one cycle while idle: capture `a, b, h, hp` and begin |
| `a`, `b` | in | K | operands |
| `h`, `hp` | in | K | `x^k mod H`, `x^(k+1) mod H` |
| `busy` | out | 1 | high for exactly `(g+1)L` cycles |
| `done` | out | 1 | one-cycle pulse after the last cycle |
| `p`, `s` | out | K | `A*B mod H`, `A*A mod H`; held until the next result |

The operands may change once `start` has been sampled. A `start` while busy
is ignored. Parameters: `K` (field size, default 409) and `LW` (word size,
default 32). They need `LW >= 2` and `K > LW`; otherwise elaboration stops
with an error. `H` need not be irreducible: the core computes the products
modulo any monic `H`.

## Cost at the default size

Per bit-column, the semi-systolic PE has 6 AND and 6 XOR gates. The
post-processing PE has 2 AND, 4 XOR and 4 pass gates. Around the arrays sit
four v gates and three input multiplexers of l+2, l and l bits (3l+2 bits in
all). At k = 409, l = 32 the storage comes to 5882 flip-flops:

| storage | bits |
|---|---|
| FIFO-C/D/Q/R/H/H'/A, 7 x 32 bits x 13 words | 2912 |
| FIFO-a (2 x 12), FIFO-dd and FIFO-rd (1 x 12 each) | 48 |
| input registers A (416 + 2 look-ahead), H, H' (416 each) | 1250 |
| loop-bit registers (copies of A and B) | 822 |
| result registers P, S (416 each, 409 visible) | 832 |
| controller and broadcast keepers | 18 |

The arrays grow with `l`. The FIFOs hold about 7k bits whatever `l` is.

## Files

| file | contents |
|---|---|
| `rtl/msq_pkg.sv` | size functions (`L`, `g`, latency) and the control struct |
| `rtl/ss_pe.sv`, `rtl/ss_pe_lead.sv` | semi-systolic PE; leftmost PE with the `a_{k-1}, a_{k-2}` buffers |
| `rtl/ss_array.sv` | 1 x l semi-systolic array, v gates, broadcast keeper |
| `rtl/pp_pe.sv`, `rtl/pp_pe_lead.sv` | post-processing PE (pass gates T_c..T_r); leftmost PE with the `d_{k-1}, r_{k-1}` buffers |
| `rtl/pp_array.sv` | 1 x l post-processing array, v gates, keeper |
| `rtl/msq_fifo.sv` | fixed-delay FIFO (register chain, synchronous clear) |
| `rtl/word_in_reg.sv` | input registers A, H, H' read word by word |
| `rtl/word_out_reg.sv` | result registers P, S filled word by word |
| `rtl/bit_sched.sv` | the four per-iteration broadcast bits |
| `rtl/msq_ctrl.sv` | time-instance counter and strobe decoder |
| `rtl/gf2k_msq_core.sv` | top level: the datapath of the core |

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. For example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/msq_pkg.sv \
    tb/tb_gf2k_msq_core.sv --top-module tb_gf2k_msq_core -o sim
./obj_dir/sim
```

* `tb_gf2k_msq_core`: default size (k = 409, l = 32). It runs 24
  operations with the NIST trinomial `x^409 + x^87 + 1` and with random
  polynomials. Results are compared with a bit-serial shift-and-add
  reference, and each operation must take exactly 2678 cycles. It also counts
  that every mechanism above was exercised: input multiplexers, both u
  broadcasts and v gates, both keepers, non-zero FIFO-a traffic, the FIFO
  clear, and an ignored start.
* `tb_msq_core_configs`: further sizes through `tb/msq_core_harness.sv`.
  These are the k = 5, l = 3 example (all 1024 operand pairs), k = 8 / l = 4
  (no padding), k = 7 / l = 2, k = 163 / l = 16, k = 233 / l = 32, and
  k = 409 with l = 16 and l = 8 (5356 and 10712 cycles).
* one unit testbench per module (`tb_ss_pe`, `tb_ss_array`, `tb_pp_array`,
  `tb_msq_fifo`, `tb_msq_ctrl`, ...). The PE tests are exhaustive. The
  array tests compare with word-level formulas. The controller test checks
  every strobe at every time instance against the table above.

## Where this RTL departs from, or reads into, the published design

* **Tri-state buffers** (the `u` buffers and the pass gates T_c, T_d, T_q,
  T_r) are written as two-state logic. A buffer becomes an enable plus a
  value; a closed pass gate gives 0. The broadcast lines get an explicit
  keeper register, reset to 0.
* **Source of `d_{k-1}`, `r_{k-1}`.** In the published drawing of the
  leftmost post-processing PE, the buffers sit on the `d_{j-1}` line, which
  at that column carries `d_{k-2}`. The accompanying description says they
  pass `d_{k-1}` and `r_{k-1}`. This RTL follows the description: the D and R
  inputs of the post-processing array are `l+1` bits (the word, plus the
  FIFO-dd bit), and the buffers tap the word's top bit.
* **Odd k.** The published core hands D and R to the post-processing array
  one step earlier than C and Q when k is odd. Here they are taken in the
  same cycle. The last iteration multiplies D and R by `b_k = a_k = 0`, so the
  values are the same.
* **Operand interface.** How the operands reach registers A, H, H' is not
  described. Here they are loaded in parallel with `start` and shifted out a
  word per cycle. The A register supplies the 2 extra look-ahead bits.
  `bit_sched` supplies the loop bits from its own copies of A and B.
* **Handshake.** `start`, `busy` and `done` are this design's choice, as is
  holding the FIFOs while idle. A new operation starts only after the
  previous one has finished; consecutive operations are not overlapped.
* **FIFOs** are register chains with a synchronous clear, which is the
  simplest structure with the required fixed delay.
* The complexity and synthesis results reported for the published design
  (gate counts, area, delay, power) are not reproduced by this RTL. Only the
  latency formula `(g+1)*ceil(k/l)` is checked, in simulation.
* **Flip-flop count.** The published cost comparison counts flip-flops as
  falling with the word size (order k/l). This RTL builds the FIFOs to the
  described shape, l bits wide and L words deep. That puts their storage at
  about 7k bits for every word size (2912 + 48 bits at k = 409, l = 32), so
  this RTL does not show that trend.
