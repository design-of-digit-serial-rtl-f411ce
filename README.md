# Digit-serial multiple constant multiplication and FIR filters

A transposed-form FIR filter spends most of its hardware multiplying one input
sample by every coefficient. Because the coefficients are fixed, those
multiplications can be built from additions, subtractions and shifts, and
products that share partial results (7x inside both 29x and 43x, say) can share
the hardware. This is the *multiple constant multiplication* (MCM) block.

This RTL builds that block, and the filter around it, **digit-serially**: every
number travels as a stream of d-bit digits, least significant digit first, one
digit per clock cycle. Each adder then needs only d full adders and one carry
flip-flop, whatever the word length. The cost is time: a word of L digits takes
L cycles. A left shift is no longer free wiring. It becomes a delay of a few
flip-flops, so shifts are shared as well: a node of the network that is needed
shifted by 1 and by 2 bits gets one 2-bit chain, and the 1-bit shift is a tap
on it. The digit size d sets the trade between area and latency: d = 1 is
bit-serial, and larger d gives fewer cycles but more full adders.

The default configuration is the small worked example behind the design. Here
x is signed 16-bit, d = 2, and the network is

```
 7x = (x << 3) - x
29x = (7x << 2) + x
43x = 29x + (7x << 1)
```

That is two digit-serial adders, one digit-serial subtractor and five shift
flip-flops. Both products come out after 11 cycles.

## Blocks

| file | what it is |
|---|---|
| `ds_pkg.sv` | A-operation record `aop_t`, architecture enum, bit-length helpers |
| `ds_add.sv` | digit-serial adder: d full adders, carry flip-flop reset to 0 per word |
| `ds_sub.sv` | digit-serial subtractor: b inverted, carry flip-flop set to 1 per word |
| `ds_shift.sv` | left-shift chain of MLS flip-flops with a tap for every shift 0..MLS |
| `mcm_shiftadds.sv` | the MCM network, generated from a list of A-operations |
| `ds_constmult.sv` | alternative multiplier: sequential radix-2^d constant multiplier |
| `ds_ctrl.sv` | word counter: digit index, first/last digit, `init` pulse |
| `ds_storage.sv` | digit-serial to parallel shift register |
| `ds_wordreg.sv` | one-sample delay of the filter chain (L digits) |
| `ds_mcm.sv` | complete MCM design: counter + network + one storage per product |
| `ds_fir.sv` | complete transposed FIR filter |
| `safir_top.sv` | top: `ds_mcm` and `ds_fir` side by side, each with its own ports |

## Words, digits and the `init` pulse

This is the part to understand before anything else. All blocks share one
timing rule:

* A **word** is L digits. The input sample is signed N-bit. The source
  sign-extends it to d·L bits and sends digit k in cycle k of the word.
  Words follow each other with no gap, so one sample enters every L cycles.
* `ds_ctrl` counts the digit index. Its `first` output marks digit 0, and
  sources align to it. Its `init` output is high in the last digit of every
  word and during reset.
* Every flip-flop that carries state *within* a word is loaded with its start
  value on `init`. The adder carries are loaded with 0, the subtractor carries
  with 1 (the +1 of two's complement), and the shift chains are cleared so that
  zeros enter below the least significant bit. So the cycle after `init` starts
  a clean word.
* Flip-flops that carry state *between* words (the filter's sample delays) are
  not touched by `init`.

All arithmetic is modulo 2^(d·L), so bits shifted out at the top are simply
lost. L is chosen so that every result fits:

* MCM design: `L = ceil((bw + N) / d)`, where bw is the bit length of the
  largest target constant. Defaults: ceil(22/2) = 11.
* Filter: `bw_y = ceil(log2(sum |h|)) + N` and `L = ceil(bw_y / d)`.
  Defaults: h = 29, 43, so bw_y = 7 + 16 = 23 and L = 12.

Results leave the digit-serial world through `ds_storage`. Each cycle it
shifts the new digit in at the top. After the last digit of the word, the
parallel word is valid for one cycle, flagged by `valid` / `y_valid` (the cycle
after digit L-1). The latency from digit 0 to valid is therefore exactly L
cycles.

In `ds_mcm` products have different lengths: 29x needs bitlen(29) + N bits and
43x needs bitlen(43) + N. The storage of a product shifts only while the digit
counter is below its own digit count, then holds. At the end of the word every
storage therefore holds its own product, aligned at bit 0. Outputs are sign
extended to bw + N bits.

A target need not be a node of the network itself. Any non-zero integer
t = ±c·2^e works if its odd part c is a node: the factor 2^e is a `ds_shift`
of e bits, and a minus sign is a `ds_sub` from zero, both in front of the
storage. bw is then the bit length of the largest |t|.

## The shift-adds network (`mcm_shiftadds`)

The network is a parameter: `OPS` is a packed array of `aop_t`. Entry i
defines node i+1 as `(node[u] << lu) + (node[v] << lv)`, or `-` when `sub` is
set. Node 0 is x. A constant function computes the constant of every node at
elaboration. An operation that uses a node not yet computed, or that does not
give a positive constant, stops elaboration with `$error`. Write subtractions
with the larger operand first.

For each node the generator finds the largest shift any operation takes of it.
It builds one `ds_shift` of that length. All other shifts of the node are taps
of that chain. Inside `ds_shift` the bits are kept as one history vector of the
last MLS stream bits. This is the same set of flip-flops as d separate layers
(bit i of a digit lands in bit (i + ls) mod d after floor or ceil(ls/d)
cycles). There are exactly MLS of them.

Choosing the operation list is an optimisation problem outside the hardware.
Good lists come from algorithms that minimise gate-level area: they count
adders, subtractors and shift flip-flops at their real cost. To use another
network, write its list with `ds_pkg::aop(u, lu, v, lv, sub)`:

```systemverilog
mcm_shiftadds #(.D(2), .NOPS(3),
  .OPS({ds_pkg::aop(2,0,1,1,0), ds_pkg::aop(1,2,0,0,0), ds_pkg::aop(0,3,0,0,1)})) ...
```

(The last element of the concatenation is operation 0.) The network has no
right shifts, and its outputs are positive odd multiples only.

## The filter (`ds_fir`)

`y(n) = sum_j H[j] x(n-j)` is built in transposed form:

```
s[K-1] = p[K-1];   s[j] = z^-1(s[j+1]) +/- p[j];   y = s[0]
```

Each coefficient is split as `sign · c · 2^e` with c odd. The product c·x is
taken from the multiplier block, and 2^e is a `ds_shift` of e bits.
Coefficients with the same odd part (say 6, 12 and 24) share one chain, sized
for the largest shift, and take the smaller shifts from its taps. The sign
decides whether tap j's chain element is a `ds_add` or a `ds_sub`. A negative
coefficient at the far end subtracts from zero, and a zero coefficient only
forwards the delayed sum. Each z^-1 is a `ds_wordreg` of L digits, so a word
comes out exactly one sample period later, on the same digit index.

The multiplier block is selected by `ARCH`:

* `ARCH_SHIFT_ADDS` (default): the shared `mcm_shiftadds` network given by
  `OPS`. Every odd part of a coefficient must be one of its nodes; this is
  checked at elaboration.
* `ARCH_CONST_MULT`: one `ds_constmult` per distinct odd constant, with no
  sharing. It needs no operation list, so it is the easy way to try arbitrary
  coefficient sets.

`ds_constmult` works like this. Each cycle the input digit selects one of the
multiples 0, c, …, (2^d−1)c. That multiple is added to the stored partial sum
shifted right by d. The low d bits of the sum are the next product digit. The
store is bitlen(c)+N bits wide. After ceil(N/d) digits of an unsigned x it
holds c·x in parallel (`pps`). When sign-extension digits keep coming, the
output digits continue as the two's complement product, which is how the filter
uses it.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `D` | all | 2 | digit size d (1 = bit-serial). Must be less than N |
| `N` | ds_mcm, ds_fir, ds_constmult | 16 | input width |
| `NOPS`, `OPS` | mcm_shiftadds, ds_mcm, ds_fir | 7x/29x/43x network | the A-operations |
| `NT`, `TGT` | ds_mcm | 2, {29, 43} | constants returned in parallel (signed, non-zero) |
| `NTAP`, `H` | ds_fir | 2, {29, 43} | filter coefficients h0, h1, … (signed) |
| `ARCH` | ds_fir, safir_top | `ARCH_SHIFT_ADDS` | multiplier block |

The widths of `safir_top`'s ports are written for its own defaults, so change
`D`/`N` on `ds_mcm` / `ds_fir` directly.

## Departures and choices

* **Sample delay size.** A filter register could be read as d flip-flops, one
  digit. That delays a word by one digit, not by one sample, and would not
  compute the filter. The delays here hold a full word of L digits
  (d·L flip-flops).
* **Constant-multiplier adder width.** The textbook width ceil(log2((2^d−1)c))
  is one bit short for some constants (c = 5, d = 1 overflows). The adder is
  bitlen(c)+d bits. The store width is still bitlen(c)+N whenever d divides N.
* **Product widths** use bitlen(c) rather than ceil(log2 c). They differ only
  for powers of two, and are never narrower.
* **Storage enable** shifts while the counter is *below* the product's digit
  count.
* **Filter output width** is ceil(log2(sum |h|)) + N. One corner case
  overflows: sum |h| a power of two, all coefficients negative, and
  x = −2^(N−1).
* **Chosen where nothing was specified:**
  * synchronous active-high resets;
  * the `init` pulse in the last digit of each word;
  * a one-cycle `valid`;
  * signed inputs, sign-extended by the source;
  * back-to-back words.
* **Not built:**
  * a parallel-to-serial input stage;
  * holding the parallel outputs beyond one cycle;
  * bit-parallel operation (d = N), where the latency formula does not apply;
  * right shifts inside A-operations.
* **Defaults** are the small worked example, because the coefficient sets of
  the large benchmark filters (40–300 taps, 8–16-bit coefficients) are not
  available. `tb_filter4_sized` stands in with a generated 200-tap
  coefficient set (|h| ≤ 3000, held as 16-bit words) whose output is 35 bits,
  like that of the largest benchmark filter. It runs at d = 1, 2, 4 and 8 and
  gives one output every 35, 18, 9 and 5 cycles, with constant multipliers.
  `tb_filter4_shiftadds` runs the same filter on a shift-adds network at
  d = 1 and 8. No optimised network exists for that set, so the testbench
  builds a plain one: every odd constant is reached through its odd low-order
  prefixes, each one addition, sharing prefixes. That gives 334 operations
  for 195 odd constants, several times what a good algorithm would need, but
  it exercises the network generator at full scale.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against
values computed directly in the testbench, and each ends with
`TB_RESULT checks=N failures=M`.

| testbench | covers |
|---|---|
| `tb_ds_add`, `tb_ds_sub` | random and corner words, d = 3, word-level (a ± b) mod 2^15 |
| `tb_ds_shift` | every tap 0..7 against (a << ls), d = 3; flip-flop count = MLS |
| `tb_ds_ctrl`, `tb_ds_storage`, `tb_ds_wordreg` | framing, parallel conversion and hold, L-cycle delay |
| `tb_ds_constmult` | serial product mod 2^(dL) and store contents after ceil(N/d) digits, c = 29 (d = 2) and c = 5 (d = 3) |
| `tb_mcm_shiftadds` | 1x, 7x, 29x, 43x at d = 2 and d = 1; five shift flip-flops |
| `tb_ds_mcm` | 11-cycle latency, both products; a d = 4 design with targets 7 and −86 (shift, negation, and a shorter product whose storage holds) |
| `tb_ds_fir` | default filter, plus a 7-tap filter (negative, even, zero and unit taps) on both multiplier blocks |
| `tb_safir_top` | whole top at default sizes, both halves, extreme samples, mid-run filter reset |
| `tb_safir_arch` | same, with the constant-multiplier filter |
| `tb_filter4_sized` | 200-tap, 35-bit-output filter at d = 1, 2, 4, 8, constant multipliers |
| `tb_filter4_shiftadds` | same filter on a 334-operation shift-adds network, d = 1 and 8 |
| `tb_filter4_mcm` | `ds_mcm` with 200 signed, even 16-bit targets on that network: 32, 16, 8, 4 cycles per word at d = 1, 2, 4, 8 |

`fir_harness.sv` and `mcm_harness.sv` are the shared stimulus and checkers for
the filter and MCM tests. To run
one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ds_fir \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ds_pkg.sv tb/tb_ds_fir.sv
./obj_dir/Vtb_ds_fir
```

Most testbenches finish in seconds. `tb_filter4_sized` takes about a minute
to build and run, `tb_filter4_shiftadds` about three and `tb_filter4_mcm`
about four.
