# Sub-word parallel, precision-scalable MAC engines

Neural-network layers rarely need the same arithmetic precision everywhere:
some tolerate 2-bit weights and activations, others need 8 or 16 bits. This
design serves all of them with **one 16-bit signed array multiplier that can
be split at run time** into 16/m independent m-bit sub-word multipliers
(m = 16, 8, 4 or 2). Lower precision then means more multiplications per
cycle from the same hardware, instead of idle bits.

The array can be split in two ways, and each gives an engine:

* **Sum Separate (SS)** keeps the 16/m sub-word products apart. Each product
  lands in its own 2m-bit field of the 32-bit output, and the carry paths
  between fields are cut. The SS engine accumulates every product in its own
  field of a wide, segmented register.
* **Sum Together (ST)** lets the array itself add the 16/m products, so the
  output is already a partial dot product. The ST engine needs only one
  narrow accumulator per multiplier pair.

Both engines compute a matrix-vector product `y = W x A` (a fully connected
layer) with 16 multipliers, a 32-bit activation bus and a 256-bit weight bus,
and both reach 16 x 16/m multiply-accumulates per cycle. The ST engine gets
this with far fewer register bits (8 x 42 instead of 16 x 112) and a linear
memory access pattern; the SS engine reads activations less often.

## The split multiplier (`sbw_mult`)

A 16 x 16 array multiplier adds a 16 x 16 grid of partial products
`x[i]·y[j]`, each at weight `2^(i+j)`. Cut both operands into sub-words of m
bits and the grid falls into (16/m) x (16/m) blocks; block (a, b) is exactly
the partial-product array of the small product `x_a · y_b`, placed at
weight `2^(m(a+b))`. The two modes only choose which blocks stay on; all
other partial products are gated to zero.

* **SS: diagonal blocks (a = b).** Block a sits at weight `2^(2m·a)` and
  fills bits `[2m·a, 2m·a + 2m)`. Killing the carry into every field boundary
  keeps the products apart: `p[2m·a +: 2m] = x_a · y_a`.
* **ST: anti-diagonal blocks (a + b = 16/m − 1).** All of them sit at the
  same weight `2^(m(16/m−1))`, so the ordinary carry chain adds them:
  `p = (Σ_a x_a · y_(16/m−1−a)) << m(16/m−1)`. The shift is 0, 8, 12 or 14
  bits for m = 16, 8, 4, 2. Note the pairing: weight sub-word a meets
  activation sub-word 16/m−1−a.

With m = 16 both modes are the plain 16 x 16 multiplier.

Signed operands use the Baugh-Wooley scheme, applied per active block. In
each block, the partial products that contain exactly one sign bit are
inverted (NAND instead of AND). A constant row then completes the
two's-complement correction. For an m x m block the constant is
`2^m − 2^(2m−1)` at the block's weight. In SS mode it is kept modulo
`2^(2m)` inside each field. In ST mode the constants of all active blocks
are added. This is why the summed result is an exact signed 32-bit number
and not just a value correct modulo 2^(2m). The masks, inversion patterns,
constants and carry-kill positions are computed at elaboration for each
mode, and `prec` selects one set at run time. The rows are written as a
ripple array (one row adder after another), the textbook array-multiplier
form. Carry-save reduction would be the obvious speed optimisation.

`hybrid_6b_mult` applies the same idea to a 6-bit array, where the sub-words
need not be powers of two or all the same size. It offers one 6-bit product,
two 3-bit products summed, three 2-bit products summed, or two 2-bit x 4-bit
products summed. For the last one, both operands are cut into bits [1:0] and
[5:2], so that both cross products land at weight 2. It is combinational and
stands apart from the engines.

## Sum Separate engine (`ss_engine`)

```
 a_data(32) ──► circ_act_buffer ──┬── view[31:16] ──► PE 8..15
   (every 32/m beats)  rotate by m └── view[15:0]  ──► PE 0..7
 w_data(256) ── 16 bits per PE ──────────────────────► PE 0..15
 PE = sbw_mult(SS) + 112-bit segmented accumulator
```

* **Accumulator fields.** Each PE holds 16/m results. Field f is
  `2m + 10` bits wide (10 bits of headroom) at bits
  `[f·(2m+10) +: 2m+10]`. That is 8 x 14 = 112 bits in 2-bit mode, the
  widest case; in the other modes the unused top bits stay zero. Each
  product is sign-extended into its field, and the adder's carries are cut
  at the field boundaries.
* **Circular buffer.** An activation word carries 32/m elements. It is used
  for 32/m beats. After every beat it rotates right by m bits, so sub-word
  position i sees element `(i + t) mod 32/m` on beat t. Over one word, every
  field of every PE therefore meets every element once. On the beat that
  loads a new word, the PEs see the incoming word directly (bypass), so there
  is no bubble between words.
* **Weight order.** This is the price of the SS scheme. On beat t of a word,
  sub-word f of PE p must carry the weight of the row kept in that field,
  for element `e = (f + t + (p ≥ 8 ? 16/m : 0)) mod 32/m` of the word.
  With row `r = p·16/m + f` this gives 16·16/m rows per tile. The
  testbenches build this stream; a real system needs address generation for
  it.
* **Rate.** One tile is N beats and gives 16·16/m outputs, i.e. 16, 32, 64
  or 128 outputs. One activation word is read per 32/m beats, and one weight
  word per beat.

## Sum Together engine (`st_engine`)

```
 a_data(32) ─ reverse m-bit sub-words in each half ─┬─ [31:16] ─► hi multipliers
   (every beat)                                      └─ [15:0]  ─► lo multipliers
 w_data(256): pair q takes w_data[32q +: 32]  (lo 16 bits, hi 16 bits)
 pair = 2 x sbw_mult(ST) → align (>>> m(16/m−1)) → add → 42-bit accumulator
```

* **Linear streams.** Beat b carries elements `b·32/m … b·32/m + 32/m − 1`
  of A, element 0 in the least significant bits. In the same layout, it
  carries the same elements of row q in `w_data[32q +: 32]`. One tile covers
  8 rows and takes N/(32/m) beats: N/2, N/4, N/8 or N/16.
* **Operand reversal.** A sum-together multiplier pairs weight sub-word a
  with activation sub-word 16/m−1−a. The engine reverses the order of the
  m-bit sub-words in each activation half once, before the broadcast. This
  keeps the memory layout natural for both operands, at the cost of one
  4-way wiring mux per activation bit.
* **Accumulator.** Each pair adds two aligned multiplier results (33 bits)
  into a 42-bit register, which is a 32-bit product plus 10 bits of headroom.

## Control and timing (`mac_ctrl`, both engines)

| signal | meaning |
|---|---|
| `start`, `prec_in`, `n_elems` | begin a tile when `busy` is low; N must be a non-zero multiple of 32/m (checked by an assertion) |
| `in_valid` | a beat: the engine consumes `w_data` (and `a_data` if `a_req`) on this clock edge; low = stall, the data buses are ignored |
| `a_req` | this beat reads `a_data` (SS: first beat of every 32/m; ST: every beat) |
| `out_valid` | one-cycle pulse one clock after the last beat; `acc` then holds the results until the first beat of the next tile |
| `busy` | tile in progress; falls together with `out_valid`, so the next `start` may be given in that cycle |

The multiply and the accumulate happen in the same cycle; there is no
pipeline. The first beat of a tile loads the accumulators instead of adding
to them, so no separate clear cycle is needed. Reset is synchronous and
active low.

Beats per tile, matching the engines' nominal throughput:

| m | SS beats / outputs | ST beats / outputs | activation words per beat (SS / ST) |
|---|---|---|---|
| 16 | N / 16 | N/2 / 8 | 1/2 / 1 |
| 8 | N / 32 | N/4 / 8 | 1/4 / 1 |
| 4 | N / 64 | N/8 / 8 | 1/8 / 1 |
| 2 | N / 128 | N/16 / 8 | 1/16 / 1 |

## Top level (`psmac_top`)

The two engines and the 6-bit multiplier sit side by side. They share only
clock and reset, and their ports carry the prefixes `ss_`, `st_` and `hy_`.
There is no memory hierarchy: the weight and activation streams are
top-level ports, and the memories that feed them are outside the design.

## Where the design makes its own choices

These points are not fixed by the engine concept; change them freely:

* the control handshake above (start / `n_elems` / `in_valid` / `out_valid`)
  and the reset style;
* the field order inside an SS accumulator, the weight-bus order of both
  engines, the rotation direction and bypass of the circular buffer, and the
  ST activation reversal;
* the outputs are the full accumulators (SS fields of 2m+10 bits, ST
  42 bits). Reducing them to m-bit results (rounding, scaling, saturation)
  is left to the consumer, so the output bandwidth counts wide words, not
  m-bit ones;
* every sub-word is a signed two's-complement number;
* the hybrid sub-mapping that mixes SS and ST (two pairwise sums of four
  2-bit products in a 6-bit array) is not built.

## Headroom

With 10 bits of headroom per result, a tile can be up to 2047 elements
long before even the worst-case products (most-negative x most-negative in
every beat) could overflow. This holds in every mode of both engines. With
typical data, far longer tiles are safe. `n_elems` is 16 bits wide.

## Files

* `rtl/psmac_pkg.sv`: mode type `prec_t` (PREC16/8/4/2) and shared constants
* `rtl/sbw_mult.sv`: split 16-bit multiplier, parameter `SUM_TOGETHER`
* `rtl/ss_pe.sv`, `rtl/circ_act_buffer.sv`, `rtl/ss_engine.sv`: SS engine
* `rtl/st_pe.sv`, `rtl/st_engine.sv`: ST engine
* `rtl/mac_ctrl.sv`: tile sequencer (parameter `SUM_TOGETHER`)
* `rtl/hybrid_6b_mult.sv`: 6-bit mixed sub-word multiplier
* `rtl/psmac_top.sv`: top level
* `tb/tb_<module>.sv`: one self-checking testbench per module, plus
  `tb/tb_fc_layer.sv` for a whole layer

## Simulation

Every testbench compares against values it computes itself and prints
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_psmac_top \
  -y rtl -y tb +libext+.sv rtl/psmac_pkg.sv tb/tb_psmac_top.sv
./obj_dir/Vtb_psmac_top
```

What each testbench covers:

* `tb_sbw_mult` checks both configurations in all modes, on corner operands
  and 8000 random pairs.
* `tb_hybrid_6b_mult` is exhaustive (4 x 64 x 64).
* `tb_ss_pe` and `tb_st_pe` include 500- to 1000-beat runs of extreme
  operands, to exercise the headroom and the field isolation.
* `tb_ss_engine` and `tb_st_engine` run whole tiles in all modes, with
  random stalls. They check every output, the beat count, the `a_req`
  pattern and the `out_valid` timing.
* `tb_psmac_top` runs both engines concurrently at full size, with mode
  changes between tiles, stalls and 256-element tiles. It also counts how
  often each mechanism occurred.
* `tb_fc_layer` runs a complete 128 x 128 fully connected layer in every
  precision on both engines, tile after tile, from the same data. It checks
  all outputs and the layer's total beat count, M·N·m/256 (1024, 512, 256
  and 128 beats), which is the same for both engines.

The simulations use random data from `$urandom`, with no external files.
