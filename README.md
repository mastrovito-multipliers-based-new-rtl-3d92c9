# Serial-out Mastrovito multipliers and hybrid-double multiplication over GF(2^m)

Elliptic-curve and other public-key hardware spends most of its time
multiplying elements of binary fields GF(2^m). A bit-level multiplier is the
smallest way to do that: it handles one bit per clock cycle and takes m
cycles per product. The usual bit-level schemes (LSB-first and MSB-first)
take one operand in bit by bit and deliver the whole product only at the
end. A **serial-out bit-level (SOBL)** multiplier takes both operands in
parallel and instead *emits* the product one coordinate per cycle, most
significant first. Each coordinate is one row of the Mastrovito matrix,
which does the polynomial multiplication and the reduction modulo the field
polynomial in a single step.

Because the bits come out MSB-first, they can go straight into a classic
MSB-first serial-in multiplier. That gives a **hybrid-double multiplier**:
it computes `A*B*C` in m+1 cycles instead of the roughly 2m that two
bit-level multiplications would need in sequence.

This RTL has two such units side by side:

* one over **GF(2^163)**, whose first stage is the general multiplier for
  any irreducible polynomial ("n-nomial"), here the pentanomial
  `x^163 + x^7 + x^6 + x^3 + 1`;
* one over **GF(2^233)**, whose first stage is the version specialised to
  the trinomial `x^233 + x^74 + 1`.

Next to them, with its own ports and nothing in common with them, is an
unrelated small circuit: an **8 x 8 unsigned array multiplier** (named
`systolic_multiplier`) built from AND gates and full adders.

## Module map

| module | what it is |
|---|---|
| `hybrid_mul` | top level: the two hybrid-double units and the array multiplier |
| `hybrid_double_mul` | `Z = A*B*C`; a SOBL first stage feeds `serial_in_mul` |
| `sobl_mul_nnomial` | SOBL Mastrovito multiplier for any field polynomial `POLY` |
| `sobl_mul_trinomial` | SOBL Mastrovito multiplier for `x^M + x^T + 1` |
| `serial_in_mul` | MSB-first bit-serial-in multiplier (Horner's rule) |
| `sobl_ctrl` | control unit: load / run / last / done around the counter `j` |
| `chain_counter` | chain-carry synchronous binary counter |
| `systolic_multiplier` | 8 x 8 array multiplier: top, middle and lower sections |
| `full_adder` | full-adder cell of the array multiplier |
| `gf2m_pkg` | field constants, counter width, offset-mask function |

Each file opens with a comment that describes the module's interface and
timing.

## How one product coordinate is formed

Field elements use the polynomial basis. Bit `k` of an m-bit vector is the
coefficient of `x^k`. Take the unreduced product `D = A*B` of degree up to
2m-2, with coefficients

    d_n = XOR_k  a_k & b_(n-k)

Reducing D modulo F is linear. So coordinate `i` of `C = A*B mod F` is an
XOR of some of the `d_n`. Coefficient `d_n` takes part exactly when
coordinate `i` of `x^n mod F` is 1. Group those terms by the offset
`delta = n - i`:

    c_i = XOR_delta  mask_delta[i] & d_(i+delta),   mask_delta[i] = coord i of x^(i+delta) mod F

Together, the terms for one `i` are row `i` of the Mastrovito matrix
applied to B.

**Operand registers.** `a_r` holds A. `p_r` is a (2m-1)-bit register that
holds B at first and shifts up one place per cycle. In the cycle where the
counter reads `j`, the output index is `i = m-1-j`, and `p_r[q] = b_(q-j)`.
So the B bits that `d_(i+delta)` needs always sit at the same positions,
`p_r[m-1+delta-k]`. Each offset is therefore one fixed AND-XOR inner
product of `a_r` with a fixed window of `p_r`. Only the per-cycle mask bit
`mask_delta[i]` changes, and the counter selects it. These selections are
the "extra control signals" a SOBL multiplier needs beyond the load, start
and done signals of an ordinary bit-level multiplier.

**General polynomial (`sobl_mul_nnomial`).** The masks are worked out
during elaboration from `POLY` (`gf2m_pkg::offset_mask`, which steps
`x^n mod F` with shift-and-reduce). Offsets whose mask is all zero get no
hardware. The GF(2^163) pentanomial needs 13 offsets: 0, 156, 157, 160, 163,
312, 313, 314, 316, 317, 319, 320 and 323. That makes 13 inner products of
163 bits each, plus a small table lookup per offset indexed by `i`.

**Trinomial (`sobl_mul_trinomial`).** For `F = x^M + x^T + 1` with
`T <= (M+1)/2`, reducing `x^n` (n ≤ 2M-2) never needs more than two
passes, and the row collapses to five terms:

    c_i = d_i ^ d_(i+M) ^ d_(i+2M-T) ^ [i >= T] & (d_(i+M-T) ^ d_(i+2M-2T))

Once the window runs past the top of B, a term whose index exceeds 2M-2 is
zero by itself. So the only control is one comparison, `i >= T`, which is
`j <= M-1-T` on the counter. For GF(2^233) that means five 233-bit inner
products and one 8-bit compare.

Both multipliers give the same result for the same field. The testbenches
check both against an independent reference that forms the full product and
reduces it by long division.

## Control and the chain-carry counter

`sobl_ctrl` sequences one multiplication:

| cycle | start | load | run | j | output |
|---|---|---|---|---|---|
| 0 | 1 (idle) | 1 | 0 | – | operands captured at the end of the cycle |
| 1 .. M | – | 0 | 1 | 0 .. M-1 | `c_(M-1-j)` valid |
| M+1 | may be 1 again | = start | 0 | – | `done` = 1 |

The unit accepts `start` only while it is idle. A start raised during a run
is ignored. A start in the `done` cycle begins the next operation at once,
so operations can run back to back every M+1 cycles.

The counter `j` is a chain-carry synchronous counter with
`ceil(log2 m)` = 8 bits for both fields. Each bit is a toggle register.
Bit 0 toggles every enabled cycle and bit 1 toggles when `q0` is set. Bit k
(k ≥ 2) toggles on `t_k = t_(k-1) & q_(k-1)`, a chain of two-input AND
gates. Every bit except the first and the last owns one gate, the one
forming its carry into the next bit. That makes 6 gates for 8 bits, so the
carry delay through the chain is `(ceil(log2 m) - 2) * T_AND`.

## Hybrid-double multiplier

`hybrid_double_mul` feeds the SOBL output bit `ab_bit` into `serial_in_mul`
in the same cycle it is produced. The second stage updates

    Z <- (x*Z mod F) ^ (ab_bit ? C : 0)

on every valid bit. After the M bits `(AB)_(M-1) .. (AB)_0` have gone in,
`Z = (A*B)*C`. Both stages load on the same edge and share one M-cycle run,
so `z` is valid when `done` pulses, M+1 cycles after the start was
accepted. It stays valid until the next start. The serial `A*B` stream is
also brought out (`ab_valid`, `ab_bit`, `ab_idx`). For example, a
`GF(2^163)` point-arithmetic step that needs a product of three factors
finishes in 164 cycles instead of about 326.

## The 8 x 8 array multiplier

`systolic_multiplier` is combinational, with ports `x[7:0]`, `y[7:0]` and
`z[15:0]`. Partial products `x_c & y_r` feed a regular array of full
adders in three sections:

* **top**: row 1, eight full adders that add partial-product rows 0 and 1;
* **middle**: rows 2 to 7, each of eight full adders. Every row adds one
  more partial-product row in carry-save form: a cell's carry goes to the
  same column of the next row, which has the same weight.
* **lower**: eight full adders in a ripple chain. They merge the last sum
  and carry vectors into `z[15:8]`.

Bit `z[r]` for r < 8 is the sum out of column 0 of row r. The array is 64
full-adder cells, some with an input tied to 0. The name follows the source
description. The array has no pipeline registers, because that description
shows the block without a clock.

## Top-level interface (`hybrid_mul`)

| group | ports |
|---|---|
| common | `clk`, `rst_n` (asynchronous, active low) |
| GF(2^163) | in: `enable163`, `a163`, `b163`, `c163`; out: `busy163`, `ab_valid163`, `ab_bit163`, `ab_idx163[7:0]`, `done163`, `z163` |
| GF(2^233) | the same with suffix `233` |
| array multiplier | in: `x[7:0]`, `y[7:0]`; out: `z[15:0]` |

`enableNNN` is the start request of the timing table above. It is accepted
only while `busyNNN` is low.

## What follows the source and what is this design's own

Taken from the source description:

* serial-out bit-level Mastrovito multipliers in the polynomial basis;
* one general version for n-nomials and one optimised for trinomials;
* one output bit per clock cycle;
* a counter-driven control unit, and a chain-carry synchronous counter with
  one register per bit and an AND chain;
* the fields GF(2^163) and GF(2^233);
* the existence of hybrid-double architectures built from the SOBL
  multipliers;
* the 8-bit AND/full-adder array multiplier with ports x, y and z, in
  top / middle / lower sections;
* the top-level name.

This design's own choices:

* **Reduction polynomials.** The NIST pentanomial for m = 163 and the NIST
  trinomial for m = 233. Both are parameters.
* **Row equations.** The source states no row equations. The offset
  decomposition of the Mastrovito rows, the shifting-window datapath and
  the five-term trinomial formula were derived here.
* **Output order.** MSB first, so that the output can feed an MSB-first
  second stage.
* **Hybrid-double structure.** The source only names the architecture. The
  pairing of a SOBL first stage with an MSB-first serial-in second stage is
  this design's reading of it.
* **Handshake and reset.** The start/busy/done handshake, the asynchronous
  reset, and the synchronous clear and enable of the counter.
* **Array sections.** The middle section holds six rows of eight adders.
  The source says "eight full adders" per section, but an 8-bit product
  cannot be formed from 24 adders in one combinational pass. Row 1 and the
  final adder each do have eight.
* **Unsigned operands** for the array multiplier.
* **Not built.** The source also mentions a behavioural version of the
  8-bit multiplier and compares it with the structural one. Only the
  structural array is built; the testbench's integer product plays the
  behavioural role. The source also says ten prototype schemes were
  evaluated in all, but it does not describe them one by one. Only the
  n-nomial and trinomial SOBL multipliers, and a hybrid-double unit on each
  field, are here.

## Size and speed

* **Flip-flops.** About 2,000 in the top level. Per GF unit: A, the
  (2m-1)-bit B window, C, Z, the 8-bit counter and two control bits.
* **Logic.** The GF(2^163) first stage costs 13 inner products of 163 ANDs
  and an XOR tree each. The GF(2^233) trinomial stage costs five inner
  products of 233 bits each.
* **Critical path.** In a SOBL stage it is one AND plus a log2(m)-deep XOR
  tree, then a small XOR of the terms, then one step of the serial-in
  accumulator.

No timing figures are claimed.

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it if it
hangs. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_hybrid_mul \
        -y rtl -y tb +libext+.sv rtl/gf2m_pkg.sv tb/tb_gf_pkg.sv tb/tb_hybrid_mul.sv
    ./obj_dir/Vtb_hybrid_mul

Replace `tb_hybrid_mul` with any testbench name. `tb_gf_pkg` holds the
reference field multiplication: full carry-less product, then long
division.

| testbench | what it checks |
|---|---|
| `tb_hybrid_mul` | top level at full size: both GF units and the array multiplier run at once. Covers back-to-back and gapped operations, and enable held high during a run (ignored). Counts that each of these happened, and that the trinomial control was seen both ways. |
| `tb_hybrid_double_mul` | 30 random A*B*C per field, the serial A*B stream bit by bit, done at M+1 |
| `tb_sobl_mul_nnomial` | GF(2^163) corner and random cases bit by bit, plus all 16,384 GF(2^7) products (x^7+x+1) |
| `tb_sobl_mul_trinomial` | GF(2^233) corner and random cases, plus all GF(2^7) products (x^7+x^3+1) |
| `tb_serial_in_mul` | random bit-serial operands with idle gaps between bits |
| `tb_sobl_ctrl` | load / run / last / done sequence, ignored and back-to-back starts |
| `tb_chain_counter` | count against an integer model, with enable gaps and clear |
| `tb_systolic_multiplier` | all 65,536 operand pairs |
| `tb_full_adder` | all 8 input patterns |

All of them run at the default sizes, and all pass. `tb_hybrid_mul` needs
well under a second of simulation.

## Changing it

* **Other field.** For another field, instantiate `hybrid_double_mul` with
  new `M` and `POLY`. Set `TRINOMIAL=1` and `T` for a trinomial with
  `T <= (M+1)/2`. `POLY` must have bit M and bit 0 set.
* **Size limit.** `gf2m_pkg::MAXM` (256) limits M in the mask function and
  the testbench reference.
* **Array width.** `systolic_multiplier` takes a width parameter `N`.
