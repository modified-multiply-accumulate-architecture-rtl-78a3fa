# Booth multiply-accumulate unit with spurious-switching suppression

This is a 16 × 16-bit signed multiply-accumulate (MAC) unit with a 32-bit
accumulator. It is built for low dynamic power. In DSP data (FFT, DCT,
quantisation, filtering) many operands are small. For a small operand, the
upper bits are nothing but copies of the sign bit. The arithmetic on those
bits has a predictable result, yet a plain datapath still toggles there, and
every toggle costs switching power. Here, detection logic notices when a part
of the datapath would only reproduce sign extension. Latches then freeze that
part's inputs so it stops switching, and a small sign-extension circuit
supplies the result. This is the *switching power swiftness improvement
technique* (SPSIT). It is applied in three places:

* **the Booth encoder / partial-product generator.** With a short multiplier,
  the upper Booth rows are zero. The inputs of their multiplexers are frozen.
* **the carry-save reduction tree.** The upper half of a compressor is frozen
  when all three of its inputs are sign extension there.
* **the final carry-propagate adder.** When the upper half of both addends is
  pure sign extension, the upper half of the adder is frozen.

The results are always exact. The freezing only decides which gates switch.

## Datapath

```
 a,b ──► input registers ──► Booth recoding of b (8 digits)     ┐
           (isolation)       candidates ±a, ±2a                 │ spsit_mbe
                             MUX-0 … MUX-7 ─► 8 rows            │ (+ detection,
                             [latches before MUX-4..7 / 6..7]   ┘  row freezing)
                                   │
                             CSA tree 8 → 6 → 4 → 3 → 2          csa_tree
                             [SPSIT compressors, split 16/16]    (spsit_csa)
                                   │
              accumulator ──► one extra CSA stage 3 → 2           csa_3to2
                                   │
                             SPSIT adder, 16-bit LSP + 16-bit MSP spsit_adder
                                   │
                             accumulator register ──► acc
```

The accumulator does not pass through a separate adder. It enters as a third
row of one extra carry-save stage after the multiplier's reduction tree, so
accumulating costs one full-adder delay.

## Bit-pair (radix-4 Booth) recoding

The multiplier `b` is read in overlapping triplets
`{b[2i+1], b[2i], b[2i-1]}` (with `b[-1] = 0`). Each triplet becomes one digit
in {−2, −1, 0, +1, +2}:

| triplet | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---------|-----|-----|-----|-----|-----|-----|-----|-----|
| digit   |  0  | +1  | +1  | +2  | −2  | −1  | −1  |  0  |

A 16-bit multiplier thus needs eight partial products instead of sixteen. For
example, `0x006A` recodes to the digits 0 0 0 0 +2 −1 −1 −2 (most significant
first). `booth_encoder` delivers each digit as a sign plus a one-hot magnitude
(`booth_digit_t`). `booth_pp_mux` picks the matching candidate out of
+a, +2a, −a and −2a. The candidates are 18 bits wide so that
−2 × (−32768) still fits. Row *i* is then sign-extended to 32 bits and shifted
left by 2*i*.

## Freezing the upper Booth rows

Digit *i* is zero exactly when its three bits are equal. Hence:

* rows 4–7 are zero ⇔ `b[15:7]` are all equal (b fits in 8 signed bits);
* rows 6–7 are zero ⇔ `b[15:11]` are all equal (b fits in 12 signed bits).

`spsit_mbe_detect` computes these two flags. Once the flags are asserted (see
below), latches hold the candidate inputs of MUX-4…7 (respectively MUX-6…7).
Those multiplexers then see no change in `a`. Their digits are zero, so they
still deliver zero and the product stays exact. The `status[1:0]` output shows
the two freeze signals.

## The split adder (`spsit_adder`)

The adder/subtractor is cut into a least significant part (LSP, `LSP_W` bits)
and a most significant part (MSP, the rest). The LSP adder always works. The
MSP adder sits behind **latch A**, **latch B** and a latch on its carry-in.
All three are transparent while `close` is low.

`spsit_detect` raises `close` (and `carr_ctrl`) when the MSP of each operand
is all zeros or all ones. Let *s_a*, *s_b* be those signs and *c* the LSP
carry-out. The MSP result is then known without the MSP adder:

| s_a s_b | MSP result | carry-out |
|---------|------------|-----------|
| 0 0     | 0 + c      | 0         |
| 0 1, 1 0| −1 + c (all ones, or 0 when c = 1) | c |
| 1 1     | −2 + c (1…10, or all ones when c = 1) | 1 |

These results come from the sign-extension circuit and the carry glue logic.
The latches keep the MSP adder's inputs frozen at their old values, so the
adder does not switch. For example, −61 + (−205) on 16 bits gives an MSP of
`0xFE` with no LSP carry. It is produced without touching the MSP adder. For
`sub = 1`, `b` is inverted, the carry-in is forced to 1, and detection looks
at the inverted `b`.

The latches are real level-sensitive latches (`always_latch`), as intended.
Synthesis reports them as latch bits.

### The same idea on a carry-save row (`spsit_csa`)

A compressor has no carry chain, but its upper full adders are equally
predictable. Suppose all three inputs have sign bits *s_x*, *s_y*, *s_z* and
are pure sign extension above bit `LSP_W`. Then every upper full adder
computes the same thing. Its sum bit is *s_x ⊕ s_y ⊕ s_z*, and its carry bit
is the majority of the three. `spsit_csa` detects this case and latches the
upper full adders' inputs. It then drives these known bits instead. The lowest
upper carry bit comes from the top lower full adder and always stays live.
`csa_tree` builds every compressor this way (`SPSIT_LSP_W` = 16, or 0 for
plain `csa_3to2` rows). A compressor's output rows are often sign extension
again, so when both multiplier operands are small, whole chains of the tree
stay frozen.

## Asserting the controls: when may a latch close?

Detection logic looks at data that is still settling. Its raw outputs may
glitch, and a glitch on `close` would latch a wrong value. The controls are
therefore *asserted*, that is, released only after a delay Φ. Φ must be longer
than the data transient and shorter than the time by which the frozen part
must deliver its result. `spsit_assert` offers two ways, selected by the
`STYLE` parameter (`assert_style_e`):

* **`ASSERT_AND` (default).** Each control is ANDed with a strobe,
  `assert_en`, which the surrounding system raises once the data has settled
  in the cycle. While `assert_en` is low, nothing is frozen and the unit simply
  computes everything. The system chooses how close to the clock edge it
  raises the strobe. The testbenches drop it at each rising edge and raise it
  3 ns later.
* **`ASSERT_REG`.** The controls come from registers, so they cannot glitch:
  * The Booth-row freeze flags are computed from the operands being loaded.
    They are registered on the same rising edge as the operands, so they are
    right from the start of the cycle.
  * The final adder's controls depend on the tree's outputs. Those registers
    sample on the **falling** edge, so Φ is half a clock period. In the first
    half-cycle the adder may still show last cycle's decision. From the falling
    edge on it is right, and it is right when the accumulator samples.

The split in register style is a consequence of the cascade. If the Booth
flags were also taken at the falling edge, the adder's detection would sample
rows that the encoder had not yet released, and the adder would latch a wrong
decision. For the same reason, only one falling-edge stage fits between two
registers. In register style the tree therefore uses plain compressors, and
only the final adder keeps its split. In AND style all stages are SPSIT stages:
each control follows its present inputs, so a cascade settles to the exact
result. In register style, the final adder's result must settle within the
half period after the falling edge. The AND style has no such constraint, so
it can be clocked faster.

## Interface of `spsit_mac`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all registers to 0) |
| `in_valid` | in | 1 | `a`, `b`, `acc_clear` are valid this cycle |
| `acc_clear` | in | 1 | start a new sum: `acc = a*b` instead of `acc + a*b` |
| `a`, `b` | in | 16 | signed operands; `b` is the Booth-recoded one |
| `assert_en` | in | 1 | asserting strobe (AND style only) |
| `out_valid` | out | 1 | `acc` now includes the pair given two cycles earlier |
| `acc` | out | 32 | signed accumulator; wraps modulo 2^32 |
| `status` | out | 4 | {some tree compressor closed, final adder closed, rows 4–7 frozen, rows 6–7 frozen} |

Timing: a pair sampled at rising edge *t* is in `acc` after edge *t*+1, so
`out_valid` is high in the following cycle. A new pair can be accepted every
cycle. Put the short operand on `b`: only `b` drives row freezing. When `a`
is small as well, tree compressors close. Small partial sums let the final
adder close too.

Parameters: `W` = 16, `ACC_W` = 32, `CPA_LSP_W` = 16 (split of the final
adder), `TREE_LSP_W` = 16 (split of the tree compressors), `STYLE` =
`ASSERT_AND`. The Booth-row detection is written for eight rows (W = 16). Other widths that are multiples of 8 follow the same half and
quarter rule.

## How far to trust it, and what is this design's own

Followed closely:
* the bit-pair recoding table;
* eight Booth rows with freezing of rows 4–7 or 6–7 from a detection on `b`;
* a carry-save tree with the accumulator folded in by one extra CSA stage;
* split adders inside the compression tree as well as at its output;
* the LSP/MSP adder with latch A/B, detection (close / carry control / sign
  extension), sign-extension circuit and carry glue logic;
* the two ways of asserting the controls, registers or AND gates.

Chosen here, where the technique leaves the details open:
* operand width 16 and accumulator width 32; the accumulator wraps on
  overflow, and there is no saturation or guard bits;
* signed operands only;
* the 16/16 split of the final adder;
* which tree compressors are split and where: here all of them, at bit 16;
  the split-adder scheme is carried over to carry-save rows as described
  above;
* a plain tree in register style;
* the input register stage, the `acc_clear` input and the valid signals;
* full-width sign-extended partial-product rows;
* what a frozen multiplexer outputs: only its candidate inputs are held;
* the half-period asserting delay, and rising-edge flags for the Booth rows in
  register style;
* the latch on the MSP adder's carry-in.

Not built:
* **multi-precision vector modes** (segmenting the scalar datapath into
  narrower lanes). No lane widths or mode encoding are defined.

The power and speed benefit is a property of the gates and wires. RTL
simulation cannot show it. The testbenches check that results are exact in
every freeze state, and that the latches really hold.

## Files

`rtl/`: `spsit_pkg` (shared types), `booth_encoder`, `booth_pp_mux`,
`spsit_mbe_detect`, `spsit_assert`, `spsit_mbe`, `csa_3to2`, `spsit_csa`,
`csa_tree`, `spsit_detect`, `spsit_adder`, `spsit_mac` (top).

`tb/`: one self-checking testbench per module, `tb_<module>`. Each testbench
prints a `TB_RESULT checks=N failures=M` line.
* `tb_spsit_mac` runs the top at its default parameters.
* `tb_spsit_mac_reg` runs the top in register style.
* `tb_spsit_mac_fir` runs filter workloads: a 16-tap FIR with 8-bit
  coefficients and one with 12-bit coefficients.

The end-to-end testbenches check every result and its two-cycle latency
against a model. They count each mechanism (row freezing of both kinds, tree
compressor closed, adder closed and open, clear, wrap-around) and fail if one
never occurs.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_spsit_mac rtl/spsit_pkg.sv tb/tb_spsit_mac.sv
./obj_dir/Vtb_spsit_mac
```

To lint one module: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv
rtl/spsit_pkg.sv rtl/spsit_mac.sv`.
