# Carry-free Q-Coder: a binary arithmetic coder with carry-save interval registers

A Q-Coder codes a stream of binary decisions (in bi-level image coding: "is this pel the
more probable colour in its context or not?") into a compact code string. It keeps the
current coding interval as two numbers: its size **A** and its lower end **C**. For every
symbol it either adds the LPS probability **Qe** to C and subtracts it from A (more
probable symbol, MPS) or sets A to Qe (less probable symbol, LPS). When A falls below 1,
A and C are doubled (renormalized); the bits that leave the top of C are the code.

In a conventional Q-Coder both updates are carry-propagate additions, and the
normalization test needs the fully added A. This design keeps **A and C in carry-save
form** (a sum vector plus a carry vector), so each update costs one full-adder delay
whatever the word length. The normalization test then looks only at a short **estimate**
of A, formed by adding the top 2 integer and `t = 2` fraction bits of the two vectors. The
estimate can be up to 2^-(t-1) below the true A, so the coder sometimes normalizes one
step earlier than strictly necessary. That costs about 1-2 % of compression and buys a
shorter cycle: the source architecture estimates 6.5 full-adder delays per cycle against
8.5 for the same organisation with a 12-bit carry-propagate adder, about 25 % faster.

The package holds an encoder (`cfqca_encoder`) and a matching decoder (`cfqca_decoder`),
side by side in `cfqca_top`. The context model and the probability estimator that supply
each symbol's Qe are not part of it. The encoder reports every normalization shift
(`norm_shift`) for an external estimator.

## Number formats

| quantity | width | format |
|---|---|---|
| Qe | 12 | fraction only, 0 < Qe <= 0xAC1/4096 (about 0.672) |
| A | 2 x 14 | sum + carry, 2 integer bits . 12 fraction bits; 1.0 = `14'h1000` |
| C | 2 x 23 | sum + carry: carry bit, 8-bit byte field, S = 2 spacer bits . 12 fraction bits |
| estimate of A | 4 | 2 integer . 2 fraction bits |

Two integer bits are enough for A. A shift happens only when the estimate is below 1,
so the true A is then below 1 + 2^-(t-1), and the doubled A is below 2 + 2^-(t-1) = 2.5.
All A arithmetic is modulo 2^14. That is exact because the true A always lies in
[0.33, 2.5). After an MPS, A >= 1 - 0.672. After an LPS, A = Qe is loaded with a zero
carry vector.

## One encoder cycle

```
           Qe ─┬──────────────┬───────────────┐
               │              │               │
        f ─► MUX2 (AND)   e ─► MUX3 (AND)      │
               │              │               │
   A pair ─► CSA1 (−Qe / +0)  C pair ─► CSA2 (+Qe / +0)
               │                              │
        g ─► MUX1 ◄── Qe (LPS: A = Qe, carry vector 0)
               │                              │
             NORM ── h ──────────────────► SHIFT2 ─► C pair ─► OTFC ─► bytes
               │      └─► H register          
             SHIFT1 ─► A pair
```

* **Symbol cycle** (register H = 0, `sym_ready` = 1). For an MPS, MUX2 passes Qe and
  CSA1 subtracts it from A (inverted operand, with the +1 in the free LSB of the carry
  vector). MUX3 passes Qe, and CSA2 adds it to C. For an LPS, MUX1 replaces the CSA1
  result by Qe, and MUX3 presents 0 so C does not change. NORM forms the 4-bit estimate
  of the new A and raises `h` if it is below 1. SHIFT1 and SHIFT2 then double A and C,
  and `h` is stored in H.
* **Extra normalization cycle** (H = 1, no symbol accepted). MUX2 and MUX3 present 0,
  so CSA1 and CSA2 leave the values unchanged, and NORM tests A again. Only one shift is
  decided per cycle. After an LPS with a small Qe this repeats, up to 12 cycles for
  Qe = 2^-12. Every shift is followed by one such test cycle.
* In these cycles CSA1 *adds* the zero rather than subtracting it. Subtracting zero in
  two's complement (all-ones operand plus carry-in) keeps the value but spreads a borrow
  across both vectors. For a small A, the top bits of the two vectors then add up to an
  estimate that has wrapped around (3.75 instead of ~0), and a needed shift is missed.
* In idle cycles A is frozen. If A were re-estimated from a differently split pair, the
  decision could change, and the decoder, which idles at other times, would diverge.

Throughput: one symbol per cycle while no normalization is needed, one extra cycle per
shift, and one cycle per byte removed. On a page-sized bi-level test this comes to
1.09 cycles per pel.

## Why the decoder must copy the encoder's A hardware

Normalization shifts emit code bits, and the estimate makes them depend on how A is
split between the sum and carry vectors. A decoder using a carry-propagate A would
normalize at different moments and lose synchronization. So `cfqca_decoder` uses the
same `cfqca_a_unit`. Its code side is conventional, however: choosing between MPS and
LPS needs an exact comparison of the code offset with Qe. The decoder keeps
`D = code − C` with 8 look-ahead bits. It decodes an LPS when `D_hi < Qe`; otherwise
(MPS) it computes `D −= Qe`. It shifts D whenever the shared A unit shifts.

## Byte removal, carries and bit stuffing (OTFC)

C is kept to 23 bits by removing a byte every 8 shifts. Because C only grows by
additions, a carry can still reach bits that have already left the register. This is
handled as in the Q-Coder, with a one-byte buffer B and bit stuffing:

1. A shift counter runs from 10 (8 + S, so that the first byte holds the first 8 code
   bits) and later from 8, or 7 after a stuffed byte. When it reaches 0 the encoder
   spends one **removal cycle**. No symbol is taken and A is frozen. The OTFC adds the
   two vectors of C (V = cs + cc) and, with k = 14 the position of the byte field:
   * **B = 0xFF**: B is sent. The new B is `V[k+8:k+1]`. Its top bit is the *stuffed
     bit*, which sits on the weight of the last bit of the 0xFF byte and so receives
     any carry meant for it. `V[k:0]` stays in C and the next count is 7.
   * **carry (`V[k+8]`) and B = 0xFE**: the carry makes B 0xFF. 0xFF is sent, the carry
     is cleared, and the new byte is stuffed as above.
   * **carry otherwise**: B + 1 is sent, and B becomes `V[k+7:k]`.
   * **no carry**: B is sent, and B becomes `V[k+7:k]`.
2. The remainder is loaded back into C in conventional form, with a zero carry vector.

The spacer bits bound the carries. After a removal C < 2^k and A < 2.5. Eight shifts
later C < 2^8·(2^k + 2.5·2^12), which is below 2^(k+9) when S >= 2. So each removal
produces at most one carry, and a stuffed bit absorbs every carry into a 0xFF byte.

The full-width addition in the removal cycle is how this design converts C to
conventional form. It lies outside the A loop that sets the clock period. It runs once
per 7-8 shifts, which is about once every 8 code bits.

The decoder mirrors this format. The byte after 0xFF is added one bit position higher,
and the next byte is read after 7 shifts instead of 8. It starts by reading two bytes
(12 alignment shifts). Past the end of the code string it expects 0x00 bytes.

**Flush.** On `flush` the encoder emits the lower end C of the final interval, which is
itself a valid code value. It shifts C out without changing A, performs 4 removals
(one to align and three to empty the 15 fraction, spacer and remainder bits), then
sends the buffered byte and raises `done`.

## Interfaces

All signals are synchronous to `clk`. Reset `rst_n` is active-low and synchronous; it
sets A = 1.0, C = 0 and H = 0.

`cfqca_encoder`

| port | dir | width | meaning |
|---|---|---|---|
| `sym_valid`, `sym_ready` | in, out | 1 | symbol handshake; transfer when both are high |
| `sym_lps` | in | 1 | 1 = LPS, 0 = MPS |
| `qe` | in | 12 | Qe of this symbol |
| `flush` | in | 1 | terminate the code string; taken while `sym_ready`, ahead of a symbol |
| `done` | out | 1 | flush finished |
| `norm_shift` | out | 1 | a normalization shift happened this cycle |
| `byte_valid`, `byte_data` | out | 1, 8 | code bytes in order, registered |

`cfqca_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `byte_req`, `byte_valid`, `byte_in` | out, in, in | 1, 1, 8 | code bytes, taken when req and valid are high |
| `qe_valid`, `qe` | in | 1, 12 | Qe of the next symbol to decode |
| `sym_valid`, `sym_lps` | out | 1, 1 | a decoded symbol; `sym_valid` also acknowledges `qe` |
| `norm_shift` | out | 1 | a normalization shift happened this cycle |

`cfqca_top` brings both sets out with `enc_` and `dec_` prefixes.

## Parameters

The sizes live in `cfqca_pkg`. Modules take `P`, `T` and `S` parameters that default to
these constants.

| constant | default | meaning |
|---|---|---|
| `P_FRAC` | 12 | fraction bits of A, C and Qe (12-bit Q-Coder arithmetic) |
| `T_EST` | 2 | fraction bits of the estimate used by NORM (the t = 2 design) |
| `S_SPACER` | 2 | spacer bits in C; 2 is the proven minimum for t >= 1 (3 for t = 0) |

`cfqca_encoder` and `cfqca_decoder` also take `T` and `S` as parameters, so
configurations can be mixed in one simulation. Encode/decode round trips pass with
T = 0, 1, 2, 3, 4, 5 and 12 and with S = 2, 3 and 4 (S >= 3 for T = 0).

One caution about small T. The estimate is computed modulo 4, so it would wrap if the
truncation loss ever exceeded A. In random runs of 2 million symbols per T, the
estimate never fell more than one estimate LSB (2^-T) below A. After an MPS,
A >= 1 − 0.672 = 0.33, so with that loss a wrap cannot happen for T >= 2. For T = 0 and
T = 1 there is no such argument, although no wrap was seen. A larger T gives
compression closer to an exact test but makes NORM slower.

On the synthetic page, the code string compared with T = 12 (an exact test) is:

| T | 0 | 1 | 2 | 3 | 4 | 5 | 12 |
|---|---|---|---|---|---|---|---|
| relative length (S = 4) | 1.092 | 1.034 | 1.013 | 1.005 | 1.002 | 1.001 | 1 |

At T = 1 the spacer count changes the length only in the flush tail: 342,336 bits
for S = 4 and S = 3, and 342,344 bits for S = 2.

Size at the defaults after a generic yosys synthesis: the encoder has 106 flip-flop bits
(A 28, C 46, H 1, the OTFC byte buffer, counter and flags, the control state) in 119
word-level cells. The decoder has 62 flip-flop bits in 74 cells. The delay figures
quoted above are gate-delay estimates for the architecture, not timing results for this
RTL.

## Departures and additions

The datapath and its control follow the source architecture. The following were
specified only by function, or not at all, and are this design's choices:

* the OTFC's method (a full addition in a dedicated removal cycle) and the exact stuffed
  byte alignment;
* the `h` polarity: `h = 1` means "shift". The source states both polarities; this one
  matches its description of register H;
* CSA1 adding, not subtracting, the zero in extra cycles (see above);
* the handshakes, the reset values, the flush sequence and the freezing of A while idle;
* the whole decoder except its reuse of the A unit;
* the default of 2 spacer bits. The source's compression measurements were made with 4
  spacer bits, as in the original Q-Coder, and report no measurable difference for 2 or
  3. With 4 spacer bits, some two-byte patterns (0xFFA8 and above) can never occur in
  the code string and could serve as markers. With 2 this reserve is smaller, and this
  design defines no markers.

Not included: the context model and the probability estimation table, which are
external to the coder.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `cfq_ref_pkg` is an untimed reference. It models A bit for bit, C as an exact integer,
  the byte-out rules on that integer, and a decoder that rebuilds the code value from
  the bytes.
* Block benches: `tb_cfq_csa_sub`, `tb_cfq_csa_add`, `tb_cfq_qe_gate`, `tb_cfq_mux1`,
  `tb_cfq_shift` and `tb_cfq_norm` check values and bounds on random inputs.
  `tb_cfqca_a_unit` tracks the exact A, the shift decisions and the cycles per LPS.
  `tb_cfqca_c_unit` checks the C value. `tb_cfq_otfc` checks bytes, remainders and shift
  counts, including carries, 0xFF stuffing and carries into 0xFE.
* `tb_cfqca_encoder` compares the encoder's bytes and cycle count with the reference and
  decodes them with the reference decoder. `tb_cfqca_decoder` decodes reference code
  strings, with random gaps on both handshakes.
* `tb_cfqca_top` runs encoder and decoder at their default sizes on 60,000 symbols. It
  checks every decoded symbol and fails if any mechanism never occurs: MPS, LPS, shifts,
  extra cycles, multi-cycle normalization, byte removal, carry, stuffing, carry into
  0xFE, flush, or a stuffed byte read by the decoder.
* `tb_cfqca_page` codes a synthetic 1728 x 2376-pel bi-level page (4,105,728 pels). The
  testbench supplies its own 7-pel context model and count-based estimator. The page
  decodes exactly. The code string equals the reference's and is 1.3 % longer than with
  an exact normalization test. It runs in a few seconds.
* `tb_cfqca_sweep` codes the same page with nine encoder/decoder pairs side by side
  (the T and S values in the table above). It checks that every lane decodes exactly,
  that a finer estimate never gives a string more than 0.1 % longer, and that T = 2 costs at most 3 %
  and T = 4 at most 0.5 % over the exact test.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cfqca_pkg.sv tb/cfq_ref_pkg.sv tb/tb_cfqca_top.sv --top-module tb_cfqca_top
./obj_dir/Vtb_cfqca_top
```

## Files

* `rtl/cfqca_pkg.sv`: sizes and formats.
* `rtl/cfq_csa_sub.sv` (CSA1), `rtl/cfq_csa_add.sv` (CSA2), `rtl/cfq_qe_gate.sv` (MUX2,
  MUX3), `rtl/cfq_mux1.sv`, `rtl/cfq_norm.sv`, `rtl/cfq_shift.sv` (SHIFT1, SHIFT2),
  `rtl/cfq_otfc.sv`: datapath blocks.
* `rtl/cfqca_a_unit.sv`, `rtl/cfqca_c_unit.sv`: the A and C halves of the datapath.
* `rtl/cfqca_encoder.sv`, `rtl/cfqca_decoder.sv`, `rtl/cfqca_top.sv`.
