# Four-stage HEVC binary arithmetic encoder with multi-bypass-bin packets

This is synthesizable SystemVerilog for the binary arithmetic encoder (BAE) of an
HEVC CABAC entropy coder. The context modeler in front of it sends packets. Each
packet holds either one context-coded ("regular") bin, one terminate bin, or a
group of up to four bypass bins. The BAE takes one packet per clock cycle, so a
regular bin or up to four bypass bins are coded per cycle. The coded bits come
out four cycles later. The bitstream is bit-exact with the HEVC standard's
bit-serial encoding process (EncodeDecision, EncodeBypass, EncodeTerminate,
EncodeFlush).

Two ideas make one small core fast:

* **Bypass bins in groups.** A bypass bin leaves Range unchanged and doubles Low,
  adding Range when the bin is 1. A group of `EPlen` bins with values `EPbits` is
  therefore one step: `Low' = (Low << EPlen) + Range * EPbits`. This costs one
  small multiplier. It reuses the adder that regular bins use.
* **Work split so little is registered.** Stage 1 only reads the four rLPS
  candidates. Stage 2 picks one and renormalizes only that one. Stage 3 sends on
  only the bits that left Low, not the whole renormalized Low.
  Stage 3 also looks up the outstanding bits early, so stage 4 only has to merge
  them with its running count.

## Packet format (`bae_pkg`)

| bits  | regular / terminate        | bypass group                      |
|-------|----------------------------|-----------------------------------|
| [9:8] | mode                       | mode                              |
| [7]   | binVal                     | EPbits[3]                         |
| [6:1] | pStateIdx (0..62; 63 unused) | [7:4] EPbits, [3:1] EPlen (1..4) |
| [0]   | valMPS                     | 0                                 |

Modes: `00` regular, `01` terminate, `10` bypass, `11` no bin (a bubble).
A bypass packet holds its `EPlen` bins right-aligned in `EPbits`. The first bin
is bit `EPlen-1`, so the group's value is simply the number `EPbits`. `in_valid`
low, mode `11`, or a bypass packet with `EPlen` of 0 or more than 4 all count
as an empty cycle.

The context modeler must do the following: pick the context, update its
probability state after each bin, and pack consecutive bypass bins into groups.
None of this is in this RTL.

## Pipeline

```
in_packet ─► [1 decode + 4×rLPS] ─► [2 Range] ─► [3 Low] ─► [4 bit generator] ─► out_bits/out_nbits
               bae_stage1             bae_stage2   bae_stage3   bae_stage4
```

Each stage ends in a register. A packet presented in cycle t has its coded bits
on `out_*` in cycle t+4. There is no back-pressure and no stall: one packet is
accepted every cycle.

**Stage 1.** Decodes the mode. It reads the row of HEVC's rangeTabLps for the
bin's state, which is four 8-bit values, one per Range quarter. A terminate bin
gets 2 in all four entries, so it follows the regular path. The LPS flag is
`binVal != valMPS`; for a terminate bin it is `binVal`.

**Stage 2.** Holds Range (9 bits, 510 after reset). It picks rLPS with
`Range[7:6]` and forms `rMPS = Range - rLPS`:

* MPS: `Range <= rMPS`, doubled if below 256. Low gets increment 0 and shift 0 or 1.
* LPS: `Range <= rLPS << n`. The shift `n` (1..7) is the count of leading zeros of
  rLPS. Low gets increment `rMPS` and shift `n`.
* Bypass: Range is unchanged. Low gets increment `Range*EPbits` and shift `EPlen`.

**Stage 3.** Holds Low (10 bits) and makes the renormalized value R with one
adder. For regular bins R is `(Low + inc) << shift`. For bypass groups R is
`(Low << shift) + inc`. Low takes `R[9:0]`. The bits above bit 9 form a
left-aligned chunk: the carry `c`, then the shifted-out bits `s1..sN`. Stage 3
also classifies those bits (next section).

**Stage 4.** Holds the count of accumulated outstanding bits (AccOSCnt, 5 bits)
and emits the coded bits.

## Carries and outstanding bits (the subtle part)

Low is a 10-bit window onto the lower end of the code interval. When Low is
renormalized, its top bits leave the window. They are not final yet, because a
later addition can carry into them. HEVC's bit-serial encoder handles this with
a "bits outstanding" counter. An ambiguous bit is held back. The next bit that
is known, B, is written, followed by one `!B` for each held bit.

This design keeps Low unreduced and carries explicitly, so several bits can
leave Low in one cycle. The bookkeeping works like this:

* While outstanding bits are pending, they are the pattern `0 1 1 … 1`, and Low
  is always ≥ 512. An addition that overflows Low gives a carry `c = 1`. That
  carry turns them into `1 0 0 … 0`. With no carry they resolve as written.
  Either way they are written as a first bit `F = c` followed by AccOSCnt copies
  of `!F`. If nothing is pending, no carry can occur, and `F` is simply the first
  shifted bit `s1`.
* Stage 3 looks at the bits `s2..sN` and at `y = R[9]`, the bit that will leave
  Low next. It needs no knowledge of the pending count:
  * `y = 0`: a carry can never reach `s2..sN`, so all of them are determined.
  * `y = 1`, and the last 0 among `s2..sN` is `sZ`: the bits `s2..s(Z-1)` are
    determined. The `N-Z+1` bits `sZ..sN` (`0 1 … 1`) become the new outstanding
    bits (`oscnt`).
  * `y = 1`, and `s2..sN` are all 1: this is **hold**. Nothing is known unless
    `F = 1`.
* Stage 4 then does one of two things:
  * **Hold with `F = 0`:** nothing is written and AccOSCnt grows by N.
  * **Otherwise:** it writes `F`, AccOSCnt × `!F`, the determined bits, and on a
    flush the stop bit. AccOSCnt then becomes `oscnt`.

  The word is built as a barrel-shifter datapath. `F` and its inversion are
  masked to `1+AccOSCnt` bits, then ORed with the determined bits shifted right
  by `1+AccOSCnt`.
* The first bit of each slice is always the leading 0 of the code value. It is
  dropped, as HEVC's `firstBitFlag` does.

The output word is 41 bits: one first bit, up to 31 outstanding bits, up to 8
determined bits, and a stop bit. A run of more than 31 outstanding bits cannot
be represented. The sticky `acc_overflow` output reports it until the next
reset, and an assertion in `bae_stage4` prints a warning in simulation. The mixed random streams of the testbenches
reach runs of about 20–25; a random stream of bypass bins only reached 34. If your streams
can have longer runs, widen `ACC_W` in `bae_pkg`. `OUT_W` follows from it.

## Slices and the flush

A terminate bin equal to 1 ends a slice. In HEVC this is always followed by
EncodeFlush. Here the flush is part of that packet:

* Stage 3 shifts Low by two more bits, so 9 bits in all.
* All bits in the chunk count as determined.
* Stage 4 appends the stop bit `1`.

Range, Low, AccOSCnt and the first-bit flag then return to their slice-start
values (510, 0, 0, set). The next packet starts a new slice. Byte alignment and
the slice trailing bits beyond the stop bit are left to whatever collects
`out_bits`.

## Interface of `bae_top`

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `clk`, `rst_n` | in  | 1     | clock, asynchronous active-low reset |
| `in_valid`     | in  | 1     | a packet is presented |
| `in_packet`    | in  | 10    | packet (format above) |
| `out_valid`    | out | 1     | `out_nbits > 0` |
| `out_bits`     | out | 41    | coded bits, first bit in `out_bits[40]`, unused bits 0 |
| `out_nbits`    | out | 6     | number of coded bits this cycle (0..41) |
| `acc_overflow` | out | 1     | sticky: an outstanding-bit run exceeded 31 |

The stage modules pass typed structs (`s1_t`, `s2_t`, `s3_t` in `bae_pkg`)
between them. Stages 2–4 also bring out their state registers (`range_q`,
`low_q`, `acc_q`) for observation.

## Where this RTL departs from the published architecture

The published design sends "7 bits" of shifted Low plus a 3-bit outstanding
count from stage 3 to stage 4. It builds a 38-bit output word from a 17-bit
renormalized Low. Those sizes cover renormalization shifts of up to 6. Here the
sizes are larger:

* a 20-bit renormalized Low,
* a 10-bit chunk (the carry plus up to 9 bits),
* a 41-bit output word.

These carry the terminate bin's 7-bit shift and the two flush bits. The rest of
the regular and bypass datapath follows the published one.

The following are this design's own choices, because the source gives no detail
for them:

* the numeric mode codes,
* the placement of the bypass bins in `EPbits`,
* the rule that picks `F`,
* the exact outstanding-bit look-up (above),
* the flush and slice restart,
* the AccOSCnt width and the overflow flag,
* the valid-only interface.

The rLPS table is HEVC's rangeTabLps. The published text does not say whether
the rLPS look-up is ROM or logic. Here it is a constant function; synthesis
maps it to a 256×8 table.

Context selection, the probability-state update, binarization and bit packing
are not part of this RTL.

## Verification

Each testbench checks itself and ends with `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_bae_top` | End to end at default parameters. ~40,000 random packets in ~200 slices, compared as a whole and word by word: regular MPS/LPS, bypass groups of 1–4, terminate 0/1, empty cycles. The coded bits must equal a bit-serial HEVC reference model (`tb/bae_ref_pkg.sv`) bit for bit. Also checks the 4-cycle latency, one packet per cycle, and that MPS, LPS, every group length, terminate 0, flush, carry, outstanding bits and hold all occurred. Reports bins/cycle, about 1.5 for this mix. |
| `tb_bae_workload` | Two synthetic streams of regular bins and bypass runs (1–11 bins, packed in groups of 4), with about 26% and 41% bypass bins, 30,000 bins each. Bit-exact against the reference, one packet per cycle, 4-cycle drain. Measured 1.22 and 1.39 bins/cycle. |
| `tb_bae_stage1` | Decode of all modes; rLPS rows typed in from the standard for several states; shape of the whole table. |
| `tb_bae_stage2` | Range, increment and shift against a bit-at-a-time renormalization model. |
| `tb_bae_stage3` | Chunk, counts, hold flag and Low against integer arithmetic and a bit-by-bit scan. |
| `tb_bae_stage4` | Fed with stage-3 results computed in the testbench. The output stream must equal the HEVC reference bitstream. A directed run of held chunks must set `acc_overflow` exactly when the count passes 31. |

The reference table in stage 1 is checked only at the typed-in rows and by its
shape. An error elsewhere in the table would go into the reference model too,
so the end-to-end test would not catch it.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bae_pkg.sv tb/bae_ref_pkg.sv rtl/bae_stage1.sv rtl/bae_stage2.sv \
  rtl/bae_stage3.sv rtl/bae_stage4.sv rtl/bae_top.sv tb/tb_bae_top.sv \
  --top-module tb_bae_top -Mdir obj_top -o sim && obj_top/sim
```

For a stage testbench, list `rtl/bae_pkg.sv`, `tb/bae_ref_pkg.sv` (stages 3 and
4), the stage's module and its testbench. Each run takes a few seconds.

## Throughput

The core codes one regular bin, or one group of up to four bypass bins, per
cycle. The average rate depends on how many bins are bypass-coded and how well
the context modeler groups them. If a fraction b of the bins are bypass bins and
all groups are full, the rate is `1 / ((1-b) + b/4)` bins/cycle. For example,
b = 0.38 gives 1.4 bins/cycle.

The published figures come from HM 16.12 all-intra and low-delay streams at
QP 22 and 37. They are 1.24–1.56 bins/cycle, 1.4 on average, which at 810 MHz in
a 45 nm library is about 1.1 Gbin/s. These figures have not been reproduced
here, because no such bin traces were available. `tb_bae_workload` shows the
dependence on the bypass share with synthetic streams: 1.22 bins/cycle at 26%
bypass bins and 1.39 at 41%.

Generic Yosys synthesis of `bae_top` gives 160 flip-flops: the three pipeline
registers (86), the registered output word and count (48), Range (9), Low (10),
AccOSCnt (5), and the first-bit and overflow flags. The rLPS table is 64×32
bits of constants. The published core is 2.2K gates. No gate count was made
for this RTL in a standard-cell library.

## Files

* `rtl/bae_pkg.sv`: widths, mode codes, pipeline structs, rangeTabLps.
* `rtl/bae_stage1.sv` … `rtl/bae_stage4.sv`: the four stages.
* `rtl/bae_top.sv`: the pipeline.
* `tb/bae_ref_pkg.sv`: bit-serial HEVC reference encoder and stage-3 reference
  function.
* `tb/tb_*.sv`: testbenches.
