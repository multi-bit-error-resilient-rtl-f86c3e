# Self-correcting FPGA configuration memory with matrix codes

An SRAM FPGA keeps its configuration in thousands of memory cells (the CRAM).
A particle strike can flip one of those bits, or several neighbouring bits at
once, and silently change the circuit the FPGA implements. The usual defence
is a scrubber: a controller that reads the configuration back frame by frame,
checks each frame and rewrites the bad ones. Its time to detect (TTD) depends
on where the upset landed relative to the scrubber's position, and while it
waits, a second upset can make the first one uncorrectable.

This design does without the scrubber. Every configuration word gets its own
checker, wired permanently to the word's storage cells (in-memory error code
correction and checking). An upset shows up on the word's error output in the
same cycle. It is flagged on the next clock edge and, if correctable, written
back on that same edge. The TTD is therefore one clock for every word. The
code is a *matrix code*: a Hamming code along each row of the word plus a
parity bit down each column. It corrects not only single upsets but also
double upsets, including two in the same row.

The RTL implements the code (encoder and checker/corrector) and the
self-repairing CRAM word. It also includes a small FPGA tile whose logic
block, switch box and connection box each take their configuration from such
a word.

## The matrix code

### Layout

A data word of `N = K1 x K2` bits is read as a matrix of `K1` rows and `K2`
columns, row-major: data bit `r*K2 + c` is row `r`, column `c`. The default is
the 16-bit word as a 4 x 4 matrix:

```
          col 0  col 1  col 2  col 3   row check bits
row 0     X1     X2     X3     X4      C0..C3   (3 Hamming + 1 overall parity)
row 1     X5     X6     X7     X8      C4..C7
row 2     X9     X10    X11    X12     C8..C11
row 3     X13    X14    X15    X16     C12..C15
column    P0     P1     P2     P3
parity
```

- **Row check bits.** Each row is protected by an extended Hamming (SEC-DED)
  code. The row's data bits take the non-power-of-two positions 3, 5, 6, 7, 9…
  of a Hamming codeword. Check bit `j` is the XOR of the data bits whose
  position has bit `j` set. One more bit holds the parity of the whole row
  codeword. A `K2`-bit row needs `R` Hamming bits, with `2^R >= K2 + R + 1`,
  plus the overall bit. That is 4 bits for `K2 = 4` and 5 bits for `K2 = 8`.
- **Column parity.** `P[c]` is the XOR of column `c` over all rows.

The stored codeword is `{parity, check, data}`. Row `r`'s check bits sit at
`check[r*RB +: RB]`, where `RB = R + 1`. At the default size that is 16 + 16
+ 4 = 36 bits, 2.25 bits stored per data bit. The code is systematic: the
data bits are stored unchanged, so the fabric can read them directly.

### Checking and correcting (`mc_decoder`)

The checker works in two steps, both purely combinational.

1. **Rows.** For each row, recompute the Hamming bits from the stored data
   and XOR them with the stored ones to get the syndrome `SC`. Also recompute
   the overall parity `ovr` over all stored bits of the row.
   - `ovr = 1` is a single error (**SED**). `SC` is the position of the
     flipped bit. If that position holds a data bit, the bit is inverted. If
     it holds a check bit, the data is already right.
   - `ovr = 0` with `SC != 0` is a double error (**DED**). The row syndrome
     cannot locate it.
   - `ovr = 0` with `SC = 0` means no error (**NE**).
2. **Columns.** Take the column parity of the row-corrected data and XOR it
   with the stored parity bits. This gives the vertical syndrome `SP`, with a
   1 in every column that still holds an odd number of errors. If exactly one
   row is DED, the data bits of that row are inverted wherever `SP = 1`.

In step 2, a DED row whose two flips are both data bits shows two ones in
`SP`, and both bits are repaired. If one flip is a check bit, `SP` shows one
column. If both are check bits, `SP` is zero. Either way, exactly the
corrupted data bits are inverted.

The corrected word is guaranteed when:

- there are at most two upsets anywhere in the codeword, or
- one row has two upsets and every other row has at most one.

When two or more rows report DED, the column syndrome cannot tell which
columns belong to which row. The checker then raises `uncorrectable` and
leaves the DED rows as they are.

Two kinds of triple upset are miscorrected. One is three upsets in a single
row: the overall parity reads them as a single error. The other is a double in one row plus a flipped column-parity bit: the
extra parity column makes step 2 invert a third bit of the DED row. Every
pattern of up to four upsets is still *detected*. The lightest non-zero
codeword has weight 5: one data bit, its three row check bits and its
column-parity bit.

Random fault injection (`tb_mc_coverage`, 2000 patterns per upset count)
gives these results for the 4 x 4 geometry:

| upsets | corrected | flagged uncorrectable | miscorrected | undetected |
|---|---|---|---|---|
| 1 | 100 % | 0 | 0 | 0 |
| 2 | 100 % | 0 | 0 | 0 |
| 3 | ≈ 91 % | 0 | ≈ 9 % | 0 |
| 4 | ≈ 62 % | ≈ 8 % | ≈ 30 % | 0 |
| 5–7 | falls to ≈ 2 % | rises to ≈ 44 % | ≈ 55 % | 0 in the samples |

The 4 x 8 geometry behaves almost the same.

`error` is the OR of every syndrome bit. It is set for upsets in check and
parity bits too, even though the data needs no correction then, so that the
storage gets rewritten.

### The 32-bit variant

The geometry is set by the parameters `K1` and `K2`. With `K1 = 4, K2 = 8`, a
32-bit word has 4 rows of 8 bits. Each row has 4 Hamming bits and 1 overall
bit, giving 20 check bits `C0..C19` and 8 column parity bits `P0..P7`. The
checker tests this geometry alongside the 16-bit one. The tile uses the
16-bit geometry, since its LUT, switch box and connection box each need
exactly 16 configuration bits.

## The self-repairing CRAM word (`imeccc_cram`)

One register holds the codeword. An `mc_decoder` is attached to it
permanently, and an `mc_encoder` re-encodes the corrected data for write-back.

```
 clock edge        n                n+1
 storage      ---[upset lands]---[corrected codeword written back]---
 err_async         1 ............... 0
 err_flag          0                1   (one clock after the upset)
 repaired          0                1
 cfg          correct data throughout (corrected combinationally)
```

- `cfg` is always the corrected data. The fabric never sees a correctable
  upset, even before the repair.
- On the first edge after an upset, `err_flag` rises and, if `repair_en` is
  set, the whole codeword is re-encoded from `cfg` and stored. The write-back
  also restores flipped check and parity bits. It also resets the margin of
  the code, so two later single upsets are again correctable.
- An uncorrectable word sets `ue_flag` and is left unchanged. Recovering it
  takes a reprogramming write.
- Writes have priority: a programming write (`wr_en`, complete codeword) wins
  over an injection, and an injection wins over a repair. The injection port
  (`inj_en`, `inj_mask`) XORs a mask into the stored codeword. It models a
  particle strike or serves as a fault-injection test hook.
- Reset (`rst_n`, asynchronous, active low) clears the word to all zeros,
  which is a valid codeword.

The checker is built from XOR trees, a few comparators and one
row-select/XOR stage. Its depth grows with `log2` of the row width, not with
the size of the memory. That is why the TTD does not depend on the number of
words: each word carries its own checker, and the cost is area rather than
time.

## The tile (`imeccc_tile`)

```
          tracks[3:0]            sb_in[2:0]
              |                       |
        +-----v------+   lut_in   +---v-----+  side 0  +----v-------+
        | connection |----------->| LUT4    |--------->| switch box |---> op2[3:0]
        | box (CB)   |   = op3    | (CLB)   |   op1    |   (SB)     |
        +-----^------+            +----^----+          +-----^------+
              | cfg[2]                 | cfg[0]              | cfg[1]
        +-----+-----------------------+--------------------+------+
        | three imeccc_cram words: CLB (0), SB (1), CB (2)          |
        +-----^-----------------------------------------------------+
              | di = encode(d), written to the word chosen by dec_ip when mode = 1
```

- **CLB**: a 4-input LUT. `o = cfg[{A4, A3, A2, A1}]`. With `16'h5555`, the
  output is the inverse of A1 and A2..A4 are don't-cares.
- **CB**: LUT input `i` is joined to track `t` when `cfg[i*4 + t]` is set.
  Several closed switches give the OR of their tracks; none gives 0.
- **SB**: four sides with one track each. Output side `s` is joined to input
  side `t` when `cfg[s*4 + t]` is set, combined the same way. The LUT output
  enters on side 0 and `sb_in[2:0]` on sides 1..3.
- **Programming phase** (`mode = 1`): `d` is encoded to `di`. On every clock,
  `di` is written into the word that `dec_ip` selects (0 CLB, 1 SB, 2 CB,
  3 none). **Operating phase** (`mode = 0`): no writes.
- **Two copies of the fabric.** `op1/op2/op3` come from the corrected
  configuration. `op1_f/op2_f/op3_f` come from the raw stored bits, through a
  second copy of the LUT, CB and SB. The second copy lets you watch an
  upset's effect next to its correction, and is there for observation only.
  Remove it, and its ports, for a production tile.
- Status per word, with index 0 CLB, 1 SB, 2 CB: `row_status` (NE, SED or
  DED for every row), `err_async`, `err`, `ue` and `repaired`.

Size at the defaults, from a generic coarse synthesis: about 545 word-level
cells and 117 flip-flops. The flip-flops are 3 x 36 storage bits plus
3 x 3 status bits.

## Where this RTL departs from the source description, or fills gaps

- **Check bits per row.** The design is specified as SEC-DED per row. The
  worked 16-bit example draws only three check bits per 4-bit row, which is
  single-error correction only. This RTL follows the SEC-DED requirement
  and stores a fourth bit per row, the overall parity. The 32-bit variant's
  bit counts (20 check bits, 8 parity bits) come out the same as in the
  specification.
- **Uncorrectable patterns.** Two DED rows are flagged (`uncorrectable`,
  `ue_flag`) and not repaired. The source does not say what should happen in
  that case.
- **Repair policy.** Write-back of the whole re-encoded codeword on the edge
  after detection, the `repair_en` switch, write priorities and reset values
  are this design's own choices.
- **Switch box and connection box.** Only their names and roles are given.
  The 16-switch full matrices here are the simplest structures that give each
  element a 16-bit word like the LUT's.
- **CLB.** Reduced to its 4-input LUT, without flip-flops or carry logic.
- **Programmable delay.** The LUT is also described as a programmable delay
  line: the A1-to-output delay depends on A2..A4. That is a property of the
  transistor-level LUT and is not modelled. Only the logic function (the
  inverter) is.
- **Not included.** The earlier single-error approach is not part of this
  RTL. It uses a 32-bit word of 26 data and 6 check bits with a 2-bit status
  output. Neither are read-back scrubbing and a whole-device floor plan.
- **`di[15:0]`** equals `d`, since the code is systematic.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_mc_encoder` | all 65 536 16-bit words against the textbook Hamming(7,4) equations plus overall and column parity |
| `tb_mc_decoder` | 4 x 4 and 4 x 8 geometries, 400 random words each: clean, one upset anywhere, two anywhere, two in a row, two in a row plus one per other row (all corrected), two DED rows (flagged) |
| `tb_mc_coverage` | fault-injection campaign with 1 to 7 random upsets per codeword, both geometries; prints the coverage table above and checks the guarantees (≤ 2 corrected, ≤ 4 detected) |
| `tb_imeccc_cram` | err_async in the upset cycle, err_flag exactly one clock later, repaired codeword identical to the programmed one, repair disabled, uncorrectable word left alone, reprogramming |
| `tb_clb_lut4`, `tb_switch_box`, `tb_connection_box` | every input combination, random configurations, the inverter configuration |
| `tb_imeccc_tile` | end to end at default parameters: programming through mode/dec_ip with di checked, ignored writes in the operating phase, then upsets in all three words (single, row-double, check-bit, three per word, two DED rows) with repair on and off. Corrected and raw outputs are compared with a behavioural fabric model, and each of these mechanisms is counted and required to happen. |

The reference encoder in `tb/mc_ref_pkg.sv` builds each row's Hamming
codeword bit by bit. It is independent of the RTL's mask-based encoder.

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv tb/mc_ref_pkg.sv tb/tb_imeccc_tile.sv --top-module tb_imeccc_tile
./obj_dir/Vtb_imeccc_tile
```

Leave out `tb/mc_ref_pkg.sv` for testbenches that do not import it (the LUT,
SB and CB ones). The testbenches use only 2-state values and `$urandom`.
Every testbench finishes in well under a second.

## Files

- `rtl/mc_pkg.sv`: geometry defaults, row-status enum, Hamming helper functions
- `rtl/secded_row_enc.sv`: SEC-DED check bits of one row
- `rtl/mc_encoder.sv`: matrix-code encoder
- `rtl/mc_decoder.sv`: two-step checker/corrector
- `rtl/imeccc_cram.sv`: protected CRAM word with detection, injection and repair
- `rtl/clb_lut4.sv`, `rtl/switch_box.sv`, `rtl/connection_box.sv`: tile fabric
- `rtl/imeccc_tile.sv`: top level
- `tb/`: testbenches; `mc_ref_pkg.sv` (reference code), `mc_codec_tester.sv` (random encoder/decoder tester) and `mc_coverage_run.sv` (coverage campaign) are shared helpers

To change the word geometry, set `K1` and `K2` on `mc_encoder`,
`mc_decoder` or `imeccc_cram`. The tile checks that `K1 * K2 = 16`.
