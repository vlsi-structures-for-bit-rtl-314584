# Bit-serial modular multiplication by rotation and basis conversion

Multiplying a residue `x` by a fixed constant `q` modulo a small prime `m` is
the inner operation of number-theoretic transforms and of residue-number-system
arithmetic. This design does it without a single adder or multiplier in the
data path. The trick is this:

* If a number is written in a radix `b` whose powers repeat modulo `m` (that
  is, `b^J = 1 (mod m)` for a word length of `J` digits), then multiplying it
  by `b` moves every digit one place up. The top digit re-enters at the
  bottom, because `b^J = 1`. Multiplying by `b^e` is a rotation by `e` digits:
  pure wiring, or a few registers in a serial design.
* Every non-zero `q` is a power `g^e` of a generator `g`. A rotation therefore
  multiplies by any `q`, provided the number is held in radix `g`.
* The word length equals the multiplicative order of the radix, which can be
  large (12 digits for `m = 13`, 60 for `m = 61`). The order is therefore
  *split* into factors: `g^e = g1^e1 * g2^e2`, where `g1` and `g2` have small
  orders. The number is held in radix `g2` for the first rotation and then
  re-coded into radix `g1` for the second. The words become short (3 or 4
  digits instead of 12), and throughput rises accordingly.
* Re-coding a number from one radix to another modulo `m` is *basis
  conversion*. It is done by small systolic arrays of look-up cells
  (described below). These arrays are the only place where digit values are
  combined.

Three complete structures are provided. They sit side by side in `bsmm_top`:

| structure | what it computes | input word | word period | latency |
|---|---|---|---|---|
| `split_mult13` | `r = x * 3^e2 * 8^e1 mod 13` (any `q != 0`) | 4-bit binary, MSB first | 4 clocks | 14 clocks |
| `split_mult13_x4` | four independent `r_l = x_l * 3^e2_l * 8^e1_l mod 13`, one shared radix-3-to-8 converter | 4 lanes, 4-bit binary, MSB first | 4 clocks per lane, up to 1 word per clock in total | 14 clocks |
| `ntt61_pg` | all 60 products `x[n] * 2^(n*k) mod 61`, `k = 0..59` | 6-bit binary, MSB first | 6 clocks | 23 clocks |

## Number coding: two-wire digit streams

All data travels digit-serially: one digit per clock, carried on two wires.
The two wires have fixed weights:

* **Signed digit** (`bsmm_pkg::sd_t`, weights `+1` and `-1`). The digit is
  `pos - neg`, in {-1, 0, 1}. Every radix-3 and radix-8 number in the design
  uses this coding. Because the digit set is symmetric, a rotation keeps the
  value of every digit. Encoders never drive both wires; decoders read that
  case as 0.
* **Double digit** (`bsmm_pkg::dd_t`, weights `+1` and `+1`). The digit is
  `a + b`, in {0, 1, 2}. It appears only between the bit-duplication block
  and the mod-61 converter.

Radix-8 digits in {-1, 0, 1} are enough modulo 13: four of them cover values
up to ±585, far more than the 13 residues. The representation is redundant,
and a result is only meaningful after reducing `sum z_k * b^k` modulo `m`.
The testbenches decode outputs this way. No block ever produces a canonical
binary residue; that final step is left to whatever consumes the streams.

A word is framed by a `*_first` strobe on its first digit. Binary inputs
enter MSB first. Outputs leave LSD first.

## Basis-converter cells and offsets

Every converter is a grid of cells. The columns are output digits; the rows
are input digits. Each cell obeys

    alpha * s_in + c_in + K  =  s_out + beta * c_out      (mod m)

where `alpha` is the input radix and `beta` the output radix. The state `s`
flows down a column, collecting the value of that column in the input radix.
The carry `c` moves to the next column. Each cell allows only small sets of
values for its state and carry. `bc_cell` finds its truth table at
elaboration: it searches those sets for an exact integer solution first, then
for one modulo `m`. For every cell in this design there is exactly one
solution.

`K` is a constant *offset*. It pulls a value back into the digit set: for
example, a state in {0, 1, 2} becomes a digit in {-1, 0, 1}. The offsets of
a converter are chosen so that their weighted sum is a multiple of `m`. They
therefore change nothing in the result and cost no logic. Three converters
are built, plus an unfolded form of the first:

* **`bc13_serial`: radix 2 to radix 3, mod 13, serial.**
  * It has one cell per output column. Columns 3^0 and 3^1 are C cells that
    feed their state back into themselves; column 3^2 is an A cell.
  * The feedback of column `k` is cut `k` clocks after a word's first bit, so
    the next word may follow with no gap.
  * The three -1 offsets add up to `-(1+3+9) = -13`. They are absorbed by the
    signed-digit coding: state 2 is `+1` and state 0 is `-1`.
  * Output: 3 digits, LSD first, in clocks `w+4 .. w+6` after the MSB enters
    in clock `w`.
* **`bc13_skew23`: the same conversion, unfolded (skew-parallel).**
  * Eight cells: A, B, C, C in column 3^0; A, B, C in 3^1; A in 3^2.
  * Input row `t` (bit `2^(3-t)`) is presented `t` clocks after row 0.
    Digit `k` appears `4+k` clocks after row 0.
  * It accepts a word every clock. A serial MSB-first word is already in
    this skewed form, so one wire can drive all four rows.
  * The cells are exact. The digits therefore sum to exactly `x - 13`.
  * `split_mult13` uses it instead of the serial converter when
    `BC23_SKEW = 1`.
* **`bc13_skew`: radix 3 to radix 8, mod 13, skew-parallel.**
  * Seven registered cells: A, B, C in column 8^0; D(-1), E(-3) in 8^1;
    F(-1) in 8^2; D(-1) in 8^3.
  * The offsets weigh `-624 = -48 * 13`.
  * Input row `t` is presented `t` clocks after row 0. Output digit `k`
    appears `3+k` clocks after row 0.
  * A new word may enter every clock.
* **`bc61_skew`: radix 2 (digits {0,1,2}) to radix 3, mod 61, skew-parallel.**
  * Twenty cells in columns of 6, 5, 4, 3 and 2.
  * Column 3^0 takes the input digits directly. Every cell in that column
    except the one on row 2^1 carries offset -1. Their weights add up to -61.
  * Each later column is a C cell followed by B cells.
  * The carry out of the last column is provably zero. An assertion watches
    it.
  * Output digit `k` appears `6+k` clocks after row 0.

Every converter was checked exhaustively against the sum of its input modulo
`m`.

## The GF(13) split multiplier (`split_mult13`)

The generator is `2`, of order 12 modulo 13. The design uses `g2 = 2^4 = 3`
(order 3) and `g1 = 2^3 = 8` (order 4), so

    q = 2^e = 3^e2 * 8^e1 (mod 13)   with   e = 3*e1 + 4*e2 (mod 12).

The ports take `e1` and `e2` directly. A constant `q` maps to them as follows
(a 12-entry table, or `e2 = e mod 3` and `e1 = -e mod 4`):

| q  | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
|----|---|---|---|---|---|---|---|---|---|----|----|----|
| e1 | 0 | 3 | 0 | 2 | 3 | 3 | 1 | 1 | 0 | 2  | 1  | 2  |
| e2 | 0 | 1 | 1 | 2 | 0 | 2 | 2 | 0 | 2 | 1  | 1  | 0  |

`q = 0` has no exponent and is not supported.

Pipeline, with the MSB of `x` in clock `w`:

1. **`w .. w+3`: binary input.** `bc13_serial` turns it into 3 signed
   radix-3 digits, out at `w+4 .. w+6`.
2. **Cyclic shift by `e2`.** A `cs_serial` with `J = 3` buffers the word and
   sends it back rotated, MSD first. This takes 3 clocks of latency.
3. **Conversion to radix 8.** An MSD-first serial stream is already in
   skew-parallel form, so all three input rows of `bc13_skew` are driven from
   the one wire. Its four radix-8 digits come out one per clock. A phase
   multiplexer picks the right column each clock, so the stream is LSD first.
4. **Cyclic shift by `e1`.** A `cs_serial` with `J = 4`. The result leaves
   LSD first on `r_out` in clocks `w+14 .. w+17`.

`e2` is used by the first shifter. `e1` travels down the pipe with the word
as a tag. Words may follow every 4 clocks; an assertion enforces this
spacing. A single-radix design would need 12-digit words and one word every
12 clocks.

### Four multipliers, one converter (`split_mult13_x4`)

The skew-parallel radix-3-to-8 converter takes a new word on every clock,
but one multiplier only offers it a word every 4 clocks. `split_mult13_x4`
fills the other three slots with three more multipliers. Each of the four
lanes has its own `x`, `e1` and `e2`. It also has its own serial converter
and first shifter, and its own phase multiplexer and second shifter.

* The lanes share only the 3-to-8 converter. Each lane's first shifter
  sends its radix-3 digit `t` into converter row `t` at the clock that digit
  appears. The words of different lanes are thus stacked in the skewed array.
  Each word occupies a different diagonal.
* The one rule: no two lanes may start a word on the same clock. An
  assertion enforces it. Otherwise the start offsets are free. With four
  lanes one clock apart, the converter works on every clock.
* Timing per lane is the same as `split_mult13`: a word every 4 clocks,
  latency 14.

## The GF(61) NTT product generator (`ntt61_pg`)

A 60-point NTT modulo 61 with kernel `2` needs, for each input `x[n]`, the
sixty products `X[n,k] = x[n] * 2^(n*k mod 60)`. The summation over `n` is a
separate step and is not part of this design. Since `2^6 = 64 = 3 (mod 61)`
and 3 has order 10, every power splits as `2^j = 2^a * 3^r` with
`j = a + 6r`, `a < 6`, `r < 10`.

1. **`bdcs61`: bit duplication and cyclic shift.**
   * Multiplying the 6-bit word by `2^a` rotates it left by `a` places.
   * A bit that falls off the top has weight `2^6 = 3 = 2 + 1`. So it
     re-enters at bit 0 (the rotation) and is also copied into bit 1 of a
     second binary word.
   * Each product `2^a x` is therefore a pair of binary words whose sum is
     the product: a {0,1,2} digit per position.
   * Only registers and wiring are used.
2. **GR6 crossbar (`gr_xbar`).** It picks which of the six small products
   goes to each of six converter slots.
3. **One `bc61_skew`**, shared by the six slots. The six slots enter on
   consecutive clocks through skew registers, so each word period of 6
   clocks converts all of them.
4. **Six `cs_ring_all` units**, one per slot.
   * A 5-digit signed radix-3 word is a ring of ten bit positions. The +1
     wires are weights `3^0..3^4`; the -1 wires are `3^5..3^9`, because
     `3^5 = -1 (mod 61)`.
   * Rotating the ring by `r` multiplies by `3^r`. All ten rotations are
     available at once as wiring.
   * The unit is double buffered: one word is captured while the previous
     one is sent.
5. **Six GR10 crossbars (`gr_xbar`).** Output `e` of unit `i` becomes output
   `k = i + 6e`.

### Crossbar routing (`ntt_ctrl`)

For `k = i + 6e`, the exponent is `n*k = n*i + 6*n*e (mod 60)`. Hence:

    GR6  slot i        takes  2^a  with  a = (n*i) mod 6
    GR10 unit i, out e takes  3^r  with  r = (floor(n*i / 6) + n*e) mod 10

* `n` counts the input words 0..59. It restarts when `frame` is high with
  `x_first`.
* When `n` shares a factor with 6 or 10, the crossbars broadcast: several
  outputs take the same input. Each output has its own multiplexer for this
  reason.
* `mode_all` (sampled with `x_first`) routes with `n = 1`. That gives the
  plain product set `x * 2^k` on output `k`, which is useful when the
  generator serves as a general constant multiplier.
* The routing for a word travels through a 4-entry queue. It takes effect
  when that word reaches each crossbar.

### Split form (`SPLIT = 1`)

The six-way and ten-way stages can themselves be split further into smaller
rotations and crossbars. The parameter `SPLIT` of `ntt61_pg` (default 0, the
flat form above) selects this form. Function, ports and timing are the same.

* **Products (`bdcs61_split`).** `2^a = 2^(a mod 2) * 4^(a div 2)`.
  * A 2^0/2^1 duplication block feeds a GR2 crossbar.
  * Each of the GR2's two outputs drives a 4^0/4^1/4^2 stage and a GR3.
  * Slot `i` is output `j` of branch `g`, with `i = g + 2j`.
  * A 4^k stage rotates the first row by `2k`, places the wrapped bits at
    bits 1..2k, and shifts the second row up without wrap. This stays a
    two-row word only because the second row of a 2^0/2^1 product holds at
    most bit 1. Assertions check it.
  * The crossbar settings come from the GR6 selections `a_i`. The three
    slots of a branch must share `a_i mod 2`. The NTT routing guarantees
    this.
* **Shifts (`ntt10_unit`).** `3^r = 3^(r mod 5) * (-1)^(r div 5)`.
  * Rotations 3^0..3^4 feed a GR5. It gives output pair `p` (outputs `p`
    and `p+5`) the rotation `r_p mod 5`.
  * A sign unit offers that word and its negation. Negating a signed-digit
    word only swaps its two wires.
  * A GR2 gives each output of the pair its sign.
  * Outputs `p` and `p+5` always need the same `r mod 5`: their rotations
    differ by `5n mod 10`.

### Timing

* Input words: MSB first, at least 6 clocks apart.
* With `x_first` in clock `w`, all sixty outputs start in clock `w+23`.
  Each carries 5 signed radix-3 digits, LSD first, with `X_first` on the
  first digit and `X_valid` on all five.
* `n_out` and `mode_out` name the word being output.

## What is this design's own

The arithmetic follows the original construction throughout:

* cell rules, cell types and offsets;
* the split `2^e = 3^e2 8^e1` and the chain shift, convert, shift;
* bit duplication, the single shared converter and the ten-position ring.

The following were not specified and were chosen here:

* **Converter cells.** They are logic derived from the cell rule, not stored
  ROMs. Their values are 8-bit signed integers internally.
* **Column 3^4 of the mod-61 converter.** It holds two cells, C and B.
  With the C cell alone, 157 of the 729 possible input words convert
  wrongly.
* **Cyclic shifters.** They are word buffers that replay the word rotated.
  This costs one word time of latency per stage.
* **Digit orders.** The first shifter emits its word MSD first so that it can
  feed the skew-parallel converter from one wire. Everything else is LSD
  first.
* **Front converter option.** Feeding the skew-parallel 2-to-3 converter
  from the serial input (`BC23_SKEW`) is an option of this design. The
  serial converter is the default.
* **Split-form settings.** The GR2/GR3 and GR5/GR2 crossbar settings are
  derived from the flat GR6/GR10 selections.
* **Control.** The crossbar controller, the `frame`/`mode_all` inputs, the
  tag queue, the framing strobes and the latencies are all this design's own.
* **Four-lane scheduling.** The paper says one skew-parallel converter can
  serve up to four multipliers. It does not say how. Feeding each lane's
  digits into the converter rows at their own times is this design's choice.
  So is the rule of one word start per clock.
* **Reset.** It is synchronous and active-low (`rst_n`) everywhere.
* **Exponents.** `e1`/`e2` are inputs. A table from `q` (above) is left to
  the user.

Not built:

* a 3-point or 12-point NTT modulo 13 built around the shared converter;
* the NTT summation;
* a bit-parallel split multiplier made of the two skew-parallel converters
  with parallel rotators in between (an alternative to the bit-serial form).
  The converters `bc13_skew23` and `bc13_skew` it would use are both here.

## Files

| file | contents |
|---|---|
| `rtl/bsmm_pkg.sv` | digit types `sd_t`, `dd_t` and helper functions |
| `rtl/bc_cell.sv` | generic converter cell |
| `rtl/bc13_serial.sv`, `rtl/bc13_skew23.sv`, `rtl/bc13_skew.sv`, `rtl/bc61_skew.sv` | basis converters |
| `rtl/cs_serial.sv`, `rtl/cs_ring_all.sv` | cyclic shifters |
| `rtl/bdcs61.sv`, `rtl/gr_xbar.sv`, `rtl/ntt_ctrl.sv` | bit duplication, crossbar, routing |
| `rtl/bdcs61_split.sv`, `rtl/ntt10_unit.sv` | split form of the mod-61 product and shift stages |
| `rtl/split_mult13.sv`, `rtl/split_mult13_x4.sv`, `rtl/ntt61_pg.sv` | the three structures |
| `rtl/bsmm_top.sv` | top level, all structures side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ntt61_pg_split.sv` | the generator testbench run on the split form |
| `tb/tb_split_mult13_skew.sv` | the multiplier testbench run with the skew-parallel front converter |

## Simulating

Every testbench compares against arithmetic it computes itself. It prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if the design
hangs. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/bsmm_pkg.sv tb/tb_bsmm_top.sv --top-module tb_bsmm_top
    ./obj_dir/Vtb_bsmm_top

Replace `tb_bsmm_top` with any other testbench name to test one block.

`tb_bsmm_top` runs all three structures at full size, at the same time:

* **GF(13):** every `x` with every exponent pair, back to back.
* **Four lanes:** random words on all four lanes, one clock apart, so the
  shared converter is loaded on every clock.
* **GF(61):** a full 60-word frame, a frame restart, the wrap of `n`, and
  all-products mode.
* **Coverage:** it counts how often each of these happened, plus crossbar
  broadcast and permutation. It fails if any count stays at zero.
* **Latency:** it checks the cycle latency of every structure.

It finishes in seconds. The block testbenches cover every input of the
converters exhaustively, and all exponents and shift amounts.
