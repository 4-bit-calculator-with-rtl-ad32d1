# 4-bit calculator with binary and decimal display

A small board-level calculator for an FPGA development board with switches,
pushbuttons, green LEDs and seven-segment displays (an Altera DE2 class board).
Two 4-bit unsigned operands are set on switches; holding one of four
pushbuttons picks addition, subtraction, multiplication or division. The 8-bit
result is shown twice: in binary on eight green LEDs, and in decimal, 000 to
255, on three seven-segment digits.

The interesting part is that every operator is built from explicit gate-level
cells rather than from `+`, `-` and `*`: a ripple-carry adder of full adders, a
ripple-borrow subtractor of full subtractors, and a parallel array multiplier of
AND gates, full adders and half adders. Division is the exception: it is a
small clocked machine that divides by repeated subtraction. The decimal display
uses the shift-and-add-3 (double dabble) binary-to-BCD conversion.

## Data path

```
 a[3:0] ──┬─► ripple_adder ──────sum──┐
 b[3:0] ──┤─► ripple_subtractor ─diff─┤
          ├─► array_multiplier ──prod─┤  key[3:0]     ┌──► ledg[7:0]
          └─► divider ───────────quot─┴──► mux ─result┤
 clk, rst, start ──┘                                   └──► bin_to_bcd ─► sev_seg ─► hex2 hex1 hex0
```

| Module              | Role |
|---------------------|------|
| `calc_pkg`          | widths (`OPND_W`=4, `RES_W`=8), operand/result/segment types, pushbutton codes, BCD digit struct |
| `full_adder`, `half_adder`, `full_subtractor` | one-bit cells |
| `ripple_adder`      | 4-bit adder, 8-bit zero-extended sum |
| `ripple_subtractor` | 4-bit subtractor, 8-bit two's complement difference |
| `array_multiplier`  | N x N array multiplier, N = 4 |
| `divider`           | clocked repeated-subtraction divider |
| `calculator`        | the four operators and the pushbutton result select |
| `bin_to_bcd`        | 8-bit binary to hundreds/tens/ones |
| `sev_seg`           | three active-low seven-segment decoders |
| `calc_top`          | board top |

Everything except the divider is combinational: LEDs and displays follow the
switches and buttons with only gate delay.

## Operator select

The four pushbuttons are active low, so a single held button gives a one-cold
code on `key[3:0]`:

| `key`  | button | result |
|--------|--------|--------|
| `1110` | KEY0   | a + b |
| `1101` | KEY1   | a - b |
| `1011` | KEY2   | a × b |
| `0111` | KEY3   | a ÷ b (quotient) |
| other  | none, or several | 0 |

The result is only shown while a button is held; releasing all buttons shows
000.

## Result ranges and negative differences

All results fit in eight bits: the largest sum is 30, the largest product 225,
the largest quotient 15. The subtractor produces a 5-bit two's complement
difference whose final borrow is the sign; the sign is copied into bits 7..4,
so 3 − 5 appears as `1111_1110` on the LEDs. The decimal converter treats the
8-bit value as unsigned, so the same result shows as 254 on the displays; there
is no minus sign.

## The array multiplier

Partial product bit `pp[j][i] = x[i] & y[j]` is formed for all 16 pairs at once.
Row 0 of partial products passes straight through: its bit 0 is product bit 0
and its upper three bits start a 4-bit running sum. Each further row j adds
partial-product row j to that running sum with a ripple row of adders:

* column 0: a half adder (no carry comes in);
* the last column of the first row: a half adder, because the running sum has
  only three bits there;
* everywhere else: full adders.

The low sum bit of each row is the next product bit; the row's carry out and
its upper sum bits form the running sum for the next row. After the last row
the running sum is product bits 7..4. For N = 4 this is 8 full adders and 4
half adders, and the worst path is about 2N adder delays. The module is written
as a generate over rows and columns with `N` as a parameter (N ≥ 2).

## The divider

The divider computes `quot = num / den` and `rem = num % den` by counting how
many times the divisor can be subtracted.

* While `start` is high, every clock loads `num` and `den`, clears the
  quotient and lowers `done`.
* After `start` goes low, each clock either subtracts (`rem -= den`,
  `quot += 1`) when `rem >= den`, or stops and raises `done`.
* `done`, `quot` and `rem` hold until the next `start` or `rst`.
* `rst` is synchronous and active high and returns everything to zero.

A division with quotient q takes q + 1 clock cycles after `start` falls; the
worst case, 15 ÷ 1, takes 16 cycles, i.e. 320 ns at 50 MHz, far below what a
person holding a button can see. Only the quotient reaches the display; the
remainder is available on the divider's port but unused.

On the board `start` and `rst` are switches: flip start on and off, then hold
the divide button. The quotient appears in the display select as soon as it is
ready.

Departures from the original lab design, which are deliberate:

* The original cleared the quotient only on reset, so a second division without
  a reset added to the previous quotient. Here each start clears it.
* The original never finished on a zero divisor (the remainder is always ≥ 0).
  Here a zero divisor finishes after one cycle with `quot = 8'hFF` (shown as
  255) and `rem = num`.
* The original kept two flags (working, done); here a three-state enum
  (idle, busy, done) holds the same information.

An assertion checks that the working remainder never grows while the divider
is busy.

## Binary to BCD: shift and add 3

`bin_to_bcd` moves the 8-bit value into three 4-bit decimal digits one bit at a
time, most significant bit first. Before each shift, every digit that holds 5
or more gets 3 added. A digit of 5..9 doubled would be 10..18, which is not a
valid BCD digit; adding 3 first makes the doubled value 16..24, so the shift
pushes exactly one carry into the next digit and leaves the correct remainder.
For 162 (`1010_0010`):

| after          | hundreds | tens | ones | bits left |
|----------------|----------|------|------|-----------|
| shift 3        | 0000 | 0000 | 0101 | 0_0010 |
| add 3 (ones)   | 0000 | 0000 | 1000 | |
| shift 4        | 0000 | 0001 | 0000 | 0010 |
| shifts 5–7     | 0000 | 1000 | 0001 | 0 |
| add 3 (tens)   | 0000 | 1011 | 0001 | |
| shift 8        | 0001 | 0110 | 0010 | |

giving 1, 6, 2. The loop is unrolled into combinational logic (`always_comb`
with a `for` loop); the width is a parameter `W` (at most 9 for three digits).

## Seven-segment decoding

Each digit drives a 7-bit pattern, bit 0 = segment a up to bit 6 = segment g.
The displays are active low: a 0 lights the segment. Codes 10..15 blank the
digit (all ones); they cannot occur from `bin_to_bcd`. `hex2` is the hundreds
digit, `hex1` tens, `hex0` ones.

## Top-level ports (`calc_top`)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1 | board clock (50 MHz on a DE2), only used by the divider |
| `rst`      | in  | 1 | divider reset switch, active high |
| `start`    | in  | 1 | divider start switch |
| `a`, `b`   | in  | 4 each | operand switches |
| `key`      | in  | 4 | operator pushbuttons, active low |
| `ledg`     | out | 8 | result in binary |
| `hex0..2`  | out | 7 each | ones, tens, hundreds digit, active low |
| `div_done` | out | 1 | divider finished (may drive a spare LED) |

Ports carry plain names; map them to the board's pins (for example `SW`,
`KEY`, `LEDG`, `HEX0..HEX2`, `CLOCK_50`) in the pin assignment. Which switches
carry `a`, `b`, `start` and `rst` is a free choice.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with
values computed independently (integer arithmetic, integer division and
modulo, a segment table written as lists of lit segments) and prints one line
`TB_RESULT checks=N failures=M`:

* the one-bit cells, the adder, subtractor, multiplier and BCD converter are
  checked exhaustively;
* `tb_divider` runs all 256 operand pairs, checks quotient, remainder and the
  exact cycle count (q + 1, or 1 for a zero divisor), that the answer holds,
  that a start held for several cycles restarts cleanly, and a reset in the
  middle of a division;
* `tb_calculator` runs every operand pair with every button code;
* `tb_calc_top` is the end-to-end test at the default sizes: every operand pair
  through all four operators, no-button and multi-button codes, divide by zero,
  and a reset during a division, checking LEDs and decoded displays. It counts
  each of those events and fails if one never happens.

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/calc_pkg.sv tb/tb_calc_top.sv --top-module tb_calc_top
./obj_dir/Vtb_calc_top
```

Replace `tb_calc_top` with any other testbench name. Each finishes in well
under a second.

## Known limits

* Operands are unsigned; negative differences are shown as unsigned 8-bit
  patterns on the displays.
* The remainder of a division is computed but not displayed.
* The pushbuttons and switches are used unsynchronised and undebounced, as in
  the original: the combinational operators do not need it, and a bouncing
  start switch only restarts the division.
