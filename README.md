# Pig E-bank: an electronic piggy-bank coin counter

A small ASIC core that counts coins dropped into a piggy bank and shows the
running total on a 16x2 character LCD:

```
Total
$01.41
```

External sensors classify each coin (1, 5, 10, 25 cents or $1) into a 3-bit
code. The chip turns that code into the coin's value, adds it to a four-digit
total, and keeps a standard HD44780-style LCD up to date. The main idea is to
keep the total in **binary-coded decimal (BCD)** from the start. Each stored
digit then maps straight to a character code (`'0' + digit`), so no
binary-to-decimal conversion is needed before the display. The total is
limited to $99.99; past that it wraps to $00.00.

The whole design is clocked by a two-phase non-overlapping clock (`ph1`,
`ph2`), and every register is a pair of latches.

## Block structure

```
             +-----------+  16-bit BCD   +--------------------------+  4 BCD digits
sensors[2:0] | coin_mux  |-------------->| bcd_accum                |-------------+
------------>| (6:1 mux  |   coin value  |  coin register           |             |
             | x16 bits) |               |  4 x bcd_digit_adder     |             v
             +-----------+               |  (registered carries)    |   4 x lcd_char_decoder
                                         +--------------------------+             |
                                                                                  | '0'..'9'
             +-----------+  fsm_en (1 cycle per 2^COUNT_W)   +-------------+      |
 ph1, ph2 -->| slowdown  |---------------------------------->| lcd_fsm     |<-----+
 reset ----->| counter   |                                   |             |--> rs
             +-----------+-----------------------------------------------------> lcden
                                                             |             |--> db[7:0]
                                                             +-------------+
```

| File | Block |
|---|---|
| `rtl/pig_top.sv` | chip core; wires the blocks together |
| `rtl/coin_mux.sv` | coin-value datapath: select inverter-buffer plus 16 one-bit 6:1 mux slices with constant inputs |
| `rtl/mux6_1x.sv` | one-bit 6:1 mux slice with true and complement selects |
| `rtl/bcd_accum.sv` | summing module: coin register plus four BCD digit accumulators |
| `rtl/bcd_digit_adder.sv` | one BCD digit: add, correct by +6, register digit and carry |
| `rtl/lcd_char_decoder.sv` | BCD digit to LCD character code |
| `rtl/slowdown.sv` | slow LCD strobe and LCD-controller step pulse |
| `rtl/lcd_fsm.sv` | LCD initialisation and display controller |
| `rtl/flop2ph.sv` | two-phase latch-pair register with synchronous reset and enable |
| `rtl/pig_pkg.sv` | shared types, coin codes and values, state encoding, LCD byte codes |

In the physical chip, only the coin mux is a full-custom datapath. Everything
else is synthesized logic. The RTL keeps that split: `coin_mux`/`mux6_1x` are
written as a slice structure, and the rest is ordinary synthesizable RTL.

## Clocking: two phases, latch-pair registers

There is no single clock edge. `ph1` and `ph2` are two clocks that are never
high at the same time. A register (`flop2ph`) is a master latch, transparent
while `ph2` is high, followed by a slave latch, transparent while `ph1` is high.

- The value a register takes is the one at its input when `ph2` falls.
- Its output changes while `ph1` is high.
- Taken together, it acts like a flip-flop triggered by the rising edge of
  `ph1`.

Reset and enable are a multiplexer in front of the master latch, so reset is
synchronous and active high. It takes effect after one full `ph2`/`ph1` pair.
All registers reset to zero.

The testbenches use a 10-time-unit cycle: `ph1` high for 4, a gap of 1, `ph2`
high for 4, a gap of 1. They change inputs and check outputs at the falling
edge of `ph1`. Any external driver must keep `ph1` and `ph2`
non-overlapping. If the clocks overlap, a master and its slave are both
transparent at once and the registers race. `pig_top` holds an immediate
assertion that reports any overlap in simulation.

Lint tools that treat latches as combinational logic report "circular logic"
on every register that feeds back on itself: the counter, the accumulator
digits and the FSM state. This is expected. In hardware the loop is always cut
by whichever latch is closed.

## Coin codes and the coin mux

| `sensors` | coin | value added (BCD) |
|---|---|---|
| 000 | none | 0x0000 |
| 001 | penny | 0x0001 |
| 010 | nickel | 0x0005 |
| 011 | dime | 0x0010 |
| 100 | quarter | 0x0025 |
| 101 | dollar | 0x0100 |
| 110, 111 | (unused) | 0x0000 |

`coin_mux` is a row of 16 `mux6_1x` slices, one per output bit. Each slice's
six data inputs are tied to bit *i* of the six constants above. A small
inverter-buffer supplies each slice with both `s` and `~s`, so that the
transmission-gate-style slice needs no inverters of its own. The mux is
combinational. Its output is registered on entry to `bcd_accum`.

**A coin is one cycle of a non-zero code.** The sensor interface must present a
coin's code for exactly one clock cycle and return to 000. A code held for *n*
cycles counts as *n* coins. There is no edge detector: any debouncing or pulse
shaping belongs to the sensor logic in front of the chip.

## The BCD accumulator and its delayed carries

`bcd_accum` registers the incoming coin value, then feeds one BCD digit of it
into each of four `bcd_digit_adder`s (ones = cents, tens = dimes,
hundreds = dollars, thousands = ten dollars). Each digit does this every
cycle:

```
s      = y + a + cin            (0..19)
s'     = (s > 9) ? s + 6 : s    (decimal correction)
y     <= s'[3:0]
cout  <= s'[4]
```

This is the part that is easy to misread. **The carry between digits is
registered.** A carry out of the ones digit reaches the tens digit one cycle
later, so at that moment the total can briefly show a value that is too low.
Example: the total is $0.09 and a penny arrives.

| cycle | coin register | total shown | pending carry into tens |
|---|---|---|---|
| 0 | 0x0001 | 00.09 | 0 |
| 1 | 0 | 00.00 | 1 |
| 2 | 0 | 00.10 | 0 |

No value is ever lost. The displayed digits plus the pending carries always
equal the true sum, and a carry waits in its register until the next digit
adds it. Coins may therefore arrive on consecutive cycles. After the input has
been idle for three cycles, the total is exact. Such glitches last at most
three fast cycles. The LCD samples the digits at most once every 2^19 cycles,
so a glitch can show on the display only if a row-2 digit is sent during those
few cycles. That digit is then corrected on the next refresh of row 2, which
follows within eight LCD transfers.

The carry out of the thousands digit is the `overflow` output of `bcd_accum`,
a one-cycle pulse each time the total passes $99.99. The top level does not
use it (no pin, no display state), so the total simply wraps modulo 10000
cents.

Latency: a coin applied in cycle *t* appears in the ones/tens digits at *t+2*:
one cycle in the coin register and one in the digit register.

## LCD timing: `slowdown`

The LCD needs far slower strobes than the core clock. `slowdown` is a
free-running `COUNT_W`-bit counter (default 19). With `n = count + 1`:

- `lcden = n[COUNT_W-1]`. This is a square wave with a period of 2^19 cycles.
  It drives the LCD's `E` pin.
- `fsm_en = (n == 2^(COUNT_W-2))`. This is a one-cycle pulse, once per period,
  in the middle of the low half of `lcden`.

The controller changes `rs`/`db` only on `fsm_en`, a quarter period before
`lcden` rises. The bus is therefore stable through the whole high phase and at
the falling edge of `E`, where an HD44780 latches it. Each LCD transfer takes
one `lcden` period (2^19 cycles). After reset, `lcden` first rises at cycle
2^18 − 1 and first falls at 2^19 − 1. That timing gives ample setup and hold,
and covers the 1.5 ms "clear display" command for any clock up to roughly
300 MHz. No clock frequency was specified for the design.

## The LCD controller: `lcd_fsm`

The controller advances by one state per `fsm_en` pulse. Its outputs depend on
the state only (plus the current character index).

| state (code) | rs | db | next |
|---|---|---|---|
| idle (0), after reset | 0 | 0x00 | setlength |
| setlength (1) | 0 | 0x3C function set: 8-bit bus, 2 lines, 5x10 font | setlines |
| setlines (2) | 0 | 0x3C | setfont |
| setfont (3) | 0 | 0x3C | setblinky |
| setblinky (4) | 0 | 0x3C | lcdoff |
| lcdoff (5) | 0 | 0x08 display off | clearlcd |
| clearlcd (6) | 0 | 0x01 clear | entrymode |
| entrymode (7) | 0 | 0x0C display on, cursor off | writemsg1 |
| writemsg1 (9) | 1 | `"Total"`, then 0xFE | cursor2 after the 0xFE, otherwise stays and advances the index |
| cursor2 (10) | 0 | 0xC0 cursor to row 2, column 0 | writemsg2 |
| writemsg2 (11) | 1 | `'$'`, tens of dollars, dollars, `'.'`, dimes, cents, 0xFE | cursor2 after the 0xFE |

A message ends on the step that sends the blank character 0xFE, so the blank
is written as well. After that, the controller loops between `cursor2` and
`writemsg2` for ever. Row 2 is rewritten every 8 transfers, about 4.2 million
cycles, so the display follows the total without any "new coin" signal. The
idle state is left at the first step, before `lcden` first falls, so the LCD
latches 21 transfers before row 2 is complete. State codes 8, 12–15 are
unused and fall back to `setlength`.

## Top-level interface (`pig_top`)

| port | dir | width | function | pad |
|---|---|---|---|---|
| `ph1`, `ph2` | in | 1 each | two-phase non-overlapping clock | P8, P9 |
| `reset` | in | 1 | synchronous reset, active high | P3 |
| `sensors` | in | 3 | coin code (`s2..s0`) | P15, P14, P13 |
| `lcden` | out | 1 | LCD `E` strobe | P7 |
| `rs` | out | 1 | LCD register select | P6 |
| `db` | out | 8 | LCD data bus | P26 (db7) … P33 (db0) |

Together with 6 supply pads, that uses 22 of the 40 pads of the frame.

Parameter: `COUNT_W` (default 19) sets the LCD transfer period to
2^COUNT_W cycles. It must be at least 3. The testbenches lower it to get
short runs. The other sizes (16-bit BCD total, four digits, 16 mux slices)
are fixed by the number format.

## Where this RTL departs from, or fills in, the original design

- **BCD mux constants.** The design calls for the mux inputs to hold the
  coins' BCD values, and its reference model uses the BCD words above. The
  laid-out custom datapath, however, was drawn with seven slices holding the
  *binary* patterns 0000001, 0000101, 0001010, 0011001, 1100100 (1, 5, 10,
  25, 100). Added by a BCD adder, those would miscount dimes, quarters and
  dollars, and seven bits cannot hold BCD 100. This RTL uses the BCD values
  and 16 slices.
- **Unused sensor codes 110/111** add nothing. The original mux leaves them
  undefined. Its behavioural model treated them as a quarter and a dollar.
- **Overflow** is computed but not used, as in the original.
- **Idle state outputs** (`rs = 0`, `db = 0x00`) were unspecified.
- **Character index** is 3 bits wide. Messages have at most 8 entries.
- **The step pulse** fires at count + 1 = 2^17 for a 19-bit counter. This
  follows the compared constant as written, which places it mid-way through
  the low half of `lcden`.
- Transistor-level details of the custom slices, drive strengths, pads and
  power are not modelled. The sensors and the LCD are external parts. The LCD
  exists only as a behavioural model for the testbenches (`tb/lcd_model.sv`).

## Verification

Every block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_mux6_1x` | all 8 selects x 64 data patterns |
| `tb_coin_mux` | all sensor codes against BCD values computed from cents |
| `tb_bcd_digit_adder` | 3000 random cycles against integer decimal arithmetic, 9+9+1 cases, reset |
| `tb_bcd_accum` | two-cycle latency; 400 random bursts (back-to-back coins) checked after settling against the integer total mod 10000; one overflow pulse per wrap; reset |
| `tb_lcd_char_decoder` | all 16 digit codes |
| `tb_slowdown` | cycle-exact comparison at `COUNT_W = 5`; at the default width: first step at 2^17 − 1, period 2^19, first `lcden` rise at 2^18 − 1 |
| `tb_lcd_fsm` | the full transfer sequence, 40 row-2 passes with random digits, stability between steps, reset |
| `tb_pig_top` | end to end with the LCD model at `COUNT_W = 6`: 60 random coin bursts (about 500 coins, two wraps of the total), display contents after each burst, mid-run reset; counts every coin type, back-to-back coins, carries into each digit, wraps, the init sequence and the row-2 refresh loop, and fails if any never occurred |
| `tb_pig_penny` | power-up order with one penny: first character `'T'`, cursor to row 2 after row 1, then `'$'`, row 2 `$00.01` |
| `tb_pig_full` | the core at default parameters: five coins, the LCD reads `Total` / `$01.41` after exactly 21 transfers of 2^19 cycles (about 11 M cycles, roughly 15 s) |

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pig_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/pig_pkg.sv tb/tb_pig_top.sv
./obj_dir/Vtb_pig_top
```

The simulator has two-state values, so every register is reset before it is
read. All testbenches drive reset first. The testbenches read no files.
