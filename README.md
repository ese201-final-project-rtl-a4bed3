# Electronic dice game for two players

A small synchronous design for an FPGA board that plays a two-player dice
game. Each player starts with 45 points and sets a bet of 0, 1, 2 or 3 on two
switches. The players take turns pressing their own Roll Dice button. While a
button is held, a counter runs through 2, 3, ..., 12 at the full clock rate.
The value where it stops when the button is released is the sum of the two
dice. Then:

| dice sum        | effect on the player's points |
|-----------------|-------------------------------|
| 3, 8, 10        | + sum x bet                   |
| 4, 6, 11        | - sum x bet                   |
| 2, 5, 7, 9, 12  | none                          |

A player wins on reaching 90 points or more. A player also wins when the
other player drops to 0 or below. The Win LED then stays on until the reset
button is pressed. Four seven-segment displays show the dice sum and the
points of the player who rolled last. Two LEDs show whose values they are.

The design follows the classic split into a **control unit** (a state
machine) and a **datapath** (counter, multiplexers, multiplier,
adder/subtractor, registers and test logic). Most of what follows is about
how those two cooperate in time, because that is where such a design goes
wrong.

## Number ranges and bus widths

All widths come from the game's number ranges. They are collected in
`dice_pkg`.

| bus | range | width |
|---|---|---|
| dice sum (counter output) | 2..12 | 4 bits unsigned |
| bet | 0..3 | 2 bits unsigned |
| product dice x bet | 0..36 | 6 bits unsigned |
| points | -35..125 | 8 bits two's complement |

The points range works like this. A throw only happens while both players
hold 1..89 points. So the largest value a register can take is 89 + 36 = 125,
and the smallest is 1 - 36 = -35. Eight signed bits hold both, so the
adder/subtractor never overflows in play. The datapath asserts this on every
load.

## Datapath (`datapath`)

```
 bet1 ─┐                  ┌──────────┐
       ├─[mux PL]── bet ─►│          │
 bet2 ─┘                  │ multiply ├─ prod ─►┌────────────┐
 ST ─► [2..12 counter] ──►│          │         │ add / sub  ├── result ─► Point Reg1 (LD1)
          │ dice          └──────────┘  ┌─────►│ (Add/Subt) │          └► Point Reg2 (LD2)
          ▼                             │      └────────────┘
     [test logic] ◄──── points_sel ─────┤
      │TestA │TestB            [mux PL]◄┴── Point Reg1 / Point Reg2
```

- `dice_counter` counts 2..12 and wraps back to 2 while `ce` (ST) is high.
  It holds otherwise.
- Two `mux2` instances, both steered by PL, select the bet and the point
  register of the player on turn. PL = 1 means player 1.
- `multiplier` forms dice x bet from two gated partial products.
- `add_sub` adds the product, or subtracts it through the inverted operand
  plus a carry-in, in two's complement.
- `point_reg` (two instances) are parallel-load registers preset to 45 by
  reset. The load signal is sampled on the rising edge: if LD is high during
  a clock period, Q takes the new value at the edge that ends that period.
- `test_logic` reports **TestA**, the class of the dice sum (`DICE_GAIN`,
  `DICE_LOSS` or `DICE_NONE`). It also reports **TestB**, the state of the
  selected register (`PTS_HIGH` for 90 or more, `PTS_LOW` for 0 or less,
  `PTS_PLAY` otherwise).

The result of the adder/subtractor goes to both registers. Only the one whose
load is raised takes it. The test logic looks at the selected register, so
one clock after a load, TestB describes the register that just changed.

## Control unit (`control_unit`)

Each player has six states; there are two more for the winners.

| state | outputs (Moore) | leaves to |
|---|---|---|
| `Pn_WAIT` | PL = n | `Pn_ROLL` when player n's button is seen; the other button is ignored |
| `Pn_ROLL` | ST, PL = n | `Pn_CHECK` when the button is released |
| `Pn_CHECK` | PL = n | TestA: GAIN → `Pn_ADD`, LOSS → `Pn_SUB`, NONE → other player's WAIT |
| `Pn_ADD` / `Pn_SUB` | LDn, Add/Subt = 0 / 1, PL = n | `Pn_TEST` |
| `Pn_TEST` | PL = n | TestB: HIGH → n wins, LOW → the other player wins, PLAY → other player's WAIT |
| `WIN1` / `WIN2` | Win LED | stays until reset |

Every output is decoded from the state register. So every output changes one
clock after the input that caused it. Taken together
with the datapath, a turn runs like this (one column per clock, after the
button synchroniser):

```
rd (button)   ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|____________________
state         WAIT | ROLL .... ROLL | CHECK | ADD  | TEST | next WAIT
ST            _____|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_____________________
dice          counting ............ | stable ──────────────
LDn, Add/Subt ______________________________|‾‾‾‾‾|_______
Point Reg n   old ..................................| new
TestB         (old register) ...................... | new → decides
```

Some timing facts follow from this:

- If the synchronised button is high for H clocks, ST is high for exactly
  H clocks. The counter therefore advances H steps, wrapping after 12. On
  the board H is thousands of clocks and unpredictable, so the throw is
  random. In simulation, choosing H chooses the throw.
- TestA is read in CHECK, when the counter has already stopped.
- Count clock edges from the first clock in which the released button is
  seen low. CHECK starts at edge 1 and ADD/SUB at edge 2. The register takes
  its new value at edge 3. The other player's WAIT starts at edge 4, or at
  edge 2 when the sum changes nothing.
- TestB is read in TEST, between edges 3 and 4, so it sees the new value.

Reset puts the machine in `P1_WAIT`: player 1 starts. The bet switches are
read directly, in the load clock, so a player may change the bet at any time
before a throw.

## Display (`display_unit`, `dice_decoder`, `points_decoder`)

The two left digits show the dice sum, and the two right digits show points.
The points shown belong to the player who rolled last. A one-bit register
copies PL while ST is high, so after player 1's throw the display keeps
player 1's dice and points. It switches only when player 2 starts rolling.
`led_p1`/`led_p2` show that register. While a button is held the dice digits
change at the clock rate, which is too fast to read.

The four digits share their segment lines. A two-bit digit counter steps on
every tick of `clk_divider` and enables one digit at a time. The anodes
`an_n`, segments `seg_n` ({g,f,e,d,c,b,a}) and decimal point `dp_n` are all
active low, for common-anode displays. `an_n[3]` is the leftmost digit.

At the end of a game a register can hold any value from -35 to 125, but
there are only two digits. The points decoder therefore shows the last two
decimal digits of the magnitude, with a blanked leading zero, and uses the
decimal points to mark the rest:

| value | display |
|---|---|
| 1..99 | plain number, e.g. ` 7`, `45` |
| 0 | ` 0` |
| 100..125 | last two digits, tens decimal point lit (`01` with dot = 101) |
| -9..-1 | `-` and the digit, units decimal point lit |
| -35..-10 | magnitude, units decimal point lit |

During play, when both registers hold 1..89, the display shows a plain number.

## Board hookup and clocking (`dice_game`)

| port | board part |
|---|---|
| `rd1_btn`, `rd2_btn` | Roll Dice push buttons of player 1 and 2 (BTN1, BTN2) |
| `rst_btn` | reset push button (BTN4) |
| `bet1[1:0]`, `bet2[1:0]` | switch pairs SW1/SW2 and SW3/SW4 |
| `led_p1`, `led_p2` | LD1, LD2: whose values are shown |
| `led_win1`, `led_win2` | LD7, LD8: winner |
| `an_n`, `seg_n`, `dp_n` | seven-segment anodes and cathodes |

The pin numbers belong in the board's constraint file and are not part of
the RTL.

Everything runs on the single board clock. The dice counter needs a fast
clock, and nothing else needs a slow one. Only the display scan is paced, by
the enable tick of `clk_divider`. `SCAN_DIV` (default 100 000) gives a 1 kHz
digit rate from a 100 MHz clock. Adjust it for another board clock.

The three buttons each pass through two flip-flops (`sync2`) before use.
Reset is synchronous after its synchroniser. There is no debouncer: a bounce
while rolling only adds counts to a counter that is random anyway.

## What is fixed by the game and what is this design's choice

Fixed by the game's specification: the rules and numbers (45, 90, 0, the sum
lists, bets 0..3), the partition into control unit and datapath, and the
datapath blocks and their connections. Also fixed: the 2-to-12 counter with
count enable, the 4 x 2 bit multiplier, the two's complement
adder/subtractor, the parallel-load registers preset to 45 with load on the
next clock edge, and the signal names (ST, PL, LD1, LD2, Add/Subt, TestA,
TestB). The display layout (dice on the first two digits, points on the last
two, shown for the player who rolled) and the board hookup are fixed as well.

This design's own choices:
- the state split and Moore-only outputs
- the encodings of PL, TestA and TestB
- ignoring the other player's button
- synchronous reset, the counter's reset value of 2, and the button
  synchronisers
- the display polarity, the scan and the digit order
- the decimal-point scheme for values outside 0..99
- the scan divide ratio

Some alternatives were not used: two 1-to-6 counters, a sequential
multiplier, and registers that hold the bets.

## Verification

Every module has a self-checking testbench in `tb/` that compares its block
with an independent model.

| testbench | what it checks |
|---|---|
| `tb_multiplier` | exhaustive |
| `tb_add_sub` | exhaustive, including the overflow flag |
| `tb_test_logic` | exhaustive |
| `tb_dice_decoder`, `tb_points_decoder` | every input value |
| `tb_dice_counter` | reset value, hold, steps and wrap under random enables |
| `tb_point_reg` | preset and the one-clock load timing |
| `tb_mux2` | random inputs |
| `tb_clk_divider` | tick period and restart after reset |
| `tb_display_unit` | scan order, digit contents, which player is shown |
| `tb_control_unit` | clock-by-clock outputs of each turn, latencies, all four ways of winning |
| `tb_datapath` | two worked cases (below) and 3000 random turns |

The worked cases in `tb_datapath`:
- From 73/77 points with bets 2/3, player 1 throws 4 (→ 65) and player 2
  throws 8 (→ 101).
- From 89/17, player 1 throws 2 (no change) and player 2 throws 11 (→ -16).

`tb_dice_game` plays whole games through the top-level pins at the default
parameters. It runs six directed games, covering each way of winning, a
reset in mid-game and both worked cases above, and then 30 random games. After
every turn it checks both registers and the LEDs against its own model of
the game. At chosen points it reads the scanned digits back from the pins.
It also counts gains, losses, neutral throws, zero bets, counter wraps,
ignored buttons, buttons pressed after a win, display switches and each kind
of win, and it fails if any of them never happened. It runs in a few seconds.

The reference seven-segment patterns in `tb/tb_seg_pkg.sv` are built from
segment letters, independently of the design's table.

## Simulating

Each testbench is a top module with no ports. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dice_game \
  -y rtl -y tb +libext+.sv -Irtl rtl/dice_pkg.sv tb/tb_seg_pkg.sv \
  tb/tb_dice_game.sv
./obj_dir/Vtb_dice_game
```

Replace `tb_dice_game` with any other testbench name. Each testbench ends
with a line `TB_RESULT checks=N failures=M`.

## Files

- `rtl/dice_pkg.sv`: widths, rule constants, status enums, seven-segment table
- `rtl/dice_game.sv`: top level
- `rtl/control_unit.sv`, `rtl/datapath.sv`: the two halves
- `rtl/dice_counter.sv`, `rtl/mux2.sv`, `rtl/multiplier.sv`, `rtl/add_sub.sv`,
  `rtl/test_logic.sv`, `rtl/point_reg.sv`: datapath blocks
- `rtl/display_unit.sv`, `rtl/dice_decoder.sv`, `rtl/points_decoder.sv`:
  display
- `rtl/clk_divider.sv`, `rtl/sync2.sv`: clocking and inputs
- `tb/`: one testbench per module, plus `tb_seg_pkg.sv`
