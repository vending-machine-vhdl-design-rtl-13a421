# Candy vending machine for a small FPGA board

A coin-operated candy machine built from four small blocks. The customer
presses a **nickel** button (5) or a **dime** button (10); a candy costs **40**.
When the inserted credit reaches 40 the candy light comes on; if the last coin
takes it to 45, the change light comes on too (one nickel back). The current
credit is shown on two seven-segment digits, and a reset button cancels the
purchase and returns the coins.

The design targets a board with a 100 MHz oscillator, push buttons, LEDs and a
four-digit common-anode seven-segment display (two digits are used).

```
 clk_i 100 MHz ──► clk_divider ──► clk_slow 100 Hz
                                     │
 nickel_i ──► btn_sync (falling) ────┤ nickel pulse
 dime_i   ──► btn_sync (falling) ────┤ dime pulse
                                     ▼
 reset_i ───────────────────► vending_machine (rising) ──► candy_o, cr_o
                                     │ credit 0..45
 clk_i 100 MHz ──────────────► display_two_digit ──► anode_o[3:0], cathode_o[6:0]
```

## How a coin is counted

Human button presses last tens to hundreds of milliseconds, while the FSM
must count each press exactly once. Two things make that work:

1. **A slow clock.** `clk_divider` toggles its output every 500 000 falling
   edges of the board clock, giving a 100 Hz (10 ms) machine clock. A press
   has to last at least one slow period (10 ms) to be seen.
2. **A press-to-pulse detector.** `btn_sync` samples its button on each
   falling edge of the slow clock. Its three states are *released*
   (`BTN_INITIAL`), *just pressed* (`BTN_SECOND`) and *still held*
   (`BTN_THIRD`). The move from released to pressed raises `pulse_o` for
   exactly one slow period; holding the button longer changes nothing, and
   releasing it re-arms the detector. The button is sampled directly, with no
   extra synchroniser stage.

The detectors update on the **falling** edge of the slow clock and the FSM
samples on the **rising** edge, half a period (5 ms) later, so the FSM always
sees a settled pulse.

## The vending state machine

`vending_machine` has ten states, ordered by credit so that state *k* holds
5·*k*:

| state      | credit | nickel pulse | dime pulse | both at once | no coin |
|------------|-------:|--------------|------------|--------------|---------|
| M_INITIAL  | 0      | M_SECOND     | M_THIRD    | stay         | stay    |
| M_SECOND   | 5      | M_THIRD      | M_FOURTH   | stay         | stay    |
| …          | …      | +1 state     | +2 states  | stay         | stay    |
| M_SEVENTH  | 30     | M_EIGHTH     | M_NINTH    | stay         | stay    |
| M_EIGHTH   | 35     | M_NINTH      | M_TENTH    | stay         | stay    |
| M_NINTH    | 40     | vend: candy, back to M_INITIAL ||||
| M_TENTH    | 45     | vend: candy and change, back to M_INITIAL ||||

A nickel and a dime pressed together are ignored. Coins arriving during a
vend state are not counted (with human presses this cannot happen: the next
press arrives at least a slow period after the pulse that caused the vend).

Output timing, all on the rising edge of the slow clock:

* `number_o` (the credit) changes on the edge that accepts the coin.
* `candy_o` (and `cr_o` at 45) rise on the edge that **leaves** the vend
  state, one slow period after the credit reached 40 or 45. The display
  keeps showing 40 or 45 during that period.
* On the next edge (in `M_INITIAL`) `candy_o` and `cr_o` fall and the
  display returns to 0. So each light is on for exactly one slow period
  (10 ms at the default divider).

`reset_i` is asynchronous and active high. It puts the FSM in `M_INITIAL`,
clears the credit and candy light and **raises `cr_o`**: the change/return
light stays on while reset is held, meaning the inserted coins are given
back. It goes out on the first rising edge after reset is released. Reset also
clears the two button detectors. The divider has a reset input, but the top
level ties it inactive so the slow clock runs from power-up.

## The two-digit display and its one-clock lag

`display_two_digit` splits the credit into tens and units (`/10`, `%10`) and
decodes each to an active-low pattern with segment *a* in bit 6 down to *g*
in bit 0:

| digit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|-------|---|---|---|---|---|---|---|---|---|---|
| `cathode_o` | 0000001 | 1001111 | 0010010 | 0000110 | 1001100 | 0100100 | 0100000 | 0001111 | 0000000 | 0000100 |

A digit value above 9 blanks the digit. The display is multiplexed: only one
digit enable (`anode_o`, active low) is on at a time. The two right-hand digits
alternate on **every falling edge of the 100 MHz board clock**; the two left
digits stay dark (`anode_o[3:2] = 11`).

The subtle part is which digit gets which number. A select flip-flop chooses
the anodes, and the segment register is loaded on the same edge, from the
digit chosen by the select value **before** that edge. The segments therefore
lag the anodes by one clock, and the lag places the digits correctly:

| after edge | `anode_o` | lit position | `cathode_o` shows |
|------------|-----------|--------------|-------------------|
| n          | 1101      | second from right | tens  |
| n+1        | 1110      | rightmost         | units |

If you change the select logic, keep this lag in mind or the digits swap. At
a 50 MHz per-digit rate the digits look steady, but a real display may show
faint ghosting; a slower refresh (for example every 1 ms) is a common
improvement. It is not built here.

## Interface

`top_model` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_i` | in | 1 | 100 MHz board clock |
| `reset_i` | in | 1 | reset / cancel button, active high |
| `nickel_i` | in | 1 | nickel button, active high |
| `dime_i` | in | 1 | dime button, active high |
| `candy_o` | out | 1 | candy released (one slow period) |
| `cr_o` | out | 1 | change / coin return: during reset, and one slow period after a 45 purchase |
| `anode_o` | out | 4 | digit enables, active low, `[1:0]` used |
| `cathode_o` | out | 7 | segments a..g in bits 6..0, active low |

Parameter: `DIV_COUNT_MAX` (default 499999). The slow period is
2·(`DIV_COUNT_MAX`+1) board clocks.

Board pins used with this design: clock W5; candy LED U16; change LED E19;
buttons reset U18, nickel T18, dime W19; anodes U2, U4, V4, W4 for bits 0..3;
all LVCMOS33. For the cathodes, connect bit 6 to segment *a* through bit 0 to
segment *g*. Bit 0 must **not** go to the segment-*a* pin (W7 on common
boards). If it does, the patterns appear in reversed segment order.

## Where this RTL makes its own choices

The state table, the timing of the candy and change lights, the divider
ratio, the clock edges each block uses, the segment patterns and the digit
multiplexing follow the original design. These points are this RTL's own:

* `vending_machine` clears the credit and candy light on reset. The original
  behaviour only raises the return light and returns to the idle state, and
  relies on power-up values for the rest.
* `btn_sync` returns its state to *released* on reset, not just its output.
* `display_two_digit` uses one select flip-flop instead of a rotating
  two-bit register preset to `10`. The sequence is the same, but no illegal
  pattern can occur and no reset is needed.
* `clk_divider` restarts its counter if it ever finds it above
  `DIV_COUNT_MAX`. This only matters for an uninitialised power-up value.
* The credit is a 7-bit unsigned bus (`vending_pkg::credit_t`), wide enough
  for the display's 0..99 range.
* Values shared by the blocks are in `vending_pkg`: the coin values, the
  price, the state enums, the credit of each state and the segment table. The
  FSM's step per dime and its vend states are derived from the coin values and
  the price. To change them, keep the price a multiple of 5 and at most 45,
  because the state list ends at `M_TENTH`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog:

| testbench | what it checks |
|-----------|----------------|
| `tb_clk_divider` | half-period length in board clocks, at `COUNT_MAX`=4 and at the default (500 000), and reset |
| `tb_btn_sync` | 400 random presses of 1..7 cycles against a "pressed now, released before" reference; one pulse per press; reset while a button is held |
| `tb_vending_machine` | 20 000 random cycles of coin pulses and resets against a credit-level reference model, compared cycle by cycle; both vend cases, simultaneous coins, coins during a vend |
| `tb_display_two_digit` | every value 0..105: digit alternation, dark left digits, tens/units decoded from an independent segment table |
| `tb_top_model` | whole machine with `DIV_COUNT_MAX`=49 (1 µs slow period): two scripted purchase sequences, then ~300 random presses of random length with resets. It reads the multiplexed display back, checks candy/change counts and that the candy light lasts exactly one slow period, and requires every mechanism to occur at least once |
| `tb_top_model_full` | whole machine at default parameters (100 MHz, 10 ms slow clock): 20 ms presses and 10 ms releases. Two dimes and four nickels buy a candy at 40. Two more dimes show 20, and a reset returns them. Then three nickels and two dimes reach 35, a nickel and dime together are ignored, and a dime reaches 45 (candy and change). About 0.6 s of board time |

`tb_top_common.svh` holds the reference model, display reader and stimulus
tasks shared by the two top-level testbenches.

Running one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_top_model rtl/vending_pkg.sv tb/tb_top_model.sv
./obj_dir/Vtb_top_model
```

Replace the top module and file for the other testbenches. The full-size test
takes about 15 s of wall time. All testbenches apply a reset at the start.
On real hardware the flip-flops' power-up values play that role, but a
two-state simulator starts them at arbitrary values.
