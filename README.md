# Switcher: a 64-channel high-voltage row driver for pixel sensors

A charge-transfer pixel sensor is read out one row at a time. For every row
in turn, the row's electrodes get a pair of bias pulses, several volts to
tens of volts in amplitude. These pulses move the stored charge to column
amplifiers at the edge of the array. The Switcher chip makes these pulses.
It has 64 channels, and each channel drives one row with two pulses, A and B,
of up to 32 V into a row line of about 1 nF. The rows are selected by a
single token that moves from channel to channel on every clock. It runs down
the chip and, if asked, back up again. Sixteen chips chained together drive a
1024-row sensor.

This repository holds a SystemVerilog model of that chip and of the
16-chip row control built from it:

* the digital control logic of each channel, as synthesizable RTL;
* the chip and the multi-chip chain, as structural RTL;
* the high-voltage level shifter and output driver, as behavioural models
  (logic function plus measured timing). They are analog circuits.

## How a row is selected: the token chain

Each channel has two flip-flops clocked on the **falling** edge of `CLK`:

* the *forward* flip-flop samples `TDIA`, the token from the channel above;
* the *reverse* flip-flop samples `TDIAr`, the token from the channel below.

A channel's row is active while either flip-flop is set. The forward
flip-flop's output is the channel's `TDOA`, which feeds the next channel's
`TDIA`. The reverse flip-flop's output is `TDOAr`, which feeds the previous
channel's `TDIAr`. A single high bit on `TDIA`, held across one falling edge,
therefore selects channel 1 for one clock, then channel 2, and so on, one
row per clock.

If the chip's last `TDOA` is wired back to its own `TDIAr`, the token turns
around at the bottom and climbs back up through the reverse flip-flops. The
outputs then sweep down and up continuously. Counting clocks from the
falling edge that captures the token as clock 0, row `r` of an `N`-row chain
is active in clock

    t = r             (going down)
    t = 2(N-1) - r    (coming back up)

The last row is active only once (`t = N-1`). Its forward and reverse
flip-flops are set in the same clock, and their OR gives a single pulse.

## The hardest part: the chip's end pins switch half a clock early

The chip has three kinds of channel cell (`switcher_pkg::channel_pos_e`):

| cell        | used for     | `TDOA`                         | `TDOAr`                         |
|-------------|--------------|--------------------------------|---------------------------------|
| `CH_FIRST`  | channel 1    | forward flip-flop              | **rising-edge** flip-flop on `TDIAr` |
| `CH_MIDDLE` | channels 2-63| forward flip-flop              | reverse flip-flop               |
| `CH_LAST`   | channel 64   | **rising-edge** flip-flop on `TDIA` | reverse flip-flop          |

Only the two end cells have chip pins. Their outgoing token comes from an
extra flip-flop on the **rising** edge, which samples the same input as the
cell's own row flip-flop. Because of this, `TDOA` of channel 64 goes high
half a clock *before* channel 64's own pulse starts. It goes high on the
rising edge that ends channel 63's first half-clock. With `TDOA` looped back
to `TDIAr`, the falling edge that starts channel 64's forward pulse also
loads its reverse flip-flop. That is why the turn-around gives one pulse and
not two.

The same half-clock lead causes a problem when chips are chained. If chip
*k*'s `TDOA` went straight into chip *k+1*'s `TDIA`, chip *k+1*'s first row
would capture the token on the same falling edge as chip *k*'s last row.
The two rows would then pulse together. `row_control_system` therefore puts
a `token_delay_ff` in each link. This flip-flop is on the board, not in the
chip. It re-times the end pin on the falling edge, so the next chip's first
row follows one clock after this chip's last row. With one flip-flop per
direction per chip boundary, global row `r = 64*chip + channel` obeys the
same `t = r` / `t = 2(N-1) - r` rule as a single chip with `N = 1024`.

Fitting a delay flip-flop in the reverse direction is this design's choice.
The original system is only described as needing the extra flip-flop on the
path between chips, and the reverse path has the same half-clock lead at
`TDOAr` of channel 1.

## Pulse width and polarity

All channels share four control pins (`pulse_ctrl_t`):

* `AI`, `BI`: **width**. The active row's pulse A is `token & AI` and pulse B
  is `token & BI`. Held high, they give a pulse one clock long that starts
  at the falling edge. Driven with a narrower pulse inside the clock, they
  trim the HV pulse to that width.
* `PA`, `PB`: **polarity**. A positive pulse idles low and goes high. A
  negative pulse idles high and goes low. The rule depends on the silicon
  revision (`REVISION` parameter, function `hv_level`):

| revision | pulse A positive when | pulse B positive when |
|----------|-----------------------|-----------------------|
| `REV_2` (default) | `PA = 0`     | `PB = 0`              |
| `REV_1`  | `PA = 1`              | `PB = 0`              |

The AND and XOR gates used here are the simplest logic that gives the
documented behaviour. The original gate-level structure is not known.

## The high-voltage path (behavioural models)

Each pulse passes from the 1.8 V logic through two analog stages.
`level_shifter` and `hv_driver` model them. Both files say in their first
line that they are behavioural models.

* **`level_shifter`**: a current-mirror shifter. It turns a complementary
  1.8 V pair (V+, V-) into a VDDH/VSSH swing. The model gives out = 1 for
  (1,0) and 0 for (0,1), and holds the last value when V+ = V-. It has an
  assumed 5 ns delay (`DELAY_NS`). The hold is written as a latch on
  purpose.
* **`hv_driver`**: a four-stage buffer (non-inverting) sized for 200 mA into
  1 nF. Its output follows the input after the rise time for its load
  (`LOAD_PF`). That rise time comes from a piecewise-linear fit
  (`hv_rise_time_ns`) through these measured points:

| load    | rise time (0 to 15 V) |
|---------|-----------------------|
| 10 pF   | 12 ns                 |
| 100 pF  | 43.6 ns               |
| 470 pF  | 216 ns                |
| 1 nF    | 480 ns                |

Both delays are inertial: a pulse shorter than the delay does not come out.
Supply rails, voltage levels, slew shape, current and power are not modelled. An
HV output bit means "at the positive rail" (1) or "at the negative rail" (0).

The input pads (with Schmitt triggers), the process-monitor transistors of
revision 1 and the output pads are not modelled. The pins are clean logic
signals.

## Modules

| file | what it is |
|------|------------|
| `rtl/switcher_pkg.sv` | cell-variant and revision enums, `pulse_ctrl_t`, polarity rule, rise-time fit |
| `rtl/lv_channel.sv` | one channel's control logic: token flip-flops, width and polarity gating |
| `rtl/level_shifter.sv` | behavioural LV-to-HV shifter |
| `rtl/hv_driver.sv` | behavioural HV output buffer |
| `rtl/switcher_asic.sv` | the chip: `CHANNELS` channels (default 64), each with two shifters and two drivers |
| `rtl/token_delay_ff.sv` | board-level falling-edge flip-flop between chips |
| `rtl/row_control_system.sv` | top: `CHIPS` chips (default 16) chained through delay flip-flops, 1024 rows |

Top-level ports of `row_control_system`:

* inputs `clk`, `rst_n` (active low, clears every flip-flop asynchronously),
  `tdia` (token into row 0), `ai`, `bi`, `pa`, `pb`;
* `tdoa_end` and `tdiar_end`, the last chip's TDOA and TDIAr. Tie them
  together for a down-and-up scan, or hold `tdiar_end` low for a
  forward-only scan;
* `tdoar_first`, the first chip's TDOAr;
* `row_a[1023:0]` and `row_b[1023:0]`, the HV pulses of every row.

Timing: a row lasts one `CLK` period. The source system needs under 7.8 us
per row to read 1024 rows within 8 ms. The logic sets no lower bound on the
period. The HV outputs settle one shifter delay plus one driver rise time
(about 485 ns at 1 nF) after the falling edge or the AI/BI/PA/PB change that
moved them. Keep the clock period, and any AI/BI window, well above that.

## Simulating

Every file starts with `` `timescale 1ns/1ps ``, and the HV models use delays,
so use `--timing`. The package must come first. For example, the full-size
system test:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/switcher_pkg.sv tb/tb_row_control_system.sv \
      --top-module tb_row_control_system
    ./obj_dir/Vtb_row_control_system

Every testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`.
Each one has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_lv_channel` | all three cell variants and revision 1 against a reference model, with random tokens, controls and asynchronous resets, after every edge and input change |
| `tb_level_shifter` | the truth table, hold, delay and glitch filtering |
| `tb_hv_driver` | the delay at each of the four measured loads (within 0.5 ns), and that a short glitch is filtered |
| `tb_token_delay_ff` | capture on the falling edge only, and asynchronous reset |
| `tb_switcher_asic` | a 4-channel revision-1 chip and a 64-channel revision-2 chip, each with TDOA looped to TDIAr. Every HV output is checked every half clock against the `t = r` / `t = 2(N-1) - r` rule, with width windows, a polarity change at the turn-around, a reset mid-sweep, and `TDOA`/`TDOAr` in the right half clock |
| `tb_bench_test` | a default 64-channel chip driven like the die on the test bench (PA = PB = 0) at a 42.2 us clock, and at a 4.9 us row time. It measures when `TDOA` rises (62.5 clocks after the capture edge) and the start and width of pulses A15, B17 and B18, with AI held high and with AI pulses of 10 us and 2 us |
| `tb_row_control_system` | the full 16 x 64 system at default parameters and a 7.8 us clock: three scans (down-and-up, negative polarity with AI trimming, forward-only with BI trimming and a reset). It counts and requires each mechanism: forward and reverse steps, the single turn-around pulse, chip hand-offs in both directions, trimming, negative pulses, rising-edge end pins, reset and forward-only scan |

The full-size test makes about 21 million output comparisons. It builds in
about 1.5 minutes and runs in about 30 seconds.

## Where this model departs from, or adds to, the original chip

* The channel logic is built from the documented behaviour, not from the
  original schematic: the AND for width, the XOR for polarity, the OR of the
  forward and reverse tokens, and the rising-edge end flip-flops.
* Asynchronous reset of every flip-flop is assumed. The original chip is
  only known to run while `-RST` is high.
* The delay flip-flop in the reverse chip-to-chip path, and the falling edge
  for both delay flip-flops, are this design's choices.
* The level shifter's hold behaviour and its 5 ns delay are assumed. The
  driver's fall time is taken equal to its rise time.
* The bench measurement puts the last channel's `TDOA` on "the rising edge of
  the 64th clock after TDIA". Here it rises on the rising edge 63.5 clocks
  after the falling edge that captures `TDIA`. That is the 64th rising edge
  if the capture clock is counted as the first.
* Analog parts are behavioural, and pads and test transistors are absent
  (see above).
