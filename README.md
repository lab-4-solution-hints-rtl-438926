# Character-LCD controller for a 16x2 HD44780 display

This design puts text on a standard 16x2 character LCD, the kind built around the
HD44780U or KS0066U controller, from an FPGA with a 50 MHz clock. It drives the
LCD's 8-bit parallel bus and never reads the LCD's busy flag. The main idea is
that the LCD's enable pin EN is also the slow clock of the controller. EN has a
period of about 2 ms, which is longer than any LCD instruction takes. Each EN
period carries exactly one instruction or one character, so the LCD has always
finished the previous one when the next word is latched.

```
            +-------------+   en_rise    +-----------+  rs, rw, db[7:0], ledon
 clk 50MHz->| lcd_en_gen  |------------->|  lcd_fsm  |-----------------------> LCD
 rst ------>| /50001, T   |              |           |
            +-------------+              +-----------+
                   |  en                      ^ text[32]
                   +--------------------------|-----------------------------> LCD EN
```

## Bus timing: one word per EN period

The LCD samples RS, R/W and DB7..DB0 on the **falling** edge of EN. The
controller therefore changes its outputs on the **rising** edge of EN and holds
them for the whole high phase:

```
 EN     ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____
 RS/DB  ===X  word n                          X  word n+1
           ^ state changes                    ^
                            ^ LCD latches word n
```

`lcd_en_gen` counts system clocks from 0 to `EN_HALF_CYCLES-1` (0..50000) and
toggles EN each time the counter wraps. Each EN level therefore lasts 50001
clocks, and the period is 2 x 50001 x 20 ns = 2.00004 ms. The slowest
instructions are Clear Display and Return Home, at 1.52 ms for a 270 kHz LCD
oscillator. All others take 37 us or 41 us. `lcd_en_gen` also produces a
one-cycle strobe `en_rise` in the clock cycle at whose end EN rises. `lcd_fsm`
advances on that strobe. Its outputs are registers, so RS and DB change on the
same clock edge as EN rises, and they are steady for the 1 ms before the
falling edge.

The state machine runs on the system clock with a clock enable. It is not
clocked by EN itself. The state timing is the same either way, and the whole
design stays in one clock domain.

After reset, EN is high and the counter is 0. The first falling edge therefore
comes 50001 clocks after reset, and it writes the first Function Set, which is
presented during reset. Write *n* (counting from 0) lands
50001 + 100002·n clocks after reset is released.

## The instruction sequence (`lcd_fsm`)

The state machine is a Moore machine. It first runs seven initialization
states and then loops over the refresh states for good.

| # | State | RS | DB | Effect |
|---|-------|----|----|--------|
| 1-3 | Function Set 1..3 | 0 | `0011_1000` (0x38) | wake-up sequence, 8-bit bus |
| 4 | Function Set 4 | 0 | `001 DL N F 00` = 0x38 | 8-bit bus, 2 lines (N=1), 5x8 font (F=0) |
| 5 | Clear Display | 0 | 0x01 | blank the display, address counter to 0 |
| 6 | Display Control | 0 | `00001 D C B` = 0x0C | display on, cursor off, blink off |
| 7 | Entry Mode | 0 | `000001 I/D S` = 0x06 | address increments, no display shift; `ledon` goes to 1 |
| 8 | Set DDRAM Address | 0 | `1 AAAAAAA` = 0x80 + 64·line | cursor to the start of the line |
| 9 | Write Data | 1 | the character | stored at the address counter, which then increments |
| 10 | Return Home | 0 | 0x02 | address counter to 0, display kept |

The refresh loop works like this. For each line there is one Set DDRAM Address
followed by `CHARS_PER_LINE` Write Data states. After the last character of the
last line comes Return Home, and the loop goes back to Set DDRAM Address for
line 1. The initialization is not repeated. R/W is always 0, because the LCD is
only written.

**DDRAM addressing.** The LCD controller has a 7-bit DDRAM address, with 64
addresses per line whatever the size of the glass. Line 1 therefore starts at
address 0 and line 2 at address 64 (Set DDRAM Address 0xC0). On a 16x2 display
only addresses 0..15 and 64..79 are visible. In increment mode, only the first
address of each line has to be sent.

**Refresh rate.** The initialization takes 7 EN periods. One refresh takes
2·(16+1)+1 = 35 EN periods, which is 70 ms, or about 14 refreshes per second.
Each character is sampled from `text` when its Write Data state is entered, so
a change to `text` appears on the display within one refresh.

## Top level (`lcd_controller`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | system clock (`CLK_PERIOD_PS`, 20 ns) |
| `rst` | in | 1 | synchronous, active high; restarts the initialization |
| `text` | in | 8 x `LINES*CHARS_PER_LINE` | `text[l*CHARS_PER_LINE + c]` is line `l`, column `c` (LCD character codes, ASCII for the printable range) |
| `lcd_rs`, `lcd_rw`, `lcd_en`, `lcd_db[7:0]` | out | | LCD bus |
| `lcd_ledon` | out | 1 | backlight enable, 1 from the Entry Mode state on |
| `init_done` | out | 1 | the seven initialization words have been latched |
| `frame_done` | out | 1 | one-cycle strobe when a refresh ends (Return Home entered) |

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `CLK_PERIOD_PS` | 20000 | clock period, used only by an elaboration-time check that the EN period covers 1.52 ms |
| `EN_HALF_CYCLES` | 50001 | clocks per EN level |
| `LINES`, `CHARS_PER_LINE` | 2, 16 | display geometry; `(LINES-1)*64 + CHARS_PER_LINE` must not exceed 128 |
| `TWO_LINE_MODE`, `FONT_5X10` | 1, 0 | N and F of Function Set |
| `DISPLAY_ON`, `CURSOR_ON`, `BLINK_ON` | 1, 0, 0 | D, C, B of Display Control |
| `ADDR_INCREMENT`, `DISPLAY_SHIFT` | 1, 0 | I/D and S of Entry Mode |

If you use another clock, scale `EN_HALF_CYCLES` so that
2·`EN_HALF_CYCLES`·T_clk stays above 1.52 ms. For an LCD oscillator slower than
270 kHz, also scale by 270 kHz / f_osc. Note that the refresh order assumes
`ADDR_INCREMENT = 1`. With decrement, each line's characters land right to
left from the line's first address.

## What is taken from the original lab solution and what is added

This controller implements an FPGA lab solution for the HD44780. The
following come from that solution:

* the 50001-count EN divider (2 ms at 50 MHz);
* the rule that states change on the rising edge of EN and the LCD writes on
  the falling edge;
* the seven initialization states, their order and their option bits;
* the Set Address / Write Data / Return Home refresh loop;
* line 2 at DDRAM address 64;
* the backlight being switched on at Entry Mode.

The following are choices of this implementation:

* the clock-enable style, instead of clocking the state machine with EN;
* EN starting high after reset;
* the synchronous reset;
* registered outputs;
* the `text` input port;
* going back to line 1's Set Address after Return Home;
* the `init_done` and `frame_done` outputs.

## What to watch out for

* **Power-on wait.** The LCD needs more than 15 ms after VDD rises (more than
  40 ms from 2.7 V) before the first instruction. There is no delay for this.
  The FPGA configuration time is relied on to cover it. If the controller can
  come out of reset sooner after power-up, add a delay in front of it.
* **Wake-up spacing.** The HD44780 reset-by-instruction procedure asks for
  4.1 ms between the first and second Function Set, and more than 100 us
  between the second and third. This design spaces every word by one EN period,
  2.00004 ms. That is enough for every instruction's execution time and for the
  100 us gap, but shorter than the 4.1 ms gap. Most modules have already reset
  themselves internally at power-up, and then it does not matter. For strict
  compliance, set `EN_HALF_CYCLES` to at least 103425 (4.137 ms period). This
  only slows the refresh.
* **Display Control before or after Clear.** The HD44780 datasheet procedure
  issues Display On/Off Control with the display *off* (0x08) before Clear
  Display. This design clears first and then switches the display on with the
  cursor and blink off (0x0C).
* **Reset while EN is high** changes DB before the falling edge. The LCD then
  latches Function Set, which is harmless.
* The busy flag, reads, the 4-bit bus mode, cursor/display shift and the
  CGRAM (user-defined characters) are not used.

## Files

| File | Contents |
|------|----------|
| `rtl/lcd_pkg.sv` | instruction encodings as functions, state type, DDRAM line stride |
| `rtl/lcd_en_gen.sv` | EN divider and edge strobes |
| `rtl/lcd_fsm.sv` | instruction sequencer, with assertions: RS matches the state, outputs move only on a step |
| `rtl/lcd_controller.sv` | top level |
| `tb/hd44780_model.sv` | behavioural model of the LCD's write side (DDRAM, address counter, mode bits, execution-time and bus-stability checks); simulation only |
| `tb/lcd_en_gen_tb.sv` | divider at 5 and at 50001 clocks per level, against a cycle-count reference |
| `tb/lcd_fsm_tb.sv` | default configuration and a 1x3, all-options-inverted configuration, word by word against an independent expected sequence, including refresh loop and mid-run reset |
| `tb/lcd_controller_tb.sv` | end to end with the LCD model, EN scaled to 6 clocks; write timing, final LCD mode, DDRAM contents over three refreshes, text change, reset restart |
| `tb/lcd_controller_full_tb.sv` | end to end at the default parameters: initialization plus one refresh (42 writes, 84 ms simulated), exact EN period and execution-time check |

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lcd_pkg.sv rtl/lcd_en_gen.sv rtl/lcd_fsm.sv rtl/lcd_controller.sv \
    tb/hd44780_model.sv tb/lcd_controller_tb.sv --top-module lcd_controller_tb
./obj_dir/Vlcd_controller_tb
```

Replace the last testbench file and top module with
`tb/lcd_controller_full_tb.sv` / `lcd_controller_full_tb` for the full-size
run, which takes a few seconds. `lcd_fsm_tb` needs only `lcd_pkg.sv` and
`lcd_fsm.sv`. `lcd_en_gen_tb` needs only `lcd_en_gen.sv`. The RTL is plain
synthesizable SystemVerilog-2017 and uses no vendor primitives.
