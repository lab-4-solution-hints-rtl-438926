// lcd_controller -- drives a 16x2 HD44780-compatible character LCD from an FPGA.
//
// Top of the design. The LCD module is written over an 8-bit parallel bus
// (RS, R/W, DB7..DB0) and latches each word on the falling edge of its enable
// pin EN. Instead of polling the LCD's busy flag, the controller paces every
// transfer with a slow EN clock whose period (about 2 ms at the defaults) is
// longer than the slowest instruction, so each instruction is guaranteed to be
// finished before the next one is latched:
//   lcd_en_gen  divides the 50 MHz system clock to EN (toggle every
//               EN_HALF_CYCLES clocks) and marks each rising edge of EN;
//   lcd_fsm     steps once per rising edge of EN through the initialization
//               (Function Set x4, Clear Display, Display Control, Entry Mode)
//               and then rewrites the whole display in a loop (Set DDRAM
//               Address and the characters of each line, Return Home).
// The power-on wait the LCD needs (over 15 ms after VDD rises) is assumed to
// have passed while the FPGA was being configured; there is no delay for it.
//
// Interface:
//   clk        system clock, CLK_PERIOD_PS (default 20 ns, 50 MHz)
//   rst        synchronous active-high reset; restarts the initialization
//   text       LINES*CHARS_PER_LINE characters (ASCII / the LCD's character
//              ROM codes), text[l*CHARS_PER_LINE+c] is line l, column c
//   lcd_rs, lcd_rw, lcd_en, lcd_db   the LCD bus (R/W is always 0)
//   lcd_ledon  backlight enable, 1 from the Entry Mode state on
//   init_done  1 once the seven initialization instructions have been issued
//   frame_done one-cycle strobe each time a full refresh has been issued
//
// Timing: one LCD transfer per EN period, 2*EN_HALF_CYCLES clocks. A refresh
// of the display takes LINES*(CHARS_PER_LINE+1)+1 transfers (35, about 70 ms,
// at the defaults), the initialization 7 transfers. RS/DB change on the clock
// edge where EN rises and are latched by the LCD half an EN period later.
// The EN divider, the state order and the instruction words follow the
// original lab solution this controller is based on; init_done, frame_done
// and the text port are additions of this implementation for connecting and
// observing it.
module lcd_controller
  import lcd_pkg::*;
#(
  parameter int unsigned CLK_PERIOD_PS  = 20_000,
  parameter int unsigned EN_HALF_CYCLES = 50001,
  parameter int unsigned LINES          = 2,
  parameter int unsigned CHARS_PER_LINE = 16,
  parameter bit          TWO_LINE_MODE  = 1'b1,
  parameter bit          FONT_5X10      = 1'b0,
  parameter bit          DISPLAY_ON     = 1'b1,
  parameter bit          CURSOR_ON      = 1'b0,
  parameter bit          BLINK_ON       = 1'b0,
  parameter bit          ADDR_INCREMENT = 1'b1,
  parameter bit          DISPLAY_SHIFT  = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] text [LINES*CHARS_PER_LINE],
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_en,
  output logic [7:0] lcd_db,
  output logic       lcd_ledon,
  output logic       init_done,
  output logic       frame_done
);
  timeunit 1ns; timeprecision 1ps;

  logic       en_rise;
  logic       en_fall;
  lcd_state_e state;

  lcd_en_gen #(
    .HALF_CYCLES(EN_HALF_CYCLES)
  ) u_en_gen (
    .clk    (clk),
    .rst    (rst),
    .en     (lcd_en),
    .en_rise(en_rise),
    .en_fall(en_fall)
  );

  lcd_fsm #(
    .LINES         (LINES),
    .CHARS_PER_LINE(CHARS_PER_LINE),
    .LINE_STRIDE   (DDRAM_LINE_STRIDE),
    .TWO_LINE_MODE (TWO_LINE_MODE),
    .FONT_5X10     (FONT_5X10),
    .DISPLAY_ON    (DISPLAY_ON),
    .CURSOR_ON     (CURSOR_ON),
    .BLINK_ON      (BLINK_ON),
    .ADDR_INCREMENT(ADDR_INCREMENT),
    .DISPLAY_SHIFT (DISPLAY_SHIFT)
  ) u_fsm (
    .clk       (clk),
    .rst       (rst),
    .step      (en_rise),
    .text      (text),
    .rs        (lcd_rs),
    .rw        (lcd_rw),
    .db        (lcd_db),
    .ledon     (lcd_ledon),
    .state     (state),
    .frame_done(frame_done)
  );

  // Initialization is over once the refresh loop has been entered. The Entry
  // Mode instruction is latched on the falling edge of EN that ends it.
  always_ff @(posedge clk) begin
    if (rst)                                    init_done <= 1'b0;
    else if (en_fall && state == ST_ENTRY_MODE) init_done <= 1'b1;
  end

  // The LCD must never be written faster than its slowest instruction:
  // Clear Display and Return Home take up to 1.52 ms (270 kHz LCD oscillator).
  localparam longint unsigned SLOWEST_INSTR_PS = 1_520_000_000;
  localparam longint unsigned EN_PERIOD_PS     = 64'(2) * EN_HALF_CYCLES * CLK_PERIOD_PS;
  initial assert (EN_PERIOD_PS >= SLOWEST_INSTR_PS)
    else $warning("EN period shorter than the slowest LCD instruction (1.52 ms)");

endmodule
