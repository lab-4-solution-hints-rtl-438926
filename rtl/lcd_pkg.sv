// lcd_pkg -- shared definitions for the character-LCD controller.
//
// Holds the instruction encodings of the HD44780U / KS0066U controller that
// sits inside common 16x2 character LCD modules, as small functions that build
// the 8-bit DB word of each instruction from its option bits, and the state
// type of the controller's state machine.
//
// Instruction encodings (RS=0, R/W=0 unless noted; bits DB7..DB0):
//   Clear Display          0000_0001
//   Return Home            0000_001x   (x is driven as 0)
//   Entry Mode Set         0000_01 I/D S
//   Display On/Off Control 0000_1 D C B
//   Cursor/Display Shift   0001 S/C R/L xx
//   Function Set           001 DL N F xx
//   Set CGRAM Address      01 AAAAAA
//   Set DDRAM Address      1 AAAAAAA
//   Write Data             RS=1, DDDDDDDD
// Don't-care bits are always driven as 0 in this design.
package lcd_pkg;
  timeunit 1ns; timeprecision 1ps;

  // DDRAM address of the first character of line 1 and line 2. The controller
  // uses a 7-bit address, 64 addresses per line, whatever the glass size.
  localparam int unsigned DDRAM_LINE_STRIDE = 64;

  localparam logic [7:0] INSTR_CLEAR_DISPLAY = 8'b0000_0001;
  localparam logic [7:0] INSTR_RETURN_HOME   = 8'b0000_0010;

  function automatic logic [7:0] instr_entry_mode(input logic inc, input logic shift);
    return {6'b0000_01, inc, shift};
  endfunction

  function automatic logic [7:0] instr_display_ctrl(input logic disp_on, input logic cursor_on,
                                                    input logic blink_on);
    return {5'b0000_1, disp_on, cursor_on, blink_on};
  endfunction

  function automatic logic [7:0] instr_function_set(input logic bus8, input logic two_lines,
                                                    input logic font_5x10);
    return {3'b001, bus8, two_lines, font_5x10, 2'b00};
  endfunction

  function automatic logic [7:0] instr_set_ddram(input logic [6:0] addr);
    return {1'b1, addr};
  endfunction

  // States of the controller, in the order they are visited after reset.
  typedef enum logic [3:0] {
    ST_FUNC_SET1,    // Function Set, 1st of 4
    ST_FUNC_SET2,
    ST_FUNC_SET3,
    ST_FUNC_SET4,    // Function Set with the chosen N and F
    ST_CLEAR,        // Clear Display
    ST_DISP_CTRL,    // Display On/Off Control
    ST_ENTRY_MODE,   // Entry Mode Set (also switches the backlight on)
    ST_SET_ADDR,     // Set DDRAM Address to the start of the current line
    ST_WRITE_DATA,   // Write one character to DDRAM
    ST_RETURN_HOME   // Return Home, then start the next refresh
  } lcd_state_e;

endpackage
