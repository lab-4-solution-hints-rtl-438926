// lcd_fsm -- instruction sequencer for an HD44780-compatible character LCD.
//
// A Moore state machine that takes one step per EN period of the LCD and
// presents, in each state, one instruction or one character on RS, R/W and
// DB[7:0]. After reset it runs the seven-state initialization:
//   1-4  Function Set (8-bit bus, N lines, F font), four times
//   5    Clear Display (display blanked, address counter to 0)
//   6    Display On/Off Control (display on, cursor and blink as set)
//   7    Entry Mode Set (address increments, no display shift); from this
//        state on the backlight output LEDON is 1
// and then refreshes the display forever: for each line a Set DDRAM Address
// to the line's first character (line L starts at address L*LINE_STRIDE),
// followed by one Write Data per character, relying on the auto-increment of
// the address counter; after the last line a Return Home, and back to the
// first Set DDRAM Address. The initialization is not repeated.
// R/W is always 0 (the LCD is only written). RS is 0 in every instruction
// state and 1 in the Write Data state.
//
// Interface:
//   clk, rst  system clock, synchronous active-high reset (to Function Set 1)
//   step      one-cycle strobe: advance to the next state at this clock edge.
//             Driven by the EN generator at the rising edge of EN, so the
//             outputs are stable for the whole EN-high phase and are written
//             by the LCD on the falling edge.
//   text      LINES*CHARS_PER_LINE characters; text[l*CHARS_PER_LINE+c] is
//             shown at column c of line l. Each character is sampled when its
//             Write Data state is entered.
//   rs, rw, db, ledon  the LCD pins, all registered
//   state     current state, for observation
//   frame_done  one-cycle strobe when Return Home is entered (a full refresh
//             of the display has been written)
//
// The state sequence, the instruction words and the option choices (8-bit bus,
// 2 lines, 5x8 font, display on, cursor and blink off, increment, no shift,
// line 2 at address 64, 16x2 glass) follow the original lab solution. Registering the outputs,
// sampling the text at state entry, the text input itself and the loop target
// after Return Home are choices of this implementation.
module lcd_fsm
  import lcd_pkg::*;
#(
  parameter int unsigned LINES          = 2,
  parameter int unsigned CHARS_PER_LINE = 16,
  parameter int unsigned LINE_STRIDE    = DDRAM_LINE_STRIDE,
  parameter bit          TWO_LINE_MODE  = 1'b1,  // N
  parameter bit          FONT_5X10      = 1'b0,  // F
  parameter bit          DISPLAY_ON     = 1'b1,  // D
  parameter bit          CURSOR_ON      = 1'b0,  // C
  parameter bit          BLINK_ON       = 1'b0,  // B
  parameter bit          ADDR_INCREMENT = 1'b1,  // I/D
  parameter bit          DISPLAY_SHIFT  = 1'b0   // S
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step,
  input  logic [7:0]       text [LINES*CHARS_PER_LINE],
  output logic             rs,
  output logic             rw,
  output logic [7:0]       db,
  output logic             ledon,
  output lcd_state_e       state,
  output logic             frame_done
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned LW = (LINES > 1) ? $clog2(LINES) : 1;
  localparam int unsigned CW = (CHARS_PER_LINE > 1) ? $clog2(CHARS_PER_LINE) : 1;

  logic [LW-1:0] line_q, line_d;
  logic [CW-1:0] col_q,  col_d;
  lcd_state_e    state_d;
  logic          rs_d;
  logic [7:0]    db_d;

  // Next state.
  always_comb begin
    state_d = state;
    line_d  = line_q;
    col_d   = col_q;
    unique case (state)
      ST_FUNC_SET1:  state_d = ST_FUNC_SET2;
      ST_FUNC_SET2:  state_d = ST_FUNC_SET3;
      ST_FUNC_SET3:  state_d = ST_FUNC_SET4;
      ST_FUNC_SET4:  state_d = ST_CLEAR;
      ST_CLEAR:      state_d = ST_DISP_CTRL;
      ST_DISP_CTRL:  state_d = ST_ENTRY_MODE;
      ST_ENTRY_MODE: begin
        state_d = ST_SET_ADDR;
        line_d  = '0;
      end
      ST_SET_ADDR: begin
        state_d = ST_WRITE_DATA;
        col_d   = '0;
      end
      ST_WRITE_DATA: begin
        if (col_q != CW'(CHARS_PER_LINE - 1)) begin
          col_d = col_q + 1'b1;
        end else if (line_q != LW'(LINES - 1)) begin
          state_d = ST_SET_ADDR;
          line_d  = line_q + 1'b1;
        end else begin
          state_d = ST_RETURN_HOME;
        end
      end
      ST_RETURN_HOME: begin
        state_d = ST_SET_ADDR;
        line_d  = '0;
      end
      default:       state_d = ST_FUNC_SET1;
    endcase
  end

  // Output word of the state being entered.
  function automatic logic [7:0] state_word(input lcd_state_e st, input logic [LW-1:0] ln,
                                            input logic [CW-1:0] cl,
                                            input logic [7:0] chars [LINES*CHARS_PER_LINE]);
    logic [6:0] addr;
    addr = 7'(int'(ln) * LINE_STRIDE);
    unique case (st)
      ST_FUNC_SET1, ST_FUNC_SET2, ST_FUNC_SET3, ST_FUNC_SET4:
                     return instr_function_set(1'b1, TWO_LINE_MODE, FONT_5X10);
      ST_CLEAR:      return INSTR_CLEAR_DISPLAY;
      ST_DISP_CTRL:  return instr_display_ctrl(DISPLAY_ON, CURSOR_ON, BLINK_ON);
      ST_ENTRY_MODE: return instr_entry_mode(ADDR_INCREMENT, DISPLAY_SHIFT);
      ST_SET_ADDR:   return instr_set_ddram(addr);
      ST_WRITE_DATA: return chars[int'(ln) * CHARS_PER_LINE + int'(cl)];
      ST_RETURN_HOME: return INSTR_RETURN_HOME;
      default:       return 8'h00;
    endcase
  endfunction

  assign rs_d = (state_d == ST_WRITE_DATA);
  assign db_d = state_word(state_d, line_d, col_d, text);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= ST_FUNC_SET1;
      line_q     <= '0;
      col_q      <= '0;
      rs         <= 1'b0;
      db         <= instr_function_set(1'b1, TWO_LINE_MODE, FONT_5X10);
      ledon      <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (step) begin
        state  <= state_d;
        line_q <= line_d;
        col_q  <= col_d;
        rs     <= rs_d;
        db     <= db_d;
        if (state_d == ST_ENTRY_MODE) ledon <= 1'b1;
        frame_done <= (state_d == ST_RETURN_HOME);
      end
    end
  end

  // The LCD is only ever written.
  assign rw = 1'b0;

  // RS selects the data register exactly in the Write Data state.
  a_rs_matches_state: assert property (@(posedge clk) disable iff (rst)
                                       rs == (state == ST_WRITE_DATA));
  // The outputs only move on a step.
  a_stable_between_steps: assert property (@(posedge clk) disable iff (rst)
                                           !$past(step) && !$past(rst) |-> $stable(db) && $stable(rs));

  initial begin
    assert (LINES >= 1 && CHARS_PER_LINE >= 1) else $error("empty display geometry");
    assert ((LINES - 1) * LINE_STRIDE + CHARS_PER_LINE <= 128)
      else $error("display does not fit the 7-bit DDRAM address space");
  end

endmodule
