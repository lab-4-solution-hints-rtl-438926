// lcd_en_gen -- enable-clock generator for a character LCD.
//
// The LCD latches RS, R/W and DB on the falling edge of its enable pin EN, so
// EN doubles as the slow clock that paces the whole controller. This block
// divides the system clock: a counter runs 0 .. HALF_CYCLES-1 and, each time it
// wraps, EN toggles. EN therefore stays HALF_CYCLES system clocks in each
// level. With the default 50 MHz clock and HALF_CYCLES = 50001 the EN period is
// 2 x 50001 x 20 ns = 2.00004 ms, longer than the slowest LCD instruction
// (1.52 ms), so every instruction has time to finish before the next one.
//
// Interface:
//   clk, rst   system clock and synchronous, active-high reset
//   en         the LCD enable pin
//   en_rise    one-cycle strobe, high in the clock cycle at whose end EN rises;
//              the state machine advances on that same clock edge, so its
//              outputs change together with the rising edge of EN and are held
//              for the whole high phase, ending at the falling (write) edge.
//   en_fall    one-cycle strobe, high in the cycle at whose end EN falls.
//
// Timing: after reset EN is high and the counter is 0, so the first falling
// edge comes HALF_CYCLES clocks after reset. The divide ratio follows the
// 50001-count divider of the original lab solution; starting with EN high (so the state
// presented during reset is written at that first falling edge) and the
// synchronous reset are choices of this implementation.
module lcd_en_gen #(
  parameter int unsigned HALF_CYCLES = 50001
) (
  input  logic clk,
  input  logic rst,
  output logic en,
  output logic en_rise,
  output logic en_fall
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CW = (HALF_CYCLES > 1) ? $clog2(HALF_CYCLES) : 1;

  logic [CW-1:0] cnt;
  logic          wrap;

  assign wrap    = (cnt == CW'(HALF_CYCLES - 1));
  assign en_rise = wrap && !en;
  assign en_fall = wrap && en;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      en  <= 1'b1;
    end else if (wrap) begin
      cnt <= '0;
      en  <= !en;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial assert (HALF_CYCLES >= 1) else $error("HALF_CYCLES must be at least 1");

endmodule
