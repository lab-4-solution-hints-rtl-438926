// lcd_controller_full_tb -- lcd_controller at its default parameters (50 MHz
// clock, EN toggling every 50001 clocks, 16x2 display) driving a behavioural
// HD44780 model, through the initialization and one complete refresh of the
// display (42 LCD writes, about 84 ms of simulated time).
//
// Checks: the EN period is 2 x 50001 x 20 ns = 2.00004 ms; write n lands at
// (50001 + 100002 n) clock cycles after reset; no word is latched before the
// previous instruction's worst-case execution time (1.52 ms for Clear Display
// and Return Home, 37 us / 41 us for the rest) has passed; the LCD ends in
// 8-bit, 2-line, 5x8 mode with the display on, cursor and blink off, increment
// and no shift; and the two lines of text are in DDRAM at 0..15 and 64..79.
module lcd_controller_full_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned HALF = 50001;
  localparam int unsigned CPL  = 16;
  localparam string LINE1 = "Hello, FPGA LCD!";
  localparam string LINE2 = "2 lines x 16 chr";

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  logic [7:0] text [2*CPL];
  logic       lcd_rs, lcd_rw, lcd_en, lcd_ledon, init_done, frame_done;
  logic [7:0] lcd_db;

  lcd_controller dut (
    .clk, .rst, .text, .lcd_rs, .lcd_rw, .lcd_en, .lcd_db, .lcd_ledon, .init_done, .frame_done
  );

  hd44780_model #(.CHECK_EXEC_TIME(1'b1)) lcd (.rs(lcd_rs), .rw(lcd_rw), .en(lcd_en), .db(lcd_db));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int unsigned cyc, writes_seen;
  realtime     last_fall;
  always @(posedge clk) cyc <= rst ? 0 : cyc + 1;
  always @(negedge lcd_en) begin
    if (!rst) begin
      check(cyc == HALF + 2 * HALF * writes_seen, "write lands at 50001 + 100002n clocks");
      if (writes_seen > 0) check($realtime - last_fall == 2_000_040.0, "EN period 2.00004 ms");
      last_fall = $realtime;
      writes_seen++;
    end
  end

  // Watchdog: 45 EN periods.
  initial begin
    repeat (45 * 2 * HALF) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    writes_seen = 0; last_fall = 0;
    for (int i = 0; i < CPL; i++) begin
      text[i]       = LINE1[i];
      text[CPL + i] = LINE2[i];
    end
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    while (lcd.n_home < 1) @(posedge clk);
    #1;
    check(lcd.n_writes == 42, "initialization plus one refresh is 42 writes");
    check(init_done && lcd_ledon, "init_done and backlight on");
    check(lcd.bus8 && lcd.two_lines && !lcd.font_5x10, "8-bit bus, 2 lines, 5x8 font");
    check(lcd.disp_on && !lcd.cursor_on && !lcd.blink_on, "display on, cursor/blink off");
    check(lcd.inc && !lcd.shift, "increment, no shift");
    for (int a = 0; a < 128; a++) begin
      logic [7:0] e;
      if (a < CPL)                      e = LINE1[a];
      else if (a >= 64 && a < 64 + CPL) e = LINE2[a - 64];
      else                              e = 8'h20;
      check(lcd.ddram[a] == e, "DDRAM contents");
    end
    check(lcd.busy_violations == 0, "no write while the LCD is busy");
    check(lcd.setup_violations == 0, "RS/DB stable while EN high");
    check(lcd.read_attempts == 0, "R/W never high");
    $display("refresh complete at %0.3f ms after reset", ($realtime - 80.0) / 1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
