// lcd_controller_tb -- end-to-end testbench for lcd_controller.
//
// The controller drives a behavioural HD44780 model over RS, R/W, EN and DB.
// EN is scaled down to 3 clocks per level (6-clock period) so several
// refreshes fit in a short run. The testbench checks:
//   - EN period (6 clocks) and the clock cycle of every LCD write: write n
//     lands on the falling edge of EN at 3 + 6n clocks after reset;
//   - RS/DB stable while EN is high, R/W never 1;
//   - the mode the LCD ends up in after initialization (8-bit bus, 2 lines,
//     5x8 font, display on, cursor and blink off, increment, no shift) and
//     the backlight output;
//   - the DDRAM contents after each refresh: line 1 at addresses 0..15,
//     line 2 at 64..79, every other address blank, and new text picked up by
//     the next refresh;
//   - that each mechanism happened: the four Function Sets, Clear Display,
//     Display Control, Entry Mode, Set DDRAM Address for each line, Write
//     Data, Return Home, the refresh loop, and a restart after reset.
module lcd_controller_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned HALF = 3;
  localparam int unsigned LINES = 2, CPL = 16;
  localparam int unsigned FRAME = LINES * (CPL + 1) + 1;   // writes per refresh

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  logic [7:0] text [LINES*CPL];
  logic       lcd_rs, lcd_rw, lcd_en, lcd_ledon, init_done, frame_done;
  logic [7:0] lcd_db;

  lcd_controller #(.EN_HALF_CYCLES(HALF)) dut (
    .clk, .rst, .text, .lcd_rs, .lcd_rw, .lcd_en, .lcd_db, .lcd_ledon, .init_done, .frame_done
  );

  hd44780_model #(.CHECK_EXEC_TIME(1'b0)) lcd (.rs(lcd_rs), .rw(lcd_rw), .en(lcd_en), .db(lcd_db));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Cycle count since reset and write timing.
  int unsigned cyc, writes_seen, rw_high, frames;
  always @(posedge clk) cyc <= rst ? 0 : cyc + 1;
  always @(posedge clk) if (!rst && lcd_rw) rw_high++;
  always @(posedge clk) if (!rst && frame_done) frames++;

  int unsigned last_rise;
  always @(posedge lcd_en) begin
    if (!rst) begin
      last_rise = cyc;
    end
  end
  always @(negedge lcd_en) begin
    if (!rst) begin
      check(cyc == HALF + 2 * HALF * writes_seen, "write lands at 3 + 6n clocks after reset");
      if (writes_seen > 0) check(cyc - last_rise == HALF, "EN high for HALF clocks");
      writes_seen++;
    end
  end

  task automatic check_ddram(input string tag);
    int unsigned bad;
    bad = 0;
    for (int a = 0; a < 128; a++) begin
      logic [7:0] e;
      if (a < CPL)                    e = text[a];
      else if (a >= 64 && a < 64 + CPL) e = text[CPL + a - 64];
      else                            e = 8'h20;
      if (lcd.ddram[a] != e) bad++;
    end
    check(bad == 0, {tag, ": DDRAM holds the text"});
  endtask

  task automatic new_text();
    foreach (text[i]) text[i] = 8'($urandom_range(8'h21, 8'h7E));
  endtask

  // Wait until the model has latched Return Home (end of a refresh).
  task automatic wait_home(input int unsigned n_home);
    while (lcd.n_home < n_home) @(posedge clk);
  endtask

  // Watchdog.
  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned m_init, m_line2, m_loop, m_reset;
  initial begin
    writes_seen = 0; rw_high = 0; frames = 0; last_rise = 0;
    m_init = 0; m_line2 = 0; m_loop = 0; m_reset = 0;
    new_text();
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;

    // Initialization: seven instruction writes.
    while (lcd.n_writes < 7) @(posedge clk);
    @(posedge clk); #1;
    check(lcd.n_func == 4 && lcd.n_clear == 1 && lcd.n_disp == 1 && lcd.n_entry == 1,
          "init: 4 Function Set, Clear, Display Control, Entry Mode");
    check(lcd.log_db[0] == 8'h38 && lcd.log_db[3] == 8'h38 && lcd.log_db[4] == 8'h01 &&
          lcd.log_db[5] == 8'h0C && lcd.log_db[6] == 8'h06, "init word order");
    check(lcd.bus8 && lcd.two_lines && !lcd.font_5x10, "8-bit bus, 2 lines, 5x8 font");
    check(lcd.disp_on && !lcd.cursor_on && !lcd.blink_on, "display on, cursor/blink off");
    check(lcd.inc && !lcd.shift, "increment, no shift");
    check(lcd_ledon, "backlight on after Entry Mode");
    check(init_done, "init_done after Entry Mode written");
    if (lcd.n_writes == 7 && init_done) m_init++;

    // First refresh.
    wait_home(1);
    #1 check_ddram("refresh 1");
    check(lcd.ac == 0, "Return Home zeroed the address counter");
    check(lcd.n_ddaddr == 2 && lcd.n_data == LINES * CPL, "one address per line, one write per char");
    check(lcd.log_db[7] == 8'h80 && lcd.log_db[7 + CPL + 1] == 8'hC0, "line addresses 0 and 64");
    check(lcd.n_writes == 7 + FRAME, "first refresh is 35 writes");
    if (lcd.log_db[7 + CPL + 1] == 8'hC0) m_line2++;

    // Text changes; the second refresh must show it.
    new_text();
    wait_home(2);
    #1 check_ddram("refresh 2");
    check(lcd.n_clear == 1 && lcd.n_func == 4, "initialization not repeated by the loop");
    check(lcd.log_db[7 + FRAME] == 8'h80, "loop restarts at Set DDRAM Address line 1");
    if (lcd.log_db[7 + FRAME] == 8'h80 && lcd.n_home == 2) m_loop++;

    // Reset mid-refresh: initialization runs again. A reset while EN is high
    // changes DB before the falling edge (to Function Set, which the LCD then
    // latches), so the stability check covers the run up to here.
    check(lcd.setup_violations == 0, "RS/DB stable while EN high");
    repeat (50) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk);
    #1 check(!lcd_ledon && !init_done && lcd_db == 8'h38 && !lcd_rs, "reset returns to Function Set 1");
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    writes_seen = 0;
    begin
      int unsigned base;
      base = lcd.n_writes;
      while (lcd.n_writes < base + 7) @(posedge clk);
      check(lcd.n_func == 8 && lcd.n_clear == 2, "initialization repeated after reset");
      if (lcd.n_clear == 2) m_reset++;
    end
    new_text();
    wait_home(3);
    #1 check_ddram("refresh after reset");

    check(lcd.read_attempts == 0 && rw_high == 0, "R/W never high");
    check(frames == 3, "three frame_done strobes");
    // Mechanism counters.
    $display("mechanisms: init=%0d line2_address=%0d refresh_loop=%0d reset_restart=%0d",
             m_init, m_line2, m_loop, m_reset);
    check(m_init > 0, "initialization happened");
    check(m_line2 > 0, "second-line addressing happened");
    check(m_loop > 0, "refresh loop happened");
    check(m_reset > 0, "restart after reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
