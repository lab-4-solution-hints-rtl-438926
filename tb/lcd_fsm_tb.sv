// lcd_fsm_tb -- self-checking testbench for lcd_fsm.
//
// Two instances are stepped by the same strobe, with random idle gaps between
// steps:
//   dut  default configuration (16x2, 2-line mode, 5x8 font, display on,
//        cursor and blink off, increment, no shift)
//   alt  1 line of 3 characters, 1-line mode, 5x10 font, cursor and blink on,
//        decrement, display shift
// The testbench builds the expected word sequence of each from the LCD
// instruction encodings written out by hand (not from the design's package):
// four Function Sets, Clear, Display Control, Entry Mode, then per line a Set
// DDRAM Address and the characters, then Return Home, repeated. It checks
// RS, R/W, DB, LEDON and frame_done after every step, that nothing moves
// between steps, that the loop repeats with new text, and that a reset in the
// middle of the refresh restarts the initialization.
module lcd_fsm_tb;
  timeunit 1ns; timeprecision 1ps;
  import lcd_pkg::*;

  localparam int unsigned L0 = 2, C0 = 16;
  localparam int unsigned L1 = 1, C1 = 3;

  logic clk = 1'b0;
  logic rst, step;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [7:0] text0 [L0*C0];
  logic [7:0] text1 [L1*C1];

  logic rs0, rw0, ledon0, fd0; logic [7:0] db0; lcd_state_e st0;
  logic rs1, rw1, ledon1, fd1; logic [7:0] db1; lcd_state_e st1;

  lcd_fsm dut (.clk, .rst, .step, .text(text0), .rs(rs0), .rw(rw0), .db(db0),
               .ledon(ledon0), .state(st0), .frame_done(fd0));

  lcd_fsm #(.LINES(L1), .CHARS_PER_LINE(C1), .TWO_LINE_MODE(1'b0), .FONT_5X10(1'b1),
            .CURSOR_ON(1'b1), .BLINK_ON(1'b1), .ADDR_INCREMENT(1'b0), .DISPLAY_SHIFT(1'b1))
    alt (.clk, .rst, .step, .text(text1), .rs(rs1), .rw(rw1), .db(db1),
         .ledon(ledon1), .state(st1), .frame_done(fd1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected word k (0-based, counted from reset) of a configuration.
  // Instruction words: Function Set 001 DL N F 00, Clear 0x01, Display control
  // 00001DCB, Entry mode 000001(I/D)S, Set DDRAM 1AAAAAAA, Return Home 0x02.
  function automatic void expect_word(input int unsigned k, input int unsigned lines,
                                      input int unsigned cpl, input logic [7:0] fs,
                                      input logic [7:0] dc, input logic [7:0] em,
                                      input bit first_text, output logic rs,
                                      output logic [7:0] db, output int unsigned char_idx,
                                      output bit home);
    int unsigned frame_len, j, ln, pos;
    char_idx = 0; home = 0; rs = 0; db = 8'h00;
    if (k < 4)      begin db = fs; return; end
    if (k == 4)     begin db = 8'h01; return; end
    if (k == 5)     begin db = dc; return; end
    if (k == 6)     begin db = em; return; end
    frame_len = lines * (cpl + 1) + 1;
    j = (k - 7) % frame_len;
    if (j == frame_len - 1) begin db = 8'h02; home = 1; return; end
    ln  = j / (cpl + 1);
    pos = j % (cpl + 1);
    if (pos == 0) begin db = 8'h80 | 8'(ln * 64); return; end
    rs = 1;
    char_idx = ln * cpl + pos - 1;
  endfunction

  int unsigned k;   // steps since reset

  task automatic check_outputs(input string tag);
    logic e_rs; logic [7:0] e_db; int unsigned ci; bit home;
    expect_word(k, L0, C0, 8'h38, 8'h0C, 8'h06, 1, e_rs, e_db, ci, home);
    if (e_rs) e_db = text0[ci];
    check(rs0 == e_rs && db0 == e_db && rw0 == 1'b0, {tag, " dut word"});
    check(ledon0 == (k >= 6), {tag, " dut ledon"});
    expect_word(k, L1, C1, 8'h34, 8'h0F, 8'h05, 1, e_rs, e_db, ci, home);
    if (e_rs) e_db = text1[ci];
    check(rs1 == e_rs && db1 == e_db && rw1 == 1'b0, {tag, " alt word"});
    check(ledon1 == (k >= 6), {tag, " alt ledon"});
  endtask

  int unsigned frames0, frames1;
  always @(posedge clk) begin
    if (rst) begin
      frames0 <= 0; frames1 <= 0;
    end else begin
      if (fd0) frames0 <= frames0 + 1;
      if (fd1) frames1 <= frames1 + 1;
    end
  end

  task automatic do_step();
    int unsigned gap;
    logic [7:0] hold_db0, hold_db1;
    logic hold_rs0, hold_rs1;
    gap = $urandom_range(0, 3);
    hold_db0 = db0; hold_rs0 = rs0; hold_db1 = db1; hold_rs1 = rs1;
    repeat (gap) begin
      @(posedge clk);
      #1;
      check(db0 == hold_db0 && rs0 == hold_rs0 && db1 == hold_db1 && rs1 == hold_rs1,
            "outputs hold between steps");
    end
    step = 1'b1;
    @(posedge clk);
    #1 step = 1'b0;
    k++;
    check_outputs("after step");
  endtask

  task automatic new_text();
    foreach (text0[i]) text0[i] = 8'($urandom_range(8'h20, 8'h7E));
    foreach (text1[i]) text1[i] = 8'($urandom_range(8'h20, 8'h7E));
  endtask

  // Watchdog.
  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned frame_len0, f0_before, f1_before;
  initial begin
    frame_len0 = L0 * (C0 + 1) + 1;
    new_text();
    step = 1'b0;
    rst  = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    k = 0;
    check_outputs("after reset");
    // Initialization plus two refreshes of the big instance, changing the
    // text between them.
    repeat (7 + frame_len0) do_step();
    check(frames0 == 1, "one refresh of dut done");
    new_text();
    repeat (frame_len0) do_step();
    check(frames0 == 2, "two refreshes of dut done");
    check(frames1 == (k - 7) / (L1 * (C1 + 1) + 1), "alt refresh count");
    // Reset in the middle of a refresh.
    repeat (10) do_step();
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    k = 0;
    check_outputs("after mid-run reset");
    repeat (12) do_step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
