// hd44780_model -- behavioural model of the write side of an HD44780U /
// KS0066U character-LCD controller, for simulation only (not synthesizable).
//
// It latches RS, R/W and DB7..DB0 on every falling edge of EN and executes
// the write instructions of the controller's instruction set on a 128-byte
// DDRAM with an address counter: Clear Display, Return Home, Entry Mode Set,
// Display On/Off Control, Cursor/Display Shift (cursor moves only),
// Function Set, Set CGRAM / DDRAM Address and Write Data. Reads (R/W=1) and
// the 4-bit bus mode are not modelled; the CGRAM is not stored.
//
// Checks it keeps, as counters the testbench reads:
//   busy_violations  a word was latched before the previous instruction's
//                    worst-case execution time had passed (only when
//                    CHECK_EXEC_TIME is set, since scaled-down simulations
//                    run EN far faster than a real LCD allows)
//   setup_violations RS or DB changed while EN was high (they must be stable
//                    from shortly after the rising edge to the falling edge)
//   read_attempts    words latched with R/W=1
// A log of every latched word (RS and DB) and per-instruction counters let a
// testbench follow what was written.
module hd44780_model #(
  parameter bit          CHECK_EXEC_TIME = 1'b1,
  parameter int unsigned LOG_DEPTH       = 4096
) (
  input logic       rs,
  input logic       rw,
  input logic       en,
  input logic [7:0] db
);
  timeunit 1ns; timeprecision 1ps;

  // Worst-case execution times at a 270 kHz internal oscillator, in ns.
  localparam int unsigned T_CLEAR_NS = 1_520_000;
  localparam int unsigned T_HOME_NS  = 1_520_000;
  localparam int unsigned T_INSTR_NS = 37_000;
  localparam int unsigned T_DATA_NS  = 41_000;

  // Controller state.
  logic [7:0] ddram [128];
  logic [6:0] ac;
  logic       inc, shift;
  logic       disp_on, cursor_on, blink_on;
  logic       bus8, two_lines, font_5x10;
  logic       addr_in_cgram;

  // Observation.
  int unsigned n_writes;
  int unsigned n_clear, n_home, n_entry, n_disp, n_cshift, n_func, n_cgaddr, n_ddaddr, n_data;
  int unsigned busy_violations, setup_violations, read_attempts;
  logic        log_rs [LOG_DEPTH];
  logic [7:0]  log_db [LOG_DEPTH];
  realtime     log_t  [LOG_DEPTH];

  realtime     busy_until;
  logic        rs_at_rise;
  logic [7:0]  db_at_rise;

  initial begin
    foreach (ddram[i]) ddram[i] = 8'h20;
    ac = '0; inc = 1'b1; shift = 1'b0;
    disp_on = 1'b0; cursor_on = 1'b0; blink_on = 1'b0;
    bus8 = 1'b1; two_lines = 1'b0; font_5x10 = 1'b0;
    addr_in_cgram = 1'b0;
    n_writes = 0; n_clear = 0; n_home = 0; n_entry = 0; n_disp = 0; n_cshift = 0;
    n_func = 0; n_cgaddr = 0; n_ddaddr = 0; n_data = 0;
    busy_violations = 0; setup_violations = 0; read_attempts = 0;
    busy_until = 0;
    rs_at_rise = 1'b0; db_at_rise = '0;
  end

  // Values shortly after EN rises; the bus must hold them until EN falls.
  always @(posedge en) begin
    #1;
    rs_at_rise = rs;
    db_at_rise = db;
  end

  function automatic logic [6:0] step_ac(input logic [6:0] a, input logic up);
    return up ? a + 7'd1 : a - 7'd1;
  endfunction

  always @(negedge en) begin
    realtime now;
    int unsigned exec_ns;
    now = $realtime;
    if (n_writes > 0 && (rs != rs_at_rise || db != db_at_rise)) setup_violations++;
    if (CHECK_EXEC_TIME && now < busy_until) busy_violations++;
    if (n_writes < LOG_DEPTH) begin
      log_rs[n_writes] = rs;
      log_db[n_writes] = db;
      log_t[n_writes]  = now;
    end
    n_writes++;
    exec_ns = T_INSTR_NS;
    if (rw) begin
      read_attempts++;
    end else if (rs) begin
      n_data++;
      exec_ns = T_DATA_NS;
      if (!addr_in_cgram) begin
        ddram[ac] = db;
        ac = step_ac(ac, inc);
      end
    end else if (db[7]) begin
      n_ddaddr++;
      ac = db[6:0];
      addr_in_cgram = 1'b0;
    end else if (db[6]) begin
      n_cgaddr++;
      ac = {1'b0, db[5:0]};
      addr_in_cgram = 1'b1;
    end else if (db[5]) begin
      n_func++;
      bus8 = db[4]; two_lines = db[3]; font_5x10 = db[2];
    end else if (db[4]) begin
      n_cshift++;
      if (!db[3]) ac = step_ac(ac, db[2]);
    end else if (db[3]) begin
      n_disp++;
      disp_on = db[2]; cursor_on = db[1]; blink_on = db[0];
    end else if (db[2]) begin
      n_entry++;
      inc = db[1]; shift = db[0];
    end else if (db[1]) begin
      n_home++;
      exec_ns = T_HOME_NS;
      ac = '0;
      addr_in_cgram = 1'b0;
    end else if (db[0]) begin
      n_clear++;
      exec_ns = T_CLEAR_NS;
      foreach (ddram[i]) ddram[i] = 8'h20;
      ac = '0;
      inc = 1'b1;
      addr_in_cgram = 1'b0;
    end
    busy_until = now + exec_ns * 1.0ns;
  end

endmodule
