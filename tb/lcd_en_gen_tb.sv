// lcd_en_gen_tb -- self-checking testbench for lcd_en_gen.
//
// Two instances: a small divider (HALF_CYCLES = 5) and one at the default
// ratio (50001, the 2 ms EN period at 50 MHz). For each, the testbench keeps
// its own cycle count and checks that EN starts high after reset, that every
// EN level lasts exactly HALF_CYCLES clocks, that en_rise / en_fall are high in
// exactly the cycle before EN rises / falls, and that reset in the middle of a
// period restarts the divider.
module lcd_en_gen_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned SMALL = 5;
  localparam int unsigned FULL  = 50001;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  logic en_s, rise_s, fall_s;
  logic en_f, rise_f, fall_f;

  lcd_en_gen #(.HALF_CYCLES(SMALL)) dut_small (.clk, .rst, .en(en_s), .en_rise(rise_s), .en_fall(fall_s));
  lcd_en_gen                        dut_full  (.clk, .rst, .en(en_f), .en_rise(rise_f), .en_fall(fall_f));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference: clock edges since reset. The divider has seen cyc counting
  // edges, so its counter is cyc mod HALF_CYCLES and EN has toggled
  // cyc / HALF_CYCLES times. Outputs are sampled on the falling clock edge.
  int unsigned cyc;
  int unsigned edges_s, edges_f;
  always @(posedge clk) cyc <= rst ? 0 : cyc + 1;

  always @(negedge clk) begin
    if (!rst) begin
      automatic bit exp_en_s = ((cyc / SMALL) % 2 == 0);
      automatic bit exp_en_f = ((cyc / FULL) % 2 == 0);
      automatic bit last_s   = (cyc % SMALL == SMALL - 1);
      automatic bit last_f   = (cyc % FULL  == FULL - 1);
      check(en_s == exp_en_s, "small EN level");
      check(rise_s == (last_s && !exp_en_s), "small en_rise");
      check(fall_s == (last_s &&  exp_en_s), "small en_fall");
      if (en_f != exp_en_f || rise_f != (last_f && !exp_en_f) || fall_f != (last_f && exp_en_f))
        check(1'b0, "full-size EN / strobes");
      if (last_f) check(1'b1, "full-size period boundary");
      if (last_s) edges_s++;
      if (last_f) edges_f++;
    end
  end

  // Watchdog.
  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edges_s = 0; edges_f = 0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // Reset in the middle of a small period, then run again.
    repeat (12) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk);
    #1 check(en_s == 1'b1 && en_f == 1'b1, "EN high after reset");
    rst = 1'b0;
    edges_s = 0; edges_f = 0;
    // Three full-size EN periods (2 x 50001 x 20 ns = 2.00004 ms each).
    repeat (6 * FULL + 2) @(posedge clk);
    check(edges_f == 6, "six full-size EN half periods in 300006 cycles");
    check(edges_s == (6 * FULL + 2) / SMALL, "small divider edge count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
