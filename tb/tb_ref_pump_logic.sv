// tb_ref_pump_logic: reproduces the three reference-amplifier cases. The
// reference comparator trips at step 2001 (staircase too low: one pump-up
// pulse), at step 2000 (correct: no pump) or at step 1999 (too high: one
// pump-down pulse). Then every trip step from 1990 to 2010 is swept, plus a
// sweep in which the comparator never trips (no pump). Steps are advanced
// with up-count pulses; the comparator flip-flop is held through a readout
// and released before the next step. On every step the Z flip-flop must be
// set exactly while the staircase stands on step 2000.
`timescale 1ns/1ps
module tb_ref_pump_logic;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic k4, ucp, cff_ref, zff, pump_up, pump_down;
  int checks = 0, failures = 0;
  int ups = 0, downs = 0;

  ref_pump_logic dut (.*);

  always @(posedge clk) begin
    if (pump_up) ups++;
    if (pump_down) downs++;
    if (pump_up && pump_down) failures++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int step;
  // Run steps 1990..2010; the comparator trips at step `trip`.
  task automatic sweep(input int trip);
    step = 1990; k4 = 1'b0;
    for (int s = 1990; s <= 2010; s++) begin
      // Up-count pulse to step s (K4 follows the counter output).
      @(negedge clk) ucp = 1'b1;
      @(negedge clk) ucp = 1'b0; step = s; k4 = (s >= 2000);
      repeat (2) @(negedge clk);
      check(zff == (s == 2000), $sformatf("Z flip-flop %0b at step %0d", zff, s));
      if (s == trip) begin
        if (s == 2000) check(zff, "Z set at step 2000");
        cff_ref = 1'b1;
        repeat (20) @(negedge clk);   // readout
        cff_ref = 1'b0;
      end
      repeat (2) @(negedge clk);
    end
    // Sweep ends, counter wraps.
    @(negedge clk) ucp = 1'b1;
    @(negedge clk) ucp = 1'b0; k4 = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    k4 = 0; ucp = 0; cff_ref = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    sweep(2001);
    check(ups == 1 && downs == 0, $sformatf("too low: %0d up, %0d down", ups, downs));
    ups = 0; downs = 0;
    sweep(2000);
    check(ups == 0 && downs == 0, $sformatf("correct: %0d up, %0d down", ups, downs));
    ups = 0; downs = 0;
    sweep(1999);
    check(ups == 0 && downs == 1, $sformatf("too high: %0d up, %0d down", ups, downs));
    for (int t = 1990; t <= 2010; t++) begin
      ups = 0; downs = 0;
      sweep(t);
      check(ups == int'(t > 2000) && downs == int'(t < 2000),
            $sformatf("trip at %0d: %0d up, %0d down", t, ups, downs));
    end
    ups = 0; downs = 0;
    sweep(-1);
    check(ups == 0 && downs == 0, "no pump when the reference comparator never trips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
