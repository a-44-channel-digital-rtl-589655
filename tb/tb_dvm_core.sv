// tb_dvm_core: the voltmeter logic with ideal comparators. Each channel's
// comparator output is high once the staircase step reaches a threshold
// chosen here; a threshold above 3999 is never reached, 0 trips at step
// 0000. After each measuring cycle every bank must show its threshold (8000
// when never reached). During every readout the digit gates must pass d+10
// pulses for digit d (20 for 0) of the number being read, and the staircase
// must stand still for no more than the longest pulse train plus six clock
// periods. Reference channel thresholds of 2001, 2000 and 1999 must give one
// pump-up pulse, none, and one pump-down pulse per cycle.
`timescale 1ns/1ps
module tb_dvm_core;
  import dvm_pkg::*;
  localparam int NCH = N_CH;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCH-1:0] cmp;
  logic [5:0] out_sel;
  logic tilt_reset;
  reading_t stair, sel_display;
  reading_t display [NCH];
  logic [NCH-1:0] bank_drive;
  logic strobe, scope_trig, pump_up, pump_down, tilt, readout_busy, pause;
  int checks = 0, failures = 0;

  dvm_core dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int thr [NCH];
  always_comb for (int n = 0; n < NCH; n++) cmp[n] = reading_value(stair) >= thr[n];

  // Per-readout pulse accounting.
  int pulses [N_DIG];
  int jammed;
  int periods_stalled;
  int n_readouts = 0, n_ups = 0, n_downs = 0;
  always @(posedge clk) if (rst_n) begin
    if (pump_up) n_ups++;
    if (pump_down) n_downs++;
    if (dut.jam) begin
      jammed = reading_value(dut.jam_value);
      for (int i = 0; i < N_DIG; i++) pulses[i] = 0;
    end
    for (int i = 0; i < N_DIG; i++) if (dut.digit_pulse[i]) pulses[i]++;
    if (dut.rff && dut.c_rise) periods_stalled++;
    if (dut.cff_reset && dut.rff) begin
      int longest, d, want;
      longest = 0;
      n_readouts++;
      for (int i = 0; i < N_DIG; i++) begin
        d = (i == DIG_K) ? jammed / 1000 : (jammed / (10 ** i)) % 10;
        want = (d == 0) ? 20 : d + 10;
        if (want > longest) longest = want;
        checks++;
        if (pulses[i] != want) begin
          failures++;
          $display("FAIL: reading %0d digit %0d got %0d pulses, expected %0d", jammed, i, pulses[i], want);
        end
      end
      checks++;
      if (periods_stalled > longest + 6) begin
        failures++;
        $display("FAIL: readout of %0d held the staircase %0d periods", jammed, periods_stalled);
      end
    end
    if (!dut.rff) periods_stalled = 0;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cycle_end();
    do @(posedge clk); while (!dut.u_ctl.latch_reset);
    @(posedge clk);
  endtask

  int want_v;
  initial begin
    out_sel = 6'd9;
    tilt_reset = 1'b0;
    for (int n = 0; n < NCH; n++) thr[n] = int'($urandom_range(3999));
    thr[0] = 2001;
    thr[1] = 0;
    thr[2] = 4500;
    thr[3] = 3999;
    thr[4] = 1;
    thr[5] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int c = 0; c < 4; c++) begin
      if (c == 2) thr[0] = 2000;
      if (c == 3) thr[0] = 1999;
      n_ups = 0; n_downs = 0;
      wait_cycle_end();
      for (int n = 0; n < NCH; n++) begin
        want_v = (thr[n] > 3999) ? 8000 : thr[n];
        check(reading_value(display[n]) == want_v,
              $sformatf("cycle %0d channel %0d shows %0d, expected %0d", c, n + 1, reading_value(display[n]), want_v));
      end
      check(reading_value(sel_display) == reading_value(display[9]), "selected output repeats channel 10");
      check(!tilt, "no tilt");
      if (c >= 1) begin
        if (thr[0] == 2001) check(n_ups == 1 && n_downs == 0, "reference late: one pump-up pulse");
        if (thr[0] == 2000) check(n_ups == 0 && n_downs == 0, "reference on step 2000: no pump");
        if (thr[0] == 1999) check(n_ups == 0 && n_downs == 1, "reference early: one pump-down pulse");
      end
    end
    check(n_readouts > 40, $sformatf("%0d readouts", n_readouts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
