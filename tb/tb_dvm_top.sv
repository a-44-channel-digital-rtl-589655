// tb_dvm_top: end-to-end test of the whole voltmeter.
//
// Two voltmeters run side by side on the same 44 inputs: one whose staircase
// reference starts 10 mV low (default parameters) and one that starts 10 mV
// high. Both must pump their reference until the internal -5.000 V channel
// reads 2000. Then, in a measuring cycle without pumping, every bank of the
// first voltmeter is checked against a reading computed here from the input
// voltage and the reference voltage: ceil(|vin| / (|vref| / 4000)), 8000
// beyond the last step and 0000 for zero or positive inputs. The test also
// checks the input selector (channel 2 repeats channel 11), the
// selected-output bank, the length of a measuring cycle (4000 steps plus the
// readouts, about 200 ms at 25 kHz) and the tilt lamp, which must stay dark
// until a Bipco fault is injected and must then light until reset. Every
// mechanism (readout stall, simultaneous trips, forced over-range readout,
// zero-volt readout, pump up, pump down, tilt) is counted and must occur.
// Each bank's driver pulses over the checked cycle are counted as well.
`timescale 1ns/1ps
module tb_dvm_top;
  import dvm_pkg::*;

  localparam int NCH = N_CH;
  localparam int SEL_CH = 10;       // input selector position: channel 11
  localparam int OUT_SEL = 20;      // selected output: channel 21

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [31:0] vin_uv [NCH];
  logic [6:0]         in_sel;
  logic signed [31:0] test_uv, jack_uv;
  logic [5:0]         out_sel;
  logic               tilt_reset;

  reading_t disp_lo [NCH], disp_hi [NCH];
  reading_t sel_lo, sel_hi;
  logic [NCH-1:0] drive_lo, drive_hi;
  logic     tilt_lo, tilt_hi, trig_lo, trig_hi;
  real      vst_lo, vst_hi, vref_lo, vref_hi;

  dvm_top u_lo (
    .clk, .rst_n, .vin_uv, .in_sel, .test_uv, .jack_uv, .out_sel, .tilt_reset,
    .display(disp_lo), .bank_drive(drive_lo), .sel_display(sel_lo), .tilt(tilt_lo), .scope_trig(trig_lo),
    .v_stair(vst_lo), .vref(vref_lo)
  );

  dvm_top #(.VREF_INIT(-10.010)) u_hi (
    .clk, .rst_n, .vin_uv, .in_sel, .test_uv, .jack_uv, .out_sel, .tilt_reset,
    .display(disp_hi), .bank_drive(drive_hi), .sel_display(sel_hi), .tilt(tilt_hi), .scope_trig(trig_hi),
    .v_stair(vst_hi), .vref(vref_hi)
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Independent reading model.
  function automatic int expected_reading(input int signed uv, input real vref);
    real step_uv, mag;
    int k;
    if (uv >= 0) return 0;
    mag = -real'(uv);
    step_uv = -vref * 1.0e6 / 4000.0;
    k = int'($ceil(mag / step_uv));
    if (k > 3999) return 8000;
    return k;
  endfunction

  // Mechanism counters.
  int n_readout = 0, n_simul = 0, n_force = 0, n_zero_ro = 0;
  int n_pump_up = 0, n_pump_down = 0, n_tilt = 0, n_cycles = 0;
  logic rff_q = 1'b0;
  logic pdc_q = 1'b0;

  always @(posedge clk) if (rst_n) begin
    rff_q <= u_lo.u_core.u_ctl.rff;
    pdc_q <= u_lo.u_core.u_ctl.pdc;
    if (u_lo.u_core.u_ctl.rff && !rff_q) n_readout++;
    if (!u_lo.u_core.u_ctl.pdc && pdc_q) n_zero_ro++;
    if (u_lo.u_core.u_ctl.force_cmp && (u_lo.u_core.clc != '1)) n_force++;
    if ($countones(u_lo.u_core.cff) > 1 && u_lo.u_core.u_ctl.start && !u_lo.u_core.u_ctl.pff) n_simul++;
    if (u_lo.u_core.pump_up) n_pump_up++;
    if (u_hi.u_core.pump_down) n_pump_down++;
  end

  // Measuring-cycle length, counted in instrument clock periods.
  int periods = 0;
  int last_cycle_periods = 0;
  always @(posedge clk) if (rst_n) begin
    if (u_lo.u_core.u_ctl.latch_reset) begin
      last_cycle_periods = periods;
      periods = 0;
    end else if (u_lo.u_core.c_rise) begin
      periods++;
    end
  end

  // Bank driver pulses per measuring cycle, per channel.
  int drv_cnt [NCH];
  int drv_last [NCH];
  initial for (int n = 0; n < NCH; n++) drv_cnt[n] = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NCH; n++) begin
      if (u_lo.u_core.u_ctl.latch_reset) begin
        drv_last[n] = drv_cnt[n] + int'(drive_lo[n]);
        drv_cnt[n]  = 0;
      end else if (drive_lo[n]) begin
        drv_cnt[n]++;
      end
    end
  end

  // A bank is read once per cycle and receives as many driver pulses as
  // its longest digit train: 20 if any digit is 0, else the largest digit + 10.
  function automatic int expected_drives(input int v);
    int m, d;
    m = 0;
    for (int i = 0; i < 4; i++) begin
      d = (v / (10 ** i)) % 10;
      d = (d == 0) ? 20 : d + 10;
      if (d > m) m = d;
    end
    return m;
  endfunction

  // Wait for the end of the first voltmeter's measuring cycle.
  task automatic wait_cycle_end();
    do @(posedge clk); while (!u_lo.u_core.u_ctl.latch_reset);
    @(posedge clk);
    n_cycles++;
  endtask

  // Watchdog.
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stable;
  int hi_ok;
  int exp_v;
  int got;
  initial begin
    // Inputs: channels 1 and 2 are internal; the rest get a mix of voltages.
    for (int n = 0; n < NCH; n++) begin
      // Mid-step voltages so that a reference error below 1 mV cannot move
      // a reading across a step boundary.
      int k;
      k = 1 + int'($urandom_range(3998));
      vin_uv[n] = -(k * 2500 - 1250);
    end
    vin_uv[0] = 0;              // not connected
    vin_uv[1] = 0;              // not connected
    vin_uv[2] = 0;              // zero volts -> 0000
    vin_uv[3] = 1_000_000;      // wrong polarity -> 0000
    vin_uv[4] = -10_500_000;    // beyond full scale -> 8000
    vin_uv[5] = -1_233_750;     // two equal inputs trip together
    vin_uv[6] = -1_233_750;
    vin_uv[7] = -3_750;         // step 2
    vin_uv[8] = -9_998_750;     // step 3999
    in_sel     = 7'(SEL_CH);
    test_uv    = -2_000_000;
    jack_uv    = -3_000_000;
    out_sel    = 6'(OUT_SEL);
    tilt_reset = 1'b0;

    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // Reference calibration: wait until channel 1 reads 2000 twice running
    // on both voltmeters.
    stable = 0;
    hi_ok = 0;
    while (stable < 2 || hi_ok < 2) begin
      wait_cycle_end();
      if (reading_value(disp_lo[0]) == 2000) stable++; else stable = 0;
      if (reading_value(disp_hi[0]) == 2000) hi_ok++; else hi_ok = 0;
      if (n_cycles > 60) break;
    end
    $display("calibrated after %0d cycles: vref_lo=%f vref_hi=%f", n_cycles, vref_lo, vref_hi);
    check(stable >= 2, "low-start reference reaches 2000");
    check(hi_ok >= 2, "high-start reference reaches 2000");
    // Step 2000 reaches 5.000 V and step 1999 does not exactly when the
    // reference lies in [-10.005 V, -10.000 V]: the loop's dead band.
    check(vref_lo <= -9.9999 && vref_lo > -10.0051, "low-start reference inside the dead band");
    check(vref_hi <= -9.9999 && vref_hi > -10.0051, "high-start reference inside the dead band");

    // A full measuring cycle at the calibrated reference.
    wait_cycle_end();
    check(reading_value(disp_lo[0]) == 2000, "reference channel reads 2000");
    for (int n = 2; n < NCH; n++) begin
      exp_v = expected_reading(vin_uv[n], vref_lo);
      got   = reading_value(disp_lo[n]);
      check(got == exp_v, $sformatf("channel %0d reads %0d, expected %0d", n + 1, got, exp_v));
    end
    for (int n = 0; n < NCH; n++) begin
      got = reading_value(disp_lo[n]);
      check(drv_last[n] == expected_drives(got),
            $sformatf("channel %0d: %0d driver pulses for %0d", n + 1, drv_last[n], got));
    end
    exp_v = expected_reading(vin_uv[SEL_CH], vref_lo);
    check(reading_value(disp_lo[1]) == exp_v, "channel 2 repeats the selected input");
    check(reading_value(sel_lo) == reading_value(disp_lo[OUT_SEL]), "selected output repeats its bank");
    check(reading_value(disp_lo[4]) == 8000, "over-range input reads 8000");
    check(reading_value(disp_lo[2]) == 0 && reading_value(disp_lo[3]) == 0, "zero and positive inputs read 0000");
    $display("measuring cycle: %0d clock periods", last_cycle_periods);
    check(last_cycle_periods >= 4000 && last_cycle_periods <= 5200,
          $sformatf("measuring cycle of %0d clock periods (4000..5200)", last_cycle_periods));
    check(!tilt_lo && !tilt_hi, "no tilt in fault-free operation");

    // Switch the selector to the test position and check one more cycle.
    in_sel = 7'(NCH);
    wait_cycle_end();
    wait_cycle_end();
    check(reading_value(disp_lo[1]) == expected_reading(test_uv, vref_lo), "channel 2 measures the test voltage");

    // Inject a Bipco fault: the 9's return line of every bank stays low.
    force u_lo.u_core.nine = '0;
    wait_cycle_end();
    release u_lo.u_core.nine;
    if (tilt_lo) n_tilt++;
    check(tilt_lo, "tilt lamp lights on a Bipco fault");
    wait_cycle_end();
    check(tilt_lo, "tilt lamp holds until reset");
    @(posedge clk) tilt_reset = 1'b1;
    @(posedge clk) tilt_reset = 1'b0;
    wait_cycle_end();
    check(!tilt_lo, "tilt lamp dark after reset");

    $display("mechanisms: readouts=%0d simultaneous=%0d forced=%0d zero_readouts=%0d pump_up=%0d pump_down=%0d tilt=%0d",
             n_readout, n_simul, n_force, n_zero_ro, n_pump_up, n_pump_down, n_tilt);
    check(n_readout > 0, "readout stalls occurred");
    check(n_simul > 0, "simultaneous trips occurred");
    check(n_force > 0, "forced over-range readouts occurred");
    check(n_zero_ro > 0, "zero-volt readouts occurred");
    check(n_pump_up > 0, "pump-up events occurred");
    check(n_pump_down > 0, "pump-down events occurred");
    check(n_tilt > 0, "tilt occurred");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
