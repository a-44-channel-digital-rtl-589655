// tb_dvm_ramp: input slew-rate test. The instrument is rated to follow an
// input that changes by up to about 50 V/s. One channel gets a falling ramp
// (growing in magnitude) of 50 V/s and another a rising one, both wrapping
// inside -1 V..-9 V, while the other channels hold fixed voltages. With
// `clk` standing for 100 kHz (four ticks per 40 us step), 50 V/s is 0.5 mV
// per tick. For every measuring cycle after calibration the reading of each
// ramp channel must be the first staircase step whose voltage reached the
// input as it was at that step's strobe, i.e. what an ideal comparator
// sampling at the strobe would latch; a ramp channel must never read 8000.
`timescale 1ns/1ps
module tb_dvm_ramp;
  import dvm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [31:0] vin_uv [N_CH];
  logic [6:0]         in_sel;
  logic signed [31:0] test_uv, jack_uv;
  logic [5:0]         out_sel;
  logic               tilt_reset;
  reading_t           display [N_CH];
  logic [N_CH-1:0]    bank_drive;
  reading_t           sel_display;
  logic               tilt, scope_trig;
  real                v_stair, vref;
  int checks = 0, failures = 0;

  dvm_top dut (.*);

  localparam int FALL = 10;   // channel 11
  localparam int RISE = 20;   // channel 21
  localparam int SLEW_UV_PER_TICK = 500;

  // Ramps.
  always @(posedge clk) if (rst_n) begin
    vin_uv[FALL] <= (vin_uv[FALL] <= -9_000_000) ? -1_000_000 : vin_uv[FALL] - SLEW_UV_PER_TICK;
    vin_uv[RISE] <= (vin_uv[RISE] >= -1_000_000) ? -9_000_000 : vin_uv[RISE] + SLEW_UV_PER_TICK;
  end

  // Reference model of an ideal strobe-sampled comparator for the two ramps.
  int  exp_fall = -1, exp_rise = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_ctl.latch_reset) begin
      exp_fall <= -1;
      exp_rise <= -1;
    end else if (dut.u_core.stair_strobe && !dut.u_core.u_ctl.pff) begin
      if (exp_fall < 0 && v_stair * 1.0e6 + real'(vin_uv[FALL]) >= 0.0) exp_fall <= reading_value(dut.u_core.stair);
      if (exp_rise < 0 && v_stair * 1.0e6 + real'(vin_uv[RISE]) >= 0.0) exp_rise <= reading_value(dut.u_core.stair);
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles, fall_seen, rise_seen, got_f, got_r, ef, er;
  initial begin
    for (int n = 0; n < N_CH; n++) vin_uv[n] = -(n * 200_000 + 101_250);
    vin_uv[FALL] = -1_000_000;
    vin_uv[RISE] = -9_000_000;
    in_sel = 7'd5; test_uv = 0; jack_uv = 0; out_sel = 6'(FALL); tilt_reset = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cycles = 0; fall_seen = 0; rise_seen = 0;
    while (cycles < 30) begin
      do @(posedge clk); while (!dut.u_core.u_ctl.latch_reset);
      ef = exp_fall; er = exp_rise;
      @(posedge clk);
      cycles++;
      if (cycles < 15) continue;   // reference calibration
      got_f = reading_value(display[FALL]);
      got_r = reading_value(display[RISE]);
      checks++;
      if (got_f != ef) begin failures++; $display("FAIL: falling ramp reads %0d, expected %0d", got_f, ef); end
      checks++;
      if (got_r != er) begin failures++; $display("FAIL: rising ramp reads %0d, expected %0d", got_r, er); end
      checks++;
      if (got_f == 8000 || got_r == 8000) begin failures++; $display("FAIL: a ramp escaped the staircase"); end
      if (got_f != 0) fall_seen++;
      if (got_r != 0) rise_seen++;
      checks++;
      if (reading_value(sel_display) != got_f) begin failures++; $display("FAIL: selected output"); end
    end
    checks++;
    if (fall_seen < 10 || rise_seen < 10) begin failures++; $display("FAIL: ramps not measured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
