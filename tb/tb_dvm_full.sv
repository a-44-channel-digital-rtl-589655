// tb_dvm_full: one voltmeter at its default configuration (44 channels,
// 4000-step staircase, reference starting 10 mV low) measures 42 external
// inputs spread over the full range, including 0 V and an over-range input.
// It runs until the reference has calibrated itself (channel 1 reads 2000
// twice running), then checks every bank of one complete measuring cycle
// against ceil(|vin| / (|vref| / 4000)), 0000 for 0 V and 8000 beyond the
// last step.
`timescale 1ns/1ps
module tb_dvm_full;
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

  function automatic int expected_reading(input int signed uv, input real vr);
    int k;
    if (uv >= 0) return 0;
    k = int'($ceil(-real'(uv) / (-vr * 1.0e6 / 4000.0)));
    return (k > 3999) ? 8000 : k;
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cycle_end();
    do @(posedge clk); while (!dut.u_core.u_ctl.latch_reset);
    @(posedge clk);
  endtask

  int stable, cycles, want, got;
  initial begin
    for (int n = 0; n < N_CH; n++) vin_uv[n] = -(n * 230_000 + 1_250);
    vin_uv[2]  = 0;
    vin_uv[43] = -10_200_000;
    in_sel = 7'd30; test_uv = 0; jack_uv = 0; out_sel = 6'd12; tilt_reset = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    stable = 0; cycles = 0;
    while (stable < 2 && cycles < 40) begin
      wait_cycle_end();
      cycles++;
      if (reading_value(display[0]) == 2000) stable++; else stable = 0;
    end
    checks++;
    if (stable < 2) begin failures++; $display("FAIL: reference did not calibrate"); end
    wait_cycle_end();
    $display("calibrated after %0d cycles, vref = %f V", cycles, vref);
    checks++;
    if (reading_value(display[0]) != 2000) begin failures++; $display("FAIL: reference channel"); end
    for (int n = 1; n < N_CH; n++) begin
      want = expected_reading((n == 1) ? vin_uv[30] : vin_uv[n], vref);
      got  = reading_value(display[n]);
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL: channel %0d shows %0d, expected %0d", n + 1, got, want);
      end
    end
    checks++;
    if (reading_value(sel_display) != reading_value(display[12]) || tilt) begin
      failures++; $display("FAIL: selected output or tilt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
