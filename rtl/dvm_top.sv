// dvm_top: the complete 44-channel multiplexing digital voltmeter.
//
// A 4000-step staircase (2.5 mV per step, 0 to 10 V) is compared with 44
// negative input voltages at once. Each time the staircase reaches an input,
// the staircase stops and the step number is counted serially into that
// channel's four-digit Bipco display bank; then the staircase continues.
// After the last step, inputs never reached show 8000 (over range), and a
// readout at step 0000 catches zero or positive inputs. One sweep with all
// readouts takes about 200 ms at the instrument's 25 kHz clock.
//
// This top joins the logic core (dvm_core) with behavioural models of the
// analog parts: the self-calibrating reference amplifier (ref_amp), the
// staircase D-A converter (stair_dac) and 44 differential comparators
// (diff_comparator). Channel 1 permanently measures an internal -5.000 V
// zener reference, which must read 2000; its trip step drives the reference
// pumps, closing the loop that calibrates the staircase amplitude. Channel 2
// measures whatever the front-panel input selector connects (another
// channel's input line, a test voltage or a test jack). The other 42
// channels measure their own input lines.
//
// Ports: `clk` is the system clock, four ticks per instrument clock period
// (100 kHz for the instrument's 25 kHz); `vin_uv` the input voltages in
// signed microvolts (index 0 and 1 are not connected, as channels 1 and 2
// are internal); `in_sel`, `test_uv`, `jack_uv` the input selector and its
// test sources; `out_sel` the selected-output switch; `tilt_reset` the
// failure-lamp reset button. Outputs: the 44 bank readings, the right-hand
// selected bank, the tilt lamp, the staircase voltage and reference voltage
// (real, for observation) and the oscilloscope trigger.
module dvm_top
  import dvm_pkg::*;
#(
  parameter int unsigned NCH       = N_CH,
  parameter int          ZENER_UV  = -5_000_000,
  parameter real         VREF_INIT = -9.990,
  parameter real         PUMP_STEP = 0.001
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [31:0]      vin_uv [NCH],
  input  logic [6:0]              in_sel,
  input  logic signed [31:0]      test_uv,
  input  logic signed [31:0]      jack_uv,
  input  logic [$clog2(NCH)-1:0]  out_sel,
  input  logic                    tilt_reset,
  output reading_t                display [NCH],
  output logic [NCH-1:0]          bank_drive,
  output reading_t                sel_display,
  output logic                    tilt,
  output logic                    scope_trig,
  output real                     v_stair,
  output real                     vref
);

  reading_t           stair;
  logic               strobe, pump_up, pump_down, readout_busy, pause;
  logic [NCH-1:0]     cmp;
  logic signed [31:0] monitor_uv;
  logic signed [31:0] cmp_in_uv [NCH];

  ref_amp #(.VREF_INIT(VREF_INIT), .PUMP_STEP(PUMP_STEP)) u_ref (
    .clk, .pump_up, .pump_down, .vref
  );

  stair_dac u_dac (
    .stair, .vref, .v_stair
  );

  input_select #(.N_CH(NCH)) u_insel (
    .sel(in_sel), .vin_uv, .test_uv, .jack_uv, .vout_uv(monitor_uv)
  );

  always_comb begin
    for (int n = 0; n < NCH; n++) cmp_in_uv[n] = vin_uv[n];
    cmp_in_uv[0] = ZENER_UV;
    cmp_in_uv[1] = monitor_uv;
  end

  for (genvar n = 0; n < NCH; n++) begin : g_cmp
    diff_comparator u_cmp (
      .v_stair, .vin_uv(cmp_in_uv[n]), .cmp(cmp[n])
    );
  end

  dvm_core #(.NCH(NCH)) u_core (
    .clk, .rst_n, .cmp, .out_sel, .tilt_reset,
    .stair, .strobe, .scope_trig, .pump_up, .pump_down,
    .display, .bank_drive, .sel_display, .tilt, .readout_busy, .pause
  );

endmodule
