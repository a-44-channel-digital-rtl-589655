// dvm_core: all logic cards of the 44-channel staircase voltmeter.
//
// Operation: an up counter advances a BCD staircase one step per clock
// period. In the middle of each step the strobe samples the 44 analog
// comparators. A comparator whose input the staircase has reached latches
// (CLC) and sets its flip-flop (CFF), which stops the staircase and starts a
// readout cycle: JAM copies the step number digit by digit into four BCD down
// counters and resets the Bipcos of the banks whose CFF is set; B-gate pulses
// then count the down counters backwards, and each digit's gate passes pulses
// until its down counter reaches zero for the second time (d+10 pulses for
// digit d). The serial pulse trains count the opened Bipco banks up to the
// step number. When all four digits are done, SZ OR resets RFF and the CFFs
// and the staircase continues. After step 3999 the counter wraps, the pause
// logic forces every comparator that never tripped (their banks show 8000),
// re-arms all comparators, and runs a readout at step 0000 for inputs at or
// above zero volts. Comparator 1 measures the -5.000 V reference; its trip
// step against step 2000 drives the reference pump outputs. The ten-pulse
// detector checks that every read bank passes through 9 at the right time.
//
// Interface: `clk` is the system clock (four ticks per instrument clock
// period), `cmp` the comparator outputs (channel 1 = index 0), `stair` the
// UP-counter digits for the D-A converter, `strobe` the mid-step strobe,
// `pump_up`/`pump_down` the diode-pump drives, `display` the 44 Bipco banks,
// `bank_drive` their current-driver pulses (OR of a bank's gated digit pulses),
// `sel_display` the right-hand selected-output bank and `tilt` the failure
// lamp. Every bank has four digits; bipco_bank's DIGITS parameter can make a
// three-digit bank.
module dvm_core
  import dvm_pkg::*;
#(
  parameter int unsigned NCH = N_CH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NCH-1:0]          cmp,
  input  logic [$clog2(NCH)-1:0]  out_sel,
  input  logic                    tilt_reset,
  output reading_t                stair,
  output logic                    strobe,
  output logic                    scope_trig,
  output logic                    pump_up,
  output logic                    pump_down,
  output reading_t                display [NCH],
  output logic [NCH-1:0]          bank_drive,
  output reading_t                sel_display,
  output logic                    tilt,
  output logic                    readout_busy,
  output logic                    pause
);

  logic c_rise, cbar_rise;
  logic ucp, dcp, stair_strobe, jam, force_cmp, latch_reset, cff_reset;
  logic rff, dff, xff, yff, sff, pff, pdc;
  logic kc4, k4;
  logic [NCH-1:0] clc, cff, nine;
  reading_t jam_value, down;
  logic [N_DIG-1:0] zero, fz, sz, szd, digit_pulse;
  logic zff;
  logic [3:0] tpc;
  logic tpc_window;

  clock_gen u_clock (
    .clk, .rst_n, .c_rise, .cbar_rise, .c_level(scope_trig)
  );

  up_counter u_up (
    .clk, .rst_n, .ucp, .count(stair), .kc4, .k4
  );

  readout_control u_ctl (
    .clk, .rst_n, .c_rise, .cbar_rise,
    .any_cff(|cff), .kc4, .szd_all(&szd),
    .ucp, .dcp, .stair_strobe, .jam, .force_cmp, .latch_reset, .cff_reset,
    .rff, .dff, .xff, .yff, .sff, .pff, .pdc
  );

  // During the pause readout PFF is set and 8000 is jammed instead of the
  // (wrapped) step number.
  always_comb begin
    jam_value = stair;
    if (pff) jam_value = {OVER_RANGE_K, 4'd0, 4'd0, 4'd0};
  end

  for (genvar d = 0; d < N_DIG; d++) begin : g_digit
    down_counter u_down (
      .clk, .rst_n, .jam, .jam_value(jam_value[d]), .dcp,
      .count(down[d]), .zero(zero[d])
    );
    zero_detect u_zero (
      .clk, .rst_n, .dff, .cbar_rise, .zero(zero[d]), .dcp,
      .fz(fz[d]), .sz(sz[d]), .szd(szd[d]), .gate_pulse(digit_pulse[d])
    );
  end

  for (genvar n = 0; n < NCH; n++) begin : g_ch
    comparator_latch u_latch (
      .clk, .rst_n, .cmp(cmp[n]), .stair_strobe, .force_cmp, .latch_reset,
      .cff_reset, .clc(clc[n]), .cff(cff[n])
    );
    bipco_bank #(.DIGITS(N_DIG)) u_bank (
      .clk, .rst_n, .cff(cff[n]), .jam, .digit_pulse,
      .display(display[n]), .nine(nine[n]), .drive(bank_drive[n])
    );
  end

  ref_pump_logic u_pump (
    .clk, .rst_n, .k4, .ucp, .cff_ref(cff[0]), .zff, .pump_up, .pump_down
  );

  ten_pulse_detector #(.N_CH(NCH)) u_tpd (
    .clk, .rst_n, .jam, .dcp, .cbar_rise, .cff, .nine, .tilt_reset,
    .tpc, .window(tpc_window), .tilt
  );

  selected_output #(.NCH(NCH)) u_sel (
    .clk, .rst_n, .sel(out_sel), .cff, .jam, .digit_pulse, .display(sel_display)
  );

  always_comb begin
    strobe       = stair_strobe;
    readout_busy = rff;
    pause        = pff || pdc;
  end

endmodule
