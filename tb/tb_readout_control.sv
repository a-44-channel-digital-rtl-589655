// tb_readout_control: runs the readout sequencer against a model of the rest
// of the instrument (a comparator flip-flop and the four zero detectors,
// which report "all second zeros" a fixed number of B-gate pulses after JAM).
// Checked: the staircase advances once per clock period when idle and never
// during a readout; a readout gives exactly one JAM, before the first B-gate
// pulse, and the first B-gate pulse comes on the third clock edge after
// the comparator trips; SZ OR resets the CFFs on the next clock edge and the
// staircase resumes one period later. At the 4000-count carry the pause
// sequence must force the comparators, run a readout with PFF set, reset the
// comparator latches, then run a second readout with PFF clear before the
// staircase moves again. Finally 60 more readouts are run after random idle
// times and with random readout lengths (10 to 20 B-gate pulses, as for
// digits), each checked for the same timing.
`timescale 1ns/1ps
module tb_readout_control;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic c_rise, cbar_rise, any_cff, kc4, szd_all;
  logic ucp, dcp, stair_strobe, jam, force_cmp, latch_reset, cff_reset;
  logic rff, dff, xff, yff, sff, pff, pdc;
  int checks = 0, failures = 0;

  readout_control dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Instrument clock: four ticks per period.
  logic [1:0] tick = 2'd0;
  always @(posedge clk) tick <= rst_n ? tick + 2'd1 : 2'd0;
  always_comb begin
    c_rise    = rst_n && tick == 2'd0;
    cbar_rise = rst_n && tick == 2'd2;
  end

  // Model of the comparator flip-flop and of the zero detectors.
  int  pulses = 15;
  int  dcp_since_jam = 0;
  logic trip_req = 1'b0;
  int  c_edges = 0;
  always @(posedge clk) if (c_rise) c_edges++;
  int  jams = 0, jams_pff = 0, forces = 0, latch_resets = 0, ucps = 0, dcps = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      any_cff <= 1'b0;
      szd_all <= 1'b0;
    end else begin
      if (cff_reset)                        any_cff <= 1'b0;
      else if ((stair_strobe && trip_req) || force_cmp) any_cff <= 1'b1;
      if (jam) dcp_since_jam <= 0;
      else if (dcp) dcp_since_jam <= dcp_since_jam + 1;
      if (dff) szd_all <= 1'b0;
      else if (cbar_rise && dcp_since_jam >= pulses) szd_all <= 1'b1;
      if (jam) begin jams++; if (pff) jams_pff++; end
      if (force_cmp) forces++;
      if (latch_reset) latch_resets++;
      if (ucp) ucps++;
      if (dcp) dcps++;
      if (ucp && rff) begin failures++; $display("FAIL: staircase advanced during a readout"); end
      if (ucp && dcp) begin failures++; $display("FAIL: A and B gates open together"); end
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t_start, t_first_dcp, u0, t_reset, t_next_ucp;
  initial begin
    kc4 = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Idle: one up-count pulse per clock period.
    u0 = ucps;
    repeat (40) @(posedge clk);
    check(ucps - u0 == 10, $sformatf("idle staircase advanced %0d times in 10 periods", ucps - u0));
    check(sff && !rff && !dff, "idle: strobe enabled, no readout");

    // A comparator trips at the next strobe.
    trip_req = 1'b1;
    @(posedge clk iff any_cff);
    trip_req = 1'b0;
    #1 t_start = c_edges;
    u0 = ucps;
    @(posedge clk iff rff);
    check(dff, "RFF and DFF set together");
    @(posedge clk iff dcp);
    #1 t_first_dcp = c_edges;
    check(jams == 1, $sformatf("one JAM before the first B-gate pulse (%0d)", jams));
    check((t_first_dcp - t_start) == 3, $sformatf("first B-gate pulse on clock edge %0d after the trip", t_first_dcp - t_start));
    @(posedge clk iff cff_reset);
    t_reset = $time / 10;
    check(c_rise, "SZ OR acts on the clock edge");
    @(posedge clk iff ucp);
    t_next_ucp = $time / 10;
    check(t_next_ucp - t_reset == 4, $sformatf("staircase resumes %0d ticks after SZ OR", t_next_ucp - t_reset));
    @(negedge clk);
    check(ucps - u0 == 1, $sformatf("one staircase step from trip to resume (%0d)", ucps - u0));
    check(dcps >= pulses, "B-gate pulses counted the digits");
    check(sff && !rff && !xff && !dff, "sequencer idle again");

    // End of sweep: the 4000-count carry.
    @(negedge clk iff ucp);
    kc4 = 1'b1;
    @(negedge clk);
    kc4 = 1'b0;
    check(pff, "4000-count carry sets PFF");
    u0 = ucps;
    @(posedge clk iff force_cmp);
    check(pdc, "PDC set before the force pulse");
    @(posedge clk iff latch_reset);
    check(jams_pff == 1, "first pause readout jams with PFF set");
    check(!pff && sff, "SZ OR resets PFF and sets SFF");
    @(posedge clk iff (!pdc));
    @(posedge clk iff rff);
    check(ucps == u0, "staircase held through the pause");
    @(posedge clk iff ucp);
    check(jams == 3 && jams_pff == 1, $sformatf("second pause readout jams with PFF clear (%0d, %0d)", jams, jams_pff));
    check(forces == 1 && latch_resets == 1, "one force and one latch reset per sweep");

    for (int r = 0; r < 60; r++) begin
      int j0, d0;
      pulses = 10 + int'($urandom_range(10));
      repeat ($urandom_range(40)) @(posedge clk);
      j0 = jams; d0 = dcps;
      @(negedge clk) trip_req = 1'b1;
      @(posedge clk iff any_cff);
      trip_req = 1'b0;
      #1 t_start = c_edges;
      u0 = ucps;
      @(posedge clk iff dcp);
      #1 t_first_dcp = c_edges;
      check((t_first_dcp - t_start) == 3 && jams - j0 == 1,
            $sformatf("readout %0d: first B-gate pulse on edge %0d, %0d JAMs", r, t_first_dcp - t_start, jams - j0));
      @(posedge clk iff cff_reset);
      t_reset = $time / 10;
      @(posedge clk iff ucp);
      t_next_ucp = $time / 10;
      check(t_next_ucp - t_reset == 4, $sformatf("readout %0d: resume %0d ticks after SZ OR", r, t_next_ucp - t_reset));
      // B-gate pulses: those that reach the digits plus one the closed
      // gates block (see the sequencer's timing notes).
      check(dcps - d0 == pulses + 1, $sformatf("readout %0d: %0d B-gate pulses for %0d", r, dcps - d0, pulses));
      @(negedge clk);
      check(ucps - u0 == 1, "one staircase step from trip to resume");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
