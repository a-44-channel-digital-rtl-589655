// readout_control: the clock-logic and strobe-logic cards, which sequence the
// staircase advance, the readout cycles and the end-of-sweep pause.
//
// Flip-flops (names as on the instrument):
//   RFF readout   - set when any comparator flip-flop (CFF) sets or PDC
//                   changes state; closes the A gate (no staircase steps).
//   DFF delay     - set with RFF; holds the zero flip-flops reset; reset by
//                   the falling edge of YFF. RFF and not DFF opens the B gate.
//   XFF, YFF      - special delays: DFF and the anti-clock edge set XFF (and
//                   reset SFF); the rising edge of XFF sets YFF; the next C
//                   edge resets YFF, whose falling edge resets DFF.
//   SFF strobe    - enables the mid-step staircase strobe; its falling edge
//                   is the JAM pulse (reset Bipcos, load the down counters).
//   PFF pause     - set by the 4000-count carry, reset by the second SZ-OR
//                   transition; its falling edge is the latch-reset pulse.
//   PDC pause delay - follows PFF on the strobe edge; its rising edge forces
//                   all unlatched comparators, and both of its edges start a
//                   readout cycle.
// Gates: UCP (A gate) = not RFF, not PDC, on C; DCP (B gate) = RFF, not DFF,
// on C. SZ OR: when all four second-zero-delay flip-flops are set, the first
// C edge resets RFF, XFF and every CFF (`cff_reset`), and the following
// anti-clock edge sets SFF and resets PFF.
// Timing: one C period is four `clk` ticks (see clock_gen); `c_rise` and
// `cbar_rise` are its edge enables. Edge-triggered actions of the discrete
// logic are modelled as one-tick pulses from registered edge detection, so
// a chained set (CFF -> RFF -> ...) takes one tick per link.
// The flip-flop set and the order of events follow the instrument's logic
// equations; the tick-level timing, the synchronous reset values and the
// exact polarity of equations whose bars are ambiguous are this design's
// reading and are listed in its documentation. Assertions at the end state
// the sequencing rules.
module readout_control (
  input  logic clk,
  input  logic rst_n,
  input  logic c_rise,
  input  logic cbar_rise,
  input  logic any_cff,     // wired OR of all CFFs
  input  logic kc4,         // 4000-count carry from the UP counter
  input  logic szd_all,     // all four SZD flip-flops set
  output logic ucp,         // A-gate pulse: advance the staircase
  output logic dcp,         // B-gate pulse: down-count / Bipco count
  output logic stair_strobe,// SFF . STR: staircase strobe to the comparators
  output logic jam,         // JAM pulse: load down counters, reset Bipcos
  output logic force_cmp,   // force pulse: flip all unlatched comparators
  output logic latch_reset, // reset all comparator latch circuits
  output logic cff_reset,   // reset all comparator flip-flops
  output logic rff,
  output logic dff,
  output logic xff,
  output logic yff,
  output logic sff,
  output logic pff,
  output logic pdc
);

  logic sff_q, xff_q, yff_q, pff_q, pdc_q;
  logic szor_armed;
  logic szor1, szor2;
  logic pdc_edge, start;

  always_comb begin
    ucp          = c_rise && !rff && !pdc;
    dcp          = c_rise && rff && !dff;
    stair_strobe = cbar_rise && sff;
    szor1        = c_rise && rff && !dff && szd_all;
    szor2        = cbar_rise && szor_armed;
    cff_reset    = szor1 || kc4;
    jam          = sff_q && !sff;
    force_cmp    = pdc && !pdc_q;
    latch_reset  = pff_q && !pff;
    pdc_edge     = pdc != pdc_q;
    start        = !rff && (any_cff || pdc_edge);
  end

  // Edge-detect registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sff_q <= 1'b1;
      xff_q <= 1'b0;
      yff_q <= 1'b0;
      pff_q <= 1'b0;
      pdc_q <= 1'b0;
    end else begin
      sff_q <= sff;
      xff_q <= xff;
      yff_q <= yff;
      pff_q <= pff;
      pdc_q <= pdc;
    end
  end

  // RFF and DFF.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rff <= 1'b0;
      dff <= 1'b0;
    end else begin
      if (cff_reset)  rff <= 1'b0;
      else if (start) rff <= 1'b1;

      if (start)                dff <= 1'b1;
      else if (yff_q && !yff)   dff <= 1'b0;
    end
  end

  // XFF, YFF, SFF.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xff <= 1'b0;
      yff <= 1'b0;
      sff <= 1'b1;
    end else begin
      if (cff_reset)              xff <= 1'b0;
      else if (dff && cbar_rise)  xff <= 1'b1;

      if (c_rise)                 yff <= 1'b0;
      else if (xff && !xff_q)     yff <= 1'b1;

      if (dff && cbar_rise)       sff <= 1'b0;
      else if (szor2)             sff <= 1'b1;
    end
  end

  // SZ OR sequencing, PFF and PDC.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      szor_armed <= 1'b0;
      pff        <= 1'b0;
      pdc        <= 1'b0;
    end else begin
      if (szor1)      szor_armed <= 1'b1;
      else if (szor2) szor_armed <= 1'b0;

      if (kc4)        pff <= 1'b1;
      else if (szor2) pff <= 1'b0;

      if (cbar_rise)  pdc <= pff;
    end
  end

  // Rules of the sequence: the staircase never moves during a readout, the
  // A and B gates are never open together, and JAM only happens inside a
  // readout, before the B gate opens.
  a_no_step_in_readout: assert property (@(posedge clk) disable iff (!rst_n) ucp |-> !rff);
  a_gates_exclusive:    assert property (@(posedge clk) disable iff (!rst_n) !(ucp && dcp));
  a_jam_in_readout:     assert property (@(posedge clk) disable iff (!rst_n) jam |-> (rff && dff));

endmodule
