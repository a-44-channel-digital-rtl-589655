// comparator_latch: the logic of one comparator card, the comparator latch
// circuit (CLC) and the comparator flip-flop (CFF).
//
// The analog comparator output `cmp` is taken at the staircase strobe in the
// middle of each step. When it is high and the latch is still enabled, the
// CLC latches, which disables the comparator for the rest of the measuring
// cycle, and its transition sets the CFF. A force pulse (end of sweep)
// latches every CLC that has not latched yet, with the same effect. The CFF
// is reset at the end of its readout by `cff_reset`; the CLC is re-enabled
// only by the latch-reset pulse at the start of the next measuring cycle.
// The CFF opens this channel's Bipco gate and, through the wired OR of all
// channels, starts a readout. Sampling `cmp` at the strobe tick rather than
// reacting to any comparator edge is this design's choice; the latch and
// flip-flop roles follow the instrument.
module comparator_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic cmp,           // analog comparator: staircase above input
  input  logic stair_strobe,  // SFF . STR
  input  logic force_cmp,
  input  logic latch_reset,
  input  logic cff_reset,
  output logic clc,
  output logic cff
);

  logic trip;

  always_comb trip = !clc && ((stair_strobe && cmp) || force_cmp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clc <= 1'b0;
      cff <= 1'b0;
    end else begin
      if (latch_reset) clc <= 1'b0;
      else if (trip)   clc <= 1'b1;

      if (trip)           cff <= 1'b1;
      else if (cff_reset) cff <= 1'b0;
    end
  end

endmodule
