// clock_gen: the instrument clock C, its complement (anti-clock) and the
// strobe timing, derived from a faster system clock.
//
// The instrument works on both edges of its ~25 kHz clock: staircase steps
// and count pulses start on the leading edge of C, while the strobe in the
// middle of each staircase step and several delay flip-flops act on the
// leading edge of the anti-clock (C-bar). This model divides one period of C
// into four ticks of the system clock `clk` and issues one-tick enables:
//   tick 0: c_rise    (leading edge of C, trailing edge of C-bar)
//   tick 2: cbar_rise (leading edge of C-bar, mid-step strobe STR)
// Ticks 1 and 3 give the chained flip-flops of the readout logic room to
// settle between the two edges, which the discrete logic did with gate
// delays. `c_level` is the square wave of C (high for ticks 0 and 1), brought
// out as the oscilloscope trigger. Reset starts the count at tick 2, so the
// first event after reset is the strobe of staircase step 0000. The four-tick division is a choice of this
// implementation; the two-edge scheme follows the instrument.
module clock_gen (
  input  logic clk,
  input  logic rst_n,
  output logic c_rise,
  output logic cbar_rise,
  output logic c_level
);

  logic [1:0] tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick <= 2'd2;
    else        tick <= tick + 2'd1;
  end

  always_comb begin
    c_rise    = (tick == 2'd0);
    cbar_rise = (tick == 2'd2);
    c_level   = ~tick[1];
  end

endmodule
