// ref_pump_logic: the Z flip-flop and the two diode-pump gates of the
// self-calibrating -10 V staircase reference.
//
// Comparator 1 permanently measures an internal -5.000 V reference, which a
// staircase of the right amplitude reaches exactly at step 2000. `k4` is the
// UP-counter binary that goes high at step 2000; ZFF is set by that rising
// edge and reset by the next up-count pulse (step 2001). When comparator 1's
// flip-flop (`cff_ref`) sets:
//   k4 high and ZFF reset (step 2001 or later)  -> staircase too low, pump up
//   k4 low  and ZFF reset (step 1999 or earlier) -> staircase too high, pump down
//   ZFF set (exactly step 2000)                  -> no pumping
// Pump-down gate = not K4 . CFF . not Z; pump-up gate = K4 . CFF . not Z.
// Each gate drives its diode pump once per measuring cycle: the outputs are
// one-tick pulses on the rising edge of the gate. At most one of them can
// pulse. The gate equations follow the instrument's reference waveforms; the
// one-pulse-per-gate-edge form is this design's choice.
module ref_pump_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic k4,
  input  logic ucp,
  input  logic cff_ref,
  output logic zff,
  output logic pump_up,
  output logic pump_down
);

  logic k4_q, up_q, down_q;
  logic up_gate, down_gate;

  always_comb begin
    up_gate   =  k4 && cff_ref && !zff;
    down_gate = !k4 && cff_ref && !zff;
    pump_up   = up_gate && !up_q;
    pump_down = down_gate && !down_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k4_q   <= 1'b0;
      zff    <= 1'b0;
      up_q   <= 1'b0;
      down_q <= 1'b0;
    end else begin
      k4_q   <= k4;
      up_q   <= up_gate;
      down_q <= down_gate;
      if (k4 && !k4_q)     zff <= 1'b1;
      else if (k4 && ucp)  zff <= 1'b0;
    end
  end

endmodule
