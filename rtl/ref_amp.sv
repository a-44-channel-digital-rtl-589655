// ref_amp: behavioural model of the self-calibrating -10 V reference
// amplifier. Not synthesizable: it stands for an analog integrator.
//
// An operational amplifier with a low-leakage FET input stage and a feedback
// capacitor holds its output between pump events. Two diode pumps move the
// capacitor charge one step at a time: `pump_up` makes the output more
// negative (a larger staircase), `pump_down` less negative. The model keeps
// the output in a real variable, starts it at VREF_INIT and moves it by
// PUMP_STEP volts on the rising edge of each pump input. Leakage drift is
// not modelled. The step size and the start value are this design's
// choices; the required stability (about 1 mV) suggests a step of that order.
module ref_amp #(
  parameter real VREF_INIT = -9.990,
  parameter real PUMP_STEP = 0.001
) (
  input  logic clk,
  input  logic pump_up,
  input  logic pump_down,
  output real  vref
);

  initial vref = VREF_INIT;

  always @(posedge clk) begin
    if (pump_up)        vref <= vref - PUMP_STEP;
    else if (pump_down) vref <= vref + PUMP_STEP;
  end

endmodule
