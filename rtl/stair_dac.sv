// stair_dac: behavioural model of the staircase D-A converter, four ladder
// converter cards (LP-30) and the output amplifier (OA-30). Not synthesizable:
// it stands for analog parts and produces a real voltage.
//
// Each LP-30 card turns one BCD group of the UP counter into a weighted
// current; the card of the K's group accepts only its two binaries. The sum,
// referenced to the -10 V reference voltage `vref`, is buffered by the
// amplifier into a positive staircase of 4000 steps:
//   v_stair = -vref * (1000*K + 100*H + 10*T + U) / 4000 * GAIN
// so with vref = -10 V each step is 2.5 mV and step 4000 would be 10 V. The
// strobe pulse that the instrument adds on top of each step is not modelled
// as a voltage: the comparator latches sample at the strobe instead. `GAIN`
// stands for the amplifier's trim potentiometer (nominally unity overall).
module stair_dac
  import dvm_pkg::*;
#(
  parameter real GAIN = 1.0
) (
  input  reading_t stair,
  input  real      vref,
  output real      v_stair
);

  real steps;

  always_comb begin
    steps   = 1000.0 * real'(stair[DIG_K][1:0]) + 100.0 * real'(stair[DIG_100])
            + 10.0 * real'(stair[DIG_10]) + real'(stair[DIG_1]);
    v_stair = -vref * steps * GAIN / real'(STAIR_STEPS);
  end

endmodule
