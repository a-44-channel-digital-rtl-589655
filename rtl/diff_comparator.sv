// diff_comparator: behavioural model of one differential input comparator.
// Not synthesizable: it stands for an analog circuit.
//
// One input is the positive staircase, the other the unknown input voltage,
// which is negative (0 to -10 V) in normal use and is carried as a signed
// microvolt code. The output goes high when the sum of the two is at or
// above zero, that is when the staircase has reached the magnitude of the
// input. A zero or positive input therefore trips at step 0000. Comparator
// calibration offsets are taken as zero.
module diff_comparator (
  input  real                v_stair,
  input  logic signed [31:0] vin_uv,
  output logic               cmp
);

  always_comb cmp = (v_stair * 1.0e6 + real'(vin_uv)) >= 0.0;

endmodule
