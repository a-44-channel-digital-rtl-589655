// input_select: the front-panel "Input Selector" that feeds comparator 2.
//
// Comparator 2 is the local monitor channel: the selector connects it to the
// input line of any other channel, or to one of two test sources: the "T"
// position (a locally adjusted test voltage) and the "J" position (the
// external test jack). Switch positions 1 and 2 belong to the two special
// channels and connect nothing. Voltages are carried as signed microvolt
// codes. Position encoding: 0..N_CH-1 = channel 1..N_CH, N_CH = T,
// N_CH+1 = J; any other code connects nothing (0 V). The switch positions
// follow the front panel; the encoding and the microvolt representation are
// this design's choices.
module input_select #(
  parameter int unsigned N_CH = 44
) (
  input  logic [6:0]         sel,
  input  logic signed [31:0] vin_uv [N_CH],
  input  logic signed [31:0] test_uv,
  input  logic signed [31:0] jack_uv,
  output logic signed [31:0] vout_uv
);

  always_comb begin
    vout_uv = '0;
    for (int i = 2; i < N_CH; i++)
      if (int'(sel) == i) vout_uv = vin_uv[i];
    if (int'(sel) == N_CH)     vout_uv = test_uv;
    if (int'(sel) == N_CH + 1) vout_uv = jack_uv;
  end

endmodule
