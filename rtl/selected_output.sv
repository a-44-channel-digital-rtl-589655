// selected_output: the right-hand local display bank ("selected output").
//
// A selector switch routes the Bipco drive of any one channel's gate card to
// a local four-digit Bipco bank, so the reading of any remote bank can be
// repeated at the instrument. The selected channel's CFF opens the local
// bank's gate, which then receives the same reset and digit pulses as the
// remote bank and shows the same number. `sel` is the switch position
// (0 = channel 1); positions beyond the last channel select nothing.
// Routing the gate enable rather than the gated pulses is equivalent and is
// this design's choice.
module selected_output
  import dvm_pkg::*;
#(
  parameter int unsigned NCH = 44
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NCH)-1:0]  sel,
  input  logic [NCH-1:0]          cff,
  input  logic                     jam,
  input  logic [N_DIG-1:0]         digit_pulse,
  output reading_t                 display
);

  logic gate;
  logic nine_unused, drive_unused;

  always_comb gate = (int'(sel) < NCH) ? cff[sel] : 1'b0;

  bipco_bank #(.DIGITS(N_DIG)) u_bank (
    .clk, .rst_n,
    .cff(gate),
    .jam,
    .digit_pulse,
    .display,
    .nine(nine_unused),
    .drive(drive_unused)
  );

endmodule
