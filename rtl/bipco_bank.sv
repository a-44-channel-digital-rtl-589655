// bipco_bank: one display bank of Bipco counting Nixie drivers and its gate.
//
// A Bipco is a decade counter that drives one Nixie tube. The bank's gate is
// opened by the channel's comparator flip-flop (CFF). While the gate is open
// the JAM pulse resets every Bipco of the bank to 0, and each digit then
// counts the serial pulses of its own digit gate (C = 1's, D = 10's,
// E = 100's, F = K's). The readout logic sends d+10 pulses for a digit d
// (20 for 0), so each Bipco ends on its digit. While the gate is closed the
// bank keeps its numerals. `nine` is the AND of the Bipcos' 9 outputs, which
// is true while every digit of the bank shows 9; the ten-pulse detector
// checks it. `drive` is the bank's current-driver pulse: the OR of the
// four gated digit pulses, one pulse per clock period in which any digit of
// the bank counts. DIGITS sets the number of tubes (3 or 4); missing high digits
// read 0. Gating the reset with the CFF is this design's choice, made so
// that banks already read keep their numbers through later readouts.
module bipco_bank
  import dvm_pkg::*;
#(
  parameter int unsigned DIGITS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cff,          // bank gate enable
  input  logic                 jam,          // Bipco reset pulse
  input  logic [N_DIG-1:0]     digit_pulse,  // C, D, E, F gate pulses
  output reading_t             display,
  output logic                 nine,
  output logic                 drive         // bank current-driver pulse
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      display <= '0;
    end else if (cff) begin
      for (int i = 0; i < N_DIG; i++) begin
        if (i < DIGITS) begin
          if (jam)                 display[i] <= 4'd0;
          else if (digit_pulse[i]) display[i] <= (display[i] == 4'd9) ? 4'd0 : display[i] + 4'd1;
        end else begin
          display[i] <= 4'd0;
        end
      end
    end
  end

  always_comb begin
    drive = 1'b0;
    for (int i = 0; i < N_DIG; i++)
      if (i < DIGITS && digit_pulse[i]) drive = cff;
  end

  always_comb begin
    nine = 1'b1;
    for (int i = 0; i < N_DIG; i++)
      if (i < DIGITS && display[i] != 4'd9) nine = 1'b0;
  end

endmodule
