// zero_detect: first-zero, second-zero and second-zero-delay flip-flops of one
// digit, with the digit's pulse gate (gate C, D, E or F).
//
// While DFF is set the FZ and SZ flip-flops are held reset. In the readout,
// the first 1->0 transition of the digit's down counter sets FZ, the second
// resets it again, and that falling edge of FZ sets SZ. On the next anti-clock
// edge SZD copies SZ; SZD closes the digit gate, so the gate passes B-gate
// pulses (`dcp`) to the Bipcos until the pulse that produced the second zero.
// A digit jammed with d (1..9) therefore passes d+10 pulses, one jammed with 0
// passes 20: in both cases the decade Bipco ends on d. SZD being a D-type
// flip-flop clocked by the anti-clock is this design's reading of
// "SZ . C-bar -> SZD"; its clearing follows SZ one half period after DFF.
module zero_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic dff,        // main delay flip-flop, holds FZ and SZ reset
  input  logic cbar_rise,  // anti-clock edge enable
  input  logic zero,       // 1->0 pulse from the down counter
  input  logic dcp,        // B-gate pulse
  output logic fz,
  output logic sz,
  output logic szd,
  output logic gate_pulse  // C/D/E/F gate output pulse
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fz <= 1'b0;
      sz <= 1'b0;
    end else if (dff) begin
      fz <= 1'b0;
      sz <= 1'b0;
    end else if (zero) begin
      fz <= ~fz;
      if (fz) sz <= 1'b1;   // FZ falling edge sets SZ
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         szd <= 1'b0;
    else if (cbar_rise) szd <= sz;
  end

  always_comb gate_pulse = dcp && !szd;

endmodule
