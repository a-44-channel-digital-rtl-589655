// ten_pulse_detector: continuous check that every active Bipco bank counts
// correctly, with a manually reset tilt (failure) flip-flop.
//
// Every digit of a read bank receives at least ten pulses, so a correctly
// counting bank, reset to 0 by JAM, shows 9 on all of its tubes at once
// after the ninth B-gate pulse. The ten pulse counter (TPC) counts the
// B-gate pulses after each JAM and stops after the tenth; its window output
// is true between the ninth and the tenth pulse. On the anti-clock edge inside
// that window every bank whose CFF is set must report its AND of 9's
// (`nine`); a bank that does not sets the tilt flip-flop, which holds until
// `tilt_reset` (the front-panel push button). The window and the check
// follow the instrument's ten-pulse waveforms (a fault shows while the TPC
// window is active and the 9's pulse is absent); checking each bank against
// its own CFF, and the exact window position, are this design's choices.
module ten_pulse_detector #(
  parameter int unsigned N_CH = 44
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            jam,
  input  logic            dcp,
  input  logic            cbar_rise,
  input  logic [N_CH-1:0] cff,
  input  logic [N_CH-1:0] nine,
  input  logic            tilt_reset,
  output logic [3:0]      tpc,
  output logic            window,
  output logic            tilt
);

  logic stop;
  logic mismatch;

  always_comb begin
    window   = (tpc == 4'd9) && !stop;
    mismatch = cbar_rise && window && (|(cff & ~nine));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tpc  <= 4'd0;
      stop <= 1'b0;
      tilt <= 1'b0;
    end else begin
      if (jam) begin
        tpc  <= 4'd0;
        stop <= 1'b0;
      end else if (dcp && !stop) begin
        if (tpc == 4'd9) begin
          tpc  <= 4'd0;
          stop <= 1'b1;
        end else begin
          tpc <= tpc + 4'd1;
        end
      end

      if (tilt_reset)    tilt <= 1'b0;
      else if (mismatch) tilt <= 1'b1;
    end
  end

endmodule
