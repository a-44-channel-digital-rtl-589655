// tb_ten_pulse_detector: drives the detector with readouts of 25 B-gate
// pulses for two active banks and one idle bank. The bank's AND of 9's is
// modelled as a pulse after the Nth B-gate pulse: N = 9 is correct counting
// (no tilt), N = 8 and N = 10 are early and late banks (tilt), a missing 9's
// pulse on an idle bank must not tilt. Also checks that the tilt flip-flop
// holds until reset and that TPC stops after ten pulses. A random phase
// then runs 300 readouts with a random set of open banks and a random 9's
// position per bank (mostly correct, sometimes early, late or missing) and
// expects tilt exactly when an open bank's 9's pulse is not at pulse nine.
`timescale 1ns/1ps
module tb_ten_pulse_detector;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic jam, dcp, cbar_rise, tilt_reset, window, tilt;
  logic [N-1:0] cff, nine;
  logic [3:0] tpc;
  int checks = 0, failures = 0;

  ten_pulse_detector #(.N_CH(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int windows;
  // One readout; bank b shows 9 after nine_at[b] pulses.
  task automatic readout(input int n0, input int n1, input int n2 = 0);
    int cnt;
    cnt = 0; windows = 0;
    @(negedge clk) jam = 1'b1;
    @(negedge clk) jam = 1'b0;
    for (int p = 0; p < 25; p++) begin
      @(negedge clk) dcp = 1'b1;
      @(negedge clk) dcp = 1'b0; cnt++;
      nine[0] = (cnt == n0);
      nine[1] = (cnt == n1);
      nine[2] = (cnt == n2);
      @(negedge clk) cbar_rise = 1'b1;
      #1 if (window) windows++;
      @(negedge clk) cbar_rise = 1'b0;
    end
    nine = '0;
  endtask

  initial begin
    jam = 0; dcp = 0; cbar_rise = 0; tilt_reset = 0; cff = 3'b011; nine = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    readout(9, 9);
    check(!tilt, "correct counting: no tilt");
    check(windows == 1, $sformatf("one TPC window per readout (%0d)", windows));
    check(tpc == 4'd0, "TPC stopped after ten pulses");
    readout(8, 9);
    check(tilt, "early 9's: tilt");
    readout(9, 9);
    check(tilt, "tilt holds until reset");
    @(negedge clk) tilt_reset = 1'b1;
    @(negedge clk) tilt_reset = 1'b0;
    check(!tilt, "tilt reset");
    readout(9, 10);
    check(tilt, "late 9's: tilt");
    @(negedge clk) tilt_reset = 1'b1;
    @(negedge clk) tilt_reset = 1'b0;
    cff = 3'b001;
    readout(9, 0);
    check(!tilt, "idle bank is not checked");

    for (int r = 0; r < 300; r++) begin
      int at [N];
      bit want;
      cff = N'($urandom_range((1 << N) - 1));
      want = 1'b0;
      for (int b = 0; b < N; b++) begin
        case ($urandom_range(7))
          0:       at[b] = 8;
          1:       at[b] = 10;
          2:       at[b] = 0;     // no 9's pulse at all
          default: at[b] = 9;
        endcase
        if (cff[b] && at[b] != 9) want = 1'b1;
      end
      readout(at[0], at[1], at[2]);
      check(tilt == want, $sformatf("random readout %0d: cff=%b nines at %0d/%0d/%0d, tilt=%0b",
                                    r, cff, at[0], at[1], at[2], tilt));
      check(windows == 1 && tpc == 4'd0, "one window, TPC stopped");
      @(negedge clk) tilt_reset = 1'b1;
      @(negedge clk) tilt_reset = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
