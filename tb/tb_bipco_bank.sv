// tb_bipco_bank: sends each bank the serial pulse trains of a readout for
// random four-digit numbers (d+10 pulses per digit d, 20 for 0, all trains
// starting together) and checks the displayed number, the number of driver pulses (the longest
// train), the AND of 9's
// (true after the ninth pulse, and whenever all digits show 9) and that a closed gate freezes the
// display against further resets and pulses. A three-digit bank is checked
// too.
`timescale 1ns/1ps
module tb_bipco_bank;
  import dvm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cff, jam;
  logic [N_DIG-1:0] digit_pulse;
  reading_t display, display3;
  logic nine, nine3, drive, drive3;
  int drives, drives3;
  int checks = 0, failures = 0;

  bipco_bank dut (.clk, .rst_n, .cff, .jam, .digit_pulse, .display, .nine, .drive);
  bipco_bank #(.DIGITS(3)) dut3 (.clk, .rst_n, .cff, .jam, .digit_pulse, .display(display3), .nine(nine3), .drive(drive3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (drive)  drives++;
    if (drive3) drives3++;
  end

  int value, dg[N_DIG], want[N_DIG], longest, longest3;
  task automatic readout(input int v);
    drives = 0; drives3 = 0; longest = 0; longest3 = 0;
    for (int i = 0; i < N_DIG; i++) begin
      dg[i] = (v / (10 ** i)) % 10;
      want[i] = (dg[i] == 0) ? 20 : dg[i] + 10;
      if (want[i] > longest) longest = want[i];
      if (i < 3 && want[i] > longest3) longest3 = want[i];
    end
    @(negedge clk) jam = 1'b1;
    @(negedge clk) jam = 1'b0;
    for (int p = 1; p <= 20; p++) begin
      @(negedge clk);
      for (int i = 0; i < N_DIG; i++) digit_pulse[i] = (p <= want[i]);
      @(negedge clk) digit_pulse = '0;
      if (cff) begin
        bit all9;
        all9 = 1'b1;
        for (int i = 0; i < N_DIG; i++) if (((p < want[i]) ? p : want[i]) % 10 != 9) all9 = 1'b0;
        check(nine == all9, $sformatf("AND of 9's after pulse %0d of %0d", p, v));
        if (p == 9) check(nine, "every digit shows 9 after the ninth pulse");
      end
    end
    @(negedge clk);
    check(drives == (cff ? longest : 0), $sformatf("%0d driver pulses for %0d", drives, v));
    check(drives3 == (cff ? longest3 : 0), "driver pulses of the three-digit bank");
  endtask

  initial begin
    cff = 0; jam = 0; digit_pulse = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) cff = 1'b1;
    for (int t = 0; t < 60; t++) begin
      value = (t == 0) ? 0 : (t == 1) ? 8000 : (t == 2) ? 3999 : int'($urandom_range(3999));
      readout(value);
      check(reading_value(display) == value, $sformatf("bank shows %0d, expected %0d", reading_value(display), value));
      check(reading_value(display3) == value % 1000, "three-digit bank shows the low digits");
    end
    value = 1234;
    readout(value);
    @(negedge clk) cff = 1'b0;
    readout(777);
    check(reading_value(display) == 1234, "closed gate freezes the display");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
