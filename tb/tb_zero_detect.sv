// tb_zero_detect: drives one digit's zero detector with B-gate pulses on the
// instrument clock edge and 1->0 pulses from a down-counter model, for every
// digit value. The digit gate must pass d+10 pulses for d = 1..9 and 20 for
// d = 0, SZ must set on the second zero, and DFF must clear FZ and SZ.
`timescale 1ns/1ps
module tb_zero_detect;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic dff, cbar_rise, zero, dcp, fz, sz, szd, gate_pulse;
  int checks = 0, failures = 0;

  zero_detect dut (.clk, .rst_n, .dff, .cbar_rise, .zero, .dcp, .fz, .sz, .szd, .gate_pulse);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model, passed, want;
  initial begin
    dff = 0; cbar_rise = 0; zero = 0; dcp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 10; d++) begin
      // Readout start: DFF clears the detector for two clock periods.
      @(negedge clk); dff = 1;
      repeat (8) begin
        @(negedge clk); cbar_rise = ~cbar_rise;
      end
      @(negedge clk); dff = 0; cbar_rise = 0;
      checks++;
      if (fz || sz || szd) begin failures++; $display("FAIL: DFF did not clear d=%0d", d); end
      model = d; passed = 0;
      for (int p = 0; p < 30; p++) begin
        // C edge: B-gate pulse.
        @(negedge clk); dcp = 1; zero = (model == 1);
        #1 if (gate_pulse) passed++;
        @(negedge clk); dcp = 0; zero = 0;
        model = (model == 0) ? 9 : model - 1;
        // Anti-clock edge.
        @(negedge clk); cbar_rise = 1;
        @(negedge clk); cbar_rise = 0;
      end
      want = (d == 0) ? 20 : d + 10;
      checks++;
      if (passed != want) begin failures++; $display("FAIL: d=%0d passed %0d pulses, expected %0d", d, passed, want); end
      checks++;
      if (!sz || !szd) begin failures++; $display("FAIL: second zero not flagged d=%0d", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
