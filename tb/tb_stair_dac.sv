// tb_stair_dac: checks the staircase voltage of every step against
// 2.5 mV per step at a -10 V reference, and the scaling with the reference.
`timescale 1ns/1ps
module tb_stair_dac;
  import dvm_pkg::*;
  reading_t stair;
  real vref, v_stair, want;
  int checks = 0, failures = 0;

  stair_dac dut (.*);

  initial begin
    for (int r = 0; r < 2; r++) begin
      vref = (r == 0) ? -10.0 : -9.5;
      for (int k = 0; k < 4000; k++) begin
        stair[DIG_1]   = bcd_t'(k % 10);
        stair[DIG_10]  = bcd_t'((k / 10) % 10);
        stair[DIG_100] = bcd_t'((k / 100) % 10);
        stair[DIG_K]   = bcd_t'(k / 1000);
        #1;
        want = real'(k) * (-vref) / 4000.0;
        checks++;
        if (v_stair - want > 1.0e-9 || want - v_stair > 1.0e-9) begin
          failures++;
          if (failures < 10) $display("FAIL: step %0d gives %f V, expected %f V", k, v_stair, want);
        end
      end
    end
    checks++;
    stair = {4'd2, 4'd0, 4'd0, 4'd0};
    vref = -10.0;
    #1 if (v_stair != 5.0) begin failures++; $display("FAIL: step 2000 is not 5.000 V"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
