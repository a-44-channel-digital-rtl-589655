// tb_up_counter: counts the staircase counter through more than one full
// sweep with irregular up-count pulses and compares it with an integer model:
// the BCD digits, the 4000-count carry (only on the pulse from 3999 to 0000)
// and the step-2000 binary K4.
`timescale 1ns/1ps
module tb_up_counter;
  import dvm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ucp, kc4, k4;
  reading_t count;
  int checks = 0, failures = 0;

  up_counter dut (.clk, .rst_n, .ucp, .count, .kc4, .k4);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model, n_kc4;
  initial begin
    ucp = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model = 0; n_kc4 = 0;
    for (int i = 0; i < 9000; i++) begin
      @(negedge clk);
      checks++;
      if (reading_value(count) != model) begin
        failures++;
        if (failures < 10) $display("FAIL: count %0d, expected %0d", reading_value(count), model);
      end
      checks++;
      if (k4 != (model >= 2000)) failures++;
      ucp = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (kc4 != (ucp && model == 3999)) begin failures++; $display("FAIL: kc4 at %0d", model); end
      if (kc4) n_kc4++;
      if (ucp) model = (model + 1) % 4000;
    end
    checks++;
    if (n_kc4 < 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
