// tb_down_counter: jams every digit value into the down counter, counts it
// down through two zeros and checks the count and the 1->0 pulses against a
// model: the first zero comes after d pulses (10 for d = 0), the second ten
// pulses later.
`timescale 1ns/1ps
module tb_down_counter;
  import dvm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic jam, dcp, zero;
  bcd_t jam_value, count;
  int checks = 0, failures = 0;

  down_counter dut (.clk, .rst_n, .jam, .jam_value, .dcp, .count, .zero);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model, zeros, first_at, second_at;
  initial begin
    jam = 0; dcp = 0; jam_value = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 10; d++) begin
      @(negedge clk); jam = 1; jam_value = bcd_t'(d);
      @(negedge clk); jam = 0;
      checks++;
      if (count != bcd_t'(d)) begin failures++; $display("FAIL: jam %0d gave %0d", d, count); end
      model = d; zeros = 0; first_at = 0; second_at = 0;
      for (int p = 1; p <= 25; p++) begin
        dcp = 1; #1;
        if (zero) begin
          zeros++;
          if (zeros == 1) first_at = p;
          if (zeros == 2) second_at = p;
        end
        @(negedge clk); dcp = 0;
        model = (model == 0) ? 9 : model - 1;
        checks++;
        if (count != bcd_t'(model)) failures++;
        @(negedge clk);
      end
      checks++;
      if (first_at != ((d == 0) ? 10 : d)) begin failures++; $display("FAIL: d=%0d first zero at %0d", d, first_at); end
      checks++;
      if (second_at != first_at + 10) begin failures++; $display("FAIL: d=%0d second zero at %0d", d, second_at); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
