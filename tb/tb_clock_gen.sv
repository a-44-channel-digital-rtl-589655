// tb_clock_gen: checks that the instrument clock edges come once per four
// system clock ticks, the anti-clock edge exactly half a period after the
// clock edge, and that the square-wave output is high for the first half.
`timescale 1ns/1ps
module tb_clock_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic c_rise, cbar_rise, c_level;
  int checks = 0, failures = 0;

  clock_gen dut (.clk, .rst_n, .c_rise, .cbar_rise, .c_level);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tick, last_c, last_cbar, n_c;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    last_c = -1; last_cbar = -1; n_c = 0;
    for (tick = 0; tick < 200; tick++) begin
      @(negedge clk);
      checks++;
      if (c_rise && cbar_rise) failures++;
      if (c_rise) begin
        checks++;
        if (last_c >= 0 && tick - last_c != 4) begin failures++; $display("FAIL: C period %0d", tick - last_c); end
        checks++;
        if (!c_level) begin failures++; $display("FAIL: C low at its leading edge"); end
        last_c = tick; n_c++;
      end
      if (cbar_rise) begin
        checks++;
        if (last_c >= 0 && tick - last_c != 2) begin failures++; $display("FAIL: anti-clock not half a period after C"); end
        checks++;
        if (c_level) begin failures++; $display("FAIL: C high at anti-clock edge"); end
        last_cbar = tick;
      end
    end
    checks++;
    if (n_c != 50) begin failures++; $display("FAIL: %0d clock edges in 200 ticks", n_c); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
