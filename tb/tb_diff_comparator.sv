// tb_diff_comparator: checks the comparator model at and around the trip
// point for negative, zero and positive inputs.
`timescale 1ns/1ps
module tb_diff_comparator;
  real v_stair;
  logic signed [31:0] vin_uv;
  logic cmp;
  int checks = 0, failures = 0;

  diff_comparator dut (.*);

  task automatic t(input real vs, input int signed uv, input bit want);
    v_stair = vs; vin_uv = uv;
    #1;
    checks++;
    if (cmp != want) begin
      failures++;
      $display("FAIL: stair %f V, input %0d uV: %0b", vs, uv, cmp);
    end
  endtask

  initial begin
    t(0.0, 0, 1'b1);
    t(0.0, 1_000_000, 1'b1);
    t(0.0, -1, 1'b0);
    t(5.0, -5_000_000, 1'b1);
    t(4.9975, -5_000_000, 1'b0);
    t(9.9975, -9_998_750, 1'b0);
    t(10.0, -9_998_750, 1'b1);
    t(2.5, -10_000_000, 1'b0);
    for (int i = 0; i < 200; i++) begin
      int signed uv;
      real vs;
      uv = -int'($urandom_range(10_000_000));
      vs = real'($urandom_range(4000)) * 0.0025;
      t(vs, uv, (vs * 1.0e6 + real'(uv)) >= 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
