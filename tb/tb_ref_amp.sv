// tb_ref_amp: pumps the reference model up and down and checks that the
// output holds between pumps and moves by one pump step per pump pulse.
`timescale 1ns/1ps
module tb_ref_amp;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic pump_up, pump_down;
  real vref, want;
  int checks = 0, failures = 0;

  ref_amp #(.VREF_INIT(-9.990), .PUMP_STEP(0.001)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pump_up = 0; pump_down = 0;
    want = -9.990;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      pump_up = 0; pump_down = 0;
      case ($urandom_range(3))
        0: begin pump_up = 1; want -= 0.001; end
        1: begin pump_down = 1; want += 0.001; end
        default: ;
      endcase
      @(negedge clk);
      pump_up = 0; pump_down = 0;
      checks++;
      if (vref - want > 1.0e-9 || want - vref > 1.0e-9) begin
        failures++;
        $display("FAIL: vref %f, expected %f", vref, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
