// tb_input_select: walks the input selector through every position and
// checks the voltage handed to comparator 2: channel lines 3..44, the test
// voltage at T, the test jack at J, and nothing at positions 1, 2 and any
// unused code.
`timescale 1ns/1ps
module tb_input_select;
  localparam int NCH = 44;
  logic [6:0] sel;
  logic signed [31:0] vin_uv [NCH];
  logic signed [31:0] test_uv, jack_uv, vout_uv, want;
  int checks = 0, failures = 0;

  input_select #(.N_CH(NCH)) dut (.*);

  initial begin
    for (int n = 0; n < NCH; n++) vin_uv[n] = -32'sd1000 * (n + 1) - 32'sd7;
    test_uv = -32'sd4_321_000;
    jack_uv = -32'sd1_111_111;
    for (int s = 0; s < 128; s++) begin
      sel = 7'(s);
      #1;
      want = 0;
      if (s >= 2 && s < NCH) want = vin_uv[s];
      if (s == NCH) want = test_uv;
      if (s == NCH + 1) want = jack_uv;
      checks++;
      if (vout_uv != want) begin
        failures++;
        $display("FAIL: position %0d gives %0d, expected %0d", s, vout_uv, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
