// tb_selected_output: runs readouts of random numbers on random channels and
// checks that the right-hand display follows exactly the readouts of the
// selected channel, and keeps its number through readouts of other channels.
`timescale 1ns/1ps
module tb_selected_output;
  import dvm_pkg::*;
  localparam int NCH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [2:0] sel;
  logic [NCH-1:0] cff;
  logic jam;
  logic [N_DIG-1:0] digit_pulse;
  reading_t display;
  int checks = 0, failures = 0;

  selected_output #(.NCH(NCH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int value, ch, shown, want[N_DIG];
  initial begin
    sel = 3'd5; cff = '0; jam = 0; digit_pulse = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    shown = 0;
    for (int t = 0; t < 80; t++) begin
      value = int'($urandom_range(3999));
      ch = (t % 3 == 0) ? 5 : int'($urandom_range(NCH - 1));
      if (t == 40) sel = 3'd2;
      for (int i = 0; i < N_DIG; i++) begin
        want[i] = (value / (10 ** i)) % 10;
        want[i] = (want[i] == 0) ? 20 : want[i] + 10;
      end
      @(negedge clk) cff[ch] = 1'b1;
      @(negedge clk) jam = 1'b1;
      @(negedge clk) jam = 1'b0;
      for (int p = 1; p <= 20; p++) begin
        @(negedge clk) for (int i = 0; i < N_DIG; i++) digit_pulse[i] = (p <= want[i]);
        @(negedge clk) digit_pulse = '0;
      end
      @(negedge clk) cff[ch] = 1'b0;
      if (ch == int'(sel)) shown = value;
      checks++;
      if (reading_value(display) != shown) begin
        failures++;
        $display("FAIL: selected display %0d, expected %0d", reading_value(display), shown);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
