// down_counter: one jammable BCD down-counter digit of the readout logic.
//
// During a readout the JAM pulse copies the matching UP-counter digit into
// this counter. Each B-gate pulse (down-count pulse, DCP) then counts it
// backwards 9..0 with wrap from 0 to 9. When a pulse takes the counter from
// 1 to 0 it emits `zero` in the same tick, which drives the first/second zero
// flip-flops. Interface: `jam` and `dcp` are one-tick enables (jam wins);
// `zero` is combinational from `dcp` and the current state.
module down_counter
  import dvm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic jam,
  input  bcd_t jam_value,
  input  logic dcp,
  output bcd_t count,
  output logic zero
);

  always_comb zero = dcp && !jam && (count == 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= 4'd0;
    else if (jam)     count <= jam_value;
    else if (dcp)     count <= (count == 4'd0) ? 4'd9 : count - 4'd1;
  end

endmodule
