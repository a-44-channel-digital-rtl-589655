// up_counter: the staircase counter (UP 1's, UP 10's, UP 100's, UP K's).
//
// Three BCD decades and a two-binary thousands group are chained so that the
// counter advances one step per up-count pulse (UCP, the A-gate output) from
// 0000 to 3999 and then returns to 0000. The four groups drive the D-A
// converters that build the staircase. On the pulse that takes the K's group
// from 3 to 0 the counter emits `kc4` (the "4000 count" output that sets the
// pause flip-flop). `k4` is the 2^1 binary of the K's group: it goes high
// exactly at step 2000 and is the reference-step signal of the self-calibrating
// reference. Interface: `ucp` is a one-tick enable; all outputs are registered
// except `kc4`, which is valid in the same tick as the `ucp` that wraps.
module up_counter
  import dvm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ucp,
  output reading_t count,
  output logic     kc4,
  output logic     k4
);

  logic at_top;

  always_comb begin
    at_top = (count[DIG_1] == 4'd9) && (count[DIG_10] == 4'd9) &&
             (count[DIG_100] == 4'd9) && (count[DIG_K] == 4'd3);
    kc4    = ucp && at_top;
    k4     = count[DIG_K][1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (ucp) begin
      // Each decade rolls over 9 -> 0 and carries into the next group; the
      // K's group holds only two binaries and rolls over 3 -> 0.
      if (count[DIG_1] != 4'd9) begin
        count[DIG_1] <= count[DIG_1] + 4'd1;
      end else begin
        count[DIG_1] <= 4'd0;
        if (count[DIG_10] != 4'd9) begin
          count[DIG_10] <= count[DIG_10] + 4'd1;
        end else begin
          count[DIG_10] <= 4'd0;
          if (count[DIG_100] != 4'd9) begin
            count[DIG_100] <= count[DIG_100] + 4'd1;
          end else begin
            count[DIG_100] <= 4'd0;
            count[DIG_K]   <= {2'b00, count[DIG_K][1:0] + 2'd1};
          end
        end
      end
    end
  end

endmodule
