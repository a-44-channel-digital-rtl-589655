// dvm_pkg: shared constants and types of the 44-channel staircase voltmeter.
//
// The voltmeter counts a 4000-step staircase in BCD: three decades (1's,
// 10's, 100's) and a two-bit thousands group (K's, 0..3). A reading is four
// BCD digits, least significant first in every array of this design
// (index 0 = 1's, 1 = 10's, 2 = 100's, 3 = K's). The channel count, the
// staircase length and the digit grouping follow the instrument; the digit
// ordering and type names are choices of this implementation.
package dvm_pkg;

  // Number of comparator channels (one per input line).
  localparam int unsigned N_CH = 44;

  // Digits per reading: 1's, 10's, 100's and K's.
  localparam int unsigned N_DIG = 4;

  // Staircase length: 4000 steps, 0000..3999.
  localparam int unsigned STAIR_STEPS = 4000;

  // One BCD digit.
  typedef logic [3:0] bcd_t;

  // A four-digit reading, index 0 = 1's digit.
  typedef bcd_t [N_DIG-1:0] reading_t;

  // Digit positions.
  localparam int unsigned DIG_1   = 0;
  localparam int unsigned DIG_10  = 1;
  localparam int unsigned DIG_100 = 2;
  localparam int unsigned DIG_K   = 3;

  // The thousands digit jammed into the down counters during the pause
  // (forced) readout, which makes every unused bank show 8000.
  localparam bcd_t OVER_RANGE_K = 4'd8;

  // Convert a reading to a plain integer (for checks and displays).
  function automatic int unsigned reading_value(reading_t r);
    return 1000 * int'(r[DIG_K]) + 100 * int'(r[DIG_100]) + 10 * int'(r[DIG_10]) + int'(r[DIG_1]);
  endfunction

endpackage
