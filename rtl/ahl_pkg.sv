// Shared types and helpers of the aging-aware variable-latency multiplier.
//
// bypass_e selects which bypassing array multiplier sits in the datapath:
// the column-bypassing array (rows of adders skipped column-wise when a
// multiplicand bit is 0) or the row-bypassing array (a whole adder row
// skipped when a multiplier bit is 0). The adaptive hold logic then counts
// zeros in the operand that controls the bypass: the multiplicand for the
// column version, the multiplier for the row version.
package ahl_pkg;

  typedef enum logic {
    BYPASS_COLUMN = 1'b0,
    BYPASS_ROW    = 1'b1
  } bypass_e;

endpackage
