// Shared types for the aging-aware variable-latency multiplier.
//
// bypass_e picks which operand disables parts of the partial-product array
// (column bypassing looks at the multiplicand, row bypassing at the
// multiplier); the adaptive hold logic counts zeros in that same operand.
// adder_e picks the adder that merges the carry-save result: a ripple-carry
// adder (the carry-save-adder variant) or a Brent-Kung parallel-prefix adder.
package aam_pkg;

  typedef enum logic {
    BYPASS_COLUMN = 1'b0,
    BYPASS_ROW    = 1'b1
  } bypass_e;

  typedef enum logic {
    ADDER_CSA = 1'b0,  // carry-save rows merged by a ripple-carry adder
    ADDER_BKA = 1'b1   // carry-save rows merged by a Brent-Kung adder
  } adder_e;

endpackage
