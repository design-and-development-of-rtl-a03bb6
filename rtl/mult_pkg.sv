// mult_pkg: shared type and default sizes for the adaptive-hold-logic multiplier.
// bypass_e selects which operand the bypassing array watches: the multiplicand
// (column bypassing) or the multiplicator (row bypassing). The adaptive hold logic
// judges the same operand. The 64-bit width is the main configuration of the design.
package mult_pkg;
  typedef enum logic {
    BYPASS_COLUMN = 1'b0,   // cells of column i idle when multiplicand bit a[i] is 0
    BYPASS_ROW    = 1'b1    // cells of row j idle when multiplicator bit b[j] is 0
  } bypass_e;

  localparam int unsigned DEFAULT_WIDTH = 64;
endpackage
