// Shared constants of the multiplier family.
//
// All three multipliers (Braun array, column bypass, reversible TSG array)
// are unsigned N x N combinational multipliers with a 2N-bit product. The
// operand width that the comparison uses is 4 bits; that is the default of
// every width parameter here.
package mult_pkg;

  // Operand width of the compared 4x4 multipliers.
  parameter int unsigned DEFAULT_N = 4;

endpackage
