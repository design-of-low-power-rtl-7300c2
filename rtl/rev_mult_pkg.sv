// Shared sizes and types of the 4x4 reversible multiplier.
//
// The multiplier takes two 4-bit unsigned operands and produces an 8-bit
// product. It is built only from Peres gates: 16 for the partial products and
// 4 half adders plus 8 two-gate full adders for the summation network. Every
// gate output that carries no result is brought out as a garbage bit, so the
// counts below are part of the interface: 32 garbage bits from the partial
// product array and 20 from the summation network. The operand width of 4 is
// the size of the published design; the summation network is wired for that
// size only.
package rev_mult_pkg;

  localparam int unsigned OPERAND_W   = 4;
  localparam int unsigned PRODUCT_W   = 2 * OPERAND_W;
  localparam int unsigned PPG_GARBAGE = 2 * OPERAND_W * OPERAND_W;  // two per AND gate
  localparam int unsigned SUM_GARBAGE = 20;                         // 4 x 1 (HA) + 8 x 2 (FA)

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [PRODUCT_W-1:0] product_t;
  // pp[i][j] = x[i] & y[j]; row i holds x[i] times every bit of y.
  typedef logic [OPERAND_W-1:0][OPERAND_W-1:0] pp_array_t;

endpackage
