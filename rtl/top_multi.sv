// top_multi: 4x4 unsigned reversible multiplier built from Peres gates.
//
// Two stages, both combinational:
//   1. partial_product_gen forms all 16 products x[i] & y[j] at once with 16
//      Peres gates whose C input is 0 (32 garbage bits, g_ppg).
//   2. summation_network adds them with 4 Peres half adders and 8 PFAG full
//      adders (20 garbage bits, g_sum) into p = x * y.
// Constant inputs: 16 + 4 + 8 = 28. Garbage outputs: 32 + 20 = 52. These
// match the counts given for the published design. The garbage bits are
// brought out so that the whole circuit keeps one output for every input, as a
// reversible circuit must; a user who only wants the product leaves them open.
// The partial-product rows are brought out as well (pp[i] = x[i] & y), as in
// the published simulation. There is no clock and no reset: p is valid one
// combinational delay after x and y settle.
module top_multi
  import rev_mult_pkg::*;
(
  input  operand_t               x,
  input  operand_t               y,
  output product_t               p,
  output pp_array_t              pp,
  output logic [PPG_GARBAGE-1:0] g_ppg,
  output logic [SUM_GARBAGE-1:0] g_sum
);

  partial_product_gen #(.N(OPERAND_W)) u_ppg (
    .x  (x),
    .y  (y),
    .pp (pp),
    .g  (g_ppg)
  );

  summation_network u_sum (
    .pp (pp),
    .p  (p),
    .g  (g_sum)
  );

endmodule
