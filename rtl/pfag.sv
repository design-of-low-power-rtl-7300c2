// PFAG: full adder built from two cascaded Peres gates.
//
// The first gate takes A, B and a constant 0 and yields A, A ^ B and A & B.
// The second gate takes A ^ B as its A input, the carry in as its B input and
// A & B as its C input, so that
//   Q2 = A ^ B ^ Cin                      (sum)
//   R2 = ((A ^ B) & Cin) ^ (A & B)        (carry out, the majority of A, B, Cin)
// The first gate's P (= A) and the second gate's P (= A ^ B) carry no result
// and leave as the two garbage bits; the first gate's Q is consumed by the
// second gate. One constant input (tied inside), two garbage outputs.
// Combinational, no clock.
// The two-gate structure and the equations follow the published design; the
// order of the garbage pair (g[0] = A, g[1] = A ^ B) is this design's choice.
module pfag (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [1:0] g     // g[0] = a, g[1] = a ^ b
);

  logic axb;   // A ^ B from the first gate
  logic ab;    // A & B from the first gate

  peres_gate u_pg0 (
    .a (a),
    .b (b),
    .c (1'b0),
    .p (g[0]),
    .q (axb),
    .r (ab)
  );

  peres_gate u_pg1 (
    .a (axb),
    .b (cin),
    .c (ab),
    .p (g[1]),
    .q (sum),
    .r (cout)
  );

endmodule
