// Half adder made of one Peres gate with its C input held at constant 0.
//
// With C = 0 the gate gives Q = A ^ B (the sum) and R = A & B (the carry);
// output P = A is not needed and leaves as the single garbage bit. The
// constant input is tied inside the module. Combinational, no clock.
// The use of one Peres gate with C = 0 follows the published design; keeping
// the constant inside rather than as a port is this implementation's choice.
module peres_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry,
  output logic g      // garbage: P = a
);

  peres_gate u_pg (
    .a (a),
    .b (b),
    .c (1'b0),
    .p (g),
    .q (sum),
    .r (carry)
  );

endmodule
