// Peres gate: the 3-input, 3-output reversible gate every block of the
// multiplier is built from.
//
//   P = A
//   Q = A ^ B
//   R = (A & B) ^ C
//
// Internally it is written as the usual two-stage cascade: a Toffoli stage
// (C is inverted when A and B are both 1) followed by a Feynman stage (B is
// inverted when A is 1). Each stage is its own inverse, so the whole mapping
// is a bijection on three bits and the inputs can always be recovered from
// the outputs. Tying C to 0 turns R into A AND B (used for the
// partial products); with C = 0 the pair Q, R is also a half adder. The gate is
// purely combinational: outputs follow the inputs with no clock and no state.
// The equations are those of the published gate. Note that the gate does not
// preserve parity (input 100 gives 110), whatever is sometimes claimed for it.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic c_tof;   // C after the Toffoli stage

  always_comb begin
    // Toffoli stage: controls A, B; target C
    c_tof = (a & b) ^ c;
    // Feynman stage: control A; target B
    p = a;
    q = a ^ b;
    r = c_tof;
  end

endmodule
