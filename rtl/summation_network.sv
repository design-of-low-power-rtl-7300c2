// Summation network of the 4x4 reversible multiplier.
//
// Adds the 16 partial products pp[i][j] = x[i] & y[j] (weight 2^(i+j)) into
// the 8-bit product with 4 Peres half adders (HA) and 8 PFAG full adders (FA),
// arranged as three ripple chains:
//
//   upper chain A  col1 HA(x1y0, x0y1)      -> P1
//                  col2 FA(x0y2, x2y0, c)   -> sum a2
//                  col3 FA(x0y3, x3y0, c)   -> sum a3
//                  col4 HA(x1y3, c)         -> sum a4, carry a4 (weight 2^5)
//   upper chain B  col3 HA(x1y2, x2y1)      -> sum b3
//                  col4 FA(x3y1, x2y2, c)   -> sum b4
//                  col5 FA(x2y3, x3y2, c)   -> sum b5, carry b5 (weight 2^6)
//   lower chain    col2 HA(a2, x1y1)        -> P2
//                  col3 FA(b3, a3, c)       -> P3
//                  col4 FA(b4, a4, c)       -> P4
//                  col5 FA(b5, carry a4, c) -> P5
//                  col6 FA(carry b5, x3y3, c) -> P6, carry out -> P7
//   P0 = x0y0 needs no adder.
//
// The gate counts, the three chains, the operands of the upper chains and the
// garbage numbering g0..g19 follow the published network. The published
// drawing does not label the lines between the upper and lower chains; they
// are wired here so that each lower adder sums bits of equal weight. Within a
// full adder's garbage pair the lower index is its A input and the higher one
// A ^ B. Combinational, no clock; the longest path runs through chain A and
// then the whole lower chain.
module summation_network
  import rev_mult_pkg::*;
(
  input  pp_array_t              pp,   // pp[i][j] = x[i] & y[j]
  output product_t               p,
  output logic [SUM_GARBAGE-1:0] g
);

  // upper chain A
  logic ca1, ca2, ca3, ca4;
  logic sa2, sa3, sa4;
  // upper chain B
  logic cb3, cb4, cb5;
  logic sb3, sb4, sb5;
  // lower chain
  logic cl2, cl3, cl4, cl5;

  assign p[0] = pp[0][0];

  peres_half_adder u_ha_a1 (.a(pp[1][0]), .b(pp[0][1]),             .sum(p[1]), .carry(ca1), .g(g[0]));
  pfag             u_fa_a2 (.a(pp[0][2]), .b(pp[2][0]), .cin(ca1),  .sum(sa2),  .cout(ca2),  .g(g[2:1]));
  pfag             u_fa_a3 (.a(pp[0][3]), .b(pp[3][0]), .cin(ca2),  .sum(sa3),  .cout(ca3),  .g(g[4:3]));
  peres_half_adder u_ha_a4 (.a(pp[1][3]), .b(ca3),                  .sum(sa4),  .carry(ca4), .g(g[5]));

  peres_half_adder u_ha_b3 (.a(pp[1][2]), .b(pp[2][1]),             .sum(sb3),  .carry(cb3), .g(g[6]));
  pfag             u_fa_b4 (.a(pp[3][1]), .b(pp[2][2]), .cin(cb3),  .sum(sb4),  .cout(cb4),  .g(g[8:7]));
  pfag             u_fa_b5 (.a(pp[2][3]), .b(pp[3][2]), .cin(cb4),  .sum(sb5),  .cout(cb5),  .g(g[10:9]));

  peres_half_adder u_ha_l2 (.a(sa2),      .b(pp[1][1]),             .sum(p[2]), .carry(cl2), .g(g[11]));
  pfag             u_fa_l3 (.a(sb3),      .b(sa3),      .cin(cl2),  .sum(p[3]), .cout(cl3),  .g(g[13:12]));
  pfag             u_fa_l4 (.a(sb4),      .b(sa4),      .cin(cl3),  .sum(p[4]), .cout(cl4),  .g(g[15:14]));
  pfag             u_fa_l5 (.a(sb5),      .b(ca4),      .cin(cl4),  .sum(p[5]), .cout(cl5),  .g(g[17:16]));
  pfag             u_fa_l6 (.a(cb5),      .b(pp[3][3]), .cin(cl5),  .sum(p[6]), .cout(p[7]), .g(g[19:18]));

endmodule
