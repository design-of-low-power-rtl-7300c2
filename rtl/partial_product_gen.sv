// Partial product generation: an N x N array of Peres gates used as AND gates.
//
// The gate for bit pair (i, j) receives A = x[i], B = y[j] and C = 0, so its
// R output is the partial product x[i] & y[j], delivered as pp[i][j]. All N*N
// products are formed in parallel in one gate delay. Each gate's P (= x[i])
// and Q (= x[i] ^ y[j]) outputs are garbage; with k = N*i + j they are
// numbered g[2k+1] = P and g[2k] = Q, which matches the published numbering
// (gate x0y0 owns g1, g0 and gate x3y3 owns g31, g30). Which operand feeds A
// and which of P, Q gets the odd index are this design's choices.
// Combinational, no clock. N defaults to the published 4.
module partial_product_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic [N-1:0][N-1:0]  pp,   // pp[i][j] = x[i] & y[j]
  output logic [2*N*N-1:0]     g
);

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      peres_gate u_pg (
        .a (x[i]),
        .b (y[j]),
        .c (1'b0),
        .p (g[2*(N*i+j)+1]),
        .q (g[2*(N*i+j)]),
        .r (pp[i][j])
      );
    end
  end

endmodule
