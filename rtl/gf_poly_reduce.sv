// gf_poly_reduce: reduces a 2W-1 bit GF(2) polynomial modulo the degree-W
// polynomial x^W + P(x), giving a W-bit remainder.
// It has W-1 stages, one per product bit from 2W-2 down to W. The stage for
// bit k ANDs the W bits of P with bit k (W AND gates) and XORs the result
// into bits k-1 .. k-W (W XOR gates), which clears bit k. With W = 8 this is
// the proposed seven-stage reduction unit. P holds the coefficients of
// x^(W-1) .. x^0; the x^W term is implied. Purely combinational.
module gf_poly_reduce #(
  parameter int unsigned W = 8
) (
  input  logic [2*W-2:0] c,   // unreduced product
  input  logic [W-1:0]   p,   // reduction polynomial without its x^W term
  output logic [W-1:0]   r    // remainder
);
  logic [2*W-2:0] stage [W];

  always_comb begin
    stage[0] = c;
    for (int unsigned s = 0; s < W-1; s++) begin
      // stage s clears bit k = 2W-2-s
      stage[s+1] = stage[s];
      stage[s+1][2*W-3-s -: W] = stage[s][2*W-3-s -: W] ^ (p & {W{stage[s][2*W-2-s]}});
      stage[s+1][2*W-2-s] = 1'b0;
    end
    r = stage[W-1][W-1:0];
  end
endmodule
