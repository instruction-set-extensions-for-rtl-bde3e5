// gf_multiplier: carry-less (Galois-field) multiplier of two W-bit
// polynomials over GF(2), giving the unreduced 2W-1 bit product C.
// Bit k of C is the XOR of all partial products a[i] & b[j] with i+j = k:
// an array of W*W AND gates followed by XOR trees, as in the proposed GF
// multiply-accumulate unit (W = 8: 64 AND gates, 15-bit product).
// Purely combinational.
module gf_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] c
);
  logic [W-1:0] pp [W];  // pp[i][j] = a[i] & b[j]

  always_comb begin
    for (int unsigned i = 0; i < W; i++)
      pp[i] = b & {W{a[i]}};
    c = '0;
    for (int unsigned i = 0; i < W; i++)
      for (int unsigned j = 0; j < W; j++)
        c[i+j] = c[i+j] ^ pp[i][j];
  end
endmodule
