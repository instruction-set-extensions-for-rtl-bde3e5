// gf_mac_unit: Galois-field multiply-accumulate unit for Reed-Solomon
// coding over GF(2^m), m = 1..8, following the proposed GFMAC unit:
//
//   A, B --> 8-bit GF multiplier --C(15)--> 15-bit left shifter (by 8-m)
//        --> 8-bit polynomial reduction (P) --> 8-bit right shifter (by 8-m)
//        --D(8)--> 8-bit GF adder (XOR) with (mac ? Acc : 0) --> Data Out
//
// Shifting the product left by 8-m lets one fixed degree-8 reduction unit
// serve every field size: C*x^(8-m) mod (x^(8-m)*(x^m + p)) equals
// x^(8-m)*(C mod (x^m + p)), so shifting the remainder back right by 8-m
// gives the product in GF(2^m). Accordingly:
//   l = m - 1 (3 bits); the shift amount 8-m is the complement of l.
//   p = the field polynomial's coefficients below x^m, shifted left by 8-m
//       (for m = 8 simply the low byte, e.g. 8'h1D for x^8+x^4+x^3+x^2+1).
//   A and B are elements of the field, i.e. below 2^m.
// With HAS_ACC = 0 the GF adder and the multiplexer are left out, which is
// the proposed GFMUL unit; mac and acc are then ignored. Purely
// combinational.
module gf_mac_unit #(
  parameter bit HAS_ACC = 1'b1
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] acc,
  input  logic       mac,       // 1: add Acc, 0: plain multiply
  input  logic [7:0] p,         // aligned reduction polynomial
  input  logic [2:0] l,         // field length - 1
  output logic [7:0] data_out
);
  logic [14:0] c, c_sh;
  logic [7:0]  red, d, addend;
  logic [2:0]  sh;

  gf_multiplier  #(.W(8)) u_mul (.a(a), .b(b), .c(c));

  assign sh   = ~l;                 // 8 - m = 7 - l
  assign c_sh = c << sh;

  gf_poly_reduce #(.W(8)) u_red (.c(c_sh), .p(p), .r(red));

  assign d = red >> sh;

  if (HAS_ACC) begin : g_acc
    assign addend = mac ? acc : 8'h00;
  end else begin : g_noacc
    assign addend = 8'h00;
  end

  assign data_out = d ^ addend;
endmodule
