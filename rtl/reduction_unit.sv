// reduction_unit: the vector unit's reduction datapath, here performing the
// multiply-reduce operation vmulreds used in the processor's
// sum-of-squares example:
//   acc_out = sat40(...sat40(sat40(acc_in + P0) + P1)... + P3)
//   Pi      = sat32(2 * a[i] * b[i])
// Each 16-bit element pair is multiplied as a Q15 fraction (the product is
// doubled and saturated to 32 bits, which clamps only -1 * -1), the four
// products are added to the 40-bit accumulator in lane order, and the sum
// is saturated to 40 bits after every addition. The fractional product
// format and the lane order are this design's reading of "saturates each
// product ... with saturation after each addition". sat_prod / sat_acc report
// that a clamp occurred. Purely combinational.
module reduction_unit
  import sb_vpu_pkg::*;
(
  input  logic [VEC_W-1:0] a,
  input  logic [VEC_W-1:0] b,
  input  logic [ACC_W-1:0] acc_in,
  output logic [ACC_W-1:0] acc_out,
  output logic             sat_prod,
  output logic             sat_acc
);
  localparam logic signed [ACC_W-1:0] AMAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] AMIN = {1'b1, {(ACC_W-1){1'b0}}};

  logic signed [ELEM_W-1:0]   ea, eb;
  logic signed [2*ELEM_W-1:0] prod;
  logic signed [2*ELEM_W:0]   prod2;
  logic signed [2*ELEM_W-1:0] psat;
  logic signed [ACC_W-1:0]    acc;
  logic signed [ACC_W:0]      sum;

  always_comb begin
    acc      = acc_in;
    sat_prod = 1'b0;
    sat_acc  = 1'b0;
    for (int unsigned i = 0; i < LANES; i++) begin
      ea    = a[i*ELEM_W +: ELEM_W];
      eb    = b[i*ELEM_W +: ELEM_W];
      prod  = ea * eb;
      prod2 = {prod, 1'b0};
      if (prod2[2*ELEM_W] != prod2[2*ELEM_W-1]) begin
        psat     = prod2[2*ELEM_W] ? {1'b1, {(2*ELEM_W-1){1'b0}}}
                                   : {1'b0, {(2*ELEM_W-1){1'b1}}};
        sat_prod = 1'b1;
      end else begin
        psat = prod2[2*ELEM_W-1:0];
      end
      sum = {acc[ACC_W-1], acc} + (ACC_W+1)'(psat);
      if (sum[ACC_W] != sum[ACC_W-1]) begin
        acc     = sum[ACC_W] ? AMIN : AMAX;
        sat_acc = 1'b1;
      end else begin
        acc = sum[ACC_W-1:0];
      end
    end
    acc_out = acc;
  end
endmodule
