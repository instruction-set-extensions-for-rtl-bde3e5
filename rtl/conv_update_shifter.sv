// conv_update_shifter: one VPE's datapath for the update_shifter operation
// of programmable convolutional encoding.
//
// The operation shifts Input Length bits of Data In into a shift register of
// Constraint Length bits, moving the register to the right:
//   next = ({data_in[IL-1:0], state[CL-1:0]} >> IL)[CL-1:0]
// Bit 0 of Data In is the oldest of the new bits and lands at the lower
// position. As in the proposed hardware it is built from three barrel
// shifters of log2(W) levels of 2:1 multiplexers:
//   1. align:  the state is shifted left by W-CL so that its top bit sits at
//              bit W-1 (control: Constraint Length - 1);
//   2. insert: {Data In, aligned} is shifted right by IL, which drops the
//              oldest IL state bits and brings in the data bits at the top
//              (control: Input Length - 1);
//   3. return: the result is shifted right by W-CL (control: the bitwise
//              complement of Constraint Length - 1, i.e. W-1-(CL-1)).
// Lengths are given as length-1 in log2(W)-bit fields, so 1..W is encoded
// in 0..W-1. Bits of the result at and above CL are zero. Purely
// combinational; in the vector unit it sits in the first execute stage.
module conv_update_shifter #(
  parameter int unsigned W = 8          // maximum constraint/input length
) (
  input  logic [W-1:0]         data_in,   // Data In, bit 0 oldest
  input  logic [$clog2(W)-1:0] cl_m1,     // Constraint Length - 1
  input  logic [$clog2(W)-1:0] il_m1,     // Input Length - 1
  input  logic [W-1:0]         state_in,  // Current State
  output logic [W-1:0]         next_state // Next State
);
  localparam int unsigned S = $clog2(W);

  logic [S-1:0]   align_amt;
  logic [W-1:0]   align_lvl  [S+1];
  logic [2*W-1:0] ins_lvl    [S+2];
  logic [W-1:0]   ret_lvl    [S+1];

  // W-1-cl_m1 equals the bitwise complement for a power-of-two W.
  assign align_amt = ~cl_m1;

  always_comb begin
    // 1. align Current State to the top of the W-bit word
    align_lvl[0] = state_in;
    for (int unsigned k = 0; k < S; k++)
      align_lvl[k+1] = align_amt[k] ? (align_lvl[k] << (1 << k)) : align_lvl[k];

    // 2. insert Data In: shift {data, aligned} right by IL = il_m1 + 1
    ins_lvl[0] = {data_in, align_lvl[S]} >> 1;
    for (int unsigned k = 0; k < S; k++)
      ins_lvl[k+1] = il_m1[k] ? (ins_lvl[k] >> (1 << k)) : ins_lvl[k];
    ins_lvl[S+1] = ins_lvl[S];

    // 3. right shift back by W - CL
    ret_lvl[0] = ins_lvl[S+1][W-1:0];
    for (int unsigned k = 0; k < S; k++)
      ret_lvl[k+1] = align_amt[k] ? (ret_lvl[k] >> (1 << k)) : ret_lvl[k];
  end

  assign next_state = ret_lvl[S];

endmodule
