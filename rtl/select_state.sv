// select_state: one VPE's datapath for the Viterbi select_state operation.
// It keeps the survivor state chosen by an earlier acs_set_flag:
//   state_out = (flag == 0) ? state1 : state2
// The whole Flag operand is compared with zero. Purely combinational.
module select_state #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] flag,
  input  logic [W-1:0] state1,
  input  logic [W-1:0] state2,
  output logic [W-1:0] state_out
);
  assign state_out = (flag == '0) ? state1 : state2;
endmodule
