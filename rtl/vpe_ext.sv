// vpe_ext: the instruction-set-extension datapath of one vector processing
// element (VPE). It takes the VPE's three 16-bit source elements and the
// decoded operation and returns the 16-bit destination element.
//
// Operand use per operation (a, b, c = first, second, third source):
//   UPDATE_SHIFTER  a = Data In (bits 7:0), b = lengths (Constraint Length-1
//                   in bits 6:4, Input Length-1 in bits 2:0), c = Current
//                   State (bits 7:0); result = Next State in bits 7:0
//   CONVOLVE        a = Current State (bits 7:0), b = Taps (Taps(0) in bits
//                   7:0, Taps(1) in bits 15:8); result = Data Out in bits 1:0
//   ACS_SELECT_METRIC / ACS_SET_FLAG  a = MetricIn, b = PathMetric1,
//                   c = PathMetric2; result = MetricOut / Flag
//   SELECT_STATE    a = Flag, b = State1, c = State2
//   ASCS_TURBO      a = MetricIn1, b = MetricIn2
//   GFMUL / GFMAC   a = A, b = B, c = Acc, low byte only (high byte 0)
//   GFMUL2 / GFMAC2 the same on both bytes, one GF unit per byte
// Any other operation gives 0. The GF units take P and L from the
// Galois-field configuration register (gfcfg). NGF sets the GF units per
// VPE (2: gfmul2/gfmac2 hardware, 1: gfmul/gfmac only; with one unit the
// "2" operations act on the low byte only) and GF_MAC selects GFMAC (1) or
// GFMUL (0) units; without GFMAC units gfmac/gfmac2 return the plain
// product, since that design performs them as a multiply and a separate XOR.
// The operand packing within a lane is this design's choice.
// The event outputs report which special case occurred, for statistics.
// Purely combinational; the vector unit registers around it.
module vpe_ext
  import sb_vpu_pkg::*;
#(
  parameter int unsigned NGF    = 2,
  parameter bit          GF_MAC = 1'b1
) (
  input  vop_e              op,
  input  logic [ELEM_W-1:0] a,
  input  logic [ELEM_W-1:0] b,
  input  logic [ELEM_W-1:0] c,
  input  gfcfg_t            gfcfg,
  output logic [ELEM_W-1:0] result,
  output logic              ev_turbo_sat,   // ascs_turbo clamped a metric
  output logic              ev_acs_flag     // ACS comparison chose Metric2
);
  logic [SHIFT_MAX-1:0] us_next;
  logic [1:0]           conv_out;
  logic [ELEM_W-1:0]    acs_out, sel_out;
  logic                 acs_flag;
  logic signed [ELEM_W-1:0] turbo_out;
  logic                 t_sat_add, t_sat_sub;
  logic [7:0]           gf_out [NGF];
  logic                 gf_mac;

  conv_update_shifter #(.W(SHIFT_MAX)) u_us (
    .data_in   (a[SHIFT_MAX-1:0]),
    .cl_m1     (b[US_CL_LSB +: $clog2(SHIFT_MAX)]),
    .il_m1     (b[US_IL_LSB +: $clog2(SHIFT_MAX)]),
    .state_in  (c[SHIFT_MAX-1:0]),
    .next_state(us_next)
  );

  conv_convolve #(.W(SHIFT_MAX), .NOUT(2)) u_conv (
    .state_in(a[SHIFT_MAX-1:0]),
    .taps    (b),
    .data_out(conv_out)
  );

  viterbi_acs #(.W(ELEM_W)) u_acs (
    .metric_in   (a),
    .path_metric1(b),
    .path_metric2(c),
    .output_sel  (op == VOP_ACS_SELECT_METRIC),
    .data_out    (acs_out),
    .flag        (acs_flag)
  );

  select_state #(.W(ELEM_W)) u_sel (
    .flag(a), .state1(b), .state2(c), .state_out(sel_out)
  );

  turbo_ascs #(.W(ELEM_W)) u_turbo (
    .metric_in1(a), .metric_in2(b), .metric_out(turbo_out),
    .sat_add(t_sat_add), .sat_sub(t_sat_sub)
  );

  assign gf_mac = (op == VOP_GFMAC) || (op == VOP_GFMAC2);

  for (genvar g = 0; g < NGF; g++) begin : g_gf
    gf_mac_unit #(.HAS_ACC(GF_MAC)) u_gf (
      .a(a[8*g +: 8]), .b(b[8*g +: 8]), .acc(c[8*g +: 8]), .mac(gf_mac),
      .p(gfcfg.p), .l(gfcfg.l), .data_out(gf_out[g])
    );
  end

  always_comb begin
    result       = '0;
    ev_turbo_sat = 1'b0;
    ev_acs_flag  = 1'b0;
    unique case (op)
      VOP_UPDATE_SHIFTER: result = ELEM_W'(us_next);
      VOP_CONVOLVE:       result = ELEM_W'(conv_out);
      VOP_ACS_SELECT_METRIC, VOP_ACS_SET_FLAG: begin
        result      = acs_out;
        ev_acs_flag = acs_flag;
      end
      VOP_SELECT_STATE:   result = sel_out;
      VOP_ASCS_TURBO: begin
        result       = turbo_out;
        ev_turbo_sat = t_sat_add | t_sat_sub;
      end
      VOP_GFMUL, VOP_GFMAC: result = ELEM_W'(gf_out[0]);
      VOP_GFMUL2, VOP_GFMAC2: begin
        for (int g = 0; g < NGF; g++) result[8*g +: 8] = gf_out[g];
      end
      default: result = '0;
    endcase
  end
endmodule
