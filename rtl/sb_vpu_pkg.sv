// sb_vpu_pkg: types and constants shared by the vector processing unit and
// its extension datapaths.
//
// The unit has four vector processing elements (VPEs), each working on one
// 16-bit element of a 64-bit vector register, and supports eight hardware
// threads; both numbers follow the processor description. The operation
// encoding below (vop_e, vinstr_t) is this design's own: the real 64-bit
// compound-instruction format is not part of this RTL, so a vector
// operation arrives already decoded into an opcode and register indices.
package sb_vpu_pkg;

  localparam int unsigned LANES     = 4;            // VPEs per vector unit
  localparam int unsigned ELEM_W    = 16;           // element width per VPE
  localparam int unsigned VEC_W     = LANES*ELEM_W; // 64-bit vector register
  localparam int unsigned ACC_W     = 40;           // accumulator width
  localparam int unsigned NTHREADS  = 8;            // hardware threads
  localparam int unsigned TID_W     = $clog2(NTHREADS);
  localparam int unsigned NVREG     = 8;            // vector registers per thread (chosen)
  localparam int unsigned VREG_W    = $clog2(NVREG);
  localparam int unsigned NACC      = 4;            // accumulators per thread (chosen)
  localparam int unsigned ACCI_W    = $clog2(NACC);
  localparam int unsigned GF_W      = 8;            // Galois-field symbol width
  localparam int unsigned SHIFT_MAX = 8;            // max constraint / input length

  // Vector operations handled by the unit. The ten extension operations are
  // the ones proposed; the others are the minimum needed to move data in and
  // out (VLOAD, VSTORE, VACCRD), to load the GF configuration register
  // (SET_GFCFG) and to exercise the reduction unit (VMULREDS).
  typedef enum logic [3:0] {
    VOP_NOP               = 4'd0,
    VOP_VLOAD             = 4'd1,   // vd  <= load data bus
    VOP_VSTORE            = 4'd2,   // store data bus <= va
    VOP_UPDATE_SHIFTER    = 4'd3,   // vd  <= update_shifter(va=DataIn, vb=lengths, vc=state)
    VOP_CONVOLVE          = 4'd4,   // vd  <= convolve(va=state, vb=taps)
    VOP_ACS_SELECT_METRIC = 4'd5,   // vd  <= acs metric(va=MetricIn, vb=PM1, vc=PM2)
    VOP_ACS_SET_FLAG      = 4'd6,   // vd  <= acs flag  (va=MetricIn, vb=PM1, vc=PM2)
    VOP_SELECT_STATE      = 4'd7,   // vd  <= va==0 ? vb : vc
    VOP_ASCS_TURBO        = 4'd8,   // vd  <= max(sat(va-vb), sat(va+vb))
    VOP_GFMUL             = 4'd9,   // vd  <= va (x) vb, low byte of each lane
    VOP_GFMAC             = 4'd10,  // vd  <= va (x) vb (+) vc, low byte of each lane
    VOP_GFMUL2            = 4'd11,  // as GFMUL on both bytes of each lane
    VOP_GFMAC2            = 4'd12,  // as GFMAC on both bytes of each lane
    VOP_SET_GFCFG         = 4'd13,  // GF config register <= lane 0 of va
    VOP_VMULREDS          = 4'd14,  // ac  <= sat(ac + sum sat(va[i]*vb[i]))
    VOP_VACCRD            = 4'd15   // accumulator bus <= ac
  } vop_e;

  typedef struct packed {
    vop_e              op;
    logic [VREG_W-1:0] vd;
    logic [VREG_W-1:0] va;
    logic [VREG_W-1:0] vb;
    logic [VREG_W-1:0] vc;
    logic [ACCI_W-1:0] ac;
  } vinstr_t;

  // Galois-field configuration register: reduction polynomial P and field
  // length code L (field of 2^(L+1) elements).
  typedef struct packed {
    logic [2:0]      l;
    logic [GF_W-1:0] p;
  } gfcfg_t;

  // Field layout of the lengths operand of update_shifter (one lane).
  localparam int unsigned US_IL_LSB = 0;  // Input Length - 1      in bits [2:0]
  localparam int unsigned US_CL_LSB = 4;  // Constraint Length - 1 in bits [6:4]

  // Layout of the GF configuration in lane 0 of a SET_GFCFG source.
  localparam int unsigned GFCFG_P_LSB = 0;  // P in bits [7:0]
  localparam int unsigned GFCFG_L_LSB = 8;  // L in bits [10:8]

endpackage
