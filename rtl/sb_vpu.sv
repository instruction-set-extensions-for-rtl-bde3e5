// sb_vpu: SIMD vector processing unit of a token-triggered multithreaded
// baseband processor, extended with the software-defined-radio operations
// (convolutional encoding, Viterbi and turbo add-compare-select, Galois-field
// multiply-accumulate).
//
// Structure
//   * token_scheduler picks the one thread (of NTHREADS) that may issue in
//     each cycle; issue_thread tells the instruction source which one.
//   * Each thread has its own NVREG x 64-bit vector registers, NACC x 40-bit
//     accumulators and Galois-field configuration register (P, L).
//   * Four VPEs, each a vpe_ext instance, work in SIMD on the four 16-bit
//     elements of the source vectors; reduction_unit combines the four lanes
//     into an accumulator for VMULREDS.
// Pipeline: every operation takes the eight stages ID, RR, E1, E2, E3, E4,
// XF (transfer), WB after it is issued. The extension datapaths compute in
// E1; E2..E4 and XF only carry the result (the extensions could use up to
// four execute stages without changing the timing seen outside). An
// operation issued in cycle 0 writes its register in the clock edge that
// ends cycle 8 and a VSTORE / VACCRD result appears on st_* / acc_* during
// cycle 8. Because the default token order is a cycle through all eight
// threads, a thread's next operation reads its registers only after the
// previous one has written back, so there is no forwarding and no
// dependency check; an assertion flags a thread that issues again while an
// operation of its own is still before write-back (possible only with a
// reprogrammed token order of fewer than eight threads).
// Interface
//   instr / instr_valid: the decoded operation of thread issue_thread in
//   this cycle. ld_data: the vector a VLOAD writes, valid with the VLOAD
//   (it stands for the load/store unit's data, which is outside this unit).
//   sched_cfg_*: write the token order table. ev: per WB operation, which
//   special cases happened ({reduction accumulator saturated, reduction
//   product saturated, an ACS lane chose Metric2, a turbo metric clamped}).
// The eight threads, four VPEs, 16-bit elements, 40-bit accumulators, the
// stage list and the token order follow the processor description; the
// register counts, the operation encoding and the data-in/out ports are
// this design's own choices. Reset is asynchronous, active low, and clears
// all registers.
module sb_vpu
  import sb_vpu_pkg::*;
#(
  parameter int unsigned NGF    = 2,      // GF units per VPE (gfmac2)
  parameter bit          GF_MAC = 1'b1    // GFMAC (1) or GFMUL (0) units
) (
  input  logic              clk,
  input  logic              rst_n,
  // issue
  output logic [TID_W-1:0]  issue_thread,
  input  logic              instr_valid,
  input  vinstr_t           instr,
  input  logic [VEC_W-1:0]  ld_data,
  // token order configuration
  input  logic              sched_cfg_we,
  input  logic [TID_W-1:0]  sched_cfg_thread,
  input  logic [TID_W-1:0]  sched_cfg_next,
  // results
  output logic              st_valid,
  output logic [TID_W-1:0]  st_thread,
  output logic [VEC_W-1:0]  st_data,
  output logic              acc_valid,
  output logic [TID_W-1:0]  acc_thread,
  output logic [ACC_W-1:0]  acc_data,
  output logic              wb_valid,     // an operation is in WB
  output vop_e              wb_op,
  output logic [3:0]        ev
);
  localparam int unsigned NSTAGE = 8;   // ID RR E1 E2 E3 E4 XF WB
  localparam int unsigned S_ID = 0, S_RR = 1, S_E1 = 2, S_WB = 7;

  typedef struct packed {
    logic             valid;
    logic [TID_W-1:0] tid;
    vinstr_t          in;
    logic [VEC_W-1:0] a;     // source operands, then the vector result in a
    logic [VEC_W-1:0] b;
    logic [VEC_W-1:0] c;
    logic [ACC_W-1:0] acc;   // accumulator source, then result
    gfcfg_t           gf;
    logic [3:0]       ev;
  } pstage_t;

  pstage_t pipe [NSTAGE];

  logic [VEC_W-1:0] vreg  [NTHREADS][NVREG];
  logic [ACC_W-1:0] accr  [NTHREADS][NACC];
  gfcfg_t           gfreg [NTHREADS];

  // ---------------------------------------------------------------- issue
  token_scheduler #(.NT(NTHREADS)) u_sched (
    .clk, .rst_n,
    .cfg_we(sched_cfg_we), .cfg_thread(sched_cfg_thread),
    .cfg_next(sched_cfg_next), .token(issue_thread)
  );

  // ------------------------------------------------------------- execute
  logic [VEC_W-1:0] e1_vec;
  logic [LANES-1:0] e1_tsat, e1_aflag;
  logic [ACC_W-1:0] e1_acc;
  logic             e1_psat, e1_asat;

  for (genvar l = 0; l < LANES; l++) begin : g_vpe
    vpe_ext #(.NGF(NGF), .GF_MAC(GF_MAC)) u_vpe (
      .op    (pipe[S_E1].in.op),
      .a     (pipe[S_E1].a[l*ELEM_W +: ELEM_W]),
      .b     (pipe[S_E1].b[l*ELEM_W +: ELEM_W]),
      .c     (pipe[S_E1].c[l*ELEM_W +: ELEM_W]),
      .gfcfg (pipe[S_E1].gf),
      .result(e1_vec[l*ELEM_W +: ELEM_W]),
      .ev_turbo_sat(e1_tsat[l]),
      .ev_acs_flag (e1_aflag[l])
    );
  end

  reduction_unit u_red (
    .a(pipe[S_E1].a), .b(pipe[S_E1].b), .acc_in(pipe[S_E1].acc),
    .acc_out(e1_acc), .sat_prod(e1_psat), .sat_acc(e1_asat)
  );

  // Next value of each stage register.
  pstage_t nxt [NSTAGE];
  always_comb begin
    // ID: capture the issued operation (VLOAD data travels in a)
    nxt[S_ID]       = '0;
    nxt[S_ID].valid = instr_valid;
    nxt[S_ID].tid   = issue_thread;
    nxt[S_ID].in    = instr;
    nxt[S_ID].a     = ld_data;
    // RR: read the issuing thread's registers
    nxt[S_RR] = pipe[S_ID];
    if (pipe[S_ID].in.op != VOP_VLOAD)
      nxt[S_RR].a = vreg[pipe[S_ID].tid][pipe[S_ID].in.va];
    nxt[S_RR].b   = vreg[pipe[S_ID].tid][pipe[S_ID].in.vb];
    nxt[S_RR].c   = vreg[pipe[S_ID].tid][pipe[S_ID].in.vc];
    nxt[S_RR].acc = accr[pipe[S_ID].tid][pipe[S_ID].in.ac];
    nxt[S_RR].gf  = gfreg[pipe[S_ID].tid];
    // E1 -> E2: results of the extension units and the reduction unit
    nxt[S_E1] = pipe[S_RR];
    nxt[S_E1+1] = pipe[S_E1];
    unique case (pipe[S_E1].in.op)
      VOP_UPDATE_SHIFTER, VOP_CONVOLVE, VOP_ACS_SELECT_METRIC, VOP_ACS_SET_FLAG,
      VOP_SELECT_STATE, VOP_ASCS_TURBO, VOP_GFMUL, VOP_GFMAC, VOP_GFMUL2,
      VOP_GFMAC2: nxt[S_E1+1].a = e1_vec;
      VOP_VMULREDS: nxt[S_E1+1].acc = e1_acc;
      default: ;
    endcase
    nxt[S_E1+1].ev = {e1_asat  & (pipe[S_E1].in.op == VOP_VMULREDS),
                      e1_psat  & (pipe[S_E1].in.op == VOP_VMULREDS),
                      |e1_aflag, |e1_tsat};
    // E3, E4, XF, WB: transfer
    for (int unsigned s = S_E1+2; s < NSTAGE; s++) nxt[s] = pipe[s-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < NSTAGE; s++) pipe[s] <= '0;
    end else begin
      for (int unsigned s = 0; s < NSTAGE; s++) pipe[s] <= nxt[s];
    end
  end

  // ----------------------------------------------------------- write back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned t = 0; t < NTHREADS; t++) begin
        for (int unsigned r = 0; r < NVREG; r++) vreg[t][r] <= '0;
        for (int unsigned r = 0; r < NACC; r++)  accr[t][r] <= '0;
        gfreg[t] <= '0;
      end
    end else if (pipe[S_WB].valid) begin
      unique case (pipe[S_WB].in.op)
        VOP_VLOAD, VOP_UPDATE_SHIFTER, VOP_CONVOLVE, VOP_ACS_SELECT_METRIC,
        VOP_ACS_SET_FLAG, VOP_SELECT_STATE, VOP_ASCS_TURBO, VOP_GFMUL,
        VOP_GFMAC, VOP_GFMUL2, VOP_GFMAC2:
          vreg[pipe[S_WB].tid][pipe[S_WB].in.vd] <= pipe[S_WB].a;
        VOP_VMULREDS:
          accr[pipe[S_WB].tid][pipe[S_WB].in.ac] <= pipe[S_WB].acc;
        VOP_SET_GFCFG:
          gfreg[pipe[S_WB].tid] <= '{l: pipe[S_WB].a[GFCFG_L_LSB +: 3],
                                     p: pipe[S_WB].a[GFCFG_P_LSB +: GF_W]};
        default: ;
      endcase
    end
  end

  assign wb_valid   = pipe[S_WB].valid;
  assign wb_op      = pipe[S_WB].in.op;
  assign ev         = pipe[S_WB].valid ? pipe[S_WB].ev : '0;
  assign st_valid   = pipe[S_WB].valid && pipe[S_WB].in.op == VOP_VSTORE;
  assign st_thread  = pipe[S_WB].tid;
  assign st_data    = pipe[S_WB].a;
  assign acc_valid  = pipe[S_WB].valid && pipe[S_WB].in.op == VOP_VACCRD;
  assign acc_thread = pipe[S_WB].tid;
  assign acc_data   = pipe[S_WB].acc;

  // A thread must not issue while one of its operations is before WB: no
  // dependency checking exists.
  logic inflight;
  always_comb begin
    inflight = 1'b0;
    for (int unsigned s = 0; s < S_WB; s++)
      if (pipe[s].valid && pipe[s].tid == issue_thread) inflight = 1'b1;
  end

  a_no_reissue: assert property (@(posedge clk) disable iff (!rst_n)
    instr_valid |-> !inflight)
    else $error("thread %0d issued with an operation still in flight", issue_thread);

endmodule
