// tb_viterbi_workload: soft-decision Viterbi decoding of a 344-step packet
// of the rate-1/2, constraint-length-3 code with generators 7 and 5 on the
// full vector unit. Each received pair is a 6-bit value: two signed 3-bit
// soft bits (+3 for a 0, -4 for a 1, plus noise).
//
// The four trellis states map onto the four lanes. Per step thread 0 runs
//   VLOAD PM1, VLOAD PM2     path metrics of each state's two predecessors
//   VLOAD BM                 branch metric of the first predecessor's branch
//   ACS_SELECT_METRIC        new path metrics (PM1 + BM versus PM2 - BM)
//   ACS_SET_FLAG             decisions
//   SELECT_STATE             surviving predecessor of each state
//   VSTORE x2                new metrics and survivors
// The testbench stands in for the parts outside the unit: it computes the
// branch metrics, gathers the predecessor metrics (the shuffle step) and
// traces back. The decoded bits are compared with an independent integer
// Viterbi decoder that evaluates both branches of every state in full and
// breaks ties the same way (second predecessor). The number of bits that
// differ from the transmitted message and the cycle count are printed.
module tb_viterbi_workload;
  import sb_vpu_pkg::*;

  localparam int STEPS = 344, NMSG = STEPS - 2;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [TID_W-1:0] issue_thread;
  logic             instr_valid;
  vinstr_t          instr;
  logic [VEC_W-1:0] ld_data;
  logic             sched_cfg_we = 1'b0;
  logic [TID_W-1:0] sched_cfg_thread = '0, sched_cfg_next = '0;
  logic             st_valid, acc_valid, wb_valid;
  logic [TID_W-1:0] st_thread, acc_thread;
  logic [VEC_W-1:0] st_data;
  logic [ACC_W-1:0] acc_data;
  vop_e             wb_op;
  logic [3:0]       ev;

  sb_vpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        u [STEPS];           // message plus two zero tail bits
  logic [5:0]  rxv [STEPS];         // {soft1, soft0}, 3-bit signed each
  logic [VEC_W-1:0] last_store;
  int          n_flag1 = 0, n_flag0 = 0;

  // encoder state s = {u[n-1], u[n-2]}; outputs for input b from state s
  function automatic logic [1:0] enc_out(input int s, input logic b);
    logic a, c;
    a = s[1]; c = s[0];
    return {b ^ c, b ^ a ^ c};       // {g=5, g=7}
  endfunction

  function automatic int sval(input logic [2:0] v);
    return int'($signed(v));
  endfunction

  // correlation of a branch with the received pair
  function automatic int corr(input logic [1:0] o, input logic [5:0] r);
    return (o[0] ? -sval(r[2:0]) : sval(r[2:0])) + (o[1] ? -sval(r[5:3]) : sval(r[5:3]));
  endfunction

  // wait for thread 0's slot, issue, return the VSTORE data if any
  task automatic run(input vop_e o, input int vd, input int va, input int vb, input int vc,
                     input logic [VEC_W-1:0] ld);
    while (issue_thread != 3'd0) begin @(posedge clk); #1; end
    instr = '0; instr.op = o; instr.vd = VREG_W'(vd); instr.va = VREG_W'(va);
    instr.vb = VREG_W'(vb); instr.vc = VREG_W'(vc); ld_data = ld; instr_valid = 1'b1;
    @(posedge clk); #1;
    instr_valid = 1'b0;
    if (o == VOP_VSTORE) begin
      while (!st_valid) begin @(posedge clk); #1; end
      last_store = st_data;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pm [4], rpm [4];
    int surv [STEPS][4], rsurv [STEPS][4];
    logic dec [STEPS], rdec [STEPS];
    int s, errs;
    longint t0;
    // message, encoding and noisy channel
    for (int n = 0; n < STEPS; n++) u[n] = (n < NMSG) ? 1'($urandom) : 1'b0;
    s = 0;
    for (int n = 0; n < STEPS; n++) begin
      logic [1:0] o;
      int y0, y1;
      o = enc_out(s, u[n]);
      y0 = (o[0] ? -4 : 3) + $urandom_range(0, 4) - 2;
      y1 = (o[1] ? -4 : 3) + $urandom_range(0, 4) - 2;
      if (n % 37 == 5) y0 = -y0;               // occasional hard errors
      y0 = (y0 > 3) ? 3 : (y0 < -4) ? -4 : y0;
      y1 = (y1 > 3) ? 3 : (y1 < -4) ? -4 : y1;
      rxv[n] = {3'(y1), 3'(y0)};
      s = {u[n], s[1]};
    end

    // reference decoder: full evaluation of both branches into each state
    rpm = '{0, -1000, -1000, -1000};
    for (int n = 0; n < STEPS; n++) begin
      automatic int npm [4];
      for (int ns = 0; ns < 4; ns++) begin
        automatic int p1 = 2 * ns[0], p2 = 2 * ns[0] + 1;   // {a, c} with a = ns[0]
        automatic int m1 = rpm[p1] + corr(enc_out(p1, ns[1]), rxv[n]);
        automatic int m2 = rpm[p2] + corr(enc_out(p2, ns[1]), rxv[n]);
        npm[ns] = (m1 > m2) ? m1 : m2;
        rsurv[n][ns] = (m1 > m2) ? p1 : p2;
      end
      rpm = npm;
    end

    instr = '0; instr_valid = 1'b0; ld_data = '0;
    #17 rst_n = 1'b1;
    @(posedge clk); #1;
    t0 = cyc;
    pm = '{0, -1000, -1000, -1000};
    // constant vectors: predecessor numbers
    run(VOP_VLOAD, 5, 0, 0, 0, {16'd3, 16'd1, 16'd3, 16'd1});
    run(VOP_VLOAD, 4, 0, 0, 0, {16'd2, 16'd0, 16'd2, 16'd0});
    for (int n = 0; n < STEPS; n++) begin
      logic [VEC_W-1:0] v1, v2, bm;
      for (int ns = 0; ns < 4; ns++) begin
        automatic int p1 = 2 * ns[0], p2 = 2 * ns[0] + 1;
        v1[ns*16 +: 16] = 16'(pm[p1]);
        v2[ns*16 +: 16] = 16'(pm[p2]);
        bm[ns*16 +: 16] = 16'(corr(enc_out(p1, ns[1]), rxv[n]));
      end
      run(VOP_VLOAD, 1, 0, 0, 0, v1);
      run(VOP_VLOAD, 2, 0, 0, 0, v2);
      run(VOP_VLOAD, 3, 0, 0, 0, bm);
      run(VOP_ACS_SELECT_METRIC, 6, 3, 1, 2, '0);
      run(VOP_ACS_SET_FLAG, 7, 3, 1, 2, '0);
      run(VOP_SELECT_STATE, 0, 7, 4, 5, '0);
      run(VOP_VSTORE, 0, 6, 0, 0, '0);
      for (int ns = 0; ns < 4; ns++) pm[ns] = int'($signed(last_store[ns*16 +: 16]));
      run(VOP_VSTORE, 0, 0, 0, 0, '0);
      for (int ns = 0; ns < 4; ns++) begin
        surv[n][ns] = int'(last_store[ns*16 +: 16]);
        if (surv[n][ns] == 2 * ns[0]) n_flag0++; else n_flag1++;
      end
    end
    // trace back from state 0 (the tail bits force it)
    s = 0;
    for (int n = STEPS - 1; n >= 0; n--) begin dec[n] = s[1]; s = surv[n][s]; end
    s = 0;
    for (int n = STEPS - 1; n >= 0; n--) begin rdec[n] = s[1]; s = rsurv[n][s]; end
    errs = 0;
    for (int ns = 0; ns < 4; ns++) begin
      checks++;
      if (pm[ns] != rpm[ns]) begin failures++; $display("FAIL final metric %0d: %0d exp %0d", ns, pm[ns], rpm[ns]); end
    end
    for (int n = 0; n < NMSG; n++) begin
      checks++;
      if (dec[n] !== rdec[n]) begin failures++; if (failures < 10) $display("FAIL bit %0d", n); end
      if (dec[n] !== u[n]) errs++;
    end
    checks++;
    if (n_flag0 == 0 || n_flag1 == 0) begin failures++; $display("FAIL one decision never taken"); end
    $display("decoded %0d bits in %0d cycles, %0d differ from the message", NMSG, cyc - t0, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
