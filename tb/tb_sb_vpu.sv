// tb_sb_vpu: end-to-end test of the vector unit at its default parameters.
//
// Each cycle the testbench supplies an operation for the thread that holds
// the token. Every thread runs its own random program of loads, extension
// operations, GF configuration writes, vmulreds and stores; a model of each
// thread's registers (updated in program order, which is exact because the
// pipeline never lets a thread read a register before its previous result
// is written) predicts every VSTORE and VACCRD result. The testbench checks
//   * the token order T0 T7 T2 T5 T4 T3 T6 T1 and, after reprogramming the
//     table, a round-robin and an even/odd order;
//   * every stored vector and accumulator value;
//   * the issue-to-result latency of 8 cycles (ID RR E1 E2 E3 E4 XF WB);
//   * that back-to-back dependent operations of one thread, 8 cycles apart,
//     see each other's results without forwarding.
// It counts each mechanism: every operation type, a turbo clamp, both ACS
// decisions, a product and an accumulator clamp in vmulreds, GF fields of
// several sizes, and each token-order change; one that never happened is a
// failure.
module tb_sb_vpu;
  import sb_vpu_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [TID_W-1:0] issue_thread;
  logic             instr_valid;
  vinstr_t          instr;
  logic [VEC_W-1:0] ld_data;
  logic             sched_cfg_we;
  logic [TID_W-1:0] sched_cfg_thread, sched_cfg_next;
  logic             st_valid, acc_valid, wb_valid;
  logic [TID_W-1:0] st_thread, acc_thread;
  logic [VEC_W-1:0] st_data;
  logic [ACC_W-1:0] acc_data;
  vop_e             wb_op;
  logic [3:0]       ev;

  sb_vpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // per-thread register model
  logic [VEC_W-1:0] mv [NTHREADS][NVREG];
  logic [ACC_W-1:0] ma [NTHREADS][NACC];
  logic [7:0]       mgp [NTHREADS];
  logic [2:0]       mgl [NTHREADS];

  typedef struct { logic is_acc; logic [TID_W-1:0] tid; logic [VEC_W-1:0] data; longint due; } exp_t;
  exp_t expq [$];

  int op_cnt [16];
  int n_turbo_sat = 0, n_flag1 = 0, n_flag0 = 0, n_psat = 0, n_asat = 0;
  int n_order_change = 0, n_dep = 0;
  int gf_sizes [9];
  logic [1:0] gf_stale [NTHREADS];  // vr4 / vr5 loaded for an older field

  // ---- reference model of one lane, written from the operation definitions
  function automatic logic [15:0] ref_lane(input vop_e op, input logic [15:0] a,
      input logic [15:0] b, input logic [15:0] c, input logic [7:0] gp, input logic [2:0] gl);
    logic [15:0] r = '0;
    case (op)
      VOP_UPDATE_SHIFTER: begin
        int cl = int'(b[6:4]) + 1, il = int'(b[2:0]) + 1;
        logic [7:0] s = c[7:0] & 8'((1 << cl) - 1);
        for (int i = 0; i < il; i++) begin s = s >> 1; s[cl-1] = a[i]; end
        r = {8'h00, s};
      end
      VOP_CONVOLVE: begin
        r[0] = ^(a[7:0] & b[7:0]);
        r[1] = ^(a[7:0] & b[15:8]);
      end
      VOP_ACS_SELECT_METRIC, VOP_ACS_SET_FLAG: begin
        logic signed [15:0] m1, m2;
        m1 = $signed(b) + $signed(a);
        m2 = $signed(c) - $signed(a);
        if (op == VOP_ACS_SELECT_METRIC) r = (m1 > m2) ? m1 : m2;
        else                             r = (m1 > m2) ? 16'd0 : 16'd1;
      end
      VOP_SELECT_STATE: r = (a == 16'd0) ? b : c;
      VOP_ASCS_TURBO: begin
        int s1, s2;
        s1 = int'($signed(a)) - int'($signed(b));
        s2 = int'($signed(a)) + int'($signed(b));
        s1 = (s1 > 32767) ? 32767 : (s1 < -32768) ? -32768 : s1;
        s2 = (s2 > 32767) ? 32767 : (s2 < -32768) ? -32768 : s2;
        r = 16'((s1 > s2) ? s1 : s2);
      end
      VOP_GFMUL, VOP_GFMAC, VOP_GFMUL2, VOP_GFMAC2: begin
        int nb = (op == VOP_GFMUL2 || op == VOP_GFMAC2) ? 2 : 1;
        int m = int'(gl) + 1;
        logic [7:0] praw = gp >> (8 - m);
        for (int k = 0; k < nb; k++) begin
          logic [8:0] aa = {1'b0, a[8*k +: 8]};
          logic [7:0] y = b[8*k +: 8], pr = '0;
          for (int i = 0; i < m; i++) begin
            if (y[i]) pr = pr ^ aa[7:0];
            aa = aa << 1;
            if (aa[m]) aa = (aa ^ (9'(1) << m)) ^ {1'b0, praw};
          end
          if (op == VOP_GFMAC || op == VOP_GFMAC2) pr = pr ^ c[8*k +: 8];
          r[8*k +: 8] = pr;
        end
      end
      default: r = '0;
    endcase
    return r;
  endfunction

  function automatic logic [ACC_W-1:0] ref_red(input logic [63:0] x, input logic [63:0] y,
                                               input logic [39:0] ac);
    longint s, pr;
    longint amax = (64'sd1 <<< 39) - 1;
    longint amin = -(64'sd1 <<< 39);
    s = longint'($signed(ac));
    for (int i = 0; i < 4; i++) begin
      pr = 2 * longint'($signed(x[i*16 +: 16])) * longint'($signed(y[i*16 +: 16]));
      if (pr > 64'sd2147483647) pr = 64'sd2147483647;
      s = s + pr;
      if (s > amax) s = amax;
      if (s < amin) s = amin;
    end
    return 40'(s);
  endfunction

  // Apply an issued operation to the model and queue expected outputs.
  function automatic void model(input logic [TID_W-1:0] t, input vinstr_t in,
                                input logic [VEC_W-1:0] ld);
    logic [VEC_W-1:0] a = mv[t][in.va], b = mv[t][in.vb], c = mv[t][in.vc], r;
    exp_t e;
    case (in.op)
      VOP_NOP: ;
      VOP_VLOAD: begin
        mv[t][in.vd] = ld;
        if (in.vd == 3'd4) gf_stale[t][0] = 1'b0;
        if (in.vd == 3'd5) gf_stale[t][1] = 1'b0;
      end
      VOP_VSTORE: begin
        e.is_acc = 1'b0; e.tid = t; e.data = a; e.due = cycle + 8;
        expq.push_back(e);
      end
      VOP_VACCRD: begin
        e.is_acc = 1'b1; e.tid = t; e.data = 64'(ma[t][in.ac]); e.due = cycle + 8;
        expq.push_back(e);
      end
      VOP_SET_GFCFG: begin
        mgp[t] = a[7:0]; mgl[t] = a[10:8];
        gf_stale[t] = 2'b11;
        gf_sizes[int'(a[10:8]) + 1]++;
      end
      VOP_SELECT_STATE, VOP_ACS_SELECT_METRIC, VOP_ACS_SET_FLAG, VOP_ASCS_TURBO,
      VOP_UPDATE_SHIFTER, VOP_CONVOLVE: begin
        for (int l = 0; l < LANES; l++)
          r[l*16 +: 16] = ref_lane(in.op, a[l*16 +: 16], b[l*16 +: 16], c[l*16 +: 16],
                                   mgp[t], mgl[t]);
        mv[t][in.vd] = r;
        if (in.vd == 3'd5) gf_stale[t][1] = 1'b1;
      end
      VOP_VMULREDS: ma[t][in.ac] = ref_red(a, b, ma[t][in.ac]);
      default: begin
        for (int l = 0; l < LANES; l++)
          r[l*16 +: 16] = ref_lane(in.op, a[l*16 +: 16], b[l*16 +: 16], c[l*16 +: 16],
                                   mgp[t], mgl[t]);
        mv[t][in.vd] = r;
      end
    endcase
  endfunction

  // Random vector for a load, shaped so that each operation type gets
  // meaningful operands: vr0..1 general, vr2 lengths, vr3 taps, vr4..5
  // GF field elements, vr6 GF config, vr7 general.
  function automatic logic [VEC_W-1:0] load_value(input logic [TID_W-1:0] t, input int r);
    logic [VEC_W-1:0] v = {$urandom, $urandom};
    case (r)
      2: for (int l = 0; l < 4; l++) begin
           int cl = $urandom_range(1, 8);
           v[l*16 +: 16] = {9'b0, 3'(cl - 1), 1'b0, 3'($urandom_range(0, cl - 1))};
         end
      4, 5: begin
        logic [7:0] msk = 8'((1 << (int'(mgl[t]) + 1)) - 1);
        v = v & {8{msk}};
      end
      6: begin
        int m = $urandom_range(1, 8);
        v = '0;
        v[10:8] = 3'(m - 1);
        v[7:0]  = (m == 8) ? 8'h1D : 8'((8'($urandom) & 8'((1 << m) - 1)) << (8 - m));
      end
      default: ;
    endcase
    return v;
  endfunction

  // Random program step for thread t
  task automatic pick(input logic [TID_W-1:0] t, output vinstr_t in, output logic [VEC_W-1:0] ld);
    int k = $urandom_range(0, 99);
    in = '0;
    ld = '0;
    in.ac = ACCI_W'($urandom);
    if (k < 20) begin
      int r = $urandom_range(0, 7);
      in.op = VOP_VLOAD; in.vd = VREG_W'(r); ld = load_value(t, r);
    end else if (k < 30) begin
      in.op = VOP_VSTORE; in.va = VREG_W'($urandom);
    end else if (k < 34) begin
      in.op = VOP_VACCRD;
    end else if (k < 37) begin
      in.op = VOP_SET_GFCFG; in.va = 3'd6;
    end else if (k < 42) begin
      in.op = VOP_VMULREDS; in.va = VREG_W'($urandom); in.vb = VREG_W'($urandom);
    end else begin
      vop_e ext [10] = '{VOP_UPDATE_SHIFTER, VOP_CONVOLVE, VOP_ACS_SELECT_METRIC,
                         VOP_ACS_SET_FLAG, VOP_SELECT_STATE, VOP_ASCS_TURBO,
                         VOP_GFMUL, VOP_GFMAC, VOP_GFMUL2, VOP_GFMAC2};
      in.op = ext[$urandom_range(0, 9)];
      case (in.op)
        VOP_UPDATE_SHIFTER: begin in.va = 3'd0; in.vb = 3'd2; in.vc = 3'd1; in.vd = 3'd1; end
        VOP_CONVOLVE:       begin in.va = 3'd1; in.vb = 3'd3; in.vd = 3'd7; end
        VOP_GFMUL, VOP_GFMAC, VOP_GFMUL2, VOP_GFMAC2:
                            begin in.va = 3'd4; in.vb = 3'd5; in.vc = 3'd5; in.vd = 3'd5; end
        default: begin
          in.va = VREG_W'($urandom); in.vb = VREG_W'($urandom);
          in.vc = VREG_W'($urandom); in.vd = VREG_W'($urandom_range(0, 1));
          if (in.vd == 3'd1) in.vd = 3'd7;
        end
      endcase
      // GF operands must be elements of the current field: reload them first
      if (in.op inside {VOP_GFMUL, VOP_GFMAC, VOP_GFMUL2, VOP_GFMAC2} && gf_stale[t] != 2'b00) begin
        int r = gf_stale[t][0] ? 4 : 5;
        in = '0; in.op = VOP_VLOAD; in.vd = VREG_W'(r); ld = load_value(t, r);
      end
    end
  endtask

  // check outputs in WB
  always @(negedge clk) if (rst_n) begin
    if (wb_valid) op_cnt[wb_op]++;
    if (ev[0]) n_turbo_sat++;
    if (ev[2]) n_psat++;
    if (ev[3]) n_asat++;
    if (st_valid || acc_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = expq.pop_front();
        if (e.is_acc != acc_valid || e.tid != (acc_valid ? acc_thread : st_thread) ||
            e.data != (acc_valid ? 64'(acc_data) : st_data)) begin
          failures++;
          $display("FAIL cycle %0d thread %0d: got %h exp %h (thread %0d, acc %0d)", cycle,
                   acc_valid ? acc_thread : st_thread, acc_valid ? 64'(acc_data) : st_data,
                   e.data, e.tid, e.is_acc);
        end
        checks++;
        if (e.due != cycle) begin
          failures++; $display("FAIL latency: due %0d, came %0d", e.due, cycle);
        end
      end
    end
  end

  // count ACS decisions from the model side: sample the lane flag via set_flag results
  always @(negedge clk) if (rst_n && wb_valid && wb_op == VOP_ACS_SET_FLAG) begin
    if (ev[1]) n_flag1++; else n_flag0++;
  end

  // drive one operation (for the token holder) in the current cycle
  task automatic issue(input vinstr_t in, input logic [VEC_W-1:0] ld);
    instr = in; ld_data = ld; instr_valid = (in.op != VOP_NOP);
    model(issue_thread, in, ld);
    @(posedge clk); #1;
  endtask

  task automatic run_random(input int n);
    for (int i = 0; i < n; i++) begin
      vinstr_t in;
      logic [VEC_W-1:0] ld;
      pick(issue_thread, in, ld);
      issue(in, ld);
    end
  endtask

  // check the token order over 16 cycles while issuing NOPs
  task automatic check_order(input int seq [8]);
    int start = -1;
    for (int i = 0; i < 8; i++) if (seq[i] == int'(issue_thread)) start = i;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(issue_thread) != seq[(start + i) % 8]) begin
        failures++; $display("FAIL token %0d exp %0d", issue_thread, seq[(start + i) % 8]);
      end
      issue('0, '0);
    end
  endtask

  task automatic load_order(input int seq [8]);
    for (int i = 0; i < 8; i++) begin
      sched_cfg_we = 1'b1; sched_cfg_thread = 3'(seq[i]); sched_cfg_next = 3'(seq[(i+1) % 8]);
      issue('0, '0);
    end
    sched_cfg_we = 1'b0;
    // the token may still be on an old path for up to 8 cycles
    for (int i = 0; i < 8; i++) issue('0, '0);
    n_order_change++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fig [8] = '{0, 7, 2, 5, 4, 3, 6, 1};
    int rr  [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
    int eo  [8] = '{0, 2, 4, 6, 1, 3, 5, 7};
    foreach (op_cnt[i]) op_cnt[i] = 0;
    foreach (gf_sizes[i]) gf_sizes[i] = 0;
    for (int t = 0; t < NTHREADS; t++) begin
      for (int r = 0; r < NVREG; r++) mv[t][r] = '0;
      for (int r = 0; r < NACC; r++) ma[t][r] = '0;
      mgp[t] = '0; mgl[t] = '0; gf_stale[t] = 2'b00;
    end
    instr = '0; instr_valid = 1'b0; ld_data = '0;
    sched_cfg_we = 1'b0; sched_cfg_thread = '0; sched_cfg_next = '0;
    #17 rst_n = 1'b1;
    @(posedge clk); #1;

    check_order(fig);

    // dependent chain in one thread: load, update_shifter on the result,
    // convolve on that, store: each reads what the previous one wrote
    for (int step = 0; step < 4; step++) begin
      automatic vinstr_t in = '0;
      while (issue_thread != 3'd5) issue('0, '0);
      case (step)
        0: begin in.op = VOP_VLOAD; in.vd = 3'd1; end
        1: begin in.op = VOP_UPDATE_SHIFTER; in.va = 3'd0; in.vb = 3'd2; in.vc = 3'd1; in.vd = 3'd1; end
        2: begin in.op = VOP_CONVOLVE; in.va = 3'd1; in.vb = 3'd3; in.vd = 3'd7; end
        3: begin in.op = VOP_VSTORE; in.va = 3'd7; end
      endcase
      issue(in, {4{16'h00A5}});
      n_dep++;
    end

    run_random(4000);

    // vmulreds saturation: thread 3 sums squares of -1.0 until the
    // accumulator clamps
    begin
      automatic vinstr_t in = '0;
      while (issue_thread != 3'd3) issue('0, '0);
      in.op = VOP_VLOAD; in.vd = 3'd0; issue(in, {4{16'h8000}});
      for (int i = 0; i < 80; i++) begin
        while (issue_thread != 3'd3) issue('0, '0);
        in = '0; in.op = VOP_VMULREDS; in.va = 3'd0; in.vb = 3'd0; in.ac = 2'd1;
        issue(in, '0);
      end
      while (issue_thread != 3'd3) issue('0, '0);
      in = '0; in.op = VOP_VACCRD; in.ac = 2'd1; issue(in, '0);
    end

    load_order(rr);
    check_order(rr);
    run_random(3000);
    load_order(eo);
    check_order(eo);
    run_random(3000);
    load_order(fig);
    check_order(fig);

    instr_valid = 1'b0;
    repeat (12) @(posedge clk);
    #1;

    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    for (int o = 1; o < 16; o++) begin
      checks++;
      if (op_cnt[o] == 0) begin failures++; $display("FAIL operation %0d never ran", o); end
    end
    checks++;
    if (n_turbo_sat == 0 || n_flag0 == 0 || n_flag1 == 0 || n_psat == 0 || n_asat == 0 ||
        n_order_change < 3 || n_dep < 4) begin
      failures++;
      $display("FAIL a mechanism never happened: turbo_sat %0d flag0 %0d flag1 %0d psat %0d asat %0d",
               n_turbo_sat, n_flag0, n_flag1, n_psat, n_asat);
    end
    for (int m = 1; m <= 8; m++) if (gf_sizes[m] == 0) begin
      checks++; failures++; $display("FAIL GF field size %0d never used", m);
    end
    $display("ops: %p", op_cnt);
    $display("turbo clamps %0d, ACS flag 0/1 %0d/%0d, product clamps %0d, acc clamps %0d, order changes %0d, GF sizes %p",
             n_turbo_sat, n_flag0, n_flag1, n_psat, n_asat, n_order_change, gf_sizes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
