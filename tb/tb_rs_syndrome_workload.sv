// tb_rs_syndrome_workload: the syndrome step of Reed-Solomon decoding for
// the DVB-T code RS(204,188) over GF(256) (field polynomial
// x^8+x^4+x^3+x^2+1, generator roots alpha^0 .. alpha^15, T = 8), run on
// the full vector unit with the gfmac2 operation.
//
// Each vector register holds eight syndromes (two per lane). Per received
// symbol r_i, taken from the highest power down, a thread issues VLOAD (r_i
// in all eight bytes) and GFMAC2 S = S (x) alpha^j (+) r_i: Horner's rule
// for S_j = r(alpha^j). Threads 0 and 1 compute S_0..7 and S_8..15 of an
// error-free codeword, threads 2 and 3 those of the same codeword with
// eight symbol errors. The codeword is encoded systematically here by
// polynomial division. Checked: all 16 syndromes of the clean word are zero,
// and those of the corrupted word equal a direct evaluation and are not all
// zero. The cycle count of the syndrome step is printed.
module tb_rs_syndrome_workload;
  import sb_vpu_pkg::*;

  localparam int N = 204, K = 188, NP = N - K;

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

  typedef struct packed { vinstr_t in; logic [VEC_W-1:0] ld; } slot_t;
  slot_t prog [NTHREADS][$];
  logic [VEC_W-1:0] outs [NTHREADS][$];

  logic [7:0] cw [N];    // cw[i] = coefficient of x^i
  logic [7:0] rx [N];    // corrupted copy

  // GF(256) multiply modulo x^8+x^4+x^3+x^2+1, bit-serial
  function automatic logic [7:0] gm(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = '0, x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1D) : (x << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] apow(input int e);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < e; i++) r = gm(r, 8'h02);
    return r;
  endfunction

  function automatic slot_t op(input vop_e o, input int vd, input int va, input int vb,
                               input int vc, input logic [VEC_W-1:0] ld);
    slot_t s = '0;
    s.in.op = o; s.in.vd = VREG_W'(vd); s.in.va = VREG_W'(va);
    s.in.vb = VREG_W'(vb); s.in.vc = VREG_W'(vc); s.ld = ld;
    return s;
  endfunction

  task automatic make_program(input int t, input int base, input logic [7:0] word [N]);
    logic [VEC_W-1:0] al = '0, cfg = '0;
    for (int k = 0; k < 8; k++) al[8*k +: 8] = apow(base + k);
    cfg[GFCFG_L_LSB +: 3] = 3'd7;
    cfg[GFCFG_P_LSB +: 8] = 8'h1D;
    prog[t].push_back(op(VOP_VLOAD, 6, 0, 0, 0, cfg));
    prog[t].push_back(op(VOP_SET_GFCFG, 0, 6, 0, 0, '0));
    prog[t].push_back(op(VOP_VLOAD, 5, 0, 0, 0, al));
    prog[t].push_back(op(VOP_VLOAD, 1, 0, 0, 0, '0));
    for (int i = N - 1; i >= 0; i--) begin
      prog[t].push_back(op(VOP_VLOAD, 0, 0, 0, 0, {8{word[i]}}));
      prog[t].push_back(op(VOP_GFMAC2, 1, 1, 5, 0, '0));
    end
    prog[t].push_back(op(VOP_VSTORE, 0, 1, 0, 0, '0));
  endtask

  always @(negedge clk) if (rst_n && st_valid) outs[st_thread].push_back(st_data);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] g [NP+1];
    logic [7:0] rem [NP];
    longint first = -1, cyc = 0;
    int nonzero = 0;
    // generator g(x) = prod_{i=0}^{15} (x + alpha^i), g[k] = coefficient of x^k
    foreach (g[k]) g[k] = 8'h00;
    g[0] = 8'h01;
    for (int i = 0; i < NP; i++) begin
      logic [7:0] ai;
      ai = apow(i);
      for (int k = NP; k > 0; k--) g[k] = g[k-1] ^ gm(g[k], ai);
      g[0] = gm(g[0], ai);
    end
    // systematic encoding: message in x^16 .. x^203, parity = remainder
    for (int i = NP; i < N; i++) cw[i] = 8'($urandom);
    foreach (rem[k]) rem[k] = 8'h00;
    for (int i = N - 1; i >= NP; i--) begin
      logic [7:0] fb;
      fb = cw[i] ^ rem[NP-1];
      for (int k = NP - 1; k > 0; k--) rem[k] = rem[k-1] ^ gm(fb, g[k]);
      rem[0] = gm(fb, g[0]);
    end
    for (int k = 0; k < NP; k++) cw[k] = rem[k];
    rx = cw;
    for (int e = 0; e < 8; e++) begin
      int pos;
      pos = e * 25 + 3;
      rx[pos] = rx[pos] ^ 8'($urandom_range(1, 255));
    end

    make_program(0, 0, cw);
    make_program(1, 8, cw);
    make_program(2, 0, rx);
    make_program(3, 8, rx);

    instr = '0; instr_valid = 1'b0; ld_data = '0;
    #17 rst_n = 1'b1;
    @(posedge clk); #1;
    while (1) begin
      automatic int busy = 0;
      for (int t = 0; t < NTHREADS; t++) busy += prog[t].size();
      if (busy == 0) break;
      if (prog[issue_thread].size() > 0) begin
        automatic slot_t s = prog[issue_thread].pop_front();
        instr = s.in; ld_data = s.ld; instr_valid = 1'b1;
        if (first < 0) first = cyc;
      end else begin
        instr = '0; instr_valid = 1'b0;
      end
      @(posedge clk); #1;
      cyc++;
    end
    instr_valid = 1'b0;
    while (outs[0].size() + outs[1].size() + outs[2].size() + outs[3].size() < 4) begin
      @(posedge clk); #1;
      cyc++;
    end
    for (int t = 0; t < 4; t++) begin
      logic [VEC_W-1:0] o;
      o = outs[t][0];
      for (int k = 0; k < 8; k++) begin
        int j;
        logic [7:0] e, aj;
        j = (t % 2) * 8 + k;
        e = 8'h00;
        aj = apow(j);
        for (int i = N - 1; i >= 0; i--) e = gm(e, aj) ^ ((t < 2) ? cw[i] : rx[i]);
        checks++;
        if (o[8*k +: 8] !== e || (t < 2 && e != 8'h00)) begin
          failures++;
          $display("FAIL thread %0d S%0d got %h exp %h", t, j, o[8*k +: 8], e);
        end
        if (t >= 2 && e != 8'h00) nonzero++;
      end
    end
    checks++;
    if (nonzero == 0) begin failures++; $display("FAIL corrupted word has zero syndromes"); end
    $display("16 syndromes of two RS(204,188) words in %0d cycles (%0d non-zero for the corrupted word)",
             cyc - first, nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
