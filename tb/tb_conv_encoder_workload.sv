// tb_conv_encoder_workload: encodes a 512-bit packet with a rate-1/2,
// constraint-length-5 convolutional code (generators 1+D^3+D^4 and
// 1+D+D^3+D^4) on the full vector unit, using update_shifter and convolve.
//
// The packet is cut into 32 segments of 16 bits, one per lane of each of
// the eight threads. Each lane starts from the encoder state left by the
// bits before its segment, so the 32 streams together produce exactly the
// serial encoder's output. Per input bit a thread issues VLOAD (the next bit
// of each of its four segments), UPDATE_SHIFTER, CONVOLVE and VSTORE. The
// 1024 encoded bits are compared with a direct evaluation of the code
// (out_k[n] = XOR over j of g_k[j] * u[n-j]), and the cycle count from the
// first issue to the last result is printed.
module tb_conv_encoder_workload;
  import sb_vpu_pkg::*;

  localparam int NBITS = 512, CL = 5, SEG = 16, NSEG = NBITS / SEG;

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

  logic       u [NBITS];
  logic [4:0] g0 = 5'b11001, g1 = 5'b11011;  // g[j] = coefficient of D^j

  function automatic slot_t op(input vop_e o, input int vd, input int va, input int vb,
                               input int vc, input logic [VEC_W-1:0] ld);
    slot_t s = '0;
    s.in.op = o; s.in.vd = VREG_W'(vd); s.in.va = VREG_W'(va);
    s.in.vb = VREG_W'(vb); s.in.vc = VREG_W'(vc); s.ld = ld;
    return s;
  endfunction

  function automatic logic ubit(input int n);
    return (n < 0) ? 1'b0 : u[n];
  endfunction

  always @(negedge clk) if (rst_n && st_valid) outs[st_thread].push_back(st_data);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] taps;
    longint first = -1, last = 0, cyc = 0;
    for (int n = 0; n < NBITS; n++) u[n] = 1'($urandom);
    // taps: state bit CL-1-j holds u[n-j]
    taps = '0;
    for (int j = 0; j < CL; j++) begin
      taps[CL-1-j]     = g0[j];
      taps[8 + CL-1-j] = g1[j];
    end
    for (int t = 0; t < NTHREADS; t++) begin
      automatic logic [VEC_W-1:0] st0 = '0;
      for (int l = 0; l < LANES; l++) begin
        automatic int s = t * LANES + l;
        // state after the bit before the segment: bit CL-1-j = u[16s-1-j]
        for (int j = 0; j < CL; j++) st0[l*16 + CL-1-j] = ubit(s*SEG - 1 - j);
      end
      prog[t].push_back(op(VOP_VLOAD, 2, 0, 0, 0, {4{16'(((CL-1) << 4) | 0)}}));
      prog[t].push_back(op(VOP_VLOAD, 3, 0, 0, 0, {4{taps}}));
      prog[t].push_back(op(VOP_VLOAD, 1, 0, 0, 0, st0));
      for (int i = 0; i < SEG; i++) begin
        automatic logic [VEC_W-1:0] d = '0;
        for (int l = 0; l < LANES; l++) d[l*16] = u[(t*LANES + l)*SEG + i];
        prog[t].push_back(op(VOP_VLOAD, 0, 0, 0, 0, d));
        prog[t].push_back(op(VOP_UPDATE_SHIFTER, 1, 0, 2, 1, '0));
        prog[t].push_back(op(VOP_CONVOLVE, 7, 1, 3, 0, '0));
        prog[t].push_back(op(VOP_VSTORE, 0, 7, 0, 0, '0));
      end
    end
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
    while (1) begin
      automatic int got = 0;
      for (int t = 0; t < NTHREADS; t++) got += outs[t].size();
      if (got == NTHREADS * SEG) break;
      @(posedge clk); #1;
      cyc++;
    end
    last = cyc;
    for (int t = 0; t < NTHREADS; t++)
      for (int i = 0; i < SEG; i++) begin
        automatic logic [VEC_W-1:0] o = outs[t][i];
        for (int l = 0; l < LANES; l++) begin
          automatic int n = (t*LANES + l)*SEG + i;
          automatic logic e0 = 1'b0, e1 = 1'b0;
          for (int j = 0; j < CL; j++) begin
            e0 ^= g0[j] & ubit(n - j);
            e1 ^= g1[j] & ubit(n - j);
          end
          checks++;
          if (o[l*16 +: 2] !== {e1, e0}) begin
            failures++;
            if (failures < 10) $display("FAIL bit %0d got %b exp %b", n, o[l*16 +: 2], {e1, e0});
          end
        end
      end
    $display("encoded %0d bits (%0d output bits) in %0d cycles", NBITS, 2*NBITS, last - first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
