// tb_vpe_ext: drives one VPE's extension datapath with every extension
// operation and random operands (lengths, field sizes and polynomials
// included), and compares with a reference written from the operation
// definitions. GF operands are kept inside the selected field. A second
// instance with one GFMUL unit per lane is checked as well: there every GF
// operation gives the plain product of the low bytes.
module tb_vpe_ext;
  import sb_vpu_pkg::*;
  vop_e        op;
  logic [15:0] a, b, c, result;
  gfcfg_t      gfcfg;
  logic        ev_turbo_sat, ev_acs_flag;
  int checks = 0, failures = 0;
  int seen [16];

  vpe_ext #(.NGF(2), .GF_MAC(1'b1)) dut (.*);

  // the one-GFMUL-unit variant (gfmul hardware only)
  logic [15:0] result1;
  logic        ev1_t, ev1_a;
  vpe_ext #(.NGF(1), .GF_MAC(1'b0)) dut1 (.op, .a, .b, .c, .gfcfg, .result(result1),
                                          .ev_turbo_sat(ev1_t), .ev_acs_flag(ev1_a));

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

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vop_e ops [10] = '{VOP_UPDATE_SHIFTER, VOP_CONVOLVE, VOP_ACS_SELECT_METRIC,
                       VOP_ACS_SET_FLAG, VOP_SELECT_STATE, VOP_ASCS_TURBO,
                       VOP_GFMUL, VOP_GFMAC, VOP_GFMUL2, VOP_GFMAC2};
    logic [15:0] e;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 20000; n++) begin
      int m;
      logic [7:0] mask;
      op = ops[$urandom_range(0, 9)];
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      m = $urandom_range(1, 8);
      mask = 8'((1 << m) - 1);
      gfcfg.l = 3'(m - 1);
      gfcfg.p = 8'((8'($urandom) & mask) << (8 - m));
      if (op == VOP_UPDATE_SHIFTER) begin
        automatic int cl = $urandom_range(1, 8);
        b = {9'b0, 3'(cl - 1), 1'b0, 3'($urandom_range(0, cl - 1))};
      end
      if (op inside {VOP_GFMUL, VOP_GFMAC, VOP_GFMUL2, VOP_GFMAC2}) begin
        a = a & {mask, mask}; b = b & {mask, mask}; c = c & {mask, mask};
      end
      if (op == VOP_SELECT_STATE && n % 2 == 0) a = 16'd0;
      #1;
      e = ref_lane(op, a, b, c, gfcfg.p, gfcfg.l);
      checks++;
      seen[op]++;
      if (op inside {VOP_GFMUL, VOP_GFMAC, VOP_GFMUL2, VOP_GFMAC2})
        e = ref_lane(VOP_GFMUL, a, b, c, gfcfg.p, gfcfg.l);
      checks++;
      if (result1 !== e) begin
        failures++;
        if (failures < 20) $display("FAIL 1-unit op=%s a=%h b=%h got %h exp %h", op.name(), a, b, result1, e);
      end
      e = ref_lane(op, a, b, c, gfcfg.p, gfcfg.l);
      if (result !== e) begin
        failures++;
        if (failures < 20) $display("FAIL op=%s a=%h b=%h c=%h got %h exp %h",
                                    op.name(), a, b, c, result, e);
      end
    end
    foreach (ops[i]) begin
      checks++;
      if (seen[ops[i]] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
