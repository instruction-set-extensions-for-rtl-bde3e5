// tb_reduction_unit: checks vmulreds against an integer reference: each
// product 2*a*b clamped to 32 bits, added in lane order to the accumulator
// with a 40-bit clamp after each addition. Includes the -1*-1 product clamp
// and accumulator clamps at both ends.
module tb_reduction_unit;
  import sb_vpu_pkg::*;
  logic [63:0] a, b;
  logic [39:0] acc_in, acc_out;
  logic        sat_prod, sat_acc;
  int checks = 0, failures = 0, nsp = 0, nsa = 0;

  reduction_unit dut (.*);

  function automatic longint ref_red(input logic [63:0] x, input logic [63:0] y, input logic [39:0] ac);
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
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] x, input logic [63:0] y, input logic [39:0] ac);
    longint e;
    a = x; b = y; acc_in = ac; #1;
    e = ref_red(x, y, ac);
    checks++;
    if (acc_out !== 40'(e)) begin
      failures++;
      $display("FAIL a=%h b=%h acc=%h got %h exp %h", x, y, ac, acc_out, 40'(e));
    end
    if (sat_prod) nsp++;
    if (sat_acc) nsa++;
  endtask

  initial begin
    check({4{16'h8000}}, {4{16'h8000}}, 40'd0);                 // four clamped products
    check({4{16'h7FFF}}, {4{16'h7FFF}}, 40'h7F_FFFF_FFF0);       // positive acc clamp
    check({4{16'h8000}}, {4{16'h7FFF}}, 40'h80_0000_0010);       // negative acc clamp
    check({16'd1, 16'd2, 16'd3, 16'd4}, {16'd1, 16'd2, 16'd3, 16'd4}, 40'd5);
    for (int r = 0; r < 3000; r++)
      check({$urandom, $urandom}, {$urandom, $urandom}, {8'($urandom), $urandom});
    checks++;
    if (nsp == 0 || nsa == 0) begin failures++; $display("FAIL saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
