// tb_turbo_ascs: checks ascs_turbo against an integer reference that clamps
// the exact sum and difference to [-32768, 32767] and takes the larger,
// with directed cases that saturate each way and random operands.
module tb_turbo_ascs;
  logic signed [15:0] metric_in1, metric_in2, metric_out;
  logic               sat_add, sat_sub;
  int checks = 0, failures = 0, nsat = 0;

  turbo_ascs #(.W(16)) dut (.*);

  function automatic int clamp(input int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [15:0] x, y);
    int m1, m2, exp;
    m1 = clamp(int'(x) - int'(y));
    m2 = clamp(int'(x) + int'(y));
    exp = (m1 > m2) ? m1 : m2;
    metric_in1 = x; metric_in2 = y; #1;
    checks++;
    if (int'(metric_out) != exp) begin
      failures++;
      $display("FAIL x=%0d y=%0d got %0d exp %0d", x, y, metric_out, exp);
    end
    checks++;
    if ((sat_add | sat_sub) != ((int'(x)+int'(y)) != m2 || (int'(x)-int'(y)) != m1)) begin
      failures++;
      $display("FAIL sat flags x=%0d y=%0d", x, y);
    end
    if (sat_add | sat_sub) nsat++;
  endtask

  initial begin
    check(16'sd30000, 16'sd10000);    // sum clamps to 32767
    check(-16'sd30000, 16'sd10000);   // difference clamps to -32768
    check(16'sd30000, -16'sd10000);   // difference clamps to 32767
    check(-16'sd32768, -16'sd1);      // sum clamps to -32768
    check(16'sd5, -16'sd7);
    for (int r = 0; r < 5000; r++) check(16'($urandom), 16'($urandom));
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
