// tb_viterbi_acs: checks acs_select_metric (output_sel = 1) and acs_set_flag
// (output_sel = 0) against Metric1 = PM1 + MetricIn, Metric2 = PM2 - MetricIn, with random metrics,
// directed ties and wrap-around cases.
module tb_viterbi_acs;
  logic signed [15:0] metric_in, path_metric1, path_metric2;
  logic               output_sel, flag;
  logic        [15:0] data_out;
  int checks = 0, failures = 0;

  viterbi_acs #(.W(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [15:0] mi, p1, p2);
    int m1, m2;
    logic signed [15:0] w1, w2;
    logic [15:0] exp_m, exp_f;
    w1 = p1 + mi;   // 16-bit wrap
    w2 = p2 - mi;
    m1 = w1; m2 = w2;
    exp_m = (m1 > m2) ? w1 : w2;
    exp_f = (m1 > m2) ? 16'd0 : 16'd1;
    metric_in = mi; path_metric1 = p1; path_metric2 = p2;
    output_sel = 1'b1; #1;
    checks++;
    if (data_out !== exp_m) begin
      failures++;
      $display("FAIL metric mi=%0d p1=%0d p2=%0d got %0d exp %0d", mi, p1, p2, $signed(data_out), $signed(exp_m));
    end
    output_sel = 1'b0; #1;
    checks++;
    if (data_out !== exp_f) begin
      failures++;
      $display("FAIL flag mi=%0d p1=%0d p2=%0d got %0d exp %0d", mi, p1, p2, data_out, exp_f);
    end
  endtask

  initial begin
    check(16'sd10, 16'sd100, 16'sd50);
    check(16'sd10, 16'sd50, 16'sd100);
    check(16'sd10, 16'sd77, 16'sd77);      // tie: Metric2, flag 1
    check(-16'sd3, -16'sd200, 16'sd4);
    for (int r = 0; r < 3000; r++)
      check(16'($urandom_range(0, 255)) - 16'sd128, 16'($urandom_range(0, 8191)) - 16'sd4096,
            16'($urandom_range(0, 8191)) - 16'sd4096);
    for (int r = 0; r < 1000; r++)
      check(16'($urandom), 16'($urandom), 16'($urandom));
    for (int r = 0; r < 200; r++) begin   // ties go to Metric2 with flag 1
      automatic logic signed [15:0] p = 16'($urandom), m = 16'($urandom);
      check(m, p, p + 2*m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
