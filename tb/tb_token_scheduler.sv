// tb_token_scheduler: checks the reset token order T0 T7 T2 T5 T4 T3 T6 T1
// over several rounds (one new thread per clock), then reprograms the table
// to round robin and to an even/odd order and checks those sequences.
module tb_token_scheduler;
  logic       clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0;
  logic [2:0] cfg_thread = '0, cfg_next = '0, token;
  int checks = 0, failures = 0;

  token_scheduler #(.NT(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seq(input int seq [8], input int rounds);
    for (int r = 0; r < rounds; r++)
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (token !== 3'(seq[i])) begin
          failures++;
          $display("FAIL round %0d pos %0d token %0d exp %0d", r, i, token, seq[i]);
        end
        @(posedge clk); #1;
      end
  endtask

  task automatic load_order(input int seq [8]);
    // rewrite the table while the token runs; the new order starts at T0
    for (int i = 0; i < 8; i++) begin
      cfg_we = 1'b1; cfg_thread = 3'(seq[i]); cfg_next = 3'(seq[(i+1) % 8]);
      @(posedge clk); #1;
    end
    cfg_we = 1'b0;
    while (token != 3'd0) begin @(posedge clk); #1; end
  endtask

  initial begin
    int fig  [8] = '{0, 7, 2, 5, 4, 3, 6, 1};
    int rr   [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
    int eo   [8] = '{0, 2, 4, 6, 1, 3, 5, 7};
    #12 rst_n = 1'b1; #1;
    expect_seq(fig, 3);
    load_order(rr);
    expect_seq(rr, 2);
    load_order(eo);
    expect_seq(eo, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
