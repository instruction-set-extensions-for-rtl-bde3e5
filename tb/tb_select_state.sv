// tb_select_state: checks that select_state returns State1 for a zero flag
// and State2 for any non-zero flag.
module tb_select_state;
  logic [15:0] flag, state1, state2, state_out;
  int checks = 0, failures = 0;

  select_state #(.W(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2000; r++) begin
      state1 = 16'($urandom);
      state2 = 16'($urandom);
      case (r % 4)
        0: flag = 16'd0;
        1: flag = 16'd1;
        2: flag = 16'h8000;
        default: flag = 16'($urandom);
      endcase
      #1;
      checks++;
      if (state_out !== ((flag == 16'd0) ? state1 : state2)) begin
        failures++;
        $display("FAIL flag=%h s1=%h s2=%h got %h", flag, state1, state2, state_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
