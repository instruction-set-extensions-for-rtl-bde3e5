// tb_conv_update_shifter: exhaustive check of the update_shifter datapath
// over every constraint length and input length (1..8), with random Data In
// and Current State, against a bit-serial reference that shifts one bit at
// a time into a shift register of the constraint length. Also checks the
// 1/2-rate 3,7,5 example encoder's state sequence for a short bit stream.
module tb_conv_update_shifter;
  logic [7:0] data_in, state_in, next_state;
  logic [2:0] cl_m1, il_m1;
  int checks = 0, failures = 0;

  conv_update_shifter #(.W(8)) dut (.*);

  // serial reference: shift il bits (bit 0 first) into the top of a cl-bit register
  function automatic logic [7:0] ref_shift(input logic [7:0] st, input logic [7:0] d,
                                           input int cl, input int il);
    logic [7:0] s;
    s = st & 8'((1 << cl) - 1);
    for (int i = 0; i < il; i++) begin
      s = s >> 1;
      s[cl-1] = d[i];
    end
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int cl = 1; cl <= 8; cl++)
      for (int il = 1; il <= cl; il++)
        for (int r = 0; r < 20; r++) begin
          cl_m1    = 3'(cl - 1);
          il_m1    = 3'(il - 1);
          data_in  = 8'($urandom);
          state_in = 8'($urandom) & 8'((1 << cl) - 1);
          #1;
          exp = ref_shift(state_in, data_in, cl, il);
          checks++;
          if (next_state !== exp) begin
            failures++;
            $display("FAIL cl=%0d il=%0d d=%h s=%h got %h exp %h",
                     cl, il, data_in, state_in, next_state, exp);
          end
        end
    // 3,7,5 encoder: constraint length 3, one bit at a time: 1,0,1,1
    state_in = 8'b000; cl_m1 = 3'd2; il_m1 = 3'd0;
    begin
      logic [7:0] seq_exp [4] = '{8'b100, 8'b010, 8'b101, 8'b110};
      logic       bits    [4] = '{1'b1, 1'b0, 1'b1, 1'b1};
      for (int i = 0; i < 4; i++) begin
        data_in = {7'b0, bits[i]};
        #1;
        checks++;
        if (next_state !== seq_exp[i]) begin
          failures++;
          $display("FAIL 3,7,5 step %0d got %b exp %b", i, next_state, seq_exp[i]);
        end
        state_in = next_state;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
