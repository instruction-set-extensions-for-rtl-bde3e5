// tb_conv_convolve: checks convolve against a per-bit reference (XOR of the
// state bits whose tap bit is set), with random states and taps, and the
// 3,7,5 code: taps 7 and 5 on a 3-bit state give the two encoder outputs.
module tb_conv_convolve;
  logic [7:0]  state_in;
  logic [15:0] taps;
  logic [1:0]  data_out;
  int checks = 0, failures = 0;

  conv_convolve #(.W(8), .NOUT(2)) dut (.*);

  function automatic logic ref_bit(input logic [7:0] s, input logic [7:0] t);
    logic x = 1'b0;
    for (int i = 0; i < 8; i++) if (t[i]) x = x ^ s[i];
    return x;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int r = 0; r < 2000; r++) begin
      state_in = 8'($urandom);
      taps     = 16'($urandom);
      #1;
      exp = {ref_bit(state_in, taps[15:8]), ref_bit(state_in, taps[7:0])};
      checks++;
      if (data_out !== exp) begin
        failures++;
        $display("FAIL s=%h t=%h got %b exp %b", state_in, taps, data_out, exp);
      end
    end
    // 3,7,5 encoder, all eight 3-bit states
    taps = {8'd5, 8'd7};
    for (int s = 0; s < 8; s++) begin
      state_in = 8'(s);
      #1;
      exp[0] = s[0] ^ s[1] ^ s[2];
      exp[1] = s[0] ^ s[2];
      checks++;
      if (data_out !== exp) begin
        failures++;
        $display("FAIL 3,7,5 s=%0d got %b exp %b", s, data_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
