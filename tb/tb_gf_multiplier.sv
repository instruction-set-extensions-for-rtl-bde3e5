// tb_gf_multiplier: checks the 8x8 carry-less multiplier against a
// shift-and-XOR reference, exhaustively over all 65536 operand pairs.
module tb_gf_multiplier;
  logic [7:0]  a, b;
  logic [14:0] c;
  int checks = 0, failures = 0;

  gf_multiplier #(.W(8)) dut (.*);

  function automatic logic [14:0] clmul(input logic [7:0] x, input logic [7:0] y);
    logic [14:0] r = '0;
    for (int i = 0; i < 8; i++) if (y[i]) r = r ^ (15'(x) << i);
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (c !== clmul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %h*%h got %h exp %h", a, b, c, clmul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
