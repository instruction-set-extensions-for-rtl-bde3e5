// tb_gf_poly_reduce: checks the 15-to-8-bit reduction against polynomial
// long division modulo x^8 + P(x), for random products and polynomials and
// for the DVB-T field polynomial x^8+x^4+x^3+x^2+1.
module tb_gf_poly_reduce;
  logic [14:0] c;
  logic [7:0]  p, r;
  int checks = 0, failures = 0;

  gf_poly_reduce #(.W(8)) dut (.*);

  function automatic logic [7:0] polymod(input logic [14:0] v, input logic [7:0] pp);
    logic [15:0] x = {1'b0, v};
    logic [8:0]  full = {1'b1, pp};
    for (int k = 14; k >= 8; k--)
      if (x[k]) x[k -: 9] = x[k -: 9] ^ full;
    return x[7:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // x^8 mod (x^8+x^4+x^3+x^2+1) = 0x1D, x^14 -> table value
    p = 8'h1D;
    c = 15'h0100; #1; checks++;
    if (r !== 8'h1D) begin failures++; $display("FAIL x^8 got %h", r); end
    for (int k = 0; k < 15; k++) begin
      c = 15'(1) << k; #1; checks++;
      if (r !== polymod(c, p)) begin failures++; $display("FAIL x^%0d got %h", k, r); end
    end
    for (int n = 0; n < 5000; n++) begin
      c = 15'($urandom); p = 8'($urandom); #1;
      checks++;
      if (r !== polymod(c, p)) begin
        failures++;
        $display("FAIL c=%h p=%h got %h exp %h", c, p, r, polymod(c, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
