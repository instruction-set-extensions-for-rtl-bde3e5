// tb_gf_mac_unit: checks the GFMAC unit (and a GFMUL instance) for every
// field length m = 1..8 with random field polynomials and operands, against
// a bit-serial GF(2^m) multiplier (multiply by x and reduce, one bit at a
// time), plus the DVB-T field GF(256) with x^8+x^4+x^3+x^2+1 and the
// known products 02*80 = 1D and the generator power table.
module tb_gf_mac_unit;
  logic [7:0] a, b, acc, p, data_out, mul_out;
  logic [2:0] l;
  logic       mac;
  int checks = 0, failures = 0;

  gf_mac_unit #(.HAS_ACC(1'b1)) dut (.*);
  gf_mac_unit #(.HAS_ACC(1'b0)) dut_mul (.a, .b, .acc, .mac, .p, .l, .data_out(mul_out));

  // GF(2^m) multiply modulo x^m + praw, bit-serial
  function automatic logic [7:0] gfm(input logic [7:0] x, input logic [7:0] y,
                                     input int m, input logic [7:0] praw);
    logic [8:0] aa = {1'b0, x};
    logic [7:0] r  = '0;
    logic [7:0] mask = 8'((1 << m) - 1);
    for (int i = 0; i < m; i++) begin
      if (y[i]) r = r ^ aa[7:0];
      aa = aa << 1;
      if (aa[m]) aa = (aa ^ (9'(1) << m)) ^ {1'b0, praw};
      aa = aa & {1'b0, mask};
    end
    return r & mask;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int m, input logic [7:0] praw);
    logic [7:0] mask, e;
    mask = 8'((1 << m) - 1);
    l   = 3'(m - 1);
    p   = 8'(praw << (8 - m));
    a   = 8'($urandom) & mask;
    b   = 8'($urandom) & mask;
    acc = 8'($urandom) & mask;
    mac = 1'($urandom);
    #1;
    e = gfm(a, b, m, praw);
    checks++;
    if (data_out !== (mac ? (e ^ acc) : e)) begin
      failures++;
      $display("FAIL m=%0d p=%h a=%h b=%h acc=%h mac=%0d got %h exp %h",
               m, praw, a, b, acc, mac, data_out, mac ? (e ^ acc) : e);
    end
    checks++;
    if (mul_out !== e) begin
      failures++;
      $display("FAIL gfmul m=%0d a=%h b=%h got %h exp %h", m, a, b, mul_out, e);
    end
  endtask

  initial begin
    logic [7:0] pw;
    // DVB-T field
    l = 3'd7; p = 8'h1D; mac = 1'b0; acc = 8'h00;
    a = 8'h02; b = 8'h80; #1; checks++;
    if (data_out !== 8'h1D) begin failures++; $display("FAIL 02*80 got %h", data_out); end
    // alpha^i by repeated multiplication by 02 must run through all 255 non-zero elements
    pw = 8'h01;
    for (int i = 0; i < 255; i++) begin
      a = pw; b = 8'h02; #1;
      pw = data_out;
      checks++;
      if ((pw == 8'h01) != (i == 254)) begin
        failures++; $display("FAIL alpha order at %0d", i);
      end
    end
    // mac adds
    a = 8'h53; b = 8'hCA; acc = 8'h0F; mac = 1'b1; #1; checks++;
    if (data_out !== (gfm(8'h53, 8'hCA, 8, 8'h1D) ^ 8'h0F)) begin
      failures++; $display("FAIL mac 53*CA^0F got %h", data_out);
    end
    for (int m = 1; m <= 8; m++)
      for (int n = 0; n < 400; n++)
        check(m, 8'($urandom) & 8'((1 << m) - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
