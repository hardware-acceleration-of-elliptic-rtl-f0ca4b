// tb_gf_add: checks the GF(2^m) adder.
// A 4-bit instance is checked against the worked example of GF(2^4)
// ((x^3+x^2+1) + (x^2+x+1) = x^3+x), and the 163-bit instance against
// random operands, comparing with a coefficient-by-coefficient sum mod 2.
module tb_gf_add;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, c4;
  fe_t a, b, c;

  gf_add #(.M(4))   u4   (.a(a4), .b(b4), .c(c4));
  gf_add            u163 (.a(a),  .b(b),  .c(c));

  function automatic fe_t bit_sum(fe_t x, fe_t y);
    fe_t r;
    for (int i = 0; i < M; i++) r[i] = (x[i] + y[i]) % 2;
    return r;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = 4'b1101; b4 = 4'b0111; #1;
    checks++;
    if (c4 !== 4'b1010) begin failures++; $display("FAIL GF(2^4) example: %b", c4); end
    for (int n = 0; n < 50; n++) begin
      a = rand_fe(); b = rand_fe(); #1;
      checks++;
      if (c !== bit_sum(a, b)) begin failures++; $display("FAIL a=%h b=%h c=%h", a, b, c); end
      // subtraction is the same operation: (a + b) + b = a
      b = c ^ b; #1;
      checks++;
      if (b !== a) begin failures++; $display("FAIL subtraction"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
