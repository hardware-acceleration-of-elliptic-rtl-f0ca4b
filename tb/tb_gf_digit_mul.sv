// tb_gf_digit_mul: checks R(x) W(x) mod F(x) for a 32-bit digit (the
// default) and an 8-bit digit against a bit-serial reference multiplier,
// with random and corner-case operands (zero digit, all-ones digit, W with
// its top bit set so that every shift stage must reduce).
module tb_gf_digit_mul;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] r32;
  logic [7:0]  r8;
  fe_t w, p32, p8;

  gf_digit_mul                u32 (.r(r32), .w(w), .p(p32));
  gf_digit_mul #(.G(8))       u8  (.r(r8),  .w(w), .p(p8));

  task automatic check(input string what);
    #1;
    checks += 2;
    if (p32 !== ref_mul(fe_t'(r32), w)) begin
      failures++; $display("FAIL %s G=32 r=%h w=%h p=%h", what, r32, w, p32);
    end
    if (p8 !== ref_mul(fe_t'(r8), w)) begin
      failures++; $display("FAIL %s G=8 r=%h w=%h p=%h", what, r8, w, p8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r32 = '0; r8 = '0; w = rand_fe(); check("zero digit");
    r32 = '1; r8 = '1; w = '1;        check("all ones");
    r32 = 32'h8000_0000; r8 = 8'h80; w = fe_t'(1) << (M-1); check("top bits");
    for (int n = 0; n < 200; n++) begin
      r32 = $urandom; r8 = 8'($urandom); w = rand_fe();
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
