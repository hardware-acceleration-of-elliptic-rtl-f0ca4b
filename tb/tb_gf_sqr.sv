// tb_gf_sqr: checks the single-cycle squarer. The first vector is the
// published squaring example for GF(2^163):
//   (66748f33a4799d23cce91e4beef25f7792fbbc92e)^2 =
//    6237e711bf388df9c46fce237e711bf388df9c43a.
// Further vectors are random and compared with a bit-serial multiplication
// of the operand by itself; x^(m-1) and all-ones exercise the high part.
module tb_gf_sqr;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;

  fe_t a, z;
  gf_sqr u_dut (.a(a), .z(z));

  task automatic check(input fe_t exp);
    #1;
    checks++;
    if (z !== exp) begin failures++; $display("FAIL a=%h z=%h exp=%h", a, z, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 163'h66748f33a4799d23cce91e4beef25f7792fbbc92e;
    check(163'h6237e711bf388df9c46fce237e711bf388df9c43a);
    a = fe_t'(1) << (M-1);  check(ref_mul(a, a));
    a = '1;                 check(ref_mul(a, a));
    a = '0;                 check('0);
    a = fe_t'(1);           check(fe_t'(1));
    for (int n = 0; n < 200; n++) begin
      a = rand_fe();
      check(ref_mul(a, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
