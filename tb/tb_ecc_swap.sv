// tb_ecc_swap: checks that the ladder points pass unchanged for sw = 0 and
// are exchanged, X with X and Z with Z, for sw = 1.
module tb_ecc_swap;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic sw;
  fe_t x1, z1, x2, z2, x1o, z1o, x2o, z2o;

  ecc_swap u_dut (.sw(sw), .x1(x1), .z1(z1), .x2(x2), .z2(z2),
                  .x1_o(x1o), .z1_o(z1o), .x2_o(x2o), .z2_o(z2o));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      x1 = rand_fe(); z1 = rand_fe(); x2 = rand_fe(); z2 = rand_fe();
      sw = n[0]; #1;
      checks++;
      if (sw ? {x1o, z1o, x2o, z2o} !== {x2, z2, x1, z1}
             : {x1o, z1o, x2o, z2o} !== {x1, z1, x2, z2}) begin
        failures++; $display("FAIL sw=%0d", sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
