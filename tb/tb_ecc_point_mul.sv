// tb_ecc_point_mul: end-to-end test of the scalar multiplier at its default
// size (GF(2^163), G = 32, curve B-163), no parameter overrides.
//
// Vectors:
//   * the published example: k = 6237e711bf388df9c46fce237e711bf388df9c43a
//     times the B-163 base point G; the expected kP was computed with an
//     independent software model;
//   * random full-length keys and random short keys times G and times 2G,
//     checked against affine double-and-add in tb_gf_ref_pkg;
//   * k = 1, 2, 3 (no ladder iteration, one iteration with/without swap);
//   * k = 0 and x = 0 (reported as the point at infinity at once);
//   * k = n, the group order: the ladder ends with Z1 = 0, so kP is the
//     point at infinity.
// Each result is also checked for lying on the curve. The latency of every
// run is compared with 4 + (l-1)(3(s+1)+1) + 6s + 7 + L_inv cycles (one
// less for k = 1, which skips the initial swap cycle), where l is the bit
// length of k, 3(s+1)+1 is the "3M + A" ladder iteration,
// and L_inv = 225 is the inverter latency. The test counts how often each
// mechanism happened: the initial swap, a swap between iterations, an
// iteration without swap, the final swap for k_0 = 1, the Z1 = 0 infinity
// exit, the k = 0 / x = 0 exit, the inversion, and a zero-iteration ladder;
// a mechanism that never happened is a failure.
module tb_ecc_point_mul;
  import tb_gf_ref_pkg::*;
  import gf2m_pkg::B163_B, gf2m_pkg::B163_GX, gf2m_pkg::B163_GY, gf2m_pkg::B163_N;
  int checks = 0, failures = 0;

  localparam int   S     = (M + 31) / 32;
  localparam int   L_INV = 225;
  localparam fe_t  CA    = fe_t'(1);      // curve coefficient a of B-163

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, q_inf;
  fe_t  xp, yp, k, xq, yq;

  ecc_point_mul u_dut (.clk(clk), .rst_n(rst_n), .start(start), .xp(xp),
                       .yp(yp), .k(k), .busy(busy), .done(done), .xq(xq),
                       .yq(yq), .q_infinity(q_inf));

  always #5 clk = ~clk;

  // ---- mechanism counters (observed inside the design) ----
  int n_init_swap = 0, n_mid_swap = 0, n_no_swap = 0, n_last_swap = 0;
  int n_z1_inf = 0, n_zero_exit = 0, n_inversions = 0, n_no_iter = 0;

  always @(posedge clk) if (rst_n) begin
    if (u_dut.state_q == u_dut.S_INIT2 && u_dut.sw) n_init_swap++;
    if (u_dut.state_q == u_dut.S_L_W3 && u_dut.m_idle) begin
      if (u_dut.i_q == '0) begin
        if (u_dut.sw) n_last_swap++;
      end else if (u_dut.sw) n_mid_swap++;
      else n_no_swap++;
    end
    if (u_dut.state_q == u_dut.S_C_CHK && u_dut.z1_q == '0) n_z1_inf++;
    if (u_dut.state_q == u_dut.S_INIT0 && (u_dut.k_q == '0 || u_dut.x_q == '0)) n_zero_exit++;
    if (u_dut.inv_start) n_inversions++;
    if (u_dut.state_q == u_dut.S_INIT1 && u_dut.msb == '0) n_no_iter++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitlen(fe_t v);
    int l = 0;
    for (int i = 0; i < M; i++) if (v[i]) l = i + 1;
    return l;
  endfunction

  function automatic bit on_curve(fe_t x, fe_t y);
    return (ref_sqr(y) ^ ref_mul(x, y)) ==
           (ref_mul(ref_sqr(x), x) ^ ref_mul(CA, ref_sqr(x)) ^ B163_B);
  endfunction

  task automatic run(input string what, input fe_t tk, input fe_t px, input fe_t py,
                     input pt_t exp, input bit check_latency);
    int cyc = 0;
    int exp_cyc;
    xp = px; yp = py; k = tk; start = 1'b1;
    @(posedge clk); #1 start = 1'b0; xp = rand_fe(); yp = rand_fe(); k = rand_fe();
    while (!done && cyc < 100000) begin cyc++; @(posedge clk); #1; end
    cyc++;
    checks++;
    if (exp.inf) begin
      if (!q_inf || xq !== '0 || yq !== '0) begin
        failures++; $display("FAIL %s: expected infinity, got inf=%0d x=%h y=%h", what, q_inf, xq, yq);
      end
    end else begin
      if (q_inf || xq !== exp.x || yq !== exp.y) begin
        failures++;
        $display("FAIL %s: k=%h\n  got inf=%0d x=%h y=%h\n  exp x=%h y=%h", what, tk, q_inf, xq, yq, exp.x, exp.y);
      end
      checks++;
      if (!on_curve(xq, yq)) begin failures++; $display("FAIL %s: result not on curve", what); end
    end
    if (check_latency) begin
      exp_cyc = ((bitlen(tk) > 1) ? 4 : 3) + (bitlen(tk) - 1) * (3 * (S + 1) + 1) + 6 * S + 7 + L_INV;
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL %s: latency %0d, expected %0d", what, cyc, exp_cyc); end
    end
    $display("%s: %0d cycles", what, cyc);
  endtask

  initial begin
    pt_t g, g2, e, inf;
    fe_t kk;
    g.inf = 1'b0; g.x = B163_GX; g.y = B163_GY;
    inf.inf = 1'b1; inf.x = '0; inf.y = '0;
    start = 1'b0; xp = '0; yp = '0; k = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    checks++;
    if (!on_curve(B163_GX, B163_GY)) begin failures++; $display("FAIL base point"); end

    e.inf = 1'b0;
    e.x = 163'h44f853643f0e22b8e075b59189b93cb964185fb0f;
    e.y = 163'h71e650e3bcf041c554e3314512321899ddbe2d283;
    run("published key", 163'h6237e711bf388df9c46fce237e711bf388df9c43a, g.x, g.y, e, 1);

    run("k=1", fe_t'(1), g.x, g.y, g, 1);
    g2 = ref_add(g, g, CA);
    run("k=2", fe_t'(2), g.x, g.y, g2, 1);
    run("k=3", fe_t'(3), g.x, g.y, ref_add(g2, g, CA), 1);
    run("k=0", '0, g.x, g.y, inf, 0);
    run("x=0", fe_t'(12345), '0, rand_fe(), inf, 0);
    run("k=n", B163_N, g.x, g.y, inf, 0);

    for (int n = 0; n < 4; n++) begin
      kk = rand_fe() >> ($urandom % 150);
      if (kk == '0) kk = fe_t'(7);
      run("short key on G", kk, g.x, g.y, ref_smul(kk, g, CA), 1);
    end
    kk = rand_fe();
    run("random key on G", kk, g.x, g.y, ref_smul(kk, g, CA), 1);
    kk = rand_fe() >> 100;
    run("short key on 2G", kk, g2.x, g2.y, ref_smul(kk, g2, CA), 1);

    $display("mechanisms: init_swap=%0d mid_swap=%0d no_swap=%0d last_swap=%0d z1_inf=%0d zero_exit=%0d inversions=%0d no_iter=%0d",
             n_init_swap, n_mid_swap, n_no_swap, n_last_swap, n_z1_inf, n_zero_exit, n_inversions, n_no_iter);
    checks += 8;
    if (n_init_swap == 0) begin failures++; $display("FAIL initial swap never happened"); end
    if (n_mid_swap == 0)  begin failures++; $display("FAIL swap between iterations never happened"); end
    if (n_no_swap == 0)   begin failures++; $display("FAIL iteration without swap never happened"); end
    if (n_last_swap == 0) begin failures++; $display("FAIL final swap never happened"); end
    if (n_z1_inf == 0)    begin failures++; $display("FAIL Z1 = 0 exit never happened"); end
    if (n_zero_exit == 0) begin failures++; $display("FAIL k = 0 / x = 0 exit never happened"); end
    if (n_inversions == 0) begin failures++; $display("FAIL inversion never happened"); end
    if (n_no_iter == 0)   begin failures++; $display("FAIL zero-iteration ladder never happened"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
