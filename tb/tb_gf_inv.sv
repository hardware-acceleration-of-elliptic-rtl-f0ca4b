// tb_gf_inv: checks the Itoh-Tsujii inverter.
// The published inversion example inverts 57h; its inverse is
// 6237e711bf388df9c46fce237e711bf388df9c43a. Random operands are checked
// against Fermat square-and-multiply and by multiplying back to 1. The
// latency is compared with the value implied by the addition chain of m-1,
// worked out here from the bits of m-1: each multiplication costs s+2
// cycles (issue, s digits, hand-back) and every squaring beyond the first
// of a step one more cycle, plus the start cycle. The inverse of 0 is 0.
module tb_gf_inv;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  fe_t  a, c;
  int   exp_lat;

  localparam int S = (M + 31) / 32;

  gf_inv u_dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a),
                .busy(busy), .done(done), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int chain_latency();
    int e = 1, mults = 0, extra_sq = 0, top = 0;
    for (int i = 0; i < 32; i++) if (((M - 1) >> i) & 1) top = i;
    for (int i = top - 1; i >= 0; i--) begin
      extra_sq += e - 1; e = 2 * e; mults++;      // doubling
      if (((M - 1) >> i) & 1) begin e++; mults++; end
    end
    return 1 + mults * (S + 2) + extra_sq;
  endfunction

  task automatic run(input fe_t ta, input fe_t exp);
    int cyc = 0;
    a = ta; start = 1'b1;
    @(posedge clk); #1 start = 1'b0; a = rand_fe();
    while (!done && cyc < 5000) begin cyc++; @(posedge clk); #1; end
    cyc++;
    checks += 2;
    if (c !== exp) begin failures++; $display("FAIL inv(%h) = %h, expected %h", ta, c, exp); end
    if (cyc != exp_lat) begin failures++; $display("FAIL latency %0d, expected %0d", cyc, exp_lat); end
    if (ta != '0) begin
      checks++;
      if (ref_mul(ta, c) !== fe_t'(1)) begin failures++; $display("FAIL a * a^-1 != 1"); end
    end
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    exp_lat = chain_latency();
    $display("expected inversion latency %0d cycles", exp_lat);
    start = 1'b0; a = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    run(163'h57, 163'h6237e711bf388df9c46fce237e711bf388df9c43a);
    run(fe_t'(1), fe_t'(1));
    run('0, '0);
    for (int n = 0; n < 6; n++) begin
      fe_t v = rand_fe();
      run(v, ref_inv(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
