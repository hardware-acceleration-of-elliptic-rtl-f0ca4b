// tb_gf_mul: checks the digit-serial multiplier at the default digit size
// G = 32 (s = 6 digits) and at G = 4 (s = 41 digits).
// Products are compared with a bit-serial reference multiplication. The
// first vector is the published multiplier example a = 57h,
// b = 6237e711bf388df9c46fce237e711bf388df9c43a, whose product is 1 (b is
// the inverse of 57h). The latency from the start cycle to the done cycle
// must be s + 1, done must last exactly one cycle, and a new start given in
// the done cycle, with the previous product as operand, must be accepted.
module tb_gf_mul;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  fe_t  a, b, c32, c4;
  logic busy32, done32, busy4, done4;

  localparam int S32 = (M + 31) / 32;
  localparam int S4  = (M + 3) / 4;

  gf_mul u32 (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
              .busy(busy32), .done(done32), .c(c32));
  gf_mul #(.G(4)) u4 (.clk(clk), .rst_n(rst_n), .start(start && !busy4), .a(a), .b(b),
              .busy(busy4), .done(done4), .c(c4));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Start both units on the same cycle, then check result and latency of each.
  task automatic run(input fe_t ta, input fe_t tb_);
    int cyc = 0;
    bit got32 = 0, got4 = 0;
    fe_t exp = ref_mul(ta, tb_);
    a = ta; b = tb_; start = 1'b1;
    @(posedge clk); #1 start = 1'b0; a = rand_fe(); b = rand_fe();
    while (!(got32 && got4)) begin
      cyc++;
      if (done32 && !got32) begin
        got32 = 1;
        checks += 2;
        if (c32 !== exp) begin failures++; $display("FAIL G=32 a=%h b=%h c=%h", ta, tb_, c32); end
        if (cyc != S32 + 1) begin failures++; $display("FAIL G=32 latency %0d", cyc); end
      end
      if (done4 && !got4) begin
        got4 = 1;
        checks += 2;
        if (c4 !== exp) begin failures++; $display("FAIL G=4 a=%h b=%h c=%h", ta, tb_, c4); end
        if (cyc != S4 + 1) begin failures++; $display("FAIL G=4 latency %0d", cyc); end
      end
      @(posedge clk); #1;
      if (got32 && done32) begin failures++; $display("FAIL done longer than one cycle"); end
    end
  endtask

  initial begin
    start = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (busy32 || done32) begin failures++; $display("FAIL not idle after reset"); end

    run(163'h57, 163'h6237e711bf388df9c46fce237e711bf388df9c43a);
    checks++;
    if (c32 !== fe_t'(1)) begin failures++; $display("FAIL published example"); end
    run(fe_t'(1), fe_t'(1) << (M-1));
    run('1, '1);
    run('0, rand_fe());
    for (int n = 0; n < 40; n++) run(rand_fe(), rand_fe());

    // back-to-back: start the next product in the done cycle using c32
    begin
      fe_t p1, q;
      q = rand_fe();
      a = rand_fe(); b = q; start = 1'b1;
      p1 = ref_mul(a, q);
      @(posedge clk); #1 start = 1'b0;
      while (!done32) begin @(posedge clk); #1; end
      a = c32; b = q; start = 1'b1;        // issued in the done cycle
      @(posedge clk); #1 start = 1'b0;
      checks++;
      if (!busy32) begin failures++; $display("FAIL start in done cycle ignored"); end
      repeat (S32) begin @(posedge clk); #1; end
      checks++;
      if (!done32 || c32 !== ref_mul(p1, q)) begin
        failures++; $display("FAIL back-to-back product");
      end
      while (busy4) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
