// tb_digit_sizes: runs the multiplier, the inverter and the complete scalar
// multiplier at every digit size for which results are reported for
// GF(2^163): multiplier and inverter at G = 1, 4, 14, 16, 28, 32, 33, 41,
// the scalar multiplier at G = 1, 4, 14, 16, 28, 32.
// Every instance gets the same operands: a product and an inverse of random
// elements (checked against the bit-serial reference), and the published key
// 6237e711bf388df9c46fce237e711bf388df9c43a times the B-163 base point
// (expected value from an independent software model). Latencies are
// checked against s+1 (multiplier), 1 + 9(s+2) + 152 (inverter) and
// 4 + 162(3(s+1)+1) + 6s + 7 + L_inv (scalar multiplier), s = ceil(163/G).
module tb_digit_sizes;
  import tb_gf_ref_pkg::*;
  import gf2m_pkg::B163_GX, gf2m_pkg::B163_GY;
  int checks = 0, failures = 0;

  localparam int NG = 8;
  localparam int GS [NG] = '{1, 4, 14, 16, 28, 32, 33, 41};
  localparam int NP = 6;                 // point multiplier: first six sizes

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  fe_t  a, b, k;
  logic [NG-1:0] m_done, i_done, p_done, m_busy, i_busy, p_busy, p_inf;
  fe_t  m_c [NG];
  fe_t  i_c [NG];
  fe_t  p_x [NG];
  fe_t  p_y [NG];
  int   m_lat [NG];
  int   i_lat [NG];
  int   p_lat [NG];

  always #5 clk = ~clk;

  for (genvar n = 0; n < NG; n++) begin : g_units
    gf_mul #(.G(GS[n])) u_mul (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                              .busy(m_busy[n]), .done(m_done[n]), .c(m_c[n]));
    gf_inv #(.G(GS[n])) u_inv (.clk(clk), .rst_n(rst_n), .start(start), .a(a),
                              .busy(i_busy[n]), .done(i_done[n]), .c(i_c[n]));
    if (n < NP) begin : g_pm
      ecc_point_mul #(.G(GS[n])) u_pm (.clk(clk), .rst_n(rst_n), .start(start),
                              .xp(B163_GX), .yp(B163_GY), .k(k), .busy(p_busy[n]),
                              .done(p_done[n]), .xq(p_x[n]), .yq(p_y[n]), .q_infinity(p_inf[n]));
    end else begin : g_nopm
      assign p_done[n] = 1'b0;
      assign p_busy[n] = 1'b0;
      assign p_inf[n]  = 1'b0;
      assign p_x[n]    = '0;
      assign p_y[n]    = '0;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counters from the start cycle to each done cycle
  int cyc = 0;
  bit armed = 1'b0;
  always @(posedge clk) if (armed) begin
    for (int n = 0; n < NG; n++) begin
      if (m_done[n] && m_lat[n] < 0) m_lat[n] = cyc;
      if (i_done[n] && i_lat[n] < 0) i_lat[n] = cyc;
      if (p_done[n] && p_lat[n] < 0) p_lat[n] = cyc;
    end
    cyc++;
  end

  initial begin
    fe_t exp_m, exp_i, exp_x, exp_y;
    int s;
    start = 1'b0;
    a = rand_fe(); b = rand_fe();
    k = 163'h6237e711bf388df9c46fce237e711bf388df9c43a;
    exp_m = ref_mul(a, b);
    exp_i = ref_inv(a);
    exp_x = 163'h44f853643f0e22b8e075b59189b93cb964185fb0f;
    exp_y = 163'h71e650e3bcf041c554e3314512321899ddbe2d283;
    for (int n = 0; n < NG; n++) begin m_lat[n] = -1; i_lat[n] = -1; p_lat[n] = -1; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 start = 1'b1; cyc = 0; armed = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    while (p_busy != '0 || i_busy != '0 || m_busy != '0) @(posedge clk);
    @(posedge clk);
    for (int n = 0; n < NG; n++) begin
      s = (M + GS[n] - 1) / GS[n];
      checks += 4;
      if (m_c[n] !== exp_m) begin failures++; $display("FAIL G=%0d product", GS[n]); end
      if (m_lat[n] != s + 1) begin failures++; $display("FAIL G=%0d multiplier latency %0d", GS[n], m_lat[n]); end
      if (i_c[n] !== exp_i) begin failures++; $display("FAIL G=%0d inverse", GS[n]); end
      if (i_lat[n] != 1 + 9 * (s + 2) + 152) begin failures++; $display("FAIL G=%0d inverter latency %0d", GS[n], i_lat[n]); end
      if (n < NP) begin
        checks += 2;
        if (p_inf[n] || p_x[n] !== exp_x || p_y[n] !== exp_y) begin
          failures++; $display("FAIL G=%0d kP = %h, %h", GS[n], p_x[n], p_y[n]);
        end
        if (p_lat[n] != 4 + 162 * (3 * (s + 1) + 1) + 6 * s + 7 + (1 + 9 * (s + 2) + 152)) begin
          failures++; $display("FAIL G=%0d point multiplication latency %0d", GS[n], p_lat[n]);
        end
      end
      $display("G=%0d: s=%0d multiply %0d cycles, invert %0d cycles, kP %0d cycles",
               GS[n], s, m_lat[n], i_lat[n], p_lat[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
