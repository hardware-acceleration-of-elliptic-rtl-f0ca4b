// ecc_point_mul: elliptic-curve scalar (point) multiplier Q = kP over
// GF(2^m), for the curve y^2 + xy = x^3 + a x^2 + b.
//
// Algorithm: the Lopez-Dahab Montgomery ladder in projective x-only
// coordinates. After the leading one bit of k the ladder holds P1 = (X1:Z1)
// and P2 = (X2:Z2) with P2 - P1 = P, starting from P and 2P:
//   X1 = x, Z1 = 1, X2 = x^4 + b, Z2 = x^2.
// The two key-dependent paths of the textbook ladder are merged: every
// iteration computes
//   (X2:Z2) <- Madd(X2, Z2, X1, Z1):  Z2 = (X1 Z2 + X2 Z1)^2,
//                                     X2 = x Z2 + (X1 Z2)(X2 Z1)
//   (X1:Z1) <- Mdouble(X1, Z1):       X1 = X1^4 + b Z1^4, Z1 = X1^2 Z1^2
// and the points are swapped (ecc_swap) before the first iteration when
// k_(l-2) = 1, after iteration i when k_i != k_(i-1), and after the last one
// when k_0 = 1. This makes every iteration run the same operations in the
// same cycles whatever the key bits.
//
// Datapath: two digit-serial multipliers (gf_mul) that always run side by
// side, one single-cycle squarer (gf_sqr), XOR adders (gf_add), the swap
// multiplexer and one inverter (gf_inv, with its own multiplier and squarer).
// One ladder iteration is three rounds of two parallel multiplications:
//   round 1: X1*Z2, X2*Z1       squarer meanwhile: X1^2, Z1^2, X1^4, Z1^4
//   round 2: (X1Z2)(X2Z1), X1^2*Z1^2    squarer: Z2 = (X1Z2 + X2Z1)^2
//   round 3: x*Z2, b*Z1^4
// followed by one add/swap write-back cycle, so an iteration costs
// 3(s+1) + 1 clocks with s = ceil(m/G) (22 for m = 163, G = 32): the squarer
// and the adders only use cycles in which the multipliers are busy anyway.
//
// Coordinate conversion (once, at the end) maps (X1,Z1,X2,Z2) back to the
// affine kP = (xk, yk):
//   t3 = Z1 Z2,   t = 1 / (x t3)
//   xk = X1 (x Z2) t
//   yk = (x + xk) [ (x^2 + y) t3 + (X2 + x Z2)(X1 + x Z1) ] t + y
// using the same two multipliers and squarer plus the inverter, so only one
// inversion is done per point multiplication.
//
// Special cases: for k = 0 or x = 0 the result is reported as the point at
// infinity (q_infinity = 1, xq = yq = 0). When the ladder ends with Z1 = 0
// (kP is the point at infinity, e.g. k equal to the group order) q_infinity
// is raised as well. The case Z2 = 0 (kP = -P) is not treated specially and
// gives a wrong y coordinate.
//
// The ladder, the merged paths with swapping, the two-multiplier schedule
// (3M + A per iteration) and the conversion data flow follow the published
// design. The exact cycle-by-cycle schedule, the handshake, the choice of a
// separate inverter with its own multiplier, and the special-case handling
// are this design's own choices.
//
// Interface and timing: pulse start while idle (busy low); xp, yp and k are
// captured on that edge. done is high for one cycle when xq, yq and
// q_infinity are valid; they hold until the next start (xq is written a few
// multiplications before done, so read the outputs at done). For a key of bit
// length l >= 2 the latency from the start cycle to the done cycle is
//   4 + (l-1)(3s+4)        initialisation and ladder
//   + 6s + 7 + L_inv       conversion, L_inv = inverter latency (225)
// which is 3836 cycles for l = 163 and G = 32; k = 1 takes one cycle less,
// k = 0 and x = 0 two cycles. Reset is synchronous, active low.
module ecc_point_mul #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned G = gf2m_pkg::GF_G,
  parameter int unsigned D = gf2m_pkg::GF_D,
  parameter logic [M-1:0] RPOLY = gf2m_pkg::GF_RPOLY,
  parameter logic [M-1:0] B = gf2m_pkg::B163_B
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] xp,
  input  logic [M-1:0] yp,
  input  logic [M-1:0] k,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] xq,
  output logic [M-1:0] yq,
  output logic         q_infinity
);
  localparam int unsigned IW = $clog2(M);

  typedef enum logic [4:0] {
    S_IDLE,
    S_INIT0,   // Z2 = x^2, X1 = x, Z1 = 1, find leading one of k
    S_INIT1,   // X2 = x^4 + b
    S_INIT2,   // initial swap
    S_L_R1,    // issue round 1
    S_L_W1,    // round 1 running, four squarings
    S_L_W2,    // round 2 running
    S_L_W3,    // round 3 running, then add + swap write-back
    S_C_CHK,   // conversion: Z1 = 0 test, issue Z1*Z2 and x*Z2
    S_C_W1,
    S_C_W2,
    S_C_W3,
    S_C_WI,    // wait for the inverter
    S_C_W4,
    S_C_W5,
    S_C_W6,
    S_C_W7,
    S_DONE
  } state_t;

  state_t         state_q;
  logic [M-1:0]   x_q, y_q, k_q;
  logic [M-1:0]   x1_q, z1_q, x2_q, z2_q;
  // Ladder temporaries; the coordinate conversion reuses them once the
  // ladder has finished (sx: Z1 Z2, sz: x Z2, qx: x^2 + y, qz: the sum
  // for y, pp: the inverse).
  logic [M-1:0]   sx_q, sz_q, qx_q, qz_q, pp_q;
  logic [IW-1:0]  i_q;          // key bit processed by this iteration
  logic [2:0]     sc_q;         // squaring step within round 1

  // ---- leading one of k ---------------------------------------------------
  logic [IW-1:0] msb;
  always_comb begin
    msb = '0;
    for (int j = 0; j < int'(M); j++) begin
      if (k_q[j]) msb = IW'(j);
    end
  end

  // ---- arithmetic units ---------------------------------------------------
  logic         m0_start, m1_start, m0_busy, m1_busy, m0_done, m1_done;
  logic [M-1:0] m0_a, m0_b, m1_a, m1_b, m0_c, m1_c;
  logic [M-1:0] sq_in, sq_out;
  logic [M-1:0] p_sum;          // (X1 Z2) + (X2 Z1), also the round-3 sums
  logic [M-1:0] x1_new, x2_new;
  logic         inv_start, inv_busy, inv_done;
  logic [M-1:0] inv_c;

  gf_mul #(.M(M), .G(G), .D(D), .RPOLY(RPOLY)) u_mul0 (
    .clk(clk), .rst_n(rst_n), .start(m0_start), .a(m0_a), .b(m0_b),
    .busy(m0_busy), .done(m0_done), .c(m0_c)
  );
  gf_mul #(.M(M), .G(G), .D(D), .RPOLY(RPOLY)) u_mul1 (
    .clk(clk), .rst_n(rst_n), .start(m1_start), .a(m1_a), .b(m1_b),
    .busy(m1_busy), .done(m1_done), .c(m1_c)
  );
  gf_sqr #(.M(M), .D(D), .RPOLY(RPOLY)) u_sqr (.a(sq_in), .z(sq_out));
  gf_inv #(.M(M), .G(G), .D(D), .RPOLY(RPOLY)) u_inv (
    .clk(clk), .rst_n(rst_n), .start(inv_start), .a(m0_c),
    .busy(inv_busy), .done(inv_done), .c(inv_c)
  );

  gf_add #(.M(M)) u_add_p  (.a(m0_c), .b(m1_c), .c(p_sum));
  gf_add #(.M(M)) u_add_x2 (.a(m0_c), .b(pp_q), .c(x2_new));
  gf_add #(.M(M)) u_add_x1 (.a(qx_q), .b(m1_c), .c(x1_new));

  // ---- swap -----------------------------------------------------------------
  logic         sw;
  logic [M-1:0] sw_x1, sw_z1, sw_x2, sw_z2;
  logic [M-1:0] sw_x1_o, sw_z1_o, sw_x2_o, sw_z2_o;

  always_comb begin
    if (state_q == S_INIT2) begin
      sw    = (msb != '0) && k_q[msb - 1'b1];
      sw_x1 = x1_q;
      sw_x2 = x2_q;
    end else begin
      sw    = (i_q != '0) ? (k_q[i_q] ^ k_q[i_q - 1'b1]) : k_q[0];
      sw_x1 = x1_new;
      sw_x2 = x2_new;
    end
    sw_z1 = z1_q;
    sw_z2 = z2_q;
  end

  ecc_swap #(.M(M)) u_swap (
    .sw(sw), .x1(sw_x1), .z1(sw_z1), .x2(sw_x2), .z2(sw_z2),
    .x1_o(sw_x1_o), .z1_o(sw_z1_o), .x2_o(sw_x2_o), .z2_o(sw_z2_o)
  );

  // ---- operand steering -------------------------------------------------------
  logic m_idle;       // both multipliers finished (or not started)
  assign m_idle = !m0_busy && !m1_busy;

  logic l1_go;        // round 1 finished and all four squarings done
  assign l1_go = (state_q == S_L_W1) && m_idle && (sc_q == 3'd4);

  always_comb begin
    m0_start  = 1'b0;  m0_a = m0_c;  m0_b = m1_c;
    m1_start  = 1'b0;  m1_a = sx_q;  m1_b = sz_q;
    inv_start = 1'b0;
    sq_in     = x_q;
    unique case (state_q)
      S_INIT1: sq_in = z2_q;
      S_L_R1: begin
        m0_start = 1'b1;  m0_a = x1_q;  m0_b = z2_q;
        m1_start = 1'b1;  m1_a = x2_q;  m1_b = z1_q;
        sq_in    = x1_q;
      end
      S_L_W1: begin
        unique case (sc_q)
          3'd0:    sq_in = x1_q;
          3'd1:    sq_in = z1_q;
          3'd2:    sq_in = sx_q;
          3'd3:    sq_in = sz_q;
          default: sq_in = p_sum;
        endcase
        if (l1_go) begin
          m0_start = 1'b1;  m0_a = m0_c;  m0_b = m1_c;
          m1_start = 1'b1;  m1_a = sx_q;  m1_b = sz_q;
        end
      end
      S_L_W2: if (m_idle) begin
        m0_start = 1'b1;  m0_a = x_q;  m0_b = z2_q;
        m1_start = 1'b1;  m1_a = B;    m1_b = qz_q;
      end
      S_C_CHK: if (z1_q != '0) begin
        m0_start = 1'b1;  m0_a = z1_q;  m0_b = z2_q;
        m1_start = 1'b1;  m1_a = x_q;   m1_b = z2_q;
      end
      S_C_W1: if (m_idle) begin
        m0_start = 1'b1;  m0_a = x_q;  m0_b = m0_c;
        m1_start = 1'b1;  m1_a = x_q;  m1_b = z1_q;
      end
      S_C_W2: if (m_idle) begin
        inv_start = 1'b1;
        m0_start  = 1'b1;  m0_a = x2_q ^ sz_q;   m0_b = x1_q ^ m1_c;
        m1_start  = 1'b1;  m1_a = qx_q;         m1_b = sx_q;
      end
      S_C_WI: if (!inv_busy) begin
        m0_start = 1'b1;  m0_a = sz_q;  m0_b = inv_c;
      end
      S_C_W4: if (m_idle) begin
        m0_start = 1'b1;  m0_a = m0_c;  m0_b = x1_q;
      end
      S_C_W5: if (m_idle) begin
        m0_start = 1'b1;  m0_a = m0_c ^ x_q;  m0_b = qz_q;
      end
      S_C_W6: if (m_idle) begin
        m0_start = 1'b1;  m0_a = m0_c;  m0_b = pp_q;
      end
      default: ;
    endcase
  end

  // ---- control and registers --------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      {x_q, y_q, k_q} <= '0;
      {x1_q, z1_q, x2_q, z2_q} <= '0;
      {sx_q, sz_q, qx_q, qz_q, pp_q} <= '0;
      i_q        <= '0;
      sc_q       <= '0;
      xq         <= '0;
      yq         <= '0;
      q_infinity <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (start) begin
            x_q     <= xp;
            y_q     <= yp;
            k_q     <= k;
            state_q <= S_INIT0;
          end else begin
            state_q <= S_IDLE;
          end
        end
        S_INIT0: begin
          if (k_q == '0 || x_q == '0) begin
            xq         <= '0;
            yq         <= '0;
            q_infinity <= 1'b1;
            state_q    <= S_DONE;
          end else begin
            x1_q    <= x_q;
            z1_q    <= M'(1);
            z2_q    <= sq_out;                 // x^2
            i_q     <= msb - 1'b1;
            state_q <= S_INIT1;
          end
        end
        S_INIT1: begin
          x2_q    <= sq_out ^ B;               // x^4 + b
          state_q <= (msb == '0) ? S_C_CHK : S_INIT2;
        end
        S_INIT2: begin
          x1_q    <= sw_x1_o;
          z1_q    <= sw_z1_o;
          x2_q    <= sw_x2_o;
          z2_q    <= sw_z2_o;
          state_q <= S_L_R1;
        end
        S_L_R1: begin
          sx_q    <= sq_out;                   // X1^2
          sc_q    <= 3'd1;
          state_q <= S_L_W1;
        end
        S_L_W1: begin
          unique case (sc_q)
            3'd1: sz_q <= sq_out;              // Z1^2
            3'd2: qx_q <= sq_out;              // X1^4
            3'd3: qz_q <= sq_out;              // Z1^4
            default: ;
          endcase
          if (sc_q != 3'd4) sc_q <= sc_q + 3'd1;
          if (l1_go) begin
            z2_q    <= sq_out;                 // (X1 Z2 + X2 Z1)^2
            state_q <= S_L_W2;
          end
        end
        S_L_W2: if (m_idle) begin
          pp_q    <= m0_c;                     // (X1 Z2)(X2 Z1)
          z1_q    <= m1_c;                     // X1^2 Z1^2
          state_q <= S_L_W3;
        end
        S_L_W3: if (m_idle) begin
          x1_q <= sw_x1_o;
          z1_q <= sw_z1_o;
          x2_q <= sw_x2_o;
          z2_q <= sw_z2_o;
          if (i_q == '0) begin
            state_q <= S_C_CHK;
          end else begin
            i_q     <= i_q - 1'b1;
            state_q <= S_L_R1;
          end
        end
        S_C_CHK: begin
          if (z1_q == '0) begin
            xq         <= '0;
            yq         <= '0;
            q_infinity <= 1'b1;
            state_q    <= S_DONE;
          end else begin
            qx_q    <= sq_out ^ y_q;           // x^2 + y
            state_q <= S_C_W1;
          end
        end
        S_C_W1: if (m_idle) begin
          sx_q    <= m0_c;                     // Z1 Z2
          sz_q    <= m1_c;                     // x Z2
          state_q <= S_C_W2;
        end
        S_C_W2: if (m_idle) begin
          state_q <= S_C_W3;                   // inverter takes x Z1 Z2
        end
        S_C_W3: if (m_idle) begin
          qz_q    <= p_sum;
          state_q <= S_C_WI;
        end
        S_C_WI: if (!inv_busy) begin
          pp_q    <= inv_c;                    // 1 / (x Z1 Z2)
          state_q <= S_C_W4;
        end
        S_C_W4: if (m_idle) state_q <= S_C_W5;
        S_C_W5: if (m_idle) begin
          xq      <= m0_c;                     // xk = X1 / Z1
          state_q <= S_C_W6;
        end
        S_C_W6: if (m_idle) state_q <= S_C_W7;
        S_C_W7: if (m_idle) begin
          yq         <= m0_c ^ y_q;
          q_infinity <= 1'b0;
          state_q    <= S_DONE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done = (state_q == S_DONE);

  // Both multipliers are always started together in the ladder and must
  // finish together.
  a_mul_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q inside {S_L_W1, S_L_W2, S_L_W3}) |-> (m0_busy == m1_busy && m0_done == m1_done));
  // The inverter is only used once, during the conversion.
  a_inv_in_conv : assert property (@(posedge clk) disable iff (!rst_n)
    inv_done |-> (state_q inside {S_C_W3, S_C_WI}));
endmodule
