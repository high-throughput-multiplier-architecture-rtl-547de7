// htcc_point_add: second group operation (SGO), point addition K = R + G of
// two points in the design's "Cartesian" projective coordinates
// (p = A/C^2, q = B/C^3) on q^2 + pq = p^3 + x*p^2 + y.
//
// Formulas (one combinational pass, no inversion):
//   T  = A1*C2^2 + A2*C1^2          K  = B1*C2^3 + B2*C1^3
//   C3 = C1 * C2 * T
//   A3 = x*C3^2 + K*(K + C3) + T^3
//   B3 = (K + C3)*A3 + C1^2*T^2 * (K*A2 + B2*C1*T)
// Fifteen general multiplications and five squarings. The formulas are only
// valid for two distinct, finite points that are not each other's negative:
//   * either input at infinity (C = 0)  -> result is wrong (C3 = 0),
//   * R = G   (T = 0 and K = 0)         -> result (0, 0, 0) is wrong,
//   * R = -G  (T = 0, K != 0)           -> (K^2, K^3, 0), a valid infinity.
// T and K are therefore brought out so that the select logic can detect the
// first two cases and substitute a precomputed point.
//
// Interface: a1/b1/c1 and a2/b2/c2 the operands, curve_x the curve constant x
// (often called a), a3/b3/c3 the sum, t_out/k_out the intermediate T and K.
module htcc_point_add #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(htcc_pkg::nist_poly(M))
) (
  input  logic [M-1:0] a1,
  input  logic [M-1:0] b1,
  input  logic [M-1:0] c1,
  input  logic [M-1:0] a2,
  input  logic [M-1:0] b2,
  input  logic [M-1:0] c2,
  input  logic [M-1:0] curve_x,
  output logic [M-1:0] a3,
  output logic [M-1:0] b3,
  output logic [M-1:0] c3,
  output logic [M-1:0] t_out,
  output logic [M-1:0] k_out
);

  logic [M-1:0] c1_2, c2_2, c1_3, c2_3;
  logic [M-1:0] a1_c2_2, a2_c1_2, b1_c2_3, b2_c1_3;
  logic [M-1:0] t, k, c1_t, c3_2, t_2, t_3, x_c3_2, k_c3, k_kc3;
  logic [M-1:0] l_2, k_a2, b2_c1_t, v, kc3_a3, l_2_v;

  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_c1  (.a_in(c1),   .c_out(c1_2));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_c2  (.a_in(c2),   .c_out(c2_2));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_c3  (.a_in(c3),   .c_out(c3_2));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_t   (.a_in(t),    .c_out(t_2));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_c1t (.a_in(c1_t), .c_out(l_2));

  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_c1_3 (.m_in(c1_2), .n_in(c1),   .c_out(c1_3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_c2_3 (.m_in(c2_2), .n_in(c2),   .c_out(c2_3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_u1   (.m_in(a1),   .n_in(c2_2), .c_out(a1_c2_2));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_u2   (.m_in(a2),   .n_in(c1_2), .c_out(a2_c1_2));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_s1   (.m_in(b1),   .n_in(c2_3), .c_out(b1_c2_3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_s2   (.m_in(b2),   .n_in(c1_3), .c_out(b2_c1_3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_c1t  (.m_in(c1),   .n_in(t),    .c_out(c1_t));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_c3   (.m_in(c1_t), .n_in(c2),   .c_out(c3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_t3   (.m_in(t_2),  .n_in(t),    .c_out(t_3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_xc3  (.m_in(curve_x), .n_in(c3_2), .c_out(x_c3_2));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_kkc  (.m_in(k),    .n_in(k_c3), .c_out(k_kc3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_ka2  (.m_in(k),    .n_in(a2),   .c_out(k_a2));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_b2ct (.m_in(b2),   .n_in(c1_t), .c_out(b2_c1_t));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_kca3 (.m_in(k_c3), .n_in(a3),   .c_out(kc3_a3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_l2v  (.m_in(l_2),  .n_in(v),    .c_out(l_2_v));

  assign t     = a1_c2_2 ^ a2_c1_2;
  assign k     = b1_c2_3 ^ b2_c1_3;
  assign k_c3  = k ^ c3;
  assign a3    = x_c3_2 ^ k_kc3 ^ t_3;
  assign v     = k_a2 ^ b2_c1_t;
  assign b3    = kc3_a3 ^ l_2_v;
  assign t_out = t;
  assign k_out = k;

endmodule
