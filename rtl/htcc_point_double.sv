// htcc_point_double: first group operation (FGO), point doubling K = 2R on a
// binary elliptic curve q^2 + pq = p^3 + x*p^2 + y, in the design's
// "Cartesian" projective coordinates (A, B, C) with p = A/C^2, q = B/C^3.
//
// Formulas (one combinational pass, no inversion):
//   C3 = A1 * C1^2
//   A3 = A1^4 + y * C1^8
//   B3 = A1^4 * C3 + (A1^2 + B1*C1 + C3) * A3
// Five general multiplications and five squarings. The point at infinity,
// (1, 1, 0) or any (A, B, 0), maps to a point with C3 = 0, i.e. to infinity
// again, so no special case is needed here.
//
// Interface: a1/b1/c1 the input point, curve_y the curve constant y (often
// called b), a3/b3/c3 the doubled point. No clock.
module htcc_point_double #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(htcc_pkg::nist_poly(M))
) (
  input  logic [M-1:0] a1,
  input  logic [M-1:0] b1,
  input  logic [M-1:0] c1,
  input  logic [M-1:0] curve_y,
  output logic [M-1:0] a3,
  output logic [M-1:0] b3,
  output logic [M-1:0] c3
);

  logic [M-1:0] c1_2, c1_4, c1_8, a1_2, a1_4;
  logic [M-1:0] y_c1_8, b1_c1, u, a1_4_c3, u_a3;

  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_c1   (.a_in(c1),   .c_out(c1_2));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_c1_2 (.a_in(c1_2), .c_out(c1_4));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_c1_4 (.a_in(c1_4), .c_out(c1_8));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_a1   (.a_in(a1),   .c_out(a1_2));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_a1_2 (.a_in(a1_2), .c_out(a1_4));

  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_c3  (.m_in(a1),      .n_in(c1_2), .c_out(c3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_yc  (.m_in(curve_y), .n_in(c1_8), .c_out(y_c1_8));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_bc  (.m_in(b1),      .n_in(c1),   .c_out(b1_c1));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_ac3 (.m_in(a1_4),    .n_in(c3),   .c_out(a1_4_c3));
  gf2m_mul #(.M(M), .POLY(POLY)) u_mul_ua3 (.m_in(u),       .n_in(a3),   .c_out(u_a3));

  assign a3 = a1_4 ^ y_c1_8;
  assign u  = a1_2 ^ b1_c1 ^ c3;
  assign b3 = a1_4_c3 ^ u_a3;

endmodule
