// htcc_group_unit: the combined first and second group operation block.
//
// In one combinational pass it produces both results a double-and-add step of
// the point multiplier may need for the current key bit:
//   FGO = 2G        (point doubling of the accumulator G)
//   SGO = 2G + R    (the doubled accumulator plus the base point R)
// The addition takes the doubling result directly, so both outcomes of a key
// bit are ready in the same clock cycle and one key bit is consumed per cycle.
// The intermediate values T and K of the addition are passed on to the select
// logic, which uses them to catch the cases the addition formula cannot handle.
//
// Interface: g_* the accumulator point, r_* the base point (Cartesian
// coordinates A, B, C), curve_x / curve_y the curve constants, fgo_* and sgo_*
// the two results, sgo_t / sgo_k the addition's T and K. No clock.
//
// The formulas follow the architecture description; feeding the addition
// from the doubling within the same cycle is this design's reading of
// "concurrent" computation of the two group operations.
module htcc_group_unit #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(htcc_pkg::nist_poly(M))
) (
  input  logic [M-1:0] g_a,
  input  logic [M-1:0] g_b,
  input  logic [M-1:0] g_c,
  input  logic [M-1:0] r_a,
  input  logic [M-1:0] r_b,
  input  logic [M-1:0] r_c,
  input  logic [M-1:0] curve_x,
  input  logic [M-1:0] curve_y,
  output logic [M-1:0] fgo_a,
  output logic [M-1:0] fgo_b,
  output logic [M-1:0] fgo_c,
  output logic [M-1:0] sgo_a,
  output logic [M-1:0] sgo_b,
  output logic [M-1:0] sgo_c,
  output logic [M-1:0] sgo_t,
  output logic [M-1:0] sgo_k
);

  htcc_point_double #(.M(M), .POLY(POLY)) u_fgo (
    .a1(g_a), .b1(g_b), .c1(g_c), .curve_y(curve_y),
    .a3(fgo_a), .b3(fgo_b), .c3(fgo_c)
  );

  htcc_point_add #(.M(M), .POLY(POLY)) u_sgo (
    .a1(fgo_a), .b1(fgo_b), .c1(fgo_c),
    .a2(r_a),   .b2(r_b),   .c2(r_c),
    .curve_x(curve_x),
    .a3(sgo_a), .b3(sgo_b), .c3(sgo_c),
    .t_out(sgo_t), .k_out(sgo_k)
  );

endmodule
