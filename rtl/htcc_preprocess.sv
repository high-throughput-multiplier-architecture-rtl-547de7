// htcc_preprocess: pre-processing box. When a multiplication starts (load),
// it converts the affine base point (p, q) into Cartesian coordinates,
// 1R = (p, q, 1), and computes 2R with a doubling unit, and stores both in
// registers for the whole multiplication. The select logic substitutes them
// for the sum 2G + R in the two cases the addition formula cannot handle.
//
// Interface: load (one cycle) captures base_p, base_q and uses curve_y for
// the doubling; r1_* and r2_* hold the points from the clock edge on which
// load is sampled until the next load. Reset clears them to the point at
// infinity (1, 1, 0).
module htcc_preprocess #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(htcc_pkg::nist_poly(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] base_p,
  input  logic [M-1:0] base_q,
  input  logic [M-1:0] curve_y,
  output logic [M-1:0] r1_a,
  output logic [M-1:0] r1_b,
  output logic [M-1:0] r1_c,
  output logic [M-1:0] r2_a,
  output logic [M-1:0] r2_b,
  output logic [M-1:0] r2_c
);

  localparam logic [M-1:0] ONE = M'(1);

  logic [M-1:0] d_a, d_b, d_c;

  htcc_point_double #(.M(M), .POLY(POLY)) u_dbl (
    .a1(base_p), .b1(base_q), .c1(ONE), .curve_y(curve_y),
    .a3(d_a), .b3(d_b), .c3(d_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_a <= ONE; r1_b <= ONE; r1_c <= '0;
      r2_a <= ONE; r2_b <= ONE; r2_c <= '0;
    end else if (load) begin
      r1_a <= base_p; r1_b <= base_q; r1_c <= ONE;
      r2_a <= d_a;    r2_b <= d_b;    r2_c <= d_c;
    end
  end

endmodule
