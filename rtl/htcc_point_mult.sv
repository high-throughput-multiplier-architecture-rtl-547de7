// htcc_point_mult: High Throughput Concurrent Computation (HTCC) elliptic
// curve point multiplier over GF(2^M), G = s * R.
//
// The key s is scanned from its most significant bit down, one bit per clock
// cycle (left-to-right double-and-add). Each cycle the combined group block
// computes both the doubling 2G (first group operation) and the sum 2G + R
// (second group operation) of the accumulator G; mux1 keeps the sum when the
// key bit is one and the doubling when it is zero. A multiplication therefore
// takes exactly M cycles: 163, 233 or 283 for the three NIST binary fields.
// Points are kept in projective "Cartesian" coordinates (A, B, C) with
// p = A/C^2, q = B/C^3, so no field inversion is needed inside the loop; the
// result is delivered in the same coordinates.
//
// Datapath, as in the architecture diagram: the pre-processing box converts
// the affine base point to 1R = (p, q, 1) and precomputes 2R; the combined
// group block produces FGO and SGO; the select logic and mux2 replace the SGO
// by 1R or 2R where the addition formula breaks down (2G at infinity, or
// 2G = R); mux1 chooses by key bit; the accumulator register feeds the chosen
// point back; the counter sequences the M steps and the register panel holds
// the final point (G_P, G_Q, G_R).
//
// Interface: pulse start for one cycle while busy is low, with key, base_p,
// base_q, curve_x and curve_y valid in that cycle (they are captured). done
// pulses M cycles after the edge that sampled start; g_p/g_q/g_r then hold
// s*R until the next multiplication completes. g_r = 0 encodes the point at
// infinity (key 0, or a key that is a multiple of the order of R).
// Curve: q^2 + p*q = p^3 + curve_x*p^2 + curve_y, curve_y non-zero.
// Reset is asynchronous, active low.
//
// The block structure, the coordinates, the group formulas and the one-bit-
// per-cycle schedule follow the architecture description. The select-logic
// rule, the chaining of the addition after the doubling, the handshake,
// the operand capture and reporting the result in projective form are this
// design's own choices.
module htcc_point_mult #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(htcc_pkg::nist_poly(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] key,
  input  logic [M-1:0] base_p,
  input  logic [M-1:0] base_q,
  input  logic [M-1:0] curve_x,
  input  logic [M-1:0] curve_y,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] g_p,
  output logic [M-1:0] g_q,
  output logic [M-1:0] g_r
);

  localparam int unsigned CW = $clog2(M);

  logic          load, step, last;
  logic [CW-1:0] count;

  logic [M-1:0] key_q, cx_q, cy_q;
  logic [M-1:0] r1_a, r1_b, r1_c, r2_a, r2_b, r2_c;
  logic [M-1:0] g_a, g_b, g_c;
  logic [M-1:0] fgo_a, fgo_b, fgo_c, sum_a, sum_b, sum_c, sum_t, sum_k;
  logic [M-1:0] sgo_a, sgo_b, sgo_c, nxt_a, nxt_b, nxt_c;
  htcc_pkg::sgo_sel_e sgo_sel;

  htcc_counter #(.M(M)) u_counter (
    .clk, .rst_n, .start, .busy, .load, .step, .count, .last, .done
  );

  // Operand registers: key and curve constants are held for the whole run.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '0; cx_q <= '0; cy_q <= '0;
    end else if (load) begin
      key_q <= key; cx_q <= curve_x; cy_q <= curve_y;
    end
  end

  htcc_preprocess #(.M(M), .POLY(POLY)) u_pre (
    .clk, .rst_n, .load, .base_p, .base_q, .curve_y,
    .r1_a, .r1_b, .r1_c, .r2_a, .r2_b, .r2_c
  );

  htcc_group_unit #(.M(M), .POLY(POLY)) u_group (
    .g_a, .g_b, .g_c, .r_a(r1_a), .r_b(r1_b), .r_c(r1_c),
    .curve_x(cx_q), .curve_y(cy_q),
    .fgo_a, .fgo_b, .fgo_c,
    .sgo_a(sum_a), .sgo_b(sum_b), .sgo_c(sum_c), .sgo_t(sum_t), .sgo_k(sum_k)
  );

  htcc_select_logic #(.M(M)) u_select (
    .fgo_c, .sgo_t(sum_t), .sgo_k(sum_k), .sel(sgo_sel)
  );

  htcc_mux2 #(.M(M)) u_mux2 (
    .sel(sgo_sel),
    .r1_a, .r1_b, .r1_c, .r2_a, .r2_b, .r2_c,
    .sum_a, .sum_b, .sum_c,
    .out_a(sgo_a), .out_b(sgo_b), .out_c(sgo_c)
  );

  htcc_mux1 #(.M(M)) u_mux1 (
    .key_bit(key_q[count]),
    .fgo_a, .fgo_b, .fgo_c, .sgo_a, .sgo_b, .sgo_c,
    .out_a(nxt_a), .out_b(nxt_b), .out_c(nxt_c)
  );

  htcc_acc_register #(.M(M)) u_acc (
    .clk, .rst_n, .init(load), .en(step),
    .d_a(nxt_a), .d_b(nxt_b), .d_c(nxt_c),
    .q_a(g_a), .q_b(g_b), .q_c(g_c)
  );

  htcc_register_panel #(.M(M)) u_panel (
    .clk, .rst_n, .capture(last),
    .d_a(nxt_a), .d_b(nxt_b), .d_c(nxt_c),
    .g_p, .g_q, .g_r
  );

endmodule
