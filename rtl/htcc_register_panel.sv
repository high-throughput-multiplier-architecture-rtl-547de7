// htcc_register_panel: output register panel. On capture (the cycle of the
// last key bit) it stores the final point, so g_p, g_q, g_r hold the result
// s*R in Cartesian coordinates (A, B, C) from the following cycle until the
// next multiplication ends. The affine result is p = g_p / g_r^2,
// q = g_q / g_r^3; g_r = 0 means the point at infinity. Reset clears all
// three to zero.
module htcc_register_panel #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         capture,
  input  logic [M-1:0] d_a,
  input  logic [M-1:0] d_b,
  input  logic [M-1:0] d_c,
  output logic [M-1:0] g_p,
  output logic [M-1:0] g_q,
  output logic [M-1:0] g_r
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_p <= '0; g_q <= '0; g_r <= '0;
    end else if (capture) begin
      g_p <= d_a; g_q <= d_b; g_r <= d_c;
    end
  end

endmodule
