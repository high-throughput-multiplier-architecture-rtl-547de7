// gf2m_mul: combinational multiplier in GF(2^M), c = m * n mod h(p).
//
// Bit-serial most-significant-bit-first interleaved multiplication, fully
// unrolled into one combinational block so that a product is ready in the same
// clock cycle. For d = M-1 down to 0 the partial result is multiplied by p (a
// left shift); the bit that leaves position M-1 is folded back by adding the
// reduction tail POLY; then m is added if bit d of n is set. After M steps the
// accumulator holds the reduced product. This is the multiplication scheme
// the design is built around; writing it as one combinational array (rather
// than one step per clock) is what lets a whole group operation finish in a
// single cycle.
//
// Interface: m_in, n_in, c_out are M-bit field elements, bit i the coefficient
// of p^i. No clock; the delay is M levels of AND/XOR.
module gf2m_mul #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(htcc_pkg::nist_poly(M))
) (
  input  logic [M-1:0] m_in,
  input  logic [M-1:0] n_in,
  output logic [M-1:0] c_out
);

  always_comb begin
    logic [M-1:0] acc;
    acc = '0;
    for (int d = int'(M) - 1; d >= 0; d--) begin
      acc = {acc[M-2:0], 1'b0} ^ (acc[M-1] ? POLY : '0);
      acc = acc ^ (n_in[d] ? m_in : '0);
    end
    c_out = acc;
  end

endmodule
