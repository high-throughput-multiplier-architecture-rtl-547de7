// gf2m_sqr: combinational squarer in GF(2^M), c = a^2 mod h(p).
//
// Squaring in characteristic 2 is linear: the coefficients of a are spread to
// the even positions of a (2M-1)-bit word, and the terms of degree M..2M-2 are
// then folded down, highest first, using p^M = POLY. Cheaper than a general
// multiplication, it is used for every square and fourth/eighth power of the
// group formulas.
//
// Interface: a_in and c_out are M-bit field elements. No clock.
module gf2m_sqr #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(htcc_pkg::nist_poly(M))
) (
  input  logic [M-1:0] a_in,
  output logic [M-1:0] c_out
);

  localparam logic [2*M-2:0] HPOLY = {{(M-2){1'b0}}, 1'b1, POLY};

  always_comb begin
    logic [2*M-2:0] w;
    w = '0;
    for (int i = 0; i < int'(M); i++) w[2*i] = a_in[i];
    for (int i = 2 * int'(M) - 2; i >= int'(M); i--) begin
      if (w[i]) w = w ^ (HPOLY << (i - int'(M)));
    end
    c_out = w[M-1:0];
  end

endmodule
