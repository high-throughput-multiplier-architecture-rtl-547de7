// htcc_pkg: constants and types shared by the HTCC point-multiplier modules.
//
// The field is GF(2^M) in polynomial basis. The reduction polynomial h(p) of
// each of the three binary fields the design is sized for (M = 163, 233, 283)
// is returned by nist_poly() as its "tail": h(p) with the leading p^M term
// removed, so that p^M = tail (mod h). These are the NIST polynomials
//   M = 163 : p^163 + p^7 + p^6 + p^3 + 1   (pentanomial)
//   M = 233 : p^233 + p^74 + 1              (trinomial)
//   M = 283 : p^283 + p^12 + p^7 + p^5 + 1  (pentanomial)
// For any other M the caller must pass its own POLY; nist_poly() then gives
// p^M + p + 1 as a placeholder, which is irreducible only for some M
// (7, 15, 22, 60, 63, ...).
//
// sgo_sel_e encodes the select input of the second-group-operation multiplexer
// (mux2): the precomputed 1R, the precomputed 2R, or the computed sum.
package htcc_pkg;

  localparam int unsigned M_MAX     = 283;
  localparam int unsigned M_DEFAULT = 163;

  typedef logic [M_MAX-1:0] poly_t;

  // Select of mux2. The 2-bit codes are the input labels of the architecture
  // diagram (00 = 1R, 01 = 2R, 10 = computed second group operation).
  typedef enum logic [1:0] {
    SGO_SEL_1R  = 2'b00,
    SGO_SEL_2R  = 2'b01,
    SGO_SEL_SUM = 2'b10
  } sgo_sel_e;

  // Reduction polynomial tail for GF(2^m).
  function automatic poly_t nist_poly(input int unsigned m);
    poly_t t;
    t = '0;
    case (m)
      163: begin t[7] = 1'b1; t[6] = 1'b1; t[3] = 1'b1; t[0] = 1'b1; end
      233: begin t[74] = 1'b1; t[0] = 1'b1; end
      283: begin t[12] = 1'b1; t[7] = 1'b1; t[5] = 1'b1; t[0] = 1'b1; end
      default: begin t[1] = 1'b1; t[0] = 1'b1; end
    endcase
    return t;
  endfunction

endpackage
