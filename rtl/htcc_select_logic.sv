// htcc_select_logic: chooses which candidate for the second group operation
// (2G + R) is passed on by mux2.
//
// The projective addition formula fails in two situations, both detected from
// values the combined group block already has:
//   * the doubled accumulator 2G is the point at infinity (its C is zero):
//     the sum is simply R, so the precomputed 1R is selected (code 00);
//   * 2G equals R (addition's T and K both zero): the sum is 2R, so the
//     precomputed 2R is selected (code 01).
// Otherwise the computed sum is used (code 10). The first case occurs at the
// first set key bit of every multiplication; the second only for keys whose
// running multiple k satisfies 2k = 1 modulo the order of R.
//
// Interface: fgo_c the C coordinate of 2G, sgo_t / sgo_k the addition's T and
// K, sel the mux2 select. Combinational.
//
// The architecture names a select logic driving mux2 (inputs 1R, 2R and the
// computed sum) but gives no rule; the rule above is this design's own.
module htcc_select_logic #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT
) (
  input  logic [M-1:0]       fgo_c,
  input  logic [M-1:0]       sgo_t,
  input  logic [M-1:0]       sgo_k,
  output htcc_pkg::sgo_sel_e sel
);

  always_comb begin
    if (fgo_c == '0)                       sel = htcc_pkg::SGO_SEL_1R;
    else if (sgo_t == '0 && sgo_k == '0)   sel = htcc_pkg::SGO_SEL_2R;
    else                                   sel = htcc_pkg::SGO_SEL_SUM;
  end

endmodule
