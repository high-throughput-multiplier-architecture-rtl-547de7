// htcc_mux2: three-way point multiplexer feeding the second-group-operation
// input of mux1. Input 00 is the precomputed base point 1R, input 01 the
// precomputed 2R, input 10 the sum computed by the combined group block; the
// select comes from htcc_select_logic. The unused code 11 gives the computed
// sum. Combinational.
module htcc_mux2 #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT
) (
  input  htcc_pkg::sgo_sel_e sel,
  input  logic [M-1:0]       r1_a,
  input  logic [M-1:0]       r1_b,
  input  logic [M-1:0]       r1_c,
  input  logic [M-1:0]       r2_a,
  input  logic [M-1:0]       r2_b,
  input  logic [M-1:0]       r2_c,
  input  logic [M-1:0]       sum_a,
  input  logic [M-1:0]       sum_b,
  input  logic [M-1:0]       sum_c,
  output logic [M-1:0]       out_a,
  output logic [M-1:0]       out_b,
  output logic [M-1:0]       out_c
);

  always_comb begin
    unique case (sel)
      htcc_pkg::SGO_SEL_1R: begin out_a = r1_a;  out_b = r1_b;  out_c = r1_c;  end
      htcc_pkg::SGO_SEL_2R: begin out_a = r2_a;  out_b = r2_b;  out_c = r2_c;  end
      default:              begin out_a = sum_a; out_b = sum_b; out_c = sum_c; end
    endcase
  end

endmodule
