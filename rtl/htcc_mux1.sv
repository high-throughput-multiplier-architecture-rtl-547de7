// htcc_mux1: key-driven point multiplexer. For the key bit addressed by the
// counter it passes on the second group operation result (2G + R) when the bit
// is one and the first group operation result (2G) when it is zero, which is
// one iteration of the left-to-right double-and-add loop. Combinational.
module htcc_mux1 #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT
) (
  input  logic         key_bit,
  input  logic [M-1:0] fgo_a,
  input  logic [M-1:0] fgo_b,
  input  logic [M-1:0] fgo_c,
  input  logic [M-1:0] sgo_a,
  input  logic [M-1:0] sgo_b,
  input  logic [M-1:0] sgo_c,
  output logic [M-1:0] out_a,
  output logic [M-1:0] out_b,
  output logic [M-1:0] out_c
);

  always_comb begin
    if (key_bit) begin
      out_a = sgo_a; out_b = sgo_b; out_c = sgo_c;
    end else begin
      out_a = fgo_a; out_b = fgo_b; out_c = fgo_c;
    end
  end

endmodule
