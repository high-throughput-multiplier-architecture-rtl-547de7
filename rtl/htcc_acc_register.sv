// htcc_acc_register: the accumulator register G of the double-and-add loop.
// init (start of a multiplication) sets it to the point at infinity
// (1, 1, 0), the "G = 0" of the algorithm; en (one per key bit) loads the
// point chosen by mux1, so its output is fed back to the combined group block
// on the next cycle. Asynchronous active-low reset to the point at infinity.
// init has priority over en.
module htcc_acc_register #(
  parameter int unsigned M = htcc_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  input  logic [M-1:0] d_a,
  input  logic [M-1:0] d_b,
  input  logic [M-1:0] d_c,
  output logic [M-1:0] q_a,
  output logic [M-1:0] q_b,
  output logic [M-1:0] q_c
);

  localparam logic [M-1:0] ONE = M'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_a <= ONE; q_b <= ONE; q_c <= '0;
    end else if (init) begin
      q_a <= ONE; q_b <= ONE; q_c <= '0;
    end else if (en) begin
      q_a <= d_a; q_b <= d_b; q_c <= d_c;
    end
  end

endmodule
