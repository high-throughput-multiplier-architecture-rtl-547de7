// htcc_counter: sequencing of one point multiplication.
//
// A start request while idle asserts load for that cycle ("start group
// operation": capture operands, clear the accumulator). From the next clock
// edge on, the counter runs for exactly M cycles with step high ("count group
// operation"), presenting the key bit index count = M-1, M-2, ..., 0, one per
// cycle. last marks the cycle of bit 0. done is a one-cycle pulse in the cycle
// after the last step, when the result registers hold the product; it is
// asserted M clock edges after the edge that sampled start. Start requests
// while busy are ignored.
//
// Interface: clk, asynchronous active-low rst_n, start; outputs busy, load,
// step, count, last, done.
//
// The M-cycle run follows the architecture description; the handshake and
// reset behaviour are this design's own choices.
module htcc_counter #(
  parameter int unsigned M  = htcc_pkg::M_DEFAULT,
  parameter int unsigned CW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          load,
  output logic          step,
  output logic [CW-1:0] count,
  output logic          last,
  output logic          done
);

  typedef enum logic {IDLE = 1'b0, RUN = 1'b1} state_e;

  state_e        state_q;
  logic [CW-1:0] count_q;
  logic          done_q;

  assign busy  = (state_q == RUN);
  assign load  = start && (state_q == IDLE);
  assign step  = (state_q == RUN);
  assign count = count_q;
  assign last  = (state_q == RUN) && (count_q == '0);
  assign done  = done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      count_q <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= last;
      // The key bit index stays inside the key while running.
      a_count_range: assert (state_q != RUN || count_q < CW'(M))
        else $error("htcc_counter: key bit index out of range");
      if (load) begin
        state_q <= RUN;
        count_q <= CW'(M - 1);
      end else if (state_q == RUN) begin
        if (count_q == '0) state_q <= IDLE;
        else               count_q <= count_q - 1'b1;
      end
    end
  end

endmodule
