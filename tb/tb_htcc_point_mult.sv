// tb_htcc_point_mult: end-to-end test of the point multiplier at its default
// size (GF(2^163), NIST pentanomial), against the affine reference model.
//
// Runs: random full-width keys on random curves; keys 0, 1, 2, 3 and a key
// with many leading zeros; a curve on which the base point has order three,
// so that the sum 2G + R degenerates (2G = R, forcing the precomputed 2R) or
// gives infinity (2G = -R); a start request during a run (must be ignored);
// operand inputs changed during a run (must have been captured); and two
// multiplications back to back. Each result is compared in projective form
// (A = p*C^2, B = q*C^3) and each latency must be exactly M cycles from the
// start edge to done. The test also counts how often each mechanism was used
// (1R, 2R and computed sum through mux2; doubling and sum through mux1; sum
// reaching infinity; ignored start) and fails if one never happened.
module tb_htcc_point_mult;
  import htcc_ref_pkg::*;
  import htcc_pkg::*;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] key, bp, bq, cx, cy, g_p, g_q, g_r;
  logic busy, done;

  htcc_point_mult dut (.clk, .rst_n, .start, .key, .base_p(bp), .base_q(bq),
    .curve_x(cx), .curve_y(cy), .busy, .done, .g_p, .g_q, .g_r);

  fe_t poly;
  int n_sel_1r = 0, n_sel_2r = 0, n_sel_sum = 0, n_take_fgo = 0, n_take_sgo = 0;
  int n_sum_inf = 0, n_start_ignored = 0;

  // Mechanism counters, sampled on every step of the loop.
  always @(posedge clk) begin
    if (rst_n && dut.step) begin
      if (dut.key_q[dut.count]) begin
        n_take_sgo++;
        case (dut.sgo_sel)
          SGO_SEL_1R: n_sel_1r++;
          SGO_SEL_2R: n_sel_2r++;
          default: begin
            n_sel_sum++;
            if (dut.sum_c == '0) n_sum_inf++;
          end
        endcase
      end else begin
        n_take_fgo++;
      end
    end
    if (rst_n && start && busy) n_start_ignored++;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One multiplication; optionally poke start or scramble inputs mid-run.
  task automatic mult(fe_t s, apoint_t r, fe_t ca, fe_t cb, string what,
                      bit poke = 1'b0, bit scramble = 1'b0);
    apoint_t e;
    int cycles;
    e = a_smul(s & f_mask(M), r, ca, M, poly);
    // Start in the cycle done is high if a run just finished (back to back).
    if (!done) @(negedge clk);
    key = s[M-1:0]; bp = r.x[M-1:0]; bq = r.y[M-1:0]; cx = ca[M-1:0]; cy = cb[M-1:0];
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done && cycles <= 4 * M) begin
      if (scramble) begin key = ~key; bp = ~bp; bq = bq ^ cy; cx = ~cx; cy = ~cy; end
      if (poke && cycles == 20) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles++;
    end
    check({what, ": latency of M cycles"}, cycles == M);
    check({what, ": result"}, proj_matches(fe_t'(g_p), fe_t'(g_q), fe_t'(g_r), e, M, poly));
    if (!proj_matches(fe_t'(g_p), fe_t'(g_q), fe_t'(g_r), e, M, poly))
      $display("  got (%h, %h, %h) exp inf=%0b (%h, %h)", g_p, g_q, g_r, e.inf, e.x, e.y);
  endtask

  task automatic random_curve(output apoint_t r, output fe_t ca, output fe_t cb);
    r.inf = 0; r.x = f_rand_nz(M); r.y = f_rand(M); ca = f_rand(M);
    cb = curve_b_for(r.x, r.y, ca, M, poly);
  endtask

  initial begin
    apoint_t r; fe_t ca, cb;
    poly = nist_poly(M);
    key = '0; bp = '0; bq = '0; cx = '0; cy = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      random_curve(r, ca, cb);
      mult(f_rand(M) | (fe_t'(1) << (M - 1)), r, ca, cb, "random key");
    end
    random_curve(r, ca, cb);
    mult('0, r, ca, cb, "key 0");
    check("key 0 gives infinity", g_r == '0);
    mult(fe_t'(1), r, ca, cb, "key 1");
    mult(fe_t'(2), r, ca, cb, "key 2");
    mult(fe_t'(3), r, ca, cb, "key 3");
    mult(f_rand(40), r, ca, cb, "short key");
    mult(f_rand(M), r, ca, cb, "start while busy", 1'b1, 1'b0);
    mult(f_rand(M), r, ca, cb, "inputs change while busy", 1'b0, 1'b1);
    // Base point of order three: 2*(2R) = R and 2R = -R.
    r.inf = 0; r.x = f_rand_nz(M); r.y = f_rand(M);
    order3_curve(r.x, r.y, M, poly, ca, cb);
    mult(fe_t'(5), r, ca, cb, "order three, key 5");
    mult(fe_t'(3), r, ca, cb, "order three, key 3");
    mult(f_rand(M), r, ca, cb, "order three, random key");
    // Back to back: start again in the cycle done is high.
    random_curve(r, ca, cb);
    @(negedge clk);
    mult(f_rand(M), r, ca, cb, "back to back 1");
    mult(f_rand(M), r, ca, cb, "back to back 2");

    $display("mechanisms: mux2 1R=%0d 2R=%0d sum=%0d, mux1 doubling=%0d sum=%0d, sum at infinity=%0d, start ignored=%0d",
             n_sel_1r, n_sel_2r, n_sel_sum, n_take_fgo, n_take_sgo, n_sum_inf, n_start_ignored);
    check("mechanism 1R used", n_sel_1r > 0);
    check("mechanism 2R used", n_sel_2r > 0);
    check("mechanism computed sum used", n_sel_sum > 0);
    check("mechanism doubling kept", n_take_fgo > 0);
    check("mechanism sum kept", n_take_sgo > 0);
    check("mechanism sum reaches infinity", n_sum_inf > 0);
    check("mechanism start ignored while busy", n_start_ignored > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * M) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
