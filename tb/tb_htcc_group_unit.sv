// tb_htcc_group_unit: checks the combined group block. The accumulator is
// G = k*R for a random k with a random projective scale, R is affine (C = 1).
// FGO must equal 2G and SGO must equal 2G + R; T and K must be zero exactly
// when 2G = R (exercised on a curve where R has order three and G = 2R).
module tb_htcc_group_unit;
  import htcc_ref_pkg::*;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] g_a, g_b, g_c, r_a, r_b, r_c, cx, cy;
  logic [M-1:0] fgo_a, fgo_b, fgo_c, sgo_a, sgo_b, sgo_c, sgo_t, sgo_k;
  htcc_group_unit #(.M(M)) dut (.g_a, .g_b, .g_c, .r_a, .r_b, .r_c,
    .curve_x(cx), .curve_y(cy), .fgo_a, .fgo_b, .fgo_c,
    .sgo_a, .sgo_b, .sgo_c, .sgo_t, .sgo_k);

  fe_t poly;

  task automatic apply(apoint_t g, apoint_t r, fe_t ca, fe_t cb);
    fe_t pa, pb, pc;
    to_proj(g, f_rand_nz(M), M, poly, pa, pb, pc);
    g_a = pa[M-1:0]; g_b = pb[M-1:0]; g_c = pc[M-1:0];
    r_a = r.x[M-1:0]; r_b = r.y[M-1:0]; r_c = M'(1);
    cx = ca[M-1:0]; cy = cb[M-1:0];
    #1;
  endtask

  initial begin
    poly = htcc_pkg::nist_poly(M);
    for (int i = 0; i < 25; i++) begin
      apoint_t r, g, d, s; fe_t ca, cb;
      r.inf = 0; r.x = f_rand_nz(M); r.y = f_rand(M); ca = f_rand(M);
      cb = curve_b_for(r.x, r.y, ca, M, poly);
      g = a_smul(fe_t'($urandom_range(1, 5000)), r, ca, M, poly);
      d = a_double(g, ca, M, poly);
      s = a_add(d, r, ca, M, poly);
      apply(g, r, ca, cb);
      checks++;
      if (!proj_matches(fe_t'(fgo_a), fe_t'(fgo_b), fe_t'(fgo_c), d, M, poly)) begin
        failures++; $display("FAIL FGO %0d", i);
      end
      checks++;
      if (!proj_matches(fe_t'(sgo_a), fe_t'(sgo_b), fe_t'(sgo_c), s, M, poly)) begin
        failures++; $display("FAIL SGO %0d", i);
      end
      checks++;
      if (sgo_t == '0 && sgo_k == '0) begin failures++; $display("FAIL T=K=0 for 2G != R"); end
    end
    // Order-three R: 2*(2R) = 4R = R, so T = K = 0.
    for (int i = 0; i < 5; i++) begin
      apoint_t r, g; fe_t ca, cb;
      r.inf = 0; r.x = f_rand_nz(M); r.y = f_rand(M);
      order3_curve(r.x, r.y, M, poly, ca, cb);
      g = a_double(r, ca, M, poly);
      apply(g, r, ca, cb);
      checks++;
      if (sgo_t != '0 || sgo_k != '0) begin failures++; $display("FAIL 2G = R not flagged"); end
      checks++;
      if (!proj_matches(fe_t'(fgo_a), fe_t'(fgo_b), fe_t'(fgo_c), r, M, poly)) begin
        failures++; $display("FAIL FGO on order-three point");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
