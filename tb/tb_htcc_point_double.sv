// tb_htcc_point_double: checks projective point doubling against affine
// doubling in the reference model. Each test draws a random point and curve
// constant x, derives y so that the point is on the curve, gives the point a
// random projective scale, and compares 2P. Also checks that the point at
// infinity and a point of order two (p = 0) double to infinity.
module tb_htcc_point_double;
  import htcc_ref_pkg::*;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] a1, b1, c1, cy, a3, b3, c3;
  htcc_point_double #(.M(M)) dut (.a1, .b1, .c1, .curve_y(cy), .a3, .b3, .c3);

  fe_t poly;

  task automatic run(apoint_t p, fe_t ca, fe_t cb, fe_t l, string what);
    fe_t pa, pb, pc;
    apoint_t e;
    to_proj(p, l, M, poly, pa, pb, pc);
    a1 = pa[M-1:0]; b1 = pb[M-1:0]; c1 = pc[M-1:0]; cy = cb[M-1:0];
    #1;
    e = a_double(p, ca, M, poly);
    checks++;
    if (!proj_matches(fe_t'(a3), fe_t'(b3), fe_t'(c3), e, M, poly)) begin
      failures++;
      $display("FAIL %s: got (%h,%h,%h)", what, a3, b3, c3);
    end
  endtask

  initial begin
    poly = htcc_pkg::nist_poly(M);
    for (int i = 0; i < 40; i++) begin
      apoint_t p; fe_t ca, cb;
      p.inf = 0; p.x = f_rand_nz(M); p.y = f_rand(M); ca = f_rand(M);
      cb = curve_b_for(p.x, p.y, ca, M, poly);
      run(p, ca, cb, (i < 5) ? fe_t'(1) : f_rand_nz(M), "random");
    end
    begin
      apoint_t p; fe_t ca, cb;
      p.inf = 1; p.x = '0; p.y = '0; ca = f_rand(M); cb = f_rand_nz(M);
      run(p, ca, cb, fe_t'(1), "infinity (1,1,0)");
      run(p, ca, cb, f_rand_nz(M), "infinity scaled");
      p.inf = 0; p.x = '0; p.y = f_rand_nz(M);
      cb = curve_b_for(p.x, p.y, ca, M, poly);
      run(p, ca, cb, f_rand_nz(M), "order two");
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
