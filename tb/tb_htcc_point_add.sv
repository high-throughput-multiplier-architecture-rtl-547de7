// tb_htcc_point_add: checks projective point addition against affine addition
// in the reference model. P1 is a random point on a random curve, P2 = k*P1
// for a random k, both with random projective scales. Also checks the
// degenerate cases the select logic relies on: P + P gives T = K = 0, and
// P + (-P) gives T = 0, K != 0 and C3 = 0 (a valid point at infinity).
module tb_htcc_point_add;
  import htcc_ref_pkg::*;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] a1, b1, c1, a2, b2, c2, cx, a3, b3, c3, t, k;
  htcc_point_add #(.M(M)) dut (.a1, .b1, .c1, .a2, .b2, .c2, .curve_x(cx),
                               .a3, .b3, .c3, .t_out(t), .k_out(k));

  fe_t poly;

  task automatic apply(apoint_t p, apoint_t q, fe_t ca);
    fe_t pa, pb, pc, qa, qb, qc;
    to_proj(p, f_rand_nz(M), M, poly, pa, pb, pc);
    to_proj(q, f_rand_nz(M), M, poly, qa, qb, qc);
    a1 = pa[M-1:0]; b1 = pb[M-1:0]; c1 = pc[M-1:0];
    a2 = qa[M-1:0]; b2 = qb[M-1:0]; c2 = qc[M-1:0];
    cx = ca[M-1:0];
    #1;
  endtask

  initial begin
    poly = htcc_pkg::nist_poly(M);
    for (int i = 0; i < 30; i++) begin
      apoint_t p, q, e; fe_t ca, cb;
      p.inf = 0; p.x = f_rand_nz(M); p.y = f_rand(M); ca = f_rand(M);
      cb = curve_b_for(p.x, p.y, ca, M, poly);
      q = a_smul(fe_t'(2 + $urandom_range(1000)), p, ca, M, poly);
      if (q.inf || q.x == p.x) continue;
      apply(p, q, ca);
      e = a_add(p, q, ca, M, poly);
      checks++;
      if (!proj_matches(fe_t'(a3), fe_t'(b3), fe_t'(c3), e, M, poly)) begin
        failures++; $display("FAIL sum %0d", i);
      end
      checks++;
      if (t == '0 || c3 == '0) begin failures++; $display("FAIL T/C3 zero for distinct points"); end
      // P + P: T and K both vanish.
      apply(p, p, ca);
      checks++;
      if (t != '0 || k != '0) begin failures++; $display("FAIL P+P: T=%h K=%h", t, k); end
      // P + (-P), -(x, y) = (x, x + y): infinity with K != 0.
      e = p; e.y = p.x ^ p.y;
      apply(p, e, ca);
      checks++;
      if (t != '0 || k == '0 || c3 != '0) begin
        failures++; $display("FAIL P-P: T=%h K=%h C3=%h", t, k, c3);
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
