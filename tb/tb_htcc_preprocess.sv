// tb_htcc_preprocess: checks the pre-processing box. After reset both stored
// points are at infinity; a load captures 1R = (p, q, 1) and 2R (compared
// with affine doubling in the reference model); without load the registers
// hold their values while the inputs change.
module tb_htcc_preprocess;
  import htcc_ref_pkg::*;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] bp, bq, cy, r1_a, r1_b, r1_c, r2_a, r2_b, r2_c;
  htcc_preprocess #(.M(M)) dut (.clk, .rst_n, .load, .base_p(bp), .base_q(bq),
    .curve_y(cy), .r1_a, .r1_b, .r1_c, .r2_a, .r2_b, .r2_c);

  fe_t poly;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    poly = htcc_pkg::nist_poly(M);
    bp = '0; bq = '0; cy = '0;
    repeat (2) @(posedge clk);
    #1;
    check("reset 1R infinity", r1_c == '0 && r1_a == M'(1) && r1_b == M'(1));
    check("reset 2R infinity", r2_c == '0);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      apoint_t p, d; fe_t ca, cb;
      p.inf = 0; p.x = f_rand_nz(M); p.y = f_rand(M); ca = f_rand(M);
      cb = curve_b_for(p.x, p.y, ca, M, poly);
      d = a_double(p, ca, M, poly);
      @(negedge clk);
      bp = p.x[M-1:0]; bq = p.y[M-1:0]; cy = cb[M-1:0]; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      check("1R", r1_a == p.x[M-1:0] && r1_b == p.y[M-1:0] && r1_c == M'(1));
      check("2R", proj_matches(fe_t'(r2_a), fe_t'(r2_b), fe_t'(r2_c), d, M, poly));
      bp = ~bp; bq = ~bq;
      @(negedge clk);
      check("hold", r1_a == p.x[M-1:0] && r1_b == p.y[M-1:0] &&
                    proj_matches(fe_t'(r2_a), fe_t'(r2_b), fe_t'(r2_c), d, M, poly));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
