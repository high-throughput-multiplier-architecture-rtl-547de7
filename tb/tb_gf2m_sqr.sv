// tb_gf2m_sqr: checks the GF(2^M) squarer for M = 163, 233, 283 against the
// reference multiplier computing a*a, on random and corner-case inputs.
module tb_gf2m_sqr;
  import htcc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [162:0] a163, c163;
  logic [232:0] a233, c233;
  logic [282:0] a283, c283;

  gf2m_sqr #(.M(163)) u163 (.a_in(a163), .c_out(c163));
  gf2m_sqr #(.M(233)) u233 (.a_in(a233), .c_out(c233));
  gf2m_sqr #(.M(283)) u283 (.a_in(a283), .c_out(c283));

  fe_t p163, p233, p283;

  task automatic check(string what, fe_t got, fe_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic one(fe_t x);
    fe_t x163, x233;
    x163 = x & f_mask(163); x233 = x & f_mask(233);
    a163 = x163[162:0]; a233 = x233[232:0]; a283 = x;
    #1;
    check("s163", fe_t'(c163), f_mul(x163, x163, 163, p163));
    check("s233", fe_t'(c233), f_mul(x233, x233, 233, p233));
    check("s283", fe_t'(c283), f_mul(x, x, 283, p283));
  endtask

  initial begin
    p163 = htcc_pkg::nist_poly(163);
    p233 = htcc_pkg::nist_poly(233);
    p283 = htcc_pkg::nist_poly(283);
    one('0);
    one(fe_t'(1));
    one(f_mask(283));
    for (int i = 0; i < 283; i += 7) one(fe_t'(1) << i);
    for (int i = 0; i < 200; i++) one(f_rand(283));
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
