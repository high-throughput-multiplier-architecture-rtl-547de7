// tb_gf2m_mul: checks the combinational GF(2^M) multiplier for the three NIST
// fields (M = 163, 233, 283) against a schoolbook multiply-then-reduce model:
// random operands, multiplication by 0, 1 and p, and commutativity.
module tb_gf2m_mul;
  import htcc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [162:0] a163, b163, c163;
  logic [232:0] a233, b233, c233;
  logic [282:0] a283, b283, c283;

  gf2m_mul #(.M(163)) u163 (.m_in(a163), .n_in(b163), .c_out(c163));
  gf2m_mul #(.M(233)) u233 (.m_in(a233), .n_in(b233), .c_out(c233));
  gf2m_mul #(.M(283)) u283 (.m_in(a283), .n_in(b283), .c_out(c283));

  fe_t p163, p233, p283;

  task automatic check(string what, fe_t got, fe_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic one(fe_t x, fe_t y);
    a163 = x[162:0]; b163 = y[162:0];
    a233 = x[232:0]; b233 = y[232:0];
    a283 = x;        b283 = y;
    #1;
    check("m163", fe_t'(c163), f_mul(x & f_mask(163), y & f_mask(163), 163, p163));
    check("m233", fe_t'(c233), f_mul(x & f_mask(233), y & f_mask(233), 233, p233));
    check("m283", fe_t'(c283), f_mul(x, y, 283, p283));
  endtask

  initial begin
    p163 = htcc_pkg::nist_poly(163);
    p233 = htcc_pkg::nist_poly(233);
    p283 = htcc_pkg::nist_poly(283);
    one('0, f_rand(283));
    one(fe_t'(1), f_rand(283));
    one(fe_t'(2), f_mask(283));
    one(f_mask(283), f_mask(283));
    for (int i = 0; i < 200; i++) one(f_rand(283), f_rand(283));
    // commutativity and a known value: p^162 * p = p^163 = p^7+p^6+p^3+1
    a163 = 163'(1) << 162; b163 = 163'(2); #1;
    checks++; if (c163 !== 163'h0C9) begin failures++; $display("FAIL p^163 = %h", c163); end
    for (int i = 0; i < 20; i++) begin
      fe_t x, y; logic [162:0] r1;
      x = f_rand(163); y = f_rand(163);
      a163 = x[162:0]; b163 = y[162:0]; #1; r1 = c163;
      a163 = y[162:0]; b163 = x[162:0]; #1;
      checks++; if (c163 !== r1) begin failures++; $display("FAIL commutativity"); end
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
