// tb_htcc_point_mult_nist: the point multiplier on the three NIST binary
// curves B-163, B-233 and B-283 (q^2 + pq = p^3 + p^2 + y, base point G of
// prime order n), one multiplier instance per field size. For each curve:
// a random key against the affine reference model, key n (must give the
// point at infinity), key n-1 (must give -G = (Gx, Gx + Gy)) and key n+1
// (must give G). Every multiplication must take exactly M cycles.
module tb_htcc_point_mult_nist;
  import htcc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Curve constants (FIPS 186 binary curves).
  localparam fe_t B163 = 283'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam fe_t GX163 = 283'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam fe_t GY163 = 283'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;
  localparam fe_t N163 = 283'h40000000000000000000292fe77e70c12a4234c33;
  localparam fe_t B233 = 283'h066647ede6c332c7f8c0923bb58213b333b20e9ce4281fe115f7d8f90ad;
  localparam fe_t GX233 = 283'h0fac9dfcbac8313bb2139f1bb755fef65bc391f8b36f8f8eb7371fd558b;
  localparam fe_t GY233 = 283'h1006a08a41903350678e58528bebf8a0beff867a7ca36716f7e01f81052;
  localparam fe_t N233 = 283'h1000000000000000000000000000013e974e72f8a6922031d2603cfe0d7;
  localparam fe_t B283 = 283'h27b680ac8b8596da5a4af8a19a0303fca97fd7645309fa2a581485af6263e313b79a2f5;
  localparam fe_t GX283 = 283'h5f939258db7dd90e1934f8c70b0dfec2eed25b8557eac9c80e2e198f8cdbecd86b12053;
  localparam fe_t GY283 = 283'h3676854fe24141cb98fe6d4b20d02b4516ff702350eddb0826779c813f0df45be8112f4;
  localparam fe_t N283 = 283'h3ffffffffffffffffffffffffffffffffffef90399660fc938a90165b042a7cefadb307;

  // One multiplier per field size, driven by the same generic sequence.
  logic         start163, start233, start283;
  logic [162:0] key163, g163_p, g163_q, g163_r;
  logic [232:0] key233, g233_p, g233_q, g233_r;
  logic [282:0] key283, g283_p, g283_q, g283_r;
  logic         busy163, busy233, busy283, done163, done233, done283;

  htcc_point_mult #(.M(163)) u163 (.clk, .rst_n, .start(start163), .key(key163),
    .base_p(GX163[162:0]), .base_q(GY163[162:0]), .curve_x(163'(1)), .curve_y(B163[162:0]),
    .busy(busy163), .done(done163), .g_p(g163_p), .g_q(g163_q), .g_r(g163_r));
  htcc_point_mult #(.M(233)) u233 (.clk, .rst_n, .start(start233), .key(key233),
    .base_p(GX233[232:0]), .base_q(GY233[232:0]), .curve_x(233'(1)), .curve_y(B233[232:0]),
    .busy(busy233), .done(done233), .g_p(g233_p), .g_q(g233_q), .g_r(g233_r));
  htcc_point_mult #(.M(283)) u283 (.clk, .rst_n, .start(start283), .key(key283),
    .base_p(GX283), .base_q(GY283), .curve_x(283'(1)), .curve_y(B283),
    .busy(busy283), .done(done283), .g_p(g283_p), .g_q(g283_q), .g_r(g283_r));

  task automatic drive(int m, fe_t k, bit s);
    case (m)
      163: begin key163 = k[162:0]; start163 = s; end
      233: begin key233 = k[232:0]; start233 = s; end
      default: begin key283 = k; start283 = s; end
    endcase
  endtask

  function automatic bit is_done(int m);
    return (m == 163) ? done163 : (m == 233) ? done233 : done283;
  endfunction

  function automatic void result(int m, output fe_t a, output fe_t b, output fe_t c);
    case (m)
      163: begin a = fe_t'(g163_p); b = fe_t'(g163_q); c = fe_t'(g163_r); end
      233: begin a = fe_t'(g233_p); b = fe_t'(g233_q); c = fe_t'(g233_r); end
      default: begin a = g283_p; b = g283_q; c = g283_r; end
    endcase
  endfunction

  task automatic mult(int m, fe_t k, apoint_t exp, string what);
    int cycles;
    fe_t a, b, c, poly;
    poly = htcc_pkg::nist_poly(m);
    @(negedge clk);
    drive(m, k, 1'b1);
    @(negedge clk);
    drive(m, k, 1'b0);
    cycles = 0;
    while (!is_done(m) && cycles <= 4 * m) begin
      @(negedge clk);
      cycles++;
    end
    result(m, a, b, c);
    check($sformatf("B-%0d %s: latency", m, what), cycles == m);
    check($sformatf("B-%0d %s: result", m, what), proj_matches(a, b, c, exp, m, poly));
  endtask

  task automatic curve_tests(int m, fe_t gx, fe_t gy, fe_t n);
    apoint_t g, e;
    fe_t k, poly;
    poly = htcc_pkg::nist_poly(m);
    g.inf = 0; g.x = gx; g.y = gy;
    k = f_rand(m);
    mult(m, k, a_smul(k, g, fe_t'(1), m, poly), "random key");
    e.inf = 1; e.x = '0; e.y = '0;
    mult(m, n, e, "key n");
    e.inf = 0; e.x = gx; e.y = gx ^ gy;
    mult(m, n - 1, e, "key n-1");
    mult(m, n + 1, g, "key n+1");
  endtask

  initial begin
    start163 = 0; start233 = 0; start283 = 0;
    key163 = '0; key233 = '0; key283 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      curve_tests(163, GX163, GY163, N163);
      curve_tests(233, GX233, GY233, N233);
      curve_tests(283, GX283, GY283, N283);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
