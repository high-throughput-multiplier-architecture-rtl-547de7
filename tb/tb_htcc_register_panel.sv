// tb_htcc_register_panel: checks the output register panel: cleared by
// reset, loads on capture, holds otherwise.
module tb_htcc_register_panel;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, capture = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] d_a, d_b, d_c, g_p, g_q, g_r;
  htcc_register_panel #(.M(M)) dut (.clk, .rst_n, .capture, .d_a, .d_b, .d_c, .g_p, .g_q, .g_r);

  function automatic logic [M-1:0] rnd();
    logic [191:0] w;
    for (int i = 0; i < 192; i += 32) w[i +: 32] = $urandom();
    return w[M-1:0];
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    d_a = rnd(); d_b = rnd(); d_c = rnd();
    repeat (2) @(negedge clk);
    check("reset clears", g_p == '0 && g_q == '0 && g_r == '0);
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) begin
      logic [M-1:0] a, b, c;
      a = rnd(); b = rnd(); c = rnd();
      d_a = a; d_b = b; d_c = c; capture = 1'b1;
      @(negedge clk);
      check("capture", g_p == a && g_q == b && g_r == c);
      capture = 1'b0;
      repeat (2) begin
        d_a = rnd(); d_b = rnd(); d_c = rnd();
        @(negedge clk);
        check("hold", g_p == a && g_q == b && g_r == c);
      end
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
