// tb_htcc_acc_register: checks the accumulator register: reset and init give
// the point at infinity (1, 1, 0), en loads the input, init wins over en, and
// the value holds when neither is set.
module tb_htcc_acc_register;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] d_a, d_b, d_c, q_a, q_b, q_c;
  htcc_acc_register #(.M(M)) dut (.clk, .rst_n, .init, .en, .d_a, .d_b, .d_c, .q_a, .q_b, .q_c);

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
    check("reset to infinity", q_a == M'(1) && q_b == M'(1) && q_c == '0);
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) begin
      logic [M-1:0] a, b, c;
      a = rnd(); b = rnd(); c = rnd();
      d_a = a; d_b = b; d_c = c; en = 1'b1;
      @(negedge clk);
      check("load", q_a == a && q_b == b && q_c == c);
      en = 1'b0; d_a = rnd(); d_b = rnd(); d_c = rnd();
      @(negedge clk);
      check("hold", q_a == a && q_b == b && q_c == c);
      init = 1'b1; en = (i % 2 == 0);
      @(negedge clk);
      check("init to infinity", q_a == M'(1) && q_b == M'(1) && q_c == '0);
      init = 1'b0; en = 1'b0;
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
