// tb_htcc_mux1: checks that mux1 passes the second group operation result for
// key bit 1 and the first group operation result for key bit 0.
module tb_htcc_mux1;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic key_bit;
  logic [M-1:0] f_a, f_b, f_c, s_a, s_b, s_c, o_a, o_b, o_c;
  htcc_mux1 #(.M(M)) dut (.key_bit, .fgo_a(f_a), .fgo_b(f_b), .fgo_c(f_c),
    .sgo_a(s_a), .sgo_b(s_b), .sgo_c(s_c), .out_a(o_a), .out_b(o_b), .out_c(o_c));

  function automatic logic [M-1:0] rnd();
    logic [191:0] w;
    for (int i = 0; i < 192; i += 32) w[i +: 32] = $urandom();
    return w[M-1:0];
  endfunction

  initial begin
    for (int i = 0; i < 200; i++) begin
      f_a = rnd(); f_b = rnd(); f_c = rnd();
      s_a = rnd(); s_b = rnd(); s_c = rnd();
      key_bit = i[0];
      #1;
      checks++;
      if (key_bit ? (o_a !== s_a || o_b !== s_b || o_c !== s_c)
                  : (o_a !== f_a || o_b !== f_b || o_c !== f_c)) begin
        failures++; $display("FAIL key_bit=%b", key_bit);
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
