// tb_htcc_mux2: checks that each select code of mux2 passes the right point
// (00: 1R, 01: 2R, 10: computed sum) with random data on all inputs.
module tb_htcc_mux2;
  localparam int M = 163;
  import htcc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sgo_sel_e sel;
  logic [M-1:0] r1_a, r1_b, r1_c, r2_a, r2_b, r2_c, s_a, s_b, s_c, o_a, o_b, o_c;
  htcc_mux2 #(.M(M)) dut (.sel, .r1_a, .r1_b, .r1_c, .r2_a, .r2_b, .r2_c,
    .sum_a(s_a), .sum_b(s_b), .sum_c(s_c), .out_a(o_a), .out_b(o_b), .out_c(o_c));

  function automatic logic [M-1:0] rnd();
    logic [191:0] w;
    for (int i = 0; i < 192; i += 32) w[i +: 32] = $urandom();
    return w[M-1:0];
  endfunction

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [M-1:0] ea, eb, ec;
      r1_a = rnd(); r1_b = rnd(); r1_c = rnd();
      r2_a = rnd(); r2_b = rnd(); r2_c = rnd();
      s_a = rnd(); s_b = rnd(); s_c = rnd();
      case (i % 3)
        0: begin sel = SGO_SEL_1R;  ea = r1_a; eb = r1_b; ec = r1_c; end
        1: begin sel = SGO_SEL_2R;  ea = r2_a; eb = r2_b; ec = r2_c; end
        default: begin sel = SGO_SEL_SUM; ea = s_a; eb = s_b; ec = s_c; end
      endcase
      #1;
      checks++;
      if (o_a !== ea || o_b !== eb || o_c !== ec) begin
        failures++; $display("FAIL sel=%b", sel);
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
