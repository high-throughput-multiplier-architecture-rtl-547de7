// tb_htcc_select_logic: checks the mux2 select for each case: 2G at infinity
// (C = 0) selects 1R, T = K = 0 selects 2R, anything else the computed sum;
// infinity takes priority. Random values plus single-bit corner cases.
module tb_htcc_select_logic;
  localparam int M = 163;
  import htcc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] fgo_c, t, k;
  sgo_sel_e sel;
  htcc_select_logic #(.M(M)) dut (.fgo_c, .sgo_t(t), .sgo_k(k), .sel);

  function automatic logic [M-1:0] rnd();
    logic [191:0] w;
    for (int i = 0; i < 192; i += 32) w[i +: 32] = $urandom();
    return w[M-1:0];
  endfunction

  task automatic one(logic [M-1:0] c, logic [M-1:0] tt, logic [M-1:0] kk);
    sgo_sel_e exp;
    fgo_c = c; t = tt; k = kk; #1;
    exp = (c == '0) ? SGO_SEL_1R : ((tt == '0 && kk == '0) ? SGO_SEL_2R : SGO_SEL_SUM);
    checks++;
    if (sel !== exp) begin
      failures++;
      $display("FAIL c==0:%0b t==0:%0b k==0:%0b sel=%b exp=%b", c == '0, tt == '0, kk == '0, sel, exp);
    end
  endtask

  initial begin
    one('0, '0, '0);
    one('0, rnd(), rnd());
    one(rnd() | 1, '0, '0);
    one(M'(1) << (M - 1), '0, '0);
    one(rnd() | 1, '0, M'(1) << (M - 1));
    one(rnd() | 1, M'(1) << 80, '0);
    for (int i = 0; i < 300; i++) begin
      logic [M-1:0] c, tt, kk;
      c  = ($urandom_range(3) == 0) ? '0 : rnd();
      tt = ($urandom_range(2) == 0) ? '0 : rnd();
      kk = ($urandom_range(2) == 0) ? '0 : rnd();
      one(c, tt, kk);
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
