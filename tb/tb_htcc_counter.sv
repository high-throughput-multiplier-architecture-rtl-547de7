// tb_htcc_counter: checks the sequencing of a multiplication at the default
// M = 163: load only on start while idle, M step cycles with the key bit
// index counting M-1 down to 0, last on index 0, done exactly M clock edges
// after the start edge, and start requests during a run ignored.
module tb_htcc_counter;
  localparam int M  = 163;
  localparam int CW = $clog2(M);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic busy, load, step, last, done;
  logic [CW-1:0] count;
  htcc_counter #(.M(M)) dut (.clk, .rst_n, .start, .busy, .load, .step, .count, .last, .done);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_one(bit poke_start);
    int steps, cycles;
    @(negedge clk);
    start = 1'b1; #1;
    check("load on start", load == 1'b1 && busy == 1'b0);
    @(negedge clk);
    start = 1'b0;
    steps = 0; cycles = 0;
    while (!done) begin
      check("busy while running", busy && step);
      check("count order", count == CW'(M - 1 - steps));
      check("last only on bit 0", last == (count == '0));
      if (poke_start && steps == 10) begin start = 1'b1; #1; check("no load while busy", !load); end
      @(negedge clk);
      start = 1'b0;
      steps++; cycles++;
      if (cycles > 2 * M) break;
    end
    check("M steps then done", steps == M);
    check("idle at done", !busy && !step);
    @(negedge clk);
    check("done is a pulse", !done);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check("idle in reset", !busy && !done && !load);
    rst_n = 1'b1;
    @(negedge clk);
    check("no load without start", !load && !busy);
    run_one(1'b0);
    run_one(1'b1);
    repeat (3) @(negedge clk);
    check("stays idle", !busy && !done);
    run_one(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
