// tb_integration_timer: starts the timer with several presets and checks that
// running stays high for exactly preset clocks, that tc follows for one clock,
// that the timer then waits for the next start, and that a start while running
// restarts the count.
module tb_integration_timer;
  logic clk = 0, rst_n = 0;
  logic [31:0] preset;
  logic start, running, tc;
  int checks = 0, failures = 0;

  integration_timer dut (.clk, .rst_n, .preset, .start, .running, .tc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // start with preset n, count running clocks and check the tc pulse
  task automatic run(int unsigned n);
    int unsigned hi, tcs;
    preset = n; start = 1; @(negedge clk); start = 0;
    hi = 0; tcs = 0;
    while (running && hi <= n + 2) begin
      hi++;
      check(!tc, "tc while running");
      @(negedge clk);
    end
    check(hi == ((n == 0) ? 1 : n), $sformatf("ran %0d clocks, preset %0d", hi, n));
    check(tc == 1, "tc after run");
    @(negedge clk);
    check(tc == 0, "tc lasts one clock");
    repeat (5) begin
      @(negedge clk);
      check(!running && !tc, "idle until restarted");
    end
  endtask

  initial begin
    preset = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1);
    run(2);
    run(100);
    run(0);
    run(1000 + $urandom_range(500));
    // restart in the middle of a run
    preset = 50; start = 1; @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    run(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
