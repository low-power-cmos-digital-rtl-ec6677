// tb_delay_line: drives random samples into the 32-stage delay line and checks
// that tap i always equals the input of i+1 clocks earlier (00 before that).
module tb_delay_line;
  import ac_pkg::*;

  localparam int LEN = 32;
  logic clk = 0, rst_n = 0;
  sample_t din;
  sample_t taps [LEN];
  logic [1:0] hist [$];
  int checks = 0, failures = 0;

  delay_line dut (.clk, .rst_n, .din, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int i = 0; i < LEN; i++) hist.push_front(2'b00);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      for (int i = 0; i < LEN; i++) begin
        checks++;
        if (taps[i] !== sample_t'(hist[i])) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d tap %0d = %b exp %b", c, i, taps[i], hist[i]);
        end
      end
      din = sample_t'($urandom_range(3));
      hist.push_front(din);
      void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
