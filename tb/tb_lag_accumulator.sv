// tb_lag_accumulator: random products, enables and clears into a full-size
// (24-bit) accumulator and a 6-bit one that wraps; each clock the count must
// equal floor(sum / 16) modulo 2^CNT_W of the products accumulated since the
// last clear.
module tb_lag_accumulator;
  import ac_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en, clr;
  prod_t prod;
  logic [23:0] count;
  logic [5:0]  count_s;
  longint sum = 0;
  int checks = 0, failures = 0, wraps = 0;

  lag_accumulator dut (.clk, .rst_n, .en, .clr, .prod, .count);
  lag_accumulator #(.CNT_W(6)) dut_s (.clk, .rst_n, .en, .clr, .prod, .count(count_s));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; prod = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      en   = ($urandom_range(9) != 0);
      clr  = ($urandom_range(4999) == 0);
      prod = prod_t'($urandom_range(6));
      if (c == 10000) clr = 1;
      @(negedge clk);
      if (clr) sum = 0;
      else if (en) sum += prod;
      checks += 2;
      if (longint'(count) != ((sum >> 4) % (longint'(1) << 24))) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d count=%0d sum=%0d", c, count, sum);
      end
      if (longint'(count_s) != ((sum >> 4) % 64)) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d count_s=%0d sum=%0d", c, count_s, sum);
      end
      if ((sum >> 4) >= 64) wraps++;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL small counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
