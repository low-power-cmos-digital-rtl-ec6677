// tb_readout_sreg: loads 32 random 24-bit counts and reads them back as 96
// bytes and then as 48 words, checking each against the counts (lag 0 first,
// most significant byte first) and the zero fill after the last one.
module tb_readout_sreg;
  import ac_pkg::*;

  localparam int NCH = 32, CNT_W = 24;
  logic clk = 0, rst_n = 0;
  logic load, shift, word_mode;
  logic [NCH*CNT_W-1:0] counts;
  logic [BUS_W-1:0] dout;
  logic [CNT_W-1:0] val [NCH];
  int checks = 0, failures = 0;

  readout_sreg dut (.clk, .rst_n, .load, .counts, .shift, .word_mode, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit k of the stream, k = 0 being lag 0's most significant bit
  function automatic logic sbit(int k);
    if (k >= NCH * CNT_W) return 1'b0;
    return val[k / CNT_W][CNT_W - 1 - (k % CNT_W)];
  endfunction

  task automatic fill();
    for (int i = 0; i < NCH; i++) begin
      val[i] = CNT_W'($urandom);
      counts[(NCH-i)*CNT_W-1 -: CNT_W] = val[i];
    end
    load = 1; @(negedge clk); load = 0;
  endtask

  task automatic read_out(bit wm, int n);
    logic [BUS_W-1:0] exp;
    int w;
    word_mode = wm;
    w = wm ? 16 : 8;
    for (int j = 0; j <= n; j++) begin
      #1;
      exp = '0;
      for (int b = 0; b < w; b++) exp[w-1-b] = sbit(j * w + b);
      checks++;
      if (dout !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL wm=%0d j=%0d dout=%h exp=%h", wm, j, dout, exp);
      end
      shift = 1; @(negedge clk); shift = 0;
    end
  endtask

  initial begin
    load = 0; shift = 0; word_mode = 0; counts = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fill();
    read_out(0, 96);
    fill();
    read_out(1, 48);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
