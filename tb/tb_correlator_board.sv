// tb_correlator_board: the full-size 128-lag correlator module (four chained
// 32-lag chips and the timer) against a reference model.
//
// The host side is played by the test: it programs the timer, starts an
// integration, waits for all data ready flags, restarts the timer and, while
// the next integration runs, reads the four chips over the shared bus (chip
// select plus readout clock), in byte mode for autocorrelation and in word
// mode for cross-correlation. Every byte/word is compared with floor(sum/16)
// of the model's lag sums, lags 0..127 in chip order. The number of clocks
// integrated must equal the timer preset.
module tb_correlator_board;
  import ac_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCHIP = 4, NCH = 32, CNT_W = 24, NL = NCHIP * NCH;

  logic clk = 0, rst_n = 0;
  sample_t din_a, din_b;
  logic xcorr, timer_start, integrating, rd_clk, word_mode;
  logic [31:0] timer_preset;
  logic [NCHIP-1:0] data_ready;
  logic [1:0] chip_sel;
  logic [BUS_W-1:0] dout;

  correlator_board dut (.*);

  int checks = 0, failures = 0;
  logic [1:0] m_u;
  logic [1:0] m_d [NL];
  longint m_sum [NL];
  longint snap [NL];
  logic   prev_int = 0;
  int     run_len = 0, last_len = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (!integrating && prev_int) begin
      for (int i = 0; i < NL; i++) begin snap[i] = m_sum[i]; m_sum[i] = 0; end
      last_len = run_len; run_len = 0;
    end
    if (integrating) begin
      run_len++;
      for (int i = 0; i < NL; i++) m_sum[i] += longint'(ref_product(m_d[i], m_u));
    end
    prev_int = integrating;
    din_a = sample_t'($urandom_range(3));
    din_b = sample_t'($urandom_range(3));
    for (int i = NL - 1; i > 0; i--) m_d[i] = m_d[i-1];
    m_d[0] = din_a;
    m_u = xcorr ? din_b : din_a;
  end

  function automatic logic sbit(int chip, int k);
    longint c;
    if (k >= NCH * CNT_W) return 1'b0;
    c = (snap[chip * NCH + k / CNT_W] >> 4) % (longint'(1) << CNT_W);
    return c[CNT_W - 1 - (k % CNT_W)];
  endfunction

  task automatic read_all(bit wm);
    int w, n;
    logic [BUS_W-1:0] exp;
    w = wm ? 16 : 8;
    n = NCH * CNT_W / w;
    word_mode <= wm;
    for (int k = 0; k < NCHIP; k++) begin
      @(posedge clk); chip_sel <= 2'(k);
      for (int j = 0; j < n; j++) begin
        @(posedge clk);
        exp = '0;
        for (int b = 0; b < w; b++) exp[w-1-b] = sbit(k, j * w + b);
        check(dout === exp, $sformatf("chip %0d wm=%0d item %0d dout=%h exp=%h", k, wm, j, dout, exp));
        rd_clk <= 1; repeat (3) @(posedge clk);
        rd_clk <= 0; repeat (3) @(posedge clk);
      end
    end
  endtask

  task automatic start_timer(int n);
    @(posedge clk); timer_preset <= n; timer_start <= 1;
    @(posedge clk); timer_start <= 0;
  endtask

  task automatic wait_ready(int n);
    int guard = 0;
    while (data_ready != '1 && guard < 10 * n + 100) begin @(posedge clk); guard++; end
    check(data_ready == '1, "all data ready flags set");
  endtask

  initial begin
    {xcorr, timer_start, rd_clk, word_mode} = '0;
    timer_preset = '0; chip_sel = '0;
    din_a = '0; din_b = '0; m_u = '0;
    for (int i = 0; i < NL; i++) begin m_d[i] = '0; m_sum[i] = 0; snap[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    start_timer(4000);
    wait_ready(4000);
    check(last_len == 4000, $sformatf("integrated %0d clocks", last_len));
    @(posedge clk); xcorr <= 1;
    start_timer(5000);
    @(posedge clk);
    check(data_ready == '0, "flags cleared by restart");
    read_all(0);
    wait_ready(5000);
    check(last_len == 5000, $sformatf("integrated %0d clocks", last_len));
    @(posedge clk); xcorr <= 0;
    start_timer(2000);
    read_all(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
