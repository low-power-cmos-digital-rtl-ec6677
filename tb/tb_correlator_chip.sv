// tb_correlator_chip: one full-size (32-lag) correlator chip against a
// reference model.
//
// Random 2-bit samples drive din_a, din_b and aux_in; three integrations run
// in autocorrelation, cross-correlation and auxiliary-input (cascade) modes.
// The model keeps its own copy of the delay line and per-lag sums of products
// computed from the digitizer weights. After each dump the test checks the
// data ready flag, then reads the chip through the asynchronous readout clock
// (96 bytes or 48 words) while the next integration is already running, and
// compares every byte/word with floor(sum/16) of each lag. cas_out is checked
// against the sample NCH clocks old.
module tb_correlator_chip;
  import ac_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCH = 32, CNT_W = 24;

  logic clk = 0, rst_n = 0;
  sample_t din_a, din_b, aux_in, cas_out;
  logic aux_sel, xcorr, integrate, dump, flag_clr, data_ready, cs, rd_clk, word_mode;
  logic [BUS_W-1:0] dout;

  correlator_chip dut (.*);

  int checks = 0, failures = 0;

  // reference state: mirrors the chip's registers
  logic [1:0] m_u;
  logic [1:0] m_d [NCH];
  longint     m_sum [NCH];
  longint     snap [NCH];

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Stimulus and model. Control signals change just after a rising edge, so
  // at the falling edge they hold the values the next rising edge will use.
  logic [1:0] nd, nu;
  always @(negedge clk) if (rst_n) begin
    check(cas_out == sample_t'(m_d[NCH-1]), "cas_out");
    if (dump) begin
      for (int i = 0; i < NCH; i++) begin snap[i] = m_sum[i]; m_sum[i] = 0; end
    end else if (integrate) begin
      for (int i = 0; i < NCH; i++) m_sum[i] += longint'(ref_product(m_d[i], m_u));
    end
    din_a  = sample_t'($urandom_range(3));
    din_b  = sample_t'($urandom_range(3));
    aux_in = sample_t'($urandom_range(3));
    nd = aux_sel ? aux_in : din_a;
    nu = xcorr ? din_b : din_a;
    for (int i = NCH - 1; i > 0; i--) m_d[i] = m_d[i-1];
    m_d[0] = nd;
    m_u = nu;
  end

  function automatic logic sbit(int k);
    longint c;
    if (k >= NCH * CNT_W) return 1'b0;
    c = (snap[k / CNT_W] >> 4) % (longint'(1) << CNT_W);
    return c[CNT_W - 1 - (k % CNT_W)];
  endfunction

  task automatic read_chip(bit wm);
    int w, n;
    logic [BUS_W-1:0] exp;
    w = wm ? 16 : 8;
    n = NCH * CNT_W / w;
    @(posedge clk); word_mode <= wm; cs <= 1;
    for (int j = 0; j < n; j++) begin
      @(posedge clk);
      exp = '0;
      for (int b = 0; b < w; b++) exp[w-1-b] = sbit(j * w + b);
      check(dout === exp, $sformatf("wm=%0d item %0d dout=%h exp=%h", wm, j, dout, exp));
      rd_clk <= 1; repeat (4) @(posedge clk);
      rd_clk <= 0; repeat (4) @(posedge clk);
    end
    cs <= 0;
  endtask

  task automatic integrate_for(int n);
    @(posedge clk); flag_clr <= 1; integrate <= 1;
    @(posedge clk); flag_clr <= 0;
    check(data_ready == 0, "flag cleared by new integration");
    repeat (n - 1) @(posedge clk);
    integrate <= 0; dump <= 1;
    @(posedge clk); dump <= 0;
    @(posedge clk);
    check(data_ready == 1, "flag set by dump");
  endtask

  int long_sum_seen = 0;

  initial begin
    {aux_sel, xcorr, integrate, dump, flag_clr, cs, rd_clk, word_mode} = '0;
    din_a = '0; din_b = '0; aux_in = '0;
    m_u = '0;
    for (int i = 0; i < NCH; i++) begin m_d[i] = '0; m_sum[i] = 0; snap[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1: autocorrelation, 3000 clocks
    integrate_for(3000);
    // 2: cross-correlation, read 1's data in byte mode while it integrates
    @(posedge clk); xcorr <= 1;
    @(posedge clk); flag_clr <= 1; integrate <= 1;
    @(posedge clk); flag_clr <= 0;
    read_chip(0);
    repeat (200) @(posedge clk);
    integrate <= 0; dump <= 1; @(posedge clk); dump <= 0; @(posedge clk);
    check(data_ready == 1, "flag after xcorr");
    // 3: delay line from the auxiliary input; read 2's data in word mode
    @(posedge clk); xcorr <= 0; aux_sel <= 1;
    @(posedge clk); flag_clr <= 1; integrate <= 1;
    @(posedge clk); flag_clr <= 0;
    read_chip(1);
    integrate <= 0; dump <= 1; @(posedge clk); dump <= 0; @(posedge clk);
    read_chip(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
