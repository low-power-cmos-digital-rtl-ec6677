// tb_spectro_harness: end-to-end test of spectrometer_top, used by
// tb_spectrometer_top (reduced sizes) and tb_spectrometer_full (defaults).
//
// The analog input is a CW tone plus uniform noise, given to the digitizer as
// signed numbers; a second noise-like input feeds cross-correlation. The
// harness plays the host computer: it programs the timer, starts an
// integration, polls the data ready flags, restarts the timer and reads every
// chip over the shared bus while the next integration runs. A reference model
// digitizes the same voltages, runs its own 128-lag (NCHIP*NCH) delay line
// with products from the digitizer weights, and predicts every byte/word.
//
// FULL = 0 runs four integrations: autocorrelation, a long one whose counters
// wrap, cross-correlation, and autocorrelation read in word mode after the
// timer has stopped. FULL = 1 leaves the top's parameters at their defaults
// and runs one 0.8 s integration (32,000,000 clocks at 40 MHz), reads it in
// byte mode and checks that the cosine transform of the measured
// autocorrelation peaks at the channel of the input tone.
// Each mechanism (dump, flag set and clear, readout during integration, byte
// and word mode, cross-correlation, counter wrap, cascade, all four
// digitizer codes) is counted; one that never happened is a failure.
module tb_spectro_harness #(
  parameter bit          FULL    = 1'b0,
  parameter int unsigned NCHIP   = 4,
  parameter int unsigned NCH     = 8,
  parameter int unsigned CNT_W   = 10,
  parameter int unsigned P_LONG  = 32_000_000
);
  import ac_pkg::*;
  import tb_ref_pkg::*;

  localparam int NL = NCHIP * NCH;
  localparam int V_W = 12;
  localparam real FREQ = 0.1875;              // tone frequency / sample rate
  localparam int  EXP_CH = int'(2.0 * NL * FREQ);
  localparam int  VTH = 700;

  logic clk = 0, rst_n = 0;
  logic signed [V_W-1:0] v_in, v_in_b, vth_pos, vth_neg, vt0;
  logic xcorr, timer_start, integrating, rd_clk, word_mode;
  logic [31:0] timer_preset;
  logic [NCHIP-1:0] data_ready;
  logic [$clog2(NCHIP)-1:0] chip_sel;
  logic [BUS_W-1:0] dout;

  if (FULL) begin : g_full
    spectrometer_top dut (.*);
  end else begin : g_small
    spectrometer_top #(.NCHIP(NCHIP), .NCH(NCH), .CNT_W(CNT_W)) dut (.*);
  end

  int checks = 0, failures = 0;

  // mechanism counters
  int n_dump = 0, n_flag_set = 0, n_flag_clr = 0, n_read_while_int = 0;
  int n_byte = 0, n_word = 0, n_xcorr_int = 0, n_wrap = 0, n_cascade = 0;
  int n_code [4];

  // reference model
  logic [1:0] m_u, qa_prev, qb_prev;
  logic [1:0] m_d [NL];
  longint m_sum [NL];
  longint snap [NL];
  logic   prev_int = 0;
  int     run_len = 0, last_len = 0;
  longint t = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (FULL ? P_LONG + 200000 : 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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
    real v;
    if (!integrating && prev_int) begin
      for (int i = 0; i < NL; i++) begin snap[i] = m_sum[i]; m_sum[i] = 0; end
      last_len = run_len; run_len = 0;
      n_dump++;
    end
    if (integrating) begin
      run_len++;
      for (int i = 0; i < NL; i++) m_sum[i] += longint'(ref_product(m_d[i], m_u));
    end
    prev_int = integrating;
    for (int i = NL - 1; i > 0; i--) m_d[i] = m_d[i-1];
    m_d[0] = qa_prev;
    m_u = xcorr ? qb_prev : qa_prev;
    // next analog samples
    t++;
    v = 1000.0 * $sin(2.0 * 3.14159265358979 * FREQ * real'(t))
        + real'(int'($urandom_range(400)) - 200);
    v_in   = V_W'(int'(v));
    v_in_b = V_W'(int'($urandom_range(2400)) - 1200);
    qa_prev = ref_digitize(int'(v_in), VTH, -VTH, 0);
    qb_prev = ref_digitize(int'(v_in_b), VTH, -VTH, 0);
    n_code[qa_prev]++;
  end

  function automatic longint cnt_of(int lag);
    return (snap[lag] >> 4) % (longint'(1) << CNT_W);
  endfunction

  function automatic logic sbit(int chip, int k);
    longint c;
    if (k >= NCH * CNT_W) return 1'b0;
    c = cnt_of(chip * NCH + k / CNT_W);
    return c[CNT_W - 1 - (k % CNT_W)];
  endfunction

  // host readout of all chips; returns the counts it assembled
  longint rd_cnt [NL];
  task automatic read_all(bit wm);
    int w, n;
    logic [BUS_W-1:0] exp;
    logic [NCH*CNT_W-1:0] stream;
    w = wm ? 16 : 8;
    n = (NCH * CNT_W + w - 1) / w;
    word_mode <= wm;
    for (int i = 0; i < NL; i++) if ((snap[i] >> 4) >= (longint'(1) << CNT_W)) n_wrap++;
    for (int k = 0; k < NCHIP; k++) begin
      @(posedge clk); chip_sel <= ($clog2(NCHIP))'(k);
      for (int j = 0; j < n; j++) begin
        @(posedge clk);
        exp = '0;
        for (int b = 0; b < w; b++) exp[w-1-b] = sbit(k, j * w + b);
        check(dout === exp, $sformatf("chip %0d wm=%0d item %0d dout=%h exp=%h", k, wm, j, dout, exp));
        for (int b = 0; b < w; b++)
          if (j * w + b < NCH * CNT_W) stream[NCH*CNT_W-1 - (j*w + b)] = dout[w-1-b];
        if (integrating) n_read_while_int++;
        if (wm) n_word++; else n_byte++;
        if (k > 0) n_cascade++;
        rd_clk <= 1; repeat (3) @(posedge clk);
        rd_clk <= 0; repeat (3) @(posedge clk);
      end
      for (int i = 0; i < NCH; i++) rd_cnt[k*NCH + i] = longint'(stream[(NCH-i)*CNT_W-1 -: CNT_W]);
    end
  endtask

  task automatic start_timer(int n);
    @(posedge clk); timer_preset <= n; timer_start <= 1;
    @(posedge clk); timer_start <= 0;
    @(posedge clk);
    check(data_ready == '0, "flags cleared by restart");
    n_flag_clr++;
    if (xcorr) n_xcorr_int++;
  endtask

  task automatic wait_ready(int n);
    longint guard = 0;
    while (data_ready != '1 && guard < longint'(n) + 100) begin @(posedge clk); guard++; end
    check(data_ready == '1, "all data ready flags set");
    if (data_ready == '1) n_flag_set++;
    check(last_len == n, $sformatf("integrated %0d clocks, preset %0d", last_len, n));
  endtask

  // Cosine transform of the measured autocorrelation (bias removed, scaled
  // to counts of 16 products); the largest output channel must be the tone's.
  task automatic check_spectrum(int n_int);
    real r [NL];
    real p, best;
    int  best_j;
    for (int i = 0; i < NL; i++) r[i] = 16.0 * real'(rd_cnt[i]) - 3.0 * real'(n_int);
    best = -1.0e30; best_j = -1;
    for (int j = 1; j < NL; j++) begin
      p = r[0];
      for (int i = 1; i < NL; i++)
        p += 2.0 * r[i] * $cos(3.14159265358979 * real'(i * j) / real'(NL))
             * (0.5 + 0.5 * $cos(3.14159265358979 * real'(i) / real'(NL)));
      if (p > best) begin best = p; best_j = j; end
    end
    $display("spectrum peak at channel %0d, tone at channel %0d", best_j, EXP_CH);
    check(best_j >= EXP_CH - 1 && best_j <= EXP_CH + 1, "spectrum peak at the tone's channel");
  endtask

  initial begin
    {xcorr, timer_start, rd_clk, word_mode} = '0;
    timer_preset = '0; chip_sel = '0;
    vth_pos = V_W'(VTH); vth_neg = V_W'(-VTH); vt0 = '0;
    v_in = '0; v_in_b = '0; qa_prev = '0; qb_prev = '0; m_u = '0;
    for (int i = 0; i < NL; i++) begin m_d[i] = '0; m_sum[i] = 0; snap[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    if (FULL) begin
      start_timer(P_LONG);
      wait_ready(P_LONG);
      start_timer(5000);
      read_all(0);
      check_spectrum(P_LONG);
      wait_ready(5000);
    end else begin
      start_timer(3000);                 // 1: autocorrelation
      wait_ready(3000);
      start_timer(7000);                 // 2: long, counters wrap
      read_all(0);
      check_spectrum(3000);
      wait_ready(7000);
      @(posedge clk); xcorr <= 1;
      start_timer(3000);                 // 3: cross-correlation
      read_all(1);
      wait_ready(3000);
      @(posedge clk); xcorr <= 0;
      start_timer(1500);                 // 4: autocorrelation
      read_all(0);
      wait_ready(1500);
      read_all(1);                       // read after the timer stopped
    end
    check(n_dump > 0, "dump happened");
    check(n_flag_set > 0, "flag set seen");
    check(n_flag_clr > 0, "flag clear seen");
    check(n_read_while_int > 0, "readout during integration");
    check(n_byte > 0, "byte mode");
    check(n_cascade > 0, "cascaded chips read");
    for (int i = 0; i < 4; i++) check(n_code[i] > 0, $sformatf("digitizer code %b", i[1:0]));
    if (!FULL) begin
      check(n_word > 0, "word mode");
      check(n_xcorr_int > 0, "cross-correlation");
      check(n_wrap > 0, "counter wrap");
    end
    $display("mechanisms: dumps=%0d flag_set=%0d flag_clr=%0d read_during_int=%0d byte=%0d word=%0d xcorr=%0d wraps=%0d cascade_items=%0d codes=%0d/%0d/%0d/%0d",
             n_dump, n_flag_set, n_flag_clr, n_read_while_int, n_byte, n_word, n_xcorr_int,
             n_wrap, n_cascade, n_code[0], n_code[1], n_code[2], n_code[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
