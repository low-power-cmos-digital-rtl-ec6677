// tb_spectrometer_workloads: the spectrometer at its default sizes (128 lags)
// under the kinds of measurement made on the original instrument, with the
// host's spectrum processing done in the testbench.
//
//  1. CW sweep: a tone at several frequencies; the cosine transform of each
//     measured autocorrelation must peak at channel 256 * f / f_s (+/-1).
//  2. Wideband noise: uniform white noise; the spectrum must be flat, every
//     channel within 25 % of the mean.
//  3. Stability: pairs of noise spectra integrated for T and 16*T; the RMS of
//     their normalized difference must fall by about sqrt(16) = 4 (accepted
//     2.5 .. 6.5), as the radiometer formula predicts.
// Integrations are shortened (20,000 .. 320,000 clocks instead of 0.8 s) to
// keep the run short; the timer preset is a run-time value, not a parameter.
// The host sequence is: start the timer, poll the data ready flags, read the
// four chips in byte mode.
module tb_spectrometer_workloads;
  import ac_pkg::*;

  localparam int NCHIP = 4, NCH = 32, CNT_W = 24, NL = NCHIP * NCH;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic signed [11:0] v_in, v_in_b, vth_pos, vth_neg, vt0;
  logic xcorr, timer_start, integrating, rd_clk, word_mode;
  logic [31:0] timer_preset;
  logic [NCHIP-1:0] data_ready;
  logic [1:0] chip_sel;
  logic [BUS_W-1:0] dout;

  spectrometer_top dut (.*);

  int checks = 0, failures = 0;
  int n_cw = 0, n_noise = 0, n_stab = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // input generator: tone (freq > 0) or white noise (freq == 0)
  real    freq = 0.0;
  longint t = 0;
  always @(negedge clk) begin
    real v;
    t++;
    if (freq > 0.0)
      v = 1000.0 * $sin(2.0 * PI * freq * real'(t)) + real'(int'($urandom_range(400)) - 200);
    else
      v = real'(int'($urandom_range(2400)) - 1200);
    v_in = 12'(int'(v));
    v_in_b = '0;
  end

  longint cnt [NL];

  task automatic integrate_and_read(int n);
    int guard;
    @(posedge clk); timer_preset <= n; timer_start <= 1;
    @(posedge clk); timer_start <= 0;
    @(posedge clk);
    check(data_ready == '0, "flags cleared by restart");
    guard = 0;
    while (data_ready != '1 && guard < n + 100) begin @(posedge clk); guard++; end
    check(data_ready == '1, "data ready");
    for (int k = 0; k < NCHIP; k++) begin
      logic [NCH*CNT_W-1:0] stream;
      @(posedge clk); chip_sel <= 2'(k);
      for (int j = 0; j < NCH * CNT_W / 8; j++) begin
        @(posedge clk);
        stream[NCH*CNT_W-1 - 8*j -: 8] = dout[7:0];
        rd_clk <= 1; repeat (3) @(posedge clk);
        rd_clk <= 0; repeat (3) @(posedge clk);
      end
      for (int i = 0; i < NCH; i++) cnt[k*NCH + i] = longint'(stream[(NCH-i)*CNT_W-1 -: CNT_W]);
    end
  endtask

  // host processing: bias removal, normalization, Hann-weighted cosine transform
  real spec [NL];
  task automatic spectrum(int n);
    real r [NL];
    for (int i = 0; i < NL; i++) r[i] = 16.0 * real'(cnt[i]) / real'(n) - 3.0;
    for (int i = NL - 1; i >= 0; i--) r[i] = r[i] / r[0];
    for (int j = 0; j < NL; j++) begin
      spec[j] = r[0];
      for (int i = 1; i < NL; i++)
        spec[j] += 2.0 * r[i] * $cos(PI * real'(i * j) / real'(NL))
                   * (0.5 + 0.5 * $cos(PI * real'(i) / real'(NL)));
    end
  endtask

  task automatic cw_test(real f);
    int best_j, exp_j;
    real best;
    freq = f;
    integrate_and_read(20000);
    spectrum(20000);
    best = -1.0e30; best_j = -1;
    for (int j = 1; j < NL; j++) if (spec[j] > best) begin best = spec[j]; best_j = j; end
    exp_j = int'(2.0 * NL * f);
    $display("CW f/fs=%0.4f: peak at channel %0d, expected %0d", f, best_j, exp_j);
    check(best_j >= exp_j - 1 && best_j <= exp_j + 1, "CW peak channel");
    n_cw++;
  endtask

  real diff_rms;
  task automatic noise_pair(int n);
    real s1 [NL];
    real acc;
    freq = 0.0;
    integrate_and_read(n); spectrum(n);
    s1 = spec;
    integrate_and_read(n); spectrum(n);
    acc = 0.0;
    for (int j = 4; j < NL - 4; j++) acc += ((s1[j] - spec[j]) / spec[j]) ** 2;
    diff_rms = $sqrt(acc / real'(NL - 8));
  endtask

  initial begin
    real mean, lo, hi, rms_short, rms_long;
    {xcorr, timer_start, rd_clk, word_mode} = '0;
    timer_preset = '0; chip_sel = '0;
    vth_pos = 12'sd700; vth_neg = -12'sd700; vt0 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. CW sweep across the band
    cw_test(0.05);
    cw_test(0.125);
    cw_test(0.3);
    cw_test(0.45);

    // 2. white noise: flat spectrum
    freq = 0.0;
    integrate_and_read(100000);
    spectrum(100000);
    mean = 0.0; lo = 1.0e30; hi = -1.0e30;
    for (int j = 4; j < NL - 4; j++) begin
      mean += spec[j];
      if (spec[j] < lo) lo = spec[j];
      if (spec[j] > hi) hi = spec[j];
    end
    mean /= real'(NL - 8);
    $display("noise spectrum: mean %0.4f min %0.4f max %0.4f", mean, lo, hi);
    check(lo > 0.75 * mean && hi < 1.25 * mean, "flat noise spectrum");
    n_noise++;

    // 3. stability: RMS of the normalized difference against integration time
    noise_pair(20000);  rms_short = diff_rms;
    noise_pair(320000); rms_long  = diff_rms;
    $display("difference RMS: %0.5f at T, %0.5f at 16T, ratio %0.2f (expected about 4)",
             rms_short, rms_long, rms_short / rms_long);
    check(rms_short / rms_long > 2.5 && rms_short / rms_long < 6.5, "RMS falls as 1/sqrt(T)");
    n_stab++;

    check(n_cw == 4 && n_noise == 1 && n_stab == 1, "all workloads ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
