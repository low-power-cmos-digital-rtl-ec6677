// tb_spectrometer_full: spectrometer_top at its default sizes (4 chips x 32
// lags, 24-bit counters, 32-bit timer) through one complete 0.8 s integration
// (32,000,000 clocks at 40 MHz), readout and spectrum check; see
// tb_spectro_harness.
module tb_spectrometer_full;
  tb_spectro_harness #(.FULL(1'b1), .NCHIP(4), .NCH(32), .CNT_W(24), .P_LONG(32_000_000)) h ();
endmodule
