// tb_spectrometer_top: end-to-end test of the spectrometer at reduced sizes
// (4 chips of 8 lags, 10-bit counters so that the counters wrap); see
// tb_spectro_harness for what is driven and checked.
module tb_spectrometer_top;
  tb_spectro_harness #(.FULL(1'b0), .NCHIP(4), .NCH(8), .CNT_W(10)) h ();
endmodule
