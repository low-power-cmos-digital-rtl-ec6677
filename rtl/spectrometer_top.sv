// spectrometer_top: 128-channel 2-bit digital autocorrelator spectrometer.
//
// The digitizer module (comparators modelled by digitizer_2bit) samples the
// analog input on the correlator clock and produces one {sign, magnitude}
// word per clock; the correlator module (correlator_board) accumulates the
// autocorrelation of that stream over NCHIP*NCH lags. A second digitizer
// channel feeds the chips' second input for cross-correlation mode.
// The host computer connects to the timer, flag and readout ports: it
// programs timer_preset (32,000,000 clocks = 0.8 s at 40 MHz), pulses
// timer_start, polls data_ready, then for each chip sets chip_sel and
// toggles rd_clk 96 times (byte mode) reading dout, while the next
// integration runs. The analog amplifiers, threshold references and clock
// limiter are outside this RTL: thresholds arrive as ports.
// Latency: 1 clock in the digitizer, 1 clock into the chips' input registers.
module spectrometer_top
  import ac_pkg::*;
#(
  parameter int unsigned NCHIP   = 4,
  parameter int unsigned NCH     = 32,
  parameter int unsigned CNT_W   = 24,
  parameter int unsigned TIMER_W = 32,
  parameter int unsigned V_W     = 12,
  localparam int unsigned SEL_W  = (NCHIP > 1) ? $clog2(NCHIP) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [V_W-1:0] v_in,
  input  logic signed [V_W-1:0] v_in_b,
  input  logic signed [V_W-1:0] vth_pos,
  input  logic signed [V_W-1:0] vth_neg,
  input  logic signed [V_W-1:0] vt0,
  input  logic                  xcorr,
  input  logic [TIMER_W-1:0]    timer_preset,
  input  logic                  timer_start,
  output logic                  integrating,
  output logic [NCHIP-1:0]      data_ready,
  input  logic [SEL_W-1:0]      chip_sel,
  input  logic                  rd_clk,
  input  logic                  word_mode,
  output logic [BUS_W-1:0]      dout
);

  sample_t qa, qb;

  digitizer_2bit #(.V_W(V_W)) u_dig_a (
    .clk, .rst_n, .v_in (v_in), .vth_pos, .vth_neg, .vt0, .q (qa)
  );

  digitizer_2bit #(.V_W(V_W)) u_dig_b (
    .clk, .rst_n, .v_in (v_in_b), .vth_pos, .vth_neg, .vt0, .q (qb)
  );

  correlator_board #(
    .NCHIP(NCHIP), .NCH(NCH), .CNT_W(CNT_W), .TIMER_W(TIMER_W)
  ) u_board (
    .clk, .rst_n,
    .din_a        (qa),
    .din_b        (qb),
    .xcorr        (xcorr),
    .timer_preset (timer_preset),
    .timer_start  (timer_start),
    .integrating  (integrating),
    .data_ready   (data_ready),
    .chip_sel     (chip_sel),
    .rd_clk       (rd_clk),
    .word_mode    (word_mode),
    .dout         (dout)
  );

endmodule
