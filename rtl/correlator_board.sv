// correlator_board: the 128-channel autocorrelator module.
//
// NCHIP correlator chips are chained into NCHIP*NCH lags: chip 0 fills its
// delay line from the digitized input din_a, every further chip from the
// previous chip's last delay stage through its auxiliary input, and all chips
// receive the same undelayed sample (din_a, or din_b in cross-correlation
// mode). Chip k thus holds lags k*NCH .. k*NCH+NCH-1.
//
// A programmable TIMER_W-bit timer counts the correlator clock. The host
// writes timer_preset and pulses timer_start; the chips integrate while the
// timer runs (integrating = 1), and its end pulse makes every chip dump its
// counts into its output shift register and raise its data_ready flag.
// Correlation then pauses until the host restarts the timer, which also
// clears the flags; the host reads the previous counts while the next
// integration runs.
//
// The chips' outputs share one readout bus: chip_sel addresses a chip, only
// that chip sees the readout clock rd_clk, and its byte or word appears on
// dout. word_mode is the board's byte/word jumper. The chip count, cascading,
// timer, flag handshake and bus follow the document; the bus is a multiplexer
// here rather than tri-state outputs.
module correlator_board
  import ac_pkg::*;
#(
  parameter int unsigned NCHIP   = 4,
  parameter int unsigned NCH     = 32,
  parameter int unsigned CNT_W   = 24,
  parameter int unsigned TIMER_W = 32,
  localparam int unsigned SEL_W  = (NCHIP > 1) ? $clog2(NCHIP) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sample_t            din_a,
  input  sample_t            din_b,
  input  logic               xcorr,
  input  logic [TIMER_W-1:0] timer_preset,
  input  logic               timer_start,
  output logic               integrating,
  output logic [NCHIP-1:0]   data_ready,
  input  logic [SEL_W-1:0]   chip_sel,
  input  logic               rd_clk,
  input  logic               word_mode,
  output logic [BUS_W-1:0]   dout
);

  logic    dump;
  sample_t cas [NCHIP+1];
  logic [BUS_W-1:0] chip_dout [NCHIP];

  integration_timer #(.W(TIMER_W)) u_timer (
    .clk, .rst_n,
    .preset  (timer_preset),
    .start   (timer_start),
    .running (integrating),
    .tc      (dump)
  );

  assign cas[0] = din_a;

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    correlator_chip #(.NCH(NCH), .CNT_W(CNT_W)) u_chip (
      .clk, .rst_n,
      .din_a      (din_a),
      .din_b      (din_b),
      .aux_in     (cas[k]),
      .aux_sel    (k != 0),
      .xcorr      (xcorr),
      .cas_out    (cas[k+1]),
      .integrate  (integrating),
      .dump       (dump),
      .flag_clr   (timer_start),
      .data_ready (data_ready[k]),
      .cs         (chip_sel == SEL_W'(k)),
      .rd_clk     (rd_clk),
      .word_mode  (word_mode),
      .dout       (chip_dout[k])
    );
  end

  assign dout = chip_dout[chip_sel];

endmodule
