// correlator_chip: 32-channel 2-bit digital correlator chip.
//
// Datapath: the sample feeding the delay line is chosen between the primary
// input din_a and the auxiliary (cascade) input aux_in; the undelayed sample
// is din_a (autocorrelation) or din_b (cross-correlation). Both are
// registered, so lag n multiplies the undelayed sample x(t) with x(t-n) held
// n clocks in the delay line (lag 0 is the zero-delay channel). Every lag has a
// Table-3 multiplier and an accumulator (4-bit adder plus CNT_W-bit carry
// counter). The last delay stage leaves as cas_out so chips can be chained
// into more lags.
//
// Control: products are accumulated in every clock in which integrate is
// high. A dump pulse copies all counts into the output shift register, clears
// the counters and sets data_ready; data_ready is cleared by flag_clr (the
// start of the next integration). Integration may run while the shift
// register is read out.
//
// Readout: while cs is high, each rising edge of the asynchronous readout
// clock rd_clk advances the shift register by one byte (word_mode = 0) or one
// word (word_mode = 1), 3 correlator clocks after the edge. dout shows lag 0's
// most significant byte/word first. 96 byte reads (48 word reads) empty the
// register. The feature set (auto/cross correlation, cascading, auxiliary
// input, readout while integrating, counters, shift register, flag) follows
// the document; port names, synchronisation and the bit order are this
// design's choices.
module correlator_chip
  import ac_pkg::*;
#(
  parameter int unsigned NCH   = 32,
  parameter int unsigned CNT_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  // data inputs
  input  sample_t          din_a,
  input  sample_t          din_b,
  input  sample_t          aux_in,
  input  logic             aux_sel,    // 1: delay line fed from aux_in
  input  logic             xcorr,      // 1: undelayed sample from din_b
  output sample_t          cas_out,
  // integration control
  input  logic             integrate,
  input  logic             dump,
  input  logic             flag_clr,
  output logic             data_ready,
  // readout
  input  logic             cs,
  input  logic             rd_clk,
  input  logic             word_mode,
  output logic [BUS_W-1:0] dout
);

  sample_t undelayed;
  sample_t taps [NCH];
  prod_t   prod [NCH];
  logic [NCH*CNT_W-1:0] counts;
  logic    rd_strobe;

  delay_line #(.LEN(NCH)) u_delay (
    .clk, .rst_n,
    .din  (aux_sel ? aux_in : din_a),
    .taps (taps)
  );

  // The undelayed sample is registered once, like delay stage 0, so tap n is
  // exactly n clocks older than it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) undelayed <= SAMPLE_ZERO;
    else        undelayed <= xcorr ? din_b : din_a;
  end

  assign cas_out = taps[NCH-1];

  for (genvar i = 0; i < NCH; i++) begin : g_lag
    logic [CNT_W-1:0] cnt;

    corr_multiplier u_mul (
      .d (taps[i]),
      .u (undelayed),
      .p (prod[i])
    );

    lag_accumulator #(.CNT_W(CNT_W)) u_acc (
      .clk, .rst_n,
      .en    (integrate),
      .clr   (dump),
      .prod  (prod[i]),
      .count (cnt)
    );

    // lag 0 in the most significant position
    assign counts[(NCH-i)*CNT_W-1 -: CNT_W] = cnt;
  end

  readout_clk_sync u_sync (
    .clk, .rst_n,
    .rd_clk (rd_clk),
    .strobe (rd_strobe)
  );

  readout_sreg #(.NCH(NCH), .CNT_W(CNT_W)) u_sreg (
    .clk, .rst_n,
    .load      (dump),
    .counts    (counts),
    .shift     (rd_strobe & cs),
    .word_mode (word_mode),
    .dout      (dout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        data_ready <= 1'b0;
    else if (dump)     data_ready <= 1'b1;
    else if (flag_clr) data_ready <= 1'b0;
  end

  // Accumulation stops for the dump clock: the timer never asserts both.
  a_no_integrate_at_dump: assert property (@(posedge clk) disable iff (!rst_n)
                                           dump |-> !integrate);

endmodule
