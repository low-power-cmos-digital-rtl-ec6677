// delay_line: lag shift register of 2-bit samples.
//
// Each clock the incoming sample enters stage 0 and every stage passes its
// sample to the next, so stage i holds the input delayed by i+1 clocks.
// All stages are brought out as taps (one per lag); the last stage is also the
// cascade output for the next correlator chip. Reset clears every stage to
// sample 00. The shift-register delay is the document's; the reset value is
// this design's choice.
module delay_line
  import ac_pkg::*;
#(
  parameter int unsigned LEN = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t din,
  output sample_t taps [LEN]
);

  sample_t stage [LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) stage[i] <= SAMPLE_ZERO;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < LEN; i++) stage[i] <= stage[i-1];
    end
  end

  assign taps = stage;

endmodule
