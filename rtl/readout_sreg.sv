// readout_sreg: output shift register of a correlator chip.
//
// At the end of an integration all NCH counts are loaded in parallel (lag 0 in
// the most significant position, each count most significant bit first).
// Each shift moves the register by one byte (byte mode) or one 16-bit word
// (word mode); zeros enter behind the data. dout always shows the current
// head: the top byte, zero-extended, or the top word. 32 counts of 24 bits
// therefore take 96 shifts in byte mode and 48 in word mode. Loading the
// counts into a separate shift register is the document's; the bit order and
// zero fill are this design's choices.
//
// Timing: load and shift act at the clock edge; load wins if both are high.
module readout_sreg
  import ac_pkg::*;
#(
  parameter int unsigned NCH   = 32,
  parameter int unsigned CNT_W = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [NCH*CNT_W-1:0] counts,
  input  logic                 shift,
  input  logic                 word_mode,
  output logic [BUS_W-1:0]     dout
);

  localparam int unsigned TOT = NCH * CNT_W;

  logic [TOT-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sreg <= '0;
    else if (load)      sreg <= counts;
    else if (shift) begin
      if (word_mode)    sreg <= sreg << BUS_W;
      else              sreg <= sreg << BYTE_W;
    end
  end

  assign dout = word_mode ? sreg[TOT-1 -: BUS_W]
                          : {{(BUS_W-BYTE_W){1'b0}}, sreg[TOT-1 -: BYTE_W]};

endmodule
