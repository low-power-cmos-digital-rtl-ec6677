// corr_multiplier: 2-bit x 2-bit correlation product.
//
// Multiplies a delayed sample d by an undelayed sample u with the weights
// -3/-1/+1/+3 of the two-bit digitizer, scaled by 1/3 and with the
// "inner" products (low x low magnitude) deleted, then biased by +3 so that
// only non-negative numbers reach the accumulator adder:
//   both magnitudes high : 3 +/- 3  -> 6 or 0
//   one magnitude high   : 3 +/- 1  -> 4 or 2
//   both magnitudes low  : 3        -> 3
// The +/- is the XOR of the two sign bits (1 = negative product).
// The table and its bias are the document's; the gate structure is this
// design's own. Purely combinational, no clock.
module corr_multiplier
  import ac_pkg::*;
(
  input  sample_t d,   // delayed sample
  input  sample_t u,   // undelayed sample
  output prod_t   p    // biased product, 0..6
);

  logic neg;
  assign neg = d.sign ^ u.sign;

  always_comb begin
    unique case ({d.mag, u.mag})
      2'b11:   p = neg ? prod_t'(0) : prod_t'(6);
      2'b10,
      2'b01:   p = neg ? prod_t'(2) : prod_t'(4);
      default: p = prod_t'(3);
    endcase
  end

endmodule
