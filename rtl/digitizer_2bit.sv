// digitizer_2bit: behavioural model of the 2-bit digitizer's comparators.
//
// The real part is analog: an op-amp drives three ultrafast comparators, one
// zero-crossing detector (threshold vt0) giving the sign bit and a dual
// window comparator (thresholds vth_pos and vth_neg) giving the magnitude
// bit. This model takes the input voltage as a signed V_W-bit number and
// latches both comparator decisions on the correlator clock, which is also
// the sampling clock:
//   sign = 1 when v_in < vt0        (negative input)
//   mag  = 1 when v_in > vth_pos or v_in < vth_neg (outside the window)
// The coding follows the document's digitizer table; the numeric voltage
// representation and the clocked latch are this model's choices. One clock of
// latency.
module digitizer_2bit
  import ac_pkg::*;
#(
  parameter int unsigned V_W = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [V_W-1:0] v_in,
  input  logic signed [V_W-1:0] vth_pos,
  input  logic signed [V_W-1:0] vth_neg,
  input  logic signed [V_W-1:0] vt0,
  output sample_t               q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= SAMPLE_ZERO;
    else begin
      q.sign <= (v_in < vt0);
      q.mag  <= (v_in > vth_pos) || (v_in < vth_neg);
    end
  end

endmodule
