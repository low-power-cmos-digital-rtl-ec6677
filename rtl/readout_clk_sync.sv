// readout_clk_sync: brings the host's readout clock into the correlator clock
// domain.
//
// The readout clock is generated by the host computer and is skewed against
// (asynchronous to) the correlator clock. Two flip-flops synchronise it and a
// third detects its rising edge, giving a one-clock strobe 3 clocks after the
// edge. Each level of the readout clock must therefore last at least 3
// correlator clocks. The synchroniser is this design's choice; the document
// only states that the two clocks are skewed.
module readout_clk_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic rd_clk,   // asynchronous readout clock
  output logic strobe    // one clock per rising edge of rd_clk
);

  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {s1, s2, s3} <= '0;
    else        {s1, s2, s3} <= {rd_clk, s1, s2};
  end

  assign strobe = s2 & ~s3;

endmodule
