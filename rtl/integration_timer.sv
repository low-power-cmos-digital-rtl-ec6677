// integration_timer: programmable integration timer of the correlator board.
//
// The host writes the integration length (in correlator clocks) to preset and
// pulses start. The timer then keeps running high for exactly preset clocks
// (a preset of 0 counts as 1), and in the clock after the last one raises tc
// for a single clock: the end-of-integration pulse that makes the correlator
// chips dump their counts. It then stays idle until the host starts it again.
// A start while running restarts the count. At 40 MHz a preset of 32,000,000
// gives the 0.8 s integration period. The 32-bit width, the counting of the
// correlator clock and the restart by the host follow the document; the
// one-shot behaviour is this design's reading of it.
module integration_timer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] preset,
  input  logic         start,
  output logic         running,
  output logic         tc
);

  logic [W-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      running   <= 1'b0;
      tc        <= 1'b0;
    end else begin
      tc <= 1'b0;
      if (start) begin
        remaining <= (preset == '0) ? W'(1) : preset;
        running   <= 1'b1;
      end else if (running) begin
        if (remaining == W'(1)) begin
          running <= 1'b0;
          tc      <= 1'b1;
        end
        remaining <= remaining - 1'b1;
      end
    end
  end

  // The end-of-integration pulse only follows a running period.
  a_tc_after_run: assert property (@(posedge clk) disable iff (!rst_n)
                                   tc |-> $past(running));

endmodule
