// lag_accumulator: accumulator of one correlator channel (lag).
//
// A 4-bit adder register sums the biased products (0..6). Its carry out, which
// can occur at most once per clock, increments a CNT_W-bit counter, so the
// counter holds floor(sum of products / 16) and the adder register the
// remainder. Only the counter is read out; the adder bits are the low-order
// bits that are discarded. The 4-bit adder feeding a counter with its carry is
// the document's structure; the document's asynchronous ripple counter is
// written here as a synchronous counter enabled by the carry, which counts the
// same events. The counter wraps at 2^CNT_W.
//
// Timing: when en is high, the product present in this clock is included at
// the next clock edge. clr (priority over en) zeroes both registers at the
// next edge.
module lag_accumulator
  import ac_pkg::*;
#(
  parameter int unsigned CNT_W = 24,
  parameter int unsigned ADD_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  prod_t            prod,
  output logic [CNT_W-1:0] count
);

  logic [ADD_W-1:0] acc;
  logic [ADD_W:0]   sum;   // adder result with carry out

  assign sum = {1'b0, acc} + (ADD_W+1)'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      count <= '0;
    end else if (clr) begin
      acc   <= '0;
      count <= '0;
    end else if (en) begin
      acc <= sum[ADD_W-1:0];
      if (sum[ADD_W]) count <= count + 1'b1;
    end
  end

endmodule
