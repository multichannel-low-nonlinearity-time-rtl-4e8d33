// coarse_counter: free-running counter of sampling clock cycles. Its value at
// the edge that samples a hit is the coarse code of that hit; the fine code
// then places the hit within the cycle, which extends the measurement range
// beyond one TDL length. Counts up by one every clock while en is high,
// wraps at 2^WIDTH, and clears on synchronous reset. The width is this
// design's choice.
module coarse_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end
endmodule
