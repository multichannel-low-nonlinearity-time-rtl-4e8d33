// tap_timing_acc: hardware accumulator for the tap timing test.
//
// During the test random hits are measured and, for every measurement m, the
// binary codes B_n,m of all sub-TDLs are collected. The timing difference
// between the first taps of sub-TDLs n and n+1 is
//     D_n = sum_m (B_n,m - B_n+1,m) / L ,   n = 0 .. NUM_SUB-2,
// with L the number of measurements. This block keeps the signed sums
// (sum[n]) and L (count); the host divides. In the source design the codes
// are read out and the sums formed off chip; accumulating them here is this
// design's choice. D_n comes out in units of the sub-TDL bin.
//
// A measurement is taken on every clock with valid and en high; clr zeroes
// the sums and the count. Outputs are registered (one clock latency).
module tap_timing_acc #(
  parameter int unsigned NUM_SUB = 4,
  parameter int unsigned CODE_W  = 7,
  parameter int unsigned ACC_W   = 32,
  parameter int unsigned CNT_W   = 32
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic                                 clr,
  input  logic                                 en,
  input  logic                                 valid,
  input  logic [NUM_SUB-1:0][CODE_W-1:0]       codes,
  output logic signed [NUM_SUB-2:0][ACC_W-1:0] sum,
  output logic [CNT_W-1:0]                     count
);
  always_ff @(posedge clk) begin
    if (rst || clr) begin
      sum   <= '0;
      count <= '0;
    end else if (en && valid) begin
      for (int n = 0; n < NUM_SUB - 1; n++)
        sum[n] <= sum[n] + ACC_W'($signed({1'b0, codes[n]}) - $signed({1'b0, codes[n+1]}));
      count <= count + 1'b1;
    end
  end
endmodule
