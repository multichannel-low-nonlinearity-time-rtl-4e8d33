// averaged_tdl: forms the fine code of the averaged TDL by adding the binary
// codes of the NUM_SUB sub-TDLs.
//
// With NUM_SUB sub-TDLs of N_CARRY taps each, every sub-TDL code runs from
// 0 to N_CARRY and the sum from 0 to NUM_SUB*N_CARRY; its LSB is about a
// quarter (Virtex 7) or an eighth (UltraScale) of the sub-TDL bin, as in the
// source design. The sum is registered: fine and out_valid appear one clock
// after codes and in_valid.
module averaged_tdl #(
  parameter int unsigned NUM_SUB = 4,
  parameter int unsigned CODE_W  = 7,
  parameter int unsigned FINE_W  = CODE_W + $clog2(NUM_SUB)
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           in_valid,
  input  logic [NUM_SUB-1:0][CODE_W-1:0] codes,
  output logic                           out_valid,
  output logic [FINE_W-1:0]              fine
);
  logic [FINE_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int j = 0; j < NUM_SUB; j++) sum = sum + FINE_W'(codes[j]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      fine      <= '0;
    end else begin
      out_valid <= in_valid;
      fine      <= sum;
    end
  end
endmodule
