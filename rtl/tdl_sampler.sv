// tdl_sampler: the D-flip-flop column behind a carry-chain tapped delay line,
// with tuned-TDL output selection and sub-TDL regrouping.
//
// Each carry element (CARRY4: 4 MUXes, CARRY8: 8 MUXes) drives two outputs
// per MUX. They arrive on carry_out in the order C_(2j) = O_j, C_(2j+1) = CO_j,
// element i occupying bits [i*2*MUX_PER_CARRY +: 2*MUX_PER_CARRY]. For every
// sub-TDL j the parameter TAP_MAP names which output C_k of every element
// feeds it (8 bits per entry, entry j at TAP_MAP[8j +: 8]); choosing CO or O
// per position is the tuned-TDL method, and choosing a subset of the 16
// CARRY8 outputs is how the UltraScale variant keeps 8 of 16 taps. Sub-TDL j
// gathers output TAP_MAP[j] of elements 0..N_CARRY-1, so its thermometer
// code is N_CARRY bits long with one tap per carry element, as in the source
// design. The default maps the four sub-TDLs to CO0..CO3 of a CARRY4; which
// outputs the source design selected is not stated.
//
// Timing: all taps are sampled on the rising clock edge into sub_code. A hit
// is flagged in the same cycle the sampled first tap of the line (sub-TDL 0,
// element 0) differs from its value one cycle earlier; level is that tap's new
// value, so both rising and falling hit edges are measured. The hit flag and
// level are this design's choice of event detection.
module tdl_sampler #(
  parameter int unsigned N_CARRY       = 100,
  parameter int unsigned MUX_PER_CARRY = 4,
  parameter int unsigned NUM_SUB       = 4,
  parameter logic [8*NUM_SUB-1:0] TAP_MAP = 32'h07_05_03_01
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [N_CARRY*2*MUX_PER_CARRY-1:0]   carry_out,
  output logic [NUM_SUB-1:0][N_CARRY-1:0]      sub_code,
  output logic                                 hit,
  output logic                                 level
);
  localparam int unsigned OUTS = 2 * MUX_PER_CARRY;

  logic [NUM_SUB-1:0][N_CARRY-1:0] regroup;
  logic                            first_q;

  always_comb begin
    for (int j = 0; j < NUM_SUB; j++)
      for (int i = 0; i < N_CARRY; i++)
        regroup[j][i] = carry_out[i*OUTS + int'(TAP_MAP[8*j +: 8])];
  end

  // D-FF column
  always_ff @(posedge clk) sub_code <= regroup;

  always_ff @(posedge clk) begin
    if (rst) first_q <= 1'b0;
    else     first_q <= sub_code[0][0];
  end

  assign level = sub_code[0][0];
  assign hit   = (sub_code[0][0] != first_q) && !rst;

  initial begin
    for (int j = 0; j < NUM_SUB; j++)
      assert (int'(TAP_MAP[8*j +: 8]) < OUTS) else $error("TAP_MAP entry %0d out of range", j);
  end
endmodule
