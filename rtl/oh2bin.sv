// oh2bin: one-hot to binary converter (OH2BIN) of one sub-TDL.
//
// Bit b of the binary code is the OR of all one-hot positions whose index has
// bit b set, so a one-hot input of position k gives k. This is the simplest
// encoder; the source design names the converter without giving its insides.
// Purely combinational; an all-zero input gives 0.
module oh2bin #(
  parameter int unsigned N = 101,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] onehot,
  output logic [W-1:0] bin
);
  always_comb begin
    bin = '0;
    for (int k = 0; k < N; k++)
      if (onehot[k]) bin = bin | W'(k);
  end
endmodule
