// t2oh: thermometer code edge detector of one sub-TDL.
//
// The sampled sub-TDL code is a thermometer code: the taps the hit edge has
// already passed show the hit's new level, the rest the old one
// (1..1 0..0 or 0..0 1..1 read from the line input). level is the new level.
// The output has N+1 positions: onehot[k] is set when exactly k taps have
// been passed, i.e. at the boundary between passed and unpassed taps;
// onehot[0] means the edge had not reached the first tap, onehot[N] that it
// had passed them all. The source design relies on the sub-TDL regrouping to
// make the code bubble free, and this detector, like the source's, assumes it.
// Purely combinational.
module t2oh #(
  parameter int unsigned N = 100
) (
  input  logic [N-1:0] therm,
  input  logic         level,
  output logic [N:0]   onehot
);
  logic [N-1:0] passed;

  always_comb begin
    passed    = level ? therm : ~therm;
    onehot[0] = ~passed[0];
    for (int k = 1; k < N; k++)
      onehot[k] = passed[k-1] & ~passed[k];
    onehot[N] = passed[N-1];
  end
endmodule
