// tb_t2oh: checks the thermometer edge detector against an independently
// built one-hot for every passed-tap count 0..N and both hit polarities.
module tb_t2oh;
  localparam int N = 12;
  logic [N-1:0] therm;
  logic         level;
  logic [N:0]   onehot, exp_oh;
  int checks = 0, failures = 0;

  t2oh #(.N(N)) dut (.therm, .level, .onehot);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pol = 0; pol < 2; pol++)
      for (int k = 0; k <= N; k++) begin
        // k taps show the new level, the rest the old one
        for (int i = 0; i < N; i++) therm[i] = (i < k) ? pol[0] : ~pol[0];
        level  = pol[0];
        exp_oh = '0;
        exp_oh[k] = 1'b1;
        #1;
        checks++;
        if (onehot !== exp_oh) begin
          failures++;
          $display("FAIL pol=%0d k=%0d onehot=%b exp=%b", pol, k, onehot, exp_oh);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
