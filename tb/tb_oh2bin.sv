// tb_oh2bin: checks the one-hot to binary converter for every position.
module tb_oh2bin;
  localparam int N = 101;
  localparam int W = 7;
  logic [N-1:0] onehot;
  logic [W-1:0] bin;
  int checks = 0, failures = 0;

  oh2bin #(.N(N), .W(W)) dut (.onehot, .bin);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      onehot = '0;
      onehot[k] = 1'b1;
      #1;
      checks++;
      if (int'(bin) != k) begin
        failures++;
        $display("FAIL k=%0d bin=%0d", k, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
