// tb_averaged_tdl: random sub-TDL codes; checks the registered sum and that
// it appears exactly one clock after the inputs.
module tb_averaged_tdl;
  localparam int NUM_SUB = 4, CODE_W = 7, FINE_W = 9;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [NUM_SUB-1:0][CODE_W-1:0] codes;
  logic [FINE_W-1:0] fine;
  int checks = 0, failures = 0;
  int exp_sum;
  logic exp_v;

  averaged_tdl #(.NUM_SUB(NUM_SUB), .CODE_W(CODE_W), .FINE_W(FINE_W)) dut (
    .clk, .rst, .in_valid, .codes, .out_valid, .fine);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    codes = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 500; t++) begin
      exp_sum = 0;
      for (int j = 0; j < NUM_SUB; j++) begin
        codes[j] = CODE_W'($urandom_range(0, 100));
        exp_sum += int'(codes[j]);
      end
      if (t < 4) for (int j = 0; j < NUM_SUB; j++) codes[j] = 7'd100;   // full scale
      if (t < 4) exp_sum = 400;
      in_valid = 1'($urandom);
      exp_v = in_valid;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== exp_v || int'(fine) != exp_sum) begin
        failures++;
        $display("FAIL t=%0d fine=%0d exp=%0d v=%b", t, fine, exp_sum, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
