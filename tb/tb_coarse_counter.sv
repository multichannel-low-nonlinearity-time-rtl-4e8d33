// tb_coarse_counter: checks counting, holding while disabled, wrap-around
// and reset.
module tb_coarse_counter;
  localparam int W = 6;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int model;

  coarse_counter #(.WIDTH(W)) dut (.clk, .rst, .en, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst = 0;
    model = 0;
    for (int t = 0; t < 300; t++) begin
      en = (t % 7) != 3;
      @(posedge clk); #1;
      if (en) model = (model + 1) % (1 << W);
      checks++;
      if (int'(count) != model) begin
        failures++;
        $display("FAIL t=%0d count=%0d exp=%0d", t, count, model);
      end
    end
    rst = 1;
    @(posedge clk); #1;
    checks++;
    if (count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
