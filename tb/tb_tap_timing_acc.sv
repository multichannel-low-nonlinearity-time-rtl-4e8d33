// tb_tap_timing_acc: random code sets; checks the sums of B_n - B_n+1 and the
// measurement count against a model, including en gating and clear.
module tb_tap_timing_acc;
  localparam int NUM_SUB = 8, CODE_W = 7;
  logic clk = 0, rst = 1, clr = 0, en = 0, valid = 0;
  logic [NUM_SUB-1:0][CODE_W-1:0] codes;
  logic signed [NUM_SUB-2:0][31:0] sum;
  logic [31:0] count;
  int checks = 0, failures = 0;
  longint msum [NUM_SUB-1];
  int mcount;

  tap_timing_acc #(.NUM_SUB(NUM_SUB), .CODE_W(CODE_W)) dut (
    .clk, .rst, .clr, .en, .valid, .codes, .sum, .count);

  always #5 clk = ~clk;

  task automatic compare(string tag);
    checks++;
    if (int'(count) != mcount) begin
      failures++;
      $display("FAIL %s count=%0d exp=%0d", tag, count, mcount);
    end
    for (int n = 0; n < NUM_SUB - 1; n++) begin
      checks++;
      if (longint'($signed(sum[n])) != msum[n]) begin
        failures++;
        $display("FAIL %s sum[%0d]=%0d exp=%0d", tag, n, sum[n], msum[n]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    codes = '0;
    foreach (msum[n]) msum[n] = 0;
    mcount = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      if (t == 1000) begin
        clr = 1;
        @(posedge clk); #1;
        clr = 0;
        foreach (msum[n]) msum[n] = 0;
        mcount = 0;
      end
      en    = (t % 5) != 0;
      valid = 1'($urandom);
      for (int j = 0; j < NUM_SUB; j++) codes[j] = CODE_W'($urandom_range(0, 60));
      @(posedge clk); #1;
      if (en && valid) begin
        for (int n = 0; n < NUM_SUB - 1; n++) msum[n] += longint'(codes[n]) - longint'(codes[n+1]);
        mcount++;
      end
    end
    compare("end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
