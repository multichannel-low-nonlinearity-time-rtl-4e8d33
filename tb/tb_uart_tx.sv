// tb_uart_tx: sends random bytes and decodes txd independently: start bit,
// 8 data bits LSB first, stop bit, each CLKS_PER_BIT clocks long; also checks
// the frame length of 10 bit times.
module tb_uart_tx;
  localparam int CPB = 5;
  logic clk = 0, rst = 1, valid = 0, ready, txd;
  logic [7:0] data;
  int checks = 0, failures = 0;
  byte unsigned sent [$];

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .data, .valid, .ready, .txd);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: samples the middle of each bit
  initial begin : rx
    logic [7:0] b;
    int frames;
    frames = 0;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      #1;
      checks++;
      if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        #1 b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      #1;
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++;
      if (sent.size() == 0 || b != sent.pop_front()) begin
        failures++;
        $display("FAIL data %h", b);
      end
    end
  end

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 60; n++) begin
      data = 8'($urandom);
      valid = 1;
      while (!ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      t0 = $time;
      sent.push_back(data);
      valid = ((n % 3) == 0) ? 0 : 1;
      valid = 0;
      while (!ready) begin @(posedge clk); #1; end
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != 10 * CPB) begin
        failures++;
        $display("FAIL frame length %0d clocks", (t1 - t0) / 10);
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    repeat (3 * CPB) @(posedge clk);
    checks++;
    if (sent.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
