// tb_cal_bram: fills the calibration table with random entries and reads them
// back in random order, checking data and the one-clock read latency, and
// that a read with re low holds the previous output.
module tb_cal_bram;
  import tdc_pkg::*;
  logic clk = 0, we = 0, re = 0;
  bin_t waddr, raddr;
  cal_word_t wdata, rdata, model [BINS], held;
  int checks = 0, failures = 0;

  cal_bram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < BINS; a++) begin
      we = 1; waddr = bin_t'(a);
      wdata = cal_word_t'({$urandom, $urandom});
      model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      raddr = bin_t'($urandom);
      re = 1;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL addr=%0d", raddr);
      end
      held = rdata;
      re = 0; raddr = raddr + 1'b1;
      @(posedge clk); #1;
      checks++;
      if (rdata !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
