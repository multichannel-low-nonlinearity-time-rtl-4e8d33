// tb_hist_bram: clears the histogram by a read-and-clear pass, then offers
// random two-bin weighted updates (including void and equal compensation
// addresses and back-to-back updates of one bin) and checks every bin
// against a model on readout. Also checks that an update is accepted at most
// every second clock and that a read answers one clock later.
module tb_hist_bram;
  import tdc_pkg::*;
  logic clk = 0, rst = 1;
  logic upd_valid = 0, upd_ready, c_valid = 0;
  bin_t m_addr, c_addr, rd_addr;
  wcf_t m_w, c_w;
  logic rd_en = 0, rd_clr = 0, rd_ready, rd_valid;
  logic [CNT_W-1:0] rd_data;
  longint model [BINS];
  int checks = 0, failures = 0, accepted = 0, refused = 0, same_bin = 0;
  logic prev_acc;

  hist_bram dut (.clk, .rst, .upd_valid, .upd_ready, .m_addr, .m_w, .c_valid,
                 .c_addr, .c_w, .rd_en, .rd_addr, .rd_clr, .rd_ready, .rd_valid, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(input logic clr, input logic compare);
    for (int a = 0; a < BINS; a++) begin
      rd_en = 1; rd_addr = bin_t'(a); rd_clr = clr;
      while (!rd_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      rd_en = 0;
      checks++;
      if (!rd_valid) begin failures++; $display("FAIL no rd_valid"); end
      if (compare) begin
        checks++;
        if (longint'(rd_data) != model[a]) begin
          failures++;
          $display("FAIL bin %0d = %0d exp %0d", a, rd_data, model[a]);
        end
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    foreach (model[a]) model[a] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    read_all(1'b1, 1'b0);        // clear
    read_all(1'b0, 1'b1);        // all zero now
    prev_acc = 0;
    for (int t = 0; t < 6000; t++) begin
      upd_valid = ($urandom_range(0, 3) != 0);
      m_addr = (t % 50 < 10) ? bin_t'(7) : bin_t'($urandom_range(0, 40));
      c_addr = (t % 97 == 5) ? m_addr : m_addr + 1'b1;
      m_w = wcf_t'($urandom_range(0, 511));
      c_w = wcf_t'($urandom_range(0, 511));
      c_valid = 1'($urandom);
      #0;
      if (upd_valid && upd_ready) begin
        model[m_addr] += longint'(m_w);
        if (c_valid) model[c_addr] += longint'(c_w);
        if (c_valid && c_addr == m_addr) same_bin++;
        accepted++;
        checks++;
        if (prev_acc) begin failures++; $display("FAIL accepted on consecutive clocks"); end
      end else if (upd_valid) refused++;
      prev_acc = upd_valid && upd_ready;
      @(posedge clk); #1;
    end
    upd_valid = 0;
    repeat (3) @(posedge clk); #1;
    read_all(1'b1, 1'b1);
    foreach (model[a]) model[a] = 0;
    read_all(1'b0, 1'b1);
    checks++;
    if (refused == 0 || same_bin == 0 || accepted < 1000) begin
      failures++;
      $display("FAIL coverage accepted=%0d refused=%0d same=%0d", accepted, refused, same_bin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
