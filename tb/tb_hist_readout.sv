// tb_hist_readout: the histogram side is a model answering reads one clock
// later with a known function of (channel, bin) and a random rd_ready; the
// UART side takes bytes with a random ready. Checks the header, all 512 bins
// MSB first, the clear flag on every read, busy and the single done pulse.
module tb_hist_readout;
  import tdc_pkg::*;
  localparam int NUM_CH = 6, CH_W = 3;
  logic clk = 0, rst = 1, start = 0, clr = 0, busy, done;
  logic [CH_W-1:0] ch, rd_ch;
  logic rd_en, rd_clr, rd_ready, rd_valid;
  bin_t rd_addr;
  logic [CNT_W-1:0] rd_data;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready;
  int checks = 0, failures = 0, dones = 0;
  byte unsigned got [$];

  hist_readout #(.NUM_CH(NUM_CH)) dut (.clk, .rst, .start, .ch, .clr, .busy, .done,
    .rd_ch, .rd_en, .rd_addr, .rd_clr, .rd_ready, .rd_valid, .rd_data,
    .tx_data, .tx_valid, .tx_ready);

  function automatic logic [31:0] val(int c, int a);
    return 32'(c * 32'h0100_0000 + a * 32'h0001_0203 + 32'h11);
  endfunction

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    rd_valid <= rd_en;
    if (rd_en) rd_data <= val(int'(rd_ch), int'(rd_addr));
    rd_ready <= 1'($urandom_range(0, 3) != 0);
    tx_ready <= 1'($urandom);
    if (tx_valid && tx_ready) got.push_back(tx_data);
    if (done) dones++;
    if (rd_en && rd_clr != clr) begin
      failures++;
      $display("FAIL rd_clr");
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dump(int c, logic cl);
    got.delete();
    dones = 0;
    @(negedge clk);
    ch = CH_W'(c); clr = cl; start = 1;
    @(negedge clk);
    start = 0; ch = '0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy"); end
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (got.size() != 2 + 4 * BINS || dones != 1) begin
      failures++;
      $display("FAIL %0d bytes, %0d done pulses", got.size(), dones);
    end else begin
      checks++;
      if (got[0] != 8'hA5 || got[1] != 8'(c)) begin failures++; $display("FAIL header"); end
      for (int a = 0; a < BINS; a++) begin
        logic [31:0] w;
        w = {got[2+4*a], got[3+4*a], got[4+4*a], got[5+4*a]};
        checks++;
        if (w != val(c, a)) begin
          failures++;
          $display("FAIL ch %0d bin %0d got %h", c, a, w);
        end
      end
    end
  endtask

  initial begin
    rd_data = '0;
    ch = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    dump(5, 1'b1);
    dump(2, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
