// tb_tdc_full: one complete operation of the TDC at its default size: 96
// channels, 100 CARRY4 elements per line, four sub-TDLs, 868 clocks per
// UART bit. Same carry-chain model, event prediction and histogram model as
// tb_tdc_top: a code density acquisition on all channels with the tap timing
// test on channel 1, calibration tables loaded into every channel, and a
// calibrated acquisition. Afterwards the histogram memory of every channel
// is compared bin by bin with the model (read hierarchically, since a full
// UART dump of one channel at this baud rate takes some 18 million clocks),
// and a dump of channel 0 is started and its header and first bins decoded
// from the UART line.
module tb_tdc_full;
  import tdc_pkg::*;
  localparam int NC = 96, N = 100, M = 4, S = 4, OUTS = 2 * M, TAPS = N * OUTS;
  localparam int CW = 16, CPB = 868, CH_W = 7, CODE_W = 7, FINE_W = 9;
  localparam logic [8*S-1:0] MAP = 32'h07_05_03_01;

  logic clk = 0, rst = 1;
  logic [NC-1:0][TAPS-1:0] carry_out;
  logic acq_en = 0, cal_en = 0, cal_we = 0, dump_start = 0, dump_clr = 0;
  logic [CH_W-1:0] cal_ch, dump_ch, tt_ch;
  bin_t cal_addr;
  cal_word_t cal_wdata;
  logic dump_busy, dump_done, txd, tt_en = 0, tt_clr = 0;
  logic signed [S-2:0][31:0] tt_sum;
  logic [31:0] tt_count;
  logic [NC-1:0] ev_valid, ev_drop;
  logic [NC-1:0][CW-1:0] ev_coarse;
  logic [NC-1:0][FINE_W-1:0] ev_fine;

  tdc_top dut (
    .clk, .rst, .carry_out, .acq_en, .cal_en, .cal_we, .cal_ch, .cal_addr, .cal_wdata,
    .dump_start, .dump_ch, .dump_clr, .dump_busy, .dump_done, .txd,
    .tt_en, .tt_clr, .tt_ch, .tt_sum, .tt_count,
    .ev_valid, .ev_coarse, .ev_fine, .ev_drop);

  always #5 clk = ~clk;

  event check_mem;
  for (genvar g = 0; g < NC; g++) begin : g_mem
    always @(check_mem) begin
      for (int a = 0; a < BINS; a++) begin
        checks++;
        if (longint'(dut.g_ch[g].u_ch.u_hist.mem[a]) != hist[g][a]) begin
          failures++;
          $display("FAIL ch%0d bin %0d = %0d exp %0d", g, a, dut.g_ch[g].u_ch.u_hist.mem[a], hist[g][a]);
        end
      end
    end
  end

  typedef struct { int fine; int sub [S]; int coarse; } ev_t;
  int arr [NC][N][OUTS];
  logic [NC-1:0] level;
  ev_t exp_q [NC][$];
  int  pend [NC][$];
  longint hist [NC][BINS];
  cal_word_t table_m [NC][BINS];
  logic [NC-1:0] v4, busy_m;
  int fine4 [NC];
  int cmodel;
  longint tt_model [S-1];
  int tt_n;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0, n_drop = 0, n_drop_exp = 0, n_void = 0, n_pair = 0;
  int n_raw = 0, n_cal = 0, n_dump = 0, n_dump_clr = 0;
  byte unsigned rx [$];

  always @(posedge clk) cmodel <= rst ? 0 : cmodel + 1;

  // UART receiver
  initial begin : uart_rx
    logic [7:0] b;
    forever begin
      @(negedge txd);
      repeat (CPB / 2 + 1) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      if (txd !== 1'b1) begin failures++; $display("FAIL uart stop bit"); end
      rx.push_back(b);
    end
  end

  // one sampling clock; hit_mask selects channels hit this cycle
  task automatic step(logic [NC-1:0] hit_mask);
    for (int c = 0; c < NC; c++) begin
      if (hit_mask[c]) begin
        ev_t e;
        int tau;
        tau = $urandom_range(arr[c][0][MAP[7:0]], arr[c][N-1][OUTS-1] + 10);
        e.fine = 0;
        for (int j = 0; j < S; j++) begin
          e.sub[j] = 0;
          for (int i = 0; i < N; i++) if (arr[c][i][MAP[8*j +: 8]] <= tau) e.sub[j]++;
          e.fine += e.sub[j];
        end
        for (int i = 0; i < N; i++)
          for (int k = 0; k < OUTS; k++)
            carry_out[c][i*OUTS + k] = (arr[c][i][k] <= tau) ? ~level[c] : level[c];
        if (level[c]) n_fall++; else n_rise++;
        level[c] = ~level[c];
        e.coarse = cmodel;
        exp_q[c].push_back(e);
        if (tt_en && c == int'(tt_ch)) begin
          for (int n = 0; n < S - 1; n++) tt_model[n] += e.sub[n] - e.sub[n+1];
          tt_n++;
        end
      end else begin
        carry_out[c] = {TAPS{level[c]}};
      end
    end
    @(posedge clk); #1;
  endtask

  // event checks and histogram model
  always @(posedge clk) begin
    #2;
    for (int c = 0; c < NC; c++) begin
      if (v4[c] && acq_en) begin
        if (busy_m[c]) begin
          n_drop_exp++;
          busy_m[c] = 0;
        end else begin
          busy_m[c] = 1;
          if (!cal_en) begin
            hist[c][fine4[c]] += 128;
            n_raw++;
          end else begin
            cal_word_t w;
            w = table_m[c][fine4[c]];
            if (w.wcf_c == 0) n_void++; else n_pair++;
            hist[c][w.bcf_m] += longint'(w.wcf_m);
            hist[c][w.bcf_c] += longint'(w.wcf_c);
            n_cal++;
          end
        end
      end else busy_m[c] = 0;
      if (ev_drop[c]) n_drop++;
      v4[c] = ev_valid[c];
      if (ev_valid[c]) begin
        ev_t e;
        checks++;
        if (exp_q[c].size() == 0) begin failures++; $display("FAIL ch%0d unexpected event", c); end
        else begin
          e = exp_q[c].pop_front();
          if (int'(ev_fine[c]) != e.fine || int'(ev_coarse[c]) != (e.coarse % (1 << CW))) begin
            failures++;
            $display("FAIL ch%0d fine %0d/%0d coarse %0d/%0d", c, ev_fine[c], e.fine, ev_coarse[c], e.coarse);
          end
          fine4[c] = e.fine;
        end
      end
    end
  end

  task automatic acquire(int n);
    acq_en = 1;
    for (int h = 0; h < n; h++) begin
      logic [NC-1:0] m;
      m = NC'($urandom);
      step(m);
    end
    repeat (8) step('0);
    acq_en = 0;
    repeat (2) step('0);
  endtask

  localparam int DUMP_BINS = 2;
  task automatic dump_start_check(int c);
    int t;
    rx.delete();
    dump_ch = CH_W'(c); dump_clr = 1'b0; dump_start = 1;
    @(posedge clk); #1;
    dump_start = 0;
    t = 0;
    while (rx.size() < 2 + 4 * DUMP_BINS && t < 400000) begin @(posedge clk); #1; t++; end
    checks++;
    if (rx.size() < 2 + 4 * DUMP_BINS || rx[0] != 8'hA5 || rx[1] != 8'(c) || !dump_busy) begin
      failures++;
      $display("FAIL dump ch%0d: %0d bytes", c, rx.size());
    end else begin
      for (int a = 0; a < DUMP_BINS; a++) begin
        logic [31:0] w;
        w = {rx[2+4*a], rx[3+4*a], rx[4+4*a], rx[5+4*a]};
        checks++;
        if (longint'(w) != hist[c][a]) begin
          failures++;
          $display("FAIL dump ch%0d bin %0d = %0d exp %0d", c, a, w, hist[c][a]);
        end
      end
    end
    n_dump++;
  endtask

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC; c++) begin
      int t = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++) begin
          t += $urandom_range(4, 16);
          arr[c][i][2*j+1] = t;
          arr[c][i][2*j]   = t + int'($urandom_range(0, 6)) - 3;
        end
      foreach (hist[c][a]) hist[c][a] = 0;
    end
    level = '0; carry_out = '0; v4 = '0; busy_m = '0;
    cal_ch = '0; dump_ch = '0; tt_ch = 7'd1; cal_addr = '0; cal_wdata = '0;
    foreach (tt_model[n]) tt_model[n] = 0;
    tt_n = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // code density acquisition with the tap timing test on channel 1
    tt_clr = 1; step('0); tt_clr = 0;
    tt_en = 1;
    acquire(300);
    tt_en = 0;
    checks++;
    if (int'(tt_count) != tt_n || tt_n == 0) begin failures++; $display("FAIL tt_count %0d exp %0d", tt_count, tt_n); end
    for (int n = 0; n < S - 1; n++) begin
      checks++;
      if (longint'($signed(tt_sum[n])) != tt_model[n]) begin
        failures++;
        $display("FAIL tt_sum[%0d] %0d exp %0d", n, $signed(tt_sum[n]), tt_model[n]);
      end
    end
    // calibration tables
    for (int c = 0; c < NC; c++)
      for (int a = 0; a < BINS; a++) begin
        cal_word_t w;
        w.bcf_m = (c == 0 && a % 2 == 0) ? bin_t'(a % 2) : bin_t'($urandom_range(0, 400));
        w.bcf_c = w.bcf_m + 1'b1;
        w.wcf_m = wcf_t'($urandom_range(64, 300));
        w.wcf_c = ((a + c) % 3 == 0) ? '0 : wcf_t'($urandom_range(1, 300));
        table_m[c][a] = w;
        cal_we = 1; cal_ch = CH_W'(c); cal_addr = bin_t'(a); cal_wdata = w;
        @(posedge clk); #1;
      end
    cal_we = 0;
    cal_en = 1;
    acquire(300);
    ->check_mem;
    #1;
    dump_start_check(0);
    checks++;
    if (n_drop != n_drop_exp) begin failures++; $display("FAIL drops %0d exp %0d", n_drop, n_drop_exp); end
    $display("rise=%0d fall=%0d drop=%0d void=%0d pair=%0d raw=%0d cal=%0d dumps=%0d clr=%0d tt=%0d",
             n_rise, n_fall, n_drop, n_void, n_pair, n_raw, n_cal, n_dump, n_dump_clr, tt_n);
    if (n_rise == 0) begin failures++; $display("FAIL no rising hit"); end
    if (n_fall == 0) begin failures++; $display("FAIL no falling hit"); end
    if (n_drop == 0) begin failures++; $display("FAIL no dropped hit"); end
    if (n_void == 0) begin failures++; $display("FAIL no void compensation"); end
    if (n_pair == 0) begin failures++; $display("FAIL no paired compensation"); end
    if (n_raw == 0 || n_cal == 0) begin failures++; $display("FAIL a mode never used"); end
    if (n_dump == 0) begin failures++; $display("FAIL no dump"); end
    if (tt_n == 0) begin failures++; $display("FAIL no tap timing data"); end
    for (int c = 0; c < NC; c++) if (exp_q[c].size() != 0) begin failures++; $display("FAIL ch%0d events left", c); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
