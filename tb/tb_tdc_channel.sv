// tb_tdc_channel: one channel with a short line (10 CARRY4 elements, four
// sub-TDLs). The testbench models the carry chain itself: every CO/O output
// has a fixed arrival time (random, non-uniform tap delays), and a hit that
// entered the line tau ps before a sampling edge shows its new level on the
// outputs it has reached. From those times it predicts each sub-TDL code, the
// averaged fine code, the coarse code and the latency (ev_valid rises on
// the third clock edge after the sampling edge), and it keeps
// its own histogram: first in code density mode (weight 1.0 at the fine
// code), then through a random calibration table with void and non-void
// compensation bins. Hits on consecutive clocks exercise the histogram drop
// rule. Histograms are compared bin by bin through the read port.
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam int N = 10, M = 4, S = 4, OUTS = 2 * M, CW = 16;
  localparam logic [8*S-1:0] MAP = 32'h07_05_03_01;
  localparam int CODE_W = 4, FINE_W = 6;

  logic clk = 0, rst = 1;
  logic [N*OUTS-1:0] carry_out;
  logic [CW-1:0] coarse_in;
  logic acq_en = 0, cal_en = 0, cal_we = 0;
  bin_t cal_waddr, rd_addr;
  cal_word_t cal_wdata;
  logic rd_en = 0, rd_clr = 0, rd_ready, rd_valid;
  logic [CNT_W-1:0] rd_data;
  logic ev_valid, ev_drop, sub_valid;
  logic [CW-1:0] ev_coarse;
  logic [FINE_W-1:0] ev_fine;
  logic [S-1:0][CODE_W-1:0] sub_bin;

  tdc_channel #(.N_CARRY(N), .MUX_PER_CARRY(M), .NUM_SUB(S), .TAP_MAP(MAP), .COARSE_W(CW)) dut (
    .clk, .rst, .carry_out, .coarse_in, .acq_en, .cal_en, .cal_we, .cal_waddr, .cal_wdata,
    .rd_en, .rd_addr, .rd_clr, .rd_ready, .rd_valid, .rd_data,
    .ev_valid, .ev_coarse, .ev_fine, .ev_drop, .sub_valid, .sub_bin);

  always #5 clk = ~clk;

  // carry chain model
  int arr [N][OUTS];
  logic line_level;

  typedef struct { int fine; int sub [S]; int coarse; int cyc; } ev_t;
  ev_t exp_q [$];
  longint hist [BINS];
  cal_word_t table_m [BINS];
  int cyc = 0, checks = 0, failures = 0, drops = 0, exp_drops = 0, hits = 0, voids = 0, pairs = 0;
  logic model_busy = 0;
  logic v4_model = 0;
  int   fine4_model;
  int   pend_fine [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    coarse_in <= coarse_in + 1'b1;
  end

  function automatic void build_chain();
    int t = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        t += $urandom_range(4, 16);
        arr[i][2*j+1] = t;                                  // CO_j
        arr[i][2*j]   = t + int'($urandom_range(0, 6)) - 3; // O_j
      end
  endfunction

  // apply one sampling cycle: no hit, or a hit tau ps before the edge
  task automatic cycle_with(bit hit, int tau);
    ev_t e;
    if (hit) begin
      e.fine = 0;
      for (int j = 0; j < S; j++) begin
        e.sub[j] = 0;
        for (int i = 0; i < N; i++) if (arr[i][MAP[8*j +: 8]] <= tau) e.sub[j]++;
        e.fine += e.sub[j];
      end
      for (int i = 0; i < N; i++)
        for (int k = 0; k < OUTS; k++)
          carry_out[i*OUTS + k] = (arr[i][k] <= tau) ? ~line_level : line_level;
      line_level = ~line_level;
      e.coarse = int'(coarse_in);
      e.cyc = cyc;
      exp_q.push_back(e);
      hits++;
    end else begin
      carry_out = {N*OUTS{line_level}};
    end
    @(posedge clk); #1;
  endtask

  // checks on the event outputs
  always @(posedge clk) begin
    #2;
    if (ev_valid) begin
      ev_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected ev"); end
      else begin
        e = exp_q.pop_front();
        if (int'(ev_fine) != e.fine || int'(ev_coarse) != e.coarse || cyc - e.cyc != 4) begin
          failures++;
          $display("FAIL ev fine=%0d/%0d coarse=%0d/%0d lat=%0d", ev_fine, e.fine,
                   ev_coarse, e.coarse, cyc - e.cyc);
        end
        pend_fine.push_back(e.fine);
      end
    end
    if (sub_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected event"); end
      else for (int j = 0; j < S; j++)
        if (int'(sub_bin[j]) != exp_q[0].sub[j]) begin
          failures++;
          $display("FAIL sub %0d = %0d exp %0d", j, sub_bin[j], exp_q[0].sub[j]);
        end
    end
  end

  // histogram model: one clock for the table read, then two-clock updates
  always @(posedge clk) begin
    #3;
    if (v4_model && acq_en) begin
      if (model_busy) begin
        exp_drops++;
        model_busy = 0;
      end else begin
        cal_word_t w;
        model_busy = 1;
        if (!cal_en) hist[fine4_model] += 128;
        else begin
          w = table_m[fine4_model];
          if (w.wcf_c == 0) voids++; else pairs++;
          hist[w.bcf_m] += longint'(w.wcf_m);
          hist[w.bcf_c] += longint'(w.wcf_c);
        end
      end
    end else model_busy = 0;
    if (ev_drop) drops++;
    v4_model = ev_valid;
    if (ev_valid) fine4_model = pend_fine.pop_front();
  end

  task automatic read_all(bit compare);
    for (int a = 0; a < BINS; a++) begin
      rd_en = 1; rd_addr = bin_t'(a); rd_clr = 1;
      while (!rd_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      rd_en = 0;
      if (compare) begin
        checks++;
        if (!rd_valid || longint'(rd_data) != hist[a]) begin
          failures++;
          $display("FAIL bin %0d = %0d exp %0d", a, rd_data, hist[a]);
        end
      end
      hist[a] = 0;
      @(posedge clk); #1;
    end
  endtask

  task automatic run_hits(int n);
    for (int h = 0; h < n; h++) begin
      int gap = $urandom_range(0, 3);
      cycle_with(1, $urandom_range(arr[0][MAP[7:0]], arr[N-1][OUTS-1] + 10));
      repeat (gap) cycle_with(0, 0);
    end
    repeat (8) cycle_with(0, 0);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_chain();
    line_level = 0;
    carry_out = '0;
    coarse_in = 16'h1234;
    foreach (hist[a]) hist[a] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk); #1;
    read_all(0);                          // clear the histogram
    // code density mode
    acq_en = 1;
    run_hits(400);
    acq_en = 0;
    read_all(1);
    // load a calibration table and measure through it
    for (int a = 0; a < BINS; a++) begin
      cal_word_t w;
      w.bcf_m = bin_t'($urandom_range(0, 40));
      w.bcf_c = w.bcf_m + 1'b1;
      w.wcf_m = wcf_t'($urandom_range(64, 300));
      w.wcf_c = (a % 3 == 0) ? '0 : wcf_t'($urandom_range(1, 300));
      table_m[a] = w;
      cal_we = 1; cal_waddr = bin_t'(a); cal_wdata = w;
      @(posedge clk); #1;
    end
    cal_we = 0;
    cal_en = 1; acq_en = 1;
    run_hits(400);
    acq_en = 0;
    read_all(1);
    checks++;
    if (drops != exp_drops || drops == 0 || voids == 0 || pairs == 0 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL drops=%0d exp=%0d voids=%0d pairs=%0d left=%0d", drops, exp_drops, voids, pairs, exp_q.size());
    end
    $display("hits=%0d drops=%0d voids=%0d pairs=%0d", hits, drops, voids, pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
