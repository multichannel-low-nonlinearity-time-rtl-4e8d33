// tdc_top: multichannel carry-chain TDC with sub-TDL averaging, direct
// histogram compensation and mixed (binwidth) calibration.
//
// NUM_CH identical channels (tdc_channel) each measure hits on their own
// tapped delay line. The carry chains themselves are FPGA carry primitives
// (CARRY4 / CARRY8) placed outside this RTL; their CO and O outputs enter on
// carry_out, NUM_CH x N_CARRY*2*MUX_PER_CARRY bits, ordered per element as
// C_(2j) = O_j, C_(2j+1) = CO_j. One free-running coarse counter, clocked by
// the sampling clock, is shared by all channels.
//
// Per channel: every detected hit gives ev_valid with its coarse code and
// averaged fine code on the third clock edge after the sampling edge, and is histogrammed,
// either by fine code (cal_en low: code density test) or through the
// channel's calibration table (cal_en high: compensated / calibrated TDC).
// ev_drop flags a hit the histogram could not take.
//
// Host side: cal_we writes entry cal_addr of channel cal_ch's calibration
// table. A dump_start pulse with acq_en low sends channel dump_ch's
// histogram over the UART (header 8'hA5, channel, then 512 bins of 32 bits,
// MSB first), clearing it when dump_clr is set. The tap timing test
// accumulates, for channel tt_ch while tt_en is high, the sums of B_n - B_n+1
// over all hits (tt_sum) and the number of hits (tt_count).
//
// Defaults are the Virtex 7 configuration: 96 channels, 4 sub-TDLs of 100
// CARRY4 taps (averaged fine code 0..400). The UltraScale configuration is
// NUM_SUB = 8, MUX_PER_CARRY = 8, N_CARRY = 60 with TAP_MAP naming the 8 of
// 16 outputs kept. The channel count, sub-TDL counts and carry types follow
// the source design; the line length, widths, host interface and readout
// format are this design's choices.
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned NUM_CH        = 96,
  parameter int unsigned N_CARRY       = 100,
  parameter int unsigned MUX_PER_CARRY = 4,
  parameter int unsigned NUM_SUB       = 4,
  parameter logic [8*NUM_SUB-1:0] TAP_MAP = 32'h07_05_03_01,
  parameter int unsigned COARSE_W      = 16,
  parameter int unsigned CLKS_PER_BIT  = 868,
  localparam int unsigned TAPS   = N_CARRY * 2 * MUX_PER_CARRY,
  localparam int unsigned CH_W   = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned CODE_W = $clog2(N_CARRY + 1),
  localparam int unsigned FINE_W = $clog2(NUM_SUB * N_CARRY + 1)
) (
  input  logic                                      clk,
  input  logic                                      rst,
  input  logic [NUM_CH-1:0][TAPS-1:0]               carry_out,
  // mode
  input  logic                                      acq_en,
  input  logic                                      cal_en,
  // calibration table load
  input  logic                                      cal_we,
  input  logic [CH_W-1:0]                           cal_ch,
  input  bin_t                                      cal_addr,
  input  cal_word_t                                 cal_wdata,
  // histogram dump over the UART
  input  logic                                      dump_start,
  input  logic [CH_W-1:0]                           dump_ch,
  input  logic                                      dump_clr,
  output logic                                      dump_busy,
  output logic                                      dump_done,
  output logic                                      txd,
  // tap timing test
  input  logic                                      tt_en,
  input  logic                                      tt_clr,
  input  logic [CH_W-1:0]                           tt_ch,
  output logic signed [NUM_SUB-2:0][31:0]           tt_sum,
  output logic [31:0]                               tt_count,
  // measured events
  output logic [NUM_CH-1:0]                         ev_valid,
  output logic [NUM_CH-1:0][COARSE_W-1:0]           ev_coarse,
  output logic [NUM_CH-1:0][FINE_W-1:0]             ev_fine,
  output logic [NUM_CH-1:0]                         ev_drop
);
  logic [COARSE_W-1:0] coarse;

  coarse_counter #(.WIDTH(COARSE_W)) u_coarse (
    .clk, .rst, .en(1'b1), .count(coarse));

  // readout sequencer signals
  logic [CH_W-1:0]  rd_ch;
  logic             rd_en, rd_clr;
  bin_t             rd_addr;
  logic [NUM_CH-1:0]             ch_rd_ready, ch_rd_valid;
  logic [NUM_CH-1:0][CNT_W-1:0]  ch_rd_data;
  logic [NUM_CH-1:0]                          ch_sub_valid;
  logic [NUM_CH-1:0][NUM_SUB-1:0][CODE_W-1:0] ch_sub_bin;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    tdc_channel #(.N_CARRY(N_CARRY), .MUX_PER_CARRY(MUX_PER_CARRY),
                  .NUM_SUB(NUM_SUB), .TAP_MAP(TAP_MAP), .COARSE_W(COARSE_W)) u_ch (
      .clk, .rst,
      .carry_out (carry_out[c]),
      .coarse_in (coarse),
      .acq_en, .cal_en,
      .cal_we    (cal_we && cal_ch == CH_W'(c)),
      .cal_waddr (cal_addr),
      .cal_wdata,
      .rd_en     (rd_en && rd_ch == CH_W'(c)),
      .rd_addr, .rd_clr,
      .rd_ready  (ch_rd_ready[c]),
      .rd_valid  (ch_rd_valid[c]),
      .rd_data   (ch_rd_data[c]),
      .ev_valid  (ev_valid[c]),
      .ev_coarse (ev_coarse[c]),
      .ev_fine   (ev_fine[c]),
      .ev_drop   (ev_drop[c]),
      .sub_valid (ch_sub_valid[c]),
      .sub_bin   (ch_sub_bin[c]));
  end

  // histogram readout over the UART
  logic [7:0] tx_data;
  logic       tx_valid, tx_ready;

  hist_readout #(.NUM_CH(NUM_CH)) u_readout (
    .clk, .rst,
    .start(dump_start && !acq_en), .ch(dump_ch), .clr(dump_clr),
    .busy(dump_busy), .done(dump_done),
    .rd_ch, .rd_en, .rd_addr, .rd_clr,
    .rd_ready (ch_rd_ready[rd_ch] && !acq_en),
    .rd_valid (ch_rd_valid[rd_ch]),
    .rd_data  (ch_rd_data[rd_ch]),
    .tx_data, .tx_valid, .tx_ready);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd);

  // tap timing test on the selected channel
  tap_timing_acc #(.NUM_SUB(NUM_SUB), .CODE_W(CODE_W), .ACC_W(32), .CNT_W(32)) u_tt (
    .clk, .rst, .clr(tt_clr), .en(tt_en),
    .valid (ch_sub_valid[tt_ch]),
    .codes (ch_sub_bin[tt_ch]),
    .sum   (tt_sum),
    .count (tt_count));

  initial assert (NUM_CH <= (1 << CH_W));
endmodule
