// tdc_channel: one complete TDC channel, from the carry-chain outputs to the
// histogram.
//
// Datapath (one register stage per line, latency from the sampling edge):
//   S0  tdl_sampler   D-FF column, sub-TDL regrouping, hit detection
//   S1  t2oh x NUM_SUB  thermometer code -> one-hot, per sub-TDL
//   S2  oh2bin x NUM_SUB  one-hot -> binary code B_j  (sub_bin, sub_valid)
//   S3  averaged_tdl  fine = sum of B_j               (ev_valid, ev_fine,
//                                                      ev_coarse)
//   S4  cal_bram      mixed calibration factors fetched at address fine
//   S5  hist_bram     bins BCF_m and BCF_c read, then WCF_m / WCF_c added
// The coarse code present at the sampling edge travels with the hit and is
// given out with its fine code. The sub-TDL codes are given out too: they
// are the raw data of the tap timing test.
//
// Modes: with cal_en low the histogram is the plain code density histogram
// of the averaged TDL (bin = fine code, weight 1.0), the one the calibration
// factors are computed from. With cal_en high each fine code is re-addressed
// through the calibration table: a table holding WCF = 1.0 gives the
// compensated TDC, one holding the binwidth weights the calibrated TDC.
// acq_en gates histogramming; while it is low the histogram can be read out
// (and cleared) through the rd_* port. A hit offered to the histogram while
// it is still writing back the previous one is not histogrammed; ev_drop
// pulses for it. The pipeline, mode inputs and drop rule are this design's
// choices; the chain of blocks is the source design's.
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned N_CARRY       = 100,
  parameter int unsigned MUX_PER_CARRY = 4,
  parameter int unsigned NUM_SUB       = 4,
  parameter logic [8*NUM_SUB-1:0] TAP_MAP = 32'h07_05_03_01,
  parameter int unsigned COARSE_W      = 16,
  localparam int unsigned CODE_W       = $clog2(N_CARRY + 1),
  localparam int unsigned FINE_W       = $clog2(NUM_SUB * N_CARRY + 1)
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [N_CARRY*2*MUX_PER_CARRY-1:0]  carry_out,
  input  logic [COARSE_W-1:0]                 coarse_in,
  // mode
  input  logic                                acq_en,
  input  logic                                cal_en,
  // calibration table load
  input  logic                                cal_we,
  input  bin_t                                cal_waddr,
  input  cal_word_t                           cal_wdata,
  // histogram readout
  input  logic                                rd_en,
  input  bin_t                                rd_addr,
  input  logic                                rd_clr,
  output logic                                rd_ready,
  output logic                                rd_valid,
  output logic [CNT_W-1:0]                    rd_data,
  // measured events
  output logic                                ev_valid,
  output logic [COARSE_W-1:0]                 ev_coarse,
  output logic [FINE_W-1:0]                   ev_fine,
  output logic                                ev_drop,
  // tap timing test data
  output logic                                sub_valid,
  output logic [NUM_SUB-1:0][CODE_W-1:0]      sub_bin
);
  // S0
  logic [NUM_SUB-1:0][N_CARRY-1:0] sub_code;
  logic                            hit0, level0;
  logic [COARSE_W-1:0]             coarse0;

  tdl_sampler #(.N_CARRY(N_CARRY), .MUX_PER_CARRY(MUX_PER_CARRY),
                .NUM_SUB(NUM_SUB), .TAP_MAP(TAP_MAP)) u_sampler (
    .clk, .rst, .carry_out, .sub_code, .hit(hit0), .level(level0));

  always_ff @(posedge clk) coarse0 <= coarse_in;

  // S1: thermometer -> one-hot
  logic [NUM_SUB-1:0][N_CARRY:0] oh_d, oh1;
  logic                          v1;
  logic [COARSE_W-1:0]           coarse1;

  for (genvar j = 0; j < NUM_SUB; j++) begin : g_t2oh
    t2oh #(.N(N_CARRY)) u_t2oh (.therm(sub_code[j]), .level(level0), .onehot(oh_d[j]));
  end

  always_ff @(posedge clk) begin
    oh1     <= oh_d;
    coarse1 <= coarse0;
    v1      <= rst ? 1'b0 : hit0;
  end

  // S2: one-hot -> binary
  logic [NUM_SUB-1:0][CODE_W-1:0] bin_d;
  logic [COARSE_W-1:0]            coarse2;

  for (genvar j = 0; j < NUM_SUB; j++) begin : g_oh2bin
    oh2bin #(.N(N_CARRY + 1), .W(CODE_W)) u_oh2bin (.onehot(oh1[j]), .bin(bin_d[j]));
  end

  always_ff @(posedge clk) begin
    sub_bin   <= bin_d;
    coarse2   <= coarse1;
    sub_valid <= rst ? 1'b0 : v1;
  end

  // S3: averaged TDL
  averaged_tdl #(.NUM_SUB(NUM_SUB), .CODE_W(CODE_W), .FINE_W(FINE_W)) u_avg (
    .clk, .rst, .in_valid(sub_valid), .codes(sub_bin),
    .out_valid(ev_valid), .fine(ev_fine));

  always_ff @(posedge clk) ev_coarse <= coarse2;

  // S4: calibration factor fetch
  cal_word_t cal_q;
  logic      v4;
  bin_t      fine4;

  cal_bram u_cal (
    .clk, .we(cal_we), .waddr(cal_waddr), .wdata(cal_wdata),
    .re(ev_valid), .raddr(bin_t'(ev_fine)), .rdata(cal_q));

  always_ff @(posedge clk) begin
    v4    <= rst ? 1'b0 : ev_valid;
    fine4 <= bin_t'(ev_fine);
  end

  // S5: histogram update
  logic upd_valid, upd_ready;
  bin_t m_addr, c_addr;
  wcf_t m_w, c_w;
  logic c_valid;

  always_comb begin
    if (cal_en) begin
      m_addr  = cal_q.bcf_m;
      m_w     = cal_q.wcf_m;
      c_addr  = cal_q.bcf_c;
      c_w     = cal_q.wcf_c;
      c_valid = (cal_q.wcf_c != '0);
    end else begin
      m_addr  = fine4;
      m_w     = WCF_ONE;
      c_addr  = fine4;
      c_w     = '0;
      c_valid = 1'b0;
    end
  end

  assign upd_valid = v4 && acq_en;
  assign ev_drop   = upd_valid && !upd_ready;

  hist_bram u_hist (
    .clk, .rst,
    .upd_valid(upd_valid && upd_ready), .upd_ready,
    .m_addr, .m_w, .c_valid, .c_addr, .c_w,
    .rd_en(rd_en && !acq_en), .rd_addr, .rd_clr, .rd_ready,
    .rd_valid, .rd_data);

  initial assert (FINE_W <= BIN_AW)
    else $error("NUM_SUB*N_CARRY+1 fine codes do not fit the %0d-entry tables", BINS);
endmodule
