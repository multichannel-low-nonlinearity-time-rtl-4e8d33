// cal_bram: calibration block RAM of one channel.
//
// Holds one mixed calibration factor entry (tdc_pkg::cal_word_t: BCF_m, BCF_c,
// WCF_m, WCF_c) per averaged fine code. When a fine code is valid it is put
// on the read address and the entry appears on rdata one clock later, as the
// synchronous read of a block RAM does. The write port loads factors computed
// from code density tests; the source design computes them off chip and
// stores them here. One read and one write port (simple dual-port mode).
// The contents are not reset: load the table before enabling calibration.
module cal_bram
  import tdc_pkg::*;
(
  input  logic      clk,
  input  logic      we,
  input  bin_t      waddr,
  input  cal_word_t wdata,
  input  logic      re,
  input  bin_t      raddr,
  output cal_word_t rdata
);
  cal_word_t mem [BINS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
