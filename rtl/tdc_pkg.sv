// tdc_pkg: constants and types shared by the TDC channel, its calibration
// memory and its histogram memory.
//
// The averaged fine code of one channel addresses a 512-entry table (9 bits):
// 4 sub-TDLs x 100 CARRY4 elements give codes 0..400, 8 sub-TDLs x 60 CARRY8
// elements give 0..480. Each calibration entry holds the mixed calibration
// factor set of one fine code: the main and compensation bin addresses
// (BCF_m, BCF_c) and the weights added to those bins (WCF_m, WCF_c). The
// weights are unsigned fixed point with 7 fraction bits (1.0 = 128), so one
// entry is 4 x 9 = 36 bits wide, the width of one 512 x 36 block RAM. A
// compensation weight of zero marks BCF_c as void. The widths and the
// encoding are this design's choice; the set of four factors and their
// storage in one calibration memory follow the source design.
package tdc_pkg;

  localparam int unsigned BIN_AW   = 9;               // histogram / table address bits
  localparam int unsigned BINS     = 1 << BIN_AW;     // 512 entries
  localparam int unsigned WCF_W    = 9;               // weight width
  localparam int unsigned WCF_FRAC = 7;               // weight fraction bits
  localparam logic [WCF_W-1:0] WCF_ONE = 9'(1 << WCF_FRAC);
  localparam int unsigned CNT_W    = 32;              // histogram word width

  typedef logic [BIN_AW-1:0] bin_t;
  typedef logic [WCF_W-1:0]  wcf_t;

  // One calibration table entry; packed MSB first, 36 bits.
  typedef struct packed {
    wcf_t wcf_c;   // weight added to the compensation bin, 0 = void
    bin_t bcf_c;   // compensation bin address
    wcf_t wcf_m;   // weight added to the main bin
    bin_t bcf_m;   // main bin address
  } cal_word_t;

endpackage
