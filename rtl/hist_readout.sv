// hist_readout: sends the histogram of one channel to the host over the UART.
//
// On a start pulse (while not busy) it latches the channel number ch and
// whether to clear, sends a two-byte header {8'hA5, channel}, then reads bins
// 0 .. BINS-1 of that channel one after another and sends each 32-bit bin
// MSB first. With clr set every bin is zeroed as it is read, which prepares
// the histogram for the next acquisition. busy is high from the start pulse
// until the last byte has been handed to the UART; done pulses once at the
// end. The histogram must not be acquiring while it is read (rd_ready low
// stalls the readout). Frame layout and sequencing are this design's choice;
// the source design shows only that histograms leave the chip through a UART.
module hist_readout
  import tdc_pkg::*;
#(
  parameter int unsigned NUM_CH = 96,
  localparam int unsigned CH_W  = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [CH_W-1:0]  ch,
  input  logic             clr,
  output logic             busy,
  output logic             done,
  // histogram read port of the selected channel
  output logic [CH_W-1:0]  rd_ch,
  output logic             rd_en,
  output bin_t             rd_addr,
  output logic             rd_clr,
  input  logic             rd_ready,
  input  logic             rd_valid,
  input  logic [CNT_W-1:0] rd_data,
  // byte stream to the UART
  output logic [7:0]       tx_data,
  output logic             tx_valid,
  input  logic             tx_ready
);
  typedef enum logic [2:0] {S_IDLE, S_HDR0, S_HDR1, S_READ, S_WAIT, S_SEND} state_e;

  state_e           state;
  logic [CNT_W-1:0] word;
  logic [1:0]       byte_idx;

  assign busy   = (state != S_IDLE);
  assign rd_en  = (state == S_READ) && rd_ready;

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = '0;
    unique case (state)
      S_HDR0: begin tx_valid = 1'b1; tx_data = 8'hA5; end
      S_HDR1: begin tx_valid = 1'b1; tx_data = 8'(rd_ch); end
      S_SEND: begin tx_valid = 1'b1; tx_data = word[{~byte_idx, 3'b000} +: 8]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      rd_ch    <= '0;
      rd_addr  <= '0;
      rd_clr   <= 1'b0;
      byte_idx <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rd_ch   <= ch;
          rd_clr  <= clr;
          rd_addr <= '0;
          state   <= S_HDR0;
        end
        S_HDR0: if (tx_ready) state <= S_HDR1;
        S_HDR1: if (tx_ready) state <= S_READ;
        S_READ: if (rd_ready) state <= S_WAIT;
        S_WAIT: if (rd_valid) begin
          word     <= rd_data;
          byte_idx <= '0;
          state    <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          if (byte_idx == 2'd3) begin
            if (rd_addr == bin_t'(BINS - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              rd_addr <= rd_addr + 1'b1;
              state   <= S_READ;
            end
          end else begin
            byte_idx <= byte_idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (NUM_CH <= 256) else $error("channel number must fit the header byte");
endmodule
