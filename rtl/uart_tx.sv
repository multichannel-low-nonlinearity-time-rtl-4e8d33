// uart_tx: UART transmitter carrying histogram data to the host PC.
//
// 8 data bits, LSB first, one start bit (0), one stop bit (1), no parity;
// each bit lasts CLKS_PER_BIT clocks (868 = 115200 baud at 100 MHz). A byte
// is taken when valid and ready are both high; ready stays low until its
// stop bit has been sent. txd idles high. The frame format and baud rate are
// this design's choice; the source design only names the UART link.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned DIV_W = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]       shreg;   // stop, data[7:0]
  logic [3:0]       bits_left;
  logic [DIV_W-1:0] div;

  assign ready = (bits_left == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      div       <= '0;
      txd       <= 1'b1;
    end else if (bits_left == 0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data};
        bits_left <= 4'd10;
        div       <= '0;
        txd       <= 1'b0;   // start bit
      end
    end else begin
      if (div == DIV_W'(CLKS_PER_BIT - 1)) begin
        div       <= '0;
        bits_left <= bits_left - 1'b1;
        shreg     <= {1'b1, shreg[8:1]};
        txd       <= shreg[0];
      end else begin
        div <= div + 1'b1;
      end
    end
  end
endmodule
