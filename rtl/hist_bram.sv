// hist_bram: histogram block RAM with two accumulating ports.
//
// One measurement updates up to two bins at once, as in the source design:
// port A adds weight m_w to bin m_addr (the main bin, BCF_m, weight WCF_m)
// and port B adds c_w to bin c_addr (the compensation bin, BCF_c, weight
// WCF_c) when c_valid is set. Each port does a read-modify-write: in the cycle
// an update is accepted both bins are read; in the next cycle the sums are
// written back. An update is therefore accepted at most every second clock
// (upd_ready low in the write cycle); the caller drops and counts updates
// offered while upd_ready is low. The write of one update lands before the
// read of the next, so back-to-back updates of the same bin need no
// forwarding. If both addresses are equal the two weights are added through
// port A alone. Bins hold unsigned fixed point with WCF_FRAC fraction bits.
//
// Readout: while no update is in progress, rd_en reads bin rd_addr through
// port A; rd_data is valid with rd_valid one clock later. With rd_clr set the
// bin is written to zero in that following clock, so a full readout with
// rd_clr also clears the histogram. rd_ready tells when a read is accepted.
// The memory starts cleared, as FPGA block RAM does after configuration; it
// is not affected by rst. Clear it between acquisitions by reading it out
// with rd_clr.
module hist_bram
  import tdc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             upd_valid,
  output logic             upd_ready,
  input  bin_t             m_addr,
  input  wcf_t             m_w,
  input  logic             c_valid,
  input  bin_t             c_addr,
  input  wcf_t             c_w,
  input  logic             rd_en,
  input  bin_t             rd_addr,
  input  logic             rd_clr,
  output logic             rd_ready,
  output logic             rd_valid,
  output logic [CNT_W-1:0] rd_data
);
  typedef enum logic [1:0] {IDLE, UPD_WR, RD_WR} phase_e;

  logic [CNT_W-1:0] mem [BINS];
  phase_e           phase;
  bin_t             a_q, b_q;
  logic [WCF_W:0]   aw_q;   // one bit wider: may hold m_w + c_w
  wcf_t             bw_q;
  logic             b_en_q, clr_q;
  logic [CNT_W-1:0] a_dout, b_dout;

  initial for (int i = 0; i < BINS; i++) mem[i] = '0;

  assign upd_ready = (phase == IDLE);
  assign rd_ready  = (phase == IDLE) && !upd_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= IDLE;
      rd_valid <= 1'b0;
      b_en_q   <= 1'b0;
      clr_q    <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      unique case (phase)
        IDLE: begin
          if (upd_valid) begin
            // read both bins
            a_q    <= m_addr;
            b_q    <= c_addr;
            a_dout <= mem[m_addr];
            b_dout <= mem[c_addr];
            if (c_valid && c_addr == m_addr) begin
              aw_q   <= {1'b0, m_w} + {1'b0, c_w};
              b_en_q <= 1'b0;
            end else begin
              aw_q   <= {1'b0, m_w};
              b_en_q <= c_valid;
            end
            bw_q  <= c_w;
            phase <= UPD_WR;
          end else if (rd_en) begin
            a_q      <= rd_addr;
            rd_data  <= mem[rd_addr];
            rd_valid <= 1'b1;
            clr_q    <= rd_clr;
            phase    <= RD_WR;
          end
        end
        UPD_WR: begin
          // write back the sums
          mem[a_q] <= a_dout + CNT_W'(aw_q);
          if (b_en_q) mem[b_q] <= b_dout + CNT_W'(bw_q);
          phase <= IDLE;
        end
        RD_WR: begin
          if (clr_q) mem[a_q] <= '0;
          phase <= IDLE;
        end
        default: phase <= IDLE;
      endcase
    end
  end

  // The two write-back addresses of one update never collide.
  assert property (@(posedge clk) disable iff (rst)
                   (phase == UPD_WR && b_en_q) |-> (a_q != b_q));
endmodule
