// rodbus_rx: rebuilds the 32-bit RX/SL words arriving on one GTP-based
// RODbus link and writes them into the receive FIFO of that link.
//
// The RX/SL transmitter sends each 32-bit word as two 16-bit GTP words,
// upper half first, and fills gaps with idle words that carry a K
// character. On each rx_valid from gtp_rx a data word (no K character) is
// kept as the upper half or, if an upper half is waiting, completes the
// 32-bit word, which is written to the FIFO in the same cycle (wr_en). A K
// word between the halves discards the waiting half. Nothing is accepted
// before the receiver is aligned. A finished word that meets a full FIFO is
// lost and counted in overflow_cnt; a word with a line code error is
// counted in code_err_cnt (and kept).
// One GTP link per RX/SL board at 3 Gbit/s with 8b/10b, in place of the
// eight LVDS lanes, follows the document; the two-halves word format is
// this design's.
module rodbus_rx
  import rod_pkg::*;
(
  input  logic              clk,          // recovered bit clock of the link
  input  logic              rst_n,
  input  logic [15:0]       rx_data,
  input  logic [1:0]        rx_charisk,
  input  logic              rx_valid,
  input  logic              rx_aligned,
  input  logic              rx_err,
  output logic              wr_en,
  output logic [DATA_W-1:0] wr_data,
  input  logic              wr_full,
  output logic [15:0]       overflow_cnt,
  output logic [15:0]       code_err_cnt
);
  logic        half;
  logic [15:0] hi;
  logic        complete;

  assign complete = rx_valid && rx_aligned && rx_charisk == 2'b00 && half;
  assign wr_en    = complete && !wr_full;
  assign wr_data  = {hi, rx_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half         <= 1'b0;
      hi           <= '0;
      overflow_cnt <= '0;
      code_err_cnt <= '0;
    end else if (rx_valid && rx_aligned) begin
      if (rx_err && code_err_cnt != '1) code_err_cnt <= code_err_cnt + 1'b1;
      if (rx_charisk != 2'b00) begin
        half <= 1'b0;
      end else if (!half) begin
        hi   <= rx_data;
        half <= 1'b1;
      end else begin
        half <= 1'b0;
        if (wr_full && overflow_cnt != '1) overflow_cnt <= overflow_cnt + 1'b1;
      end
    end
  end

endmodule
