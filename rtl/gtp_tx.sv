// gtp_tx: digital part of a GTP transmitter in double-width (16-bit) mode
// with 8b/10b encoding, modelled in the serial bit clock domain.
//
// ser_clk runs at the line rate. Every 20 bit times the fabric interface
// takes one 16-bit word (tx_data, tx_charisk) on the edge where tx_take is
// high, splits it into two bytes, byte 0 (tx_data[7:0]) first, encodes both
// with the running disparity, and loads the 20 code bits into the
// parallel-in/serial-out register. txd is registered and sends code bit a
// of byte 0 first. The user logic sits in the same clock domain and only
// has to present a word whenever tx_take is high, so the TX FIFO is
// bypassed, as the links in this design are configured. The line driver,
// PLL and phase-alignment circuit are analog parts and not modelled.
// The order of blocks (fabric interface, 8b/10b, PISO) follows the
// document; a single bit clock with a word strobe instead of
// TXUSRCLK/TXUSRCLK2 is this design's simplification.
module gtp_tx (
  input  logic        ser_clk,
  input  logic        rst_n,
  input  logic [15:0] tx_data,
  input  logic [1:0]  tx_charisk,
  output logic        tx_take,     // tx_data is consumed on this edge
  output logic        txd
);
  logic [4:0]  bitcnt;
  logic [19:0] piso;
  logic        rd;
  logic [9:0]  c0, c1;
  logic        rd0, rd1;

  enc8b10b u_enc0 (.din(tx_data[7:0]),  .k(tx_charisk[0]), .rd_in(rd),  .code(c0), .rd_out(rd0));
  enc8b10b u_enc1 (.din(tx_data[15:8]), .k(tx_charisk[1]), .rd_in(rd0), .code(c1), .rd_out(rd1));

  assign tx_take = (bitcnt == 5'd19);

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= 5'd19;
      piso   <= '0;
      rd     <= 1'b0;
      txd    <= 1'b0;
    end else begin
      txd <= piso[19];
      if (tx_take) begin
        bitcnt <= '0;
        piso   <= {c0, c1};
        rd     <= rd1;
      end else begin
        bitcnt <= bitcnt + 1'b1;
        piso   <= {piso[18:0], 1'b0};
      end
    end
  end

endmodule
