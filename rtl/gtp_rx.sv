// gtp_rx: digital part of a GTP receiver in double-width (16-bit) mode with
// comma alignment and 8b/10b decoding, modelled in the recovered bit clock
// domain.
//
// rxd is sampled on every ser_clk edge (the clock a CDR would recover; the
// CDR itself is analog and not modelled) into a serial-in/parallel-out
// register. The comma detector looks at the 10 newest bits for the K28.5
// comma sequences 0011111 / 1100000 in bits abcdeif; on a match the
// character boundary is moved there, so after the first comma every 10th
// bit closes a character. Each character is decoded and paired into a
// 16-bit word; the comma character always becomes byte 0, so byte pairing
// follows the transmitter's. rx_valid pulses for one ser_clk cycle with
// every word (every 20 bit times); rx_aligned goes high after the first
// comma; rx_err pulses with a word that held a code or disparity error.
// The elastic RX FIFO of the real transceiver is provided by async_fifo
// where the design needs it.
// The order of blocks (SIPO, comma detect and align, 10b/8b, fabric
// interface) follows the document; the bit-clock model is this design's
// simplification.
module gtp_rx (
  input  logic        ser_clk,
  input  logic        rst_n,
  input  logic        rxd,
  output logic [15:0] rx_data,
  output logic [1:0]  rx_charisk,
  output logic        rx_valid,
  output logic        rx_aligned,
  output logic        rx_err
);
  logic [8:0] sipo;
  logic [9:0] sipo_n;
  logic [3:0] bitcnt;
  logic       comma;
  logic       char_rdy;
  logic [9:0] char_q;
  logic       char_v;
  logic       rd;
  logic [7:0] dbyte;
  logic       dk, derr, rd_n;
  logic       byte_sel;
  logic [7:0] b0;
  logic       k0, e0;

  assign sipo_n   = {sipo, rxd};
  assign comma    = (sipo_n[9:3] == 7'b0011111) || (sipo_n[9:3] == 7'b1100000);
  assign char_rdy = comma || (rx_aligned && bitcnt == 4'd9);

  dec8b10b u_dec (.code(char_q), .rd_in(rd), .dout(dbyte), .k(dk), .err(derr), .rd_out(rd_n));

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      sipo       <= '0;
      bitcnt     <= '0;
      char_q     <= '0;
      char_v     <= 1'b0;
      rd         <= 1'b0;
      rx_aligned <= 1'b0;
      byte_sel   <= 1'b0;
      b0         <= '0;
      k0         <= 1'b0;
      e0         <= 1'b0;
      rx_data    <= '0;
      rx_charisk <= '0;
      rx_valid   <= 1'b0;
      rx_err     <= 1'b0;
    end else begin
      sipo     <= sipo_n[8:0];
      char_v   <= char_rdy;
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      if (char_rdy) begin
        char_q <= sipo_n;
        bitcnt <= '0;
      end else begin
        bitcnt <= bitcnt + 1'b1;
      end
      if (comma) rx_aligned <= 1'b1;

      // second stage: decode one character, pair two into a word
      if (char_v) begin
        rd <= rd_n;
        if (!byte_sel || (dk && dbyte == 8'hBC)) begin
          b0       <= dbyte;
          k0       <= dk;
          e0       <= derr;
          byte_sel <= 1'b1;
        end else begin
          rx_data    <= {dbyte, b0};
          rx_charisk <= {dk, k0};
          rx_err     <= derr || e0;
          rx_valid   <= 1'b1;
          byte_sel   <= 1'b0;
        end
      end
    end
  end

endmodule
