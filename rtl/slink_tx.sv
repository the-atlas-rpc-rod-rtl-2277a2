// slink_tx: S-Link emulator. Takes finished ROD frame words from the S-Link
// FIFO and turns them into the 16-bit word stream of a GTP transmitter
// (gtp_tx) running with 8b/10b encoding, in place of a HOLA S-Link card.
//
// Between fragments the link carries idle words {D16.2, K28.5} (comma in
// byte 0), which keep the receiver aligned. A fragment is sent as the
// control word BOF (0xB0F00000), the frame words, and the control word EOF
// (0xE0F00000) after the word marked last. A 32-bit word goes out as two
// 16-bit words, upper half first; a control word is preceded by a marker
// word {0x00, K28.0} so the receiver can tell it from data. When the FIFO
// runs dry inside a fragment, idles are inserted between 32-bit words.
// Everything runs in the GTP bit clock domain: the state advances when
// gtp_tx takes a word (tx_take), so one 32-bit word leaves every 40 bit
// times. The FIFO port is first-word-fall-through.
// That fabric logic encodes the frames for a GTP with 16-bit words and
// 8b/10b follows the document; the word and control encoding is this
// design's, since the document does not give the S-Link protocol.
module slink_tx
  import rod_pkg::*;
(
  input  logic        clk,         // GTP bit clock
  input  logic        rst_n,
  input  logic        fifo_empty,
  input  oword_t      fifo_data,
  output logic        fifo_rd,
  input  logic        tx_take,
  output logic [15:0] tx_data,
  output logic [1:0]  tx_charisk,
  output logic [15:0] frag_cnt     // fragments sent
);
  typedef enum logic [3:0] {
    T_IDLE, T_BOF_MK, T_BOF_HI, T_BOF_LO, T_D_HI, T_D_LO,
    T_EOF_MK, T_EOF_HI, T_EOF_LO
  } tstate_t;

  tstate_t st;

  localparam logic [15:0] IDLE_W = {D16_2, K28_5};
  localparam logic [15:0] MARK_W = {8'h00, K28_0};

  always_comb begin
    tx_data    = IDLE_W;
    tx_charisk = 2'b01;
    fifo_rd    = 1'b0;
    unique case (st)
      T_BOF_MK, T_EOF_MK: begin tx_data = MARK_W; tx_charisk = 2'b01; end
      T_BOF_HI: begin tx_data = SLINK_BOF[31:16]; tx_charisk = 2'b00; end
      T_BOF_LO: begin tx_data = SLINK_BOF[15:0];  tx_charisk = 2'b00; end
      T_EOF_HI: begin tx_data = SLINK_EOF[31:16]; tx_charisk = 2'b00; end
      T_EOF_LO: begin tx_data = SLINK_EOF[15:0];  tx_charisk = 2'b00; end
      T_D_HI: if (!fifo_empty) begin
        tx_data = fifo_data.data[31:16]; tx_charisk = 2'b00;
      end
      T_D_LO: begin
        tx_data = fifo_data.data[15:0]; tx_charisk = 2'b00;
        fifo_rd = tx_take;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= T_IDLE;
      frag_cnt <= '0;
    end else if (tx_take) begin
      unique case (st)
        T_IDLE:   if (!fifo_empty) st <= T_BOF_MK;
        T_BOF_MK: st <= T_BOF_HI;
        T_BOF_HI: st <= T_BOF_LO;
        T_BOF_LO: st <= T_D_HI;
        T_D_HI:   if (!fifo_empty) st <= T_D_LO;
        T_D_LO:   st <= fifo_data.last ? T_EOF_MK : T_D_HI;
        T_EOF_MK: st <= T_EOF_HI;
        T_EOF_HI: st <= T_EOF_LO;
        T_EOF_LO: begin st <= T_IDLE; frag_cnt <= frag_cnt + 1'b1; end
        default:  st <= T_IDLE;
      endcase
    end
  end

  // the low half is only sent for a word that is present
  a_lo_valid: assert property (@(posedge clk) disable iff (!rst_n) st == T_D_LO |-> !fifo_empty);

endmodule
