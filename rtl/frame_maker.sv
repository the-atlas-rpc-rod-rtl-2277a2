// frame_maker: the Frame Maker, main state machine of the Event Builder
// Engine.
//
// Building is EVID triggered. In S0 the machine prepares a new frame and
// looks at the EVID FIFO: empty sends it to S1, where it waits; a waiting
// EVID sends it to S2, which pops the {EVID, BCID} pair. S3 writes the
// 9-word ROD frame header into the S-Link FIFO. The machine then reads the
// Left RX SerDes FIFO and after it the Right one; each should deliver one
// RX/SL frame (header, payload, trailer). An RX frame whose header carries
// the EVID and BCID of the trigger is copied word by word into the ROD
// frame, its payload is not looked at, and the payload length is compared
// with the count in its trailer. A frame with another EVID/BCID is read and
// dropped; a word that is not a header where one is expected is dropped.
// Clearing enable stops the machine before the next EVID is taken.
// If no word arrives for rx_timeout cycles (0 disables this) the side is
// closed with a timeout flag. S4 writes the 4-word footer: error flags,
// cycles spent building the frame (from S2 to S4), number of data words,
// total frame length; the last footer word is marked last. Then S0 again.
//
// Timing: one FIFO word per clock at most, in and out. Every write waits
// while out_full is high (the S-Link FIFO back-pressures the engine). All
// FIFO ports are first-word-fall-through, rd strobes pop the word shown.
// The state sequence, the 9-word header, the header/EVID/BCID/length
// checks and the footer contents follow the document; the RX frame format,
// the drop rules, the timeout and the footer word order are this design's.
module frame_maker
  import rod_pkg::*;
#(
  parameter int unsigned TMO_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,       // builder runs when high
  input  logic [31:0]       board_id,     // source ID header word
  input  logic [31:0]       run_number,
  input  logic [TMO_W-1:0]  rx_timeout,   // idle cycles before a side is closed
  // EVID FIFO
  input  logic              evid_empty,
  input  trig_t             evid_rdata,
  output logic              evid_rd,
  // Left / Right RX SerDes FIFOs
  input  logic              l_empty,
  input  logic [DATA_W-1:0] l_data,
  output logic              l_rd,
  input  logic              r_empty,
  input  logic [DATA_W-1:0] r_data,
  output logic              r_rd,
  // S-Link FIFO
  input  logic              out_full,
  output logic              out_wr,
  output oword_t            out_data,
  // monitoring
  output fm_state_t         state,
  output logic              frame_done,   // one cycle, last footer word written
  output logic [7:0]        frame_flags,  // error flags of the finished frame
  output logic [31:0]       frame_time    // build time of the finished frame
);
  typedef enum logic [1:0] {PH_HDR, PH_APPEND, PH_DROP} ph_t;

  trig_t             trig;
  ph_t               ph;
  logic [3:0]        wcnt_hdr;     // header / footer word index
  logic [15:0]       pay_cnt;      // payload words of the current RX frame
  logic [TMO_W-1:0]  idle_cnt;
  logic [31:0]       elapsed, elapsed_q;
  logic [31:0]       ndata;
  logic [3:0]        err_l, err_r;

  // side being read
  logic              side_r;
  logic              cur_empty;
  logic [DATA_W-1:0] cur;
  assign side_r    = (state == S_READ_RIGHT);
  assign cur_empty = side_r ? r_empty : l_empty;
  assign cur       = side_r ? r_data  : l_data;

  logic reading;
  assign reading = (state == S_READ_LEFT) || (state == S_READ_RIGHT);

  logic is_hdr, is_trl, id_ok;
  assign is_hdr = cur[31:28] == RX_HDR_TAG;
  assign is_trl = cur[31:28] == RX_TRL_TAG;
  assign id_ok  = cur[27:16] == trig.evid[11:0] && cur[15:4] == trig.bcid;

  // ---------------- combinational outputs ----------------
  logic pop;
  logic [31:0] hdr_word, ftr_word;

  always_comb begin
    unique case (wcnt_hdr)
      4'd0:    hdr_word = ROD_SOF;
      4'd1:    hdr_word = ROD_HDR_SZ;
      4'd2:    hdr_word = ROD_FMT_VER;
      4'd3:    hdr_word = board_id;
      4'd4:    hdr_word = run_number;
      4'd5:    hdr_word = 32'(trig.evid);
      4'd6:    hdr_word = 32'(trig.bcid);
      default: hdr_word = '0;            // trigger type, detector event type
    endcase
    unique case (wcnt_hdr[1:0])
      2'd0:    ftr_word = {24'h0, err_r, err_l};
      2'd1:    ftr_word = elapsed_q;
      2'd2:    ftr_word = ndata;
      default: ftr_word = ndata + HDR_WORDS + FTR_WORDS;
    endcase
  end

  always_comb begin
    pop      = 1'b0;
    out_wr   = 1'b0;
    out_data = '0;
    evid_rd  = (state == S2_READ_EVID);
    unique case (state)
      S3_WRITE_HEADER: begin
        out_wr        = !out_full;
        out_data.data = hdr_word;
      end
      S4_WRITE_FOOTER: begin
        out_wr        = !out_full;
        out_data.data = ftr_word;
        out_data.last = (wcnt_hdr == 4'(FTR_WORDS - 1));
      end
      S_READ_LEFT, S_READ_RIGHT: begin
        if (!cur_empty) begin
          if ((ph == PH_HDR && is_hdr && id_ok) || ph == PH_APPEND) begin
            out_wr        = !out_full;
            out_data.data = cur;
            pop           = !out_full;
          end else begin
            pop = 1'b1;                    // dropped word
          end
        end
      end
      default: ;
    endcase
  end

  assign l_rd = pop && !side_r;
  assign r_rd = pop &&  side_r;

  // ---------------- state machine ----------------
  logic side_done;       // this cycle closes the current side
  logic [3:0] side_err;  // flags raised this cycle
  always_comb begin
    side_done = 1'b0;
    side_err  = '0;
    if (reading) begin
      if (cur_empty) begin
        if (rx_timeout != '0 && idle_cnt == rx_timeout - 1'b1) begin
          side_done            = 1'b1;
          side_err[ERR_TIMEOUT] = 1'b1;
        end
      end else if (pop) begin
        unique case (ph)
          PH_HDR: begin
            if (!is_hdr)     side_err[ERR_HDR] = 1'b1;
            else if (!id_ok) side_err[ERR_ID]  = 1'b1;
          end
          PH_APPEND: if (is_trl) begin
            side_done = 1'b1;
            if (cur[15:0] != pay_cnt) side_err[ERR_LEN] = 1'b1;
          end
          PH_DROP: if (is_trl) side_done = 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S0_PREPARE;
      trig        <= '0;
      ph          <= PH_HDR;
      wcnt_hdr    <= '0;
      pay_cnt     <= '0;
      idle_cnt    <= '0;
      elapsed     <= '0;
      elapsed_q   <= '0;
      ndata       <= '0;
      err_l       <= '0;
      err_r       <= '0;
      frame_done  <= 1'b0;
      frame_flags <= '0;
      frame_time  <= '0;
    end else begin
      frame_done <= 1'b0;
      if (state != S0_PREPARE && state != S1_EVID_EMPTY) elapsed <= elapsed + 1'b1;
      if (out_wr && reading) ndata <= ndata + 1'b1;

      if (reading) begin
        if (side_r) err_r <= err_r | side_err;
        else        err_l <= err_l | side_err;
        idle_cnt <= cur_empty ? idle_cnt + 1'b1 : '0;
        if (pop) begin
          unique case (ph)
            PH_HDR: if (is_hdr) begin
              ph      <= id_ok ? PH_APPEND : PH_DROP;
              pay_cnt <= '0;
            end
            PH_APPEND: pay_cnt <= pay_cnt + 1'b1;
            default: ;
          endcase
        end
        if (side_done) begin
          ph       <= PH_HDR;
          idle_cnt <= '0;
          if (side_r) begin
            state     <= S4_WRITE_FOOTER;
            wcnt_hdr  <= '0;
            elapsed_q <= elapsed;
          end else begin
            state <= S_READ_RIGHT;
          end
        end
      end

      unique case (state)
        S0_PREPARE: begin
          ndata <= '0;
          err_l <= '0;
          err_r <= '0;
          if (enable) state <= evid_empty ? S1_EVID_EMPTY : S2_READ_EVID;
        end
        S1_EVID_EMPTY: if (!evid_empty && enable) state <= S2_READ_EVID;
        S2_READ_EVID: begin
          trig     <= evid_rdata;
          elapsed  <= 32'd1;
          wcnt_hdr <= '0;
          state    <= S3_WRITE_HEADER;
        end
        S3_WRITE_HEADER: if (out_wr) begin
          wcnt_hdr <= wcnt_hdr + 1'b1;
          if (wcnt_hdr == 4'(HDR_WORDS - 1)) begin
            state    <= S_READ_LEFT;
            ph       <= PH_HDR;
            idle_cnt <= '0;
          end
        end
        S4_WRITE_FOOTER: if (out_wr) begin
          wcnt_hdr <= wcnt_hdr + 1'b1;
          if (wcnt_hdr == 4'(FTR_WORDS - 1)) begin
            state       <= S0_PREPARE;
            frame_done  <= 1'b1;
            frame_flags <= {err_r, err_l};
            frame_time  <= elapsed_q;
          end
        end
        default: ;
      endcase
    end
  end

  // the EVID FIFO is only popped when it holds a word
  a_evid_pop: assert property (@(posedge clk) disable iff (!rst_n) evid_rd |-> !evid_empty);
  // never write into a full S-Link FIFO
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) out_wr |-> !out_full);

endmodule
