// vme2eb_tx: the VME-FPGA end of the VME link ("VME2EB TX System"), master
// of the link. It turns register accesses coming from the VME interface
// logic into command words for the ROD FPGA and collects the replies.
//
// Access port: a request (req with we, addr, wdata) is taken when the unit
// is idle (ready high). A write sends {0, 7'b0, addr}, then wdata[31:16],
// then wdata[15:0], and completes (ack for one clock) once the three words
// are queued. A read sends {1, 7'b0, addr} and completes when the two reply
// words (bits 31:16, then 15:0) have arrived; rdata holds the value. If no
// reply comes within REPLY_TMO clocks the read completes with err set and
// rdata = 0; any late reply words are discarded when the next read starts.
// Words go out through a FIFO write port (cmd_*) and come back through a
// fall-through FIFO read port (rep_*), so the unit works in the clock of
// its own FPGA and the link FIFOs absorb the phase to the other FPGA.
// That the VME FPGA is master and issues the writes (address and data) and
// the reads follows the document; the word format and the reply timeout
// are this design's, matching vme2eb_rx.
module vme2eb_tx #(
  parameter int unsigned REPLY_TMO = 4096   // clocks to wait for a read reply
) (
  input  logic        clk,
  input  logic        rst_n,
  // register access from the VME interface
  input  logic        req,
  input  logic        we,
  input  logic [7:0]  addr,
  input  logic [31:0] wdata,
  output logic        ready,
  output logic        ack,
  output logic        err,
  output logic [31:0] rdata,
  // command words towards the link transmitter
  input  logic        cmd_full,
  output logic        cmd_wr,
  output logic [15:0] cmd_data,
  // reply words from the link receiver
  input  logic        rep_empty,
  input  logic [15:0] rep_data,
  output logic        rep_rd
);
  typedef enum logic [2:0] {X_IDLE, X_FLUSH, X_CMD, X_WHI, X_WLO, X_RHI, X_RLO} xst_t;
  xst_t        st;
  logic        we_q;
  logic [7:0]  addr_q;
  logic [31:0] wdata_q;
  logic [$clog2(REPLY_TMO + 1)-1:0] tmo;

  assign ready = (st == X_IDLE);

  always_comb begin
    cmd_wr   = 1'b0;
    cmd_data = '0;
    rep_rd   = 1'b0;
    unique case (st)
      X_FLUSH: rep_rd = !rep_empty;                       // drop stale replies
      X_CMD:   begin cmd_wr = !cmd_full; cmd_data = {!we_q, 7'b0, addr_q}; end
      X_WHI:   begin cmd_wr = !cmd_full; cmd_data = wdata_q[31:16]; end
      X_WLO:   begin cmd_wr = !cmd_full; cmd_data = wdata_q[15:0]; end
      X_RHI, X_RLO: rep_rd = !rep_empty;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= X_IDLE;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata   <= '0;
      ack     <= 1'b0;
      err     <= 1'b0;
      tmo     <= '0;
    end else begin
      ack <= 1'b0;
      unique case (st)
        X_IDLE: if (req) begin
          we_q    <= we;
          addr_q  <= addr;
          wdata_q <= wdata;
          err     <= 1'b0;
          st      <= we ? X_CMD : X_FLUSH;
        end
        X_FLUSH: if (rep_empty) st <= X_CMD;
        X_CMD: if (!cmd_full) begin
          tmo <= '0;
          st  <= we_q ? X_WHI : X_RHI;
        end
        X_WHI: if (!cmd_full) st <= X_WLO;
        X_WLO: if (!cmd_full) begin ack <= 1'b1; st <= X_IDLE; end
        X_RHI, X_RLO: begin
          if (!rep_empty) begin
            tmo <= '0;
            if (st == X_RHI) begin
              rdata[31:16] <= rep_data;
              st           <= X_RLO;
            end else begin
              rdata[15:0] <= rep_data;
              ack         <= 1'b1;
              st          <= X_IDLE;
            end
          end else if (tmo == ($bits(tmo))'(REPLY_TMO - 1)) begin
            rdata <= '0;
            err   <= 1'b1;
            ack   <= 1'b1;
            st    <= X_IDLE;
          end else begin
            tmo <= tmo + 1'b1;
          end
        end
        default: st <= X_IDLE;
      endcase
    end
  end

  a_cmd_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cmd_wr |-> !cmd_full);
  a_rep_pop: assert property (@(posedge clk) disable iff (!rst_n) rep_rd |-> !rep_empty);
endmodule
