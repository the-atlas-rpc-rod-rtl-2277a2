// rod_fpga_top: ROD FPGA of the upgraded ATLAS RPC Read Out Driver.
//
// The board receives the readout data of one spectrometer sector from two
// RX/SL boards (left and right), the trigger identifiers from the TTCrq,
// and sends one ROD frame per Level-1 Accept to the ROS over S-Link; the VME
// FPGA configures and monitors it. In the upgraded layout every serial
// channel is a GTP transceiver with 8b/10b coding: LANES bonded 3 Gbit/s
// links per RX/SL board on the RODbus, the S-Link emulator, and the VME-FPGA
// link.
//
// Data path:
//   TTCrq lines -> ttc_rx -> EVID FIFO ----------------------+
//   left  lanes -> rodbus_link (gtp_rx, rodbus_rx, FIFO per lane) -+-> frame_maker
//   right lanes -> rodbus_link (gtp_rx, rodbus_rx, FIFO per lane) -+      |
//   frame_maker -> S-Link FIFO -> slink_tx -> gtp_tx -> slink_txd   |
//   frame_maker -> VME FIFO (copy of every frame word, dropped when full)
//   VME link    -> gtp_rx -> cmd FIFO -> vme2eb_rx -> reply FIFO -> gtp_tx
// Clock domains: ttc_clk (40 MHz LHC clock), clk (event builder, 240 MHz in
// the upgraded design), one bit clock per GTP link (the recovered clock of
// each receiver; the transmit clock of the S-Link). Every crossing goes
// through an async_fifo. The configuration registers are written rarely
// and are used by the Frame Maker in the clk domain where they live. Each
// domain leaves reset through its own rst_sync. The mon_* outputs are the
// signals a monitoring processor would sample; the counters of the other
// domains are in those domains.
// The blocks and their connection follow the document's event builder data
// flow and new board layout; FIFO depths, reset and the monitoring outputs
// are this design's choices.
module rod_fpga_top
  import rod_pkg::*;
#(
  parameter int unsigned LANES   = 8,    // GTP lanes per RX/SL board
  parameter int unsigned EVID_AW = 5,    // EVID FIFO: 32 triggers
  parameter int unsigned RX_AW   = 7,    // RX FIFOs: 128 words per lane
  parameter int unsigned SL_AW   = 10,   // S-Link FIFO: 1024 words
  parameter int unsigned VF_AW   = 10,   // VME FIFO: 1024 words
  parameter int unsigned CMD_AW  = 4,    // VME link command and reply FIFOs
  parameter logic [31:0] BOARD_ID_RST   = 32'h0065_0000,
  parameter logic [31:0] RX_TIMEOUT_RST = 32'd4096
) (
  input  logic        clk,          // event builder clock
  input  logic        rst_n,        // board reset, asynchronous
  // TTCrq
  input  logic        ttc_clk,
  input  logic        ttc_l1a,
  input  logic        ttc_bcr,
  input  logic        ttc_ecr,
  // RODbus GTP links from the left and right RX/SL boards
  input  logic        left_ser_clk,
  input  logic [LANES-1:0] left_rxd,
  input  logic        right_ser_clk,
  input  logic [LANES-1:0] right_rxd,
  // S-Link emulator GTP link to the ROS
  input  logic        slink_ser_clk,
  output logic        slink_txd,
  // GTP link to the VME FPGA
  input  logic        vme_ser_clk,
  input  logic        vme_rxd,
  output logic        vme_txd,
  // monitoring
  output fm_state_t   mon_state,
  output logic        mon_frame_done,
  output logic [7:0]  mon_frame_flags,
  output logic [31:0] mon_frame_time,
  output logic [15:0] mon_lost_l1a,       // ttc_clk domain
  output logic [LANES-1:0][15:0] mon_left_ovf,   // left_ser_clk domain, per lane
  output logic [LANES-1:0][15:0] mon_left_code_err,
  output logic [LANES-1:0][15:0] mon_right_ovf,  // right_ser_clk domain, per lane
  output logic [LANES-1:0][15:0] mon_right_code_err,
  output logic [15:0] mon_slink_frags     // slink_ser_clk domain
);
  // ---------------- resets ----------------
  logic rst_eb_n, rst_ttc_n, rst_l_n, rst_r_n, rst_s_n, rst_v_n;
  rst_sync u_rs_eb  (.clk(clk),           .rst_n_in(rst_n), .rst_n_out(rst_eb_n));
  rst_sync u_rs_ttc (.clk(ttc_clk),       .rst_n_in(rst_n), .rst_n_out(rst_ttc_n));
  rst_sync u_rs_l   (.clk(left_ser_clk),  .rst_n_in(rst_n), .rst_n_out(rst_l_n));
  rst_sync u_rs_r   (.clk(right_ser_clk), .rst_n_in(rst_n), .rst_n_out(rst_r_n));
  rst_sync u_rs_s   (.clk(slink_ser_clk), .rst_n_in(rst_n), .rst_n_out(rst_s_n));
  rst_sync u_rs_v   (.clk(vme_ser_clk),   .rst_n_in(rst_n), .rst_n_out(rst_v_n));

  // ---------------- TTC and EVID FIFO ----------------
  logic  evid_wr, evid_full, evid_empty, evid_rd;
  trig_t evid_wdata, evid_rdata;
  logic [EVID_W-1:0] evid_cnt_unused;
  logic [BCID_W-1:0] bcid_cnt_unused;
  logic [EVID_AW:0]  evid_count_unused;

  ttc_rx u_ttc (
    .clk(ttc_clk), .rst_n(rst_ttc_n),
    .l1a(ttc_l1a), .bcr(ttc_bcr), .ecr(ttc_ecr),
    .evid_wr(evid_wr), .evid_wdata(evid_wdata), .evid_full(evid_full),
    .lost_l1a(mon_lost_l1a), .evid_cnt(evid_cnt_unused), .bcid_cnt(bcid_cnt_unused)
  );

  async_fifo #(.W($bits(trig_t)), .AW(EVID_AW)) u_evid_fifo (
    .wr_clk(ttc_clk), .wr_rst_n(rst_ttc_n), .wr_en(evid_wr), .wr_data(evid_wdata),
    .wr_full(evid_full), .wr_count(evid_count_unused),
    .rd_clk(clk), .rd_rst_n(rst_eb_n), .rd_en(evid_rd), .rd_data(evid_rdata),
    .rd_empty(evid_empty)
  );

  // ---------------- RODbus receivers ----------------
  logic              l_empty, l_rd, r_empty, r_rd;
  logic [DATA_W-1:0] l_data, r_data;

  rodbus_link #(.LANES(LANES), .AW(RX_AW)) u_left (
    .ser_clk(left_ser_clk), .ser_rst_n(rst_l_n), .rxd(left_rxd),
    .clk(clk), .rst_n(rst_eb_n), .rd_en(l_rd), .rd_data(l_data), .rd_empty(l_empty),
    .overflow_cnt(mon_left_ovf), .code_err_cnt(mon_left_code_err)
  );

  rodbus_link #(.LANES(LANES), .AW(RX_AW)) u_right (
    .ser_clk(right_ser_clk), .ser_rst_n(rst_r_n), .rxd(right_rxd),
    .clk(clk), .rst_n(rst_eb_n), .rd_en(r_rd), .rd_data(r_data), .rd_empty(r_empty),
    .overflow_cnt(mon_right_ovf), .code_err_cnt(mon_right_code_err)
  );

  // ---------------- Frame Maker ----------------
  logic        eb_enable;
  logic [31:0] board_id, run_number, rx_timeout;
  logic        out_wr, sl_full;
  oword_t      out_data;

  frame_maker u_fm (
    .clk(clk), .rst_n(rst_eb_n), .enable(eb_enable),
    .board_id(board_id), .run_number(run_number), .rx_timeout(rx_timeout),
    .evid_empty(evid_empty), .evid_rdata(evid_rdata), .evid_rd(evid_rd),
    .l_empty(l_empty), .l_data(l_data), .l_rd(l_rd),
    .r_empty(r_empty), .r_data(r_data), .r_rd(r_rd),
    .out_full(sl_full), .out_wr(out_wr), .out_data(out_data),
    .state(mon_state), .frame_done(mon_frame_done),
    .frame_flags(mon_frame_flags), .frame_time(mon_frame_time)
  );

  // ---------------- S-Link FIFO and emulator ----------------
  logic         sl_empty, sl_rd, sl_take;
  oword_t       sl_data;
  logic [15:0]  sl_txdata;
  logic [1:0]   sl_txk;
  logic [SL_AW:0] sl_count_unused;

  async_fifo #(.W($bits(oword_t)), .AW(SL_AW)) u_slink_fifo (
    .wr_clk(clk), .wr_rst_n(rst_eb_n), .wr_en(out_wr), .wr_data(out_data),
    .wr_full(sl_full), .wr_count(sl_count_unused),
    .rd_clk(slink_ser_clk), .rd_rst_n(rst_s_n), .rd_en(sl_rd), .rd_data(sl_data),
    .rd_empty(sl_empty)
  );

  slink_tx u_slink (
    .clk(slink_ser_clk), .rst_n(rst_s_n),
    .fifo_empty(sl_empty), .fifo_data(sl_data), .fifo_rd(sl_rd),
    .tx_take(sl_take), .tx_data(sl_txdata), .tx_charisk(sl_txk),
    .frag_cnt(mon_slink_frags)
  );

  gtp_tx u_slink_gtp (
    .ser_clk(slink_ser_clk), .rst_n(rst_s_n),
    .tx_data(sl_txdata), .tx_charisk(sl_txk), .tx_take(sl_take), .txd(slink_txd)
  );

  // ---------------- VME FIFO ----------------
  logic         vf_full, vf_empty, vf_rd, vme_drop;
  oword_t       vf_data;
  logic [VF_AW:0] vf_count_unused;

  assign vme_drop = out_wr && vf_full;

  async_fifo #(.W($bits(oword_t)), .AW(VF_AW)) u_vme_fifo (
    .wr_clk(clk), .wr_rst_n(rst_eb_n), .wr_en(out_wr), .wr_data(out_data),
    .wr_full(vf_full), .wr_count(vf_count_unused),
    .rd_clk(clk), .rd_rst_n(rst_eb_n), .rd_en(vf_rd), .rd_data(vf_data),
    .rd_empty(vf_empty)
  );

  // ---------------- VME link ----------------
  logic [15:0] v_rxdata;
  logic [1:0]  v_rxk;
  logic        v_rxvalid, v_aligned, v_rxerr_unused;
  logic        cmd_full, cmd_empty, cmd_rd, cmd_wr;
  logic [15:0] cmd_data;
  logic        rep_full, rep_empty, rep_wr, rep_rd, v_take;
  logic [15:0] rep_wdata, rep_rdata;
  logic [CMD_AW:0] cmd_count_unused, rep_count_unused;

  gtp_rx u_vme_gtp_rx (
    .ser_clk(vme_ser_clk), .rst_n(rst_v_n), .rxd(vme_rxd),
    .rx_data(v_rxdata), .rx_charisk(v_rxk), .rx_valid(v_rxvalid),
    .rx_aligned(v_aligned), .rx_err(v_rxerr_unused)
  );

  // only data words (no K character) are commands
  assign cmd_wr = v_rxvalid && v_aligned && v_rxk == 2'b00;

  async_fifo #(.W(16), .AW(CMD_AW)) u_cmd_fifo (
    .wr_clk(vme_ser_clk), .wr_rst_n(rst_v_n), .wr_en(cmd_wr), .wr_data(v_rxdata),
    .wr_full(cmd_full), .wr_count(cmd_count_unused),
    .rd_clk(clk), .rd_rst_n(rst_eb_n), .rd_en(cmd_rd), .rd_data(cmd_data),
    .rd_empty(cmd_empty)
  );

  vme2eb_rx #(.BOARD_ID_RST(BOARD_ID_RST), .RX_TIMEOUT_RST(RX_TIMEOUT_RST)) u_vme (
    .clk(clk), .rst_n(rst_eb_n),
    .cmd_empty(cmd_empty), .cmd_data(cmd_data), .cmd_rd(cmd_rd),
    .rep_full(rep_full), .rep_wr(rep_wr), .rep_data(rep_wdata),
    .eb_enable(eb_enable), .board_id(board_id), .run_number(run_number),
    .rx_timeout(rx_timeout),
    .frame_done(mon_frame_done), .frame_flags(mon_frame_flags),
    .frame_time(mon_frame_time), .vme_drop(vme_drop),
    .vf_empty(vf_empty), .vf_data(vf_data), .vf_rd(vf_rd)
  );

  async_fifo #(.W(16), .AW(CMD_AW)) u_rep_fifo (
    .wr_clk(clk), .wr_rst_n(rst_eb_n), .wr_en(rep_wr), .wr_data(rep_wdata),
    .wr_full(rep_full), .wr_count(rep_count_unused),
    .rd_clk(vme_ser_clk), .rd_rst_n(rst_v_n), .rd_en(rep_rd), .rd_data(rep_rdata),
    .rd_empty(rep_empty)
  );

  // reply words when there are any, idle words {D16.2, K28.5} otherwise
  assign rep_rd = v_take && !rep_empty;

  gtp_tx u_vme_gtp_tx (
    .ser_clk(vme_ser_clk), .rst_n(rst_v_n),
    .tx_data(rep_empty ? {D16_2, K28_5} : rep_rdata),
    .tx_charisk(rep_empty ? 2'b01 : 2'b00),
    .tx_take(v_take), .txd(vme_txd)
  );

  // a command word lost in a full FIFO would desynchronise the protocol
  a_cmd_no_loss: assert property (@(posedge vme_ser_clk) disable iff (!rst_v_n) cmd_wr |-> !cmd_full);

endmodule
