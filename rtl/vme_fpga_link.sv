// vme_fpga_link: the link logic of the VME FPGA towards the ROD FPGA: the
// VME2EB TX System (vme2eb_tx) with its own GTP transceiver pair.
//
// Command words from vme2eb_tx cross from the VME FPGA clock (clk) into the
// link bit clock through a FIFO and are sent by gtp_tx; when there is no
// command the transmitter sends idle words {D16.2, K28.5}, which keep the
// receiver in the ROD FPGA aligned. Reply words from the ROD FPGA are
// received by gtp_rx, only once it has found the comma, and cross back to
// clk through a second FIFO. The access port towards the VME interface is
// that of vme2eb_tx. One word per 20 bit clocks in each direction: at a
// 200 Mbit/s line rate, 10 Mwords/s, as the document proposes; a read costs
// three words out and two back.
// The GTP pair between the two FPGAs with 16-bit words and 8b/10b, and the
// FIFOs absorbing the phase between the recovered and the local clock,
// follow the document; FIFO depths and idle words are this design's.
module vme_fpga_link #(
  parameter int unsigned CMD_AW    = 4,
  parameter int unsigned REPLY_TMO = 4096
) (
  input  logic        clk,          // VME FPGA clock
  input  logic        rst_n,        // asynchronous reset
  // register access from the VME interface
  input  logic        req,
  input  logic        we,
  input  logic [7:0]  addr,
  input  logic [31:0] wdata,
  output logic        ready,
  output logic        ack,
  output logic        err,
  output logic [31:0] rdata,
  // serial pair to the ROD FPGA
  input  logic        ser_clk,
  output logic        txd,
  input  logic        rxd
);
  import rod_pkg::*;

  logic rst_c_n, rst_s_n;
  rst_sync u_rs_c (.clk(clk),     .rst_n_in(rst_n), .rst_n_out(rst_c_n));
  rst_sync u_rs_s (.clk(ser_clk), .rst_n_in(rst_n), .rst_n_out(rst_s_n));

  logic        cmd_full, cmd_wr, cmd_empty, cmd_rd, take;
  logic [15:0] cmd_wdata, cmd_rdata;
  logic        rep_full, rep_wr, rep_empty, rep_rd;
  logic [15:0] rep_rdata;
  logic [CMD_AW:0] cmd_count_unused, rep_count_unused;

  vme2eb_tx #(.REPLY_TMO(REPLY_TMO)) u_tx (
    .clk(clk), .rst_n(rst_c_n),
    .req(req), .we(we), .addr(addr), .wdata(wdata),
    .ready(ready), .ack(ack), .err(err), .rdata(rdata),
    .cmd_full(cmd_full), .cmd_wr(cmd_wr), .cmd_data(cmd_wdata),
    .rep_empty(rep_empty), .rep_data(rep_rdata), .rep_rd(rep_rd)
  );

  async_fifo #(.W(16), .AW(CMD_AW)) u_cmd_fifo (
    .wr_clk(clk), .wr_rst_n(rst_c_n), .wr_en(cmd_wr), .wr_data(cmd_wdata),
    .wr_full(cmd_full), .wr_count(cmd_count_unused),
    .rd_clk(ser_clk), .rd_rst_n(rst_s_n), .rd_en(cmd_rd), .rd_data(cmd_rdata),
    .rd_empty(cmd_empty)
  );

  assign cmd_rd = take && !cmd_empty;

  gtp_tx u_gtp_tx (
    .ser_clk(ser_clk), .rst_n(rst_s_n),
    .tx_data(cmd_empty ? {D16_2, K28_5} : cmd_rdata),
    .tx_charisk(cmd_empty ? 2'b01 : 2'b00),
    .tx_take(take), .txd(txd)
  );

  logic [15:0] rx_data;
  logic [1:0]  rx_k;
  logic        rx_valid, rx_aligned, rx_err_unused;
  gtp_rx u_gtp_rx (
    .ser_clk(ser_clk), .rst_n(rst_s_n), .rxd(rxd),
    .rx_data(rx_data), .rx_charisk(rx_k), .rx_valid(rx_valid),
    .rx_aligned(rx_aligned), .rx_err(rx_err_unused)
  );

  assign rep_wr = rx_valid && rx_aligned && rx_k == 2'b00;

  async_fifo #(.W(16), .AW(CMD_AW)) u_rep_fifo (
    .wr_clk(ser_clk), .wr_rst_n(rst_s_n), .wr_en(rep_wr), .wr_data(rx_data),
    .wr_full(rep_full), .wr_count(rep_count_unused),
    .rd_clk(clk), .rd_rst_n(rst_c_n), .rd_en(rep_rd), .rd_data(rep_rdata),
    .rd_empty(rep_empty)
  );

  a_rep_no_loss: assert property (@(posedge ser_clk) disable iff (!rst_s_n) rep_wr |-> !rep_full);
endmodule
