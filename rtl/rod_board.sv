// rod_board: the FPGA logic of the upgraded ATLAS RPC Read Out Driver
// board: the ROD FPGA (rod_fpga_top, the event builder) and the link end of
// the VME FPGA (vme_fpga_link), joined by their serial pair.
//
// The board takes the readout data of two RX/SL boards over the RODbus GTP
// lanes and the trigger signals of the TTCrq, and sends one ROD frame per
// Level-1 Accept over the S-Link GTP. The VME FPGA configures and monitors
// the event builder over a 200 Mbit/s 8b/10b link, the VME FPGA being the
// master. The VMEbus interface itself is outside this logic: its register
// accesses arrive on the vme_* access port (see vme2eb_tx for the
// handshake), in the VME FPGA clock vme_clk.
// Interface and timing are those of the two parts; both ends of the VME link
// run on the same bit clock vme_ser_clk, each receiver taking its FPGA's own
// logic clock through FIFOs.
// The partition into the two FPGAs and the links between them follow the
// document's new board layout; everything else is described in the parts.
module rod_board
  import rod_pkg::*;
#(
  parameter int unsigned LANES   = 8,
  parameter int unsigned EVID_AW = 5,
  parameter int unsigned RX_AW   = 7,
  parameter int unsigned SL_AW   = 10,
  parameter int unsigned VF_AW   = 10,
  parameter int unsigned CMD_AW  = 4,
  parameter logic [31:0] BOARD_ID_RST   = 32'h0065_0000,
  parameter logic [31:0] RX_TIMEOUT_RST = 32'd4096,
  parameter int unsigned REPLY_TMO      = 4096
) (
  input  logic        clk,          // event builder clock (ROD FPGA)
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
  // S-Link GTP to the ROS
  input  logic        slink_ser_clk,
  output logic        slink_txd,
  // VME FPGA side: register access from the VMEbus interface
  input  logic        vme_clk,
  input  logic        vme_ser_clk,  // bit clock of the inter-FPGA link
  input  logic        vme_req,
  input  logic        vme_we,
  input  logic [7:0]  vme_addr,
  input  logic [31:0] vme_wdata,
  output logic        vme_ready,
  output logic        vme_ack,
  output logic        vme_err,
  output logic [31:0] vme_rdata,
  // monitoring
  output fm_state_t   mon_state,
  output logic        mon_frame_done,
  output logic [7:0]  mon_frame_flags,
  output logic [31:0] mon_frame_time,
  output logic [15:0] mon_lost_l1a,
  output logic [LANES-1:0][15:0] mon_left_ovf,
  output logic [LANES-1:0][15:0] mon_left_code_err,
  output logic [LANES-1:0][15:0] mon_right_ovf,
  output logic [LANES-1:0][15:0] mon_right_code_err,
  output logic [15:0] mon_slink_frags
);
  logic to_rod, from_rod;   // the serial pair between the two FPGAs

  vme_fpga_link #(.CMD_AW(CMD_AW), .REPLY_TMO(REPLY_TMO)) u_vme_fpga (
    .clk(vme_clk), .rst_n(rst_n),
    .req(vme_req), .we(vme_we), .addr(vme_addr), .wdata(vme_wdata),
    .ready(vme_ready), .ack(vme_ack), .err(vme_err), .rdata(vme_rdata),
    .ser_clk(vme_ser_clk), .txd(to_rod), .rxd(from_rod)
  );

  rod_fpga_top #(
    .LANES(LANES), .EVID_AW(EVID_AW), .RX_AW(RX_AW), .SL_AW(SL_AW), .VF_AW(VF_AW),
    .CMD_AW(CMD_AW), .BOARD_ID_RST(BOARD_ID_RST), .RX_TIMEOUT_RST(RX_TIMEOUT_RST)
  ) u_rod_fpga (
    .clk(clk), .rst_n(rst_n),
    .ttc_clk(ttc_clk), .ttc_l1a(ttc_l1a), .ttc_bcr(ttc_bcr), .ttc_ecr(ttc_ecr),
    .left_ser_clk(left_ser_clk), .left_rxd(left_rxd),
    .right_ser_clk(right_ser_clk), .right_rxd(right_rxd),
    .slink_ser_clk(slink_ser_clk), .slink_txd(slink_txd),
    .vme_ser_clk(vme_ser_clk), .vme_rxd(to_rod), .vme_txd(from_rod),
    .mon_state(mon_state), .mon_frame_done(mon_frame_done),
    .mon_frame_flags(mon_frame_flags), .mon_frame_time(mon_frame_time),
    .mon_lost_l1a(mon_lost_l1a),
    .mon_left_ovf(mon_left_ovf), .mon_left_code_err(mon_left_code_err),
    .mon_right_ovf(mon_right_ovf), .mon_right_code_err(mon_right_code_err),
    .mon_slink_frags(mon_slink_frags)
  );
endmodule
