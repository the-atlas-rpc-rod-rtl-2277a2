// ttc_rx: interface to the TTCrq receiver, in the 40 MHz LHC clock domain.
//
// The TTCrq delivers four lines to the ROD FPGA: the LHC clock (clk here),
// Level-1 Accept, Bunch Counter Reset and Event Counter Reset. This block
// keeps the two identifiers the front end keeps: the BCID counts every
// clock and is cleared by BCR (it also wraps after BC_PER_ORBIT crossings
// should a BCR be missed); the EVID counts accepted events and is cleared
// by ECR. On each L1A the current {EVID, BCID} pair is written to the EVID
// FIFO (evid_wr, combinational, taken on the clock edge) and the EVID then increments. An L1A that finds
// the FIFO full is dropped and counted in lost_l1a. On the cycle of a BCR
// the BCID is taken as 0.
// The counting rules follow the document; the widths, the orbit length of
// 3564 bunch crossings, the reset values and the lost-trigger counter are
// this design's choices.
module ttc_rx
  import rod_pkg::*;
#(
  parameter int unsigned BC_PER_ORBIT = 3564
) (
  input  logic        clk,        // 40 MHz LHC clock from the TTCrq
  input  logic        rst_n,
  input  logic        l1a,
  input  logic        bcr,
  input  logic        ecr,
  output logic        evid_wr,    // write strobe into the EVID FIFO
  output trig_t       evid_wdata,
  input  logic        evid_full,
  output logic [15:0] lost_l1a,   // L1As dropped because the FIFO was full
  output logic [EVID_W-1:0] evid_cnt,
  output logic [BCID_W-1:0] bcid_cnt
);
  logic [BCID_W-1:0] bcid_now;

  // BCID seen by an L1A in this cycle
  assign bcid_now = bcr ? '0 : bcid_cnt;

  // the FIFO write happens on the edge that ends the L1A cycle
  assign evid_wr         = l1a && !evid_full;
  assign evid_wdata.evid = ecr ? '0 : evid_cnt;
  assign evid_wdata.bcid = bcid_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid_cnt   <= '0;
      evid_cnt   <= '0;
      lost_l1a   <= '0;
    end else begin
      // bunch counter
      if (bcr || bcid_now == BCID_W'(BC_PER_ORBIT - 1)) bcid_cnt <= bcr ? BCID_W'(1) : '0;
      else                                               bcid_cnt <= bcid_cnt + 1'b1;

      if (l1a && evid_full && lost_l1a != '1) lost_l1a <= lost_l1a + 1'b1;

      // event counter
      if (ecr)      evid_cnt <= l1a ? EVID_W'(1) : '0;
      else if (l1a) evid_cnt <= evid_cnt + 1'b1;
    end
  end

endmodule
