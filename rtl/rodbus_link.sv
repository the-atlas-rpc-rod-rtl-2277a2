// rodbus_link: the RODbus receive channel from one RX/SL board ("GTP SerDes
// RX"): LANES GTP links bonded into one 32-bit word stream.
//
// Each lane has its own GTP receiver (gtp_rx), 32-bit word rebuilder
// (rodbus_rx) and receive FIFO, which carries the words from the lane's
// bit clock into the event builder clock domain and stands in for the RX
// SerDes FIFO of the earlier board. The RX/SL board stripes its words over
// the lanes in turn (word i on lane i mod LANES); the read side takes the
// lanes in the same turn, so the FIFOs also absorb the skew between lanes
// and the words come out in their original order. The read port is
// first-word-fall-through: rd_empty is the empty flag of the lane whose
// turn it is. All lanes share ser_clk, as channel-bonded transceivers
// share one user clock. Per-lane overflow and code error counters are
// brought out.
// Eight lanes at 3 Gbit/s with 8b/10b (19.2 Gbit/s payload) and the use of
// the transceivers' receive FIFOs follow the document; striping by word
// and the lane turn are this design's.
module rodbus_link
  import rod_pkg::*;
#(
  parameter int unsigned LANES = 8,    // GTP lanes per RX/SL board
  parameter int unsigned AW    = 10    // FIFO depth per lane, 2**AW words
) (
  input  logic                   ser_clk,
  input  logic                   ser_rst_n,
  input  logic [LANES-1:0]       rxd,
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rd_en,
  output logic [DATA_W-1:0]      rd_data,
  output logic                   rd_empty,
  output logic [LANES-1:0][15:0] overflow_cnt,
  output logic [LANES-1:0][15:0] code_err_cnt
);
  localparam int unsigned SW = (LANES > 1) ? $clog2(LANES) : 1;

  logic [LANES-1:0]              lane_empty, lane_rd;
  logic [LANES-1:0][DATA_W-1:0]  lane_data;
  logic [SW-1:0]                 sel;

  for (genvar g = 0; g < LANES; g++) begin : g_lane
    logic [15:0]       rx_data;
    logic [1:0]        rx_k;
    logic              rx_valid, rx_aligned, rx_err;
    logic              wr_en, wr_full;
    logic [DATA_W-1:0] wr_data;
    logic [AW:0]       count_unused;

    gtp_rx u_gtp (
      .ser_clk(ser_clk), .rst_n(ser_rst_n), .rxd(rxd[g]),
      .rx_data(rx_data), .rx_charisk(rx_k), .rx_valid(rx_valid),
      .rx_aligned(rx_aligned), .rx_err(rx_err)
    );

    rodbus_rx u_words (
      .clk(ser_clk), .rst_n(ser_rst_n),
      .rx_data(rx_data), .rx_charisk(rx_k), .rx_valid(rx_valid),
      .rx_aligned(rx_aligned), .rx_err(rx_err),
      .wr_en(wr_en), .wr_data(wr_data), .wr_full(wr_full),
      .overflow_cnt(overflow_cnt[g]), .code_err_cnt(code_err_cnt[g])
    );

    async_fifo #(.W(DATA_W), .AW(AW)) u_fifo (
      .wr_clk(ser_clk), .wr_rst_n(ser_rst_n), .wr_en(wr_en), .wr_data(wr_data),
      .wr_full(wr_full), .wr_count(count_unused),
      .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(lane_rd[g]), .rd_data(lane_data[g]),
      .rd_empty(lane_empty[g])
    );

    assign lane_rd[g] = rd_en && !lane_empty[g] && sel == SW'(g);
  end

  assign rd_empty = lane_empty[sel];
  assign rd_data  = lane_data[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     sel <= '0;
    else if (rd_en && !rd_empty)    sel <= (sel == SW'(LANES - 1)) ? '0 : sel + 1'b1;
  end

endmodule
