// rxsl_model: behavioural model of the RODbus transmitter of one RX/SL
// board for testbenches. Words pushed with push() are striped over LANES
// GTP links in turn (word i on lane i mod LANES); on each lane a word goes
// out as two 16-bit words, upper half first, through a gtp_tx, and idle
// words {D16.2, K28.5} fill the line whenever the lane has nothing to send.
module rxsl_model #(
  parameter int LANES = 8
) (
  input  logic             ser_clk,
  input  logic             rst_n,
  output logic [LANES-1:0] txd
);
  logic [31:0] q[LANES][$];
  int          next_lane = 0;

  function automatic void push(input logic [31:0] w);
    q[next_lane].push_back(w);
    next_lane = (next_lane + 1) % LANES;
  endfunction

  for (genvar g = 0; g < LANES; g++) begin : g_lane
    logic [15:0] tx_data;
    logic [1:0]  tx_k;
    logic        take, lo;
    logic [31:0] cur;

    gtp_tx u_tx (.ser_clk(ser_clk), .rst_n(rst_n), .tx_data(tx_data), .tx_charisk(tx_k),
                 .tx_take(take), .txd(txd[g]));

    // the word set on a take edge is sent on the next one
    initial begin lo = 0; tx_data = 16'h50BC; tx_k = 2'b01; end
    always @(posedge ser_clk) if (rst_n && take) begin
      if (lo) begin
        tx_data <= cur[15:0]; tx_k <= 2'b00; lo <= 0;
      end else if (q[g].size() != 0) begin
        cur = q[g].pop_front();
        tx_data <= cur[31:16]; tx_k <= 2'b00; lo <= 1;
      end else begin
        tx_data <= 16'h50BC; tx_k <= 2'b01;
      end
    end
  end
endmodule
