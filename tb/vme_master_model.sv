// vme_master_model: behavioural model of the VME FPGA end of the VME link
// ("VME2EB TX System") for testbenches. write() and read() send the
// command words over a gtp_tx (idles otherwise) and read() waits for the
// two reply words from a gtp_rx.
module vme_master_model (
  input  logic ser_clk,
  input  logic rst_n,
  output logic txd,
  input  logic rxd
);
  logic [15:0] q[$], rep[$];
  logic [15:0] tx_data, d;
  logic [1:0]  tx_k, k;
  logic        take, v, aligned, err;

  gtp_tx u_tx (.ser_clk(ser_clk), .rst_n(rst_n), .tx_data(tx_data), .tx_charisk(tx_k),
               .tx_take(take), .txd(txd));
  gtp_rx u_rx (.ser_clk(ser_clk), .rst_n(rst_n), .rxd(rxd), .rx_data(d), .rx_charisk(k),
               .rx_valid(v), .rx_aligned(aligned), .rx_err(err));

  initial begin tx_data = 16'h50BC; tx_k = 2'b01; end
  always @(posedge ser_clk) begin
    if (rst_n && take) begin
      if (q.size()) begin tx_data <= q.pop_front(); tx_k <= 2'b00; end
      else          begin tx_data <= 16'h50BC;      tx_k <= 2'b01; end
    end
    if (rst_n && v && aligned && k == 2'b00) rep.push_back(d);
  end

  task automatic write(input logic [7:0] a, input logic [31:0] data);
    q.push_back({8'h00, a}); q.push_back(data[31:16]); q.push_back(data[15:0]);
    wait (q.size() == 0);
    repeat (60) @(posedge ser_clk);
  endtask

  task automatic read(input logic [7:0] a, output logic [31:0] data);
    rep.delete();
    q.push_back({8'h80, a});
    for (int i = 0; i < 100000 && rep.size() < 2; i++) @(posedge ser_clk);
    data = (rep.size() >= 2) ? {rep[0], rep[1]} : 32'hDEAD_DEAD;
  endtask
endmodule
