// ros_model: behavioural model of the ROS end of the S-Link for
// testbenches. A gtp_rx recovers the 16-bit words; idles are skipped, a
// {0x00, K28.0} marker announces a control word (BOF or EOF), other words
// pair into 32-bit data words. Each fragment between BOF and EOF is
// appended to words[] and its length to sizes[]; protocol violations are
// counted in errors.
module ros_model (
  input logic ser_clk,
  input logic rst_n,
  input logic rxd
);
  logic [15:0] d;
  logic [1:0]  k;
  logic        v, aligned, err;
  gtp_rx u_rx (.ser_clk(ser_clk), .rst_n(rst_n), .rxd(rxd), .rx_data(d), .rx_charisk(k),
               .rx_valid(v), .rx_aligned(aligned), .rx_err(err));

  logic [31:0] words[$];
  int          sizes[$];
  int          errors = 0;
  int          cur = 0;
  int          ctrl = 0;      // 0 none, 1 expect hi, 2 expect lo
  bit          half = 0, in_frag = 0;
  logic [15:0] hi;

  always @(posedge ser_clk) if (rst_n && v && aligned) begin
    if (err) errors++;
    if (ctrl == 1) begin hi = d; ctrl = 2; end
    else if (ctrl == 2) begin
      ctrl = 0;
      if ({hi, d} == 32'hB0F0_0000) begin
        if (in_frag) errors++;
        in_frag = 1; cur = 0;
      end else if ({hi, d} == 32'hE0F0_0000) begin
        if (!in_frag || half) errors++;
        in_frag = 0; sizes.push_back(cur);
      end else errors++;
    end else if (k == 2'b01 && d == 16'h001C) begin
      if (half) errors++;
      ctrl = 1;
    end else if (k == 2'b01 && d == 16'h50BC) begin
      if (half) errors++;
    end else if (k == 2'b00 && in_frag) begin
      if (!half) begin hi = d; half = 1; end
      else begin words.push_back({hi, d}); cur++; half = 0; end
    end else errors++;
  end
endmodule
