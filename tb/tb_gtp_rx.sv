// tb_gtp_rx: a gtp_tx sends idle words and then a counting sequence of data
// words; the serial line reaches gtp_rx through a delay of a random number
// of bits, so the receiver has to find the character boundary from the
// comma. Checks: alignment is reached; every data word arrives, in order,
// with no code error and with K flags only on idle words; one word every
// 20 bit clocks; a flipped line bit later is reported by rx_err.
`timescale 1ns/1ps
module tb_gtp_rx;
  logic ser_clk = 0, rst_n = 0;
  always #1 ser_clk = ~ser_clk;

  logic [15:0] tx_data, rx_data;
  logic [1:0]  tx_charisk, rx_charisk;
  logic        tx_take, txd, rxd, rx_valid, rx_aligned, rx_err;

  gtp_tx src (.ser_clk(ser_clk), .rst_n(rst_n), .tx_data(tx_data), .tx_charisk(tx_charisk),
              .tx_take(tx_take), .txd(txd));
  gtp_rx dut (.*);

  int checks = 0, failures = 0;
  int delay;
  logic [39:0] dl = '0;
  bit flip = 0, injected = 0;
  assign rxd = dl[delay] ^ flip;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // source: 30 idles, then data words counting up with an idle every 8th
  int nw = 0;
  logic [15:0] cnt = 16'h1000;
  always @(posedge ser_clk) begin
    dl <= {dl[38:0], txd};
    if (rst_n && tx_take) begin
      nw++;
      if (nw < 30 || nw % 8 == 0) begin tx_data <= 16'h50BC; tx_charisk <= 2'b01; end
      else begin tx_data <= cnt; tx_charisk <= 2'b00; cnt <= cnt + 1'b1; end
    end
  end

  // receiver check
  int nrx = 0, nerr = 0, last_v = -1, cyc = 0;
  logic [15:0] expct;
  bit started = 0;
  always @(posedge ser_clk) begin
    cyc++;
    if (rx_valid) begin
      if (last_v >= 0 && !injected) check(cyc - last_v === 20, "word spacing");
      last_v = cyc;
      if (rx_err) nerr++;
      if (rx_charisk === 2'b01) check(rx_data === 16'h50BC, $sformatf("idle %h", rx_data));
      else if (!injected && nerr == 0) begin
        check(rx_charisk === 2'b00, "no K on data");
        if (!started) begin started = 1; expct = rx_data; end
        check(rx_data === expct, $sformatf("data %h exp %h", rx_data, expct));
        expct = rx_data + 1'b1;
        nrx++;
      end
    end
  end

  initial begin
    tx_data = 16'h50BC; tx_charisk = 2'b01;
    delay = $urandom_range(0, 39);
    repeat (3) @(posedge ser_clk);
    rst_n = 1;
    repeat (8000) @(posedge ser_clk);
    check(rx_aligned, "aligned");
    check(nrx > 250, $sformatf("data words received %0d", nrx));
    check(nerr === 0, "no code errors");
    // corrupt one bit on the line
    @(posedge ser_clk); flip = 1; injected = 1;
    @(posedge ser_clk); flip = 0;
    repeat (200) @(posedge ser_clk);
    check(nerr > 0, "flipped bit detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
