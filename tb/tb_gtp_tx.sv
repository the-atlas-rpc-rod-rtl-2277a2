// tb_gtp_tx: sends random 16-bit words (with some K28.5 idle words) through
// the GTP transmitter model, cuts the serial output into 10-bit characters
// at the known word boundary and decodes them with dec8b10b. Checks: the
// words come back in order, byte 0 first; no code or disparity error; the
// first idle after reset is the negative-disparity K28.5 0011111010; one
// word is taken every 20 bit clocks.
`timescale 1ns/1ps
module tb_gtp_tx;
  logic ser_clk = 0, rst_n = 0;
  always #1 ser_clk = ~ser_clk;

  logic [15:0] tx_data;
  logic [1:0]  tx_charisk;
  logic        tx_take, txd;

  gtp_tx dut (.*);

  logic [9:0] ch;
  logic       rd = 0, drd;
  logic [7:0] dd;
  logic       dk, derr;
  dec8b10b u_ref (.code(ch), .rd_in(rd), .dout(dd), .k(dk), .err(derr), .rd_out(drd));

  int checks = 0, failures = 0;
  logic [17:0] sent[$];      // {charisk, data}
  logic [8:0]  bytes[$];     // received {k, byte}
  int last_take = -1, cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // present a new word after each take
  always @(posedge ser_clk) begin
    cyc++;
    if (rst_n && tx_take) begin
      sent.push_back({tx_charisk, tx_data});
      if (last_take >= 0) check(cyc - last_take === 20, "one word per 20 bits");
      last_take = cyc;
      if ($urandom_range(3) == 0) begin tx_data <= 16'h50BC; tx_charisk <= 2'b01; end
      else begin tx_data <= 16'($urandom); tx_charisk <= 2'b00; end
    end
  end

  logic [9:0] sh;
  bit first = 1;
  int start;

  initial begin
    tx_data = 16'h50BC; tx_charisk = 2'b01;
    repeat (3) @(posedge ser_clk);
    rst_n = 1;
    // wait for the first take, then sample the line
    // the PISO is loaded on the take edge, bit a leaves on the next one
    @(posedge ser_clk iff tx_take);
    #0.1 start = sent.size() - 1;
    for (int c = 0; c < 400; c++) begin
      for (int b = 9; b >= 0; b--) begin
        @(posedge ser_clk); #0.1;
        sh[b] = txd;
      end
      ch = sh; #0.1;
      if (first) begin
        check(sh === 10'b0011111010, $sformatf("first K28.5 %b", sh));
        first = 0;
      end
      check(!derr, $sformatf("code error at char %0d: %b", c, sh));
      bytes.push_back({dk, dd});
      rd = drd;
    end
    // compare
    begin
      int n;
      n = bytes.size() / 2;
      for (int i = 0; i < n; i++) begin
        logic [17:0] w;
        w = sent[start + i];
        check(bytes[2*i] === {w[16], w[7:0]} && bytes[2*i+1] === {w[17], w[15:8]},
              $sformatf("word %0d: %h %h exp %h", i, bytes[2*i+1], bytes[2*i], w));
      end
    end
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
