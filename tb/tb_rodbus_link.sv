// tb_rodbus_link: a 4-lane RX/SL transmitter model stripes random words
// over four GTP links into a 4-lane rodbus_link; each lane reaches the
// receiver through its own random delay (lane skew of up to 3 words). The
// event builder side reads with random gaps and checks that every word
// comes out once and in the order it was sent, and that no lane reports a
// code error or an overflow.
`timescale 1ns/1ps
module tb_rodbus_link;
  localparam int LANES = 4;
  logic ser_clk = 0, clk = 0, rst_n = 0;
  always #0.5 ser_clk = ~ser_clk;
  always #2.1 clk = ~clk;

  logic [LANES-1:0] txd, rxd;
  logic             rd_en, rd_empty;
  logic [31:0]      rd_data;
  logic [LANES-1:0][15:0] overflow_cnt, code_err_cnt;

  rxsl_model #(.LANES(LANES)) src (.ser_clk(ser_clk), .rst_n(rst_n), .txd(txd));
  rodbus_link #(.LANES(LANES), .AW(5)) dut (
    .ser_clk(ser_clk), .ser_rst_n(rst_n), .rxd(rxd), .clk(clk), .rst_n(rst_n),
    .rd_en(rd_en), .rd_data(rd_data), .rd_empty(rd_empty),
    .overflow_cnt(overflow_cnt), .code_err_cnt(code_err_cnt));

  // per-lane skew
  logic [127:0] dl[LANES];
  int skew[LANES];
  for (genvar g = 0; g < LANES; g++) begin : g_skew
    always @(posedge ser_clk) dl[g] <= {dl[g][126:0], txd[g]};
    assign rxd[g] = dl[g][skew[g]];
  end

  int checks = 0, failures = 0, nread = 0;
  logic [31:0] sent[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (rd_en && !rd_empty) begin
      check(sent.size() > 0 && rd_data === sent[0], $sformatf("word %0d = %h exp %h", nread, rd_data, sent.size() ? sent[0] : 0));
      if (sent.size()) void'(sent.pop_front());
      nread++;
    end
    rd_en <= ($urandom_range(3) != 0);
  end

  initial begin
    rd_en = 0;
    foreach (skew[i]) skew[i] = $urandom_range(0, 120);
    foreach (dl[i]) dl[i] = '0;
    #20 rst_n = 1;
    #2000;                                  // alignment on idles
    for (int i = 0; i < 600; i++) begin
      logic [31:0] w;
      w = $urandom;
      sent.push_back(w);
      src.push(w);
      if ($urandom_range(9) == 0) #($urandom_range(10, 200));
      else #4;
    end
    #20000;
    check(sent.size() === 0 && nread === 600, $sformatf("read %0d of 600", nread));
    check(code_err_cnt === '0 && overflow_cnt === '0, "no lane errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
