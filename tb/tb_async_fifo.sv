// tb_async_fifo: writes and reads a 16-word dual-clock FIFO from two
// unrelated clocks with random enables and checks that every word comes out
// once and in order, that no more than 16 words are ever held, that full
// and empty both occur, and that wr_count stays within the depth.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int W = 16, AW = 4;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  always #3.1 wr_clk = ~wr_clk;
  always #4.7 rd_clk = ~rd_clk;

  logic         wr_en, wr_full, rd_en, rd_empty;
  logic [W-1:0] wr_data, rd_data;
  logic [AW:0]  wr_count;

  async_fifo #(.W(W), .AW(AW)) dut (.*);

  logic [W-1:0] sb[$];
  int checks = 0, failures = 0, nfull = 0, nempty = 0, nread = 0;
  int wr_pct = 50, rd_pct = 50;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge wr_clk) if (wr_rst_n) begin
    if (wr_en && !wr_full) sb.push_back(wr_data);
    if (wr_full) nfull++;
    check(wr_count <= (1 << AW), "wr_count within depth");
    wr_en   <= ($urandom_range(99) < wr_pct);
    wr_data <= W'($urandom);
  end

  always @(posedge rd_clk) if (rd_rst_n) begin
    if (rd_empty) nempty++;
    if (rd_en && !rd_empty) begin
      check(sb.size() > 0 && rd_data === sb[0], $sformatf("read %h exp %h", rd_data, sb.size() ? sb[0] : 0));
      if (sb.size() > 0) void'(sb.pop_front());
      nread++;
    end
    rd_en <= ($urandom_range(99) < rd_pct);
  end

  // the FIFO never holds more than its depth
  always @(posedge wr_clk) if (wr_rst_n) check(sb.size() <= (1 << AW), "occupancy within depth");

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    #20 wr_rst_n = 1; rd_rst_n = 1;
    wr_pct = 90; rd_pct = 20; #3000;   // fill up
    wr_pct = 20; rd_pct = 90; #3000;   // drain
    wr_pct = 60; rd_pct = 60; #6000;   // mixed
    wr_pct = 0;  rd_pct = 100; #1000;  // empty it
    check(nfull > 0, "full seen");
    check(nempty > 0, "empty seen");
    check(sb.size() === 0 && rd_empty, "all words read");
    check(nread > 200, $sformatf("words read %0d", nread));
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
