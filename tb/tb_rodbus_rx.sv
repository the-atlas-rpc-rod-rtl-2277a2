// tb_rodbus_rx: presents GTP receiver words (idles, upper and lower halves
// of 32-bit words, a stray half cut by an idle, words with a code error)
// to the RODbus word rebuilder and checks the 32-bit words written to the
// FIFO, the overflow count while the FIFO reports full, the code error
// count, and that nothing is taken before alignment.
`timescale 1ns/1ps
module tb_rodbus_rx;
  import rod_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [15:0] rx_data, overflow_cnt, code_err_cnt;
  logic [1:0]  rx_charisk;
  logic        rx_valid, rx_aligned, rx_err, wr_en, wr_full;
  logic [31:0] wr_data;

  rodbus_rx dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] exp_q[$];
  int n_ovf = 0, n_cerr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (wr_en) begin
    check(exp_q.size() > 0 && wr_data === exp_q[0], $sformatf("word %h exp %h", wr_data, exp_q.size() ? exp_q[0] : 0));
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  task automatic send(input logic [15:0] d, input logic [1:0] k, input bit e = 0);
    @(negedge clk);
    rx_data = d; rx_charisk = k; rx_valid = 1; rx_err = e;
    @(negedge clk);
    rx_valid = 0; rx_err = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    rx_valid = 0; rx_aligned = 0; rx_err = 0; wr_full = 0; rx_data = 0; rx_charisk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // not aligned: ignored
    send(16'h1111, 2'b00); send(16'h2222, 2'b00);
    rx_aligned = 1;
    send(16'h50BC, 2'b01);
    for (int i = 0; i < 200; i++) begin
      logic [31:0] w;
      bit e;
      w = $urandom;
      e = ($urandom_range(19) == 0);
      if ($urandom_range(9) == 0) send(16'h50BC, 2'b01);
      if ($urandom_range(19) == 0) begin
        // half word cut by an idle is discarded
        send(w[31:16], 2'b00); send(16'h50BC, 2'b01);
      end
      wr_full = ($urandom_range(9) == 0);
      if (!wr_full) exp_q.push_back(w); else n_ovf++;
      send(w[31:16], 2'b00, e); send(w[15:0], 2'b00);
      if (e) n_cerr++;
      wr_full = 0;
    end
    repeat (5) @(posedge clk);
    check(exp_q.size() === 0, "all words written");
    check(overflow_cnt === 16'(n_ovf) && n_ovf > 0, $sformatf("overflow %0d exp %0d", overflow_cnt, n_ovf));
    check(code_err_cnt === 16'(n_cerr) && n_cerr > 0, $sformatf("code errors %0d exp %0d", code_err_cnt, n_cerr));
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
