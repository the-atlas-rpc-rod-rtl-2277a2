// tb_slink_tx: feeds ROD frames through a queue model of the S-Link FIFO
// into the S-Link emulator, takes a 16-bit word every 20 clocks as the GTP
// would, and parses the word stream: idles {D16.2,K28.5} outside
// fragments, marker {0x00,K28.0} + BOF, the frame words upper half first,
// marker + EOF after the last word. Gaps in the FIFO inside a fragment must
// show up as idles, never as split words. Checks every word and the
// fragment counter.
`timescale 1ns/1ps
module tb_slink_tx;
  import rod_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        fifo_empty, fifo_rd, tx_take;
  oword_t      fifo_data;
  logic [15:0] tx_data, frag_cnt;
  logic [1:0]  tx_charisk;

  slink_tx dut (.*);

  oword_t q[$];
  logic [31:0] exp_words[$];
  assign fifo_empty = q.size() == 0;
  assign fifo_data  = fifo_empty ? '0 : q[0];

  int checks = 0, failures = 0, nidle_in_frag = 0;
  int tick = 0;
  assign tx_take = (tick == 19);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rd_q;
  always @(posedge clk) begin
    tick <= (tick == 19) ? 0 : tick + 1;
    rd_q <= fifo_rd;
  end
  always @(negedge clk) if (rd_q) begin void'(q.pop_front()); rd_q = 0; end

  // receiver model
  typedef enum {R_IDLE, R_CTRL_HI, R_CTRL_LO, R_IN, R_LO} rst_t;
  rst_t rs = R_IDLE;
  logic [15:0] hi;
  bit in_frag = 0, ctrl_is_eof;
  int nfrag = 0;
  always @(posedge clk) if (rst_n && tx_take) begin
    unique case (rs)
      R_IDLE, R_IN: begin
        if (tx_charisk == 2'b01 && tx_data == 16'h50BC) begin
          if (in_frag) nidle_in_frag++;
        end else if (tx_charisk == 2'b01 && tx_data == 16'h001C) rs = R_CTRL_HI;
        else if (tx_charisk == 2'b00 && in_frag) begin hi = tx_data; rs = R_LO; end
        else check(0, $sformatf("unexpected word %h k%b", tx_data, tx_charisk));
      end
      R_LO: begin
        check(tx_charisk === 2'b00, "low half is data");
        check(exp_words.size() > 0 && {hi, tx_data} === exp_words[0],
              $sformatf("word %h exp %h", {hi, tx_data}, exp_words.size() ? exp_words[0] : 0));
        if (exp_words.size()) void'(exp_words.pop_front());
        rs = R_IN;
      end
      R_CTRL_HI: begin hi = tx_data; rs = R_CTRL_LO; end
      R_CTRL_LO: begin
        if (!in_frag) begin
          check({hi, tx_data} === SLINK_BOF, "BOF");
          in_frag = 1;
          rs = R_IN;
        end else begin
          check({hi, tx_data} === SLINK_EOF, "EOF");
          check(exp_words.size() === 0 || exp_words[0] === 32'hFFFF_FFFF, "EOF after the last word");
          if (exp_words.size()) void'(exp_words.pop_front());
          in_frag = 0;
          nfrag++;
          rs = R_IDLE;
        end
      end
      default: ;
    endcase
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      int n;
      n = $urandom_range(3, 30);
      for (int i = 0; i < n; i++) begin
        oword_t w;
        w.data = 32'($urandom) & 32'h7FFF_FFFF;
        w.last = (i == n - 1);
        exp_words.push_back(w.data);
        q.push_back(w);
        // leave gaps in some fragments
        if (f % 2 == 1 && i == n / 2) repeat (2000) @(posedge clk);
      end
      exp_words.push_back(32'hFFFF_FFFF);   // EOF expected here
      repeat ($urandom_range(0, 400)) @(posedge clk);
    end
    repeat (3000) @(posedge clk);
    check(nfrag === 6 && frag_cnt === 16'd6, $sformatf("fragments %0d/%0d", nfrag, frag_cnt));
    check(exp_words.size() === 0, "all words sent");
    check(nidle_in_frag > 0, "idles inside a fragment seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
