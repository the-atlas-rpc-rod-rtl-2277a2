// tb_enc8b10b: checks the 8b/10b encoder against published code values
// (a set of data and control characters in both running disparities) and
// against the properties of the code over all 268 characters: 4 to 6 ones
// per character, running disparity bookkeeping, no run of more than five
// equal bits and no comma outside K28.5/K28.1/K28.7 in a random stream.
`timescale 1ns/1ps
module tb_enc8b10b;
  logic [7:0] din;
  logic       k, rd_in, rd_out;
  logic [9:0] code;
  int checks = 0, failures = 0;

  enc8b10b dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic known(input logic [7:0] d, input bit kk, input bit rd, input logic [9:0] exp);
    din = d; k = kk; rd_in = rd; #1;
    check(code === exp, $sformatf("%s%0d.%0d rd%0d: %b exp %b", kk ? "K" : "D", d[4:0], d[7:5], rd, code, exp));
  endtask

  function automatic bit k_ok(input logic [7:0] d);
    return d[4:0] == 28 || (d[7:5] == 7 && (d[4:0] == 23 || d[4:0] == 27 || d[4:0] == 29 || d[4:0] == 30));
  endfunction

  initial begin
    // published values, bit order abcdei fghj
    known(8'h00, 0, 0, 10'b100111_0100);  known(8'h00, 0, 1, 10'b011000_1011);
    known(8'hB5, 0, 0, 10'b101010_1010);  known(8'hB5, 0, 1, 10'b101010_1010);
    known(8'hBC, 1, 0, 10'b001111_1010);  known(8'hBC, 1, 1, 10'b110000_0101);
    known(8'h3C, 1, 0, 10'b001111_1001);  known(8'h3C, 1, 1, 10'b110000_0110);
    known(8'hFC, 1, 0, 10'b001111_1000);  known(8'hFC, 1, 1, 10'b110000_0111);
    known(8'h1C, 1, 0, 10'b001111_0100);  known(8'h1C, 1, 1, 10'b110000_1011);
    known(8'hF7, 1, 0, 10'b111010_1000);  known(8'hF7, 1, 1, 10'b000101_0111);
    known(8'hFB, 1, 0, 10'b110110_1000);  known(8'hFB, 1, 1, 10'b001001_0111);
    known(8'h03, 0, 0, 10'b110001_1011);  known(8'h03, 0, 1, 10'b110001_0100);
    known(8'hE7, 0, 0, 10'b111000_1110);  known(8'hE7, 0, 1, 10'b000111_0001);
    known(8'hF1, 0, 0, 10'b100011_0111);  known(8'hF1, 0, 1, 10'b100011_0001);
    known(8'hEB, 0, 0, 10'b110100_1110);  known(8'hEB, 0, 1, 10'b110100_1000);
    known(8'h50, 0, 0, 10'b011011_0101);  known(8'h50, 0, 1, 10'b100100_0101);
    known(8'hFF, 0, 0, 10'b101011_0001);  known(8'hFF, 0, 1, 10'b010100_1110);

    // properties of every character in both disparities
    for (int kk = 0; kk < 2; kk++)
      for (int d = 0; d < 256; d++)
        if (!kk || k_ok(8'(d)))
          for (int r = 0; r < 2; r++) begin
            int n;
            din = 8'(d); k = kk[0]; rd_in = r[0]; #1;
            n = $countones(code);
            check(n >= 4 && n <= 6, "ones per character");
            check((n === 5) ? (rd_out === rd_in || code[9:4] === 6'b111000 || code[9:4] === 6'b000111 ||
                              code[3:0] == 4'b1100 || code[3:0] == 4'b0011 || $countones(code[9:4]) != 3)
                           : (rd_out == (n > 5)), "running disparity");
            check(!(r === 0 && n < 5) && !(r === 1 && n > 5), "disparity direction");
          end

    // random stream: run length and disparity stay bounded
    begin
      logic [9:0] prev;
      logic       rd;
      int run, last, bal;
      rd = 0; run = 0; last = -1; bal = 0;
      for (int i = 0; i < 20000; i++) begin
        din = 8'($urandom); k = 0;
        if ($urandom_range(9) == 0) begin k = 1; din = 8'hBC; end
        rd_in = rd; #1;
        for (int b = 9; b >= 0; b--) begin
          if (int'(code[b]) == last) run++; else run = 1;
          last = int'(code[b]);
          bal += code[b] ? 1 : -1;
          if (run > 5) begin check(0, "run longer than 5"); run = 0; end
        end
        if (bal < -3 || bal > 3) check(0, $sformatf("digital sum out of range %0d", bal));
        rd = rd_out;
      end
      check(1, "stream done");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
