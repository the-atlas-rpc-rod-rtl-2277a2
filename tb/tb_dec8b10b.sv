// tb_dec8b10b: checks the 8b/10b decoder. Published codes of both running
// disparities must decode to their characters without error; every
// character sent through the encoder must come back; every 10-bit value
// that is no code of the current disparity must raise err; and the running
// disparity must follow a random stream.
`timescale 1ns/1ps
module tb_dec8b10b;
  logic [9:0] code, ecode;
  logic       rd_in, rd_out, k, err, erd_out;
  logic [7:0] dout;
  logic [7:0] edin;
  logic       ek;
  int checks = 0, failures = 0;

  dec8b10b dut (.code(code), .rd_in(rd_in), .dout(dout), .k(k), .err(err), .rd_out(rd_out));
  enc8b10b ref_enc (.din(edin), .k(ek), .rd_in(rd_in), .code(ecode), .rd_out(erd_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic known(input logic [9:0] c, input bit rd, input logic [7:0] d, input bit kk);
    code = c; rd_in = rd; #1;
    check(dout === d && k === kk && !err, $sformatf("decode %b rd%0d -> %h k%0d err%0d", c, rd, dout, k, err));
  endtask

  function automatic bit k_ok(input logic [7:0] d);
    return d[4:0] == 28 || (d[7:5] == 7 && (d[4:0] == 23 || d[4:0] == 27 || d[4:0] == 29 || d[4:0] == 30));
  endfunction

  initial begin
    int nvalid;
    known(10'b100111_0100, 0, 8'h00, 0);  known(10'b011000_1011, 1, 8'h00, 0);
    known(10'b001111_1010, 0, 8'hBC, 1);  known(10'b110000_0101, 1, 8'hBC, 1);
    known(10'b001111_1001, 0, 8'h3C, 1);  known(10'b110000_0110, 1, 8'h3C, 1);
    known(10'b001111_0110, 0, 8'hDC, 1);  known(10'b110000_1001, 1, 8'hDC, 1);
    known(10'b111010_1000, 0, 8'hF7, 1);  known(10'b000101_0111, 1, 8'hF7, 1);
    known(10'b100011_0111, 0, 8'hF1, 0);  known(10'b100011_0001, 1, 8'hF1, 0);
    known(10'b011011_0101, 0, 8'h50, 0);  known(10'b100100_0101, 1, 8'h50, 0);

    // round trip of every character
    for (int kk = 0; kk < 2; kk++)
      for (int d = 0; d < 256; d++)
        if (!kk || k_ok(8'(d)))
          for (int r = 0; r < 2; r++) begin
            edin = 8'(d); ek = kk[0]; rd_in = r[0]; #1;
            code = ecode; #1;
            check(dout === edin && k === ek && !err && rd_out === erd_out,
                  $sformatf("round trip %h k%0d rd%0d", d, kk, r));
          end

    // exhaustive: err exactly for values that are no code at this disparity
    nvalid = 0;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 1024; c++) begin
        bit is_code;
        is_code = 0;
        rd_in = r[0];
        for (int kk = 0; kk < 2 && !is_code; kk++)
          for (int d = 0; d < 256 && !is_code; d++)
            if (!kk || k_ok(8'(d))) begin
              edin = 8'(d); ek = kk[0]; #1;
              if (ecode == 10'(c)) is_code = 1;
            end
        code = 10'(c); #1;
        if (is_code) nvalid++;
        check(err === !is_code, $sformatf("err for %b rd%0d", code, r));
      end
    check(nvalid === 2 * 268, $sformatf("valid code count %0d", nvalid));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
