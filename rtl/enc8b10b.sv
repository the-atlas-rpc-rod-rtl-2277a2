// enc8b10b: 8b/10b encoder (IBM/Widmer-Franaszek code), combinational.
//
// The byte HGF EDCBA is coded as a 6-bit sub-block abcdei (from EDCBA) and a
// 4-bit sub-block fghj (from HGF). Each sub-block has a form for negative
// and one for positive running disparity; the form used for the 4-bit block
// depends on the disparity left by the 6-bit block. The 10-bit code is
// code[9:0] = {a,b,c,d,e,i,f,g,h,j} and is sent code[9] first. k selects the
// control characters K28.0-K28.7, K23.7, K27.7, K29.7, K30.7; k with any
// other byte gives the matching data code. rd_in/rd_out are the running
// disparity before and after the character (1 = positive).
// The 8b/10b code is the standard one the GTP transceivers use; the bit
// order of code and the combinational, single-character form are this
// design's choices.
module enc8b10b (
  input  logic [7:0] din,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);
  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] c6n, c6;
  logic [3:0] c4n, c4;
  logic       k28, rd_mid, alt7;
  assign x   = din[4:0];
  assign y   = din[7:5];
  assign k28 = k && (x == 5'd28);

  // 6-bit sub-block, form for negative running disparity
  always_comb begin
    unique case (x)
      5'd0:  c6n = 6'b100111;  5'd1:  c6n = 6'b011101;
      5'd2:  c6n = 6'b101101;  5'd3:  c6n = 6'b110001;
      5'd4:  c6n = 6'b110101;  5'd5:  c6n = 6'b101001;
      5'd6:  c6n = 6'b011001;  5'd7:  c6n = 6'b111000;
      5'd8:  c6n = 6'b111001;  5'd9:  c6n = 6'b100101;
      5'd10: c6n = 6'b010101;  5'd11: c6n = 6'b110100;
      5'd12: c6n = 6'b001101;  5'd13: c6n = 6'b101100;
      5'd14: c6n = 6'b011100;  5'd15: c6n = 6'b010111;
      5'd16: c6n = 6'b011011;  5'd17: c6n = 6'b100011;
      5'd18: c6n = 6'b010011;  5'd19: c6n = 6'b110010;
      5'd20: c6n = 6'b001011;  5'd21: c6n = 6'b101010;
      5'd22: c6n = 6'b011010;  5'd23: c6n = 6'b111010;
      5'd24: c6n = 6'b110011;  5'd25: c6n = 6'b100110;
      5'd26: c6n = 6'b010110;  5'd27: c6n = 6'b110110;
      5'd28: c6n = k28 ? 6'b001111 : 6'b001110;
      5'd29: c6n = 6'b101110;  5'd30: c6n = 6'b011110;
      default: c6n = 6'b101011;
    endcase
  end

  // unbalanced blocks and D.7 have a complemented positive form
  assign c6     = (rd_in && ($countones(c6n) != 3 || x == 5'd7)) ? ~c6n : c6n;
  assign rd_mid = ($countones(c6) == 3) ? rd_in : ($countones(c6) > 3);

  // 4-bit sub-block; the alternate .7 form avoids runs of five
  assign alt7 = (y == 3'd7) &&
                (k || (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                      ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));

  always_comb begin
    if (k28) begin
      unique case (y)
        3'd0: c4n = 4'b1011;  3'd1: c4n = 4'b0110;
        3'd2: c4n = 4'b1010;  3'd3: c4n = 4'b1100;
        3'd4: c4n = 4'b1101;  3'd5: c4n = 4'b0101;
        3'd6: c4n = 4'b1001;  default: c4n = 4'b0111;
      endcase
    end else begin
      unique case (y)
        3'd0: c4n = 4'b1011;  3'd1: c4n = 4'b1001;
        3'd2: c4n = 4'b0101;  3'd3: c4n = 4'b1100;
        3'd4: c4n = 4'b1101;  3'd5: c4n = 4'b1010;
        3'd6: c4n = 4'b0110;  default: c4n = alt7 ? 4'b0111 : 4'b1110;
      endcase
    end
  end

  assign c4     = (rd_mid && ($countones(c4n) != 2 || y == 3'd3 || k28)) ? ~c4n : c4n;
  assign rd_out = ($countones(c4) == 2) ? rd_mid : ($countones(c4) > 2);
  assign code   = {c6, c4};

endmodule
