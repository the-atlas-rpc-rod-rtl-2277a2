// dec8b10b: 8b/10b decoder, combinational.
//
// The 6-bit sub-block (code[9:4], abcdei) and the 4-bit sub-block
// (code[3:0], fghj) are looked up separately. The control characters are
// told apart by their 6-bit block (K28) or by the alternate .7 4-bit block
// behind x = 23, 27, 29, 30. The decoded character is then encoded again
// with the running disparity rd_in; any difference from the received code
// means an invalid code or a disparity error and raises err. rd_out is the
// running disparity after the received code: the re-encoder's for a valid
// code, and after an error one taken from the received bits themselves, so
// that one error does not spread to the following characters.
// Code bit order matches enc8b10b: code[9] = a is received first.
// The lookup-and-re-encode structure is this design's choice.
module dec8b10b (
  input  logic [9:0] code,
  input  logic       rd_in,
  output logic [7:0] dout,
  output logic       k,
  output logic       err,
  output logic       rd_out
);
  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic       k28, kx7, pos6;
  assign c6 = code[9:4];
  assign c4 = code[3:0];

  always_comb begin
    k28 = 1'b0;
    unique case (c6)
      6'b100111, 6'b011000: x = 5'd0;
      6'b011101, 6'b100010: x = 5'd1;
      6'b101101, 6'b010010: x = 5'd2;
      6'b110001:            x = 5'd3;
      6'b110101, 6'b001010: x = 5'd4;
      6'b101001:            x = 5'd5;
      6'b011001:            x = 5'd6;
      6'b111000, 6'b000111: x = 5'd7;
      6'b111001, 6'b000110: x = 5'd8;
      6'b100101:            x = 5'd9;
      6'b010101:            x = 5'd10;
      6'b110100:            x = 5'd11;
      6'b001101:            x = 5'd12;
      6'b101100:            x = 5'd13;
      6'b011100:            x = 5'd14;
      6'b010111, 6'b101000: x = 5'd15;
      6'b011011, 6'b100100: x = 5'd16;
      6'b100011:            x = 5'd17;
      6'b010011:            x = 5'd18;
      6'b110010:            x = 5'd19;
      6'b001011:            x = 5'd20;
      6'b101010:            x = 5'd21;
      6'b011010:            x = 5'd22;
      6'b111010, 6'b000101: x = 5'd23;
      6'b110011, 6'b001100: x = 5'd24;
      6'b100110:            x = 5'd25;
      6'b010110:            x = 5'd26;
      6'b110110, 6'b001001: x = 5'd27;
      6'b001110:            x = 5'd28;
      6'b101110, 6'b010001: x = 5'd29;
      6'b011110, 6'b100001: x = 5'd30;
      6'b101011, 6'b010100: x = 5'd31;
      6'b001111, 6'b110000: begin x = 5'd28; k28 = 1'b1; end
      default:              x = 5'd0;     // invalid, caught by re-encoding
    endcase
  end

  // after a K28 6-bit block the running disparity is known from the block
  assign pos6 = (c6 == 6'b001111);

  always_comb begin
    if (k28 && pos6) begin
      unique case (c4)
        4'b0100: y = 3'd0;  4'b1001: y = 3'd1;  4'b0101: y = 3'd2;
        4'b0011: y = 3'd3;  4'b0010: y = 3'd4;  4'b1010: y = 3'd5;
        4'b0110: y = 3'd6;  default: y = 3'd7;
      endcase
    end else if (k28) begin
      unique case (c4)
        4'b1011: y = 3'd0;  4'b0110: y = 3'd1;  4'b1010: y = 3'd2;
        4'b1100: y = 3'd3;  4'b1101: y = 3'd4;  4'b0101: y = 3'd5;
        4'b1001: y = 3'd6;  default: y = 3'd7;
      endcase
    end else begin
      unique case (c4)
        4'b1011, 4'b0100: y = 3'd0;
        4'b1001:          y = 3'd1;
        4'b0101:          y = 3'd2;
        4'b1100, 4'b0011: y = 3'd3;
        4'b1101, 4'b0010: y = 3'd4;
        4'b1010:          y = 3'd5;
        4'b0110:          y = 3'd6;
        default:          y = 3'd7;
      endcase
    end
  end

  assign kx7  = (c4 == 4'b0111 || c4 == 4'b1000) &&
                (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30) && !k28;
  assign k    = k28 || kx7;
  assign dout = {y, x};

  logic [9:0] recode;
  logic       rd_enc;
  enc8b10b u_check (.din(dout), .k(k), .rd_in(rd_in), .code(recode), .rd_out(rd_enc));

  assign err = (recode != code);

  // running disparity: that of the re-encoded character when the code is
  // valid, otherwise taken from the received bits themselves
  logic [3:0] n6;
  logic [2:0] n4;
  logic       rd6;
  assign n6     = 4'($countones(c6));
  assign n4     = 3'($countones(c4));
  assign rd6    = (n6 == 4'd3) ? (c6 == 6'b000111 ? 1'b1 : c6 == 6'b111000 ? 1'b0 : rd_in) : (n6 > 4'd3);
  logic       rd_code;
  assign rd_code = (n4 == 3'd2) ? (c4 == 4'b0011 ? 1'b1 : c4 == 4'b1100 ? 1'b0 : rd6) : (n4 > 3'd2);
  assign rd_out  = err ? rd_code : rd_enc;

endmodule
