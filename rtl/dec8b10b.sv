// 8b/10b decoder for one symbol (combinational).
//
// Inverse of enc8b10b: the 6-bit sub-block abcdei gives EDCBA and the 4-bit
// sub-block fghj gives HGF, whichever running disparity the symbol was sent
// with.  The K28.y characters are recognised by their 6-bit sub-block
// (001111 or 110000); for the RD+ form of K28.y the balanced 4-bit codes
// swap meaning (y = 1 <-> 6, 2 <-> 5).  err flags a 6-bit or 4-bit pattern
// that no data or K28 character uses; running disparity is not checked.
//
// Interface: din[9:0] ('a' in bit 9) -> dout, k, err.  Timing: combinational.
module dec8b10b (
  input  logic [9:0] din,
  output logic [7:0] dout,
  output logic       k,
  output logic       err
);

  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic       e6, e4;

  assign c6 = din[9:4];
  assign c4 = din[3:0];

  always_comb begin
    e6 = 1'b0;
    k  = 1'b0;
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
      6'b001111, 6'b110000: begin x = 5'd28; k = 1'b1; end
      default:              begin x = 5'd0;  e6 = 1'b1; end
    endcase

    e4 = 1'b0;
    unique case (c4)
      4'b1011, 4'b0100:                   y = 3'd0;
      4'b1001:                            y = 3'd1;
      4'b0101:                            y = 3'd2;
      4'b1100, 4'b0011:                   y = 3'd3;
      4'b1101, 4'b0010:                   y = 3'd4;
      4'b1010:                            y = 3'd5;
      4'b0110:                            y = 3'd6;
      4'b1110, 4'b0001, 4'b0111, 4'b1000: y = 3'd7;
      default:                            begin y = 3'd0; e4 = 1'b1; end
    endcase
    if (c6 == 6'b110000) begin
      unique case (y)
        3'd1: y = 3'd6;
        3'd6: y = 3'd1;
        3'd2: y = 3'd5;
        3'd5: y = 3'd2;
        default: ;
      endcase
    end
    dout = {y, x};
    err  = e6 | e4;
  end

endmodule
