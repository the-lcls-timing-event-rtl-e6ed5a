// 8b/10b encoder for one byte (combinational).
//
// Implements the standard 8b/10b line code used on the EVG-to-EVR fiber link:
// the five low bits EDCBA map to a 6-bit sub-block abcdei and the three high
// bits HGF to a 4-bit sub-block fghj, each chosen by the running disparity so
// that the line stays DC balanced.  rd_in/rd_out carry the running disparity
// (0 = RD-, 1 = RD+) from one symbol to the next, so two encoders can be chained
// for the two bytes of a link word.  Only the K28.y control characters are
// supported for k = 1, which is all this link uses.
//
// Interface: din, k, rd_in -> dout[9:0] with dout[9] = 'a', the first bit sent.
// Timing: purely combinational.
module enc8b10b (
  input  logic [7:0] din,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] dout,
  output logic       rd_out
);

  logic [4:0] x;        // EDCBA
  logic [2:0] y;        // HGF
  logic [5:0] c6;       // RD- form of the 6-bit sub-block
  logic [3:0] c4;       // RD- form of the 4-bit sub-block
  logic [5:0] s6;
  logic [3:0] s4;
  logic       rd_mid;
  logic       unbal6, unbal4;

  assign x = din[4:0];
  assign y = din[7:5];

  always_comb begin
    // 6-bit sub-block as sent when the running disparity is negative
    unique case (x)
      5'd0:  c6 = 6'b100111;  5'd1:  c6 = 6'b011101;
      5'd2:  c6 = 6'b101101;  5'd3:  c6 = 6'b110001;
      5'd4:  c6 = 6'b110101;  5'd5:  c6 = 6'b101001;
      5'd6:  c6 = 6'b011001;  5'd7:  c6 = 6'b111000;
      5'd8:  c6 = 6'b111001;  5'd9:  c6 = 6'b100101;
      5'd10: c6 = 6'b010101;  5'd11: c6 = 6'b110100;
      5'd12: c6 = 6'b001101;  5'd13: c6 = 6'b101100;
      5'd14: c6 = 6'b011100;  5'd15: c6 = 6'b010111;
      5'd16: c6 = 6'b011011;  5'd17: c6 = 6'b100011;
      5'd18: c6 = 6'b010011;  5'd19: c6 = 6'b110010;
      5'd20: c6 = 6'b001011;  5'd21: c6 = 6'b101010;
      5'd22: c6 = 6'b011010;  5'd23: c6 = 6'b111010;
      5'd24: c6 = 6'b110011;  5'd25: c6 = 6'b100110;
      5'd26: c6 = 6'b010110;  5'd27: c6 = 6'b110110;
      5'd28: c6 = k ? 6'b001111 : 6'b001110;
      5'd29: c6 = 6'b101110;  5'd30: c6 = 6'b011110;
      default: c6 = 6'b101011; // 31
    endcase
    unbal6 = ($countones(c6) != 3);
    // complement unbalanced codes (and the balanced D.07 pair) at RD+
    s6     = (rd_in && (unbal6 || (x == 5'd7 && !k))) ? ~c6 : c6;
    rd_mid = unbal6 ? ~rd_in : rd_in;

    if (k) begin
      unique case (y)
        3'd0: c4 = 4'b1011;  3'd1: c4 = 4'b0110;
        3'd2: c4 = 4'b1010;  3'd3: c4 = 4'b1100;
        3'd4: c4 = 4'b1101;  3'd5: c4 = 4'b0101;
        3'd6: c4 = 4'b1001;  default: c4 = 4'b0111;
      endcase
      s4 = rd_mid ? ~c4 : c4;
    end else begin
      unique case (y)
        3'd0: c4 = 4'b1011;  3'd1: c4 = 4'b1001;
        3'd2: c4 = 4'b0101;  3'd3: c4 = 4'b1100;
        3'd4: c4 = 4'b1101;  3'd5: c4 = 4'b1010;
        3'd6: c4 = 4'b0110;
        default: // D.x.7: alternate form avoids a run of five
          c4 = ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14))) ? 4'b0111 : 4'b1110;
      endcase
      s4 = (rd_mid && (($countones(c4) != 2) || y == 3'd3)) ? ~c4 : c4;
    end
    unbal4 = ($countones(s4) != 2);
    rd_out = unbal4 ? ~rd_mid : rd_mid;
    dout   = {s6, s4};
  end

endmodule
