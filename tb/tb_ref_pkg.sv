// Reference 8b/10b encoder for the testbenches, written from the tables of
// the 8b/10b standard (RD- forms; the RD+ forms are their complements where
// unbalanced), independent of the RTL encoder.
package tb_ref_pkg;

  function automatic logic [9:0] ref_enc(input logic [7:0] d, input logic kk, inout logic rd);
    logic [5:0] t6 [32] = '{6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001,
                            6'b011001, 6'b111000, 6'b111001, 6'b100101, 6'b010101, 6'b110100,
                            6'b001101, 6'b101100, 6'b011100, 6'b010111, 6'b011011, 6'b100011,
                            6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
                            6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110,
                            6'b011110, 6'b101011};
    logic [3:0] t4d [8] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
    logic [3:0] t4k [8] = '{4'b1011, 4'b0110, 4'b1010, 4'b1100, 4'b1101, 4'b0101, 4'b1001, 4'b0111};
    logic [5:0] a; logic [3:0] b; logic r;
    a = kk ? 6'b001111 : t6[d[4:0]];
    if (rd && ($countones(a) != 3 || (!kk && d[4:0] == 7))) a = ~a;
    r = ($countones(a) != 3) ? ~rd : rd;
    if (kk) b = r ? ~t4k[d[7:5]] : t4k[d[7:5]];
    else begin
      b = t4d[d[7:5]];
      if (d[7:5] == 7 && ((!r && (d[4:0] == 17 || d[4:0] == 18 || d[4:0] == 20)) ||
                          ( r && (d[4:0] == 11 || d[4:0] == 13 || d[4:0] == 14)))) b = 4'b0111;
      if (r && ($countones(b) != 2 || d[7:5] == 3)) b = ~b;
    end
    rd = ($countones(b) != 2) ? ~r : r;
    return {a, b};
  endfunction

endpackage
