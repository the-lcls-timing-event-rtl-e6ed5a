// Self-checking test of dec8b10b: decodes published code words, every data
// byte in both disparities (codes produced by a reference encoder written in
// this testbench from the standard's tables), all K28.y, and invalid codes.
module tb_dec8b10b;
  logic [9:0] din;
  logic [7:0] dout;
  logic       k, err;
  int checks = 0, failures = 0;

  dec8b10b dut (.din, .dout, .k, .err);

  // Reference encoder: RD- tables of the standard; RD+ forms are complements.
  function automatic logic [9:0] ref_enc(input logic [7:0] d, input logic kk, input logic rd);
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
    return {a, b};
  endfunction

  task automatic check(input logic [9:0] c, input logic [7:0] d, input logic kk, input logic e);
    din = c; #1;
    checks++;
    if (err !== e || (!e && (dout !== d || k !== kk))) begin
      failures++;
      $display("FAIL %b: got %h k%0d err%0d want %h k%0d err%0d", c, dout, k, err, d, kk, e);
    end
  endtask

  initial begin
    check(10'b001111_1010, 8'hBC, 1, 0);   // K28.5 RD-
    check(10'b110000_0101, 8'hBC, 1, 0);   // K28.5 RD+
    check(10'b100111_0100, 8'h00, 0, 0);   // D0.0
    check(10'b101010_1010, 8'hB5, 0, 0);   // D21.5
    check(10'b111111_0000, 8'h00, 0, 1);   // invalid
    check(10'b100111_1111, 8'h00, 0, 1);   // invalid 4-bit block
    for (int rd = 0; rd < 2; rd++) begin
      for (int d = 0; d < 256; d++) check(ref_enc(8'(d), 0, rd[0]), 8'(d), 0, 0);
      for (int y = 0; y < 8; y++) check(ref_enc({3'(y), 5'd28}, 1, rd[0]), {3'(y), 5'd28}, 1, 0);
    end
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
