// Self-checking test of enc8b10b: published code words of the 8b/10b standard,
// disparity rules over every data byte in both running disparities, and the
// comma property of K28.5; every data code word is also compared with an
// independent table-driven model.
module tb_enc8b10b;
  import tb_ref_pkg::*;
  logic [7:0] din;
  logic       k, rd_in, rd_out;
  logic [9:0] dout;
  int checks = 0, failures = 0;

  enc8b10b dut (.din, .k, .rd_in, .dout, .rd_out);

  task automatic expect_code(input logic [7:0] d, input logic kk, input logic rd,
                             input logic [9:0] code, input logic rdo);
    din = d; k = kk; rd_in = rd; #1;
    checks++;
    if (dout !== code || rd_out !== rdo) begin
      failures++;
      $display("FAIL %s%0d.%0d rd%0d: got %b/%0d want %b/%0d", kk ? "K" : "D",
               d[4:0], d[7:5], rd, dout, rd_out, code, rdo);
    end
  endtask

  initial begin
    // reference code words (abcdei fghj)
    expect_code(8'h00, 0, 0, 10'b100111_0100, 0);   // D0.0 RD-
    expect_code(8'h00, 0, 1, 10'b011000_1011, 1);   // D0.0 RD+
    expect_code(8'hB5, 0, 0, 10'b101010_1010, 0);   // D21.5
    expect_code(8'h03, 0, 0, 10'b110001_1011, 1);   // D3.0 RD-
    expect_code(8'hF1, 0, 0, 10'b100011_0111, 1);   // D17.7 RD- (A7)
    expect_code(8'hEB, 0, 1, 10'b110100_1000, 0);   // D11.7 RD+ (A7)
    expect_code(8'h07, 0, 1, 10'b000111_0100, 0);   // D7.0 RD+
    expect_code(8'hBC, 1, 0, 10'b001111_1010, 1);   // K28.5 RD-
    expect_code(8'hBC, 1, 1, 10'b110000_0101, 0);   // K28.5 RD+
    expect_code(8'h1C, 1, 0, 10'b001111_0100, 0);   // K28.0 RD-
    expect_code(8'h3C, 1, 0, 10'b001111_1001, 1);   // K28.1 RD-
    expect_code(8'h7C, 1, 1, 10'b110000_1100, 0);   // K28.3 RD+
    // disparity rules for every byte
    for (int rd = 0; rd < 2; rd++) begin
      for (int d = 0; d < 256; d++) begin
        int ones, disp;
        din = 8'(d); k = 0; rd_in = rd[0]; #1;
        ones = $countones(dout);
        disp = 2 * ones - 10;
        checks++;
        if (!((disp == 0 && rd_out == rd_in) ||
              (disp == 2 && rd_in == 0 && rd_out == 1) ||
              (disp == -2 && rd_in == 1 && rd_out == 0))) begin
          failures++;
          $display("FAIL disparity D%0d.%0d rd%0d code %b", d % 32, d / 32, rd, dout);
        end
        // whole code table against an independent table-driven model
        begin
          logic       r = rd[0];
          logic [9:0] want;
          r = rd[0];
          want = ref_enc(8'(d), 1'b0, r);
          checks++;
          if (dout !== want || rd_out !== r) begin
            failures++;
            $display("FAIL table D%0d.%0d rd%0d got %b want %b", d % 32, d / 32, rd, dout, want);
          end
        end
      end
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
