// Test of the serializer: 300 random link words (data and K28.y characters)
// are sent; the captured bit stream must equal the reference 8b/10b encoding
// of the words, upper symbol first, MSB first, with the running disparity
// carried through, at a fixed offset of 1..20 bit clocks after the clock edge that takes the word.
module tb_serializer;
  import tb_ref_pkg::*;
  localparam int N = 300;
  logic bitclk = 0, clk = 0, rst = 1, serial;
  logic [15:0] word = 16'hBC1C;
  logic [1:0]  kflags = 2'b11;
  logic [15:0] words [N];
  logic [1:0]  ks [N];
  logic        bits [$];
  logic [4:0]  bc = 0;
  int checks = 0, failures = 0, first_edge = -1, nbit = 0;

  serializer dut (.clk, .bitclk, .rst, .word, .kflags, .serial);

  always #1 bitclk = ~bitclk;
  always @(posedge bitclk) begin
    bc  <= (bc == 19) ? 5'd0 : bc + 1;
    clk <= ((bc == 19) ? 5'd0 : bc + 1) < 10;
    if (!rst) bits.push_back(serial);
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      ks[i] = 2'($urandom);
      words[i] = 16'($urandom);
      if (ks[i][1]) words[i][12:8] = 5'd28;
      if (ks[i][0]) words[i][4:0]  = 5'd28;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < N; i++) begin
      word = words[i]; kflags = ks[i];
      @(posedge clk);
      if (i == 0) first_edge = bits.size();   // bit index of the edge that takes word 0
      @(negedge clk);
    end
    repeat (4) @(posedge clk);
    begin
      logic [19:0] exp_w [N];
      logic rd;
      int off;
      rd = 1'b1;   // after reset the encoder continues from RD+
      for (int i = 0; i < N; i++) begin
        exp_w[i][19:10] = ref_enc(words[i][15:8], ks[i][1], rd);
        exp_w[i][9:0]   = ref_enc(words[i][7:0],  ks[i][0], rd);
      end
      off = -1;
      for (int o = 0; o < 60 && off < 0; o++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 4; i++)
          for (int b = 0; b < 20; b++)
            if (first_edge + o + 20 * i + b >= bits.size() ||
                bits[first_edge + o + 20 * i + b] != exp_w[i][19 - b]) ok = 0;
        if (ok) off = o;
      end
      checks++;
      if (off < 1 || off > 20) begin failures++; $display("FAIL stream offset %0d", off); end
      else
        for (int i = 0; i < N; i++) begin
          logic [19:0] got;
          for (int b = 0; b < 20; b++) got[19 - b] = bits[first_edge + off + 20 * i + b];
          checks++;
          if (got !== exp_w[i]) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d: %b want %b", i, got, exp_w[i]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
