// Test of evr_deserializer: a reference-encoded word stream, delayed by an
// arbitrary number of bits, is shifted in.  After the first K28.5 the block
// must report lock, put out every later word intact on `code`, and give a
// word clock of 20 bit clocks whose rising edge finds `code` stable.
module tb_evr_deserializer;
  import tb_ref_pkg::*;
  localparam int N = 400;
  logic bitclk = 0, rst = 1, serial = 0, word_clk, locked;
  logic [19:0] code;
  logic [19:0] tx [N];
  int checks = 0, failures = 0, nbit = 0, skew;
  int got_idx = -1, n_words = 0, last_rise = -1, period_bad = 0;

  evr_deserializer dut (.bitclk, .rst, .serial, .word_clk, .code, .locked);
  always #1 bitclk = ~bitclk;

  initial begin
    logic rd;
    rd = 1'b0;
    for (int i = 0; i < N; i++) begin
      logic [7:0] hi, lo; logic hk, lk;
      hk = (i % 7 == 0) || (i < 3);      // K28.5 now and then, as the EVG sends
      hi = hk ? 8'hBC : 8'($urandom % 255 + 1);
      lk = (i % 2 == 1) && ($urandom % 2 == 0);
      lo = lk ? 8'h1C : 8'($urandom);
      tx[i][19:10] = ref_enc(hi, hk, rd);
      tx[i][9:0]   = ref_enc(lo, lk, rd);
    end
    skew = 7 + $urandom % 13;
  end

  // transmitter: skew filler bits, then the words MSB first
  always @(negedge bitclk) begin
    if (!rst) begin
      if (nbit < skew) serial <= 1'b0;
      else if (nbit - skew < 20 * N) serial <= tx[(nbit - skew) / 20][19 - (nbit - skew) % 20];
      nbit <= nbit + 1;
    end
  end

  int cyc = 0;
  always @(posedge bitclk) cyc <= cyc + 1;

  // receiver side: at each word clock rise, code must be one of the words in order
  always @(posedge word_clk) begin
    if (locked) begin
      if (last_rise >= 0 && cyc - last_rise != 20 && n_words > 1 && got_idx < N - 1) begin period_bad++; $display("bad period %0d at word %0d cyc %0d", cyc - last_rise, n_words, cyc); end
      last_rise = cyc;
      if (got_idx < 0) begin
        for (int i = 0; i < N; i++) if (tx[i] == code) begin got_idx = i; break; end
      end else begin
        got_idx++;
        if (got_idx < N) begin
          checks++;
          if (code !== tx[got_idx]) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d: %b want %b", got_idx, code, tx[got_idx]);
          end
        end
      end
      n_words++;
    end
  end

  initial begin
    repeat (10) @(posedge bitclk);
    @(negedge bitclk) rst = 0;
    repeat (20 * N + 60) @(posedge bitclk);
    checks++; if (!locked) begin failures++; $display("FAIL no lock"); end
    checks++; if (n_words < N - 5) begin failures++; $display("FAIL only %0d words", n_words); end
    checks++; if (period_bad != 0) begin failures++; $display("FAIL %0d bad word clock periods", period_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N + 1000) @(posedge bitclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
