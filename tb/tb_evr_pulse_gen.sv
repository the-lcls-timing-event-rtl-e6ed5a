// Test of evr_pulse_gen: for random delays and widths the output must be
// active exactly in clocks t+1+delay .. t+delay+width after a hit in clock t,
// with both polarities; hits during a pulse are ignored; disabled or zero
// width gives nothing.  Also one delay that needs more than 16 counter bits.
module tb_evr_pulse_gen;
  import lcls_timing_pkg::*;
  logic clk = 0, rst = 1, trig = 0, out;
  pulse_cfg_t cfg;
  int checks = 0, failures = 0, cyc = 0;

  evr_pulse_gen #(.DLY_W(32), .WID_W(16)) dut (.clk, .rst, .trig, .cfg, .out);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // hit in the clock ending at the next edge, then watch the output
  task automatic shot(input int dly, input int wid, input logic pol, input logic en, input bit retrig);
    int t, first = -1, last = -1, n = 0, bad = 0;
    cfg = '{en: en, pol: pol, delay: 32'(dly), width: 16'(wid)};
    @(negedge clk) trig = 1;
    t = cyc;
    @(negedge clk) trig = 0;
    for (int k = 1; k <= dly + wid + 5; k++) begin
      if (retrig && k == 2) trig = 1;
      if (retrig && k == 3) trig = 0;
      // output during clock t+k
      if ((out ^ pol) == 1'b1) begin
        if (first < 0) first = k;
        last = k; n++;
      end
      @(negedge clk);
    end
    checks++;
    if (!en || wid == 0) begin
      if (n != 0) begin failures++; $display("FAIL pulse when disabled/zero width"); end
    end else if (first != dly + 1 || last != dly + wid || n != wid) begin
      failures++;
      $display("FAIL dly %0d wid %0d pol %0d: first %0d last %0d n %0d", dly, wid, pol, first, last, n);
    end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    shot(0, 1, 0, 1, 0);
    shot(0, 5, 1, 1, 0);
    shot(1, 1, 0, 1, 0);
    shot(3, 4, 0, 1, 1);
    shot(5, 0, 0, 1, 0);
    shot(5, 3, 0, 0, 0);
    for (int i = 0; i < 60; i++) shot($urandom % 300, 1 + $urandom % 40, 1'($urandom), 1, 1'($urandom));
    // long delay: count clocks until the edge without checking each clock
    begin
      int t0;
      cfg = '{en: 1, pol: 0, delay: 32'd70001, width: 16'd2};
      @(negedge clk) trig = 1;
      t0 = cyc;
      @(negedge clk) trig = 0;
      while (out == 0 && cyc - t0 < 80000) @(negedge clk);
      checks++;
      if (cyc - t0 != 70001 + 1) begin failures++; $display("FAIL long delay %0d", cyc - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
