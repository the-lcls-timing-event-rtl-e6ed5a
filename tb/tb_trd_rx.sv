// Test of trd_rx: a 119 MHz square wave (4 samples per cycle) with single
// cycles left out at random places; one fid pulse must come for every missing
// cycle, GAP + 3 samples after the last rising edge, and none otherwise.
module tb_trd_rx;
  logic osclk = 0, rst = 1, trd_in = 0, fid;
  int checks = 0, failures = 0, cyc = 0, last_edge_cyc = 0, n_gap = 0, n_fid = 0, prev_gap = 0, prev_edge_cyc = 0;

  trd_rx #(.GAP(6)) dut (.osclk, .rst, .trd_in, .fid);
  always #1 osclk = ~osclk;
  always @(posedge osclk) cyc <= cyc + 1;

  logic trd_prev = 0;
  always @(posedge osclk) begin
    trd_prev <= trd_in;
    if (trd_in && !trd_prev) begin prev_edge_cyc = last_edge_cyc; last_edge_cyc = cyc; end
  end

  always @(posedge osclk) if (!rst && fid) begin
    n_fid++;
    checks++;
    // the edge after the gap (8 samples later) has just been seen
    if (cyc - prev_edge_cyc != 6 + 3 || last_edge_cyc - prev_edge_cyc != 8) begin
      failures++; $display("FAIL fid %0d samples after edge", cyc - prev_edge_cyc);
    end
  end

  initial begin
    repeat (5) @(negedge osclk);
    rst = 0;
    for (int c = 0; c < 600; c++) begin
      bit missing;
      missing = (c > 10) && (c > prev_gap + 3) && ($urandom % 15 == 0);
      if (missing) prev_gap = c;
      if (missing) n_gap++;
      // a 119 MHz cycle: two samples low, two high (high suppressed if missing)
      repeat (2) @(negedge osclk) trd_in = 0;
      @(negedge osclk) trd_in = !missing;
      @(negedge osclk);
    end
    repeat (4) @(negedge osclk) trd_in = 0;
    trd_in = 1; repeat (2) @(negedge osclk);
    checks++; if (n_fid != n_gap || n_gap == 0) begin failures++; $display("FAIL %0d fids for %0d gaps", n_fid, n_gap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge osclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
