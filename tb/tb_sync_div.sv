// Test of sync_div: the 119 MHz clock is 476 MHz / 4 and, after every
// timeslot trigger, rises at the same offset from the trigger edge whatever
// the phase before (realign reports a phase change, and only then); each raw
// fiducial gives one fiducial exactly four 476 MHz clocks (one 119 MHz clock)
// long, starting as clk119 falls; the TRD signal copies clk119 except that the
// high half of the fiducial's cycle is missing.
module tb_sync_div;
  logic clk476 = 0, rst = 1, fid_raw = 0, ts_trig = 0;
  logic clk119, fid, trd_out, realign;
  int checks = 0, failures = 0, cyc = 0;
  int last_rise = -1, trig_cyc = -1, phase_ref = -1;
  int n_realign = 0, n_fid = 0, fid_len = 0, n_missing = 0;
  logic clk119_d = 0, fid_d = 0, trd_d = 0;

  sync_div #(.DIV(4)) dut (.clk476, .rst, .fid_raw, .ts_trig, .clk119, .fid, .trd_out, .realign);
  always #1 clk476 = ~clk476;

  always @(posedge clk476) if (!rst) begin
    cyc <= cyc + 1;
    clk119_d <= clk119; fid_d <= fid; trd_d <= trd_out;
    if (realign) n_realign++;
    // clock period and phase after a trigger
    if (clk119 && !clk119_d) begin
      if (last_rise >= 0 && cyc - last_rise != 4 && cyc - trig_cyc > 12) begin
        checks++; failures++; $display("FAIL clk119 period %0d at %0d", cyc - last_rise, cyc);
      end
      if (trig_cyc >= 0 && cyc - trig_cyc > 12 && cyc - trig_cyc < 40) begin
        checks++;
        if (phase_ref < 0) phase_ref = (cyc - trig_cyc) % 4;
        else if ((cyc - trig_cyc) % 4 != phase_ref) begin failures++; $display("FAIL phase %0d want %0d", (cyc - trig_cyc) % 4, phase_ref); end
      end
      last_rise = cyc;
    end
    // fiducial length and alignment
    if (fid) fid_len++;
    if (fid && !fid_d) begin
      n_fid++;
      checks++; if (clk119 || !clk119_d) begin failures++; $display("FAIL fid not at clk119 fall"); end
    end
    if (!fid && fid_d) begin
      checks++; if (fid_len != 4) begin failures++; $display("FAIL fid length %0d", fid_len); end
      fid_len = 0;
    end
    // TRD: equals clk119 outside the fiducial's cycle, low inside it
    if (cyc > 2) checks++;
    if (cyc > 2 && trd_out !== (clk119 && !fid)) begin failures++; if (failures < 10) $display("FAIL trd at %0d", cyc); end
    if (fid && clk119) n_missing++;
  end

  task automatic trigger(input int gap);
    repeat (gap) @(negedge clk476);
    ts_trig = 1;
    trig_cyc = cyc;
    repeat (20) @(negedge clk476);
    ts_trig = 0;
  endtask

  initial begin
    repeat (5) @(posedge clk476);
    @(negedge clk476) rst = 0;
    trigger(17);             // first trigger: sets the phase
    trigger(80);             // 100 clocks after the previous one: same phase, no realign
    begin
      int r0;
      r0 = n_realign;
      trigger(81);           // off by one: must realign
      checks++; if (n_realign != r0 + 1) begin failures++; $display("FAIL realign %0d -> %0d", r0, n_realign); end
      r0 = n_realign;
      trigger(80);           // multiple of 4 since the last: no realign
      checks++; if (n_realign != r0) begin failures++; $display("FAIL spurious realign"); end
    end
    for (int i = 0; i < 6; i++) begin
      repeat (30 + $urandom % 7) @(negedge clk476);
      fid_raw = 1;
      repeat (8 + $urandom % 20) @(negedge clk476);
      fid_raw = 0;
    end
    repeat (40) @(negedge clk476);
    checks++; if (n_fid != 6 || n_missing != 12) begin failures++; $display("FAIL fid %0d missing %0d", n_fid, n_missing); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk476);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
