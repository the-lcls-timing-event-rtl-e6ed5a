// Delay-range workload: one extended trigger programmed to just over one
// second.
//
// A one-second delay at the 8.4 ns (119 MHz) coarse step is 119,000,000 clocks,
// which needs 27 delay bits. The extended triggers have 32. This test hits an
// evr_pulse_gen at its default parameters once, with delay 119,000,001 and width 3. It
// checks that the output is quiet for the whole delay, and that it is active in
// exactly clocks t+1+delay .. t+delay+width after the hit in clock t. It also
// checks that the output goes quiet again afterwards.
// Simulation time is about a minute, because every one of the 119 million clocks is simulated.
module tb_workload_delay_1s;
  import lcls_timing_pkg::*;
  localparam int unsigned DLY = 119_000_001;
  localparam int unsigned WID = 3;

  logic clk = 0, rst = 1, trig = 0, out;
  pulse_cfg_t cfg;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, first = 0, last = 0, n_active = 0;

  evr_pulse_gen dut (.clk, .rst, .trig, .cfg, .out);
  always #5 clk = ~clk;

  // cycle counter and output monitor; cycle k is the clock ending at edge k
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out) begin
      if (n_active == 0) first <= cyc;
      last     <= cyc;
      n_active <= n_active + 1;
    end
  end

  initial begin
    int unsigned t;
    cfg = '{en: 1'b1, pol: 1'b0, delay: 32'(DLY), width: 16'(WID)};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) trig = 1;
    t = cyc;
    @(negedge clk) trig = 0;
    wait (cyc == t + DLY + WID + 10);
    checks++;
    if (n_active != WID) begin failures++; $display("FAIL active clocks %0d want %0d", n_active, WID); end
    checks++;
    if (first != t + 1 + DLY) begin failures++; $display("FAIL first active clock t+%0d want t+%0d", first - t, 1 + DLY); end
    checks++;
    if (last != t + DLY + WID) begin failures++; $display("FAIL last active clock t+%0d want t+%0d", last - t, DLY + WID); end
    checks++;
    if (out !== 1'b0) begin failures++; $display("FAIL output still active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    wait (cyc == DLY + 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
