// Test of evg_trigger_logic: one count_start per fiducial rising edge, none
// while disabled; the pulse is set by the second edge after fid is sampled
// and so is seen by the third.
module tb_evg_trigger_logic;
  logic clk = 0, rst = 1, fid = 0, enable = 0, count_start;
  int checks = 0, failures = 0, cyc = 0, fid_cyc = -1, pulses = 0;

  evg_trigger_logic dut (.clk, .rst, .fid, .enable, .count_start);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (count_start && !rst) begin
      pulses <= pulses + 1;
      checks++;
      if (!enable || cyc - fid_cyc != 3) begin
        failures++;
        $display("FAIL count_start at %0d, fid sampled at %0d, enable %0d", cyc, fid_cyc, enable);
      end
    end
  end

  task automatic fiducial(input int high_cycles);
    @(negedge clk) fid = 1;
    @(posedge clk) fid_cyc = cyc;
    repeat (high_cycles - 1) @(posedge clk);
    @(negedge clk) fid = 0;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fiducial(4);                       // disabled: no pulse
    checks++; if (pulses != 0) begin failures++; $display("FAIL pulse while disabled"); end
    enable = 1;
    for (int i = 0; i < 5; i++) fiducial(1 + i * 3);
    repeat (4) @(posedge clk);
    checks++; if (pulses != 5) begin failures++; $display("FAIL pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
