// Test of evr_trigger_logic: every normal and extended trigger is given its
// own delay and width and must fire from its map bit at the right clocks;
// the level outputs are set and cleared by their two map bits, set winning.
module tb_evr_trigger_logic;
  import lcls_timing_pkg::*;
  logic clk = 0, rst = 1;
  logic [13:0] map = 0;
  pulse_cfg_t pulse_cfg [14];
  pulse_cfg_t ext_cfg [4];
  level_cfg_t level_cfg [8];
  logic [13:0] trig;
  logic [3:0]  ext_trig;
  logic [7:0]  level;
  int checks = 0, failures = 0, cyc = 0;
  int first [18], last [18], cnt [18];

  evr_trigger_logic dut (.clk, .rst, .map, .pulse_cfg, .ext_cfg, .level_cfg, .trig, .ext_trig, .level);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t;
    for (int i = 0; i < 14; i++) pulse_cfg[i] = '{en: 1, pol: 0, delay: 32'(3 * i + 1), width: 16'(i + 1)};
    for (int i = 0; i < 4; i++)  ext_cfg[i]   = '{en: 1, pol: 1, delay: 32'(70000 + i), width: 16'(2)};
    for (int i = 0; i < 8; i++)  level_cfg[i] = '{en: 1, pol: 0, set_bit: 4'(i), rst_bit: 4'(i + 6)};
    for (int i = 0; i < 18; i++) begin first[i] = -1; last[i] = -1; cnt[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) map = 14'h003F;   // bits 0..5
    t = cyc;
    @(negedge clk) map = 0;
    for (int k = 1; k < 70010; k++) begin
      for (int i = 0; i < 14; i++) if (trig[i]) begin if (first[i] < 0) first[i] = k; last[i] = k; cnt[i]++; end
      for (int i = 0; i < 4; i++) if (!ext_trig[i]) begin if (first[14+i] < 0) first[14+i] = k; last[14+i] = k; cnt[14+i]++; end
      if (k == 2) begin
        checks++;
        if (level !== 8'h3F) begin failures++; $display("FAIL level set %b", level); end
      end
      @(negedge clk);
    end
    for (int i = 0; i < 14; i++) begin
      checks++;
      if (i < 6) begin
        if (first[i] != 3 * i + 2 || cnt[i] != i + 1) begin failures++; $display("FAIL trig %0d first %0d n %0d", i, first[i], cnt[i]); end
      end else if (cnt[i] != 0) begin failures++; $display("FAIL trig %0d fired", i); end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (first[14+i] != 70000 + i + 1 || cnt[14+i] != 2) begin failures++; $display("FAIL ext %0d first %0d n %0d", i, first[14+i], cnt[14+i]); end
    end
    @(negedge clk) map = 14'h3FC0;   // bits 6..13: clear levels 0..7, set 6, 7 (set wins)
    @(negedge clk) map = 0;
    checks++; if (level !== 8'hC0) begin failures++; $display("FAIL level clear %b", level); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
