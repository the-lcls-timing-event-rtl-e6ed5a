// Test of evr_level_latch: random map-bit traffic against a reference RS
// latch (set wins), both polarities, disable, and out-of-range bit numbers.
module tb_evr_level_latch;
  import lcls_timing_pkg::*;
  logic clk = 0, rst = 1, out;
  logic [13:0] map = 0;
  level_cfg_t cfg;
  int checks = 0, failures = 0, n_set = 0, n_clr = 0;
  logic q_ref;

  evr_level_latch #(.MAP_BITS(14)) dut (.clk, .rst, .map, .cfg, .out);
  always #5 clk = ~clk;

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < 20; r++) begin
      cfg = '{en: 1'b1, pol: 1'($urandom), set_bit: 4'($urandom % 16), rst_bit: 4'($urandom % 16)};
      if (r == 0) cfg.en = 0;
      q_ref = 0;
      // a disable clears the latch
      @(negedge clk) begin cfg.en = 0; end
      @(negedge clk) begin cfg.en = (r != 0); end
      for (int i = 0; i < 100; i++) begin
        logic s, c;
        map = 14'($urandom) & 14'($urandom);
        s = cfg.set_bit < 14 && map[cfg.set_bit];
        c = cfg.rst_bit < 14 && map[cfg.rst_bit];
        if (cfg.en) begin
          if (s) begin q_ref = 1; n_set++; end
          else if (c) begin q_ref = 0; n_clr++; end
        end
        @(negedge clk);
        checks++;
        if (out !== (q_ref ^ cfg.pol)) begin
          failures++; if (failures < 10) $display("FAIL run %0d clk %0d: out %0d want %0d", r, i, out, q_ref ^ cfg.pol);
        end
      end
    end
    checks++; if (n_set == 0 || n_clr == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
