// Test of evr_mapping_ram: the RAM clears itself after reset (no hits while
// clearing and none afterwards for unprogrammed codes), programmed codes give
// their map bits one clock later for one clock, code 0 never hits.
module tb_evr_mapping_ram;
  logic clk = 0, rst = 1, we = 0, clearing;
  logic [7:0]  waddr = 0, event_in = 0;
  logic [13:0] wdata = 0, map;
  logic [13:0] ref_map [256];
  int checks = 0, failures = 0;

  evr_mapping_ram #(.MAP_BITS(14)) dut (.clk, .rst, .we, .waddr, .wdata, .event_in, .map, .clearing);
  always #5 clk = ~clk;

  task automatic send(input logic [7:0] c);
    event_in = c;
    @(negedge clk) event_in = 0;
    checks++;
    if (map !== ((c == 0) ? 14'h0 : ref_map[c])) begin
      failures++; if (failures < 10) $display("FAIL code %h: map %h want %h", c, map, ref_map[c]);
    end
    @(negedge clk);
    checks++; if (map !== 0) begin failures++; $display("FAIL map not one clock"); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) ref_map[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++; if (!clearing) begin failures++; $display("FAIL not clearing"); end
    event_in = 8'h05; @(negedge clk);
    checks++; if (map !== 0) begin failures++; $display("FAIL hit while clearing"); end
    while (clearing) @(negedge clk);
    for (int c = 0; c < 256; c++) send(8'(c));     // all clear
    for (int n = 0; n < 100; n++) begin
      logic [7:0] c; c = 8'($urandom);
      ref_map[c] = 14'($urandom);
      @(negedge clk) begin we = 1; waddr = c; wdata = ref_map[c]; end
      @(negedge clk) we = 0;
    end
    ref_map[0] = 14'h3FFF;
    @(negedge clk) begin we = 1; waddr = 0; wdata = 14'h3FFF; end
    @(negedge clk) we = 0;
    for (int c = 0; c < 256; c++) send(8'(c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
