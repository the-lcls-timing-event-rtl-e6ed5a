// Test of evg_data_buffer at full size: fills the 2K buffer, sends transfers
// of several lengths (including the full 2048 bytes) with a slot every other
// clock, and checks the channel: K28.2, the bytes in order, K28.3, then K28.0.
// A send while busy and a send of length 0 must be ignored.
module tb_evg_data_buffer;
  import lcls_timing_pkg::*;
  localparam int D = 2048;
  logic clk = 0, rst = 1, we = 0, send = 0, slot = 0, k_out, busy;
  logic [10:0] waddr = 0;
  logic [7:0]  wdata = 0, byte_out;
  logic [11:0] len = 0;
  logic [7:0]  ref_mem [D];
  int checks = 0, failures = 0;

  evg_data_buffer #(.DEPTH(D)) dut (.clk, .rst, .we, .waddr, .wdata, .send, .len, .slot,
                                    .byte_out, .k_out, .busy);
  always #5 clk = ~clk;
  always @(posedge clk) slot <= rst ? 1'b0 : !slot;

  // the channel symbol taken at each slot
  logic [8:0] sym_q [$];
  always @(posedge clk) if (slot && !rst) sym_q.push_back({k_out, byte_out});

  task automatic next_slot(output logic [7:0] b, output logic k);
    while (sym_q.size() == 0) @(negedge clk);
    {k, b} = sym_q.pop_front();
  endtask

  task automatic check_sym(input logic [7:0] b, input logic k, input logic [7:0] eb, input logic ek, input string what);
    checks++;
    if (b !== eb || k !== ek) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h/%0d want %h/%0d", what, b, k, eb, ek);
    end
  endtask

  task automatic transfer(input int n);
    logic [7:0] b; logic k;
    @(negedge clk) begin send = 1; len = 12'(n); sym_q.delete(); end
    @(negedge clk) send = 0;
    checks++; if (!busy) begin failures++; $display("FAIL not busy"); end
    fork   // a second send during the transfer must be ignored
      begin
        repeat (9) @(negedge clk);
        send = 1; len = 12'd3;
        @(negedge clk) send = 0;
      end
    join_none
    next_slot(b, k);
    while (k && b == K28_0) next_slot(b, k);
    check_sym(b, k, K28_2, 1, "start");
    for (int i = 0; i < n; i++) begin next_slot(b, k); check_sym(b, k, ref_mem[i], 0, "data"); end
    next_slot(b, k); check_sym(b, k, K28_3, 1, "end");
    next_slot(b, k); check_sym(b, k, K28_0, 1, "idle");
    checks++; if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < D; i++) begin
      ref_mem[i] = 8'($urandom);
      @(negedge clk) begin we = 1; waddr = 11'(i); wdata = ref_mem[i]; end
    end
    @(negedge clk) we = 0;
    transfer(1);
    transfer(37);
    transfer(D);
    @(negedge clk) begin send = 1; len = 0; end
    @(negedge clk) send = 0;
    repeat (4) @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL len 0 started"); end
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
