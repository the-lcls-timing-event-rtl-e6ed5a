// Test of evg_link_mux: random events, databus bytes and buffer symbols; the
// upper byte must be the event or K28.5, the lower byte must alternate
// between databus (even) and buffer channel (odd), one clock later.
module tb_evg_link_mux;
  import lcls_timing_pkg::*;
  logic clk = 0, rst = 1, buf_k = 0, slot;
  logic [7:0] event_in = 0, dbus = 0, buf_byte = 0;
  logic [15:0] word;
  logic [1:0]  kflags;
  int checks = 0, failures = 0, n_slots = 0;

  evg_link_mux dut (.clk, .rst, .event_in, .dbus, .buf_byte, .buf_k, .slot, .word, .kflags);
  always #5 clk = ~clk;

  initial begin
    logic [15:0] ew; logic [1:0] ek; logic last_slot;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    last_slot = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      event_in = ($urandom % 2) ? 8'($urandom) : 8'h00;
      dbus     = 8'($urandom);
      buf_byte = 8'($urandom);
      buf_k    = 1'($urandom);
      #1;
      checks++;
      if (slot == last_slot) begin failures++; $display("FAIL slot does not alternate"); end
      last_slot = slot;
      if (slot) n_slots++;
      ew = {(event_in == 0) ? K28_5 : event_in, slot ? buf_byte : dbus};
      ek = {event_in == 0, slot ? buf_k : 1'b0};
      @(negedge clk);
      checks++;
      if (word !== ew || kflags !== ek) begin
        failures++;
        if (failures < 10) $display("FAIL word %h/%b want %h/%b", word, kflags, ew, ek);
      end
    end
    checks++; if (n_slots != 500) begin failures++; $display("FAIL %0d slots", n_slots); end
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
