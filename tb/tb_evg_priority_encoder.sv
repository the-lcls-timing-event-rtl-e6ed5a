// Test of evg_priority_encoder: random upstream and local event streams with
// collisions.  The expected output is computed by a queue model: upstream
// events go out in the next clock; local events go out in order in clocks
// without an upstream event, at most one waiting (a newer one replaces it).
module tb_evg_priority_encoder;
  logic clk = 0, rst = 1;
  logic [7:0] up_event = 0, seq_event = 0, event_out;
  logic held, dropped;
  int checks = 0, failures = 0, n_held = 0, n_drop = 0, exp_held = 0, exp_drop = 0;
  logic [7:0] wait_q [$];
  logic [7:0] expect_next = 0;

  evg_priority_encoder dut (.clk, .rst, .up_event, .seq_event, .event_out, .held, .dropped);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      up_event  = ($urandom % 4 == 0) ? 8'($urandom % 255 + 1) : 8'h00;
      seq_event = ($urandom % 3 == 0) ? 8'($urandom % 255 + 1) : 8'h00;
      // model of this clock
      if (up_event != 0) begin
        expect_next = up_event;
        if (seq_event != 0) begin
          exp_held++;
          if (wait_q.size() != 0) begin exp_drop++; void'(wait_q.pop_front()); end
          wait_q.push_back(seq_event);
        end
      end else if (wait_q.size() != 0) begin
        expect_next = wait_q.pop_front();
        if (seq_event != 0) begin exp_held++; wait_q.push_back(seq_event); end
      end else begin
        expect_next = seq_event;
      end
      @(posedge clk); #1;
      checks++;
      if (event_out !== expect_next) begin
        failures++;
        if (failures < 10) $display("FAIL clk %0d: %h want %h", i, event_out, expect_next);
      end
      if (held) n_held++;
      if (dropped) n_drop++;
      @(negedge clk);
    end
    checks++; if (n_held != exp_held || n_drop != exp_drop || exp_drop == 0) begin
      failures++; $display("FAIL held %0d/%0d dropped %0d/%0d", n_held, exp_held, n_drop, exp_drop); end
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
