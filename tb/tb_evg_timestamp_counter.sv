// Test of evg_timestamp_counter: clear-and-run on start, hold on stop,
// restart, and wrap of a narrow instance.
module tb_evg_timestamp_counter;
  logic clk = 0, rst = 1, start = 0, stop = 0, running;
  logic [31:0] count;
  int checks = 0, failures = 0;

  evg_timestamp_counter #(.W(32)) dut (.clk, .rst, .start, .stop, .count, .running);

  always #5 clk = ~clk;

  task automatic expect_cnt(input int v, input logic r);
    checks++;
    if (count !== 32'(v) || running !== r) begin
      failures++; $display("FAIL count %0d run %0d want %0d %0d", count, running, v, r);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) expect_cnt(0, 0);
    start = 1; @(negedge clk) start = 0;
    for (int i = 0; i < 100; i++) begin expect_cnt(i, 1); @(negedge clk); end
    stop = 1; @(negedge clk) stop = 0;
    expect_cnt(100, 0);
    repeat (10) @(negedge clk);
    expect_cnt(100, 0);
    start = 1; @(negedge clk) start = 0;
    expect_cnt(0, 1);
    repeat (7) @(negedge clk);
    expect_cnt(7, 1);
    start = 1; stop = 1; @(negedge clk) begin start = 0; stop = 0; end
    expect_cnt(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
