// Test of evg_comparator: equal, one-bit-different and random operand pairs.
module tb_evg_comparator;
  logic [31:0] a, b;
  logic match;
  int checks = 0, failures = 0;

  evg_comparator #(.W(32)) dut (.a, .b, .match);

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y; #1;
    checks++;
    if (match !== (x == y)) begin failures++; $display("FAIL %h %h -> %0d", x, y, match); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic [31:0] r;
      r = $urandom;
      check(r, r);
      check(r, r ^ (32'd1 << i));
    end
    for (int i = 0; i < 200; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
