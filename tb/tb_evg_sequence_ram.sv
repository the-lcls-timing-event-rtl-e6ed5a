// Test of evg_sequence_ram at full size: fills both banks with random
// entries, reads every entry back (one clock latency) and checks that a write
// to one bank leaves the other untouched.
module tb_evg_sequence_ram;
  localparam int D = 2048;
  logic clk = 0, we = 0, wbank = 0, wsel_code = 0, rbank = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rd_ts;
  logic [7:0]  rd_code;
  logic [31:0] ts_ref   [2][D];
  logic [7:0]  code_ref [2][D];
  int checks = 0, failures = 0;

  evg_sequence_ram #(.DEPTH(D), .TS_W(32)) dut (.clk, .we, .wbank, .wsel_code, .waddr, .wdata,
                                                .rbank, .raddr, .rd_ts, .rd_code);
  always #5 clk = ~clk;

  task automatic wr(input int b, input int a, input logic sel, input logic [31:0] d);
    @(negedge clk) begin we = 1; wbank = b[0]; waddr = 11'(a); wsel_code = sel; wdata = d; end
    @(negedge clk) we = 0;
  endtask

  task automatic check_all;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk) begin rbank = b[0]; raddr = 11'(a); end
        @(negedge clk);
        checks++;
        if (rd_ts !== ts_ref[b][a] || rd_code !== code_ref[b][a]) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d addr %0d: %h/%h want %h/%h", b, a,
                                      rd_ts, rd_code, ts_ref[b][a], code_ref[b][a]);
        end
      end
  endtask

  initial begin
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < D; a++) begin
        ts_ref[b][a] = $urandom; code_ref[b][a] = 8'($urandom);
        wr(b, a, 0, ts_ref[b][a]);
        wr(b, a, 1, {24'hABCDEF, code_ref[b][a]});
      end
    check_all();
    ts_ref[0][5] = 32'h1234_5678; wr(0, 5, 0, 32'h1234_5678);
    code_ref[1][2047] = 8'h7F;    wr(1, 2047, 1, 32'h7F);
    check_all();
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
