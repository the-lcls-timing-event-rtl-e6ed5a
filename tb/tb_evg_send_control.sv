// Test of evg_send_control with a behavioural sequence RAM (one clock read
// latency) and timestamp counter around it.  Checks that each entry's code
// leaves exactly timestamp + 2 clocks after the start clock, that consecutive
// timestamps go out back to back, that 0x7F ends a single-shot sequence, that
// the last address ends one without 0x7F, and that loop mode repeats the
// sequence without a new start.
module tb_evg_send_control;
  localparam int D = 16;
  logic clk = 0, rst = 1, start = 0, loop_mode = 0;
  logic [3:0]  raddr;
  logic [7:0]  event_out, rd_code;
  logic        busy, restart, done, go;
  logic [31:0] ts_mem [D];
  logic [7:0]  code_mem [D];
  logic [31:0] rd_ts, count;
  int checks = 0, failures = 0, cyc = 0;
  int exp_cyc [$];
  logic [7:0] exp_code [$];
  int n_done = 0, n_restart = 0;

  evg_send_control #(.DEPTH(D), .END_CODE(8'h7F)) dut (
    .clk, .rst, .start, .loop_mode, .go, .rd_code, .raddr, .event_out, .busy, .restart, .done);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    rd_ts   <= ts_mem[raddr];
    rd_code <= code_mem[raddr];
    count   <= (start || restart) ? 32'd0 : count + 1;
    cyc     <= cyc + 1;
  end
  assign go = (rd_ts == count);

  always @(posedge clk) if (!rst) begin
    if (done) n_done++;
    if (restart) n_restart++;
    if (event_out != 8'h00) begin
      checks++;
      if (exp_cyc.size() == 0 || exp_cyc[0] != cyc || exp_code[0] != event_out) begin
        failures++;
        $display("FAIL event %h at %0d, expected %h at %0d", event_out, cyc,
                 exp_code.size() ? exp_code[0] : 8'h0, exp_cyc.size() ? exp_cyc[0] : -1);
      end
      if (exp_cyc.size()) begin void'(exp_cyc.pop_front()); void'(exp_code.pop_front()); end
    end
  end

  // start at the negedge before edge s; entries expected at edge s + ts + 2
  task automatic run_seq(input int n, input int base);
    int s;
    @(negedge clk) start = 1;
    s = cyc;
    for (int i = 0; i < n; i++) begin
      exp_cyc.push_back(base + s + int'(ts_mem[i]) + 2);
      exp_code.push_back(code_mem[i]);
    end
    @(negedge clk) start = 0;
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin ts_mem[i] = 32'(1000 + i); code_mem[i] = 8'(i + 1); end
    ts_mem[0] = 0; code_mem[0] = 8'h11;
    ts_mem[1] = 1; code_mem[1] = 8'h12;     // back to back
    ts_mem[2] = 7; code_mem[2] = 8'h13;
    ts_mem[3] = 30; code_mem[3] = 8'h7F;    // end of sequence
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run_seq(4, 0);
    repeat (60) @(negedge clk);
    checks++; if (n_done != 1 || busy) begin failures++; $display("FAIL single done %0d busy %0d", n_done, busy); end
    // loop mode: the same four entries every 31 clocks
    loop_mode = 1;
    run_seq(4, 0);
    for (int r = 1; r < 3; r++)
      for (int i = 0; i < 4; i++) begin
        exp_cyc.push_back(exp_cyc[i] + 31 * r);
        exp_code.push_back(code_mem[i]);
      end
    repeat (31 * 3 - 2) @(negedge clk);
    loop_mode = 0;                           // let the last pass finish
    repeat (40) @(negedge clk);
    checks++; if (n_restart != 2) begin failures++; $display("FAIL restarts %0d", n_restart); end
    // no 0x7F: sequence ends after the last address
    code_mem[3] = 8'h14;
    for (int i = 4; i < D; i++) ts_mem[i] = 32'(30 + i);
    run_seq(D, 0);
    repeat (80) @(negedge clk);
    checks++; if (busy || n_done != 3) begin failures++; $display("FAIL end at last address, done %0d", n_done); end
    checks++; if (exp_cyc.size() != 0) begin failures++; $display("FAIL %0d events missing", exp_cyc.size()); end
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
