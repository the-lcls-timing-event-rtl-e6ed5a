// Test of the EVG: loads both sequence RAM banks over the register bus and
// checks the link words after fiducials: event spacing equal to the timestamp
// differences, fixed latency from count start, end at 0x7F, bank switch at the
// next fiducial, loop mode, an upstream event colliding with a sequence event,
// the databus on even words and a data buffer transfer on odd words.  The
// colliding 0x10 is delayed one clock and pushes the following 0x7F back too.
module tb_evg;
  import lcls_timing_pkg::*;
  logic clk = 0, rst = 1, fid = 0;
  bus_req_t bus;
  logic [31:0] rdata;
  logic [7:0]  mps_in = 8'h00, up_event;
  logic [15:0] word;
  logic [1:0]  kflags;
  evg_status_t status;
  int checks = 0, failures = 0, cyc = 0, cs_cyc = -1;
  int ev_cyc [$];
  logic [7:0] ev_code [$];
  logic [8:0] chan [$];      // buffer channel symbols {k, byte}
  int n_held = 0, n_loop = 0, n_done = 0, n_dbus_ok = 0, n_dbus = 0;

  evg #(.SEQ_DEPTH(2048), .BUF_DEPTH(2048)) dut (.clk, .rst, .fid, .bus, .rdata, .mps_in, .up_event,
                                               .word, .kflags, .status);
  always #5 clk = ~clk;

  logic odd_word = 0, inject = 0;
  // drive an upstream event in the clock the sequencer offers 0x10
  always @(negedge clk) up_event = (inject && dut.seq_event == 8'h10) ? 8'h33 : 8'h00;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (status.count_start) cs_cyc = cyc;
      if (status.held) n_held++;
      if (status.loop_restart) n_loop++;
      if (status.seq_done) n_done++;
      if (!kflags[1]) begin ev_cyc.push_back(cyc); ev_code.push_back(word[15:8]); end
      else if (word[15:8] != K28_5) begin checks++; failures++; $display("FAIL bad K in event byte"); end
      // lower byte: a K marks the buffer channel, the word before it is databus
      if (kflags[0] || chan.size() > 0 && chan[$] != {1'b1, K28_0} && chan[$] != {1'b1, K28_3} && odd_word)
        chan.push_back({kflags[0], word[7:0]});
      if (kflags[0]) odd_word <= 0; else odd_word <= !odd_word;
      if (!kflags[0] && !odd_word && word[7:0] == 8'hA5) n_dbus_ok++;
    end
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk) begin bus.we = 1; bus.addr = a; bus.wdata = d; end
    @(negedge clk) bus.we = 0;
  endtask

  task automatic seq_entry(input int bank, input int idx, input int ts, input logic [7:0] code);
    wr(16'h4000 | 16'(bank << 11) | 16'(idx), 32'(ts));
    wr(16'h5000 | 16'(bank << 11) | 16'(idx), {24'd0, code});
  endtask

  task automatic fiducial;
    @(negedge clk) fid = 1;
    repeat (4) @(negedge clk);
    fid = 0;
  endtask

  // expect events (code, ts) relative to the latest count start: word at cs + 3 + ts
  task automatic expect_events(input logic [7:0] codes [], input int tss [], input int base);
    for (int i = 0; i < codes.size(); i++) begin
      checks++;
      if (ev_cyc.size() == 0) begin failures++; $display("FAIL missing event %h", codes[i]); end
      else begin
        int c; logic [7:0] e;
        c = ev_cyc.pop_front(); e = ev_code.pop_front();
        if (e !== codes[i] || c != base + 4 + tss[i]) begin
          failures++; $display("FAIL event %h at +%0d want %h at +%0d", e, c - base, codes[i], 4 + tss[i]);
        end
      end
    end
  endtask

  initial begin
    bus = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    seq_entry(0, 0, 0, 8'h01);
    seq_entry(0, 1, 5, 8'h02);
    seq_entry(0, 2, 6, 8'h03);
    seq_entry(0, 3, 20, 8'h7F);
    seq_entry(1, 0, 2, 8'h10);
    seq_entry(1, 1, 3, 8'h7F);
    mps_in = 8'hA5;
    wr(EVG_CTRL, 32'h1);                        // enable, bank 0, single
    ev_cyc.delete(); ev_code.delete();
    fiducial();
    repeat (40) @(negedge clk);
    expect_events('{8'h01, 8'h02, 8'h03, 8'h7F}, '{0, 5, 6, 20}, cs_cyc);
    checks++; if (ev_cyc.size() != 0 || n_done != 1) begin failures++; $display("FAIL extra events / done %0d", n_done); end
    // select bank 1: broadcast from the next fiducial on
    wr(EVG_CTRL, 32'h5);
    fiducial();
    repeat (30) @(negedge clk);
    expect_events('{8'h10, 8'h7F}, '{2, 3}, cs_cyc);
    bus.re = 1; bus.addr = EVG_STATUS; @(negedge clk) bus.re = 0;
    checks++; if (rdata[1] !== 1'b1) begin failures++; $display("FAIL status bank %h", rdata); end
    // loop mode on bank 1: period 4
    wr(EVG_CTRL, 32'h7);
    fiducial();
    repeat (30) @(negedge clk);
    wr(EVG_CTRL, 32'h5);                        // back to single: the pass ends
    repeat (20) @(negedge clk);
    checks++; if (n_loop < 5) begin failures++; $display("FAIL loop restarts %0d", n_loop); end
    begin
      int c0; c0 = ev_cyc[0];
      for (int i = 0; i + 1 < ev_cyc.size(); i += 2) begin
        checks++;
        if (ev_code[i] != 8'h10 || ev_code[i+1] != 8'h7F || ev_cyc[i] != c0 + 4 * (i / 2)) begin
          failures++; $display("FAIL loop event %0d: %h at %0d", i, ev_code[i], ev_cyc[i] - c0);
        end
      end
    end
    ev_cyc.delete(); ev_code.delete();
    // upstream event in the same clock as the sequence event 0x10: it goes first
    wr(EVG_CTRL, 32'h5);
    inject = 1;
    fiducial();
    repeat (20) @(negedge clk);
    inject = 0;
    checks++;
    if (ev_code.size() != 3 || ev_code[0] != 8'h33 || ev_code[1] != 8'h10 || ev_cyc[1] != ev_cyc[0] + 1 || ev_code[2] != 8'h7F || ev_cyc[2] != ev_cyc[0] + 2 || n_held != 2) begin
      failures++; $display("FAIL collision: %0d events, held %0d", ev_code.size(), n_held);
    end
    // bank change in the middle of a pass: the running pass stays on bank 0
    wr(EVG_CTRL, 32'h1);
    repeat (30) @(negedge clk);
    ev_cyc.delete(); ev_code.delete();
    fiducial();
    repeat (3) @(negedge clk);
    wr(EVG_CTRL, 32'h5);
    repeat (40) @(negedge clk);
    expect_events('{8'h01, 8'h02, 8'h03, 8'h7F}, '{0, 5, 6, 20}, cs_cyc);
    // data buffer
    for (int i = 0; i < 16; i++) wr(16'h8000 | 16'(i), 32'(8'h40 + i));
    chan.delete();
    wr(EVG_BUFSEND, 32'd16);
    repeat (60) @(negedge clk);
    begin
      int s; s = -1;
      for (int i = 0; i < chan.size(); i++) if (chan[i] == {1'b1, K28_2}) begin s = i; break; end
      checks++;
      if (s < 0 || chan.size() < s + 18) begin failures++; $display("FAIL no buffer start"); end
      else begin
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (chan[s + 1 + i] !== {1'b0, 8'(8'h40 + i)}) begin failures++; $display("FAIL buffer byte %0d %h", i, chan[s+1+i]); end
        end
        checks++; if (chan[s + 17] !== {1'b1, K28_3}) begin failures++; $display("FAIL buffer end"); end
      end
    end
    checks++; if (n_dbus_ok < 10) begin failures++; $display("FAIL databus bytes %0d", n_dbus_ok); end
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
