// Test of the EVR from the fiber side: a reference transmitter in the
// testbench sends an 8b/10b word stream framed like the EVG's (events or
// K28.5, databus on even and buffer channel on odd words) with an arbitrary
// bit skew.  The CPU side programs the mapping RAM, a normal trigger, an
// extended trigger and a level output over the bus.  Checks: lock, every
// event received in order, trigger delays/widths counted in recovered word
// clocks, level set and clear, databus output, data buffer contents, length,
// interrupt and its clear.
module tb_evr;
  import lcls_timing_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 1600;
  logic bitclk = 0, rst = 1, serial = 0, word_clk, irq, locked;
  bus_req_t bus;
  logic [31:0] rdata;
  logic [13:0] trig;
  logic [3:0]  ext_trig;
  logic [7:0]  level, dbus, event_out;
  logic [19:0] tx [N];
  logic [7:0]  sent_ev [$];
  logic [7:0]  buf_ref [20];
  int checks = 0, failures = 0, nbit = 0, skew, wcyc = 0;
  int t_ev21 [$], t_trig0 [$], t_ext3 [$], w_trig0 = 0, w_ext3 = 0;
  int n_rx_ev = 0;

  evr #(.BUF_DEPTH(2048)) dut (.bitclk, .rst, .serial, .word_clk, .bus, .rdata, .trig, .ext_trig,
                               .level, .dbus, .irq, .event_out, .locked);
  always #1 bitclk = ~bitclk;

  // ---- transmitter
  initial begin
    logic rd; int b;
    rd = 0; b = -1;
    for (int i = 0; i < N; i++) begin
      logic [7:0] ev, lo; logic lk;
      ev = 8'h00;
      if (i >= 700 && i % 97 == 0) ev = (i % 2) ? 8'h22 : 8'h21;
      else if (i >= 700 && i % 13 == 0) ev = 8'($urandom % 200 + 40);
      if (ev != 0) sent_ev.push_back(ev);
      if (i % 2 == 0) begin lo = 8'h5A; lk = 0; end
      else if (i == 1001) begin lo = K28_2; lk = 1; b = 0; end
      else if (b >= 0 && b < 20) begin buf_ref[b] = 8'($urandom); lo = buf_ref[b]; lk = 0; b++; end
      else if (b == 20) begin lo = K28_3; lk = 1; b = 21; end
      else begin lo = K28_0; lk = 1; end
      tx[i][19:10] = ref_enc(ev == 0 ? K28_5 : ev, ev == 0, rd);
      tx[i][9:0]   = ref_enc(lo, lk, rd);
    end
    skew = 3 + $urandom % 17;
  end

  always @(negedge bitclk) if (!rst) begin
    if (nbit >= skew && nbit - skew < 20 * N) serial <= tx[(nbit - skew) / 20][19 - (nbit - skew) % 20];
    nbit <= nbit + 1;
  end

  // ---- receiver monitor (recovered word clock)
  logic trig0_d = 0, ext3_d = 1, cfg_done = 0;
  always @(posedge word_clk) if (!rst && locked) begin
    wcyc++;
    if (event_out != 8'h00) begin
      n_rx_ev++;
      checks++;
      if (sent_ev.size() == 0 || sent_ev[0] != event_out) begin
        failures++; $display("FAIL event %h want %h", event_out, sent_ev.size() ? sent_ev[0] : 8'h0);
      end
      if (sent_ev.size()) void'(sent_ev.pop_front());
      if (event_out == 8'h21) t_ev21.push_back(wcyc);
    end
    if (trig[0]) w_trig0++;
    if (!ext_trig[3] && cfg_done) w_ext3++;
    if (trig[0] && !trig0_d) t_trig0.push_back(wcyc);
    if (!ext_trig[3] && ext3_d && cfg_done) t_ext3.push_back(wcyc);
    trig0_d <= trig[0]; ext3_d <= ext_trig[3];
    if (event_out == 8'h21) begin
      // the level output follows one clock after the map bit
      fork begin
        repeat (3) @(posedge word_clk);
        checks++; if (level[0] !== 1'b1) begin failures++; $display("FAIL level not set"); end
      end join_none
    end
    if (event_out == 8'h22) begin
      fork begin
        repeat (3) @(posedge word_clk);
        checks++; if (level[0] !== 1'b0) begin failures++; $display("FAIL level not cleared"); end
      end join_none
    end
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge word_clk) begin bus.we = 1; bus.addr = a; bus.wdata = d; end
    @(negedge word_clk) bus.we = 0;
  endtask

  task automatic rd_reg(input logic [15:0] a, output logic [31:0] d);
    @(negedge word_clk) begin bus.re = 1; bus.addr = a; end
    @(negedge word_clk) begin bus.re = 0; d = rdata; end
  endtask

  initial begin
    logic [31:0] d;
    bus = '0;
    repeat (400) @(posedge bitclk);
    @(negedge bitclk) rst = 0;
    wait (locked);
    repeat (300) @(negedge word_clk);          // mapping RAM clear
    wr(16'h1021, 32'h0009);                    // code 0x21 -> map bits 0 and 3
    wr(16'h1022, 32'h0020);                    // code 0x22 -> map bit 5
    wr(16'h2020, 32'd10);                      // trigger 0 delay 10
    wr(16'h2040, 32'd3);                       //           width 3
    wr(16'h2000, 32'h1);                       //           enable
    wr(16'h3023, 32'd100);                     // extended trigger 3 delay 100
    wr(16'h3043, 32'd5);                       //           width 5
    wr(16'h3003, 32'h3);                       //           enable, active low
    wr(16'h4000, {22'd0, 4'd5, 4'd3, 2'b01});  // level 0: set bit 3, clear bit 5
    cfg_done = 1;
    wait (irq);
    rd_reg(EVR_STATUS, d);
    checks++; if (d[27:16] != 12'd20 || !d[0] || !d[1]) begin failures++; $display("FAIL status %h", d); end
    for (int i = 0; i < 20; i++) begin
      rd_reg(16'h8000 | 16'(i), d);
      checks++; if (d !== {24'd0, buf_ref[i]}) begin failures++; $display("FAIL buffer %0d: %h want %h", i, d, buf_ref[i]); end
    end
    wr(EVR_STATUS, 32'h1);
    @(negedge word_clk);
    checks++; if (irq) begin failures++; $display("FAIL irq not cleared"); end
    checks++; if (dbus !== 8'h5A) begin failures++; $display("FAIL dbus %h", dbus); end
    wait (nbit > 20 * N + skew + 4000);
    checks++; if (sent_ev.size() != 0 || n_rx_ev < 50) begin failures++; $display("FAIL %0d events lost, %0d received", sent_ev.size(), n_rx_ev); end
    checks++;
    if (t_ev21.size() == 0 || t_trig0.size() != t_ev21.size() || t_ext3.size() != t_ev21.size() ||
        w_trig0 != 3 * t_ev21.size() || w_ext3 != 5 * t_ev21.size()) begin
      failures++; $display("FAIL trigger counts %0d %0d %0d widths %0d %0d", t_ev21.size(), t_trig0.size(), t_ext3.size(), w_trig0, w_ext3);
    end else
      for (int i = 0; i < t_ev21.size(); i++) begin
        checks++;
        if (t_trig0[i] - t_ev21[i] != 10 + 2 || t_ext3[i] - t_ev21[i] != 100 + 2) begin
          failures++; $display("FAIL trigger delay %0d / %0d", t_trig0[i] - t_ev21[i], t_ext3[i] - t_ev21[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N + 10000) @(posedge bitclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
