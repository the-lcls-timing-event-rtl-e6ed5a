// End-to-end test of the timing event system at its default size (two EVRs,
// two TRD receivers, 2K sequence RAMs and data buffers).
//
// The testbench plays the analog and optical parts: it makes the 476 MHz and
// phase-locked 2.38 GHz clocks, the raw fiducials and timeslot triggers, fans
// the serial link out to the EVRs with different fiber delays, and fans the
// TRD signal out to its receivers.  It plays the CPUs too, loading the EVG
// sequence RAMs and data buffer and programming the EVRs.  Then, over a series
// of fiducials, it checks that each EVR receives exactly the events sent, that
// each trigger fires at its programmed delay and at the same time relative to
// the fiducial every time, and it makes every mechanism happen and counts it:
// divider realignment, sequence start and end, bank switch, loop mode,
// upstream event collision, databus, data buffer transfer and interrupt,
// normal, extended and level outputs, and TRD fiducial recovery.
module tb_lcls_timing_top;
  import lcls_timing_pkg::*;
  localparam int NE = 2, NT = 2;

  logic clk476 = 0, bitclk = 0, rst = 1, fid_raw = 0, ts_trig = 0, sync_realign;
  logic evg_clk, serial_out, trd_out;
  bus_req_t evg_bus;
  logic [31:0] evg_rdata;
  logic [7:0]  mps_in = 8'h3C, up_event;
  evg_status_t evg_status;
  logic [NE-1:0] evr_serial_in, evr_rx_bitclk, evr_word_clk, evr_irq, evr_locked;
  bus_req_t    evr_bus [NE];
  logic [31:0] evr_rdata [NE];
  logic [13:0] evr_trig [NE];
  logic [3:0]  evr_ext_trig [NE];
  logic [7:0]  evr_level [NE], evr_dbus [NE], evr_event [NE];
  logic [NT-1:0] trd_in, trd_fid;

  lcls_timing_top dut (.*, .trd_osclk(clk476));

  int checks = 0, failures = 0;
  logic cfg_done = 0;

  // ---------------- clocks, fibers
  always #1 bitclk = ~bitclk;                  // 2.38 GHz stand-in, 5 x clk476
  always #5 clk476 = ~clk476;
  assign evr_rx_bitclk = {NE{bitclk}};
  logic [15:0] fiber;
  always @(posedge bitclk) fiber <= {fiber[14:0], serial_out};
  assign evr_serial_in[0] = serial_out;        // short fiber
  assign evr_serial_in[1] = fiber[6];          // 7 bits longer
  logic [3:0] trd_fiber;
  always @(posedge clk476) trd_fiber <= {trd_fiber[2:0], trd_out};
  assign trd_in = {trd_fiber[2], trd_out};

  // ---------------- mechanism counters
  int n_realign = 0, n_start = 0, n_done = 0, n_loop = 0, n_held = 0, n_bank1 = 0;
  int n_trd [NT], n_trig [NE], n_ext [NE], n_level_set [NE], n_level_clr [NE];
  int n_irq [NE], n_dbus [NE];
  realtime t_start;
  realtime lat_trig [NE][$];
  logic [7:0] sent [$];
  logic [7:0] rcvd [NE][$];
  logic inject = 0;

  always @(posedge clk476) if (!rst) begin
    if (sync_realign) n_realign++;
    for (int i = 0; i < NT; i++) if (trd_fid[i] && cfg_done) n_trd[i]++;
  end

  always @(posedge evg_clk) if (!rst) begin
    if (evg_status.count_start) begin n_start++; t_start = $realtime; end
    if (evg_status.seq_done) begin n_done++; if (evg_status.bank) n_bank1++; end
    if (evg_status.loop_restart) n_loop++;
    if (evg_status.held) n_held++;
    if (!dut.kflags[1]) sent.push_back(dut.word[15:8]);
  end
  // an upstream EVG event lands on the clock of sequence event 0x30
  always @(negedge evg_clk) up_event = (inject && dut.u_evg.seq_event == 8'h30) ? 8'h44 : 8'h00;

  for (genvar e = 0; e < NE; e++) begin : g_mon
    logic trig_d = 0, ext_d = 1, lvl_d = 0, irq_d = 0;
    always @(posedge evr_word_clk[e]) if (!rst && evr_locked[e]) begin
      if (evr_event[e] != 8'h00) rcvd[e].push_back(evr_event[e]);
      if (evr_trig[e][0] && !trig_d) begin n_trig[e]++; lat_trig[e].push_back($realtime - t_start); end
      if (!evr_ext_trig[e][3] && ext_d && cfg_done) n_ext[e]++;
      if (evr_level[e][0] && !lvl_d) n_level_set[e]++;
      if (!evr_level[e][0] && lvl_d) n_level_clr[e]++;
      if (evr_irq[e] && !irq_d) n_irq[e]++;
      if (evr_dbus[e] == mps_in) n_dbus[e]++;
      trig_d <= evr_trig[e][0]; ext_d <= evr_ext_trig[e][3]; lvl_d <= evr_level[e][0]; irq_d <= evr_irq[e];
    end
  end

  // ---------------- CPU accesses
  task automatic evg_wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge evg_clk) begin evg_bus.we = 1; evg_bus.addr = a; evg_bus.wdata = d; end
    @(negedge evg_clk) evg_bus.we = 0;
  endtask
  task automatic seq_entry(input int bank, input int idx, input int ts, input logic [7:0] code);
    evg_wr(16'h4000 | 16'(bank << 11) | 16'(idx), 32'(ts));
    evg_wr(16'h5000 | 16'(bank << 11) | 16'(idx), {24'd0, code});
  endtask
  task automatic evr_wr(input int e, input logic [15:0] a, input logic [31:0] d);
    @(negedge evr_word_clk[e]) begin evr_bus[e].we = 1; evr_bus[e].addr = a; evr_bus[e].wdata = d; end
    @(negedge evr_word_clk[e]) evr_bus[e].we = 0;
  endtask
  task automatic evr_rd(input int e, input logic [15:0] a, output logic [31:0] d);
    @(negedge evr_word_clk[e]) begin evr_bus[e].re = 1; evr_bus[e].addr = a; end
    @(negedge evr_word_clk[e]) begin evr_bus[e].re = 0; d = evr_rdata[e]; end
  endtask
  task automatic fiducial(input int gap);
    repeat (gap) @(negedge evg_clk);
    #3 fid_raw = 1;                             // asynchronous to the clocks
    repeat (20) @(negedge clk476);
    fid_raw = 0;
  endtask

  localparam int TRIG_DLY [NE] = '{10, 25};

  initial begin
    logic [31:0] d;
    logic [7:0] bufdata [32];
    evg_bus = '0;
    for (int e = 0; e < NE; e++) evr_bus[e] = '0;
    for (int i = 0; i < NT; i++) n_trd[i] = 0;
    for (int e = 0; e < NE; e++) begin n_trig[e] = 0; n_ext[e] = 0; n_level_set[e] = 0; n_level_clr[e] = 0; n_irq[e] = 0; n_dbus[e] = 0; end
    repeat (400 * 4) @(posedge clk476);
    @(negedge clk476) rst = 0;
    // timeslot triggers: the first sets the divider phase, the third is off by one clock
    repeat (30) @(negedge clk476);  ts_trig = 1; repeat (8) @(negedge clk476); ts_trig = 0;
    repeat (392) @(negedge clk476); ts_trig = 1; repeat (8) @(negedge clk476); ts_trig = 0;
    repeat (393) @(negedge clk476); ts_trig = 1; repeat (8) @(negedge clk476); ts_trig = 0;
    repeat (100) @(negedge clk476);
    // EVG sequences
    seq_entry(0, 0, 0, 8'h21);
    seq_entry(0, 1, 10, 8'h30);
    seq_entry(0, 2, 11, 8'h31);
    seq_entry(0, 3, 50, 8'h22);
    seq_entry(0, 4, 60, 8'h7F);
    seq_entry(1, 0, 5, 8'h22);
    seq_entry(1, 1, 6, 8'h21);
    seq_entry(1, 2, 20, 8'h7F);
    // EVRs
    for (int e = 0; e < NE; e++) begin
      wait (evr_locked[e]);
      evr_wr(e, 16'h1021, 32'h0009);           // 0x21 -> map bits 0, 3
      evr_wr(e, 16'h1022, 32'h0020);           // 0x22 -> map bit 5
      evr_wr(e, 16'h1030, 32'h0002);           // 0x30 -> map bit 1
      evr_wr(e, 16'h2020, 32'(TRIG_DLY[e]));
      evr_wr(e, 16'h2040, 32'd3);
      evr_wr(e, 16'h2000, 32'h1);
      evr_wr(e, 16'h3023, 32'd200);
      evr_wr(e, 16'h3043, 32'd4);
      evr_wr(e, 16'h3003, 32'h3);              // active low
      evr_wr(e, 16'h4000, {22'd0, 4'd5, 4'd3, 2'b01});
    end
    cfg_done = 1;
    evg_wr(EVG_CTRL, 32'h1);                   // enable, bank 0, single
    // data buffer
    for (int i = 0; i < 32; i++) begin bufdata[i] = 8'($urandom); evg_wr(16'h8000 | 16'(i), {24'd0, bufdata[i]}); end
    evg_wr(EVG_BUFSEND, 32'd32);
    for (int e = 0; e < NE; e++) begin
      wait (evr_irq[e]);
      evr_rd(e, EVR_STATUS, d);
      checks++; if (d[27:16] != 12'd32) begin failures++; $display("FAIL EVR%0d buffer length %0d", e, d[27:16]); end
      for (int i = 0; i < 32; i++) begin
        evr_rd(e, 16'h8000 | 16'(i), d);
        checks++; if (d[7:0] !== bufdata[i]) begin failures++; $display("FAIL EVR%0d buffer byte %0d", e, i); end
      end
      evr_wr(e, EVR_STATUS, 32'h1);
    end
    // fiducials on bank 0
    for (int f = 0; f < 4; f++) fiducial(300 + 37 * f);
    // bank switch
    evg_wr(EVG_CTRL, 32'h5);
    for (int f = 0; f < 2; f++) fiducial(300);
    repeat (100) @(negedge evg_clk);
    // loop mode for a while, then back to single
    evg_wr(EVG_CTRL, 32'h7);
    fiducial(300);
    repeat (100) @(negedge evg_clk);
    evg_wr(EVG_CTRL, 32'h1);
    // upstream collision on bank 0
    inject = 1;
    fiducial(300);
    repeat (300) @(negedge evg_clk);
    inject = 0;
    repeat (400) @(negedge evg_clk);

    // ---------------- results
    for (int e = 0; e < NE; e++) begin
      checks++;
      if (rcvd[e].size() != sent.size()) begin failures++; $display("FAIL EVR%0d got %0d events of %0d", e, rcvd[e].size(), sent.size()); end
      else for (int i = 0; i < sent.size(); i++) if (rcvd[e][i] != sent[i]) begin
        failures++; $display("FAIL EVR%0d event %0d: %h want %h", e, i, rcvd[e][i], sent[i]); break;
      end
      // the 0x21 of the first four fiducials is the sequence's first entry:
      // its trigger must sit at the same time after count start each time
      checks++;
      if (lat_trig[e].size() < 4) begin failures++; $display("FAIL EVR%0d only %0d triggers", e, lat_trig[e].size()); end
      else for (int i = 1; i < 4; i++) if (lat_trig[e][i] != lat_trig[e][0]) begin
        failures++; $display("FAIL EVR%0d trigger latency %0t vs %0t", e, lat_trig[e][i], lat_trig[e][0]); break;
      end
    end
    // EVR1 is programmed 15 clocks later; its fiber is 7 bits longer
    checks++;
    if (lat_trig[1].size() > 0 && lat_trig[0].size() > 0 &&
        (lat_trig[1][0] - lat_trig[0][0] < 15 * 40 || lat_trig[1][0] - lat_trig[0][0] > 15 * 40 + 40)) begin
      failures++; $display("FAIL EVR1-EVR0 trigger difference %0t", lat_trig[1][0] - lat_trig[0][0]);
    end
    begin
      int fids; fids = 4 + 2 + 1 + 1;
      `define COUNT(name, val, want) checks++; if (!(val want)) begin failures++; $display("FAIL %s: %0d", name, val); end \
        else $display("  %-28s %0d", name, val);
      `COUNT("divider realign", n_realign, >= 1)
      `COUNT("sequence starts", n_start, == fids)
      `COUNT("sequences ended", n_done, == fids)
      `COUNT("bank 1 sequences", n_bank1, == 3)
      `COUNT("loop restarts", n_loop, >= 3)
      `COUNT("upstream collisions", n_held, >= 1)
      for (int i = 0; i < NT; i++) begin `COUNT("TRD fiducials", n_trd[i], == fids) end
      for (int e = 0; e < NE; e++) begin
        `COUNT("normal triggers", n_trig[e], >= fids)
        `COUNT("extended triggers", n_ext[e], >= fids)
        `COUNT("level sets", n_level_set[e], >= fids)
        `COUNT("level clears", n_level_clr[e], >= fids)
        `COUNT("buffer interrupts", n_irq[e], == 1)
        `COUNT("databus words", n_dbus[e], > 1000)
      end
      `undef COUNT
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
