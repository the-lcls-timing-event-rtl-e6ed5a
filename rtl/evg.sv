// Event generator (EVG).
//
// The EVG broadcasts one 16-bit word per 119 MHz clock to the event receivers.
// Its core is a pair of sequence RAMs holding {timestamp, event code} entries.
// A fiducial starts the 32-bit timestamp counter; whenever the counter equals
// the timestamp of the entry being served, that entry's event code is sent and
// the next entry is served, until the end code 0x7F (single mode) or forever
// (loop mode).  While one RAM bank is broadcast the CPU loads the other; the
// bank selected in the control register takes effect at the next fiducial.
// Events from a daisy-chained upstream EVG are merged in by a priority encoder.
// The lower byte of the word carries the distributed databus (the external
// hardware inputs, sampled each clock) and the 2K data buffer, which software
// fills and then sends.  The word goes to the serializer.
//
// CPU interface (bus_req_t, synchronous to clk; rdata registered, valid the
// clock after a read):
//   0x0000 CTRL     [0] enable  [1] loop mode  [2] bank to broadcast
//   0x0001 BUFSEND  write: send data buffer bytes 0 .. wdata[11:0]-1
//   0x0002 STATUS   [0] sequence busy [1] bank broadcasting [2] buffer busy
//   0x4000 | field<<12 | bank<<11 | index : sequence RAM (field 0 timestamp, 1 event code)
//   0x8000 | index                        : data buffer byte
// The block structure follows the EVG functional diagram; the register map and
// bus stand in for the VME interface and are this design's own.
module evg
  import lcls_timing_pkg::*;
#(
  parameter int unsigned SEQ_DEPTH = 2048,
  parameter int unsigned BUF_DEPTH = 2048
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fid,
  input  bus_req_t    bus,
  output logic [31:0] rdata,
  input  logic [7:0]  mps_in,
  input  logic [7:0]  up_event,
  output logic [15:0] word,
  output logic [1:0]  kflags,
  output evg_status_t status
);

  localparam int unsigned SAW = $clog2(SEQ_DEPTH);
  localparam int unsigned BAW = $clog2(BUF_DEPTH);

  // ---------------- registers
  logic        enable, loop_mode, bank_sel, act_bank;
  logic [7:0]  dbus_q;
  logic        buf_send;
  logic [BAW:0] buf_len;
  logic        seq_we, buf_we;

  assign seq_we = bus.we && bus.addr[15:14] == 2'b01;
  assign buf_we = bus.we && bus.addr[15] == 1'b1;

  // ---------------- sequencer
  logic            count_start, restart, done, busy, match;
  logic [TIMESTAMP_W-1:0] count, rd_ts;
  logic [7:0]      rd_code, seq_event, evt;
  logic [SAW-1:0]  raddr;
  logic            running;

  evg_trigger_logic u_trig (.clk, .rst, .fid, .enable, .count_start);

  evg_timestamp_counter #(.W(TIMESTAMP_W)) u_cnt (
    .clk, .rst, .start(count_start || restart), .stop(done), .count, .running);

  evg_sequence_ram #(.DEPTH(SEQ_DEPTH), .TS_W(TIMESTAMP_W)) u_seq (
    .clk, .we(seq_we), .wbank(bus.addr[11]), .wsel_code(bus.addr[12]),
    .waddr(bus.addr[SAW-1:0]), .wdata(bus.wdata),
    .rbank(count_start ? bank_sel : act_bank), .raddr, .rd_ts, .rd_code);

  evg_comparator #(.W(TIMESTAMP_W)) u_cmp (.a(rd_ts), .b(count), .match);

  evg_send_control #(.DEPTH(SEQ_DEPTH)) u_send (
    .clk, .rst, .start(count_start), .loop_mode, .go(match && running), .rd_code,
    .raddr, .event_out(seq_event), .busy, .restart, .done);

  evg_priority_encoder u_prio (
    .clk, .rst, .up_event, .seq_event, .event_out(evt),
    .held(status.held), .dropped(status.dropped));

  // ---------------- data buffer and link word
  logic [7:0] buf_byte;
  logic       buf_k, slot, buf_busy;

  evg_data_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst, .we(buf_we), .waddr(bus.addr[BAW-1:0]), .wdata(bus.wdata[7:0]),
    .send(buf_send), .len(buf_len), .slot, .byte_out(buf_byte), .k_out(buf_k), .busy(buf_busy));

  evg_link_mux u_mux (
    .clk, .rst, .event_in(evt), .dbus(dbus_q), .buf_byte, .buf_k, .slot, .word, .kflags);

  // ---------------- register file
  always_ff @(posedge clk) begin
    if (rst) begin
      enable    <= 1'b0;
      loop_mode <= 1'b0;
      bank_sel  <= 1'b0;
      act_bank  <= 1'b0;
      dbus_q    <= '0;
      buf_send  <= 1'b0;
      buf_len   <= '0;
      rdata     <= '0;
    end else begin
      dbus_q   <= mps_in;
      buf_send <= 1'b0;
      if (count_start) act_bank <= bank_sel;
      if (bus.we && bus.addr == EVG_CTRL) begin
        enable    <= bus.wdata[0];
        loop_mode <= bus.wdata[1];
        bank_sel  <= bus.wdata[2];
      end
      if (bus.we && bus.addr == EVG_BUFSEND) begin
        buf_send <= 1'b1;
        buf_len  <= bus.wdata[BAW:0];
      end
      if (bus.re) begin
        unique case (bus.addr)
          EVG_CTRL:   rdata <= {29'd0, bank_sel, loop_mode, enable};
          EVG_STATUS: rdata <= {29'd0, buf_busy, act_bank, busy};
          default:    rdata <= '0;
        endcase
      end
    end
  end

  assign status.count_start  = count_start;
  assign status.seq_done     = done;
  assign status.loop_restart = restart;
  assign status.bank         = act_bank;
  assign status.buf_busy     = buf_busy;

endmodule
