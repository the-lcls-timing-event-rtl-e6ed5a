// LCLS timing event system: Sync/Div, event generator, event receivers, TRD.
//
// The 476 MHz accelerator clock enters the Sync/Div block, which divides it to
// the 119 MHz system clock (division phase fixed by the 120 Hz timeslot
// trigger), re-times the raw 360 Hz fiducial and makes the TRD signal.  The
// fiducial starts the EVG's sequence; the EVG word stream is 8b10b encoded and
// serialized at 20 x 119 MHz = 2.38 Gb/s.  The fiber fan-out, the fibers and
// each EVR's clock recovery are optical or analog and lie outside: serial_out
// leaves the top, and each EVR gets its serial input and recovered bit clock
// back through evr_serial_in / evr_rx_bitclk.  Likewise the TRD fiber fan-out
// lies between trd_out and the TRD receivers' trd_in.  The CPUs that load the
// sequence RAMs and program the EVRs drive the register buses: evg_bus in the
// clk119 domain (brought out as evg_clk), evr_bus[i] in the recovered word
// clock of EVR i (evr_word_clk[i]).
//
// bitclk must be 5 x clk476 and phase locked to it (it stands for the EVG
// transceiver's PLL output).  All resets are synchronous and active high; hold
// rst for at least 300 clk119 cycles so the EVR mapping RAMs clear.
module lcls_timing_top
  import lcls_timing_pkg::*;
#(
  parameter int unsigned NUM_EVR = 2,
  parameter int unsigned NUM_TRD = 2
) (
  input  logic               clk476,
  input  logic               bitclk,
  input  logic               rst,
  input  logic               fid_raw,
  input  logic               ts_trig,
  output logic               sync_realign,
  // EVG
  output logic               evg_clk,
  input  bus_req_t           evg_bus,
  output logic [31:0]        evg_rdata,
  input  logic [7:0]         mps_in,
  input  logic [7:0]         up_event,
  output evg_status_t        evg_status,
  output logic               serial_out,
  // EVRs
  input  logic [NUM_EVR-1:0] evr_serial_in,
  input  logic [NUM_EVR-1:0] evr_rx_bitclk,
  output logic [NUM_EVR-1:0] evr_word_clk,
  input  bus_req_t           evr_bus      [NUM_EVR],
  output logic [31:0]        evr_rdata    [NUM_EVR],
  output logic [NUM_PULSE-1:0] evr_trig   [NUM_EVR],
  output logic [NUM_EXT-1:0]   evr_ext_trig [NUM_EVR],
  output logic [NUM_LEVEL-1:0] evr_level  [NUM_EVR],
  output logic [7:0]         evr_dbus     [NUM_EVR],
  output logic [7:0]         evr_event    [NUM_EVR],
  output logic [NUM_EVR-1:0] evr_irq,
  output logic [NUM_EVR-1:0] evr_locked,
  // TRD
  output logic               trd_out,
  input  logic               trd_osclk,
  input  logic [NUM_TRD-1:0] trd_in,
  output logic [NUM_TRD-1:0] trd_fid
);

  logic        clk119, fid;
  logic [15:0] word;
  logic [1:0]  kflags;

  sync_div #(.DIV(4)) u_sync (
    .clk476, .rst, .fid_raw, .ts_trig, .clk119, .fid, .trd_out, .realign(sync_realign));

  assign evg_clk = clk119;

  evg #(.SEQ_DEPTH(SEQ_RAM_DEPTH), .BUF_DEPTH(DATA_BUF_DEPTH)) u_evg (
    .clk(clk119), .rst, .fid, .bus(evg_bus), .rdata(evg_rdata), .mps_in, .up_event,
    .word, .kflags, .status(evg_status));

  serializer u_ser (.clk(clk119), .bitclk, .rst, .word, .kflags, .serial(serial_out));

  for (genvar i = 0; i < NUM_EVR; i++) begin : g_evr
    evr #(.BUF_DEPTH(DATA_BUF_DEPTH)) u_evr (
      .bitclk(evr_rx_bitclk[i]), .rst, .serial(evr_serial_in[i]), .word_clk(evr_word_clk[i]),
      .bus(evr_bus[i]), .rdata(evr_rdata[i]), .trig(evr_trig[i]), .ext_trig(evr_ext_trig[i]),
      .level(evr_level[i]), .dbus(evr_dbus[i]), .irq(evr_irq[i]), .event_out(evr_event[i]),
      .locked(evr_locked[i]));
  end

  for (genvar i = 0; i < NUM_TRD; i++) begin : g_trd
    trd_rx #(.GAP(6)) u_trd (.osclk(trd_osclk), .rst, .trd_in(trd_in[i]), .fid(trd_fid[i]));
  end

endmodule
