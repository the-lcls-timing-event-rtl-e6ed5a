// Event receiver (EVR).
//
// The EVR turns the EVG's broadcast into hardware triggers.  The serial link is
// de-serialized on the recovered bit clock, which also yields the recovered
// 119 MHz word clock that runs all EVR logic, so every trigger is synchronous
// to the accelerator reference clock.  Each received event code is looked up
// in the mapping RAM; the map bits of its entry start the programmable delay
// triggers (14), the extended delay triggers (4) and set or clear the level
// outputs (8).  The distributed databus byte is put out on `dbus`, and the data
// buffer channel fills the 2K receive buffer, whose completion raises irq.
//
// CPU interface (bus_req_t, synchronous to word_clk; rdata valid the clock
// after a read):
//   0x0000           read [0] irq [1] locked [2] code error seen [3] mapping RAM
//                    clearing after reset, [27:16] rx length;
//                    write [0]=1 clears irq
//   0x1000 | code    mapping RAM entry, wdata[13:0]
//   0x2000 | r<<5 | n  normal trigger n: r=0 {pol,en}, r=1 delay, r=2 width
//   0x3000 | r<<5 | n  extended trigger n, same registers
//   0x4000 | n       level output n: wdata[9:0] = {rst_bit, set_bit, pol, en}
//   0x8000 | index   data buffer byte (read)
// The blocks and their counts follow the EVR block diagram; the register map
// and bus stand in for the VME/PMC interface and are this design's own.
module evr
  import lcls_timing_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 2048
) (
  input  logic               bitclk,
  input  logic               rst,
  input  logic               serial,
  output logic               word_clk,
  input  bus_req_t           bus,
  output logic [31:0]        rdata,
  output logic [NUM_PULSE-1:0] trig,
  output logic [NUM_EXT-1:0]   ext_trig,
  output logic [NUM_LEVEL-1:0] level,
  output logic [7:0]         dbus,
  output logic               irq,
  output logic [7:0]         event_out,
  output logic               locked
);

  localparam int unsigned BAW = $clog2(BUF_DEPTH);

  logic                clk;
  logic [19:0]         code;
  logic                buf_start, buf_valid, buf_end, err, err_seen, clearing;
  logic [7:0]          buf_byte, buf_rdata;
  logic [NUM_MAP_BITS-1:0] map;
  logic [BAW:0]        rx_len;
  logic                irq_clr, rd_buf;
  logic [31:0]         rdata_q;
  pulse_cfg_t          pulse_cfg [NUM_PULSE];
  pulse_cfg_t          ext_cfg   [NUM_EXT];
  level_cfg_t          level_cfg [NUM_LEVEL];

  evr_deserializer u_des (.bitclk, .rst, .serial, .word_clk, .code, .locked);
  assign clk = word_clk;

  evr_link_demux u_demux (
    .clk, .rst, .code, .event_out, .dbus, .buf_start, .buf_valid, .buf_end, .buf_byte, .err);

  evr_mapping_ram #(.MAP_BITS(NUM_MAP_BITS)) u_map (
    .clk, .rst, .we(bus.we && bus.addr[15:12] == 4'h1), .waddr(bus.addr[7:0]),
    .wdata(bus.wdata[NUM_MAP_BITS-1:0]), .event_in(event_out), .map, .clearing);

  evr_trigger_logic #(
    .MAP_BITS(NUM_MAP_BITS), .N_PULSE(NUM_PULSE), .N_EXT(NUM_EXT), .N_LEVEL(NUM_LEVEL),
    .PULSE_DLY_W(PULSE_DELAY_W), .EXT_DLY_W(EXT_DELAY_W)
  ) u_trig (.clk, .rst, .map, .pulse_cfg, .ext_cfg, .level_cfg, .trig, .ext_trig, .level);

  evr_data_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst, .buf_start, .buf_valid, .buf_end, .byte_in(buf_byte),
    .raddr(bus.addr[BAW-1:0]), .rdata(buf_rdata), .irq_clr, .irq, .rx_len);

  assign irq_clr = bus.we && bus.addr == EVR_STATUS && bus.wdata[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NUM_PULSE); i++) pulse_cfg[i] <= '0;
      for (int i = 0; i < int'(NUM_EXT); i++)   ext_cfg[i]   <= '0;
      for (int i = 0; i < int'(NUM_LEVEL); i++) level_cfg[i] <= '0;
      rdata_q  <= '0;
      rd_buf   <= 1'b0;
      err_seen <= 1'b0;
    end else begin
      if (err && locked) err_seen <= 1'b1;
      if (bus.we) begin
        unique case (bus.addr[15:12])
          4'h2: if (int'(bus.addr[4:0]) < int'(NUM_PULSE)) unique case (bus.addr[6:5])
                  2'd0: {pulse_cfg[bus.addr[3:0]].pol, pulse_cfg[bus.addr[3:0]].en} <= bus.wdata[1:0];
                  2'd1: pulse_cfg[bus.addr[3:0]].delay <= bus.wdata;
                  2'd2: pulse_cfg[bus.addr[3:0]].width <= bus.wdata[WIDTH_W-1:0];
                  default: ;
                endcase
          4'h3: if (int'(bus.addr[4:0]) < int'(NUM_EXT)) unique case (bus.addr[6:5])
                  2'd0: {ext_cfg[bus.addr[1:0]].pol, ext_cfg[bus.addr[1:0]].en} <= bus.wdata[1:0];
                  2'd1: ext_cfg[bus.addr[1:0]].delay <= bus.wdata;
                  2'd2: ext_cfg[bus.addr[1:0]].width <= bus.wdata[WIDTH_W-1:0];
                  default: ;
                endcase
          4'h4: if (int'(bus.addr[2:0]) < int'(NUM_LEVEL)) level_cfg[bus.addr[2:0]] <= bus.wdata[9:0];
          default: ;
        endcase
      end
      rd_buf <= bus.re && bus.addr[15];
      if (bus.re && bus.addr == EVR_STATUS)
        rdata_q <= {4'd0, 12'(rx_len), 12'd0, clearing, err_seen, locked, irq};
      else if (bus.re)
        rdata_q <= '0;
    end
  end

  assign rdata = rd_buf ? {24'd0, buf_rdata} : rdata_q;

endmodule
