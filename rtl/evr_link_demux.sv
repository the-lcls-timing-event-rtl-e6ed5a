// EVR link demultiplexer: splits a received word into its three streams.
//
// Both 10-bit symbols are 8b10b decoded.  The upper byte is the event code;
// the comma K28.5 (or any K character, or a code error) means "no event" and
// gives code 0.  The lower byte alternates between the distributed databus and
// the data buffer channel.  The buffer channel always carries a K character
// except while buffer data flows, so a K in the lower byte marks a buffer slot
// and the even/odd phase follows from it.  K28.2 and K28.3 on the buffer
// channel mark start and end of a buffer, data characters are buffer bytes.
// This framing mirrors evg_link_mux and is this design's own.
//
// Timing: all outputs registered, one word clock after `code`.
module evr_link_demux
  import lcls_timing_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [19:0] code,
  output logic [7:0]  event_out,
  output logic [7:0]  dbus,
  output logic        buf_start,
  output logic        buf_valid,
  output logic        buf_end,
  output logic [7:0]  buf_byte,
  output logic        err
);

  logic [7:0] hi_d, lo_d;
  logic       hi_k, lo_k, hi_e, lo_e;
  logic       odd_q, odd_now;

  dec8b10b u_dec_hi (.din(code[19:10]), .dout(hi_d), .k(hi_k), .err(hi_e));
  dec8b10b u_dec_lo (.din(code[9:0]),   .dout(lo_d), .k(lo_k), .err(lo_e));

  assign odd_now = lo_k ? 1'b1 : !odd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      odd_q     <= 1'b0;
      event_out <= '0;
      dbus      <= '0;
      buf_start <= 1'b0;
      buf_valid <= 1'b0;
      buf_end   <= 1'b0;
      buf_byte  <= '0;
      err       <= 1'b0;
    end else begin
      odd_q     <= odd_now;
      event_out <= (hi_k || hi_e) ? EV_NULL : hi_d;
      err       <= hi_e || lo_e;
      buf_start <= odd_now && lo_k && lo_d == K28_2;
      buf_end   <= odd_now && lo_k && lo_d == K28_3;
      buf_valid <= odd_now && !lo_k && !lo_e;
      if (odd_now) buf_byte <= lo_d;
      else         dbus     <= lo_d;
    end
  end

endmodule
