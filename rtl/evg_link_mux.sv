// EVG link multiplexer: builds the 16-bit word sent to the EVRs every clock.
//
// Upper byte: the event code, or the comma K28.5 when there is no event
// (code 0), which also lets the receivers find the symbol boundaries.  Lower
// byte: two streams share it, the distributed databus on even clocks and the
// data buffer channel on odd clocks.  slot tells the data buffer that its byte
// is taken in this clock.  The word layout is the system's; the even/odd
// interleave and the K28.5 idle are this design's choices.
//
// Timing: word/kflags are registered, one clock after event_in/dbus/buf_*.
// kflags = {upper byte is K, lower byte is K}.
module evg_link_mux
  import lcls_timing_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  event_in,
  input  logic [7:0]  dbus,
  input  logic [7:0]  buf_byte,
  input  logic        buf_k,
  output logic        slot,
  output logic [15:0] word,
  output logic [1:0]  kflags
);

  logic odd;

  assign slot = odd;

  always_ff @(posedge clk) begin
    if (rst) begin
      odd    <= 1'b0;
      word   <= {K28_5, 8'h00};
      kflags <= 2'b10;
    end else begin
      odd         <= !odd;
      word[15:8]  <= (event_in == EV_NULL) ? K28_5 : event_in;
      kflags[1]   <= (event_in == EV_NULL);
      word[7:0]   <= odd ? buf_byte : dbus;
      kflags[0]   <= odd ? buf_k : 1'b0;
    end
  end

endmodule
