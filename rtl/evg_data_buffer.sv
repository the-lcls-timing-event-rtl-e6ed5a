// EVG data buffer: 2K bytes sent to the EVRs on the link's buffer channel.
//
// The CPU fills the buffer byte by byte (we/waddr/wdata) and then starts a
// transfer of len bytes (send).  The buffer channel gets one byte per buffer
// slot (slot is high in the clock whose byte the link multiplexer takes):
// K28.2 opens the transfer, the len data bytes follow from address 0 up, and
// K28.3 closes it; between transfers the channel carries K28.0.  A send while a
// transfer is running, or with len 0, is ignored.  The 2K size and the software
// start follow the EVG description; the framing characters are this design's.
//
// Timing: the memory is read synchronously every clock, so slots must be at
// least two clocks apart (the link multiplexer gives one every other clock).
module evg_data_buffer
  import lcls_timing_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          send,
  input  logic [AW:0]   len,
  input  logic          slot,
  output logic [7:0]    byte_out,
  output logic          k_out,
  output logic          busy
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  logic [7:0]    mem [DEPTH];
  logic [7:0]    q;
  logic [AW-1:0] ptr;
  logic [AW:0]   count;
  state_t        state;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    q <= mem[ptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      ptr   <= '0;
      count <= '0;
    end else begin
      unique case (state)
        IDLE:  if (send && len != '0 && len <= (AW+1)'(DEPTH)) begin
                 state <= START;
                 count <= len;
                 ptr   <= '0;
               end
        START: if (slot) state <= DATA;
        DATA:  if (slot) begin
                 ptr   <= ptr + 1'b1;
                 count <= count - 1'b1;
                 if (count == (AW+1)'(1)) state <= STOP;
               end
        STOP:  if (slot) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      START:   begin byte_out = K28_2; k_out = 1'b1; end
      DATA:    begin byte_out = q;     k_out = 1'b0; end
      STOP:    begin byte_out = K28_3; k_out = 1'b1; end
      default: begin byte_out = K28_0; k_out = 1'b1; end
    endcase
  end

  assign busy = (state != IDLE);

endmodule
