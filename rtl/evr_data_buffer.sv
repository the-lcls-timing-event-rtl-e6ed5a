// EVR data buffer: receives the EVG's data buffer and interrupts the CPU.
//
// K28.2 on the buffer channel (buf_start) restarts the write pointer, each
// data byte (buf_valid) is stored at the next address, and K28.3 (buf_end)
// completes the buffer: its length is latched in rx_len and irq is raised
// until the CPU clears it with irq_clr.  Bytes beyond DEPTH are discarded.
// The CPU reads the buffer through a synchronous port (rdata one clock after
// raddr).  The 2K size and the completion interrupt follow the EVR
// description; the level interrupt with explicit clear is this design's.
module evr_data_buffer #(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          buf_start,
  input  logic          buf_valid,
  input  logic          buf_end,
  input  logic [7:0]    byte_in,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata,
  input  logic          irq_clr,
  output logic          irq,
  output logic [AW:0]   rx_len
);

  logic [7:0]  mem [DEPTH];
  logic [AW:0] wptr;
  logic        active;

  always_ff @(posedge clk) begin
    if (buf_valid && active && wptr < (AW+1)'(DEPTH)) mem[wptr[AW-1:0]] <= byte_in;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr   <= '0;
      active <= 1'b0;
      irq    <= 1'b0;
      rx_len <= '0;
    end else begin
      if (buf_start) begin
        wptr   <= '0;
        active <= 1'b1;
      end else if (buf_valid && active && wptr < (AW+1)'(DEPTH)) begin
        wptr <= wptr + 1'b1;
      end else if (buf_end && active) begin
        active <= 1'b0;
        rx_len <= wptr;
      end
      if (buf_end && active)  irq <= 1'b1;
      else if (irq_clr)       irq <= 1'b0;
    end
  end

endmodule
