// EVG timestamp counter.
//
// A W-bit (32 by default, the width of the sequence RAM timestamps) counter.
// start clears it and sets it running: the value is 0 in the clock after
// start and goes up by one every clock until stop.  start wins over stop.  The
// counter is compared with the timestamp of the current sequence RAM entry.
// Halting at the end of a sequence is this design's choice.
module evg_timestamp_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         stop,
  output logic [W-1:0] count,
  output logic         running
);

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      running <= 1'b0;
    end else if (start) begin
      count   <= '0;
      running <= 1'b1;
    end else if (stop) begin
      running <= 1'b0;
    end else if (running) begin
      count   <= count + 1'b1;
    end
  end

endmodule
