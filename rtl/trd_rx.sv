// TRD receiver: recovers the fiducial from the TRD signal.
//
// The TRD signal is the 119 MHz clock with one clock cycle left out at each
// fiducial.  The receiver samples it with a local clock several times faster
// (osclk, 476 MHz = 4 samples per 119 MHz cycle in the reference set-up),
// counts the samples since the last rising edge, and pulses fid when GAP
// samples pass without one: a normal cycle has 4, the missing cycle makes 8,
// so GAP = 6 sits between.  That the missing cycle can be found with purely
// digital means is the system's; oversampling and the threshold are this
// design's choices.
//
// Timing: fid is one osclk clock long, GAP + 3 osclk clocks after the last
// rising edge before the gap (two of synchronizer, one of output register).
module trd_rx #(
  parameter int unsigned GAP = 6,
  localparam int unsigned CW = $clog2(GAP + 1)
) (
  input  logic osclk,
  input  logic rst,
  input  logic trd_in,
  output logic fid
);

  logic [2:0]    s;
  logic [CW-1:0] since;

  always_ff @(posedge osclk) begin
    if (rst) begin
      s     <= '0;
      since <= '0;
      fid   <= 1'b0;
    end else begin
      s   <= {s[1:0], trd_in};
      fid <= 1'b0;
      if (s[1] && !s[2]) begin
        since <= '0;
      end else if (since != CW'(GAP)) begin
        since <= since + 1'b1;
        fid   <= (since == CW'(GAP - 1));
      end
    end
  end

endmodule
