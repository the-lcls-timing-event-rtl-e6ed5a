// EVG trigger logic: turns the 360 Hz fiducial into the "count start" pulse.
//
// The fiducial from the Sync/Div chassis is brought into the 119 MHz EVG clock
// domain by a two-flop synchronizer; its rising edge, when the sequencer is
// enabled, gives a one-cycle count_start that clears and starts the timestamp
// counter.  That the fiducial starts the counter is the system's; the
// synchronizer, edge detector and enable gate are this design's choice.
//
// Timing: count_start is high for one clock, starting at the second clock edge
// after the one that first samples fid high.
module evg_trigger_logic (
  input  logic clk,
  input  logic rst,
  input  logic fid,
  input  logic enable,
  output logic count_start
);

  logic [2:0] sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync        <= '0;
      count_start <= 1'b0;
    end else begin
      sync        <= {sync[1:0], fid};
      count_start <= enable && sync[1] && !sync[2];
    end
  end

endmodule
