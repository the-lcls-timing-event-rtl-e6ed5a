// Sync/Div: 119 MHz clock, fiducial and TRD signal from the 476 MHz clock.
//
// The 476 MHz accelerator clock is divided by DIV (4) to the 119 MHz system
// clock of the EVG.  A free-running divider could settle on any of four phases
// at power-up, moving every EVR trigger by whole 8.4 ns steps, so the division
// is synchronized: each rising edge of the 120 Hz timeslot trigger forces the
// divider to a fixed phase (realign pulses when that changed the phase).  The
// raw 360 Hz fiducial is brought into the 476 MHz domain by a two-flop
// synchronizer; its rising edge becomes a fiducial one 119 MHz clock long that
// starts on a falling edge of clk119, so the EVG samples it cleanly.  The TRD
// signal is clk119 with the high phase of the fiducial's cycle suppressed: one
// "missing" clock marks each fiducial.
//
// The divide ratio, the trigger-synchronized division and the missing-cycle
// TRD code follow the system description; the synchronizers, the fiducial
// length and the phase chosen are this design's.  The divider is not reset so
// that clk119 keeps running while the logic it clocks is held in reset.
//
// Timing: clk119 rises when the divider goes from DIV/2-1 to DIV/2; after a
// timeslot trigger edge is seen (two 476 MHz clocks of synchronizer) the
// divider restarts at 0.  All outputs are registered in the 476 MHz domain.
module sync_div #(
  parameter int unsigned DIV = 4,
  localparam int unsigned CW = $clog2(DIV)
) (
  input  logic clk476,
  input  logic rst,
  input  logic fid_raw,
  input  logic ts_trig,
  output logic clk119,
  output logic fid,
  output logic trd_out,
  output logic realign
);

  logic [2:0]    fid_s, ts_s;
  logic [CW-1:0] cnt, cnt_n;
  logic          ts_edge, fid_pend, fid_n;

  assign ts_edge = ts_s[1] && !ts_s[2];
  assign cnt_n   = (ts_edge || cnt >= CW'(DIV - 1)) ? '0 : cnt + 1'b1;
  assign fid_n   = (cnt_n == '0) ? fid_pend : fid;

  // divider: free running, never reset
  always_ff @(posedge clk476) begin
    cnt    <= cnt_n;
    clk119 <= (cnt_n >= CW'(DIV / 2));
  end

  always_ff @(posedge clk476) begin
    if (rst) begin
      fid_s    <= '0;
      ts_s     <= '0;
      fid_pend <= 1'b0;
      fid      <= 1'b0;
      trd_out  <= 1'b0;
      realign  <= 1'b0;
    end else begin
      fid_s   <= {fid_s[1:0], fid_raw};
      ts_s    <= {ts_s[1:0], ts_trig};
      realign <= ts_edge && (cnt != CW'(DIV - 1));
      if (fid_s[1] && !fid_s[2]) fid_pend <= 1'b1;
      else if (cnt_n == '0)      fid_pend <= 1'b0;
      fid     <= fid_n;
      trd_out <= (cnt_n >= CW'(DIV / 2)) && !fid_n;
    end
  end

endmodule
