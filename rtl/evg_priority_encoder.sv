// EVG priority encoder: merges daisy-chained and local event streams.
//
// An EVG can forward the events of an upstream EVG.  Only one event code fits
// in a link word, so when both streams carry an event in the same clock the
// upstream event is sent and the local one waits in a one-entry register for
// the next clock without an upstream event (held).  If another collision hits
// while an event is waiting, the waiting event is lost (dropped).  Which stream
// wins and the one-entry hold are this design's choices; the system only says
// the EVGs are daisy-chained "in a priority-encoded manner".
//
// Timing: one clock from input to event_out; code 0 is "no event".
module evg_priority_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] up_event,
  input  logic [7:0] seq_event,
  output logic [7:0] event_out,
  output logic       held,
  output logic       dropped
);

  logic [7:0] pend;
  logic       pend_v;
  logic       up_v, seq_v;

  assign up_v  = (up_event != 8'h00);
  assign seq_v = (seq_event != 8'h00);

  always_ff @(posedge clk) begin
    if (rst) begin
      event_out <= '0;
      pend      <= '0;
      pend_v    <= 1'b0;
      held      <= 1'b0;
      dropped   <= 1'b0;
    end else begin
      held    <= 1'b0;
      dropped <= 1'b0;
      if (up_v) begin
        event_out <= up_event;
        if (seq_v) begin
          pend    <= seq_event;
          pend_v  <= 1'b1;
          held    <= 1'b1;
          dropped <= pend_v;
        end
      end else if (pend_v) begin
        event_out <= pend;
        if (seq_v) begin
          pend <= seq_event;
          held <= 1'b1;
        end else begin
          pend_v <= 1'b0;
        end
      end else begin
        event_out <= seq_event;
      end
    end
  end

endmodule
