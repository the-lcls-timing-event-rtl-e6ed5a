// EVG send control: plays the active sequence RAM bank out onto the link.
//
// After count_start the control serves the sequence RAM entries in address
// order.  Each clock the RAM shows the entry at raddr; when the comparator
// reports that the timestamp counter has reached the entry's timestamp (go),
// the entry's event code is sent and the next entry is addressed.  raddr is
// computed combinationally from this clock's match so that the next entry is
// already on the RAM outputs in the following clock: entries with consecutive
// timestamps go out in consecutive clocks.  The sequence ends at event code
// END_CODE (0x7F, which is itself sent) or after the last address.  In single
// mode the control then waits for the next count_start; in loop mode it
// restarts at address 0 and clears the counter (restart), so the same codes
// repeat without a new trigger.  Matching, the 2K depth, the 0x7F end entry and
// the two modes follow the EVG description; event code 0 meaning "nothing" is
// this design's convention.
//
// Timing: an entry with timestamp T is on `event` T + 2 clocks after the
// count_start clock.  done/restart are high in the clock the end entry matches.
module evg_send_control #(
  parameter int unsigned DEPTH    = 2048,
  parameter logic [7:0]  END_CODE = 8'h7F,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          loop_mode,
  input  logic          go,
  input  logic [7:0]    rd_code,
  output logic [AW-1:0] raddr,
  output logic [7:0]    event_out,
  output logic          busy,
  output logic          restart,
  output logic          done
);

  logic [AW-1:0] addr;
  logic          fire, last;

  assign fire    = busy && go && !start;
  assign last    = (rd_code == END_CODE) || (addr == AW'(DEPTH - 1));
  assign restart = fire && last && loop_mode;
  assign done    = fire && last && !loop_mode;

  always_comb begin
    if (start || restart) raddr = '0;
    else if (fire)        raddr = addr + 1'b1;
    else                  raddr = addr;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr      <= '0;
      busy      <= 1'b0;
      event_out <= '0;
    end else begin
      addr      <= raddr;
      event_out <= fire ? rd_code : 8'h00;
      if (start)     busy <= 1'b1;
      else if (done) busy <= 1'b0;
    end
  end

endmodule
