// EVR programmable trigger pulse generator ("width/delay control").
//
// A map-bit hit (trig) starts a delay of cfg.delay clocks, after which the
// output is active for cfg.width clocks; cfg.pol = 1 makes the output active
// low.  Delay and width count 119 MHz clocks, the 8.4 ns coarse step.  Only
// the low DLY_W bits of the delay are used: 16 bits for the normal triggers,
// 32 (over 1 s) for the extended ones.  A hit while a pulse is pending or
// active is ignored, and a width of 0 gives no pulse.  Programmable delay,
// width and polarity follow the EVR description; the counter widths and the
// retrigger rule are this design's.
//
// Timing: a hit in clock t makes the output active in clocks
// t+1+delay .. t+delay+width.
module evr_pulse_gen
  import lcls_timing_pkg::*;
#(
  parameter int unsigned DLY_W = 32,
  parameter int unsigned WID_W = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       trig,
  input  pulse_cfg_t cfg,
  output logic       out
);

  typedef enum logic [1:0] {IDLE, DELAY, ACTIVE} state_t;

  state_t           state;
  logic [DLY_W-1:0] dcnt;
  logic [WID_W-1:0] wcnt;
  logic [DLY_W-1:0] dly;
  logic [WID_W-1:0] wid;

  assign dly = cfg.delay[DLY_W-1:0];
  assign wid = cfg.width[WID_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      dcnt  <= '0;
      wcnt  <= '0;
    end else begin
      unique case (state)
        IDLE: if (trig && cfg.en && wid != '0) begin
                if (dly == '0) begin
                  state <= ACTIVE;
                  wcnt  <= wid;
                end else begin
                  state <= DELAY;
                  dcnt  <= dly;
                end
              end
        DELAY: begin
                 dcnt <= dcnt - 1'b1;
                 if (dcnt == DLY_W'(1)) begin
                   state <= ACTIVE;
                   wcnt  <= wid;
                 end
               end
        ACTIVE: begin
                  wcnt <= wcnt - 1'b1;
                  if (wcnt == WID_W'(1)) state <= IDLE;
                end
        default: state <= IDLE;
      endcase
    end
  end

  assign out = (state == ACTIVE) ^ cfg.pol;

endmodule
