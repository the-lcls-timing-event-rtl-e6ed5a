// EVR event mapping RAM.
//
// A 256-entry RAM addressed by the received event code; each entry holds
// MAP_BITS (14) mapping bits, written by the CPU.  When an event code arrives,
// the bits set in its entry are raised on `map` for one clock: each map bit
// later drives a hardware trigger.  Event code 0 ("no event") never hits.
// After reset the RAM is cleared one entry per clock (256 clocks, `clearing`
// high, no hits), so that no stale mapping fires.  Entry width and the
// code-to-map-bit lookup follow the EVR description; the clear sequence is
// this design's choice.
//
// Timing: map is registered, one clock after event_in.
module evr_mapping_ram #(
  parameter int unsigned MAP_BITS = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                we,
  input  logic [7:0]          waddr,
  input  logic [MAP_BITS-1:0] wdata,
  input  logic [7:0]          event_in,
  output logic [MAP_BITS-1:0] map,
  output logic                clearing
);

  logic [MAP_BITS-1:0] mem [256];
  logic [7:0]          clr_addr;
  logic [MAP_BITS-1:0] q;
  logic                hit_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == 8'hFF) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)  mem[clr_addr] <= '0;
    else if (we)   mem[waddr]    <= wdata;
    q <= mem[event_in];
  end

  always_ff @(posedge clk) begin
    if (rst) hit_q <= 1'b0;
    else     hit_q <= (event_in != 8'h00) && !clearing;
  end

  assign map = hit_q ? q : '0;

endmodule
