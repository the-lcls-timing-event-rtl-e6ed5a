// EVR level output: an RS latch driven by two map bits.
//
// Map bit cfg.set_bit sets the level, map bit cfg.rst_bit clears it; set wins
// when both hit together.  cfg.pol = 1 inverts the output, cfg.en = 0 holds the
// latch cleared.  Bit numbers above the last map bit never hit.  The RS latch
// fed by the map bits follows the EVR block diagram; the programmable choice of
// set and reset bits is this design's.
//
// Timing: the output changes one clock after the map bit.
module evr_level_latch
  import lcls_timing_pkg::*;
#(
  parameter int unsigned MAP_BITS = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [MAP_BITS-1:0] map,
  input  level_cfg_t          cfg,
  output logic                out
);

  logic q, set, clr;

  assign set = (int'(cfg.set_bit) < MAP_BITS) && map[cfg.set_bit];
  assign clr = (int'(cfg.rst_bit) < MAP_BITS) && map[cfg.rst_bit];

  always_ff @(posedge clk) begin
    if (rst || !cfg.en) q <= 1'b0;
    else if (set)       q <= 1'b1;
    else if (clr)       q <= 1'b0;
  end

  assign out = q ^ cfg.pol;

endmodule
