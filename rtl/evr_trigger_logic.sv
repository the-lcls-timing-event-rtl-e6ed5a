// EVR trigger logic: the hardware outputs driven by the map bits.
//
// N_PULSE (14) programmable delay triggers, pulse generator n started by map
// bit n; N_EXT (4) extended delay triggers with a 32-bit delay, started by map
// bits 0..N_EXT-1; N_LEVEL (8) level outputs, each an RS latch set and reset
// by two selectable map bits.  The three groups and their sizes follow the EVR
// block diagram; the delay widths and which map bits drive the extended
// triggers are this design's choices.
//
// Timing: see evr_pulse_gen and evr_level_latch.
module evr_trigger_logic
  import lcls_timing_pkg::*;
#(
  parameter int unsigned MAP_BITS    = 14,
  parameter int unsigned N_PULSE     = 14,
  parameter int unsigned N_EXT       = 4,
  parameter int unsigned N_LEVEL     = 8,
  parameter int unsigned PULSE_DLY_W = 16,
  parameter int unsigned EXT_DLY_W   = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [MAP_BITS-1:0] map,
  input  pulse_cfg_t          pulse_cfg [N_PULSE],
  input  pulse_cfg_t          ext_cfg   [N_EXT],
  input  level_cfg_t          level_cfg [N_LEVEL],
  output logic [N_PULSE-1:0]  trig,
  output logic [N_EXT-1:0]    ext_trig,
  output logic [N_LEVEL-1:0]  level
);

  for (genvar i = 0; i < N_PULSE; i++) begin : g_pulse
    evr_pulse_gen #(.DLY_W(PULSE_DLY_W), .WID_W(WIDTH_W)) u_pg (
      .clk, .rst, .trig(map[i % MAP_BITS]), .cfg(pulse_cfg[i]), .out(trig[i]));
  end

  for (genvar i = 0; i < N_EXT; i++) begin : g_ext
    evr_pulse_gen #(.DLY_W(EXT_DLY_W), .WID_W(WIDTH_W)) u_pg (
      .clk, .rst, .trig(map[i % MAP_BITS]), .cfg(ext_cfg[i]), .out(ext_trig[i]));
  end

  for (genvar i = 0; i < N_LEVEL; i++) begin : g_level
    evr_level_latch #(.MAP_BITS(MAP_BITS)) u_lv (
      .clk, .rst, .map, .cfg(level_cfg[i]), .out(level[i]));
  end

endmodule
