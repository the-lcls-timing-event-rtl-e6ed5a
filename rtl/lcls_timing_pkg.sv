// Shared types and constants of the LCLS timing event system.
//
// The link carries one 16-bit word per 119 MHz clock: the upper byte is the
// event code and the lower byte alternates between the distributed databus
// (even cycles) and the data buffer channel (odd cycles).  Both bytes are 8b10b
// coded, so a word is 20 bits and the line rate is 20 x 119 MHz = 2.38 Gb/s.
// Event code 0 means "no event" and goes out as the comma K28.5; the buffer
// channel uses K28.0 (idle), K28.2 (start of buffer) and K28.3 (end of buffer).
// Those framing choices and the CPU register bus are this design's own; the
// word layout, the 2K depths, the 32-bit timestamps and the 14 map bits follow
// the system description.
package lcls_timing_pkg;

  localparam int unsigned SEQ_RAM_DEPTH   = 2048;  // sequence RAM entries per bank
  localparam int unsigned DATA_BUF_DEPTH   = 2048;  // data buffer bytes
  localparam int unsigned TIMESTAMP_W        = 32;    // sequence timestamp width
  localparam int unsigned NUM_MAP_BITS    = 14;    // EVR mapping bits
  localparam int unsigned NUM_PULSE     = 14;    // programmable delay triggers
  localparam int unsigned NUM_EXT       = 4;     // extended delay triggers
  localparam int unsigned NUM_LEVEL     = 8;     // level (RS latch) outputs
  localparam int unsigned PULSE_DELAY_W = 16;    // delay bits, normal triggers
  localparam int unsigned EXT_DELAY_W   = 32;    // delay bits, extended triggers
  localparam int unsigned WIDTH_W       = 16;    // pulse width bits

  localparam logic [7:0] EV_NULL = 8'h00;      // no event this cycle
  localparam logic [7:0] EV_END  = 8'h7F;      // end of sequence

  // K28.y control characters (byte value; the K flag travels alongside)
  localparam logic [7:0] K28_0 = 8'h1C;        // buffer channel idle
  localparam logic [7:0] K28_2 = 8'h5C;        // start of buffer
  localparam logic [7:0] K28_3 = 8'h7C;        // end of buffer
  localparam logic [7:0] K28_5 = 8'hBC;        // comma, idle event slot

  // Simple synchronous CPU register bus (stands in for the VME bus).
  typedef struct packed {
    logic        we;
    logic        re;
    logic [15:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  // Trigger pulse configuration; delay and width are in 119 MHz cycles.
  typedef struct packed {
    logic                 en;
    logic                 pol;    // 1 = active low output
    logic [EXT_DELAY_W-1:0] delay;
    logic [WIDTH_W-1:0]     width;
  } pulse_cfg_t;

  // Level output: RS latch set and reset by selectable map bits.
  typedef struct packed {
    logic [3:0] rst_bit;
    logic [3:0] set_bit;
    logic       pol;
    logic       en;
  } level_cfg_t;

  // Strobes the EVG exports so that its mechanisms can be watched.
  typedef struct packed {
    logic count_start;   // fiducial started a sequence
    logic seq_done;      // end of sequence reached
    logic loop_restart;  // loop mode restarted the sequence
    logic bank;          // sequence RAM bank now broadcasting
    logic held;          // local event delayed by an upstream event
    logic dropped;       // delayed event overwritten
    logic buf_busy;      // data buffer transfer in progress
  } evg_status_t;

  // EVG register map (word addresses on bus_req_t.addr)
  localparam logic [15:0] EVG_CTRL    = 16'h0000; // [0] enable [1] loop [2] bank
  localparam logic [15:0] EVG_BUFSEND = 16'h0001; // write: send wdata[11:0] bytes
  localparam logic [15:0] EVG_STATUS  = 16'h0002; // read: [0] busy [1] bank [2] buf busy
  // 16'h4000 | field<<12 | bank<<11 | index : sequence RAM (field 0 ts, 1 code)
  // 16'h8000 | index                        : data buffer byte

  // EVR register map
  localparam logic [15:0] EVR_STATUS  = 16'h0000; // read [0] irq [1] locked [2] err, [27:16] rx length; write [0]=1 clears irq
  // 16'h1000 | code          : mapping RAM entry (wdata[13:0])
  // 16'h2000 | reg<<5 | n    : normal trigger n (reg 0 {pol,en}, 1 delay, 2 width)
  // 16'h3000 | reg<<5 | n    : extended trigger n
  // 16'h4000 | n             : level n {rst_bit, set_bit, pol, en} in [9:0]
  // 16'h8000 | index         : data buffer byte (read)

endpackage
