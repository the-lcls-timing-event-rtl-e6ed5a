// EVG sequence RAM, two banks.
//
// Each bank holds DEPTH entries of {TS_W-bit timestamp, 8-bit event code}.
// Two banks let the CPU set up the next sequence in one while the other is
// broadcast.  The CPU writes one field of one entry per write (wsel_code
// picks the event code, else the timestamp).  The send control reads entry
// raddr of bank rbank; rd_ts and rd_code appear one clock after the address
// (synchronous read, so the banks map onto block RAM).  Banks, depth and field
// widths follow the EVG description; the write interface is this design's.
module evg_sequence_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned TS_W  = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            we,
  input  logic            wbank,
  input  logic            wsel_code,
  input  logic [AW-1:0]   waddr,
  input  logic [31:0]     wdata,
  input  logic            rbank,
  input  logic [AW-1:0]   raddr,
  output logic [TS_W-1:0] rd_ts,
  output logic [7:0]      rd_code
);

  logic [TS_W-1:0] ts_mem   [2*DEPTH];
  logic [7:0]      code_mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (we && !wsel_code) ts_mem[{wbank, waddr}] <= wdata[TS_W-1:0];
    if (we &&  wsel_code) code_mem[{wbank, waddr}] <= wdata[7:0];
    rd_ts   <= ts_mem[{rbank, raddr}];
    rd_code <= code_mem[{rbank, raddr}];
  end

endmodule
