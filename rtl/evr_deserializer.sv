// EVR de-serializer: serial-to-parallel conversion with comma alignment.
//
// Bits from the fiber receiver are shifted in on the recovered bit clock.  A
// 20-bit word boundary is found from the K28.5 comma (0011111 or 1100000 in
// the first seven bits of the upper symbol), which the EVG sends whenever
// there is no event; from then on a word is taken every 20 bits.  The block
// also makes the recovered 119 MHz word clock that runs all EVR logic: it rises
// 10 bit clocks after a new word is placed on `code`, so `code` is stable
// around each rising edge.  The bit clock itself comes from an analog clock
// and data recovery circuit outside this block.  Comma alignment and the
// clock divider are this design's choices; the 16-bit word, 8b10b code and
// recovered clock follow the system description.
//
// The divider is not reset so that the word clock keeps running through reset
// (the EVR logic resets synchronously on it).  A comma that arrives off the
// current boundary realigns the divider, which can shorten one word clock
// period while the link locks.
module evr_deserializer (
  input  logic        bitclk,
  input  logic        rst,
  input  logic        serial,
  output logic        word_clk,
  output logic [19:0] code,
  output logic        locked
);

  logic [18:0] sh;
  logic [19:0] sh_n;
  logic [4:0]  cnt, cnt_n;
  logic        comma, take;

  assign sh_n  = {sh[18:0], serial};
  assign comma = (sh_n[19:13] == 7'b0011111) || (sh_n[19:13] == 7'b1100000);
  assign take  = comma || (cnt >= 5'd19);
  assign cnt_n = take ? 5'd0 : cnt + 1'b1;

  always_ff @(posedge bitclk) begin
    sh       <= sh_n[18:0];
    cnt      <= cnt_n;
    word_clk <= (cnt_n >= 5'd10);
    if (take) code <= sh_n;
  end

  always_ff @(posedge bitclk) begin
    if (rst)        locked <= 1'b0;
    else if (comma) locked <= 1'b1;
  end

endmodule
