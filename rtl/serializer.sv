// Link serializer: 8b10b encoding and 20:1 parallel-to-serial conversion.
//
// In the 119 MHz word clock domain the upper and lower bytes of each link word
// are 8b10b encoded, the running disparity passing from the upper symbol to
// the lower one and on to the next word, and the 20-bit result is registered.
// In the bit clock domain a shift register loads that result every 20 bit
// clocks and sends it MSB first: upper symbol, bit 'a' first.  bitclk must be
// exactly 20 x clk and phase locked to it (an analog transmit PLL provides it);
// 20 bits x 119 MHz gives the link's 2.38 Gb/s.  The bit order and the use of
// a free-running load counter are this design's choices.
//
// Timing: the first bit of a word appears on `serial` 1 to 20 bit clocks after
// the clk edge that registers the encoded word (one clk after `word` is
// presented), at an offset fixed from reset on.
module serializer (
  input  logic        clk,
  input  logic        bitclk,
  input  logic        rst,
  input  logic [15:0] word,
  input  logic [1:0]  kflags,
  output logic        serial
);

  logic [9:0]  c_hi, c_lo;
  logic        rd, rd_mid, rd_next;
  logic [19:0] enc_q;
  logic [19:0] shreg;
  logic [4:0]  bcnt;

  enc8b10b u_enc_hi (.din(word[15:8]), .k(kflags[1]), .rd_in(rd),     .dout(c_hi), .rd_out(rd_mid));
  enc8b10b u_enc_lo (.din(word[7:0]),  .k(kflags[0]), .rd_in(rd_mid), .dout(c_lo), .rd_out(rd_next));

  always_ff @(posedge clk) begin
    if (rst) begin
      rd    <= 1'b1;
      enc_q <= {10'b0011111010, 10'b1100001011};   // K28.5 (RD-), K28.0 (RD+)
    end else begin
      rd    <= rd_next;
      enc_q <= {c_hi, c_lo};
    end
  end

  always_ff @(posedge bitclk) begin
    if (rst) begin
      bcnt  <= '0;
      shreg <= '0;
    end else begin
      bcnt  <= (bcnt == 5'd19) ? 5'd0 : bcnt + 1'b1;
      shreg <= (bcnt == 5'd19) ? enc_q : {shreg[18:0], 1'b0};
    end
  end

  assign serial = shreg[19];

endmodule
