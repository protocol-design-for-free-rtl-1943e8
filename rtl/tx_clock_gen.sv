// tx_clock_gen: timing of the transmitting protocol.
//
// The transmitter works on one clock, clkin. This block divides it into the
// three rates the protocol needs: a bit period of OVS clkin cycles ("clk"),
// a 6-bit word period ("clk6") and a 12-bit byte period ("clk12"), one byte
// being two code words. The rates are delivered as single-cycle enables on
// clkin, which keeps the whole transmitter in one clock domain:
//   bit_tick   - last clkin cycle of a bit; the serializer moves on after it
//   word_tick  - bit_tick of bit 5, the last bit of a word
//   byte_tick  - word_tick of the second word of a byte period
//   bit_idx    - which bit (0..5) of the word is on the line
// clk6 and clk12 are also given as square waves (high in the first half of
// their period); clk12 is the reference the receiver uses to time its
// requests to the transmitter. The document names the three clocks; the
// enable form and OVS are this design's choice (OVS = 4 lets the receiver
// recover the bit phase by 4x oversampling).
module tx_clock_gen #(
  parameter int unsigned OVS = 4
) (
  input  logic       clkin,
  input  logic       rst_n,
  output logic       bit_tick,
  output logic [2:0] bit_idx,
  output logic       word_tick,
  output logic       byte_tick,
  output logic       clk6,
  output logic       clk12
);
  localparam int unsigned DW = (OVS > 1) ? $clog2(OVS) : 1;

  logic [DW-1:0] div;
  logic          word_idx;

  assign bit_tick  = (div == DW'(OVS - 1));
  assign word_tick = bit_tick && (bit_idx == 3'd5);
  assign byte_tick = word_tick && word_idx;
  assign clk6      = (bit_idx < 3'd3);
  assign clk12     = ~word_idx;

  always_ff @(posedge clkin or negedge rst_n) begin
    if (!rst_n) begin
      div      <= '0;
      bit_idx  <= 3'd0;
      word_idx <= 1'b0;
    end else begin
      div <= bit_tick ? '0 : div + 1'b1;
      if (bit_tick) begin
        bit_idx <= (bit_idx == 3'd5) ? 3'd0 : bit_idx + 3'd1;
        if (bit_idx == 3'd5) word_idx <= ~word_idx;
      end
    end
  end

  initial assert (OVS >= 2) else $error("OVS must be at least 2");
endmodule
