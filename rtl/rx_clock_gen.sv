// rx_clock_gen: bit and word timing of the receiving protocol.
//
// The receiver's clkin runs at nominally the same rate as the far
// transmitter's but from another oscillator (the tested offsets are about
// +-3 %). The serial line, already synchronised to clkin, is oversampled:
// a phase counter of OVS states restarts at every transition of the line and
// the bit is sampled OVS/2 cycles after it, in the middle of the bit
// (bit_tick, the "sampling clock in actual use"). Between transitions the
// counter free-runs, so runs of equal bits keep their timing.
// A bit counter 0..5 marks the last bit of each 6-bit word (word_tick). Its
// phase is free until the streamfilter finds the power-modify stream and
// pulses align, in the cycle after the bit_tick that completed a 111000
// word: the counter then restarts so that the next sampled bit is bit 0 of a
// word. The document states that the streamfilter forces the clock generator
// to synchronise with the power-modify sequence; the oversampling scheme is
// this design's own.
module rx_clock_gen #(
  parameter int unsigned OVS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic align,
  output logic bit_tick,
  output logic word_tick
);
  localparam int unsigned DW = (OVS > 1) ? $clog2(OVS) : 1;

  logic          prev;
  logic [DW-1:0] ph, ph_eff;
  logic [2:0]    bit_idx;

  assign ph_eff    = (din != prev) ? '0 : ph;
  assign bit_tick  = (ph_eff == DW'(OVS / 2));
  assign word_tick = bit_tick && (bit_idx == 3'd5);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev    <= 1'b0;
      ph      <= '0;
      bit_idx <= 3'd0;
    end else begin
      prev <= din;
      ph   <= (ph_eff == DW'(OVS - 1)) ? '0 : ph_eff + 1'b1;
      if (align)
        bit_idx <= 3'd0;
      else if (bit_tick)
        bit_idx <= (bit_idx == 3'd5) ? 3'd0 : bit_idx + 3'd1;
    end
  end

  initial assert (OVS >= 2) else $error("OVS must be at least 2");
endmodule
