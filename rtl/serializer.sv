// serializer: parallel-to-serial converter of the transmitter.
//
// At a word boundary (load together with bit_tick) it takes the 6-bit word
// from the register group; on every other bit_tick it shifts the word left,
// so dout carries the word MSB first, one bit per bit period (OVS clkin
// cycles). dout is driven straight from a flip-flop. The document gives the
// function; the MSB-first order is this design's choice.
module serializer
  import fso_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   bit_tick,
  input  logic   load,
  input  code6_t datain,
  output logic   dout
);
  code6_t sh;

  assign dout = sh[5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= 6'b0;
    else if (bit_tick) sh <= load ? datain : {sh[4:0], 1'b0};
  end
endmodule
