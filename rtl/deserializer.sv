// deserializer: serial-to-parallel converter of the receiver ("parellel").
//
// On every bit_tick it shifts the line into a 6-bit window, newest bit in
// bit 0. The window is offered every bit as pdmnt (the streamfilter's
// "datamoni", used to hunt for the power-modify pattern at any phase), and at
// each word_tick it is also captured as the aligned word pdata (the
// streamfilter's and decoder's "pldata"). Both are valid, with their
// *_valid strobe, in the clkin cycle after the tick.
module deserializer
  import fso_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   din,
  input  logic   bit_tick,
  input  logic   word_tick,
  output code6_t pdmnt,
  output logic   pdmnt_valid,
  output code6_t pdata,
  output logic   pdata_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pdmnt       <= '0;
      pdmnt_valid <= 1'b0;
      pdata       <= '0;
      pdata_valid <= 1'b0;
    end else begin
      pdmnt_valid <= bit_tick;
      pdata_valid <= word_tick;
      if (bit_tick) pdmnt <= {pdmnt[4:0], din};
      if (word_tick) pdata <= {pdmnt[4:0], din};
    end
  end
endmodule
