// fso_transmitter: the transmitting protocol of one FSO terminal.
//
// Bytes written into the input FIFO (8 bits x FIFO_DEPTH, written on
// dataclk) are coded two nibbles at a time into 6-bit words and sent MSB
// first on dataout, one bit every OVS clkin cycles. Between bytes the output
// manager may insert the stoprec/startrec command words asked for by the
// local receiver; with nothing to send the line carries the power-modify word
// 111000. The six sub-blocks and their names follow the document: clock
// generator, FIFO, coder, register group, output management unit,
// serializer.
//
// Word pipeline, all on clkin, per 6-bit slot: the output manager decides at
// the end of bit 2 of the word on the line, the register group latches the
// choice in the next cycle (before the coder, told that a code was taken,
// can overwrite it), and the serializer starts the new word after bit 5. A byte therefore
// takes 12 bit periods on the line, and the link carries at most
// clkin / (12 * OVS) bytes per second.
//
// Interface to the local receiver: stoptrans (level), stoprec and startrec
// (one byte period long each) come in from the receiver's clock domain and
// clk12 goes out to it; see output_mng for the timing. As in the document's
// transmitter diagram, the word clock clk6 is brought out as well: a square
// wave of one word period, high for bits 0-2, rising when a word starts.
// clk12 rises with every second rising edge of clk6, at the start of a byte.
module fso_transmitter
  import fso_pkg::*;
#(
  parameter int unsigned OVS        = 4,
  parameter int unsigned FIFO_DEPTH = 1014
) (
  input  logic       clkin,
  input  logic       rst_n,
  input  logic       dataclk,
  input  logic       wrreq,
  input  logic [7:0] datain,
  output logic       fifofull,
  input  logic       stoptrans,
  input  logic       stoprec,
  input  logic       startrec,
  output logic       clk6,
  output logic       clk12,
  output logic       dataout
);
  logic       bit_tick, word_tick, byte_tick;
  logic [2:0] bit_idx;
  logic       rdreq, rdempty;
  logic [7:0] q;
  logic       codcon, hon, lon, take_h, take_l;
  logic       decide, load_q;
  code6_t     codregh, codregl, regout;
  regsel_e    regcon;

  // decide during bit 2 of the word on the line; the register group takes
  // the choice one cycle later, before the coder can refill its registers
  assign decide = bit_tick && (bit_idx == 3'd2);
  always_ff @(posedge clkin or negedge rst_n) begin
    if (!rst_n) load_q <= 1'b0;
    else        load_q <= decide;
  end

  tx_clock_gen #(.OVS(OVS)) u_clock_generate (
    .clkin(clkin), .rst_n(rst_n), .bit_tick(bit_tick), .bit_idx(bit_idx),
    .word_tick(word_tick), .byte_tick(byte_tick), .clk6(clk6), .clk12(clk12)
  );

  async_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_mainfifo (
    .wrclk(dataclk), .wrst_n(rst_n), .wrreq(wrreq), .data(datain), .wrfull(fifofull), .wrafull(),
    .rdclk(clkin), .rrst_n(rst_n), .rdreq(rdreq), .q(q), .rdempty(rdempty)
  );

  encoder_4b6b u_encoder (
    .clk(clkin), .rst_n(rst_n), .control(codcon), .fifoempty(rdempty), .datain(q),
    .fetchclk(rdreq), .hon(hon), .lon(lon), .take_h(take_h), .take_l(take_l),
    .codregh(codregh), .codregl(codregl)
  );

  output_mng u_putmng (
    .clk(clkin), .rst_n(rst_n), .decide(decide), .byte_tick(byte_tick),
    .stoptrans(stoptrans), .stoprec(stoprec), .startrec(startrec),
    .hon(hon), .lon(lon), .fifoempty(rdempty),
    .codcon(codcon), .regcon(regcon), .take_h(take_h), .take_l(take_l)
  );

  register_group u_register (
    .clk(clkin), .rst_n(rst_n), .load(load_q),
    .codregh(codregh), .codregl(codregl), .con(regcon), .regout(regout)
  );

  serializer u_serilizer (
    .clk(clkin), .rst_n(rst_n), .bit_tick(bit_tick), .load(word_tick),
    .datain(regout), .dout(dataout)
  );
endmodule
