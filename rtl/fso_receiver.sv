// fso_receiver: the receiving protocol of one FSO terminal ("datain_entire").
//
// The serial line from the limiting amplifier is synchronised to clkin and
// oversampled by the clock generator, which recovers one sample per bit.
// The deserializer ("parellel") builds 6-bit words; the streamfilter finds
// the power-modify stream, fixes the word phase and judges every word; the
// decode block turns pairs of data words back into bytes and writes them,
// with an error bit, into the receive FIFO, which the user reads as
// rdata_out[8:0] on rdclk_ex. The exception-handle block watches the
// streamfilter and the FIFO and the command words coming in, and asks the
// local transmitter (stoprec, startrec, stoptrans) to tell the far end what
// to do. Block split and signal names follow the document's receiver
// diagram; the recovery sequence is:
//   error seen -> decoder/FIFO off, stoprec command sent -> far end stops
//   user data and sends power-modify words -> re-synchronised, flags cleared
//   -> startrec command sent -> far end resumes.
// syncindi (word phase known) and the error flags sper, syncer and dser are
// brought out as link status. The receive FIFO signals "full" to the exception handler AFULL_MARGIN
// entries early so that the far end stops before any byte is dropped.
module fso_receiver
  import fso_pkg::*;
#(
  parameter int unsigned OVS            = 4,
  parameter int unsigned FIFO_DEPTH     = 1014,
  parameter int unsigned AFULL_MARGIN   = 32,
  parameter int unsigned SYNC_WORDS     = 4,
  parameter int unsigned LONG_ERR_WORDS = 16,
  parameter int unsigned CMD_PERIOD     = 16
) (
  input  logic       clkin,
  input  logic       rst_n,
  input  logic       serial_in,
  input  logic       transclk12,
  input  logic       rdclk_ex,
  input  logic       rdreq_ex,
  output logic [8:0] rdata_out,
  output logic       rdempty,
  output logic       stoptrans,
  output logic       stoprec,
  output logic       startrec,
  output logic       syncindi,
  output logic       sper,
  output logic       syncer,
  output logic       dser
);
  logic [1:0] s_in;
  logic       din;
  logic       bit_tick, word_tick, align;
  code6_t     pdmnt, pdata;
  logic       pdmnt_valid, pdata_valid;
  logic       frameindi, fifoen;
  logic [7:0] rcdata;
  logic       erind, wrreq, full_to_mng;

  always_ff @(posedge clkin or negedge rst_n) begin
    if (!rst_n) s_in <= 2'b00;
    else        s_in <= {s_in[0], serial_in};
  end
  assign din = s_in[1];

  rx_clock_gen #(.OVS(OVS)) u_clock_generate (
    .clk(clkin), .rst_n(rst_n), .din(din), .align(align),
    .bit_tick(bit_tick), .word_tick(word_tick)
  );

  deserializer u_parellel (
    .clk(clkin), .rst_n(rst_n), .din(din), .bit_tick(bit_tick), .word_tick(word_tick),
    .pdmnt(pdmnt), .pdmnt_valid(pdmnt_valid), .pdata(pdata), .pdata_valid(pdata_valid)
  );

  streamfilter #(.SYNC_WORDS(SYNC_WORDS), .LONG_ERR_WORDS(LONG_ERR_WORDS)) u_streamfilter (
    .clk(clkin), .rst_n(rst_n), .datamoni(pdmnt), .datamoni_valid(pdmnt_valid),
    .pldata(pdata), .pldata_valid(pdata_valid), .align(align),
    .sper(sper), .syncer(syncer), .dser(dser), .frameindi(frameindi),
    .syncindi(syncindi), .fifoen(fifoen)
  );

  decoder_6b4b u_decode (
    .clk(clkin), .rst_n(rst_n), .pdin(pdata), .pvalid(pdata_valid), .en(fifoen),
    .dcdata(rcdata), .erind(erind), .wrreq(wrreq)
  );

  async_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH), .AFULL_MARGIN(AFULL_MARGIN)) u_recfifo (
    .wrclk(clkin), .wrst_n(rst_n), .wrreq(wrreq), .data({erind, rcdata}),
    .wrfull(), .wrafull(full_to_mng),
    .rdclk(rdclk_ex), .rrst_n(rst_n), .rdreq(rdreq_ex), .q(rdata_out), .rdempty(rdempty)
  );

  exception_handle #(.CMD_PERIOD(CMD_PERIOD)) u_exception_handle (
    .clk(clkin), .rst_n(rst_n), .transclk12(transclk12), .pldata(pdata),
    .frameindi(frameindi), .fifoen(fifoen), .dser(dser), .fifofull(full_to_mng),
    .stoprec(stoprec), .startrec(startrec), .stoptrans(stoptrans)
  );
endmodule
