// fso_protocol: transceiving protocol of one free-space-optical terminal.
//
// A point-to-point full-duplex laser link has no cable to carry flow control
// or a clock, and its optical receiver front end rejects DC: long runs of
// ones or zeros make it lose the signal. This protocol makes the link look
// like a pair of FIFOs to the user: bytes written into the input FIFO come
// out of the far terminal's output FIFO. On the line every byte becomes two
// 6-bit code words; an idle link carries the power-modify word 111000, which
// keeps the average optical power constant and lets the receiver find the
// word boundaries; the two terminals exchange stoprec/startrec command words
// to stop and restart each other's user data when a receiver sees errors or
// its FIFO fills up.
//
// The terminal is the transmitter and the receiver side by side, tied by
// three request signals from receiver to transmitter (stoptrans, stoprec,
// startrec) and the transmitter's byte clock clk12 back to the receiver.
// tx_clk and rx_clk are the two outputs of the terminal's PLL: same
// frequency, any phase. The far terminal runs from its own oscillator.
// input_fifo_* is written on input_fifo_clk, output_fifo_* is read on
// output_fifo_clk (one-cycle read latency); output_data_err flags an entry
// that stands for lost or corrupted data. rx_sync and the error flags
// rx_sper (short-term), rx_syncer (alignment slip) and rx_dser (long-term)
// show the receiver's state. Line rate: one bit per OVS tx_clk
// cycles, a byte per 12 bits.
module fso_protocol #(
  parameter int unsigned OVS            = 4,
  parameter int unsigned TX_FIFO_DEPTH  = 1014,
  parameter int unsigned RX_FIFO_DEPTH  = 1014,
  parameter int unsigned AFULL_MARGIN   = 32,
  parameter int unsigned SYNC_WORDS     = 4,
  parameter int unsigned LONG_ERR_WORDS = 16,
  parameter int unsigned CMD_PERIOD     = 16
) (
  input  logic       tx_clk,
  input  logic       rx_clk,
  input  logic       rst_n,
  input  logic       input_fifo_clk,
  input  logic       input_fifo_wrreq,
  input  logic [7:0] input_data,
  output logic       input_fifo_full,
  input  logic       output_fifo_clk,
  input  logic       output_fifo_rdreq,
  output logic       output_fifo_empty,
  output logic [7:0] output_data,
  output logic       output_data_err,
  input  logic       serial_from_pin,
  output logic       serial_to_LD,
  output logic       rx_sync,
  output logic       rx_sper,
  output logic       rx_syncer,
  output logic       rx_dser
);
  logic stoptrans, stoprec, startrec, clk12;

  fso_transmitter #(.OVS(OVS), .FIFO_DEPTH(TX_FIFO_DEPTH)) inst (
    .clkin(tx_clk), .rst_n(rst_n), .dataclk(input_fifo_clk), .wrreq(input_fifo_wrreq),
    .datain(input_data), .fifofull(input_fifo_full),
    .stoptrans(stoptrans), .stoprec(stoprec), .startrec(startrec),
    .clk6(), .clk12(clk12), .dataout(serial_to_LD)  // word clock not needed here
  );

  fso_receiver #(
    .OVS(OVS), .FIFO_DEPTH(RX_FIFO_DEPTH), .AFULL_MARGIN(AFULL_MARGIN),
    .SYNC_WORDS(SYNC_WORDS), .LONG_ERR_WORDS(LONG_ERR_WORDS), .CMD_PERIOD(CMD_PERIOD)
  ) inst1 (
    .clkin(rx_clk), .rst_n(rst_n), .serial_in(serial_from_pin), .transclk12(clk12),
    .rdclk_ex(output_fifo_clk), .rdreq_ex(output_fifo_rdreq),
    .rdata_out({output_data_err, output_data}), .rdempty(output_fifo_empty),
    .stoptrans(stoptrans), .stoprec(stoprec), .startrec(startrec),
    .syncindi(rx_sync), .sper(rx_sper), .syncer(rx_syncer), .dser(rx_dser)
  );
endmodule
