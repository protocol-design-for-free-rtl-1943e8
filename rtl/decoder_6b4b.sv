// decoder_6b4b: the receiver's decode block.
//
// Takes each aligned 6-bit word while the streamfilter enables decoding (en,
// the streamfilter's fifoen) and rebuilds bytes: a data word followed
// directly by a second data word is the high and the low nibble of one byte,
// written to the receive FIFO as {erind=0, byte}. Power-modify and command
// words are not written. An invalid word, or a high nibble whose low nibble
// never came, is written as one error entry {erind=1, 8'h00}, so the reader
// of the FIFO sees where data was lost. The entry appears on dcdata/erind
// with a one-cycle wrreq, one cycle after pvalid. The document gives the
// function (decode and write into the FIFO, 9-bit entries with bit 8 as
// error indication); the pairing and the error entries are this design's.
module decoder_6b4b
  import fso_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  code6_t     pdin,
  input  logic       pvalid,
  input  logic       en,
  output logic [7:0] dcdata,
  output logic       erind,
  output logic       wrreq
);
  logic       have_h;
  logic [3:0] hnib;
  dec_t       d;

  assign d = dec6b4b(pdin);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_h <= 1'b0;
      hnib   <= 4'h0;
      dcdata <= 8'h00;
      erind  <= 1'b0;
      wrreq  <= 1'b0;
    end else begin
      wrreq <= 1'b0;
      if (!en) begin
        have_h <= 1'b0;
      end else if (pvalid) begin
        if (d.kind == W_DATA) begin
          if (!have_h) begin
            have_h <= 1'b1;
            hnib   <= d.nib;
          end else begin
            have_h <= 1'b0;
            dcdata <= {hnib, d.nib};
            erind  <= 1'b0;
            wrreq  <= 1'b1;
          end
        end else begin
          have_h <= 1'b0;
          if (d.kind == W_INVALID || have_h) begin
            dcdata <= 8'h00;
            erind  <= 1'b1;
            wrreq  <= 1'b1;
          end
        end
      end
    end
  end
endmodule
