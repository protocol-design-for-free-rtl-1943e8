// encoder_4b6b: the transmitter's coder.
//
// Reads one byte from the transmit FIFO, splits it into its high and low
// nibble and turns each into a 6-bit code word (fso_pkg::enc4b6b), held in
// codregh and codregl for the register group. As in the document, the byte is
// read out and divided into two 4-bit groups that are coded separately. How
// the coder talks to the FIFO and the output manager is this design's own:
//   control  - level from the output manager: a new byte may be fetched
//   fetchclk - one-cycle FIFO read request; the byte arrives one cycle later
//   hon/lon  - codregh / codregl hold a code that has not been sent yet
//   take_h/l - the output manager has taken that code
// A new byte is fetched only when both code registers are used up, so the
// FIFO is read exactly once per byte sent.
module encoder_4b6b
  import fso_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       control,
  input  logic       fifoempty,
  input  logic [7:0] datain,
  output logic       fetchclk,
  output logic       hon,
  output logic       lon,
  input  logic       take_h,
  input  logic       take_l,
  output code6_t     codregh,
  output code6_t     codregl
);
  logic pending;  // a FIFO read is in flight

  assign fetchclk = control && !fifoempty && !hon && !lon && !pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      hon     <= 1'b0;
      lon     <= 1'b0;
      codregh <= CODE_IDLE;
      codregl <= CODE_IDLE;
    end else begin
      pending <= fetchclk;
      if (pending) begin
        codregh <= enc4b6b(datain[7:4]);
        codregl <= enc4b6b(datain[3:0]);
        hon     <= 1'b1;
        lon     <= 1'b1;
      end else begin
        if (take_h) hon <= 1'b0;
        if (take_l) lon <= 1'b0;
      end
    end
  end

  // The output manager never takes a code that is not there.
  a_take_h: assert property (@(posedge clk) disable iff (!rst_n) take_h |-> hon);
  a_take_l: assert property (@(posedge clk) disable iff (!rst_n) take_l |-> lon && !hon);
endmodule
