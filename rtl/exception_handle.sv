// exception_handle: turns the receiver's state into requests to the local
// transmitter.
//
// The local receiver is "ready" while the streamfilter enables decoding
// (fifoen) and the receive FIFO is not nearly full (fifofull). Requests:
//   startrec - the receiver is ready; the transmitter sends a startrec
//              command so the far end may send user data;
//   stoprec  - the receiver is not ready; the transmitter stops its own
//              user data and sends a stoprec command so the far end stops;
//   stoptrans- level: the far end is not ready (its last command was
//              stoprec, or none came yet) or a long-term error (dser) was
//              detected; the transmitter sends no user data.
// Received commands are taken from the aligned words (pldata) marked by
// frameindi. startrec/stoprec are sent when readiness changes and repeated
// every CMD_PERIOD byte periods, so a command lost on the link is resent.
// All three outputs change only just after a rising edge of the
// transmitter's clk12 (transclk12, resynchronised here) and each startrec or
// stoprec lasts exactly one clk12 period, so the transmitter, sampling once
// per period, sees each request once. The roles of the three signals are the
// document's; the repetition, the FIFO threshold and the timing scheme are
// this design's.
module exception_handle
  import fso_pkg::*;
#(
  parameter int unsigned CMD_PERIOD = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   transclk12,
  input  code6_t pldata,
  input  logic   frameindi,
  input  logic   fifoen,
  input  logic   dser,
  input  logic   fifofull,
  output logic   stoprec,
  output logic   startrec,
  output logic   stoptrans
);
  localparam int unsigned CW = (CMD_PERIOD > 1) ? $clog2(CMD_PERIOD) : 1;

  logic [2:0]    s_clk12;
  logic          rise;
  logic          ready, last_ready, remote_stop;
  logic [CW-1:0] cnt;

  assign rise  = s_clk12[1] && !s_clk12[2];
  assign ready = fifoen && !fifofull;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_clk12     <= 3'b000;
      remote_stop <= 1'b1;
      last_ready  <= 1'b0;
      cnt         <= '0;
      stoprec     <= 1'b0;
      startrec    <= 1'b0;
      stoptrans   <= 1'b1;
    end else begin
      s_clk12 <= {s_clk12[1:0], transclk12};

      if (frameindi && pldata == CODE_STOPREC)  remote_stop <= 1'b1;
      if (frameindi && pldata == CODE_STARTREC) remote_stop <= 1'b0;

      if (rise) begin
        stoptrans <= remote_stop || dser;
        if (ready != last_ready || cnt == CW'(CMD_PERIOD - 1)) begin
          stoprec    <= !ready;
          startrec   <= ready;
          last_ready <= ready;
          cnt        <= '0;
        end else begin
          stoprec  <= 1'b0;
          startrec <= 1'b0;
          cnt      <= cnt + 1'b1;
        end
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) !(stoprec && startrec));
endmodule
