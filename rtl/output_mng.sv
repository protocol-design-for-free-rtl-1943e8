// output_mng: output management unit ("putmng"), the core of the transmitter.
//
// Once per 6-bit slot (decide strobe) it chooses what the transmitter sends
// next and drives the register group's select (regcon):
//   1. the low-nibble code of a byte whose high code has just gone out,
//   2. a stoprec command, when the local receiver has asked for one,
//   3. a startrec command, when the local receiver has asked for one,
//   4. the high-nibble code of the next byte, if user data may be sent,
//   5. otherwise the power-modify word 111000.
// User data may be sent when the local receiver is ready (the last request
// from it was startrec, not stoprec) and the far end is ready (stoptrans low).
// The document gives this behaviour: a stoprec request stops user data and
// sends a stoprec command; stoptrans stops user data. The priority order and
// the "ready" bookkeeping are this design's.
//
// stoptrans, stoprec and startrec come from the receiver, which runs on its
// own clock and changes them just after a rising edge of this transmitter's
// clk12, holding each for a whole byte period. They pass two-flop
// synchronisers here and are sampled once per byte period (byte_tick), so
// each request is seen exactly once. codcon tells the coder it may fetch
// bytes; take_h/take_l tell it a code was used.
module output_mng
  import fso_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    decide,
  input  logic    byte_tick,
  input  logic    stoptrans,
  input  logic    stoprec,
  input  logic    startrec,
  input  logic    hon,
  input  logic    lon,
  input  logic    fifoempty,
  output logic    codcon,
  output regsel_e regcon,
  output logic    take_h,
  output logic    take_l
);
  logic [1:0] s_stoptrans, s_stoprec, s_startrec;
  logic       remote_stop;    // far end not ready (stoptrans sampled)
  logic       local_ok;       // local receiver ready
  logic       pend_stoprec, pend_startrec;
  logic       data_ok;

  assign data_ok = local_ok && !remote_stop;
  assign codcon  = data_ok && !fifoempty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_stoptrans   <= 2'b11;
      s_stoprec     <= 2'b00;
      s_startrec    <= 2'b00;
      remote_stop   <= 1'b1;
      local_ok      <= 1'b0;
      pend_stoprec  <= 1'b0;
      pend_startrec <= 1'b0;
      regcon        <= SEL_IDLE;
      take_h        <= 1'b0;
      take_l        <= 1'b0;
    end else begin
      s_stoptrans <= {s_stoptrans[0], stoptrans};
      s_stoprec   <= {s_stoprec[0], stoprec};
      s_startrec  <= {s_startrec[0], startrec};
      take_h      <= 1'b0;
      take_l      <= 1'b0;

      if (byte_tick) begin
        remote_stop <= s_stoptrans[1];
        if (s_stoprec[1]) begin
          pend_stoprec <= 1'b1;
          local_ok     <= 1'b0;
        end else if (s_startrec[1]) begin
          pend_startrec <= 1'b1;
          local_ok      <= 1'b1;
        end
      end

      if (decide) begin
        if (lon && !hon) begin
          regcon <= SEL_LOW;
          take_l <= 1'b1;
        end else if (pend_stoprec) begin
          regcon       <= SEL_STOPREC;
          pend_stoprec <= 1'b0;
        end else if (pend_startrec) begin
          regcon        <= SEL_STARTREC;
          pend_startrec <= 1'b0;
        end else if (data_ok && hon) begin
          regcon <= SEL_HIGH;
          take_h <= 1'b1;
        end else begin
          regcon <= SEL_IDLE;
        end
      end
    end
  end
endmodule
