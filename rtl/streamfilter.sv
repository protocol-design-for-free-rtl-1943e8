// streamfilter: synchronisation and health monitor of the receiver.
//
// It watches the received stream in two ways. Bit by bit (datamoni, the
// sliding 6-bit window) it looks for the power-modify word 111000 repeating
// every 6 bits; SYNC_WORDS such words in a row mark the word boundary. Word
// by word (pldata, the aligned word) it classifies each word with
// fso_pkg::dec6b4b. Three states:
//   HUNT   - word phase unknown (syncindi low). On SYNC_WORDS power-modify
//            words in a row it pulses align (the clock generator restarts
//            its word counter) and goes to SYNCED, clearing all error flags.
//   SYNCED - decoder and receive FIFO enabled (fifoen), frameindi marks each
//            word. An invalid word is a short-term error: sper is set and
//            the state becomes ERR.
//   ERR    - decoder and FIFO shut off. SYNC_WORDS aligned power-modify
//            words in a row end the error (flags cleared, back to SYNCED).
//            LONG_ERR_WORDS invalid words with no power-modify word between
//            them are a long-term error: dser is set and the phase is
//            dropped (HUNT).
// In SYNCED and ERR a run of SYNC_WORDS power-modify words at another bit
// phase means the word alignment has slipped: syncer is set, the word phase
// is moved to the run (align) and the state becomes ERR.
// The document names the flags, says that short- and long-term errors shut
// the decoder and FIFO down, that a long-term error is error data with no
// power-modify signal, and that the flags are cleared when synchronisation
// finishes. The state machine, the counts and the meaning given to syncer
// are this design's.
module streamfilter
  import fso_pkg::*;
#(
  parameter int unsigned SYNC_WORDS     = 4,
  parameter int unsigned LONG_ERR_WORDS = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  code6_t datamoni,
  input  logic   datamoni_valid,
  input  code6_t pldata,
  input  logic   pldata_valid,
  output logic   align,
  output logic   sper,
  output logic   syncer,
  output logic   dser,
  output logic   frameindi,
  output logic   syncindi,
  output logic   fifoen
);
  typedef enum logic [1:0] {HUNT, SYNCED, ERR} state_e;

  localparam int unsigned RW = $clog2(SYNC_WORDS + 1);
  localparam int unsigned EW = $clog2(LONG_ERR_WORDS + 1);

  state_e        state;
  logic [2:0]    bits_since;  // bits since the last 111000 window (saturates)
  logic [RW-1:0] run;         // 111000 windows 6 bits apart, in a row
  logic [RW-1:0] run_next;
  logic [RW-1:0] idle_words;  // aligned power-modify words in a row (ERR)
  logic [EW-1:0] err_words;   // invalid words since the last power-modify word
  logic          win_idle, run_hit;
  dec_t          d;

  assign win_idle = datamoni_valid && (datamoni == CODE_IDLE);
  always_comb begin
    run_next = run;
    if (win_idle)
      run_next = (bits_since == 3'd5 && run != RW'(SYNC_WORDS)) ? run + 1'b1 :
                 (bits_since == 3'd5) ? run : RW'(1);
  end
  assign run_hit   = win_idle && (run_next == RW'(SYNC_WORDS));
  assign d         = dec6b4b(pldata);
  assign syncindi  = (state != HUNT);
  assign fifoen    = (state == SYNCED);
  assign frameindi = pldata_valid && (state == SYNCED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= HUNT;
      bits_since <= 3'd7;
      run        <= '0;
      idle_words <= '0;
      err_words  <= '0;
      align      <= 1'b0;
      sper       <= 1'b0;
      syncer     <= 1'b0;
      dser       <= 1'b0;
    end else begin
      align <= 1'b0;

      // bit-level hunt for the power-modify stream
      if (datamoni_valid) begin
        if (win_idle) begin
          bits_since <= 3'd0;
          run        <= run_next;
        end else begin
          if (bits_since != 3'd7) bits_since <= bits_since + 3'd1;
          if (bits_since >= 3'd5) run <= '0;
        end
      end

      unique case (state)
        HUNT: begin
          if (run_hit) begin
            align  <= 1'b1;
            state  <= SYNCED;
            sper   <= 1'b0;
            syncer <= 1'b0;
            dser   <= 1'b0;
          end
        end
        SYNCED, ERR: begin
          if (run_hit && !pldata_valid) begin
            // power-modify run at another phase: alignment slipped
            align      <= 1'b1;
            syncer     <= 1'b1;
            state      <= ERR;
            idle_words <= '0;
            err_words  <= '0;
          end else if (pldata_valid) begin
            if (state == SYNCED) begin
              if (d.kind == W_INVALID) begin
                sper       <= 1'b1;
                state      <= ERR;
                idle_words <= '0;
                err_words  <= EW'(1);
              end
            end else begin
              unique case (d.kind)
                W_INVALID: begin
                  idle_words <= '0;
                  if (err_words + 1'b1 >= EW'(LONG_ERR_WORDS)) begin
                    dser      <= 1'b1;
                    state     <= HUNT;
                    err_words <= '0;
                  end else begin
                    err_words <= err_words + 1'b1;
                  end
                end
                W_IDLE: begin
                  err_words <= '0;
                  if (idle_words + 1'b1 >= RW'(SYNC_WORDS)) begin
                    idle_words <= '0;
                    state      <= SYNCED;
                    sper       <= 1'b0;
                    syncer     <= 1'b0;
                    dser       <= 1'b0;
                  end else begin
                    idle_words <= idle_words + 1'b1;
                  end
                end
                default: idle_words <= '0;
              endcase
            end
          end
        end
        default: state <= HUNT;
      endcase
    end
  end

  // Clearing the error flags happens only when the phase is re-established.
  a_dser_hunt: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(dser) |-> state == HUNT);
endmodule
