// async_fifo: dual-clock FIFO used for the transmitter input buffer
// ("mainfifo", 8 bits x 1014 words) and the receiver output buffer
// ("recfifo", 9-bit entries).
//
// The protocol appears to the outside as a write-only FIFO plus a serial
// output and a read-only FIFO plus a serial input, so these buffers are also
// the clock-domain crossing between the user's port clocks and the protocol
// clock. The document gives the function and the 8 x 1014 size only; the
// insides are a conventional design: binary read/write pointers one bit wider
// than the address, Gray-coded copies crossing domains through two-flop
// synchronisers, and a power-of-two array of which only DEPTH entries are
// ever used (the full flag fires at DEPTH entries, so 1014 is honoured).
// Interface: write with wrreq on a rising wrclk edge while wrfull is low;
// wrafull rises AFULL_MARGIN entries before wrfull. Read with rdreq on a
// rising rdclk edge while rdempty is low; q then holds the word from the
// next cycle on (registered output). Requests against a
// full or empty FIFO are ignored. Flags are conservative: wrfull may stay
// high and rdempty may stay high for up to three cycles after the other side
// has moved.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1014,
  parameter int unsigned AFULL_MARGIN = 0
) (
  input  logic             wrclk,
  input  logic             wrst_n,
  input  logic             wrreq,
  input  logic [WIDTH-1:0] data,
  output logic             wrfull,
  output logic             wrafull,
  input  logic             rdclk,
  input  logic             rrst_n,
  input  logic             rdreq,
  output logic [WIDTH-1:0] q,
  output logic             rdempty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned PW = AW + 1;

  logic [WIDTH-1:0] mem [2**AW];

  logic [PW-1:0] wbin, wgray, rbin, rgray;
  logic [PW-1:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [PW-1:0] rbin_w, wbin_r;

  function automatic logic [PW-1:0] bin2gray(input logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PW-1:0] gray2bin(input logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic do_wr;
  assign rbin_w = gray2bin(rgray_w2);
  assign wrfull = ((wbin - rbin_w) >= PW'(DEPTH));
  assign wrafull = ((wbin - rbin_w) >= PW'(DEPTH - AFULL_MARGIN));
  assign do_wr  = wrreq && !wrfull;

  always_ff @(posedge wrclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wrclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= data;
  end

  // ---------------- read side ----------------
  logic do_rd;
  assign wbin_r  = gray2bin(wgray_r2);
  assign rdempty = (wbin_r == rbin);
  assign do_rd   = rdreq && !rdempty;

  always_ff @(posedge rdclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  always_ff @(posedge rdclk) begin
    if (do_rd) q <= mem[rbin[AW-1:0]];
  end

  initial assert (DEPTH >= 2 && DEPTH <= 2**AW && AFULL_MARGIN < DEPTH) else $error("bad DEPTH");
endmodule
