// tb_output_mng: drives the output manager with a slot strobe (every 24
// cycles) and a byte strobe (every 48), a model of the coder's hon/lon
// flags, and requests from the receiver held for one byte period. Checks the
// selection order (low code right after high code, then stoprec, then
// startrec, then data, else power-modify), that user data is held back
// after a stoprec request and while stoptrans is high, and that each request
// produces exactly one command word.
`timescale 1ns/1ps
module tb_output_mng;
  import fso_pkg::*;
  logic clk = 0, rst_n = 0;
  logic decide, byte_tick;
  logic stoptrans = 1, stoprec = 0, startrec = 0;
  logic hon = 0, lon = 0, fifoempty = 1;
  logic codcon, take_h, take_l;
  regsel_e regcon;
  int checks = 0, failures = 0;
  int cyc = 0;

  output_mng dut (.clk(clk), .rst_n(rst_n), .decide(decide), .byte_tick(byte_tick),
                  .stoptrans(stoptrans), .stoprec(stoprec), .startrec(startrec),
                  .hon(hon), .lon(lon), .fifoempty(fifoempty),
                  .codcon(codcon), .regcon(regcon), .take_h(take_h), .take_l(take_l));
  always #5 clk = ~clk;

  assign decide    = rst_n && (cyc % 24 == 11);
  assign byte_tick = rst_n && (cyc % 48 == 47);
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // coder model: refills both codes 3 cycles after lon drops if codcon
  int refill = -1;
  always @(posedge clk) begin
    if (take_h) hon <= 0;
    if (take_l) lon <= 0;
    if (!hon && !lon && codcon && refill < 0) refill <= 3;
    else if (refill > 0) refill <= refill - 1;
    else if (refill == 0) begin hon <= 1; lon <= 1; refill <= -1; end
  end

  // record the sequence of selections
  regsel_e seq[$];
  always @(posedge clk) if (decide) #1 seq.push_back(regcon);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // a request held high for one byte period, starting just after a byte tick
  task automatic request(ref logic sig);
    @(posedge clk iff byte_tick);
    repeat (3) @(posedge clk);
    sig = 1;
    @(posedge clk iff byte_tick);
    repeat (3) @(posedge clk);
    sig = 0;
  endtask

  function automatic int count(regsel_e s, int from);
    int n = 0;
    for (int i = from; i < seq.size(); i++) if (seq[i] == s) n++;
    return n;
  endfunction

  initial begin
    int m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fifoempty = 0;
    // after reset: not ready, nothing but power-modify words
    repeat (48 * 6) @(negedge clk);
    check(count(SEL_IDLE, 0) == seq.size() && seq.size() > 0, "idle after reset");
    check(!codcon, "no fetch after reset");
    // startrec request: one startrec word, but data still blocked by stoptrans
    m = seq.size();
    request(startrec);
    repeat (48 * 4) @(negedge clk);
    check(count(SEL_STARTREC, m) == 1, "one startrec word per request");
    check(count(SEL_HIGH, m) == 0, "no data while stoptrans");
    // far end ready: data flows, H always followed by L
    stoptrans = 0;
    m = seq.size();
    repeat (48 * 20) @(negedge clk);
    check(count(SEL_HIGH, m) >= 15, $sformatf("data flows (%0d bytes)", count(SEL_HIGH, m)));
    for (int i = m; i + 1 < seq.size(); i++)
      if (seq[i] == SEL_HIGH) check(seq[i+1] == SEL_LOW, $sformatf("slot %0d: low code follows high code", i));
    // stoprec request: one stoprec word, data stops after the current byte
    m = seq.size();
    request(stoprec);
    repeat (48 * 2) @(negedge clk);
    check(count(SEL_STOPREC, m) == 1, "one stoprec word per request");
    m = seq.size();
    repeat (48 * 10) @(negedge clk);
    check(count(SEL_HIGH, m) == 0 && count(SEL_LOW, m) == 0, "no data after stoprec");
    check(count(SEL_IDLE, m) == seq.size() - m, "only power-modify words after stoprec");
    // both requests close together: startrec resumes data
    m = seq.size();
    request(startrec);
    repeat (48 * 10) @(negedge clk);
    check(count(SEL_STARTREC, m) == 1, "startrec word");
    check(count(SEL_HIGH, m) > 5, "data resumes after startrec");
    // stoptrans stops data
    stoptrans = 1;
    repeat (48 * 3) @(negedge clk);
    m = seq.size();
    repeat (48 * 10) @(negedge clk);
    check(count(SEL_HIGH, m) == 0, "no data while stoptrans");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
