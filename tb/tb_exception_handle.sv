// tb_exception_handle: a transmitter clk12 square wave (48-cycle period, on
// a clock of slightly different phase) and a model of the transmitter that
// samples the requests once per clk12 period, just before each rising edge.
// Checks: every output changes only just after a clk12 rising edge; each
// startrec/stoprec is seen exactly once per request; startrec when decoding
// is enabled, stoprec when it is shut off or the FIFO is nearly full, both
// repeated every 16 periods; stoptrans from reset until a startrec command
// word arrives, again on a stoprec command word or on dser.
`timescale 1ns/1ps
module tb_exception_handle;
  logic clk = 0, tclk = 0, rst_n = 0;
  logic transclk12 = 0;
  logic [5:0] pldata = 0;
  logic frameindi = 0, fifoen = 0, dser = 0, fifofull = 0;
  logic stoprec, startrec, stoptrans;
  int checks = 0, failures = 0;

  exception_handle dut (.clk(clk), .rst_n(rst_n), .transclk12(transclk12), .pldata(pldata),
                        .frameindi(frameindi), .fifoen(fifoen), .dser(dser), .fifofull(fifofull),
                        .stoprec(stoprec), .startrec(startrec), .stoptrans(stoptrans));
  always #5 clk = ~clk;
  initial begin #2.7; forever #5 tclk = ~tclk; end

  // transmitter side: clk12 and sampling just before its rising edge
  int tcyc = 0, n_startrec = 0, n_stoprec = 0;
  logic st_seen;
  always @(posedge tclk) begin
    tcyc <= tcyc + 1;
    transclk12 <= ((tcyc + 1) % 48) < 24;
    if (tcyc % 48 == 46) begin
      if (startrec) n_startrec++;
      if (stoprec) n_stoprec++;
      st_seen = stoptrans;
    end
  end

  // outputs may only change within 8 cycles after a clk12 rising edge
  int since_rise = 0;
  logic p_sr = 0, p_st = 0, p_tr = 1;
  always @(posedge clk) begin
    if (transclk12 && since_rise < 0) since_rise <= 0;
    since_rise <= transclk12 ? since_rise + 1 : -1;
    if (rst_n && (stoprec != p_sr || startrec != p_st || stoptrans != p_tr))
      check(since_rise >= 0 && since_rise < 8, $sformatf("output change %0d cycles after clk12 rise", since_rise));
    p_sr <= stoprec; p_st <= startrec; p_tr <= stoptrans;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic word(input logic [5:0] w);
    @(negedge clk); pldata = w; frameindi = 1; @(negedge clk); frameindi = 0;
  endtask
  task automatic periods(input int n);
    repeat (n * 48) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    periods(20);
    check(n_startrec == 0 && n_stoprec == 1, $sformatf("not ready: one stoprec in 20 periods (%0d/%0d)", n_stoprec, n_startrec));
    check(stoptrans, "stoptrans high after reset");
    // decoding enabled: one startrec at once, then one per 16 periods
    n_startrec = 0; n_stoprec = 0;
    fifoen = 1;
    periods(3);
    check(n_startrec == 1 && n_stoprec == 0, "startrec when decoding starts");
    periods(32);
    check(n_startrec == 3, $sformatf("startrec repeated every 16 periods (%0d)", n_startrec));
    // startrec command word from the far end clears stoptrans
    word(6'b110011);
    periods(2);
    check(!stoptrans && !st_seen, "stoptrans cleared by a startrec command");
    word(6'b001100);
    periods(2);
    check(stoptrans && st_seen, "stoptrans set by a stoprec command");
    word(6'b110011);
    periods(2);
    check(!stoptrans, "cleared again");
    // command words are ignored unless framed
    @(negedge clk); pldata = 6'b001100; repeat (3) @(negedge clk);
    periods(2);
    check(!stoptrans, "unframed word ignored");
    // FIFO nearly full
    n_startrec = 0; n_stoprec = 0;
    fifofull = 1;
    periods(3);
    check(n_stoprec == 1 && n_startrec == 0, "stoprec when the FIFO fills");
    fifofull = 0;
    periods(3);
    check(n_startrec == 1, "startrec when the FIFO has room");
    // decoding shut off
    n_startrec = 0; n_stoprec = 0;
    fifoen = 0;
    periods(3);
    check(n_stoprec == 1, "stoprec on error");
    // long-term error
    dser = 1;
    periods(2);
    check(stoptrans, "stoptrans on dser");
    dser = 0; fifoen = 1;
    periods(2);
    check(!stoptrans, "stoptrans released after dser clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
