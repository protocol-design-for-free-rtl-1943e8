// tb_fso_receiver: the receiving protocol at its defaults. A model of the far
// transmitter sends 6-bit words (MSB first) at a bit rate 3 % above the
// receiver's nominal rate: power-modify words, a startrec command, 300
// coded bytes, a stoprec command, an invalid word in the middle of more
// bytes, and power-modify words again. A clk12 model of the local
// transmitter counts the startrec/stoprec requests. Checks: lock and a
// startrec request; stoptrans falls after the startrec command and rises
// after the stoprec command; the 300 bytes come out of the FIFO exactly; the
// invalid word gives sper, an error entry and a stoprec request; the
// power-modify words then restore the lock and a startrec request follows.
`timescale 1ns/1ps
module tb_fso_receiver;
  logic clk = 0, tclk = 0, oclk = 0, rst_n = 0;
  logic serial_in = 0, transclk12 = 0, rdreq = 0;
  logic [8:0] rdata;
  logic rdempty, stoptrans, stoprec, startrec, syncindi, sper, syncer, dser;
  int checks = 0, failures = 0;

  localparam logic [5:0] TABLE [16] = '{
    6'b001011, 6'b001101, 6'b010011, 6'b010101, 6'b010110, 6'b011001, 6'b011010, 6'b100101,
    6'b100110, 6'b101001, 6'b101010, 6'b101100, 6'b110010, 6'b110100, 6'b100010, 6'b011101};
  localparam logic [5:0] IDLE = 6'b111000, STOPREC = 6'b001100, STARTREC = 6'b110011;

  fso_receiver dut (.clkin(clk), .rst_n(rst_n), .serial_in(serial_in), .transclk12(transclk12),
                    .rdclk_ex(oclk), .rdreq_ex(rdreq), .rdata_out(rdata), .rdempty(rdempty),
                    .stoptrans(stoptrans), .stoprec(stoprec), .startrec(startrec),
                    .syncindi(syncindi), .sper(sper), .syncer(syncer), .dser(dser));
  always #10 clk = ~clk;
  initial begin #4.1; forever #10 tclk = ~tclk; end
  always #12 oclk = ~oclk;

  // local transmitter model: clk12 and request sampling
  int tcyc = 0, n_startrec = 0, n_stoprec = 0;
  always @(posedge tclk) begin
    tcyc <= tcyc + 1;
    transclk12 <= ((tcyc + 1) % 48) < 24;
    if (tcyc % 48 == 46) begin
      if (startrec) n_startrec++;
      if (stoprec) n_stoprec++;
    end
  end

  // far transmitter model
  logic [5:0] line_q[$];
  localparam realtime TBIT = 80.0 / 1.03;
  initial begin
    #(TBIT * 0.37);
    forever begin
      logic [5:0] w;
      w = (line_q.size() > 0) ? line_q.pop_front() : IDLE;
      for (int b = 5; b >= 0; b--) begin serial_in = w[b]; #(TBIT); end
    end
  end

  // FIFO reader
  logic [8:0] got[$];
  bit rd_q = 0;
  always @(negedge oclk) begin
    if (rd_q) got.push_back(rdata);
    rdreq <= !rdempty;
    rd_q  <= !rdempty;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_words(input int n);
    #(TBIT * 6 * n);
  endtask

  initial begin
    logic [7:0] bytes[$];
    int e0, sp0;
    #100 rst_n = 1;
    wait_words(20);
    check(syncindi && !sper && !dser, "locked on the power-modify stream");
    wait_words(8);
    check(n_startrec >= 1, "startrec request after lock");
    check(stoptrans, "stoptrans high before the far end's startrec");
    line_q.push_back(STARTREC);
    wait_words(20);
    check(!stoptrans, "stoptrans low after the startrec command");
    for (int i = 0; i < 300; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      bytes.push_back(b);
      line_q.push_back(TABLE[b[7:4]]); line_q.push_back(TABLE[b[3:0]]);
      if (i % 37 == 36) line_q.push_back(IDLE);
    end
    line_q.push_back(STOPREC);
    wait (line_q.size() == 0);
    wait_words(20);
    check(stoptrans, "stoptrans high after the stoprec command");
    check(got.size() == 300, $sformatf("300 entries received (%0d)", got.size()));
    for (int i = 0; i < got.size() && i < 300; i++)
      check(got[i] == {1'b0, bytes[i]}, $sformatf("entry %0d: %03h exp %03h", i, got[i], {1'b0, bytes[i]}));
    // error in the middle of data
    got.delete();
    sp0 = n_stoprec;
    repeat (5) line_q.push_back(TABLE[$urandom % 16]);
    line_q.push_back(6'b000000);
    repeat (10) line_q.push_back(TABLE[$urandom % 16]);
    wait (line_q.size() == 0);
    wait_words(2);
    check(sper && syncindi, "invalid word: sper");
    wait_words(10);
    check(n_stoprec > sp0, "stoprec request after the error");
    e0 = 0;
    foreach (got[i]) if (got[i][8]) e0++;
    check(e0 >= 1, "error entry written");
    check(got.size() == 3, $sformatf("two bytes and one error entry (%0d)", got.size()));
    // power-modify words restore the lock
    sp0 = n_startrec;
    wait_words(40);
    check(!sper && syncindi, "error cleared by power-modify words");
    check(n_startrec > sp0, "startrec request after recovery");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
