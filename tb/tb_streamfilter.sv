// tb_streamfilter: drives the streamfilter from a bit-stream model of the
// deserializer (a bit every 4 cycles, a 6-bit word counter that restarts on
// align) and walks it through its states: hunting in random bits, locking
// on four power-modify words at an arbitrary bit offset, data while locked,
// a single invalid word (sper, decoder shut off), recovery on power-modify
// words, sixteen invalid words (dser, lock lost), re-locking, and a two-bit
// slip of the stream (syncer, lock moved to the new phase).
`timescale 1ns/1ps
module tb_streamfilter;
  logic clk = 0, rst_n = 0;
  logic [5:0] datamoni = 0, pldata = 0;
  logic datamoni_valid = 0, pldata_valid = 0;
  logic align, sper, syncer, dser, frameindi, syncindi, fifoen;
  int checks = 0, failures = 0;

  streamfilter dut (.clk(clk), .rst_n(rst_n), .datamoni(datamoni), .datamoni_valid(datamoni_valid),
                    .pldata(pldata), .pldata_valid(pldata_valid), .align(align), .sper(sper),
                    .syncer(syncer), .dser(dser), .frameindi(frameindi), .syncindi(syncindi), .fifoen(fifoen));
  always #5 clk = ~clk;

  localparam logic [5:0] IDLE = 6'b111000;
  localparam logic [5:0] DATA [4] = '{6'b001011, 6'b010101, 6'b101100, 6'b011101};

  // bit source and deserializer model
  bit bits[$];
  int idx = 0, cyc = 0, n_align = 0, n_frame = 0;
  logic [5:0] win = 0;
  always @(posedge clk) begin
    datamoni_valid <= 0;
    pldata_valid   <= 0;
    if (align) begin idx <= 0; n_align++; end
    if (frameindi) n_frame++;
    if (rst_n) begin
      cyc <= cyc + 1;
      if (cyc % 4 == 3 && bits.size() > 0) begin
        logic [5:0] w;
        w = {win[4:0], bits[0]};
        void'(bits.pop_front());
        win <= w;
        datamoni <= w; datamoni_valid <= 1;
        if (!align) begin
          if (idx == 5) begin pldata <= w; pldata_valid <= 1; idx <= 0; end
          else idx <= idx + 1;
        end
      end
    end
  end

  task automatic put_word(input logic [5:0] w);
    for (int b = 5; b >= 0; b--) bits.push_back(w[b]);
  endtask
  task automatic put_words(input logic [5:0] w, input int n);
    repeat (n) put_word(w);
  endtask
  task automatic drain();
    while (bits.size() > 0) @(negedge clk);
    repeat (8) @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int f0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1: data words only (no power-modify stream): stays hunting
    repeat (20) put_word(DATA[$urandom % 4]);
    drain();
    check(!syncindi && !fifoen && n_align == 0, "no lock without power-modify words");
    // 2: three extra bits, then power-modify words
    repeat (3) bits.push_back(1'($urandom));
    put_words(IDLE, 3);
    drain();
    check(!syncindi, "three power-modify words are not enough");
    put_words(IDLE, 3);
    drain();
    check(syncindi && fifoen && n_align == 1, "locked after four power-modify words");
    check(!sper && !syncer && !dser, "flags clear after lock");
    check(pldata == IDLE, "word phase on the power-modify word");
    // 3: data while locked
    f0 = n_frame;
    repeat (30) put_word(DATA[$urandom % 4]);
    drain();
    check(fifoen && !sper && n_frame - f0 == 30, $sformatf("30 data words framed (%0d)", n_frame - f0));
    // 4: one invalid word: short-term error
    put_word(6'b000000);
    put_words(DATA[1], 3);
    drain();
    check(sper && !fifoen && syncindi && !dser, "invalid word gives sper and shuts decoding");
    // 5: power-modify words end the error
    put_words(IDLE, 3);
    drain();
    check(sper && !fifoen, "three power-modify words do not yet end the error");
    put_words(IDLE, 1);
    drain();
    check(!sper && fifoen, "four power-modify words end the error");
    // 6: long-term error
    put_word(6'b111111);
    put_words(6'b000000, 14);
    drain();
    check(!dser && syncindi, "fifteen invalid words are not yet long-term");
    put_word(6'b000000);
    drain();
    check(dser && !syncindi && !fifoen, "sixteen invalid words give dser and drop the lock");
    // 7: re-lock
    put_words(IDLE, 5);
    drain();
    check(syncindi && fifoen && !dser && n_align == 2, "re-locked, dser cleared");
    // 8: slip by two bits
    repeat (2) bits.push_back(1'b1);
    put_words(IDLE, 4);
    drain();
    check(syncer && !fifoen && n_align == 3, "slip: syncer, lock moved");
    put_words(IDLE, 4);
    drain();
    check(!syncer && fifoen && pldata == IDLE, "aligned again after the slip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
