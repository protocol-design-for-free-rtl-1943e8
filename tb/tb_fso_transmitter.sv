// tb_fso_transmitter: the transmitting protocol at its defaults (OVS = 4,
// 1014-word FIFO). A model of the receiver side drives stoptrans, stoprec
// and startrec, each change made just after a rising edge of clk12 and each
// request held for one clk12 period. The serial output is sampled in the
// middle of every bit and cut into 6-bit words with the transmitter's own
// word timing. Checks: only 111000 before the link is enabled; one startrec
// command word per request; the written bytes, coded with the table below,
// in order and without gaps inside a byte, at one byte per 12 bit periods;
// a stoprec request gives one stoprec word and stops the data; the FIFO
// full flag after 1014 writes; clk6 has a period of one word (6 x 4 x 20 ns)
// and every rising edge of clk12 comes with a rising edge of clk6.
`timescale 1ns/1ps
module tb_fso_transmitter;
  logic clk = 0, wclk = 0, rst_n = 0;
  logic wrreq = 0, fifofull, clk6, clk12, dataout;
  logic [7:0] datain = 0;
  logic stoptrans = 1, stoprec = 0, startrec = 0;
  int checks = 0, failures = 0;

  localparam logic [5:0] TABLE [16] = '{
    6'b001011, 6'b001101, 6'b010011, 6'b010101, 6'b010110, 6'b011001, 6'b011010, 6'b100101,
    6'b100110, 6'b101001, 6'b101010, 6'b101100, 6'b110010, 6'b110100, 6'b100010, 6'b011101};

  fso_transmitter dut (.clkin(clk), .rst_n(rst_n), .dataclk(wclk), .wrreq(wrreq), .datain(datain),
                       .fifofull(fifofull), .stoptrans(stoptrans), .stoprec(stoprec), .startrec(startrec),
                       .clk6(clk6), .clk12(clk12), .dataout(dataout));
  always #10 clk = ~clk;
  always #16 wclk = ~wclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #10ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // line sampler: bit k occupies cycles 4k+1..4k+4 after reset (output
  // register updates on the 4th cycle); sample in the middle
  int cyc = 0;
  logic [5:0] sh = 0;
  int nb = 0;
  logic [5:0] words[$];
  longint word_cyc[$];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cyc % 4 == 2) begin
      sh = {sh[4:0], dataout};
      nb++;
      if (nb % 6 == 0 && nb > 6) begin words.push_back(sh); word_cyc.push_back(cyc); end
    end
  end

  // clock outputs
  realtime t6 = 0;
  always @(posedge clk6) if (rst_n) begin
    if (t6 > 0) check($realtime - t6 == 480.0, "clk6 period is one word");
    t6 = $realtime;
  end
  always @(posedge clk12) if (rst_n) begin
    realtime t12;
    t12 = $realtime;
    #1 check(t6 == t12, "clk12 rises with clk6");
  end

  // receiver-side request model, synchronous to clk12 rising edges
  task automatic request(ref logic sig);
    @(posedge clk12); #3 sig = 1;
    @(posedge clk12); #3 sig = 0;
  endtask

  task automatic write_bytes(input int n, ref logic [7:0] q[$]);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk);
      datain = 8'($urandom); wrreq = 1; q.push_back(datain);
      @(negedge wclk); wrreq = 0;
    end
  endtask

  function automatic int count(logic [5:0] w, int from);
    int n = 0;
    for (int i = from; i < words.size(); i++) if (words[i] == w) n++;
    return n;
  endfunction

  initial begin
    logic [7:0] q[$];
    int m, k, first, last;
    repeat (2) @(negedge clk);
    rst_n = 1;
    write_bytes(50, q);
    repeat (2000) @(negedge clk);
    check(words.size() > 10 && count(6'b111000, 0) == words.size(), "only power-modify words before startrec");
    // enable: local receiver ready, far end ready
    m = words.size();
    stoptrans = 0;
    request(startrec);
    repeat (50 * 48 + 2000) @(negedge clk);
    check(count(6'b110011, m) == 1, "one startrec command word");
    // find the data bytes
    k = m; first = -1;
    while (k < words.size() && q.size() > 0) begin
      if (words[k] == 6'b111000 || words[k] == 6'b110011) begin k++; continue; end
      if (first < 0) first = k;
      check(words[k] == TABLE[q[0][7:4]] && words[k+1] == TABLE[q[0][3:0]],
            $sformatf("byte %02h sent as %06b %06b", q[0], words[k], words[k+1]));
      void'(q.pop_front());
      last = k + 1;
      k += 2;
    end
    check(q.size() == 0, "all 50 bytes sent");
    check(last - first + 1 == 100, $sformatf("50 bytes back to back in 100 words (%0d)", last - first + 1));
    check(word_cyc[last] - word_cyc[first] == 99 * 24, "one word per 24 cycles");
    // stoprec: one stoprec word, data stops
    first = words.size();
    write_bytes(400, q);
    repeat (2000) @(negedge clk);
    m = words.size();
    request(stoprec);
    repeat (200) @(negedge clk);
    k = words.size();
    repeat (48 * 40) @(negedge clk);
    check(count(6'b001100, m) == 1, "one stoprec command word");
    check(count(6'b111000, k) == words.size() - k, "data stopped after stoprec");
    // FIFO full: of the 400, s bytes went out and one may sit in the coder
    begin
      int s, n;
      s = (words.size() - first - count(6'b111000, first) - count(6'b001100, first) - count(6'b110011, first)) / 2;
      check(!fifofull, "not full with 400 queued");
      n = 0;
      while (!fifofull && n < 2000) begin
        write_bytes(1, q);
        n++;
        repeat (4) @(negedge wclk);
      end
      check(n == 1014 - 400 + s || n == 1014 - 400 + s + 1,
            $sformatf("full after %0d more writes (%0d sent)", n, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
