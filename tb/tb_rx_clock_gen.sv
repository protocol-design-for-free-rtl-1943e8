// tb_rx_clock_gen: the receiver's bit recovery at OVS = 4. A random bit
// stream (runs of up to 5 equal bits, as in the line code) is generated
// with a bit time 3 % longer, then 3 % shorter, than 4 receiver cycles, and
// a random jitter of up to 4 % of a bit on each edge. The bits sampled at bit_tick must equal the
// bits sent, with no bit lost or repeated. Then align is pulsed and
// word_tick must mark every sixth sampled bit from there on.
`timescale 1ns/1ps
module tb_rx_clock_gen;
  logic clk = 0, rst_n = 0, din = 0, align = 0;
  logic bit_tick, word_tick;
  int checks = 0, failures = 0;
  bit sent[$];
  realtime tbit;

  rx_clock_gen dut (.clk(clk), .rst_n(rst_n), .din(din), .align(align),
                    .bit_tick(bit_tick), .word_tick(word_tick));
  always #5 clk = ~clk;   // 10 ns cycle, nominal bit 40 ns

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sampled bits
  bit got[$];
  int since_align = -1;
  always @(posedge clk) if (rst_n && bit_tick) begin
    got.push_back(din);
  end

  // edges at i*tbit plus an independent jitter of up to +-4 % of a bit
  task automatic send(input int n);
    bit b = 0;
    int run = 0;
    realtime t0, tn;
    int j;
    t0 = $realtime;
    for (int i = 0; i < n; i++) begin
      if (run >= 5 || ($urandom % 2)) begin b = !b; run = 1; end else run++;
      din = b; sent.push_back(b);
      j = $urandom % 81;
      tn = t0 + (i + 1) * tbit + tbit * (j - 40) / 1000.0;
      #(tn - $realtime);
    end
  endtask

  function automatic bit match(int off);
    // sent[k] == got[k + off] for the compared range
    for (int k = 10; k < sent.size() - 10; k++)
      if (k + off < 0 || k + off >= got.size() || sent[k] != got[k + off]) return 0;
    return 1;
  endfunction

  initial begin
    int off;
    bit ok;
    #23 rst_n = 1;
    tbit = 41.2;
    send(3000);
    ok = 0;
    for (off = -3; off <= 3; off++) if (match(off)) ok = 1;
    check(ok, "slow far end: every bit sampled once");
    check(got.size() >= sent.size() - 3 && got.size() <= sent.size() + 3, $sformatf("bit count %0d vs %0d", got.size(), sent.size()));
    sent.delete(); got.delete();
    tbit = 38.8;
    send(3000);
    ok = 0;
    for (off = -3; off <= 3; off++) if (match(off)) ok = 1;
    check(ok, "fast far end: every bit sampled once");
    // word phase after align
    fork
      send(200);
      begin
        int n = 0;
        @(posedge clk iff bit_tick);
        @(negedge clk); align = 1; @(negedge clk); align = 0;
        repeat (60) begin
          @(posedge clk iff bit_tick);
          n++;
          check(word_tick == (n % 6 == 0), $sformatf("word_tick at bit %0d after align", n));
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
