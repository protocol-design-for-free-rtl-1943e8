// tb_tx_clock_gen: checks the transmitter timing at the default OVS = 4:
// bit_tick every 4 cycles, bit_idx counting 0..5, word_tick every 24 and
// byte_tick every 48 cycles, and the clk6 / clk12 square waves (half high,
// half low) in the right phase relative to the ticks.
`timescale 1ns/1ps
module tb_tx_clock_gen;
  localparam int OVS = 4;
  logic clk = 0, rst_n = 0;
  logic bit_tick, word_tick, byte_tick, clk6, clk12;
  logic [2:0] bit_idx;
  int checks = 0, failures = 0;

  tx_clock_gen dut (.clkin(clk), .rst_n(rst_n), .bit_tick(bit_tick), .bit_idx(bit_idx),
                    .word_tick(word_tick), .byte_tick(byte_tick), .clk6(clk6), .clk12(clk12));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    int exp_idx, exp_word;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reference: cycle n after reset -> bit n/OVS, tick when n%OVS == OVS-1
    // after the k-th rising edge out of reset the design is in cycle k
    for (cyc = 1; cyc < 48 * 20; cyc++) begin
      @(negedge clk);
      exp_idx  = (cyc / OVS) % 6;
      exp_word = (cyc / (6 * OVS)) % 2;
      check(bit_tick == (cyc % OVS == OVS - 1), $sformatf("bit_tick at %0d", cyc));
      check(bit_idx == 3'(exp_idx), $sformatf("bit_idx at %0d", cyc));
      check(word_tick == (cyc % (6 * OVS) == 6 * OVS - 1), $sformatf("word_tick at %0d", cyc));
      check(byte_tick == (cyc % (12 * OVS) == 12 * OVS - 1), $sformatf("byte_tick at %0d", cyc));
      check(clk6 == (exp_idx < 3), $sformatf("clk6 at %0d", cyc));
      check(clk12 == (exp_word == 0), $sformatf("clk12 at %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
