// tb_deserializer: random bits with a bit tick every 3 to 5 cycles and a
// word tick on every sixth bit; checks the sliding window after every bit
// and the captured word after every sixth bit against a shift-register
// model, and the one-cycle valid strobes.
`timescale 1ns/1ps
module tb_deserializer;
  logic clk = 0, rst_n = 0, din = 0, bit_tick = 0, word_tick = 0;
  logic [5:0] pdmnt, pdata;
  logic pdmnt_valid, pdata_valid;
  int checks = 0, failures = 0;

  deserializer dut (.clk(clk), .rst_n(rst_n), .din(din), .bit_tick(bit_tick), .word_tick(word_tick),
                    .pdmnt(pdmnt), .pdmnt_valid(pdmnt_valid), .pdata(pdata), .pdata_valid(pdata_valid));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [5:0] win = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      din = 1'($urandom);
      bit_tick = 1; word_tick = (k % 6 == 5);
      win = {win[4:0], din};
      @(negedge clk);
      bit_tick = 0; word_tick = 0;
      check(pdmnt_valid && pdmnt == win, $sformatf("window after bit %0d", k));
      check(pdata_valid == (k % 6 == 5), "word strobe");
      if (k % 6 == 5) check(pdata == win, $sformatf("word after bit %0d", k));
      din = 1'($urandom);
      repeat (2 + $urandom % 3) begin
        @(negedge clk);
        check(!pdmnt_valid && !pdata_valid, "strobes last one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
