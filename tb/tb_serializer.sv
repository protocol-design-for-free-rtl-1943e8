// tb_serializer: a bit tick every 4 cycles, a new random word loaded at every
// sixth tick; checks that dout shows each word MSB first, one bit per bit
// period, with no gap between words.
`timescale 1ns/1ps
module tb_serializer;
  logic clk = 0, rst_n = 0, bit_tick, load, dout;
  logic [5:0] datain = 0;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [5:0] words[$];

  serializer dut (.clk(clk), .rst_n(rst_n), .bit_tick(bit_tick), .load(load), .datain(datain), .dout(dout));
  always #5 clk = ~clk;

  // cycle counter after reset: tick at cyc%4==3, load at the tick ending bit 5
  assign bit_tick = rst_n && (cyc % 4 == 3);
  assign load     = rst_n && (cyc % 24 == 23);
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (load) begin
      words.push_back(datain);
      datain <= 6'($urandom);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    datain = 6'b101100;
    repeat (2) @(negedge clk);
    check(dout == 0, "dout low after reset");
    rst_n = 1;
    // first word on the line from cycle 24 to 47, bit b during cycles 24+4*(5-b)..
    wait (cyc == 24);
    for (int k = 0; k < 100; k++) begin
      for (int b = 5; b >= 0; b--) begin
        repeat (4) begin
          @(negedge clk);
          check(words.size() > k && dout == words[k][b], $sformatf("word %0d bit %0d", k, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
