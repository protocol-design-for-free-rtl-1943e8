// tb_recfifo: the receive FIFO configuration of async_fifo (9-bit entries,
// 1014 deep, early-full threshold 32 entries before full). Checks that
// wrafull rises at 982 entries and wrfull at 1014, that 9-bit entries,
// including bit 8, come back in order, and that wrafull falls again once
// entries are read.
`timescale 1ns/1ps
module tb_recfifo;
  localparam int W = 9, D = 1014, M = 32;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr = 0, rd = 0, full, afull, empty;
  logic [W-1:0] din = 0, q;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  async_fifo #(.WIDTH(W), .DEPTH(D), .AFULL_MARGIN(M)) dut (
    .wrclk(wclk), .wrst_n(rst_n), .wrreq(wr), .data(din), .wrfull(full), .wrafull(afull),
    .rdclk(rclk), .rrst_n(rst_n), .rdreq(rd), .q(q), .rdempty(empty));
  always #9.7 wclk = ~wclk;
  always #11 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic write1(input logic [W-1:0] v);
    @(negedge wclk); wr = 1; din = v; model.push_back(v);
    @(negedge wclk); wr = 0;
  endtask

  task automatic read1();
    @(negedge rclk); rd = 1;
    @(negedge rclk); rd = 0;
    check(q == model[0], $sformatf("read got %0h exp %0h", q, model[0]));
    void'(model.pop_front());
  endtask

  initial begin
    #100 rst_n = 1;
    for (int i = 0; i < D; i++) begin
      write1(W'($urandom));
      repeat (4) @(negedge wclk);  // let the flags settle
      check(afull == (i + 1 >= D - M), $sformatf("wrafull after %0d writes: %0b", i + 1, afull));
      check(full == (i + 1 >= D), $sformatf("wrfull after %0d writes: %0b", i + 1, full));
    end
    repeat (40) read1();
    repeat (8) @(negedge wclk);
    check(!afull && !full, "flags clear after reading 40");
    while (model.size() > 0) read1();
    repeat (6) @(negedge rclk);
    check(empty, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
