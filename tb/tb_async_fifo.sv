// tb_async_fifo: the transmitter FIFO at its default size (8 bits x 1014).
// Writes on a 33 MHz clock and reads on a 50 MHz clock. Checks that exactly
// 1014 words fit (wrfull rises at 1014 and a further write is ignored),
// that they come out in order with the one-cycle read latency, that rdempty
// is set when drained, and then runs a long random mix of reads and writes
// against a queue model.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int W = 8, D = 1014;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr = 0, rd = 0, full, afull, empty;
  logic [W-1:0] din = 0, q;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  async_fifo dut (.wrclk(wclk), .wrst_n(rst_n), .wrreq(wr), .data(din), .wrfull(full), .wrafull(afull),
                  .rdclk(rclk), .rrst_n(rst_n), .rdreq(rd), .q(q), .rdempty(empty));
  always #15 wclk = ~wclk;
  always #10 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit rd_q = 0;
  bit rd_on = 0, wr_on = 0;
  int wr_pct = 50, rd_pct = 50, n_rd = 0;
  always @(negedge wclk) begin
    wr <= 0;
    if (rst_n && wr_on && ($urandom % 100) < wr_pct && !full) begin
      logic [W-1:0] v;
      v = W'($urandom);
      wr <= 1; din <= v; model.push_back(v);
    end
  end
  always @(negedge rclk) begin
    if (rd_q) begin
      check(model.size() > 0 && q == model[0], $sformatf("read %0d: got %0h exp %0h", n_rd, q, model.size() ? model[0] : 0));
      if (model.size() > 0) void'(model.pop_front());
      n_rd++;
    end
    begin
      bit r;
      r = rst_n && rd_on && ($urandom % 100) < rd_pct && !empty;
      rd   <= r;
      rd_q <= r;
    end
  end

  initial begin
    #100 rst_n = 1;
    // fill completely
    wr_pct = 100; wr_on = 1;
    wait (full);
    @(negedge wclk); wr_on = 0;
    repeat (5) @(negedge wclk);
    check(model.size() == D, $sformatf("capacity %0d", model.size()));
    check(full, "full after filling");
    // a write while full must be ignored
    @(negedge wclk); wr = 1; din = 8'hA5; @(negedge wclk); wr = 0;
    repeat (5) @(negedge rclk);
    // drain
    rd_pct = 100; rd_on = 1;
    wait (model.size() == 0);
    repeat (10) @(negedge rclk);
    check(empty, "empty after draining");
    check(n_rd == D, $sformatf("read count %0d", n_rd));
    // random traffic
    wr_pct = 60; rd_pct = 55; wr_on = 1;
    repeat (20000) @(negedge wclk);
    wr_on = 0;
    rd_pct = 100;
    repeat (3000) @(negedge rclk);
    check(model.size() == 0 && empty, "all random traffic read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
