// tb_encoder_4b6b: feeds the coder from a FIFO model (one-cycle read
// latency) and checks that every byte is fetched exactly once, that both
// nibbles come out with the code table written out below, that hon/lon
// follow the take_h/take_l handshake, and that nothing is fetched while
// control is low or the FIFO is empty.
`timescale 1ns/1ps
module tb_encoder_4b6b;
  logic clk = 0, rst_n = 0;
  logic control = 0, fifoempty, fetchclk, hon, lon, take_h = 0, take_l = 0;
  logic [7:0] datain;
  logic [5:0] codregh, codregl;
  int checks = 0, failures = 0;
  logic [7:0] fifo[$], sent[$];

  // code table, nibble 0..F
  localparam logic [5:0] TABLE [16] = '{
    6'b001011, 6'b001101, 6'b010011, 6'b010101, 6'b010110, 6'b011001, 6'b011010, 6'b100101,
    6'b100110, 6'b101001, 6'b101010, 6'b101100, 6'b110010, 6'b110100, 6'b100010, 6'b011101};

  encoder_4b6b dut (.clk(clk), .rst_n(rst_n), .control(control), .fifoempty(fifoempty), .datain(datain),
                    .fetchclk(fetchclk), .hon(hon), .lon(lon), .take_h(take_h), .take_l(take_l),
                    .codregh(codregh), .codregl(codregl));
  always #5 clk = ~clk;

  // FIFO model
  assign fifoempty = (fifo.size() == 0);
  always @(posedge clk) if (fetchclk) begin
    datain <= fifo[0];
    sent.push_back(fifo[0]);
    void'(fifo.pop_front());
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_fetch = 0;
  always @(posedge clk) if (fetchclk) n_fetch++;

  initial begin
    logic [7:0] b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) fifo.push_back(8'(i ^ 8'h5A));
    // control low: no fetch
    repeat (10) @(negedge clk);
    check(n_fetch == 0 && !hon && !lon, "no fetch without control");
    control = 1;
    for (int i = 0; i < 256; i++) begin
      // wait for the codes
      while (!(hon && lon)) @(negedge clk);
      b = sent[i];
      check(codregh == TABLE[b[7:4]], $sformatf("byte %02h high code %06b", b, codregh));
      check(codregl == TABLE[b[3:0]], $sformatf("byte %02h low code %06b", b, codregl));
      repeat ($urandom % 5) @(negedge clk);
      check(n_fetch == i + 1, "no second fetch while codes are held");
      take_h = 1; @(negedge clk); take_h = 0;
      check(!hon && lon, "hon cleared by take_h");
      repeat ($urandom % 5) @(negedge clk);
      check(n_fetch == i + 1, "no fetch while lon");
      take_l = 1; @(negedge clk); take_l = 0;
    end
    repeat (10) @(negedge clk);
    check(n_fetch == 256 && fifo.size() == 0, "each byte fetched once");
    check(!hon && !lon, "idle when FIFO empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
