// tb_decoder_6b4b: feeds random sequences of data, power-modify, command and
// invalid words, with random gaps and with the enable sometimes low, and
// compares every FIFO write with a reference model that uses the code table
// written out below. Pairs of data words give {0, byte}; an invalid word or
// an unpaired high code gives {1, 00}; nothing is written while disabled.
`timescale 1ns/1ps
module tb_decoder_6b4b;
  logic clk = 0, rst_n = 0;
  logic [5:0] pdin = 0;
  logic pvalid = 0, en = 0;
  logic [7:0] dcdata;
  logic erind, wrreq;
  int checks = 0, failures = 0;
  logic [8:0] expq[$];

  localparam logic [5:0] TABLE [16] = '{
    6'b001011, 6'b001101, 6'b010011, 6'b010101, 6'b010110, 6'b011001, 6'b011010, 6'b100101,
    6'b100110, 6'b101001, 6'b101010, 6'b101100, 6'b110010, 6'b110100, 6'b100010, 6'b011101};

  decoder_6b4b dut (.clk(clk), .rst_n(rst_n), .pdin(pdin), .pvalid(pvalid), .en(en),
                    .dcdata(dcdata), .erind(erind), .wrreq(wrreq));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (wrreq) begin
    check(expq.size() > 0 && {erind, dcdata} == expq[0],
          $sformatf("entry %03h exp %03h", {erind, dcdata}, expq.size() ? expq[0] : 9'h0));
    if (expq.size() > 0) void'(expq.pop_front());
  end

  function automatic int lookup(logic [5:0] w);
    for (int i = 0; i < 16; i++) if (TABLE[i] == w) return i;
    return -1;
  endfunction

  initial begin
    bit have_h = 0;
    int hn, n;
    logic [5:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int r;
      r = $urandom % 100;
      if (r < 70) w = TABLE[$urandom % 16];
      else if (r < 80) w = 6'b111000;
      else if (r < 85) w = 6'b001100;
      else if (r < 90) w = 6'b110011;
      else w = 6'($urandom);
      if ((k / 200) % 4 == 3) en = 0; else en = 1;
      // model
      n = lookup(w);
      if (!en) have_h = 0;
      else if (n >= 0) begin
        if (!have_h) begin have_h = 1; hn = n; end
        else begin have_h = 0; expq.push_back({1'b0, 4'(hn), 4'(n)}); end
      end else begin
        if (have_h || !(w == 6'b111000 || w == 6'b001100 || w == 6'b110011)) expq.push_back(9'h100);
        have_h = 0;
      end
      pdin = w; pvalid = 1; @(negedge clk); pvalid = 0;
      pdin = 6'($urandom);
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(expq.size() == 0, $sformatf("all entries written (%0d left)", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
