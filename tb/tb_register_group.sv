// tb_register_group: checks that regout holds 111000 after reset, follows
// the selection only on load, and gives the high code, the low code, the
// two command words and the power-modify word for the five selections.
`timescale 1ns/1ps
module tb_register_group;
  import fso_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [5:0] h, l, regout;
  regsel_e con;
  int checks = 0, failures = 0;

  register_group dut (.clk(clk), .rst_n(rst_n), .load(load), .codregh(h), .codregl(l), .con(con), .regout(regout));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [5:0] exp;
    con = SEL_HIGH; h = 6'b010101; l = 6'b101010;
    repeat (2) @(negedge clk);
    check(regout == 6'b111000, "reset value is the power-modify word");
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(regout == 6'b111000, "no change without load");
    for (int i = 0; i < 200; i++) begin
      int s;
      s = $urandom % 5;
      con = regsel_e'(s);
      h = 6'($urandom); l = 6'($urandom);
      case (s)
        0: exp = 6'b111000;
        1: exp = h;
        2: exp = l;
        3: exp = 6'b001100;
        default: exp = 6'b110011;
      endcase
      load = 1; @(negedge clk); load = 0;
      check(regout == exp, $sformatf("sel %0d: regout %06b exp %06b", s, regout, exp));
      h = ~h; l = ~l;
      @(negedge clk);
      check(regout == exp, "holds without load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
