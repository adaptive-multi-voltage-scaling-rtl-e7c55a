// tb_voltage_regulator: steps the regulator model through all four levels
// and checks the output voltage (0, 800, 1000, 1100 mV), the settling
// time before power good, and that 0 V drops power good at once.
module tb_voltage_regulator;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  vlevel_e     lvl;
  logic [11:0] mv;
  logic        pg;
  voltage_regulator #(.SETTLE_CYCLES(3)) dut (.clk, .rst_n, .cntrl_mv(lvl), .vdd_mv(mv), .power_good(pg));

  int exp_mv[4] = '{0, 800, 1000, 1100};

  initial begin
    lvl = LVL_0V0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!pg && mv == 0, "off after reset");
    for (int l = 1; l < 4; l++) begin
      int n;
      lvl = vlevel_e'(l);
      n = 0;
      @(negedge clk);
      while (!pg && n < 20) begin @(negedge clk); n++; end
      check(n == 3, $sformatf("level %0d: power good after %0d cycles, expected 3", l, n));
      check(int'(mv) == exp_mv[l], $sformatf("level %0d: %0d mV", l, mv));
    end
    lvl = LVL_0V8;
    #0.1;
    check(!pg, "power good low while changing");
    repeat (5) @(negedge clk);
    check(pg && mv == 12'd800, "scaled down to 800 mV");
    lvl = LVL_0V0;
    #0.1;
    check(!pg, "gating drops power good at once");
    @(negedge clk);
    check(mv == 0, "gated output 0 mV");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
