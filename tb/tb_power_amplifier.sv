// tb_power_amplifier: the PA model radiates nothing while gated, needs one
// cycle to wake after its supply is enabled, then radiates carrier and the
// offered symbols, and goes silent at once when gated again.
module tb_power_amplifier;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic pg, tv, tc, rdy;
  logic [7:0] ts;
  logic [1:0] st;
  rf_t rf;
  power_amplifier dut (.clk, .rst_n, .pg_pa(pg), .tx_valid(tv), .tx_ctrl(tc), .tx_sym(ts),
                       .pa_ready(rdy), .pstate(st), .rf_out(rf));
  initial begin
    pg = 0; tv = 1; tc = 0; ts = 8'h5A;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(rf == '0 && st == 2'd0, "gated PA is silent and asleep");
    pg = 1;
    #0.1;
    check(!rdy && st == 2'd1 && rf.power == 0, "waking: not yet radiating");
    @(negedge clk);
    check(rdy && st == 2'd2, "awake after one cycle");
    check(rf.power == 8'd200 && rf.valid && rf.sym == 8'h5A, "radiates carrier and symbol");
    tv = 0;
    #0.1;
    check(rf.power == 8'd200 && !rf.valid, "carrier without a symbol");
    pg = 0;
    #0.1;
    check(rf == '0 && !rdy, "gating silences the PA at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
