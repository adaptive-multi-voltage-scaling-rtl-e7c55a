// tb_low_noise_amplifier: the LNA model passes no symbol while gated or
// waking, passes the channel's symbols one cycle after its supply is
// enabled, and stops at once when gated.
module tb_low_noise_amplifier;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic pg, rv, rc;
  logic [7:0] rs;
  logic [1:0] st;
  rf_t rf;
  low_noise_amplifier dut (.clk, .rst_n, .pg_lna(pg), .rf_in(rf), .rx_valid(rv), .rx_ctrl(rc),
                           .rx_sym(rs), .pstate(st));
  initial begin
    pg = 0;
    rf = '{power: 8'd200, valid: 1'b1, ctrl: 1'b1, sym: 8'hA3};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!rv && st == 0, "gated LNA receives nothing");
    pg = 1;
    #0.1;
    check(!rv && st == 1, "waking LNA receives nothing");
    @(negedge clk);
    check(rv && rc && rs == 8'hA3 && st == 2, "awake LNA passes the symbol");
    rf.valid = 0;
    #0.1;
    check(!rv, "no symbol, no valid");
    rf.valid = 1;
    pg = 0;
    #0.1;
    check(!rv && st == 0, "gating stops reception at once");
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
