// tb_wi_medium_arbiter: four WIs request the wireless channel. Checks that
// at most one grant is high, a grant is held as long as its request stays
// high, grants rotate round robin after the last winner, and a lone
// requester is granted one cycle after it asks.
module tb_wi_medium_arbiter;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] req, grant;
  wi_medium_arbiter #(.N(4)) dut (.clk, .rst_n, .req, .grant);

  always @(posedge clk) if (rst_n) check($onehot0(grant), "at most one grant");

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req = 4'b0100;
    @(negedge clk);
    check(grant == 4'b0100, "lone requester granted next cycle");
    req = 4'b1111;
    repeat (5) begin @(negedge clk); check(grant == 4'b0100, "grant held while request stays"); end
    // release in turn: expect 3, 0, 1, 2 after 2
    req[2] = 1'b0;
    @(negedge clk); check(grant == 4'b1000, "round robin after 2 gives 3");
    req[3] = 1'b0;
    @(negedge clk); check(grant == 4'b0001, "then 0");
    req[0] = 1'b0;
    @(negedge clk); check(grant == 4'b0010, "then 1");
    req = 4'b0000;
    @(negedge clk); check(grant == 4'b0000, "no request, no grant");
    req = 4'b0011;
    @(negedge clk); check(grant == 4'b0001, "after 1, 0 comes before 1");
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
