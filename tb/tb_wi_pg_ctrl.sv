// tb_wi_pg_ctrl: checks the WI power-gating control flow: PA asleep until
// a channel grant, on until the packet is sent; LNA woken by the comparator,
// gated again on an address mismatch (and kept off until the channel is
// quiet), kept on through a matching packet and gated when it completes.
module tb_wi_pg_ctrl;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic grant, tx_done, det, av, am, rx_done, pa, lna, rej;
  wi_pg_ctrl dut (.clk, .rst_n, .grant_wi(grant), .tx_done, .rx_detect(det),
                  .addr_valid(av), .addr_match(am), .rx_done, .pg_pa(pa), .pg_lna(lna), .lna_reject(rej));

  initial begin
    {grant, tx_done, det, av, am, rx_done} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!pa && !lna, "PA and LNA asleep after reset");
    // transmit
    grant = 1;
    @(negedge clk);
    check(pa, "PA supplied after grant");
    repeat (5) begin @(negedge clk); check(pa, "PA stays on during the packet"); end
    tx_done = 1;
    @(negedge clk);
    tx_done = 0; grant = 0;
    check(!pa, "PA gated after the packet");
    // receive, wrong address
    det = 1;
    @(negedge clk);
    check(lna, "comparator wakes the LNA");
    av = 1; am = 0;
    #0.1;
    @(negedge clk);
    av = 0;
    check(!lna && rej, "mismatch gates the LNA");
    repeat (4) begin @(negedge clk); check(!lna, "LNA stays off while the foreign packet lasts"); end
    det = 0;
    repeat (2) @(negedge clk);
    // receive, right address
    det = 1;
    @(negedge clk);
    check(lna, "LNA woken again by a new transmission");
    av = 1; am = 1;
    @(negedge clk);
    av = 0;
    repeat (6) begin @(negedge clk); check(lna, "LNA on while receiving"); end
    rx_done = 1;
    @(negedge clk);
    rx_done = 0;
    check(!lna, "LNA gated after the packet");
    det = 0;
    @(negedge clk);
    // power disappears before an address: back to sleep
    det = 1; @(negedge clk); det = 0; @(negedge clk);
    check(!lna, "LNA gated when the channel falls quiet");
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
