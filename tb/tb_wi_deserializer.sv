// tb_wi_deserializer: feeds symbol streams to the receiver of WI 1.
// A packet addressed to WI 2 must produce no flit (and a mismatch); a
// three-flit packet addressed to WI 1 must come out as three flits with
// head on the first, tail on the last, VC 0 and the right data; with the
// router stalled, a packet longer than the buffer must set overflow.
module tb_wi_deserializer;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rv, rc, av, am, done, ovf, ov, ordy;
  logic [7:0] rs;
  flit_t of;
  wi_deserializer #(.DEPTH(4), .WI_ID(2'd1)) dut (
    .clk, .rst_n, .rx_valid(rv), .rx_ctrl(rc), .rx_sym(rs), .addr_valid(av), .addr_match(am),
    .rx_done(done), .overflow(ovf), .out_flit(of), .out_valid(ov), .out_ready(ordy));

  int n_av = 0, n_match = 0, n_done = 0;
  flit_t got[$];
  always @(posedge clk) if (rst_n) begin
    if (av) begin n_av++; if (am) n_match++; end
    if (done) n_done++;
    if (ov && ordy) got.push_back(of);
  end

  task automatic sym(logic c, logic [7:0] s);
    rv = 1; rc = c; rs = s;
    @(negedge clk);
    rv = 0; rc = 0; rs = 0;
    @(negedge clk);       // one idle cycle between symbols
  endtask

  task automatic packet(logic [1:0] wi, int n, logic [31:0] base);
    sym(1, SYM_ADDR | 8'(wi));
    for (int f = 0; f < n; f++)
      for (int b = 0; b < 4; b++) sym(0, 8'((base + f) >> (8*b)));
    sym(1, SYM_EOP);
  endtask

  initial begin
    rv = 0; rc = 0; rs = 0; ordy = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    packet(2'd2, 2, 32'h100);
    repeat (3) @(negedge clk);
    check(n_av == 1 && n_match == 0, "foreign address decoded as mismatch");
    check(got.size() == 0, "no flit from a foreign packet");
    packet(2'd1, 3, 32'hCAFE_0000);
    repeat (3) @(negedge clk);
    check(n_av == 2 && n_match == 1, "own address matched");
    check(n_done == 1, "rx_done after own packet");
    check(got.size() == 3, $sformatf("%0d flits, expected 3", got.size()));
    for (int i = 0; i < got.size(); i++) begin
      check(got[i].data == 32'hCAFE_0000 + 32'(i), $sformatf("flit %0d data %h", i, got[i].data));
      check(got[i].head == (i == 0) && got[i].tail == (i == 2) && got[i].vc == 0, $sformatf("flit %0d marks", i));
    end
    check(!ovf, "no overflow so far");
    ordy = 0;
    packet(2'd1, 6, 32'h0);
    check(ovf, "overflow flagged when the stalled buffer is exceeded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
