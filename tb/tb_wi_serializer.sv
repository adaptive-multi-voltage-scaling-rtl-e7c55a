// tb_wi_serializer: a three-flit packet for node 13 is written into the
// serializer; the test grants the channel, plays a PA that wakes after one
// cycle, and records the symbol stream. It checks the request/grant
// sequence, the address symbol (WI 3, nearest to node 13), the twelve data
// bytes in order, the end-of-packet symbol with tx_done, and the rate: the
// 12 data symbols span 15 cycles (4 symbols per 5 cycles, 16 Gb/s at
// 2.5 GHz).
module tb_wi_serializer;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  flit_t in_flit;
  logic  in_valid, in_ready, req, grant, pa_ready, tv, tc, done;
  logic [7:0] ts;
  wi_serializer dut (.clk, .rst_n, .in_flit, .in_valid, .in_ready, .tx_req(req), .tx_grant(grant),
                     .pa_ready, .tx_valid(tv), .tx_ctrl(tc), .tx_sym(ts), .tx_done(done));

  logic [31:0] words[3] = '{32'h1122_330D, 32'hA5A5_0F0F, 32'hDEAD_BEEF};
  logic [7:0]  syms[$];
  logic        ctrl[$];
  int          t_first, t_last, cyc, done_cnt;

  always @(posedge clk) begin
    cyc++;
    pa_ready <= grant;    // PA wakes one cycle after its supply
    if (rst_n && tv) begin
      syms.push_back(ts);
      ctrl.push_back(tc);
      if (!tc) begin if (t_first < 0) t_first = cyc; t_last = cyc; end
    end
    if (done) done_cnt++;
  end

  initial begin
    cyc = 0; t_first = -1; t_last = -1; done_cnt = 0;
    in_valid = 0; grant = 0; in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!req, "no request while empty");
    for (int i = 0; i < 3; i++) begin
      in_flit = '{head: (i == 0), tail: (i == 2), vc: '0, data: words[i]};
      in_valid = 1;
      @(negedge clk);
      check(in_ready || i == 3, "buffer accepts");
    end
    in_valid = 0;
    check(req, "request raised for a head flit");
    repeat (3) @(negedge clk);
    check(syms.size() == 0, "nothing sent before the grant");
    grant = 1;
    while (done_cnt == 0 && cyc < 200) @(negedge clk);
    @(negedge clk);
    check(!req, "request dropped after the packet");
    grant = 0;
    check(syms.size() == 14, $sformatf("%0d symbols, expected 14", syms.size()));
    if (syms.size() == 14) begin
      check(ctrl[0] && syms[0] == (SYM_ADDR | 8'd3), $sformatf("address symbol %h", syms[0]));
      for (int i = 0; i < 12; i++)
        check(!ctrl[1+i] && syms[1+i] == words[i/4][8*(i%4) +: 8],
              $sformatf("data symbol %0d = %h", i, syms[1+i]));
      check(ctrl[13] && syms[13] == SYM_EOP, "end-of-packet symbol");
    end
    check(t_last - t_first + 1 == 15, $sformatf("12 data symbols over %0d cycles, expected 15", t_last - t_first + 1));
    check(done_cnt == 1, "one tx_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
