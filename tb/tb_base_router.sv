// tb_base_router: self-checking test of the VC wormhole router (router 5,
// column 1 row 1, five ports). Packets are injected on several inputs to
// destinations in every direction; each flit carries its packet number and
// sequence number. At each output the test rebuilds packets per VC and
// checks the output port against XY routing worked out here, flit order,
// head/tail marking and that every flit arrives. It also checks the
// two-cycle input-to-output latency of an uncontended head flit, back-
// pressure from a stalled output, the UCU's count of flits waiting for the
// east neighbour, and that a gated router accepts nothing and asks to wake.
module tb_base_router;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  localparam int NP = 5, NVC = 2;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic              pwr_on;
  flit_t             in_flit [NP];
  logic [NP-1:0]     in_valid;
  logic [NVC-1:0]    in_ready[NP];
  flit_t             out_flit[NP];
  logic [NP-1:0]     out_valid;
  logic [NVC-1:0]    out_ready[NP];
  logic [UGS_W-1:0]  ugs[4];
  logic [9:0]        occ;
  logic              sw_active, wake_req, idle;

  base_router #(.NP(NP), .NVC(NVC), .DEPTH(4), .ROUTER_ID(4'd5)) dut (
    .clk, .rst_n, .pwr_on, .in_flit, .in_valid, .in_ready,
    .out_flit, .out_valid, .out_ready, .ugs_out(ugs), .occupancy(occ),
    .sw_active, .wake_req, .idle);

  // reference XY route for router (1,1)
  function automatic int ref_port(int dst);
    int x = dst % 4, y = dst / 4;
    if (x > 1) return 2;
    if (x < 1) return 4;
    if (y > 1) return 3;
    if (y < 1) return 1;
    return 0;
  endfunction

  // scoreboard
  int exp_port[256], exp_len[256], got[256];
  int cur_pkt[NP][NVC];
  int total_rx = 0;

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NP; o++)
      if (out_valid[o] && out_ready[o][out_flit[o].vc]) begin
        automatic flit_t f = out_flit[o];
        automatic int id = int'(f.data[15:8]);
        automatic int sq = int'(f.data[23:16]);
        total_rx++;
        if (f.head) cur_pkt[o][f.vc] = id;
        check(cur_pkt[o][f.vc] == id, $sformatf("pkt %0d interleaved on port %0d vc %0d", id, o, f.vc));
        check(exp_port[id] == o, $sformatf("pkt %0d left on port %0d, expected %0d", id, o, exp_port[id]));
        check(sq == got[id], $sformatf("pkt %0d seq %0d expected %0d", id, sq, got[id]));
        check(f.head == (sq == 0) && f.tail == (sq == exp_len[id]-1), $sformatf("pkt %0d head/tail", id));
        got[id]++;
      end
  end

  // per-input packet queues driven by processes
  task automatic send_pkt(int p, int vc, int id, int dst, int len);
    exp_port[id] = ref_port(dst);
    exp_len[id]  = len;
    for (int s = 0; s < len; s++) begin
      in_flit[p].head = (s == 0);
      in_flit[p].tail = (s == len-1);
      in_flit[p].vc   = VC_W'(vc);
      in_flit[p].data = {8'h00, 8'(s), 8'(id), 4'(p), 4'(dst)};
      in_valid[p] = 1'b1;
      do @(posedge clk); while (!in_ready[p][vc]);
      #0.1;
    end
    in_valid[p] = 1'b0;
  endtask

  int lat_start, lat;
  int n_pkts = 0;

  initial begin
    for (int p = 0; p < NP; p++) begin in_flit[p] = '0; out_ready[p] = '1; end
    for (int i = 0; i < 256; i++) begin got[i] = 0; exp_port[i] = -1; exp_len[i] = 0; end
    in_valid = '0;
    pwr_on   = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #0.1;

    // 1. latency of an uncontended head flit: local -> east (dst 7)
    exp_port[0] = 2; exp_len[0] = 1;
    in_flit[0] = '{head: 1'b1, tail: 1'b1, vc: '0, data: {8'h00, 8'd0, 8'd0, 4'd0, 4'd7}};
    in_valid[0] = 1'b1;
    @(posedge clk); #0.1; lat_start = 1; in_valid[0] = 1'b0;
    lat = 0;
    while (!out_valid[2] && lat < 20) begin @(posedge clk); #0.1; lat++; end
    check(lat == 1, $sformatf("router latency: out_valid %0d cycles after the write edge", lat));
    n_pkts = 1;
    repeat (4) @(posedge clk); #0.1;

    // 2. contention: four inputs, two VCs, all directions
    fork
      begin send_pkt(0, 0, 1, 7, 6); send_pkt(0, 1, 7, 8, 1); end  // local -> E, then W
      send_pkt(1, 0, 2, 13, 5);   // N in -> S
      send_pkt(4, 1, 3, 6, 7);    // W in -> E (contends with pkt 1)
      send_pkt(3, 1, 4, 1, 4);    // S in -> N
      begin send_pkt(2, 0, 5, 4, 3); send_pkt(2, 1, 6, 5, 3); end  // E in -> W, then local
    join
    n_pkts = 8;
    repeat (20) @(posedge clk); #0.1;

    // 3. back-pressure and UCU: stall east, send 6 flits east
    out_ready[2] = '0;
    fork
      send_pkt(0, 0, 8, 3, 3);   // local -> E (dst 3: x=3, y=0)
      send_pkt(1, 1, 9, 6, 3);   // N -> E
    join_none
    repeat (15) @(posedge clk); #0.1;
    check(got[8] + got[9] == 0, "no flit passes a stalled output");
    // all 6 flits wait in the input buffers (no grant without downstream room)
    check(ugs[1] == 8'd6, $sformatf("UCU east estimate %0d, expected 6", ugs[1]));
    check(ugs[0] == 8'd0 && ugs[2] == 8'd0 && ugs[3] == 8'd0, "UCU: nothing for N, S, W");
    check(occ == 10'd6, $sformatf("occupancy %0d, expected 6", occ));
    check(!idle, "router with buffered flits is not idle");
    out_ready[2] = '1;
    repeat (20) @(posedge clk); #0.1;
    check(ugs[1] == 8'd0 && occ == 0 && idle, "UCU and occupancy drain to zero");
    n_pkts = 10;

    // 4. power gated: no flit accepted, wake request raised
    pwr_on = 1'b0;
    @(posedge clk); #0.1;
    check(in_ready[0] == '0 && in_ready[3] == '0, "gated router is not ready");
    check(!wake_req, "no wake request without a waiting flit");
    in_flit[3] = '{head: 1'b1, tail: 1'b1, vc: '0, data: {8'h00, 8'd0, 8'd10, 4'd3, 4'd1}};
    exp_port[10] = 1; exp_len[10] = 1;
    in_valid[3] = 1'b1;
    #0.1;
    check(wake_req, "waiting flit at a gated router raises wake_req");
    repeat (5) @(posedge clk); #0.1;
    check(got[10] == 0, "gated router forwards nothing");
    pwr_on = 1'b1;
    @(posedge clk); #0.1;
    in_valid[3] = 1'b0;
    repeat (6) @(posedge clk); #0.1;
    n_pkts = 11;

    for (int i = 0; i < n_pkts; i++)
      check(got[i] == exp_len[i], $sformatf("pkt %0d: %0d of %0d flits arrived", i, got[i], exp_len[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
