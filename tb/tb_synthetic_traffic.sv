// tb_synthetic_traffic: runs the four synthetic traffic patterns used to
// evaluate the network (transpose, uniform random, bit-reversal, butterfly),
// plus a hotspot pattern that stresses back-pressure,
// on the full 4x4 wireless NoC at its default sizes, one pattern after the
// other, every router in the low-utilization zone. Each source sends
// PKTS packets of 64 flits to its pattern partner (nodes that map to
// themselves stay silent). The pattern definitions are the usual ones:
//   transpose   (x, y) -> (y, x)
//   bit-reverse node id b3 b2 b1 b0 -> b0 b1 b2 b3
//   butterfly   swap the highest and lowest bit of the node id
//   random      uniform over the other 15 nodes
//   hotspot     every node sends to node 0 (wired and wireless paths
//               converge on one ejection port)
// Every packet must arrive whole and in order at its destination. For each
// pattern the test prints the cycles taken, delivered flits per cycle per
// node, the number of wireless packets and the supply-level changes.
module tb_synthetic_traffic;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  localparam int NVC  = 2;
  localparam int PLEN = PKT_FLITS;
  localparam int PKTS = 3;
  logic clk = 0, rst_n = 0;
  always #0.2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0]       prof_busy [NODES];
  logic [31:0]       prof_total;
  zone_e             zone [NODES];
  flit_t             inj_flit [NODES];
  logic [NODES-1:0]  inj_valid;
  logic [NVC-1:0]    inj_ready [NODES];
  flit_t             ej_flit [NODES];
  logic [NODES-1:0]  ej_valid;
  logic [NVC-1:0]    ej_ready [NODES];
  vlevel_e           level [NODES];
  logic [11:0]       vdd_mv [NODES];
  logic [NODES-1:0]  pwr_on, woke, epoch_end;
  logic [NUM_WI-1:0] wi_grant, pg_pa, pg_lna, lna_reject, rx_overflow;

  wnoc_top dut (.clk, .rst_n, .prof_busy, .prof_total, .zone,
    .inj_flit, .inj_valid, .inj_ready, .ej_flit, .ej_valid, .ej_ready,
    .level, .vdd_mv, .pwr_on, .woke, .epoch_end,
    .wi_grant, .pg_pa, .pg_lna, .lna_reject, .rx_overflow);

  function automatic int partner(int pat, int s);
    int x, y, d;
    x = s % 4;
    y = s / 4;
    case (pat)
      0: return x * 4 + y;
      1: begin do d = $urandom_range(0, NODES-1); while (d == s); return d; end
      2: return {s[0], s[1], s[2], s[3]};
      3: return {s[0], s[2], s[1], s[3]};
      default: return 0;
    endcase
  endfunction
  string pname [5] = '{"transpose", "random", "bit-reversal", "butterfly", "hotspot"};

  localparam int MAXP = 512;
  int pk_dst[MAXP], pk_got[MAXP];
  int n_pk = 0, bad = 0, rx_flits = 0, n_grant = 0, n_lvl = 0;
  int cur_id [NODES][NVC];
  logic [NUM_WI-1:0] prev_grant;
  vlevel_e prev_lvl [NODES];

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (ej_valid[n] && ej_ready[n][ej_flit[n].vc]) begin
        automatic flit_t f = ej_flit[n];
        automatic int id = int'(f.data[19:8]);
        automatic int sq = int'(f.data[25:20]);
        if (f.head) cur_id[n][f.vc] = id;
        if (cur_id[n][f.vc] != id || pk_dst[id] != n || sq != pk_got[id] ||
            f.head != (sq == 0) || f.tail != (sq == PLEN-1)) bad++;
        pk_got[id]++;
        rx_flits++;
      end
      if (level[n] != prev_lvl[n]) n_lvl++;
      prev_lvl[n] = level[n];
    end
    n_grant += $countones(wi_grant & ~prev_grant);
    prev_grant = wi_grant;
  end

  int queue [NODES][$];
  task automatic injector(int n);
    forever begin
      if (queue[n].size() == 0) begin
        inj_valid[n] = 1'b0;
        @(posedge clk); #0.01;
      end else begin
        automatic int id = queue[n].pop_front();
        automatic int vc = id % NVC;
        for (int s = 0; s < PLEN; s++) begin
          inj_flit[n] = '{head: (s == 0), tail: (s == PLEN-1), vc: VC_W'(vc),
                          data: {6'd0, 6'(s), 12'(id), 4'(n), 4'(pk_dst[id])}};
          inj_valid[n] = 1'b1;
          do @(posedge clk); while (!inj_ready[n][vc]);
          #0.01;
        end
        inj_valid[n] = 1'b0;
      end
    end
  endtask

  initial begin
    for (int n = 0; n < NODES; n++) begin
      inj_flit[n] = '0; ej_ready[n] = '1; prof_busy[n] = 32'd30000; prev_lvl[n] = LVL_1V1;
      for (int v = 0; v < NVC; v++) cur_id[n][v] = -1;
    end
    prof_total = 32'd100000;
    prev_grant = '0;
    inj_valid = '0;
    repeat (4) @(posedge clk);
    #0.01 rst_n = 1;
    for (int n = 0; n < NODES; n++)
      fork
        automatic int nn = n;
        injector(nn);
      join_none
    for (int pat = 0; pat < 5; pat++) begin
      int first, t, g0, f0, l0, done;
      first = n_pk; g0 = n_grant; f0 = rx_flits; l0 = n_lvl;
      for (int k = 0; k < PKTS; k++)
        for (int s = 0; s < NODES; s++) begin
          int d;
          d = partner(pat, s);
          if (d == s) continue;
          pk_dst[n_pk] = d; pk_got[n_pk] = 0;
          queue[s].push_back(n_pk);
          n_pk++;
        end
      t = 0;
      do begin
        repeat (50) @(posedge clk);
        t += 50;
        done = 1;
        for (int i = first; i < n_pk; i++) if (pk_got[i] != PLEN) done = 0;
      end while (!done && t < 40000);
      for (int i = first; i < n_pk; i++)
        check(pk_got[i] == PLEN, $sformatf("%s packet %0d: %0d of %0d flits", pname[pat], i, pk_got[i], PLEN));
      $display("%s: %0d packets in %0d cycles, %0.3f flits/cycle/node, %0d wireless packets, %0d level changes",
               pname[pat], n_pk - first, t, real'(rx_flits - f0) / real'(t) / 16.0, n_grant - g0, n_lvl - l0);
    end
    check(bad == 0, $sformatf("%0d misdelivered or out-of-order flits", bad));
    check(rx_overflow == '0, "no wireless receive overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
