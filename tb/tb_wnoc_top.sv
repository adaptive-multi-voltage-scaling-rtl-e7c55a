// tb_wnoc_top: end-to-end test of the whole 4x4 wireless NoC at its default
// sizes (32-bit flits, 64-flit packets, 1000-cycle epochs, 16-epoch
// history). The profile puts nodes 12 and 15 in the rare zone (RUZ), nodes
// 5 and 6 in the high zone (HUZ) and the rest in the low zone (LUZ).
// Traffic runs in three phases: heavy random traffic (4 epochs), silence
// (5 epochs), light traffic (3 epochs). Packets are only sent between
// pairs whose route avoids the gated RUZ nodes. Each flit carries source,
// destination, packet number and sequence number; at every ejection port
// packets are rebuilt per VC and checked for destination, order, head and
// tail, and at the end every packet must have arrived whole.
// Mechanisms counted (each must happen at least once): voltage raised,
// voltage lowered, LUZ router gated for an epoch, router woken on demand,
// RUZ routers held at 0 V, HUZ routers never gated, wireless packets sent,
// bystander LNA gated after an address mismatch, injection back-pressure.
module tb_wnoc_top;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  localparam int NVC = 2;
  localparam int EPOCH = 1000;
  localparam int PLEN = PKT_FLITS;
  logic clk = 0, rst_n = 0;
  always #0.2 clk = ~clk;    // 2.5 GHz
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

  // ---------------- route check (avoid RUZ nodes) ----------------
  function automatic bit is_ruz(int n);
    return n == 12 || n == 15;
  endfunction
  function automatic bit route_ok(int src, int dst);
    int cur = src;
    for (int k = 0; k < 20; k++) begin
      int p;
      if (is_ruz(cur)) return 0;
      if (cur == dst) return 1;
      for (int w = 0; w < NUM_WI; w++)
        if (int'(HR_NODE[w]) == cur && use_wireless(4'(cur), 4'(dst))) begin
          cur = int'(HR_NODE[nearest_wi(4'(dst))]);
          p = -1;
        end
      if (is_ruz(cur)) return 0;
      if (cur == dst) return 1;
      p = int'(xy_port(4'(cur), 4'(dst)));
      case (p)
        P_NORTH: cur -= 4;
        P_SOUTH: cur += 4;
        P_EAST:  cur += 1;
        P_WEST:  cur -= 1;
        default: return 1;
      endcase
    end
    return 0;
  endfunction

  // ---------------- scoreboard ----------------
  localparam int MAXP = 2048;
  int pk_src[MAXP], pk_dst[MAXP], pk_got[MAXP];
  int n_pk = 0, n_wireless_pk = 0;
  int cur_id [NODES][NVC];
  int bad = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++)
      if (ej_valid[n] && ej_ready[n][ej_flit[n].vc]) begin
        automatic flit_t f = ej_flit[n];
        automatic int id = int'(f.data[19:8]);
        automatic int sq = int'(f.data[25:20]);
        if (f.head) cur_id[n][f.vc] = id;
        if (cur_id[n][f.vc] != id || pk_dst[id] != n || sq != pk_got[id] ||
            f.head != (sq == 0) || f.tail != (sq == PLEN-1)) begin
          bad++;
          if (bad < 10) $display("bad flit at node %0d: pkt %0d seq %0d (got %0d) dst %0d", n, id, sq, pk_got[id], pk_dst[id]);
        end
        pk_got[id]++;
      end
  end

  // ---------------- injection ----------------
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

  function automatic void new_packet(int src, int dst);
    pk_src[n_pk] = src;
    pk_dst[n_pk] = dst;
    pk_got[n_pk] = 0;
    for (int w = 0; w < NUM_WI; w++)
      if (int'(HR_NODE[w]) == src && use_wireless(4'(src), 4'(dst))) n_wireless_pk++;
    queue[src].push_back(n_pk);
    n_pk++;
  endfunction

  // random packets from every non-RUZ node; plus a few forced wireless ones
  task automatic traffic(int per_node);
    for (int k = 0; k < per_node; k++)
      for (int s = 0; s < NODES; s++) begin
        int d;
        if (is_ruz(s)) continue;
        do d = $urandom_range(0, NODES-1); while (d == s || !route_ok(s, d));
        new_packet(s, d);
      end
  endtask

  // ---------------- mechanism counters ----------------
  int n_up = 0, n_down = 0, n_gate = 0, n_wake = 0, n_ruz_bad = 0, n_huz_gate = 0;
  int n_grant = 0, n_reject = 0, n_bp = 0, n_ovf = 0;
  vlevel_e prev_lvl [NODES];
  logic [NUM_WI-1:0] prev_grant;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (level[n] > prev_lvl[n] && prev_lvl[n] != LVL_0V0) n_up++;
      if (level[n] < prev_lvl[n] && level[n] != LVL_0V0) n_down++;
      if (level[n] == LVL_0V0 && prev_lvl[n] != LVL_0V0 && zone[n] == ZONE_LUZ) n_gate++;
      if (woke[n]) n_wake++;
      if (zone[n] == ZONE_RUZ && (level[n] != LVL_0V0 || pwr_on[n])) n_ruz_bad++;
      if (zone[n] == ZONE_HUZ && level[n] == LVL_0V0) n_huz_gate++;
      if (inj_valid[n] && !inj_ready[n][inj_flit[n].vc]) n_bp++;
      prev_lvl[n] = level[n];
    end
    n_grant  += $countones(wi_grant & ~prev_grant);
    n_reject += $countones(lna_reject);
    n_ovf    += $countones(rx_overflow);
    prev_grant = wi_grant;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    for (int n = 0; n < NODES; n++) begin
      inj_flit[n] = '0;
      ej_ready[n] = '1;
      prev_lvl[n] = LVL_1V1;
      for (int v = 0; v < NVC; v++) cur_id[n][v] = -1;
      // profile: RUZ 12, 15 (1 %), HUZ 5, 6 (80 %), others 30 %
      prof_busy[n] = (n == 12 || n == 15) ? 32'd1000 : (n == 5 || n == 6) ? 32'd80000 : 32'd30000;
    end
    prof_total = 32'd100000;
    prev_grant = '0;
    inj_valid = '0;
    repeat (4) @(posedge clk);
    #0.01 rst_n = 1;
    check(zone[12] == ZONE_RUZ && zone[15] == ZONE_RUZ && zone[5] == ZONE_HUZ && zone[0] == ZONE_LUZ,
          "zones from the profile");
    for (int n = 0; n < NODES; n++)
      fork
        automatic int nn = n;
        injector(nn);
      join_none
    // forced wireless traffic between distant nodes with hybrid routers
    new_packet(2, 13); new_packet(13, 2); new_packet(4, 11); new_packet(11, 4);
    // phase 1: heavy traffic for 4 epochs
    traffic(3);
    repeat (4 * EPOCH) @(posedge clk);
    // phase 2: silence for 5 epochs
    repeat (5 * EPOCH) @(posedge clk);
    check(n_gate > 0, "LUZ routers gated during silence");
    // phase 3: light traffic for 3 epochs
    traffic(1);
    new_packet(2, 13);
    repeat (3 * EPOCH) @(posedge clk);
    // drain
    begin
      int t = 0;
      int done;
      do begin
        done = 1;
        for (int i = 0; i < n_pk; i++) if (pk_got[i] != PLEN) done = 0;
        repeat (100) @(posedge clk);
        t += 100;
      end while (!done && t < 20000);
    end
    for (int i = 0; i < n_pk; i++)
      check(pk_got[i] == PLEN, $sformatf("packet %0d (%0d -> %0d): %0d of %0d flits", i, pk_src[i], pk_dst[i], pk_got[i], PLEN));
    check(bad == 0, $sformatf("%0d misdelivered or out-of-order flits", bad));
    check(n_ovf == 0, "no wireless receive overflow");
    check(n_ruz_bad == 0, "RUZ routers held at 0 V throughout");
    check(n_huz_gate == 0, "HUZ routers never gated");
    $display("packets %0d (%0d wireless at source) in %0d cycles", n_pk, n_wireless_pk, cyc);
    $display("mechanisms: up %0d down %0d gate %0d wake %0d wireless %0d lna_reject %0d backpressure %0d",
             n_up, n_down, n_gate, n_wake, n_grant, n_reject, n_bp);
    check(n_up > 0,     "voltage raised at least once");
    check(n_down > 0,   "voltage lowered at least once");
    check(n_gate > 0,   "router gated at least once");
    check(n_wake > 0,   "router woken on demand at least once");
    check(n_grant > 0,  "wireless transmission at least once");
    check(n_reject > 0, "bystander LNA gated after address mismatch at least once");
    check(n_bp > 0,     "injection back-pressure at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
