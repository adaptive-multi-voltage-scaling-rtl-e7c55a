// tb_hybrid_router: three hybrid routers (nodes 2, 4 and 13; WIs 0, 1, 3)
// share a wireless channel through the channel arbiter. A 64-flit packet
// injected at node 2 for node 13 must take the wireless shortcut and leave
// node 13's local port intact; a packet from node 2 for node 3 must leave
// node 2 on its east port. The test checks that PA and LNA are gated
// before and after, that only node 2's PA transmits, that node 4's LNA
// wakes and is gated again after the address (mismatch) while node 13's
// stays on, and the air time: 64 flits at 4 symbols per 5 cycles.
module tb_hybrid_router;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  localparam int NVC = 2;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int H = 3;
  localparam logic [3:0] IDS [H] = '{4'd2, 4'd4, 4'd13};
  localparam logic [1:0] WIS [H] = '{2'd0, 2'd1, 2'd3};

  flit_t          in_flit  [H][5];
  logic [4:0]     in_valid [H];
  logic [NVC-1:0] in_ready [H][5];
  flit_t          out_flit [H][5];
  logic [4:0]     out_valid[H];
  logic [NVC-1:0] out_ready[H][5];
  logic [7:0]     ugs_in [H][4], ugs_out[H][4];
  vlevel_e        level [H];
  logic [11:0]    mv [H];
  logic [H-1:0]   pwr, woke, eend, pg_pa, pg_lna, rej, ovf;
  rf_t            rf_in [H], rf_out [H];
  logic [3:0]     req, grant;

  for (genvar h = 0; h < H; h++) begin : g
    hybrid_router #(.ROUTER_ID(IDS[h]), .WI_ID(WIS[h])) dut (
      .clk, .rst_n, .zone(ZONE_LUZ),
      .in_flit(in_flit[h]), .in_valid(in_valid[h]), .in_ready(in_ready[h]),
      .out_flit(out_flit[h]), .out_valid(out_valid[h]), .out_ready(out_ready[h]),
      .ugs_in(ugs_in[h]), .ugs_out(ugs_out[h]),
      .level(level[h]), .vdd_mv(mv[h]), .pwr_on(pwr[h]), .woke(woke[h]), .epoch_end(eend[h]),
      .rf_in(rf_in[h]), .rf_out(rf_out[h]), .wi_req(req[WIS[h]]), .wi_grant(grant[WIS[h]]),
      .pg_pa(pg_pa[h]), .pg_lna(pg_lna[h]), .lna_reject(rej[h]), .rx_overflow(ovf[h]));
  end
  assign req[2] = 1'b0;
  wi_medium_arbiter #(.N(4)) arb (.clk, .rst_n, .req, .grant);

  always_comb
    for (int h = 0; h < H; h++) begin
      rf_in[h] = '0;
      for (int s = 0; s < H; s++)
        if (s != h) rf_in[h] = rf_in[h] | rf_out[s];   // one transmitter at a time
    end

  // monitors
  int rx13 = 0, rx_e = 0, bad = 0, pa_on_cyc = 0, lna13_on = 0, lna4_on = 0, pa_other = 0;
  int rej4 = 0, rej13 = 0, t_first_air = -1, t_last_air = -1, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid[2][P_LOCAL]) begin
      automatic flit_t f = out_flit[2][P_LOCAL];
      if (f.data[23:16] != 8'(rx13) || f.head != (rx13 == 0) || f.tail != (rx13 == 63)) bad++;
      rx13++;
    end
    if (out_valid[0][P_EAST]) rx_e++;
    if (pg_pa[0]) pa_on_cyc++;
    if (pg_pa[1] || pg_pa[2]) pa_other++;
    if (pg_lna[2]) lna13_on++;
    if (pg_lna[1]) lna4_on++;
    if (rej[1]) rej4++;
    if (rej[2]) rej13++;
    if (rf_out[0].valid && !rf_out[0].ctrl) begin
      if (t_first_air < 0) t_first_air = cyc;
      t_last_air = cyc;
    end
  end

  task automatic send(int h, int dst, int len);
    for (int s = 0; s < len; s++) begin
      in_flit[h][P_LOCAL] = '{head: (s == 0), tail: (s == len-1), vc: '0,
                             data: {8'h00, 8'(s), 8'h77, 4'(IDS[h]), 4'(dst)}};
      in_valid[h][P_LOCAL] = 1'b1;
      do @(posedge clk); while (!in_ready[h][P_LOCAL][0]);
      #0.1;
    end
    in_valid[h][P_LOCAL] = 1'b0;
  endtask

  initial begin
    for (int h = 0; h < H; h++) begin
      in_valid[h] = '0;
      for (int p = 0; p < 5; p++) begin in_flit[h][p] = '0; out_ready[h][p] = '1; end
      for (int d = 0; d < 4; d++) ugs_in[h][d] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk); #0.1;
    check(pg_pa == '0 && pg_lna == '0, "all PAs and LNAs gated at rest");
    send(0, 13, 64);
    send(0, 3, 2);
    repeat (400) @(posedge clk); #0.1;
    check(rx13 == 64 && bad == 0, $sformatf("node 13 received %0d of 64 flits, %0d bad", rx13, bad));
    check(rx_e == 2, $sformatf("node 2 sent %0d flits east, expected 2", rx_e));
    check(pa_on_cyc > 0 && pa_other == 0, "only the sender's PA was supplied");
    check(lna13_on > 0 && rej13 == 0, "receiver's LNA on, not rejected");
    check(rej4 == 1 && lna4_on > 0 && lna4_on < 10, $sformatf("bystander LNA woke and was gated (on %0d cycles)", lna4_on));
    check(t_last_air - t_first_air + 1 == 320, $sformatf("64 flits on air in %0d cycles, expected 320", t_last_air - t_first_air + 1));
    check(pg_pa == '0 && pg_lna == '0, $sformatf("all gated again afterwards: pa %b lna %b power %0d/%0d/%0d", pg_pa, pg_lna, rf_in[0].power, rf_in[1].power, rf_in[2].power));
    check(ovf == '0, "no receive overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
