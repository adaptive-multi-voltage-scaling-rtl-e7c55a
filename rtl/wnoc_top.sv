// wnoc_top: 4x4 wireless network-on-chip with adaptive multi-voltage
// scaling.
//
// Sixteen nodes in a mesh (node id = row*4 + column, row 0 at the top).
// Nodes 2, 4, 11 and 13 are hybrid routers with a wireless interface
// (WI addresses 0..3 in that order); the others are base routers. Every
// node has its own AMS controller and regulator, and passes 8-bit load
// estimates to its four neighbours. The WIs share one wireless channel:
// the channel arbiter lets one WI transmit at a time, and every other WI
// hears that transmission (rf_in = sum of the other WIs' signals). A WI's
// request reaches the arbiter only while the WI it addresses has room for
// a whole packet, so a granted packet is never dropped at the receiver.
//
// The utilization zone of every node (HUZ, LUZ or RUZ) is derived once per
// application from a profiling run's per-router busy counts.
//
// Outside interface, per node: a local injection port (flit, valid, one
// ready bit per VC) and a local ejection port, its profiled busy count and
// resulting zone, and status: supply level, supply in mV,
// powered, woken-on-demand pulse, epoch-end pulse. Per WI: channel grant,
// PA and LNA supply enables, LNA reject pulse and receive-buffer overflow.
module wnoc_top
  import wnoc_pkg::*;
#(
  parameter int NVC          = 2,
  parameter int DEPTH        = 4,
  parameter int EPOCH_CYCLES = 1000,
  parameter int HIST         = 16,
  parameter int DES_DEPTH    = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // global utilization of each router from a profiling run of the
  // application (busy cycles out of total cycles); sets the zones
  input  logic [31:0]       prof_busy  [NODES],
  input  logic [31:0]       prof_total,
  output zone_e             zone       [NODES],
  // local (processing element) ports
  input  flit_t             inj_flit   [NODES],
  input  logic [NODES-1:0]  inj_valid,
  output logic [NVC-1:0]    inj_ready  [NODES],
  output flit_t             ej_flit    [NODES],
  output logic [NODES-1:0]  ej_valid,
  input  logic [NVC-1:0]    ej_ready   [NODES],
  // power status
  output vlevel_e           level      [NODES],
  output logic [11:0]       vdd_mv     [NODES],
  output logic [NODES-1:0]  pwr_on,
  output logic [NODES-1:0]  woke,
  output logic [NODES-1:0]  epoch_end,
  // wireless status
  output logic [NUM_WI-1:0] wi_grant,
  output logic [NUM_WI-1:0] pg_pa,
  output logic [NUM_WI-1:0] pg_lna,
  output logic [NUM_WI-1:0] lna_reject,
  output logic [NUM_WI-1:0] rx_overflow
);
  zone_classifier #(.N(NODES)) u_zone (
    .busy_cycles(prof_busy), .total_cycles(prof_total), .zone);

  // per node, ports 0..4 (local, N, E, S, W)
  flit_t              n_in_flit  [NODES][5];
  logic [4:0]         n_in_valid [NODES];
  logic [NVC-1:0]     n_in_ready [NODES][5];
  flit_t              n_out_flit [NODES][5];
  logic [4:0]         n_out_valid[NODES];
  logic [NVC-1:0]     n_out_ready[NODES][5];
  logic [UGS_W-1:0]   n_ugs_in   [NODES][4];
  logic [UGS_W-1:0]   n_ugs_out  [NODES][4];

  rf_t                rf_out [NUM_WI];
  rf_t                rf_in  [NUM_WI];
  logic [NUM_WI-1:0]  wi_req;
  logic [WI_W-1:0]    wi_dst [NUM_WI];
  logic [NUM_WI-1:0]  wi_room;
  logic [NUM_WI-1:0]  arb_req;

  // neighbour of node i through mesh port p (1..4); -1 at the edge
  function automatic int nbr(int i, int p);
    int x, y;
    x = i % MESH_X;
    y = i / MESH_X;
    case (p)
      P_NORTH: return (y > 0)        ? i - MESH_X : -1;
      P_EAST:  return (x < MESH_X-1) ? i + 1      : -1;
      P_SOUTH: return (y < MESH_Y-1) ? i + MESH_X : -1;
      P_WEST:  return (x > 0)        ? i - 1      : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opp(int p);
    return (p == P_NORTH) ? P_SOUTH : (p == P_SOUTH) ? P_NORTH :
           (p == P_EAST)  ? P_WEST  : P_EAST;
  endfunction

  function automatic int wi_of(int i);
    for (int w = 0; w < NUM_WI; w++)
      if (int'(HR_NODE[w]) == i) return w;
    return -1;
  endfunction

  // ---------------- mesh wiring ----------------
  always_comb begin
    for (int i = 0; i < NODES; i++) begin
      n_in_flit[i][P_LOCAL]   = inj_flit[i];
      n_in_valid[i][P_LOCAL]  = inj_valid[i];
      inj_ready[i]            = n_in_ready[i][P_LOCAL];
      ej_flit[i]              = n_out_flit[i][P_LOCAL];
      ej_valid[i]             = n_out_valid[i][P_LOCAL];
      n_out_ready[i][P_LOCAL] = ej_ready[i];
      for (int p = 1; p < 5; p++) begin
        int j;
        j = nbr(i, p);
        if (j >= 0) begin
          n_in_flit[i][p]   = n_out_flit[j][opp(p)];
          n_in_valid[i][p]  = n_out_valid[j][opp(p)];
          n_out_ready[i][p] = n_in_ready[j][opp(p)];
          n_ugs_in[i][p-1]  = n_ugs_out[j][opp(p)-1];
        end else begin
          n_in_flit[i][p]   = '0;
          n_in_valid[i][p]  = 1'b0;
          n_out_ready[i][p] = '0;
          n_ugs_in[i][p-1]  = '0;
        end
      end
    end
  end

  // ---------------- nodes ----------------
  for (genvar i = 0; i < NODES; i++) begin : g_node
    localparam int W = wi_of(i);
    if (W >= 0) begin : g_hr
      hybrid_router #(.NVC(NVC), .DEPTH(DEPTH), .ROUTER_ID(4'(i)), .WI_ID(WI_W'(W)),
                      .EPOCH_CYCLES(EPOCH_CYCLES), .HIST(HIST), .DES_DEPTH(DES_DEPTH)) u_hr (
        .clk, .rst_n, .zone(zone[i]),
        .in_flit(n_in_flit[i]), .in_valid(n_in_valid[i]), .in_ready(n_in_ready[i]),
        .out_flit(n_out_flit[i]), .out_valid(n_out_valid[i]), .out_ready(n_out_ready[i]),
        .ugs_in(n_ugs_in[i]), .ugs_out(n_ugs_out[i]),
        .level(level[i]), .vdd_mv(vdd_mv[i]), .pwr_on(pwr_on[i]),
        .woke(woke[i]), .epoch_end(epoch_end[i]),
        .rf_in(rf_in[W]), .rf_out(rf_out[W]),
        .wi_req(wi_req[W]), .wi_dst(wi_dst[W]), .wi_room(wi_room[W]),
        .wi_grant(wi_grant[W]),
        .pg_pa(pg_pa[W]), .pg_lna(pg_lna[W]),
        .lna_reject(lna_reject[W]), .rx_overflow(rx_overflow[W])
      );
    end else begin : g_br
      br_node #(.NP(5), .NVC(NVC), .DEPTH(DEPTH), .ROUTER_ID(4'(i)), .HAS_WI(1'b0),
                .EPOCH_CYCLES(EPOCH_CYCLES), .HIST(HIST)) u_br (
        .clk, .rst_n, .zone(zone[i]),
        .in_flit(n_in_flit[i]), .in_valid(n_in_valid[i]), .in_ready(n_in_ready[i]),
        .out_flit(n_out_flit[i]), .out_valid(n_out_valid[i]), .out_ready(n_out_ready[i]),
        .ugs_in(n_ugs_in[i]), .ugs_out(n_ugs_out[i]),
        .level(level[i]), .vdd_mv(vdd_mv[i]), .pwr_on(pwr_on[i]),
        .woke(woke[i]), .epoch_end(epoch_end[i])
      );
    end
  end

  // ---------------- wireless channel ----------------
  // A new transfer may only start while the addressed receiver can hold a
  // whole packet; a transfer already granted keeps its request.
  always_comb
    for (int w = 0; w < NUM_WI; w++)
      arb_req[w] = wi_req[w] && (wi_grant[w] || wi_room[wi_dst[w]]);

  wi_medium_arbiter #(.N(NUM_WI)) u_arb (.clk, .rst_n, .req(arb_req), .grant(wi_grant));

  always_comb begin
    for (int w = 0; w < NUM_WI; w++) begin
      logic [8:0] pw;
      rf_in[w] = '0;
      pw = '0;
      for (int s = 0; s < NUM_WI; s++)
        if (s != w) begin
          pw             = pw + 9'(rf_out[s].power);
          rf_in[w].valid = rf_in[w].valid | rf_out[s].valid;
          rf_in[w].ctrl  = rf_in[w].ctrl  | rf_out[s].ctrl;
          rf_in[w].sym   = rf_in[w].sym   | rf_out[s].sym;
        end
      rf_in[w].power = pw[8] ? 8'hFF : pw[7:0];
    end
  end
endmodule
