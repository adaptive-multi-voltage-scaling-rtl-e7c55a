// base_router: input-buffered wormhole router with virtual channels (VCs).
//
// Each input port has NVC VC buffers. A flit is written into the buffer of
// the VC named in its sideband; on the way in, the header decoder reads the
// destination of a head flit and route computation (RC) picks the output
// port (XY routing, or the wireless port of a hybrid router when the
// wireless shortcut is shorter). The port is stored with every flit, so the
// utilization computing unit (UCU) always knows how many buffered flits go
// to each neighbour. Each cycle a separable allocator first picks one VC per
// input port (round robin), then one input per output port (round robin).
// A head flit is granted only with a free output VC (VC allocation); that
// VC is held until the tail passes. The winner crosses the crossbar into
// the output register, which drives the link. A VC whose flit still sits in
// the output register is not granted again that cycle, so a flit in the
// register is always accepted on the next cycle and never blocks the
// link's other VC.
//
// Pipeline: buffer write + RC (cycle 1), VC/switch allocation (cycle 2),
// switch/link traversal through the output register (cycle 3): three
// cycles per hop, as in the published design. Buffer depth, VC count,
// the handshake (valid, with a ready bit per VC from the receiver) and the
// allocator are choices of this implementation.
//
// Power: pwr_on low means the router's supply is gated. The router then
// accepts no flit, allocates nothing and holds its state; wake_req tells
// the controller that a neighbour is waiting to send.
module base_router
  import wnoc_pkg::*;
#(
  parameter int          NP        = 5,   // 5 wired ports, 6 with a WI port
  parameter int          NVC       = 2,
  parameter int          DEPTH     = 4,   // flits per VC buffer
  parameter logic [3:0]  ROUTER_ID = 4'd0,
  parameter bit          HAS_WI    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pwr_on,
  // input links
  input  flit_t             in_flit  [NP],
  input  logic [NP-1:0]     in_valid,
  output logic [NVC-1:0]    in_ready [NP],
  // output links
  output flit_t             out_flit [NP],
  output logic [NP-1:0]     out_valid,
  input  logic [NVC-1:0]    out_ready[NP],
  // to the AMS controller and the neighbours
  output logic [UGS_W-1:0]  ugs_out  [4],
  output logic [9:0]        occupancy,
  output logic              sw_active,   // a flit crossed the crossbar
  output logic              wake_req,    // gated, and a flit is waiting
  output logic              idle         // buffers and output regs empty
);
  localparam int EW = PORT_W + $bits(flit_t);
  localparam int NI = (NP > 1) ? $clog2(NP) : 1;
  localparam int NV = (NVC > 1) ? $clog2(NVC) : 1;

  typedef struct packed {
    logic [PORT_W-1:0] route;
    flit_t             flit;
  } entry_t;

  // ---------------- input buffers with header decode + RC ----------------
  entry_t            front   [NP][NVC];
  logic              fempty  [NP][NVC];
  logic              ffull   [NP][NVC];
  logic              fpop    [NP][NVC];
  logic              fpush   [NP][NVC];
  logic [PORT_W-1:0] route_in[NP];
  logic [PORT_W-1:0] route_wr[NP][NVC];   // route of the packet being written

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      logic [NODE_W-1:0] dst;
      dst = in_flit[p].data[NODE_W-1:0];
      if (in_flit[p].head)
        route_in[p] = (HAS_WI && use_wireless(ROUTER_ID, dst)) ? PORT_W'(P_WI)
                                                               : xy_port(ROUTER_ID, dst);
      else
        route_in[p] = route_wr[p][in_flit[p].vc[NV-1:0]];
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      logic [$clog2(DEPTH):0] cnt;
      entry_t wentry;
      assign wentry = '{route: route_in[p], flit: in_flit[p]};
      assign fpush[p][v] = in_valid[p] && in_ready[p][v] && (in_flit[p].vc == VC_W'(v));
      assign in_ready[p][v] = pwr_on && !ffull[p][v];
      sync_fifo #(.WIDTH(EW), .DEPTH(DEPTH)) u_buf (
        .clk, .rst_n,
        .push (fpush[p][v]),
        .wdata(wentry),
        .pop  (fpop[p][v]),
        .rdata(front[p][v]),
        .empty(fempty[p][v]),
        .full (ffull[p][v]),
        .count(cnt)
      );
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) route_wr[p][v] <= '0;
        else if (fpush[p][v] && in_flit[p].head) route_wr[p][v] <= route_in[p];
      end
    end
  end

  // ---------------- state ----------------
  logic              ivc_active [NP][NVC];
  logic [VC_W-1:0]   ivc_ovc    [NP][NVC];
  logic              ovc_busy   [NP][NVC];
  logic [NV-1:0]     in_ptr     [NP];
  logic [NI-1:0]     out_ptr    [NP];
  flit_t             oreg       [NP];
  logic [NP-1:0]     oreg_v;

  // ---------------- allocation ----------------
  logic              out_free  [NP];
  logic              ovc_ok    [NP][NVC];   // downstream VC can take one more flit
  logic              vreq      [NP][NVC];   // VC can move this cycle
  logic [VC_W-1:0]   vovc      [NP][NVC];   // output VC it would use
  logic              ireq      [NP];        // input port p requests
  logic [NV-1:0]     ivc_sel   [NP];
  logic [PORT_W-1:0] iroute    [NP];
  logic              gnt       [NP];        // input p granted
  logic [NI-1:0]     osel      [NP];        // input chosen by output o
  logic              ovalid    [NP];

  always_comb begin
    for (int o = 0; o < NP; o++)
      out_free[o] = !oreg_v[o] || out_ready[o][oreg[o].vc[NV-1:0]];

    // A VC whose previous flit still sits in the output register is not
    // offered again: the downstream ready only promises room for one flit.
    // This keeps a flit from waiting in the shared output register for a
    // full VC, which would block the other VC of the same link.
    for (int o = 0; o < NP; o++)
      for (int w = 0; w < NVC; w++)
        ovc_ok[o][w] = out_ready[o][w] && !(oreg_v[o] && int'(oreg[o].vc) == w);

    // per input VC: can it move?
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NVC; v++) begin
        int o;
        logic found;
        o = int'(front[p][v].route);
        vreq[p][v] = 1'b0;
        vovc[p][v] = ivc_ovc[p][v];
        found = 1'b0;
        if (!fempty[p][v] && pwr_on && o < NP && out_free[o]) begin
          if (front[p][v].flit.head && !ivc_active[p][v]) begin
            for (int w = NVC-1; w >= 0; w--)
              if (!ovc_busy[o][w] && ovc_ok[o][w]) begin
                found = 1'b1;
                vovc[p][v] = VC_W'(w);
              end
            vreq[p][v] = found;
          end else begin
            vreq[p][v] = ovc_ok[o][ivc_ovc[p][v][NV-1:0]];
          end
        end
      end

    // input arbitration: one VC per input port, round robin
    for (int p = 0; p < NP; p++) begin
      ireq[p]    = 1'b0;
      ivc_sel[p] = '0;
      for (int i = NVC-1; i >= 0; i--) begin
        int v;
        v = (int'(in_ptr[p]) + i) % NVC;
        if (vreq[p][v]) begin
          ireq[p]    = 1'b1;
          ivc_sel[p] = NV'(v);
        end
      end
      iroute[p] = front[p][ivc_sel[p]].route;
    end

    // output arbitration: one input per output port, round robin
    for (int p = 0; p < NP; p++) gnt[p] = 1'b0;
    for (int o = 0; o < NP; o++) begin
      ovalid[o] = 1'b0;
      osel[o]   = '0;
      for (int i = NP-1; i >= 0; i--) begin
        int p;
        p = (int'(out_ptr[o]) + i) % NP;
        if (ireq[p] && iroute[p] == PORT_W'(o)) begin
          ovalid[o] = 1'b1;
          osel[o]   = NI'(p);
        end
      end
      if (ovalid[o]) gnt[osel[o]] = 1'b1;
    end

    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NVC; v++)
        fpop[p][v] = gnt[p] && (ivc_sel[p] == NV'(v));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NVC; v++) begin
          ivc_active[p][v] <= 1'b0;
          ivc_ovc[p][v]    <= '0;
          ovc_busy[p][v]   <= 1'b0;
        end
        in_ptr[p]  <= '0;
        out_ptr[p] <= '0;
        oreg[p]    <= '0;
      end
      oreg_v <= '0;
    end else begin
      for (int o = 0; o < NP; o++)
        if (oreg_v[o] && out_ready[o][oreg[o].vc[NV-1:0]]) oreg_v[o] <= 1'b0;
      for (int o = 0; o < NP; o++) begin
        if (ovalid[o]) begin
          int p, v, w;
          flit_t f;
          p = int'(osel[o]);
          v = int'(ivc_sel[p]);
          w = int'(vovc[p][v]);
          f = front[p][v].flit;
          f.vc = VC_W'(w);
          oreg[o]   <= f;
          oreg_v[o] <= 1'b1;
          if (f.head && !f.tail) begin
            ivc_active[p][v] <= 1'b1;
            ivc_ovc[p][v]    <= VC_W'(w);
            ovc_busy[o][w]   <= 1'b1;
          end
          if (f.tail) begin
            ivc_active[p][v] <= 1'b0;
            ovc_busy[o][w]   <= 1'b0;
          end
          in_ptr[p]  <= NV'((v + 1) % NVC);
          out_ptr[o] <= NI'((p + 1) % NP);
        end
      end
    end
  end

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_flit[o] = oreg[o];
    end
  end
  assign out_valid = oreg_v;

  // ---------------- status ----------------
  logic [NP-1:0]     wr_en, rd_en;
  logic [PORT_W-1:0] rd_route [NP];
  always_comb begin
    idle      = (oreg_v == '0);
    sw_active = 1'b0;
    for (int p = 0; p < NP; p++) begin
      wr_en[p]    = 1'b0;
      rd_en[p]    = gnt[p];
      rd_route[p] = iroute[p];
      sw_active   = sw_active | gnt[p];
      for (int v = 0; v < NVC; v++) begin
        wr_en[p] = wr_en[p] | fpush[p][v];
        idle     = idle & fempty[p][v];
      end
    end
  end
  assign wake_req = !pwr_on && (in_valid != '0);

  ucu #(.NP(NP)) u_ucu (
    .clk, .rst_n,
    .wr_en, .wr_route(route_in),
    .rd_en, .rd_route,
    .ugs_out, .occupancy
  );

  // A flit is only granted to an output register that is free this cycle.
  for (genvar o = 0; o < NP; o++) begin : g_chk
    a_grant_room: assert property (@(posedge clk) disable iff (!rst_n)
      ovalid[o] |-> out_free[o]);
  end
endmodule
