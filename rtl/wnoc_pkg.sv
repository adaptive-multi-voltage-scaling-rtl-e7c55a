// wnoc_pkg: types, constants and routing functions shared by the wireless
// network-on-chip with adaptive multi-voltage scaling (AMS).
//
// The network is a 4x4 mesh (node id = row*4 + column, row 0 at the top).
// Four nodes are hybrid routers (HR) that own a wireless interface (WI);
// the rest are base routers (BR). Flits are 32 bits wide and carry head,
// tail and virtual-channel (VC) sideband bits on the wired links.
// Mesh size, flit width, packet length, epoch length, history depth, the
// four supply levels and the zone thresholds follow the published design;
// the HR positions are read from its network drawing. Port numbering,
// header layout, symbol format and the wireless shortcut rule are choices
// of this implementation.
package wnoc_pkg;

  // ---------------- network geometry ----------------
  localparam int MESH_X   = 4;
  localparam int MESH_Y   = 4;
  localparam int NODES    = MESH_X * MESH_Y;
  localparam int NODE_W   = 4;
  localparam int FLIT_W   = 32;
  localparam int PKT_FLITS = 64;
  localparam int VC_W     = 2;      // room for up to 4 VCs per port
  localparam int NUM_WI   = 4;
  localparam int WI_W     = 2;

  // Hybrid router positions (node ids), WI address = index in this list.
  localparam logic [NODE_W-1:0] HR_NODE [NUM_WI] = '{4'd2, 4'd4, 4'd11, 4'd13};

  // ---------------- router ports ----------------
  localparam int P_LOCAL = 0;
  localparam int P_NORTH = 1;
  localparam int P_EAST  = 2;
  localparam int P_SOUTH = 3;
  localparam int P_WEST  = 4;
  localparam int P_WI    = 5;
  localparam int PORT_W  = 3;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [VC_W-1:0]   vc;
    logic [FLIT_W-1:0] data;   // head flit: [3:0] destination, [7:4] source
  } flit_t;

  // ---------------- AMS ----------------
  typedef enum logic [1:0] {
    LVL_0V0 = 2'd0,   // power gated
    LVL_0V8 = 2'd1,
    LVL_1V0 = 2'd2,
    LVL_1V1 = 2'd3
  } vlevel_e;

  typedef enum logic [1:0] {
    ZONE_HUZ = 2'd0,
    ZONE_LUZ = 2'd1,
    ZONE_RUZ = 2'd2
  } zone_e;

  localparam int UGS_W = 8;       // utilization estimate sent to a neighbour

  function automatic logic [11:0] level_mv(vlevel_e l);
    case (l)
      LVL_0V8: return 12'd800;
      LVL_1V0: return 12'd1000;
      LVL_1V1: return 12'd1100;
      default: return 12'd0;
    endcase
  endfunction

  // ---------------- wireless symbols ----------------
  localparam int SYM_W = 8;          // data bits per symbol
  localparam int SYMS_PER_FLIT = FLIT_W / SYM_W;
  localparam logic [7:0] SYM_ADDR = 8'hA0;   // control symbol: A0 | WI address
  localparam logic [7:0] SYM_EOP  = 8'hE0;   // control symbol: end of packet

  typedef struct packed {
    logic [7:0]       power;    // received/transmitted RF power, arbitrary units
    logic             valid;    // a symbol is carried this cycle
    logic             ctrl;     // control symbol (address / end of packet)
    logic [SYM_W-1:0] sym;
  } rf_t;

  // ---------------- routing helpers ----------------
  function automatic int node_x(logic [NODE_W-1:0] n);
    return int'(n) % MESH_X;
  endfunction

  function automatic int node_y(logic [NODE_W-1:0] n);
    return int'(n) / MESH_X;
  endfunction

  function automatic int hops(logic [NODE_W-1:0] a, logic [NODE_W-1:0] b);
    int dx, dy;
    dx = node_x(a) - node_x(b);
    dy = node_y(a) - node_y(b);
    if (dx < 0) dx = -dx;
    if (dy < 0) dy = -dy;
    return dx + dy;
  endfunction

  // Dimension-ordered XY routing (X first, then Y).
  function automatic logic [PORT_W-1:0] xy_port(logic [NODE_W-1:0] here,
                                                logic [NODE_W-1:0] dst);
    if (node_x(dst) > node_x(here)) return PORT_W'(P_EAST);
    if (node_x(dst) < node_x(here)) return PORT_W'(P_WEST);
    if (node_y(dst) > node_y(here)) return PORT_W'(P_SOUTH);
    if (node_y(dst) < node_y(here)) return PORT_W'(P_NORTH);
    return PORT_W'(P_LOCAL);
  endfunction

  // WI closest (in wired hops) to a destination; lowest index on a tie.
  function automatic logic [WI_W-1:0] nearest_wi(logic [NODE_W-1:0] dst);
    logic [WI_W-1:0] best;
    int bh;
    best = '0;
    bh = hops(HR_NODE[0], dst);
    for (int i = 1; i < NUM_WI; i++)
      if (hops(HR_NODE[i], dst) < bh) begin
        bh = hops(HR_NODE[i], dst);
        best = WI_W'(i);
      end
    return best;
  endfunction

  // At a hybrid router: take the wireless shortcut when one wireless hop
  // plus the wired hops from the receiving WI is shorter than staying wired.
  function automatic logic use_wireless(logic [NODE_W-1:0] here,
                                        logic [NODE_W-1:0] dst);
    logic [NODE_W-1:0] rx;
    rx = HR_NODE[nearest_wi(dst)];
    return (rx != here) && ((1 + hops(rx, dst)) < hops(here, dst));
  endfunction

endpackage
