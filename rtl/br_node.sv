// br_node: one network node's switch with its power management: the
// router, its AMS voltage controller and its voltage regulator.
//
// The router's UCU estimates flow to the controller of each neighbour
// (ugs_out) and the neighbours' estimates come in on ugs_in (N, E, S, W).
// The controller chooses the supply level per epoch (CNTRL_MV); the router
// runs while the regulator reports power good at a non-zero level. A gated
// router with a flit waiting at one of its inputs asks the controller to
// wake it. Used alone as a base router (5 ports) and inside a hybrid router
// (6 ports, the sixth being the wireless port).
module br_node
  import wnoc_pkg::*;
#(
  parameter int         NP           = 5,
  parameter int         NVC          = 2,
  parameter int         DEPTH        = 4,
  parameter logic [3:0] ROUTER_ID    = 4'd0,
  parameter bit         HAS_WI       = 1'b0,
  parameter int         EPOCH_CYCLES = 1000,
  parameter int         HIST         = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  zone_e             zone,
  input  flit_t             in_flit  [NP],
  input  logic [NP-1:0]     in_valid,
  output logic [NVC-1:0]    in_ready [NP],
  output flit_t             out_flit [NP],
  output logic [NP-1:0]     out_valid,
  input  logic [NVC-1:0]    out_ready[NP],
  input  logic [UGS_W-1:0]  ugs_in   [4],
  output logic [UGS_W-1:0]  ugs_out  [4],
  output vlevel_e           level,
  output logic [11:0]       vdd_mv,
  output logic              pwr_on,
  output logic              woke,
  output logic              epoch_end
);
  logic [9:0] occ;
  logic       sw_active, wake_req, idle, pgood;
  logic [1:0] ue;

  base_router #(.NP(NP), .NVC(NVC), .DEPTH(DEPTH), .ROUTER_ID(ROUTER_ID), .HAS_WI(HAS_WI)) u_router (
    .clk, .rst_n, .pwr_on,
    .in_flit, .in_valid, .in_ready,
    .out_flit, .out_valid, .out_ready,
    .ugs_out, .occupancy(occ), .sw_active, .wake_req, .idle
  );

  ams_voltage_ctrl #(.EPOCH_CYCLES(EPOCH_CYCLES), .HIST(HIST)) u_amsc (
    .clk, .rst_n, .zone,
    .ugs_in, .in_occ(occ), .sw_active,
    .router_idle(idle), .wake_req,
    .cntrl_mv(level), .ue, .epoch_end, .woke
  );

  voltage_regulator u_reg (
    .clk, .rst_n, .cntrl_mv(level), .vdd_mv, .power_good(pgood)
  );

  assign pwr_on = pgood;
endmodule
