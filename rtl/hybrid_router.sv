// hybrid_router: a network node with a wireless interface (WI).
//
// A six-port router node (br_node: router, AMS voltage controller,
// regulator) whose sixth port is wired to the WI: its output feeds the
// serializer buffer, its input is fed by the deserializer buffer. The
// receiver-end control unit (comparator plus the WI power-gating part of
// the AMSC) keeps the PA and LNA gated except while this WI transmits a
// granted packet, or while a transmission is on the air and, after the
// address is decoded, only if it is addressed here. The five wired ports
// look exactly like a base router's. rf_out is this WI's radiated signal;
// rf_in is the channel as heard here (everyone else's transmission).
// wi_req/wi_grant connect to the channel arbiter; wi_dst names the WI a
// pending request addresses and wi_room says this receiver has space for a
// whole packet. The wireless port offers
// the router a single output VC (VC 0), so flits of two packets never mix
// in the serializer; received packets enter the router on VC 0.
module hybrid_router
  import wnoc_pkg::*;
#(
  parameter int              NVC          = 2,
  parameter int              DEPTH        = 4,
  parameter logic [3:0]      ROUTER_ID    = 4'd2,
  parameter logic [WI_W-1:0] WI_ID        = '0,
  parameter int              EPOCH_CYCLES = 1000,
  parameter int              HIST         = 16,
  parameter int              DES_DEPTH    = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  zone_e             zone,
  input  flit_t             in_flit  [5],
  input  logic [4:0]        in_valid,
  output logic [NVC-1:0]    in_ready [5],
  output flit_t             out_flit [5],
  output logic [4:0]        out_valid,
  input  logic [NVC-1:0]    out_ready[5],
  input  logic [UGS_W-1:0]  ugs_in   [4],
  output logic [UGS_W-1:0]  ugs_out  [4],
  output vlevel_e           level,
  output logic [11:0]       vdd_mv,
  output logic              pwr_on,
  output logic              woke,
  output logic              epoch_end,
  // wireless
  input  rf_t               rf_in,
  output rf_t               rf_out,
  output logic              wi_req,
  output logic [WI_W-1:0]   wi_dst,
  output logic              wi_room,
  input  logic              wi_grant,
  output logic              pg_pa,
  output logic              pg_lna,
  output logic              lna_reject,
  output logic              rx_overflow
);
  flit_t          r_in_flit  [6];
  logic [5:0]     r_in_valid;
  logic [NVC-1:0] r_in_ready [6];
  flit_t          r_out_flit [6];
  logic [5:0]     r_out_valid;
  logic [NVC-1:0] r_out_ready[6];

  flit_t      des_flit;
  logic       des_valid, ser_ready;
  logic       tx_valid, tx_ctrl, tx_done, pa_ready;
  logic [7:0] tx_sym;
  logic       rx_valid, rx_ctrl, rx_detect;
  logic [7:0] rx_sym;
  logic       addr_valid, addr_match, rx_done;
  logic [1:0] pa_state, lna_state;

  always_comb begin
    for (int p = 0; p < 5; p++) begin
      r_in_flit[p]   = in_flit[p];
      r_in_valid[p]  = in_valid[p];
      in_ready[p]    = r_in_ready[p];
      out_flit[p]    = r_out_flit[p];
      out_valid[p]   = r_out_valid[p];
      r_out_ready[p] = out_ready[p];
    end
    r_in_flit[P_WI]   = des_flit;
    r_in_valid[P_WI]  = des_valid;
    // one packet at a time crosses the air: only VC 0 of the wireless port
    r_out_ready[P_WI] = NVC'(ser_ready);
  end

  br_node #(.NP(6), .NVC(NVC), .DEPTH(DEPTH), .ROUTER_ID(ROUTER_ID), .HAS_WI(1'b1),
            .EPOCH_CYCLES(EPOCH_CYCLES), .HIST(HIST)) u_node (
    .clk, .rst_n, .zone,
    .in_flit(r_in_flit), .in_valid(r_in_valid), .in_ready(r_in_ready),
    .out_flit(r_out_flit), .out_valid(r_out_valid), .out_ready(r_out_ready),
    .ugs_in, .ugs_out, .level, .vdd_mv, .pwr_on, .woke, .epoch_end
  );

  wi_serializer u_ser (
    .clk, .rst_n,
    .in_flit(r_out_flit[P_WI]), .in_valid(r_out_valid[P_WI]), .in_ready(ser_ready),
    .tx_req(wi_req), .tx_dst(wi_dst), .tx_grant(wi_grant), .pa_ready,
    .tx_valid, .tx_ctrl, .tx_sym, .tx_done
  );

  power_amplifier u_pa (
    .clk, .rst_n, .pg_pa, .tx_valid, .tx_ctrl, .tx_sym,
    .pa_ready, .pstate(pa_state), .rf_out
  );

  rx_comparator u_cmp (.rf_in, .detect(rx_detect));

  low_noise_amplifier u_lna (
    .clk, .rst_n, .pg_lna, .rf_in,
    .rx_valid, .rx_ctrl, .rx_sym, .pstate(lna_state)
  );

  wi_deserializer #(.DEPTH(DES_DEPTH), .WI_ID(WI_ID)) u_des (
    .clk, .rst_n,
    .rx_valid, .rx_ctrl, .rx_sym,
    .addr_valid, .addr_match, .rx_done, .overflow(rx_overflow), .room(wi_room),
    .out_flit(des_flit), .out_valid(des_valid), .out_ready(r_in_ready[P_WI][0])
  );

  wi_pg_ctrl u_pg (
    .clk, .rst_n,
    .grant_wi(wi_grant && wi_req), .tx_done,
    .rx_detect, .addr_valid, .addr_match, .rx_done,
    .pg_pa, .pg_lna, .lna_reject
  );
endmodule
