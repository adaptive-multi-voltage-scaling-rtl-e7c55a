// ams_voltage_ctrl: adaptive multi-voltage scaling (AMS) part of a
// router's AMS controller (AMSC).
//
// Time is cut into epochs of EPOCH_CYCLES cycles. During an epoch the
// controller counts the cycles in which the router switched a flit; at the
// end this busy count is quantized into one of four utilization levels
// (thresholds UTIL_TH1..3, per mille of the epoch) and stored in a 16-entry
// history together with the load bin the epoch started with. Then the
// total load TL = sum of the four neighbours' estimates + own input-buffer
// occupancy is binned (TL_TH1..3) and, over the history entries with that
// same bin, the controller counts how often each utilization level
// occurred (the level probabilities). The most frequent level (the higher
// one on a tie) is the utilization estimate UE; with no matching history
// UE is the load bin itself. The supply level for the next epoch is then
// the one matching UE, so the voltage goes up when UE exceeds the current
// level, down when it is lower, and stays otherwise (levels 0 V, 0.8 V,
// 1.0 V, 1.1 V).
//
// Zones are set once per application: RUZ routers are held at 0 V, HUZ
// routers are never gated (floor 0.8 V), LUZ routers may be gated for an
// epoch when UE is the lowest level and the router is empty. A gated LUZ
// router whose neighbour has a flit for it is woken at once to 0.8 V.
//
// The epoch length, history depth, the four levels and the zone scheme
// follow the published design; the quantization thresholds, the form of
// the level probabilities, the tie rule, the HUZ floor, gating only empty
// routers and wake-on-demand are choices of this implementation.
//
// Timing: the new level (cntrl_mv) is registered one cycle after the last
// cycle of an epoch (a RUZ router's output is 0 V from the first cycle); epoch_end pulses in that last cycle.
module ams_voltage_ctrl
  import wnoc_pkg::*;
#(
  parameter int EPOCH_CYCLES = 1000,
  parameter int HIST         = 16,
  parameter int UTIL_TH1     = 50,     // per mille: 5 %
  parameter int UTIL_TH2     = 300,    // 30 %
  parameter int UTIL_TH3     = 750,    // 75 %
  parameter int TL_TH1       = 1,      // load bins: TL < 1, < 8, < 32, >= 32
  parameter int TL_TH2       = 8,
  parameter int TL_TH3       = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  zone_e            zone,
  input  logic [UGS_W-1:0] ugs_in [4],   // estimates from N, E, S, W neighbours
  input  logic [9:0]       in_occ,       // own input-buffer occupancy
  input  logic             sw_active,
  input  logic             router_idle,
  input  logic             wake_req,
  output vlevel_e          cntrl_mv,     // to the voltage regulator (RUZ: 0 V)
  output logic [1:0]       ue,           // last utilization estimate
  output logic             epoch_end,
  output logic             woke          // pulse: woken on demand
);
  localparam int CW = $clog2(EPOCH_CYCLES + 1);
  localparam int HW = $clog2(HIST + 1);

  typedef struct packed {
    logic       valid;
    logic [1:0] tl_bin;
    logic [1:0] level;
  } hist_t;

  logic [CW-1:0] cyc, busy;
  hist_t         hist [HIST];
  logic [1:0]    start_bin;     // load bin at the start of the running epoch
  logic          decide;        // one cycle after epoch_end

  // ---------------- total load and its bin ----------------
  logic [11:0] tl;
  logic [1:0]  tl_bin;
  always_comb begin
    tl = 12'(in_occ);
    for (int d = 0; d < 4; d++) tl = tl + 12'(ugs_in[d]);
    if (int'(tl) < TL_TH1)      tl_bin = 2'd0;
    else if (int'(tl) < TL_TH2) tl_bin = 2'd1;
    else if (int'(tl) < TL_TH3) tl_bin = 2'd2;
    else                        tl_bin = 2'd3;
  end

  // ---------------- measured utilization level of the epoch ----------------
  logic [1:0] meas_level;
  logic [CW-1:0] busy_now;
  always_comb begin
    longint pm;
    busy_now = busy + CW'(sw_active);
    pm = longint'(busy_now) * 1000;
    if (pm < longint'(UTIL_TH1) * EPOCH_CYCLES)      meas_level = 2'd0;
    else if (pm < longint'(UTIL_TH2) * EPOCH_CYCLES) meas_level = 2'd1;
    else if (pm < longint'(UTIL_TH3) * EPOCH_CYCLES) meas_level = 2'd2;
    else                                             meas_level = 2'd3;
  end

  assign epoch_end = (cyc == CW'(EPOCH_CYCLES - 1));

  // ---------------- level probabilities and estimate ----------------
  logic [HW-1:0] lp [4];
  logic [1:0]    ue_c;
  always_comb begin
    logic any;
    for (int l = 0; l < 4; l++) lp[l] = '0;
    for (int h = 0; h < HIST; h++)
      if (hist[h].valid && hist[h].tl_bin == tl_bin)
        lp[hist[h].level] = lp[hist[h].level] + 1'b1;
    any  = 1'b0;
    ue_c = tl_bin;
    for (int l = 0; l < 4; l++)
      if (lp[l] != '0 && (!any || lp[l] >= lp[ue_c])) begin
        ue_c = 2'(l);
        any  = 1'b1;
      end
  end

  // ---------------- next level with zone rules ----------------
  vlevel_e next_lvl;
  vlevel_e lvl_q;
  assign cntrl_mv = (zone == ZONE_RUZ) ? LVL_0V0 : lvl_q;
  always_comb begin
    next_lvl = vlevel_e'(ue_c);
    unique case (zone)
      ZONE_RUZ: next_lvl = LVL_0V0;
      ZONE_HUZ: if (next_lvl == LVL_0V0) next_lvl = LVL_0V8;
      default:  if (next_lvl == LVL_0V0 && !router_idle) next_lvl = LVL_0V8;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc       <= '0;
      busy      <= '0;
      start_bin <= '0;
      decide    <= 1'b0;
      ue        <= 2'd3;
      lvl_q     <= LVL_1V1;
      woke      <= 1'b0;
      for (int h = 0; h < HIST; h++) hist[h] <= '0;
    end else begin
      decide <= epoch_end;
      woke   <= 1'b0;
      if (epoch_end) begin
        cyc  <= '0;
        busy <= '0;
        // shift the finished epoch into the history
        hist[0] <= '{valid: 1'b1, tl_bin: start_bin, level: meas_level};
        for (int h = 1; h < HIST; h++) hist[h] <= hist[h-1];
      end else begin
        cyc  <= cyc + 1'b1;
        busy <= busy_now;
      end
      if (zone == ZONE_RUZ) begin
        lvl_q <= LVL_0V0;
      end else if (decide) begin
        ue        <= ue_c;
        lvl_q     <= next_lvl;
        start_bin <= tl_bin;
      end else if (lvl_q == LVL_0V0 && wake_req) begin
        lvl_q    <= LVL_0V8;
        woke     <= 1'b1;
      end
    end
  end
endmodule
