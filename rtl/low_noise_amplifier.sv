// low_noise_amplifier: behavioural model (analog part) of the WI receiver:
// antenna, LNA and demodulator, seen as one block with a power-gating
// switch. While pg_lna is low nothing is received. When pg_lna rises the
// LNA wakes after WAKE_CYCLES cycles (0.14 ns published wake-up latency,
// one cycle at 2.5 GHz); from then on the symbols on the channel are passed
// to the deserializer. pstate reports sleep / wake-up / active.
module low_noise_amplifier
  import wnoc_pkg::*;
#(
  parameter int WAKE_CYCLES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pg_lna,
  input  rf_t              rf_in,
  output logic             rx_valid,
  output logic             rx_ctrl,
  output logic [SYM_W-1:0] rx_sym,
  output logic [1:0]       pstate
);
  logic [7:0] wake;
  logic       awake;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 wake <= '0;
    else if (!pg_lna)           wake <= '0;
    else if (wake < 8'(WAKE_CYCLES)) wake <= wake + 1'b1;
  end

  assign awake    = pg_lna && (wake >= 8'(WAKE_CYCLES));
  assign pstate   = !pg_lna ? 2'd0 : (awake ? 2'd2 : 2'd1);
  assign rx_valid = awake && rf_in.valid;
  assign rx_ctrl  = rf_in.ctrl;
  assign rx_sym   = rf_in.sym;
endmodule
