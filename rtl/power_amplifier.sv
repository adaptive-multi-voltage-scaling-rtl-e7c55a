// power_amplifier: behavioural model (analog part) of the WI transmitter:
// modulator, power amplifier and antenna, seen as one block with a
// power-gating switch.
//
// While pg_pa is low the PA is asleep and radiates nothing. When pg_pa
// rises it needs WAKE_CYCLES cycles to wake (the published wake-up latency
// is 0.14 ns, under one 0.4 ns cycle at 2.5 GHz, hence one cycle); then
// pa_ready is high and the model radiates carrier at TX_POWER together with
// whatever symbol the serializer offers. pstate reports sleep / wake-up /
// active for power accounting. The RF signal is abstracted as a power value
// plus a digital symbol; the power units are a choice of this model.
module power_amplifier
  import wnoc_pkg::*;
#(
  parameter int         WAKE_CYCLES = 1,
  parameter logic [7:0] TX_POWER    = 8'd200
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pg_pa,
  input  logic             tx_valid,
  input  logic             tx_ctrl,
  input  logic [SYM_W-1:0] tx_sym,
  output logic             pa_ready,
  output logic [1:0]       pstate,     // 0 sleep, 1 wake-up, 2 active
  output rf_t              rf_out
);
  logic [7:0] wake;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                wake <= '0;
    else if (!pg_pa)           wake <= '0;
    else if (wake < 8'(WAKE_CYCLES)) wake <= wake + 1'b1;
  end

  assign pa_ready = pg_pa && (wake >= 8'(WAKE_CYCLES));
  assign pstate   = !pg_pa ? 2'd0 : (pa_ready ? 2'd2 : 2'd1);

  always_comb begin
    rf_out = '0;
    if (pa_ready) begin
      rf_out.power = TX_POWER;
      rf_out.valid = tx_valid;
      rf_out.ctrl  = tx_ctrl;
      rf_out.sym   = tx_sym;
    end
  end
endmodule
