// voltage_regulator: behavioural model (not synthesizable as a circuit) of
// the per-router hybrid switched inductor-capacitor regulator.
//
// The real part is analog. This model turns the AMSC's two-bit CNTRL_MV
// request into a supply value in millivolts (0, 800, 1000 or 1100, the
// four levels of the published design) and a power-good flag. After every
// change of request, power_good stays low for SETTLE_CYCLES cycles while
// the output moves; a request of 0 V gates the supply at once. The router
// runs (is powered) only while power_good is high. The settling time is a
// choice of this model; the published design gives none.
module voltage_regulator
  import wnoc_pkg::*;
#(
  parameter int SETTLE_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  vlevel_e     cntrl_mv,
  output logic [11:0] vdd_mv,
  output logic        power_good
);
  vlevel_e    cur;
  logic [7:0] settle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= LVL_0V0;
      settle <= 8'(SETTLE_CYCLES);
      vdd_mv <= '0;
    end else begin
      if (cntrl_mv != cur) begin
        cur    <= cntrl_mv;
        settle <= (cntrl_mv == LVL_0V0) ? 8'd0 : 8'(SETTLE_CYCLES);
      end else if (settle != 0) begin
        settle <= settle - 1'b1;
      end
      // the output reaches the new value when settling ends
      if (cntrl_mv == LVL_0V0)      vdd_mv <= '0;
      else if (cntrl_mv == cur && settle <= 8'd1) vdd_mv <= level_mv(cur);
    end
  end

  assign power_good = (cur != LVL_0V0) && (cur == cntrl_mv) && (settle == 0);
endmodule
