// zone_classifier: sorts every router of the network into a utilization
// zone from its global (whole-application) utilization, measured in a
// profiling run: busy cycles of the router against the run's total cycles.
// Below RUZ_PM per mille the router is in the rare utilization zone (RUZ,
// gated for the whole application), at or above HUZ_PM per mille in the
// high utilization zone (HUZ), otherwise in the low utilization zone (LUZ).
// The 5 % and 75 % defaults are the published ones; both are parameters
// because the thresholds are set per application. Purely combinational.
module zone_classifier
  import wnoc_pkg::*;
#(
  parameter int N      = 16,
  parameter int RUZ_PM = 50,    // 5 %
  parameter int HUZ_PM = 750    // 75 %
) (
  input  logic [31:0] busy_cycles [N],
  input  logic [31:0] total_cycles,
  output zone_e       zone        [N]
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [41:0] pm, t;
      pm = 42'(busy_cycles[i]) * 42'd1000;
      t  = 42'(total_cycles);
      if (pm < t * 42'(RUZ_PM))       zone[i] = ZONE_RUZ;
      else if (pm >= t * 42'(HUZ_PM)) zone[i] = ZONE_HUZ;
      else                            zone[i] = ZONE_LUZ;
    end
  end
endmodule
