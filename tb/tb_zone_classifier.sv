// tb_zone_classifier: sixteen routers with hand-picked utilizations around
// the 5 % and 75 % thresholds (of a 100000-cycle profile) must be sorted into
// RUZ, LUZ and HUZ as worked out by hand below.
module tb_zone_classifier;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] busy[16];
  logic [31:0] total;
  zone_e       zone[16];

  zone_classifier #(.N(16)) dut (.busy_cycles(busy), .total_cycles(total), .zone);

  // utilization in per mille and the expected zone
  int    pm  [16] = '{1000, 540, 500, 760, 750, 749, 260, 220, 100, 51, 50, 49, 10, 0, 0, 300};
  zone_e exz [16] = '{ZONE_HUZ, ZONE_LUZ, ZONE_LUZ, ZONE_HUZ, ZONE_HUZ, ZONE_LUZ, ZONE_LUZ, ZONE_LUZ,
                      ZONE_LUZ, ZONE_LUZ, ZONE_LUZ, ZONE_RUZ, ZONE_RUZ, ZONE_RUZ, ZONE_RUZ, ZONE_LUZ};
  initial begin
    total = 32'd100000;
    for (int i = 0; i < 16; i++) busy[i] = 32'(pm[i] * 100);
    #1;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (zone[i] != exz[i]) begin
        failures++;
        $display("FAIL router %0d (%0d per mille): zone %0d expected %0d", i, pm[i], zone[i], exz[i]);
      end
    end
    // large counts do not overflow
    total = 32'hF000_0000;
    for (int i = 0; i < 16; i++) busy[i] = 32'hE000_0000;
    #1;
    checks++;
    if (zone[0] != ZONE_HUZ) begin failures++; $display("FAIL large counts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
