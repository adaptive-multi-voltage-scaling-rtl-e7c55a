// tb_rx_comparator: sweeps the received power from 0 to 255 and checks
// that detect is high exactly above the noise threshold (20 by default,
// 100 in a second instance).
module tb_rx_comparator;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  int checks = 0, failures = 0;
  rf_t rf;
  logic d0, d1;
  rx_comparator dut0 (.rf_in(rf), .detect(d0));
  rx_comparator #(.NOISE_TH(8'd100)) dut1 (.rf_in(rf), .detect(d1));
  initial begin
    rf = '0;
    for (int p = 0; p < 256; p++) begin
      rf.power = 8'(p);
      #1;
      checks += 2;
      if (d0 != (p > 20))  begin failures++; $display("FAIL power %0d th 20", p); end
      if (d1 != (p > 100)) begin failures++; $display("FAIL power %0d th 100", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
