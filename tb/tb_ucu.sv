// tb_ucu: checks the utilization computing unit against a counting model
// kept in the testbench: random writes and reads on five ports, each with a
// random output port, must give per-neighbour counts and total occupancy
// equal to the model's, saturated to 8 bits.
module tb_ucu;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  localparam int NP = 5;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NP-1:0]     wr_en, rd_en;
  logic [PORT_W-1:0] wr_route[NP], rd_route[NP];
  logic [UGS_W-1:0]  ugs[4];
  logic [9:0]        occ;

  ucu #(.NP(NP)) dut (.clk, .rst_n, .wr_en, .wr_route, .rd_en, .rd_route, .ugs_out(ugs), .occupancy(occ));

  int cnt[NP], tot;

  initial begin
    wr_en = '0; rd_en = '0;
    for (int p = 0; p < NP; p++) begin wr_route[p] = '0; rd_route[p] = '0; cnt[p] = 0; end
    tot = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // mostly writes during the first half, mostly reads afterwards
      for (int p = 0; p < NP; p++) begin
        wr_en[p]    = ($urandom_range(0, 99) < ((t < 300) ? 70 : 20));
        wr_route[p] = PORT_W'($urandom_range(0, NP-1));
        rd_route[p] = PORT_W'($urandom_range(0, NP-1));
        rd_en[p]    = ($urandom_range(0, 99) < ((t < 300) ? 20 : 70)) && cnt[rd_route[p]] > 0;
        // a read only for a port that still has flits (as in the router)
        if (rd_en[p]) cnt[rd_route[p]]--;
      end
      for (int p = 0; p < NP; p++) if (rd_en[p]) tot--;
      for (int p = 0; p < NP; p++) if (wr_en[p]) begin cnt[wr_route[p]]++; tot++; end
      @(posedge clk); #0.1;
      for (int d = 0; d < 4; d++) begin
        automatic int e = (cnt[d+1] > 255) ? 255 : cnt[d+1];
        checks++;
        if (int'(ugs[d]) != e) begin
          failures++;
          $display("FAIL t=%0d dir %0d: %0d expected %0d", t, d, ugs[d], e);
        end
      end
      checks++;
      if (int'(occ) != tot) begin failures++; $display("FAIL occupancy %0d expected %0d", occ, tot); end
    end
    $display("max per-port count seen: %0d", cnt[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
