// tb_ams_voltage_ctrl: drives the AMS controller through epochs of chosen
// activity and load and checks the supply level it picks after each epoch,
// worked out by hand from the rules: measured level from busy cycles
// (5/30/75 % thresholds), history of (start load bin, level), most frequent
// level among matching entries (higher on a tie), load bin when nothing
// matches, zone rules, wake on demand. Also checks the epoch period.
module tb_ams_voltage_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import wnoc_pkg::*;
  localparam int EP = 40;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  zone_e            zone;
  logic [UGS_W-1:0] ugs[4];
  logic [9:0]       occ;
  logic             sw, idle, wake;
  vlevel_e          lvl;
  logic [1:0]       ue;
  logic             eend, woke;

  ams_voltage_ctrl #(.EPOCH_CYCLES(EP)) dut (
    .clk, .rst_n, .zone, .ugs_in(ugs), .in_occ(occ), .sw_active(sw),
    .router_idle(idle), .wake_req(wake), .cntrl_mv(lvl), .ue, .epoch_end(eend), .woke);

  // run the rest of the current epoch with the first `busy` cycles active,
  // then return once the decision for the next epoch has been applied
  task automatic run_epoch(int busy);
    int c = 0;
    forever begin
      sw = (c < busy);
      if (eend) begin @(negedge clk); break; end
      @(negedge clk);
      c++;
    end
    sw = 1'b0;
    @(negedge clk);
  endtask

  int last_end, period;
  always @(posedge clk) if (rst_n && eend) begin
    period = $time - last_end;
    if (last_end > 0) check(period == 2 * EP, $sformatf("epoch period %0d ns", period));
    last_end = $time;
  end

  initial begin
    last_end = 0;
    zone = ZONE_LUZ; occ = 0; sw = 0; idle = 1; wake = 0;
    for (int d = 0; d < 4; d++) ugs[d] = '0;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    check(lvl == LVL_1V1, "starts at 1.1 V");
    // epoch 1: idle, no load: history {0,0}; bin 0 -> level 0 (gated)
    @(negedge clk);
    run_epoch(0);
    check(lvl == LVL_0V0, $sformatf("idle LUZ router gated, got %0d", lvl));
    // wake on demand
    wake = 1;
    @(negedge clk);
    check(lvl == LVL_0V8 && woke, "waiting flit wakes the router to 0.8 V");
    wake = 0;
    idle = 0;
    // heavy load from now on: bin 3 (TL = 40), busy 100 %
    occ = 10'd10; ugs[0] = 8'd10; ugs[1] = 8'd10; ugs[2] = 8'd10;
    // remaining part of epoch 2 runs busy
    run_epoch(EP);
    // history: {0,0},{0,3}? epoch 2 started with bin 0 -> entry {0, 3}; now bin 3
    // has no entry -> UE = bin 3 -> 1.1 V (voltage up)
    check(lvl == LVL_1V1, $sformatf("no history for load bin 3 -> 1.1 V, got %0d", lvl));
    // epoch 3 (start bin 3) with 10 % activity -> entry {3,1}; LP: level1=1 -> 0.8 V
    run_epoch(EP / 10);
    check(lvl == LVL_0V8, $sformatf("history says level 1 -> 0.8 V, got %0d", lvl));
    // epoch 4: 100 % -> entry {3,3}; tie 1:1 -> higher -> 1.1 V
    run_epoch(EP);
    check(lvl == LVL_1V1, $sformatf("tie picks higher level, got %0d", lvl));
    // epoch 5: 50 % -> {3,2}; LP 1,1,1 -> level 3 (tie)
    run_epoch(EP / 2);
    check(lvl == LVL_1V1, $sformatf("three-way tie -> 1.1 V, got %0d", lvl));
    // epochs 6,7: 50 % -> {3,2} x3 -> 1.0 V (voltage down)
    run_epoch(EP / 2);
    check(lvl == LVL_1V0, $sformatf("majority level 2 -> 1.0 V, got %0d", lvl));
    // load drops to bin 1 (TL = 4): no bin-1 history -> level 1
    occ = 10'd4; ugs[0] = 0; ugs[1] = 0; ugs[2] = 0;
    run_epoch(EP / 2);
    check(lvl == LVL_0V8, $sformatf("load bin 1 -> 0.8 V, got %0d", lvl));
    // load 0 (bin 0): bin-0 history is {0,0} (epoch 1) and {0,3} (epoch 2):
    // a tie, so the higher level wins -> 1.1 V
    occ = 0;
    run_epoch(0);
    check(lvl == LVL_1V1, $sformatf("bin 0 tie -> 1.1 V, got %0d", lvl));
    // another idle epoch starting in bin 0 -> {0,0} twice -> UE 0, but the
    // router is not empty (idle = 0), so it is kept at 0.8 V
    run_epoch(0);
    check(ue == 2'd0, $sformatf("estimate 0, got %0d", ue));
    check(lvl == LVL_0V8, $sformatf("busy router is not gated, got %0d", lvl));
    // HUZ: never gated
    zone = ZONE_HUZ; idle = 1;
    run_epoch(0);
    check(lvl == LVL_0V8, $sformatf("HUZ floor 0.8 V, got %0d", lvl));
    // RUZ: 0 V at once, wake ignored
    zone = ZONE_RUZ;
    @(negedge clk);
    check(lvl == LVL_0V0, "RUZ router gated");
    wake = 1;
    repeat (3) @(negedge clk);
    check(lvl == LVL_0V0 && !woke, "RUZ router not woken");
    wake = 0;
    run_epoch(EP);
    check(lvl == LVL_0V0, "RUZ stays gated through epochs");
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
