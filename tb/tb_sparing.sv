// tb_sparing: test of the cold-spare swap and the lane steering.
// Before a swap lane l maps to die l, the spare (die 13) is idle and data
// written on the lanes comes back unchanged. After a swap of a random lane
// that lane maps to die 13, its old die carries nothing, steering still
// round-trips, and a second swap is refused (one spare only).
module tb_sparing;
  import m3_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic req = 1'b0, done, refused, used;
  logic [DIE_IDX_W-1:0] lane = '0;
  logic [DIE_IDX_W-1:0] map [ACT_DIES];
  logic [DIE_W-1:0] wl [ACT_DIES];
  logic [DIE_W-1:0] wp [NUM_DIES];
  logic [DIE_W-1:0] rp [NUM_DIES];
  logic [DIE_W-1:0] rl [ACT_DIES];
  logic [NUM_DIES-1:0] act;
  sparing dut (.clk, .rst_n, .swap_req_i (req), .swap_lane_i (lane), .swap_done_o (done),
               .swap_refused_o (refused), .spare_used_o (used), .map_o (map),
               .wlane_i (wl), .wphys_o (wp), .phys_active_o (act), .rphys_i (rp), .rlane_o (rl));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // die model: the physical dies hold what was written
  always_comb for (int p = 0; p < NUM_DIES; p++) rp[p] = act[p] ? wp[p] : 16'hDEAD;

  task automatic roundtrip();
    for (int k = 0; k < 20; k++) begin
      for (int l = 0; l < ACT_DIES; l++) wl[l] = 16'($urandom);
      #1;
      for (int l = 0; l < ACT_DIES; l++) check(rl[l] == wl[l], $sformatf("lane %0d round trip", l));
    end
  endtask

  initial begin
    #1000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int sl;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < ACT_DIES; l++) check(map[l] == DIE_IDX_W'(l), "identity map");
    check(act == 14'h1FFF && !used, "spare idle");
    roundtrip();
    sl = $urandom_range(0, ACT_DIES-1);
    @(negedge clk); req = 1'b1; lane = DIE_IDX_W'(sl);
    @(negedge clk); req = 1'b0;
    check(done || used, "swap done");
    @(negedge clk);
    check(used && map[sl] == 4'd13 && act[13] && !act[sl], $sformatf("lane %0d on the spare", sl));
    roundtrip();
    @(negedge clk); req = 1'b1; lane = DIE_IDX_W'((sl + 1) % ACT_DIES);
    @(negedge clk); req = 1'b0;
    @(negedge clk);
    check(map[(sl + 1) % ACT_DIES] == DIE_IDX_W'((sl + 1) % ACT_DIES), "second swap refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
