// tb_die_manager: self-checking testbench for die_manager.
//
// Drives EDAC failing-die reports, current samples and diagnostic-log events
// and plays the rebuild engine and the die initialiser. Checks:
//  * a lane reaching the error threshold inside one window starts a rebuild
//    of that lane, errors spread over windows do not;
//  * a die drawing more than mean + margin starts a rebuild of its lane;
//  * a second failure of the same lane, or a log threshold event, asks for a
//    swap to the spare first (not when the spare is already used);
//  * the power cycle: the die is off for OFF_CYC cycles, held in reset for
//    RST_CYC cycles, re-initialised, then acknowledged; other dies untouched;
//  * the spare die is unpowered after reset.
module tb_die_manager;
  import m3_pkg::*;
  localparam int unsigned CUR_W = 10, OFF_CYC = 64, RST_CYC = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask

  logic                 err_valid = 0;
  logic [ACT_DIES-1:0]  err_dies = '0;
  logic [7:0]           sefi_thr = 8'd5;
  logic [15:0]          win = 16'd200;
  logic                 cur_valid = 0;
  logic [CUR_W-1:0]     cur [NUM_DIES];
  logic [CUR_W-1:0]     cur_margin = 10'd40;
  logic                 log_thr = 0;
  logic [DIE_IDX_W-1:0] log_die = '0;
  logic [DIE_IDX_W-1:0] map [ACT_DIES];
  logic                 spare_used = 0;
  logic                 swap_req, rebuild_start, reset_done, init_req;
  logic [DIE_IDX_W-1:0] swap_lane, rebuild_lane;
  logic                 rebuild_busy = 0, reset_req = 0, init_done = 0;
  logic [DIE_IDX_W-1:0] reset_lane = '0;
  logic [NUM_DIES-1:0]  pwr_en, die_rst, init_mask;
  logic [7:0]           sefi_data_cnt, sefi_cur_cnt, power_cycles;

  die_manager #(.CUR_W(CUR_W), .OFF_CYC(OFF_CYC), .RST_CYC(RST_CYC)) dut (
    .clk, .rst_n, .err_valid_i (err_valid), .err_dies_i (err_dies), .sefi_thr_i (sefi_thr),
    .win_i (win), .cur_valid_i (cur_valid), .cur_i (cur), .cur_margin_i (cur_margin),
    .log_thr_i (log_thr), .log_die_i (log_die), .map_i (map), .spare_used_i (spare_used),
    .swap_req_o (swap_req), .swap_lane_o (swap_lane), .rebuild_busy_i (rebuild_busy),
    .rebuild_start_o (rebuild_start), .rebuild_lane_o (rebuild_lane), .reset_req_i (reset_req),
    .reset_lane_i (reset_lane), .reset_done_o (reset_done), .pwr_en_o (pwr_en),
    .die_rst_o (die_rst), .init_req_o (init_req), .init_mask_o (init_mask),
    .init_done_i (init_done), .sefi_data_cnt_o (sefi_data_cnt), .sefi_cur_cnt_o (sefi_cur_cnt),
    .power_cycles_o (power_cycles)
  );

  // swap/rebuild observers
  int n_swap = 0, n_start = 0;
  logic [DIE_IDX_W-1:0] last_swap, last_start;
  always @(posedge clk) begin
    if (swap_req) begin n_swap++; last_swap = swap_lane; end
    if (rebuild_start) begin n_start++; last_start = rebuild_lane; end
  end

  task automatic clear_counts(); n_swap = 0; n_start = 0; endtask

  // rebuild engine stand-in: power cycle the lane, checking the sequence
  task automatic do_recovery(input logic [DIE_IDX_W-1:0] lane);
    int off_len, rst_len;
    logic [DIE_IDX_W-1:0] die;
    logic [NUM_DIES-1:0] others;
    die = map[lane];
    @(negedge clk); rebuild_busy = 1; reset_req = 1; reset_lane = lane;
    others = pwr_en & ~(NUM_DIES'(1) << die);
    off_len = 0;
    @(negedge clk);
    while (!pwr_en[die]) begin
      off_len++;
      chk(!die_rst[die], "reset while off");
      @(negedge clk);
      if (off_len > 1000) break;
    end
    chk(off_len == OFF_CYC + 1, $sformatf("off time %0d", off_len));
    rst_len = 0;
    while (die_rst[die]) begin
      rst_len++; @(negedge clk);
      if (rst_len > 1000) break;
    end
    chk(rst_len == RST_CYC + 1, $sformatf("reset time %0d", rst_len));
    chk((pwr_en & others) == others, "other dies stayed powered");
    chk(init_req && init_mask == (NUM_DIES'(1) << die), "init request for the die");
    repeat (5) @(negedge clk);
    chk(init_req && !reset_done, "waits for init done");
    init_done = 1; @(negedge clk); init_done = 0; @(negedge clk);
    chk(reset_done, "reset done");
    reset_req = 0; @(negedge clk);
    chk(!reset_done, "reset done drops");
    repeat (10) @(negedge clk);
    rebuild_busy = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic errs(input int lane, input int n, input int gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); err_valid = 1; err_dies = ACT_DIES'(1) << lane;
      @(negedge clk); err_valid = 0; err_dies = '0;
      repeat (gap) @(negedge clk);
    end
  endtask

  initial begin
    #2000000; $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int l = 0; l < ACT_DIES; l++) map[l] = DIE_IDX_W'(l);
    for (int d = 0; d < NUM_DIES; d++) cur[d] = 10'd300;
    repeat (3) @(negedge clk); rst_n = 1; repeat (2) @(negedge clk);
    chk(pwr_en == NUM_DIES'((1 << ACT_DIES) - 1), "spare unpowered, active dies powered");
    chk(die_rst == '0 && !init_req && !reset_done, "idle outputs");

    // errors below threshold, spread over windows: nothing
    clear_counts();
    errs(3, 12, 100);
    repeat (20) @(negedge clk);
    chk(n_start == 0 && n_swap == 0, "spread errors ignored");

    // data SEFI on lane 6
    repeat (250) @(negedge clk);     // start of a fresh window (roughly)
    clear_counts();
    errs(6, 5, 2);
    repeat (3) @(negedge clk);
    chk(n_start == 1 && last_start == 6 && n_swap == 0, "data SEFI rebuild lane 6");
    chk(sefi_data_cnt == 1, "data SEFI counted");
    do_recovery(6);
    chk(power_cycles == 1, "power cycle counted");

    // current SEFI on physical die 9 (lane 9)
    clear_counts();
    @(negedge clk); cur[9] = 10'd300 + 10'd30; cur_valid = 1; @(negedge clk); cur_valid = 0;
    repeat (3) @(negedge clk);
    chk(n_start == 0, "current below margin ignored");
    @(negedge clk); cur[9] = 10'd400; cur_valid = 1; @(negedge clk); cur_valid = 0; cur[9] = 10'd300;
    repeat (3) @(negedge clk);
    chk(n_start == 1 && last_start == 9 && n_swap == 0, "current SEFI rebuild lane 9");
    chk(sefi_cur_cnt == 1, "current SEFI counted");
    do_recovery(9);

    // no decision while the rebuild engine is busy
    clear_counts();
    rebuild_busy = 1;
    errs(2, 6, 1);
    repeat (5) @(negedge clk);
    chk(n_start == 0, "held while rebuild busy");
    rebuild_busy = 0;
    repeat (300) @(negedge clk);

    // second data SEFI on lane 6: swap then rebuild
    clear_counts();
    errs(6, 5, 2);
    repeat (4) @(negedge clk);
    chk(n_swap == 1 && last_swap == 6, "repeat SEFI swaps lane 6");
    chk(n_start == 1 && last_start == 6, "rebuild after swap");
    map[6] = DIE_IDX_W'(NUM_DIES - 1); spare_used = 1;
    do_recovery(6);
    chk(pwr_en[NUM_DIES-1], "spare powered after being rebuilt onto");
    chk(power_cycles == 3, "three power cycles");

    // log threshold with the spare used: no swap
    clear_counts();
    @(negedge clk); log_thr = 1; log_die = 4; @(negedge clk); log_thr = 0;
    repeat (5) @(negedge clk);
    chk(n_swap == 0 && n_start == 0, "log threshold ignored with spare used");

    // log threshold with a free spare: swap and rebuild
    spare_used = 0; map[6] = 6;
    clear_counts();
    @(negedge clk); log_thr = 1; log_die = 4; @(negedge clk); log_thr = 0;
    repeat (5) @(negedge clk);
    chk(n_swap == 1 && last_swap == 4 && n_start == 1 && last_start == 4, "log threshold swap");
    map[4] = DIE_IDX_W'(NUM_DIES - 1); spare_used = 1;
    do_recovery(4);

    // random error bursts: a rebuild only when a lane reaches the threshold
    for (int t = 0; t < 20; t++) begin
      int lane, n;
      lane = $urandom_range(0, 12); n = $urandom_range(1, 8);
      repeat (250) @(negedge clk);
      while (dut.win_q != 16'd10) @(negedge clk);   // burst well inside one window
      clear_counts();
      errs(lane, n, 1);
      repeat (4) @(negedge clk);
      if (n >= 5) begin
        chk(n_start == 1 && last_start == lane, $sformatf("burst lane %0d n %0d", lane, n));
        do_recovery(DIE_IDX_W'(lane));
      end else chk(n_start == 0, $sformatf("short burst lane %0d n %0d", lane, n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
