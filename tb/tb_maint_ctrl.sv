// tb_maint_ctrl: self-checking testbench for maint_ctrl.
//
// Plays the special-command port (random ready and done delays), the BIST
// and the three request engines. Checks:
//  * the power-up wait lasts PWRUP_CYC cycles and the mode is POWERUP;
//  * initialisation sends MR2, MR3, MR1, MR0 with DLL reset, then ZQCL, to
//    every die, one command at a time;
//  * the BIST is started once, write-only with the all-0 pattern, and normal
//    mode follows its done;
//  * a re-initialisation request runs the sequence on its mask only and is
//    acknowledged; SPI and periodic conditioning run it and are counted;
//  * an SPI BIST start is passed on with the SPI pattern;
//  * the arbiter grants rebuild before scrub before BIST and passes ready.
module tb_maint_ctrl;
  import m3_pkg::*;
  localparam int unsigned PWRUP_CYC = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask

  logic [LADDR_W-1:0]  zero_last = '1;
  logic                cond_req = 0, init_req = 0;
  logic [NUM_DIES-1:0] cond_mask = '0, init_mask = '0;
  logic [15:0]         cond_period = '0;
  logic                init_done, boot, phy_init_done, sp_valid;
  mode_e               mode;
  logic [15:0]         cond_cnt;
  spreq_t              sp;
  logic                sp_ready = 0, sp_done = 0;
  logic                spi_bist_start = 0;
  bist_pat_e           spi_bist_pat = PAT_MARCHX;
  logic                bist_busy = 0, bist_done = 0, bist_start, bist_wo, bist_boot;
  bist_pat_e           bist_pat;
  logic                scrub_busy = 0, rebuild_busy = 0;
  logic                rb_valid = 0, sc_valid = 0, bi_valid = 0, req_ready = 0;
  mreq_t               rb_req, sc_req, bi_req, req;
  logic                rb_ready, sc_ready, bi_ready, req_valid;

  maint_ctrl #(.PWRUP_CYC(PWRUP_CYC)) dut (
    .clk, .rst_n, .zero_last_i (zero_last), .cond_req_i (cond_req), .cond_mask_i (cond_mask),
    .cond_period_i (cond_period), .init_req_i (init_req), .init_mask_i (init_mask),
    .init_done_o (init_done), .mode_o (mode), .boot_o (boot), .phy_init_done_o (phy_init_done),
    .cond_cnt_o (cond_cnt), .sp_valid_o (sp_valid), .sp_o (sp), .sp_ready_i (sp_ready),
    .sp_done_i (sp_done), .spi_bist_start_i (spi_bist_start), .spi_bist_pat_i (spi_bist_pat),
    .bist_busy_i (bist_busy), .bist_done_i (bist_done), .bist_start_o (bist_start),
    .bist_pat_o (bist_pat), .bist_wo_o (bist_wo), .bist_boot_o (bist_boot),
    .scrub_busy_i (scrub_busy), .rebuild_busy_i (rebuild_busy),
    .rb_valid_i (rb_valid), .rb_req_i (rb_req), .rb_ready_o (rb_ready),
    .sc_valid_i (sc_valid), .sc_req_i (sc_req), .sc_ready_o (sc_ready),
    .bi_valid_i (bi_valid), .bi_req_i (bi_req), .bi_ready_o (bi_ready),
    .req_valid_o (req_valid), .req_o (req), .req_ready_i (req_ready)
  );

  // special-command port model: accept after a random delay, done later;
  // records the accepted commands
  spreq_t sp_log [$];
  initial forever begin
    @(negedge clk);
    if (sp_valid) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      sp_ready = 1; sp_log.push_back(sp);
      @(negedge clk); sp_ready = 0;
      chk(!sp_valid, "one command at a time");
      repeat ($urandom_range(1, 6)) @(negedge clk);
      sp_done = 1; @(negedge clk); sp_done = 0;
    end
  end

  int n_bist_start = 0;
  always @(posedge clk) if (bist_start) n_bist_start++;

  task automatic check_seq(input logic [NUM_DIES-1:0] mask, input string what);
    chk(sp_log.size() == 5, $sformatf("%s: 5 commands (%0d)", what, sp_log.size()));
    if (sp_log.size() == 5) begin
      chk(sp_log[0].op == SP_MRS && sp_log[0].ba == 2 && sp_log[0].addr == 16'h0008, {what, " MR2"});
      chk(sp_log[1].op == SP_MRS && sp_log[1].ba == 3 && sp_log[1].addr == 16'h0000, {what, " MR3"});
      chk(sp_log[2].op == SP_MRS && sp_log[2].ba == 1 && sp_log[2].addr == 16'h0002, {what, " MR1"});
      chk(sp_log[3].op == SP_MRS && sp_log[3].ba == 0 && sp_log[3].addr == 16'h0330, {what, " MR0+DLL reset"});
      chk(sp_log[4].op == SP_ZQCL, {what, " ZQCL"});
      foreach (sp_log[i]) chk(sp_log[i].die_mask == mask, {what, " die mask"});
    end
    sp_log.delete();
  endtask

  function automatic mreq_t rnd_req();
    mreq_t r;
    r.op = mop_e'($urandom_range(0, 1)); r.src = src_e'($urandom_range(0, 3));
    r.laddr = LADDR_W'($urandom); r.wdata = {4{$urandom}};
    return r;
  endfunction

  initial begin
    #5000000; $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, t;
    repeat (3) @(negedge clk); rst_n = 1; t0 = 0;
    n_bist_start = 0; sp_log.delete();     // drop anything seen before the first reset edge
    // power-up wait
    while (!sp_valid && t0 < 5000) begin
      chk(mode == MD_POWERUP && boot && !phy_init_done, "power-up state");
      @(negedge clk); t0++;
    end
    chk(t0 == PWRUP_CYC + 1, $sformatf("power-up wait %0d cycles", t0));
    chk(mode == MD_INIT, "init mode");
    // initialisation, then the zeroizing BIST start
    t = 0;
    while (n_bist_start == 0 && t < 1000) begin @(negedge clk); t++; end
    check_seq('1, "boot init");
    chk(bist_boot && bist_wo && bist_pat == PAT_ZERO && mode == MD_BIST && phy_init_done,
        "zeroization BIST");
    bist_busy = 1;
    repeat (50) @(negedge clk);
    chk(n_bist_start == 1 && boot && mode == MD_BIST, "zeroization runs once");
    bist_busy = 0; bist_done = 1; @(negedge clk); bist_done = 0; @(negedge clk);
    chk(!boot && mode == MD_NORMAL && !bist_boot && !bist_wo, "normal mode after zeroization");

    // re-initialisation of one die
    init_mask = 14'h0020; init_req = 1;
    t = 0;
    while (!init_done && t < 1000) begin
      if (sp_valid) chk(mode == MD_COND, "cond mode during re-init");
      @(negedge clk); t++;
    end
    chk(init_done, "re-init acknowledged");
    init_req = 0;
    check_seq(14'h0020, "re-init");
    chk(cond_cnt == 0, "re-init not counted as conditioning");

    // SPI conditioning of dies 0..3
    repeat (5) @(negedge clk);
    cond_mask = 14'h000F; cond_req = 1; @(negedge clk); cond_req = 0;
    repeat (200) @(negedge clk);
    check_seq(14'h000F, "conditioning");
    chk(cond_cnt == 1, "conditioning counted");

    // periodic conditioning every 2 * 1024 cycles
    cond_period = 16'd2;
    repeat (2048 * 2 + 300) @(negedge clk);
    chk(cond_cnt >= 3 && cond_cnt <= 4, $sformatf("periodic conditioning %0d", cond_cnt));
    cond_period = 0;
    repeat (300) @(negedge clk);
    sp_log.delete();

    // SPI BIST start
    n_bist_start = 0;
    @(negedge clk); spi_bist_start = 1; @(negedge clk); spi_bist_start = 0;
    @(negedge clk);
    chk(n_bist_start == 1 && bist_pat == PAT_MARCHX && !bist_wo, "SPI BIST start");
    bist_busy = 1; @(negedge clk); chk(mode == MD_BIST, "BIST mode"); bist_busy = 0;

    // modes
    scrub_busy = 1; @(negedge clk); chk(mode == MD_SCRUB, "scrub mode");
    rebuild_busy = 1; @(negedge clk); chk(mode == MD_REBUILD, "rebuild mode");
    scrub_busy = 0; rebuild_busy = 0; @(negedge clk); chk(mode == MD_NORMAL, "normal mode");

    // arbiter
    for (int i = 0; i < 2000; i++) begin
      rb_valid = 1'($urandom); sc_valid = 1'($urandom); bi_valid = 1'($urandom);
      req_ready = 1'($urandom);
      rb_req = rnd_req(); sc_req = rnd_req(); bi_req = rnd_req();
      #1;
      chk(req_valid == (rb_valid || sc_valid || bi_valid), "arb valid");
      if (rb_valid) chk(req == rb_req && rb_ready == req_ready && !sc_ready && !bi_ready, "arb rebuild");
      else if (sc_valid) chk(req == sc_req && sc_ready == req_ready && !rb_ready && !bi_ready, "arb scrub");
      else if (bi_valid) chk(req == bi_req && bi_ready == req_ready && !rb_ready && !sc_ready, "arb bist");
      else chk(!rb_ready && !sc_ready && !bi_ready, "arb idle");
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
