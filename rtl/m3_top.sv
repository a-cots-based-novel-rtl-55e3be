// m3_top: radiation-tolerant controller for a 14-die DDR3 memory cube.
//
// The host sees a x128 DDR3 memory. Its commands pass through a MUX to the
// stack (normal mode), with write data SEC-DED encoded on the way in and
// read data corrected on the way out. When the host leaves room (a
// lengthened refresh or ZQ time, the Idle pin, an SPI request) or during
// power-up, the idle detector switches the MUX to the controller's own
// memory controller (maintenance mode), which serves the BIST, the
// scrubber and the rebuild engine, runs refresh and issues mode-register and
// ZQ commands for initialisation and conditioning.
//
// Data path, host or controller side alike:
//   MUX -> EDAC encode (8 data + 5 check lanes of 16 bits) -> sparing
//   steer (13 logical lanes onto 14 physical dies) -> 14 per-die PHYs
//   -> 14 dies -> PHYs -> sparing steer back -> EDAC decode -> host / engine
// Command path: MUX -> bank spiraling (bank rotated by physical die index)
//   -> 14 PHYs, with a chip select per die.
//
// Timing (controller clock cycles): the host sees read data HOST_RL = CL + 7
// cycles after its RD command and must be configured for that latency; it
// gives write data together with its WR command (one beat per column
// command). Reads and writes of the controller engines use the same path.
// Housekeeping goes through the SPI port: configuration registers 0..15 and
// status registers 16..47 (see the README for the map). Dies are powered
// through pwr_en_o (external power switches) and their relative current
// draw comes back as ADC samples on cur_i.
//
// What follows the document: the blocks and their order on the data path,
// the die counts and widths, the per-die PHYs, the host-controlled idle
// windows and the MUX. This design's own choices: the one-beat-per-command
// data abstraction, register map, latencies and the default configuration.
// The spare die (13) is kept unpowered until a lane is moved onto it, so the
// power-up initialisation and zeroization reach only the 13 active dies;
// the rebuild after a swap powers, initialises and fills the spare. The
// memory controller keeps ownership of the stack (own_i) while it still
// holds queued maintenance requests, so a request accepted in one idle
// window is always completed before the host gets the stack back.
// Lint note: rst_n is used both as the asynchronous flop reset and in the
// `disable iff` of the simulation assertions below; a tool that reports the
// reset as a net used both ways is describing that, the logic itself only
// uses rst_n as an asynchronous reset.
module m3_top
  import m3_pkg::*;
#(
  parameter int unsigned CL        = 7,
  parameter int unsigned CWL       = 6,
  parameter int unsigned T_RFC     = 105,
  parameter int unsigned T_ZQCS    = 64,
  parameter int unsigned T_ZQINIT  = 512,
  parameter int unsigned PWRUP_CYC = 210000,  // 700 us at 300 MHz
  parameter int unsigned CUR_W     = 10,
  parameter int unsigned LOG_ENTRIES = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // host DDR3 interface (one beat per clock)
  input  ddr_cmd_t            h_cmd_i,
  input  logic [WORD_W-1:0]   h_dq_i,
  output logic [WORD_W-1:0]   h_dq_o,
  output logic                h_dq_valid_o,
  output logic                host_ready_o,
  input  logic                idle_i,
  // SPI housekeeping port
  input  logic                spi_sclk_i,
  input  logic                spi_cs_n_i,
  input  logic                spi_mosi_i,
  output logic                spi_miso_o,
  // sensors and power
  input  logic [7:0]          temp_i,
  input  logic                cur_valid_i,
  input  logic [CUR_W-1:0]    cur_i [NUM_DIES],
  output logic [NUM_DIES-1:0] pwr_en_o,
  // stack pins, one set per die
  output logic [NUM_DIES-1:0] ddr_reset_n,
  output logic [NUM_DIES-1:0] ddr_cke,
  output logic [NUM_DIES-1:0] ddr_cs_n,
  output logic [NUM_DIES-1:0] ddr_ras_n,
  output logic [NUM_DIES-1:0] ddr_cas_n,
  output logic [NUM_DIES-1:0] ddr_we_n,
  output logic [BA_W-1:0]     ddr_ba   [NUM_DIES],
  output logic [ADDR_W-1:0]   ddr_addr [NUM_DIES],
  output logic [NUM_DIES-1:0] ddr_odt,
  output logic [DIE_W-1:0]    ddr_dq_o [NUM_DIES],
  output logic [NUM_DIES-1:0] ddr_dq_oe,
  output logic [1:0]          ddr_dqs_o [NUM_DIES],
  input  logic [DIE_W-1:0]    ddr_dq_i [NUM_DIES],
  // status
  output mode_e               mode_o,
  output logic                phy_init_done_o,
  output logic                select_maint_o
);
  localparam int unsigned MC_RD_LAT  = CL + 6;  // mem_ctrl cmd_o -> EDAC output
  localparam int unsigned MUX_RD_LAT = CL + 5;  // MUX input -> EDAC output

  // ---------------- SPI registers ----------------
  localparam int unsigned N_CFG = 16;
  localparam int unsigned N_STS = 32;
  localparam logic [N_CFG*16-1:0] CFG_RESET = {
    16'd48,    // 15 idle guard
    16'd128,   // 14 extra window after host REF / ZQ
    16'h3FFF,  // 13 conditioning die mask
    16'd0,     // 12 conditioning period (x1024 cycles, 0 = off)
    16'd0,     // 11 rebuild pacing interval (0 = max priority)
    16'd64,    // 10 current margin
    16'd4096,  //  9 SEFI window
    16'h0810,  //  8 log threshold | SEFI threshold
    16'h0403,  //  7 stuck threshold | max repeat
    16'd0,     //  6 BIST per-die offset
    16'h1FFF,  //  5 last address [28:16]
    16'hFFFF,  //  4 last address [15:0]
    16'd85,    //  3 hot temperature
    16'd0,     //  2 refresh interval (0 = default)
    16'd0,     //  1 command register
    16'h0235   //  0 control
  };
  logic [15:0] cfg [N_CFG];
  logic [15:0] sts [N_STS];
  logic        cfg_wr;
  logic [6:0]  cfg_addr;

  spi_port #(.N_CFG(N_CFG), .N_STS(N_STS), .CFG_RESET(CFG_RESET)) u_spi (
    .clk, .rst_n,
    .sclk_i (spi_sclk_i), .cs_n_i (spi_cs_n_i), .mosi_i (spi_mosi_i), .miso_o (spi_miso_o),
    .cfg_o (cfg), .cfg_wr_o (cfg_wr), .cfg_addr_o (cfg_addr), .sts_i (sts)
  );

  logic              scrub_en, scrub_cont, spiral_en, pd_en, idle_sw;
  logic [1:0]        page_mode;
  logic [2:0]        host_width;
  logic              cmd_wr, spi_bist_start, spi_cond_req, stats_clr;
  bist_pat_e         spi_bist_pat;
  logic [LADDR_W-1:0] last_addr;

  always_comb begin
    scrub_en   = cfg[0][0];
    scrub_cont = cfg[0][1];
    spiral_en  = cfg[0][2];
    page_mode  = cfg[0][4:3];
    pd_en      = cfg[0][5];
    idle_sw    = cfg[0][6];
    host_width = cfg[0][9:7];
    cmd_wr         = cfg_wr && cfg_addr == 7'd1;
    spi_bist_start = cmd_wr && cfg[1][0];
    spi_cond_req   = cmd_wr && cfg[1][1];
    stats_clr      = cmd_wr && cfg[1][2];
    spi_bist_pat   = bist_pat_e'(cfg[1][5:3]);
    last_addr      = {cfg[5][LADDR_W-17:0], cfg[4]};
  end

  // ---------------- host interface ----------------
  ddr_cmd_t          hcmd;
  dcmd_e             hdcmd;
  logic [WORD_W-1:0] hwdata;
  logic [WORD_W-1:0] dec_rdata;
  logic              host_rvalid;

  host_if u_host (
    .clk, .rst_n, .width_i (host_width),
    .h_cmd_i, .h_dq_i, .h_dq_o, .h_dq_valid_o,
    .cmd_o (hcmd), .dcmd_o (hdcmd), .wdata_o (hwdata),
    .rdata_i (dec_rdata), .rvalid_i (host_rvalid)
  );

  // ---------------- idle detector ----------------
  logic sel_maint, grant, long_win, win_open, boot, mc_busy;

  idle_detector u_idle (
    .clk, .rst_n,
    .host_cmd_i (hdcmd), .idle_pin_i (idle_i), .idle_sw_i (idle_sw), .boot_i (boot),
    .maint_busy_i (mc_busy),
    .ref_busy_i (12'(T_RFC)), .ref_extra_i (cfg[14][11:0]),
    .zq_busy_i (12'(T_ZQCS)), .zq_extra_i (cfg[14][11:0]), .guard_i (cfg[15][11:0]),
    .sel_maint_o (sel_maint), .grant_o (grant), .host_ready_o, .long_o (long_win),
    .win_open_o (win_open)
  );
  assign select_maint_o = sel_maint;

  logic host_ref, host_wr;
  assign host_ref = !sel_maint && hdcmd == DC_REF;
  assign host_wr  = !sel_maint && hdcmd == DC_WR;

  // ---------------- refresh ----------------
  logic ref_req, ref_ack, ref_tick;
  refresh_ctrl u_ref (
    .clk, .rst_n, .interval_i (cfg[2]), .temp_i, .temp_hot_i (cfg[3][7:0]),
    .maint_mode_i (long_win), .host_ref_i (host_ref), .ref_ack_i (ref_ack),
    .ref_req_o (ref_req), .ref_tick_o (ref_tick)
  );

  // ---------------- engines and maintenance control ----------------
  logic               mc_req_valid, mc_req_ready;
  mreq_t              mc_req;
  logic               sp_valid, sp_ready, sp_done;
  spreq_t             sp;
  ddr_cmd_t           ctrl_cmd;
  logic [NUM_DIES-1:0] ctrl_mask;
  logic [WORD_W-1:0]  ctrl_wdata;
  logic               rsp_valid;
  src_e               rsp_src;
  logic [LADDR_W-1:0] rsp_laddr;
  mrsp_t              rsp;
  logic               mc_pd, mc_close;
  logic [15:0]        mc_hits, mc_misses, mc_prea;

  logic               dec_valid, dec_ce, dec_ue;
  logic [ACT_DIES-1:0] dec_die_err;

  logic        bi_valid, bi_ready, bi_start, bi_wo, bi_busy, bi_done, bi_pass, bi_boot;
  mreq_t       bi_req;
  bist_pat_e   bi_pat;
  logic [15:0] bi_fail, bi_ce;
  logic [LADDR_W-1:0] bi_first;
  logic [31:0] bi_ops;

  logic        sc_valid, sc_ready, sc_busy, sc_err, sc_rebuild;
  mreq_t       sc_req;
  logic [LADDR_W-1:0] sc_err_addr;
  logic [ACT_DIES-1:0] sc_err_dies;
  logic [15:0] sc_ce, sc_ue, sc_fix, sc_pass;
  logic [7:0]  sc_stuck;
  logic [DIE_IDX_W-1:0] sc_rb_die;

  logic        rb_valid, rb_ready, rb_busy, rb_done, rb_start, rb_attached;
  logic        rb_reset_req, rb_reset_done;
  mreq_t       rb_req;
  logic [DIE_IDX_W-1:0] rb_lane, rb_lane_att;
  logic [31:0] rb_words;
  logic [15:0] rb_ue;

  logic        init_req, init_done;
  logic [NUM_DIES-1:0] init_mask;
  logic [15:0] cond_cnt;

  maint_ctrl #(.PWRUP_CYC(PWRUP_CYC)) u_maint (
    .clk, .rst_n,
    .zero_last_i (last_addr),
    .cond_req_i (spi_cond_req), .cond_mask_i (cfg[13][NUM_DIES-1:0]),
    .cond_period_i (cfg[12]),
    .init_req_i (init_req), .init_mask_i (init_mask), .init_done_o (init_done),
    .mode_o, .boot_o (boot), .phy_init_done_o, .cond_cnt_o (cond_cnt),
    .sp_valid_o (sp_valid), .sp_o (sp), .sp_ready_i (sp_ready), .sp_done_i (sp_done),
    .spi_bist_start_i (spi_bist_start), .spi_bist_pat_i (spi_bist_pat),
    .bist_busy_i (bi_busy), .bist_done_i (bi_done),
    .bist_start_o (bi_start), .bist_pat_o (bi_pat), .bist_wo_o (bi_wo), .bist_boot_o (bi_boot),
    .scrub_busy_i (sc_busy), .rebuild_busy_i (rb_busy),
    .rb_valid_i (rb_valid), .rb_req_i (rb_req), .rb_ready_o (rb_ready),
    .sc_valid_i (sc_valid), .sc_req_i (sc_req), .sc_ready_o (sc_ready),
    .bi_valid_i (bi_valid), .bi_req_i (bi_req), .bi_ready_o (bi_ready),
    .req_valid_o (mc_req_valid), .req_o (mc_req), .req_ready_i (mc_req_ready)
  );

  assign rsp = '{src: rsp_src, laddr: rsp_laddr, rdata: dec_rdata, ce: dec_ce, ue: dec_ue};

  bist u_bist (
    .clk, .rst_n, .start_i (bi_start), .pat_i (bi_pat), .write_only_i (bi_wo),
    .last_i (last_addr), .die_off_i (cfg[6]),
    .busy_o (bi_busy), .done_o (bi_done), .pass_o (bi_pass),
    .fail_cnt_o (bi_fail), .ce_cnt_o (bi_ce), .first_fail_o (bi_first), .ops_o (bi_ops),
    .req_valid_o (bi_valid), .req_o (bi_req), .req_ready_i (bi_ready),
    .rsp_valid_i (rsp_valid), .rsp_i (rsp)
  );

  scrubber u_scrub (
    .clk, .rst_n, .en_i (scrub_en && !boot && !bi_busy && !rb_busy), .step_i (ref_tick),
    .cont_i (scrub_cont), .host_wr_i (host_wr),
    .last_i (last_addr), .max_rep_i (cfg[7][3:0]), .stuck_thr_i (cfg[7][15:8]),
    .busy_o (sc_busy),
    .req_valid_o (sc_valid), .req_o (sc_req), .req_ready_i (sc_ready),
    .rsp_valid_i (rsp_valid), .rsp_i (rsp), .rsp_die_err_i (dec_die_err),
    .err_valid_o (sc_err), .err_addr_o (sc_err_addr), .err_dies_o (sc_err_dies),
    .ce_cnt_o (sc_ce), .ue_cnt_o (sc_ue), .fix_cnt_o (sc_fix), .stuck_cnt_o (sc_stuck),
    .pass_cnt_o (sc_pass), .rebuild_o (sc_rebuild), .rebuild_die_o (sc_rb_die)
  );

  logic                 dm_rb_start;
  logic [DIE_IDX_W-1:0] dm_rb_lane;
  assign rb_start = dm_rb_start || (sc_rebuild && !rb_busy);
  assign rb_lane  = dm_rb_start ? dm_rb_lane : sc_rb_die;

  rebuild u_rebuild (
    .clk, .rst_n, .start_i (rb_start), .lane_i (rb_lane), .last_i (last_addr),
    .interval_i (cfg[11]), .grant_i (grant), .host_wr_i (host_wr),
    .reset_req_o (rb_reset_req), .reset_done_i (rb_reset_done),
    .attached_o (rb_attached), .lane_o (rb_lane_att), .busy_o (rb_busy), .done_o (rb_done),
    .words_o (rb_words), .ue_cnt_o (rb_ue),
    .req_valid_o (rb_valid), .req_o (rb_req), .req_ready_i (rb_ready),
    .rsp_valid_i (rsp_valid), .rsp_i (rsp)
  );

  mem_ctrl #(.RD_LAT(MC_RD_LAT), .CL(CL), .CWL(CWL), .T_RFC(T_RFC), .T_ZQINIT(T_ZQINIT)) u_mc (
    .clk, .rst_n, .grant_i (grant), .own_i (sel_maint), .long_ok_i (long_win), .page_mode_i (page_mode),
    .pd_en_i (pd_en),
    .req_valid_i (mc_req_valid), .req_i (mc_req), .req_ready_o (mc_req_ready),
    .sp_valid_i (sp_valid), .sp_i (sp), .sp_ready_o (sp_ready), .sp_done_o (sp_done),
    .ref_req_i (ref_req), .ref_ack_o (ref_ack),
    .cmd_o (ctrl_cmd), .die_mask_o (ctrl_mask), .wdata_o (ctrl_wdata),
    .rsp_valid_o (rsp_valid), .rsp_src_o (rsp_src), .rsp_laddr_o (rsp_laddr),
    .busy_o (mc_busy), .pd_o (mc_pd), .close_mode_o (mc_close),
    .hits_o (mc_hits), .misses_o (mc_misses), .prea_o (mc_prea)
  );

  // ---------------- MUX ----------------
  ddr_cmd_t            s_cmd;
  logic [NUM_DIES-1:0] s_sel, phys_active;
  logic [WORD_W-1:0]   s_wdata;

  cmd_mux #(.RD_LAT(MUX_RD_LAT)) u_mux (
    .clk, .rst_n, .sel_maint_i (sel_maint), .phys_active_i (phys_active),
    .host_cmd_i (hcmd), .host_wdata_i (hwdata),
    .ctrl_cmd_i (ctrl_cmd), .ctrl_die_mask_i (ctrl_mask), .ctrl_wdata_i (ctrl_wdata),
    .cmd_o (s_cmd), .die_sel_o (s_sel), .wdata_o (s_wdata), .host_rvalid_o (host_rvalid)
  );

  // ---------------- EDAC ----------------
  logic [DIE_W-1:0] wlane [ACT_DIES];
  logic [DIE_W-1:0] rlane [ACT_DIES];
  logic [DIE_W-1:0] wphys [NUM_DIES];
  logic [DIE_W-1:0] rphys [NUM_DIES];
  logic [NUM_DIES-1:0] phy_rvalid;
  logic [15:0]      die_cnt [ACT_DIES];

  edac u_edac (
    .clk, .rst_n, .wdata_i (s_wdata), .wlane_o (wlane),
    .rd_valid_i (|phy_rvalid), .rlane_i (rlane),
    .rd_valid_o (dec_valid), .rdata_o (dec_rdata), .ce_o (dec_ce), .ue_o (dec_ue),
    .die_err_o (dec_die_err), .cnt_clr_i (stats_clr), .die_cnt_o (die_cnt)
  );

  // ---------------- TCAM diagnostic log ----------------
  logic                 log_thr;
  logic [DIE_IDX_W-1:0] log_die, sc_first_die;
  logic [$clog2(LOG_ENTRIES)-1:0] log_entry;
  logic [$clog2(LOG_ENTRIES+1)-1:0] log_used;
  logic [7:0]           log_ovf;

  always_comb begin
    sc_first_die = '0;
    for (int d = ACT_DIES-1; d >= 0; d--) if (sc_err_dies[d]) sc_first_die = DIE_IDX_W'(d);
  end

  diag_log #(.ENTRIES(LOG_ENTRIES)) u_log (
    .clk, .rst_n, .clr_i (stats_clr),
    .err_valid_i (sc_err && |sc_err_dies),
    .err_ba_i (la_ba(sc_err_addr)), .err_row_i (la_row(sc_err_addr)),
    .err_col_i (la_col(sc_err_addr)), .err_die_i (sc_first_die),
    .ins_mask_i ('1), .threshold_i (cfg[8][15:8]),
    .thr_event_o (log_thr), .thr_die_o (log_die), .thr_entry_o (log_entry),
    .used_o (log_used), .overflow_o (log_ovf)
  );

  // ---------------- sparing and die management ----------------
  logic                 swap_req, swap_done, swap_refused, spare_used;
  logic [DIE_IDX_W-1:0] swap_lane;
  logic [DIE_IDX_W-1:0] map [ACT_DIES];
  logic [NUM_DIES-1:0]  die_rst;
  logic [7:0]           sefi_data_cnt, sefi_cur_cnt, pcycles;

  sparing u_spare (
    .clk, .rst_n, .swap_req_i (swap_req), .swap_lane_i (swap_lane),
    .swap_done_o (swap_done), .swap_refused_o (swap_refused), .spare_used_o (spare_used),
    .map_o (map), .wlane_i (wlane), .wphys_o (wphys), .phys_active_o (phys_active),
    .rphys_i (rphys), .rlane_o (rlane)
  );

  die_manager #(.CUR_W(CUR_W)) u_dm (
    .clk, .rst_n,
    .err_valid_i (dec_valid && |dec_die_err), .err_dies_i (dec_die_err),
    .sefi_thr_i (cfg[8][7:0]), .win_i (cfg[9]),
    .cur_valid_i, .cur_i, .cur_margin_i (cfg[10][CUR_W-1:0]),
    .log_thr_i (log_thr), .log_die_i (log_die),
    .map_i (map), .spare_used_i (spare_used),
    .swap_req_o (swap_req), .swap_lane_o (swap_lane),
    .rebuild_busy_i (rb_busy), .rebuild_start_o (dm_rb_start), .rebuild_lane_o (dm_rb_lane),
    .reset_req_i (rb_reset_req), .reset_lane_i (rb_lane_att), .reset_done_o (rb_reset_done),
    .pwr_en_o, .die_rst_o (die_rst),
    .init_req_o (init_req), .init_mask_o (init_mask), .init_done_i (init_done),
    .sefi_data_cnt_o (sefi_data_cnt), .sefi_cur_cnt_o (sefi_cur_cnt), .power_cycles_o (pcycles)
  );

  // ---------------- bank spiraling and PHYs ----------------
  ddr_cmd_t die_cmd [NUM_DIES];
  bank_spiral u_spiral (.enable_i (spiral_en), .cmd_i (s_cmd), .cmd_o (die_cmd));

  for (genvar p = 0; p < NUM_DIES; p++) begin : g_phy
    ddr_phy #(.CL(CL), .CWL(CWL)) u_phy (
      .clk, .rst_n,
      .cmd_i (die_cmd[p]), .sel_i (s_sel[p]), .pwr_en_i (pwr_en_o[p]), .die_rst_i (die_rst[p]),
      .wdata_i (wphys[p]), .rdata_o (rphys[p]), .rvalid_o (phy_rvalid[p]),
      .ddr_reset_n (ddr_reset_n[p]), .ddr_cke (ddr_cke[p]), .ddr_cs_n (ddr_cs_n[p]),
      .ddr_ras_n (ddr_ras_n[p]), .ddr_cas_n (ddr_cas_n[p]), .ddr_we_n (ddr_we_n[p]),
      .ddr_ba (ddr_ba[p]), .ddr_addr (ddr_addr[p]), .ddr_odt (ddr_odt[p]),
      .ddr_dq_o (ddr_dq_o[p]), .ddr_dq_oe (ddr_dq_oe[p]), .ddr_dqs_o (ddr_dqs_o[p]),
      .ddr_dq_i (ddr_dq_i[p])
    );
  end

  // ---------------- status registers ----------------
  always_comb begin
    for (int r = 0; r < N_STS; r++) sts[r] = '0;
    sts[0]  = {3'(mode_o), phy_init_done_o, sel_maint, spare_used, bi_pass, bi_busy,
               rb_busy, sc_busy, mc_pd, mc_close, rb_attached, swap_refused, boot, 1'b0};
    sts[1]  = bi_fail;
    sts[2]  = bi_ce;
    sts[3]  = sc_ce;
    sts[4]  = sc_ue;
    sts[5]  = {sc_stuck, 8'(log_ovf)};
    sts[6]  = sc_pass;
    sts[7]  = {8'(log_used), 4'(log_entry), log_die};
    sts[8]  = {sefi_cur_cnt, sefi_data_cnt};
    sts[9]  = {8'(rb_lane_att), pcycles};
    sts[10] = {sc_fix[11:0], swap_lane};
    sts[11] = mc_hits;
    sts[12] = mc_misses;
    for (int d = 0; d < ACT_DIES; d++) sts[13+d] = die_cnt[d];
    sts[26] = rb_words[15:0];
    sts[27] = rb_ue;
    sts[28] = cond_cnt;
    sts[29] = mc_prea;
    sts[30] = {8'd0, temp_i};
    sts[31] = bi_ops[15:0];
  end
endmodule
