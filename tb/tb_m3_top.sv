// tb_m3_top: end-to-end test of the memory-cube controller at full size.
//
// The controller is instantiated with its default parameters (the full
// 210000-cycle power-up wait included) and connected to 14 behavioural DDR3
// dies. Over SPI the test narrows the scrub/BIST address range to 2048 words
// so the maintenance sweeps finish quickly; everything else is the default
// configuration. A host model drives DDR3 commands (one beat per column
// command) and checks every read against a shadow copy and against the
// host read latency CL+7.
// Sequence and mechanisms counted (each one that never happens is a failure):
//   power-up, initialisation (MRS/ZQCL at every die), BIST zeroization;
//   host pass-through writes and reads, MUX switches, bank spiraling;
//   a host REF with extended tRFC opening a maintenance window;
//   Idle-pin windows: controller refresh (rate doubled when hot), power-down,
//   continuous scrubbing fixing an injected upset;
//   stuck bit: scrub repeat loop, diagnostic log hits, rebuild with power
//   cycle, log threshold, swap to the cold spare, rebuild onto the spare;
//   SEFI by data errors on host reads and by high current: power cycle and
//   rebuild; conditioning (MRS rewrite with DLL reset, ZQCL) from SPI;
//   March X BIST from SPI with its 6n operation count; page-policy switches.
module tb_m3_top;
  import m3_pkg::*;

  localparam int unsigned CL = 7, CWL = 6;
  localparam int unsigned HOST_RL = CL + 7;
  localparam logic [LADDR_W-1:0] LAST = 29'd2047;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ddr_cmd_t            h_cmd;
  logic [WORD_W-1:0]   h_dq_i, h_dq_o;
  logic                h_dq_valid, host_ready, idle = 1'b0;
  logic                sclk = 1'b0, scs_n = 1'b1, mosi = 1'b0, miso;
  logic [7:0]          temp = 8'd25;
  logic                cur_valid = 1'b0;
  logic [9:0]          cur [NUM_DIES];
  logic [NUM_DIES-1:0] pwr_en, reset_n, cke, cs_n, ras_n, cas_n, we_n, odt, dq_oe;
  logic [BA_W-1:0]     ba [NUM_DIES];
  logic [ADDR_W-1:0]   addr [NUM_DIES];
  logic [DIE_W-1:0]    dq_o [NUM_DIES];
  logic [DIE_W-1:0]    dq_i [NUM_DIES];
  logic [1:0]          dqs [NUM_DIES];
  mode_e               mode;
  logic                init_done, sel_maint;

  m3_top dut (
    .clk, .rst_n, .h_cmd_i (h_cmd), .h_dq_i, .h_dq_o, .h_dq_valid_o (h_dq_valid),
    .host_ready_o (host_ready), .idle_i (idle),
    .spi_sclk_i (sclk), .spi_cs_n_i (scs_n), .spi_mosi_i (mosi), .spi_miso_o (miso),
    .temp_i (temp), .cur_valid_i (cur_valid), .cur_i (cur), .pwr_en_o (pwr_en),
    .ddr_reset_n (reset_n), .ddr_cke (cke), .ddr_cs_n (cs_n), .ddr_ras_n (ras_n),
    .ddr_cas_n (cas_n), .ddr_we_n (we_n), .ddr_ba (ba), .ddr_addr (addr), .ddr_odt (odt),
    .ddr_dq_o (dq_o), .ddr_dq_oe (dq_oe), .ddr_dqs_o (dqs), .ddr_dq_i (dq_i),
    .mode_o (mode), .phy_init_done_o (init_done), .select_maint_o (sel_maint)
  );

  int unsigned die_mrs [NUM_DIES], die_zq [NUM_DIES], die_dll [NUM_DIES], die_proto [NUM_DIES];

  for (genvar p = 0; p < NUM_DIES; p++) begin : g_die
    ddr3_die_model #(.CL(CL), .CWL(CWL)) u_die (
      .clk, .reset_n (reset_n[p] & pwr_en[p]), .cke (cke[p]), .cs_n (cs_n[p]),
      .ras_n (ras_n[p]), .cas_n (cas_n[p]), .we_n (we_n[p]), .ba (ba[p]), .addr (addr[p]),
      .dq_i (dq_o[p]), .dq_oe (dq_oe[p]), .dq_o (dq_i[p])
    );
    assign die_mrs[p]   = u_die.n_mrs;
    assign die_zq[p]    = u_die.n_zq;
    assign die_dll[p]   = u_die.n_dll;
    assign die_proto[p] = u_die.proto_err;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // ---------------- monitors ----------------
  longint unsigned cyc = 0;
  int n_mux_sw = 0, n_spiral = 0, n_page_sw = 0, n_maint_rd = 0, n_ctrl_ref = 0;
  logic sel_q = 1'b0, close_q = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sel_q <= sel_maint;
    if (sel_maint != sel_q) n_mux_sw++;
    close_q <= dut.u_mc.close_mode_o;
    if (rst_n && dut.u_mc.close_mode_o != close_q) n_page_sw++;
    if (!cs_n[0] && !cs_n[3] && cke[0] && !ras_n[0] && cas_n[0] && ba[3] == ba[0] + 3'd3)
      n_spiral++;
    if (sel_maint && !cs_n[0] && ras_n[0] && !cas_n[0] && we_n[0]) n_maint_rd++;
    if (sel_maint && !cs_n[0] && cke[0] && !ras_n[0] && !cas_n[0] && we_n[0]) n_ctrl_ref++;
  end

  // ---------------- host model ----------------
  logic [WORD_W-1:0] shadow [logic [LADDR_W-1:0]];
  longint unsigned   rd_t [$];
  logic [WORD_W-1:0] rd_exp [$];
  int n_host_rd = 0, n_lat_err = 0, n_data_err = 0;

  always @(posedge clk) if (h_dq_valid) begin
    if (rd_t.size() == 0) begin
      n_data_err++;
    end else begin
      longint unsigned t;
      logic [WORD_W-1:0] e;
      t = rd_t.pop_front();
      e = rd_exp.pop_front();
      n_host_rd++;
      if (cyc - t != HOST_RL) n_lat_err++;
      if (h_dq_o !== e) begin
        n_data_err++;
        if (n_data_err < 5) $display("host read mismatch %h exp %h", h_dq_o, e);
      end
    end
  end

  task automatic hc(input logic [2:0] rcw, input logic [BA_W-1:0] b, input logic [ADDR_W-1:0] a,
                    input logic [WORD_W-1:0] d = '0);
    @(negedge clk);
    h_cmd  = mk_cmd(rcw, b, a);
    h_dq_i = d;
    if (rcw == RCW_RD) begin rd_t.push_back(cyc); end
    @(negedge clk);
    h_cmd  = cmd_nop();
  endtask

  task automatic nops(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_ready();
    while (!host_ready) @(negedge clk);
  endtask

  // one word access on an open row; the host closes its rows after each burst
  task automatic host_wr(input logic [LADDR_W-1:0] la, input logic [WORD_W-1:0] d);
    wait_ready();
    hc(RCW_ACT, la_ba(la), la_row(la)); nops(5);
    hc(RCW_WR, la_ba(la), ADDR_W'(la_col(la)), d); nops(6);
    hc(RCW_PRE, la_ba(la), '0); nops(5);
    shadow[la] = d;
  endtask

  task automatic host_rd(input logic [LADDR_W-1:0] la);
    wait_ready();
    hc(RCW_ACT, la_ba(la), la_row(la)); nops(5);
    rd_exp.push_back(shadow.exists(la) ? shadow[la] : '0);
    hc(RCW_RD, la_ba(la), ADDR_W'(la_col(la))); nops(4);
    hc(RCW_PRE, la_ba(la), '0); nops(5);
  endtask

  task automatic host_rd_all();
    foreach (shadow[k]) host_rd(k);
    nops(30);
  endtask

  // ---------------- SPI master (mode 0) ----------------
  task automatic spi_xfer(input logic [23:0] f, output logic [15:0] rd);
    rd = '0;
    scs_n = 1'b0;
    repeat (8) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin
      mosi = f[i];
      repeat (4) @(negedge clk);
      sclk = 1'b1;
      if (i < 16) rd = {rd[14:0], miso};
      repeat (4) @(negedge clk);
      sclk = 1'b0;
    end
    repeat (8) @(negedge clk);
    scs_n = 1'b1;
    repeat (8) @(negedge clk);
  endtask

  task automatic spi_wr(input logic [6:0] a, input logic [15:0] d);
    logic [15:0] dummy;
    spi_xfer({1'b1, a, d}, dummy);
  endtask

  task automatic spi_rd(input logic [6:0] a, output logic [15:0] d);
    spi_xfer({1'b0, a, 16'h0}, d);
  endtask

  function automatic logic [WORD_W-1:0] rnd_word();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // physical bank of logical bank b on die p (spiraling on)
  function automatic logic [BA_W-1:0] pba(input logic [BA_W-1:0] b, input int p);
    return b + BA_W'(p);
  endfunction

  task automatic idle_window(input int n);
    @(negedge clk); idle = 1'b1;
    nops(n);
    idle = 1'b0;
    while (!host_ready) @(negedge clk);
    nops(10);
  endtask

  // watchdog
  initial begin
    #(20_000_000 * 10);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] r, r2;
  int ref0, ref1, pd0, mrs0, dll0, zq0, rd0, pc0;
  longint unsigned t0;
  logic [LADDR_W-1:0] la_list [$];

  initial begin
    h_cmd = cmd_nop(); h_dq_i = '0;
    for (int p = 0; p < NUM_DIES; p++) cur[p] = 10'd100;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    // ---- power-up: narrow the maintenance range while the dies settle ----
    spi_wr(7'd4, 16'(LAST));
    spi_wr(7'd5, 16'd0);
    spi_rd(7'd4, r);
    check(r == 16'(LAST), "SPI config read-back");
    check(mode == MD_POWERUP && !init_done, "power-up state");
    while (!init_done) @(negedge clk);
    check(cyc >= 210000, "power-up wait kept");
    check(!pwr_en[NUM_DIES-1] && die_mrs[NUM_DIES-1] == 0, "spare die kept cold at boot");
    for (int p = 0; p < ACT_DIES; p++)
      check(die_mrs[p] >= 4 && die_zq[p] >= 1 && die_dll[p] >= 1,
            $sformatf("die %0d initialised (MRS %0d ZQ %0d)", p, die_mrs[p], die_zq[p]));
    while (mode != MD_NORMAL || !host_ready) @(negedge clk);
    check(g_die[0].u_die.mem.num() == int'(LAST) + 1, "zeroization wrote every word");
    check(g_die[12].u_die.mem.num() == int'(LAST) + 1, "zeroization wrote ECC die");
    $display("boot done at cycle %0d (die0 %0d die12 %0d die13 %0d words)", cyc,
             g_die[0].u_die.mem.num(), g_die[12].u_die.mem.num(), g_die[13].u_die.mem.num());

    // ---- host pass-through ----
    for (int i = 0; i < 48; i++) begin
      logic [LADDR_W-1:0] la;
      la = LADDR_W'($urandom_range(0, int'(LAST)));
      host_wr(la, rnd_word());
    end
    host_rd_all();
    check(n_host_rd == shadow.num() && n_data_err == 0 && n_lat_err == 0,
          $sformatf("host reads: %0d reads, %0d data errors, %0d latency errors",
                    n_host_rd, n_data_err, n_lat_err));
    check(n_spiral > 0, "bank spiraling seen on the pins");

    // ---- host REF with lengthened tRFC opens a maintenance window ----
    rd0 = n_mux_sw;
    wait_ready();
    hc(RCW_REF, '0, '0);
    nops(105 + 10);
    check(!host_ready && sel_maint, "stack handed to the controller after tRFC");
    while (!host_ready) @(negedge clk);
    nops(5);
    check(n_mux_sw >= rd0 + 2, "MUX switched to maintenance and back");

    // ---- Idle pin window: controller refresh, power-down, temperature ----
    ref0 = g_die[0].u_die.n_ref; pd0 = g_die[0].u_die.n_pd;
    idle_window(24000);
    ref1 = g_die[0].u_die.n_ref - ref0;
    check(ref1 >= 8, $sformatf("controller refreshes in a long window (%0d)", ref1));
    check(g_die[0].u_die.n_pd > pd0, "power-down entered when idle");
    temp = 8'd100;
    ref0 = g_die[0].u_die.n_ref;
    idle_window(24000);
    temp = 8'd25;
    check(g_die[0].u_die.n_ref - ref0 >= 2 * ref1 - 2,
          $sformatf("hot refresh rate %0d vs %0d", g_die[0].u_die.n_ref - ref0, ref1));
    check(g_die[0].u_die.proto_err == 0, "no protocol errors so far");

    // ---- SEU: a flipped bit is corrected and written back by the scrubber ----
    begin
      logic [LADDR_W-1:0] la;
      logic [DIE_W-1:0] old_w;
      la = 29'd1500;
      if (!shadow.exists(la)) host_wr(la, rnd_word());
      old_w = g_die[2].u_die.peek(pba(la_ba(la), 2), la_row(la), la_col(la));
      g_die[2].u_die.flip(pba(la_ba(la), 2), la_row(la), la_col(la), 16'h0010);
      spi_wr(7'd0, 16'h0237);                 // continuous scrubbing
      idle_window(60000);
      spi_rd(7'd19, r);                       // scrub CE count
      check(r >= 1, $sformatf("scrubber corrected the upset (CE %0d)", r));
      check(g_die[2].u_die.peek(pba(la_ba(la), 2), la_row(la), la_col(la)) == old_w,
            "scrubber wrote the corrected word back");
      spi_rd(7'd22, r);                       // passes
      check(r >= 1, "scrub pass completed");
      spi_rd(7'd23, r);                       // log used / entry / die
      check(r[15:8] >= 1, "diagnostic log recorded the error");
    end
    host_rd_all();

    // ---- stuck bit: repeat loop, log hits, rebuild, log threshold, swap ----
    pc0 = 0;
    g_die[4].u_die.stuck_mask = 16'h0001;
    g_die[4].u_die.stuck_val  = 16'h0001;
    for (int k = 0; k < 40 && !dut.u_spare.spare_used_o; k++) idle_window(20000);
    spi_rd(7'd21, r);                         // stuck count | log overflow
    check(r[15:8] >= 1, $sformatf("stuck bits found by the repeat loop (%0d)", r[15:8]));
    spi_rd(7'd16, r);                         // flags
    check(r[10], "lane swapped to the cold spare");
    check(dut.u_spare.map_o[4] == 4'd13, "lane 4 now on die 13");
    while (dut.u_rebuild.busy_o) idle_window(20000);
    spi_rd(7'd42, r);
    check(r != 0, "rebuild reconstructed words");
    check(g_die[13].u_die.mem.num() == int'(LAST) + 1, "spare die rebuilt");
    check(pwr_en[13] && die_mrs[13] >= 4 && die_zq[13] >= 1, "spare die powered and initialised");
    spi_rd(7'd25, r);
    check(r[7:0] >= 1, "die power cycled during rebuild");
    pc0 = r[7:0];
    n_host_rd = 0;
    host_rd_all();
    check(n_data_err == 0, "host data intact after swap");

    // ---- SEFI, data failure: dead die seen by host reads ----
    spi_wr(7'd0, 16'h0235);                   // background scrubbing only
    g_die[6].u_die.dead = 1'b1;
    host_rd_all();
    host_rd_all();
    check(n_data_err == 0, "host data corrected while a die is dead");
    for (int k = 0; k < 10 && (g_die[6].u_die.dead || dut.u_rebuild.busy_o); k++)
      idle_window(20000);
    check(!g_die[6].u_die.dead, "dead die power cycled");
    spi_rd(7'd24, r);
    check(r[7:0] >= 1, "SEFI (data) detected");
    check(g_die[6].u_die.mem.num() == int'(LAST) + 1, "power-cycled die rebuilt");
    host_rd_all();
    check(n_data_err == 0, "host data intact after SEFI recovery");

    // ---- SEFI, high current ----
    @(negedge clk);
    cur[9] = 10'd400; cur_valid = 1'b1;
    @(negedge clk);
    cur_valid = 1'b0; cur[9] = 10'd100;
    for (int k = 0; k < 10 && (k == 0 || dut.u_rebuild.busy_o); k++) idle_window(20000);
    spi_rd(7'd24, r);
    check(r[15:8] >= 1, "SEFI (current) detected");
    spi_rd(7'd25, r2);
    check(r2[7:0] > pc0, "current SEFI power cycled the die");
    host_rd_all();
    check(n_data_err == 0, "host data intact after current SEFI");

    // ---- conditioning from SPI ----
    mrs0 = g_die[5].u_die.n_mrs; dll0 = g_die[5].u_die.n_dll; zq0 = g_die[5].u_die.n_zq;
    @(negedge clk); idle = 1'b1;
    spi_wr(7'd1, 16'h0002);
    nops(3000);
    idle = 1'b0;
    while (!host_ready) @(negedge clk);
    spi_rd(7'd44, r);
    check(r == 1, "conditioning run counted");
    check(g_die[5].u_die.n_mrs >= mrs0 + 4 && g_die[5].u_die.n_dll > dll0 &&
          g_die[5].u_die.n_zq > zq0, "conditioning: MRS rewrite, DLL reset, ZQCL");

    // ---- March X BIST from SPI ----
    @(negedge clk); idle = 1'b1;
    spi_wr(7'd1, 16'h0021);
    t0 = cyc;
    nops(20);
    while (dut.u_bist.busy_o) @(negedge clk);
    idle = 1'b0;
    while (!host_ready) @(negedge clk);
    spi_rd(7'd16, r);
    check(r[9], "March X passed");
    spi_rd(7'd47, r);
    check(r == 16'(6 * (int'(LAST) + 1)), $sformatf("March X took 6n operations (%0d)", r));
    $display("March X: %0d cycles for %0d words", cyc - t0, LAST + 1);
    foreach (shadow[k]) shadow[k] = '0;
    n_host_rd = 0;
    host_rd_all();
    check(n_data_err == 0 && n_host_rd == shadow.num(), "host reads zero after March X");

    // ---- mechanisms that must have happened ----
    check(n_maint_rd > 0, "maintenance reads on the stack");
    check(n_ctrl_ref > 0, "controller refresh commands");
    check(n_page_sw > 0, $sformatf("page policy switched (%0d)", n_page_sw));
    for (int p = 0; p < NUM_DIES; p++)
      check(die_proto[p] == 0, $sformatf("die %0d protocol errors %0d", p, die_proto[p]));
    $display("cycles %0d, mux switches %0d, spiral %0d, page switches %0d",
             cyc, n_mux_sw, n_spiral, n_page_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
