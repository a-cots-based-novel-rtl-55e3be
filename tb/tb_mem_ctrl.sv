// tb_mem_ctrl: test of the maintenance memory controller on one PHY + die.
// The low 16 bits of each 128-bit word are stored in a behavioural DDR3 die
// behind a ddr_phy (RD_LAT, counted from the command leaving the controller to the cycle
// after the data, is CL+3 here so the response tag
// lines up with the PHY's read data). Random reads and writes from three
// sources to addresses spread over few rows of all banks are checked
// against a shadow copy; responses may come back out of order (FR-FCFS) and
// are matched by address, oldest read of that address first. A pin monitor checks
// tRCD, tRP, tRAS, tCCD and tRFC per bank, the die model checks row state.
// Then: open page policy gives row hits, close page gives one ACT per
// access; refresh requests are served (REF only with all banks closed); an
// MRS special command reaches the die; without grant the controller issues
// no new commands and closes its rows; power-down drops CKE when idle.
module tb_mem_ctrl;
  import m3_pkg::*;
  localparam int unsigned CL = 7, CWL = 6;
  localparam int unsigned T_RCD = 5, T_RP = 5, T_RAS = 11, T_CCD = 4, T_RFC = 105;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic grant = 1'b1, own = 1'b1, long_ok = 1'b1, pd_en = 1'b0;
  logic [1:0] pm = 2'd0;
  logic req_v = 1'b0, req_rdy, sp_v = 1'b0, sp_rdy, sp_done, ref_req = 1'b0, ref_ack;
  mreq_t req; spreq_t sp;
  ddr_cmd_t cmd;
  logic [NUM_DIES-1:0] dmask;
  logic [WORD_W-1:0] wdata;
  logic rsp_v; src_e rsp_src; logic [LADDR_W-1:0] rsp_a;
  logic busy, pd, closem;
  logic [15:0] hits, misses, prea;

  mem_ctrl #(.RD_LAT(CL + 3), .CL(CL), .CWL(CWL)) dut (
    .clk, .rst_n, .grant_i (grant), .own_i (own), .long_ok_i (long_ok), .page_mode_i (pm),
    .pd_en_i (pd_en), .req_valid_i (req_v), .req_i (req), .req_ready_o (req_rdy),
    .sp_valid_i (sp_v), .sp_i (sp), .sp_ready_o (sp_rdy), .sp_done_o (sp_done),
    .ref_req_i (ref_req), .ref_ack_o (ref_ack), .cmd_o (cmd), .die_mask_o (dmask),
    .wdata_o (wdata), .rsp_valid_o (rsp_v), .rsp_src_o (rsp_src), .rsp_laddr_o (rsp_a),
    .busy_o (busy), .pd_o (pd), .close_mode_o (closem), .hits_o (hits), .misses_o (misses),
    .prea_o (prea));

  logic [DIE_W-1:0] rd; logic rv;
  logic reset_n, cke, cs_n, ras_n, cas_n, we_n, odt, oe;
  logic [BA_W-1:0] ba; logic [ADDR_W-1:0] ad; logic [1:0] dqs; logic [DIE_W-1:0] dqo, dqi;
  ddr_phy #(.CL(CL), .CWL(CWL)) u_phy (.clk, .rst_n, .cmd_i (cmd), .sel_i (dmask[0]),
    .pwr_en_i (1'b1), .die_rst_i (1'b0), .wdata_i (wdata[15:0]), .rdata_o (rd), .rvalid_o (rv),
    .ddr_reset_n (reset_n), .ddr_cke (cke), .ddr_cs_n (cs_n), .ddr_ras_n (ras_n),
    .ddr_cas_n (cas_n), .ddr_we_n (we_n), .ddr_ba (ba), .ddr_addr (ad), .ddr_odt (odt),
    .ddr_dq_o (dqo), .ddr_dq_oe (oe), .ddr_dqs_o (dqs), .ddr_dq_i (dqi));
  ddr3_die_model #(.CL(CL), .CWL(CWL)) u_die (.clk, .reset_n, .cke, .cs_n, .ras_n, .cas_n,
    .we_n, .ba, .addr (ad), .dq_i (dqo), .dq_oe (oe), .dq_o (dqi));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  // ---- pin timing monitor ----
  int cyc = 0;
  int t_act [8], t_pre [8], t_col = -100, t_ref = -1000, n_act = 0, n_cmd_nogrant = 0;
  initial for (int b = 0; b < 8; b++) begin t_act[b] = -100; t_pre[b] = -100; end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cke && !cs_n) begin
      dcmd_e d;
      d = decode_cmd('{cke: cke, cs_n: cs_n, ras_n: ras_n, cas_n: cas_n, we_n: we_n, ba: ba, addr: ad});
      if (d == DC_ACT) begin
        n_act++;
        check(cyc - t_pre[ba] >= T_RP, "tRP");
        check(cyc - t_ref >= T_RFC, "tRFC before ACT");
        t_act[ba] = cyc;
      end
      if (d == DC_RD || d == DC_WR) begin
        check(cyc - t_act[ba] >= T_RCD, $sformatf("tRCD %0d", cyc - t_act[ba]));
        check(cyc - t_col >= T_CCD, "tCCD");
        t_col = cyc;
      end
      if (d == DC_PRE) begin
        if (ad[10]) begin for (int b = 0; b < 8; b++) begin
          if (u_die.open_v[b]) check(cyc - t_act[b] >= T_RAS, "tRAS (PREA)");
          t_pre[b] = cyc; end
        end else begin
          check(cyc - t_act[ba] >= T_RAS, "tRAS"); t_pre[ba] = cyc;
        end
      end
      if (d == DC_REF) t_ref = cyc;
    end
  end

  // ---- read checking ----
  logic [15:0] shadow [logic [LADDR_W-1:0]];
  typedef struct { logic [LADDR_W-1:0] a; logic [15:0] d; src_e s; } rexp_t;
  rexp_t rq [$];
  int n_rsp = 0;
  always @(posedge clk) if (rst_n) begin
    check(rv == rsp_v, "response tag lines up with read data");
    if (rsp_v) begin
      rexp_t e;
      if (rq.size() == 0) check(0, "unexpected response");
      else begin
        int k;
        k = -1;
        for (int j = rq.size() - 1; j >= 0; j--) if (rq[j].a == rsp_a) k = j;
        n_rsp++;
        if (k < 0) check(0, "response for an address not read");
        else begin
          e = rq[k];
          rq.delete(k);
          check(rsp_src == e.s, "response source");
          check(rd == e.d, $sformatf("read data %h vs %h at %h", rd, e.d, e.a));
        end
      end
    end
  end

  // requests are issued in order; reads expect the latest write before them
  task automatic send(input mop_e op, input logic [LADDR_W-1:0] a, input src_e s);
    @(negedge clk);
    req_v = 1'b1; req.op = op; req.src = s; req.laddr = a;
    req.wdata = {$urandom, $urandom, $urandom, $urandom};
    #1;
    while (!req_rdy) begin @(negedge clk); #1; end
    @(posedge clk);
    if (op == OP_WR) shadow[a] = req.wdata[15:0];
    else begin
      rexp_t e; e.a = a; e.s = s; e.d = shadow.exists(a) ? shadow[a] : 16'h0;
      rq.push_back(e);
    end
    @(negedge clk); req_v = 1'b0;
  endtask

  function automatic logic [LADDR_W-1:0] raddr();
    return {16'($urandom_range(0, 2)), 3'($urandom), 10'($urandom_range(0, 15))};
  endfunction

  task automatic drain();
    int n;
    n = 0;
    while ((rq.size() != 0 || busy) && n < 5000) begin @(negedge clk); n++; end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    #(10 * 3000000) $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int a0, h0;
    req = '0; sp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    // writes first so that reads have data, in open-page mode
    for (int i = 0; i < 300; i++) send(OP_WR, raddr(), SRC_BIST);
    for (int i = 0; i < 600; i++)
      send(($urandom_range(0, 2) == 0) ? OP_WR : OP_RD, raddr(), src_e'($urandom_range(0, 2)));
    drain();
    check(n_rsp > 300 && rq.size() == 0, $sformatf("responses %0d", n_rsp));
    check(hits > 0 && misses > 0, $sformatf("hit/miss counters %0d/%0d", hits, misses));
    // open page: sequential accesses in one row need one ACT
    a0 = n_act;
    for (int i = 0; i < 40; i++) send(OP_RD, {16'd5, 3'd2, 10'(i)}, SRC_SCRUB);
    drain();
    check(n_act - a0 <= 2, $sformatf("open page: %0d ACTs for one row", n_act - a0));
    // close page: every access activates
    pm = 2'd1;
    repeat (5) @(negedge clk);
    check(closem, "close-page mode reported");
    a0 = n_act;
    for (int i = 0; i < 20; i++) begin send(OP_RD, {16'd6, 3'd3, 10'(i)}, SRC_SCRUB); drain(); end
    check(n_act - a0 == 20, $sformatf("close page: %0d ACTs for 20 accesses", n_act - a0));
    pm = 2'd0;
    // refresh
    for (int i = 0; i < 3; i++) begin
      int r0;
      r0 = u_die.n_ref;
      send(OP_RD, raddr(), SRC_BIST);
      @(negedge clk); ref_req = 1'b1;
      while (!ref_ack) @(negedge clk);
      @(negedge clk); ref_req = 1'b0;
      repeat (5) @(negedge clk);
      check(u_die.n_ref == r0 + 1, "one REF per request");
      drain();
    end
    // special command: MRS
    begin
      int m0;
      m0 = u_die.n_mrs;
      @(negedge clk);
      sp_v = 1'b1; sp.op = SP_MRS; sp.ba = 3'd1; sp.addr = 16'h0044; sp.die_mask = '1;
      while (!sp_rdy) @(negedge clk);
      @(negedge clk); sp_v = 1'b0;
      while (!sp_done) @(negedge clk);
      check(u_die.n_mrs == m0 + 1, "MRS reached the die");
    end
    // no grant: rows closed, no new commands
    send(OP_RD, {16'd1, 3'd0, 10'd1}, SRC_BIST);
    repeat (3) @(negedge clk);
    grant = 1'b0;
    drain();
    h0 = u_die.n_act + u_die.n_rd + u_die.n_wr;
    req_v = 1'b1; req.op = OP_RD; req.laddr = '0;
    repeat (100) @(negedge clk);
    check(!req_rdy, "no request accepted without grant");
    check(u_die.n_act + u_die.n_rd + u_die.n_wr == h0, "no commands without grant");
    for (int b = 0; b < 8; b++) check(!u_die.open_v[b], "rows closed at window end");
    req_v = 1'b0; grant = 1'b1;
    // power-down
    pd_en = 1'b1;
    repeat (100) @(negedge clk);
    check(pd && !cke, "idle controller in power-down");
    send(OP_RD, {16'd1, 3'd0, 10'd1}, SRC_BIST);
    drain();
    check(n_rsp > 0 && rq.size() == 0, "request served after power-down exit");
    check(u_die.proto_err == 0, $sformatf("die protocol errors %0d", u_die.proto_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
