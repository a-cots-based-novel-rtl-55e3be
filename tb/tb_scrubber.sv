// tb_scrubber: test of the scrubber on a word memory with injected errors.
// Checks: one word read per refresh tick in background mode; continuous
// mode sweeps the range and counts passes; a soft error is reported (address
// and dies), the corrected word written back and re-read clean (fix count);
// a stuck bit makes the write-back / re-read loop run max_rep times and then
// counts a stuck bit, and the second stuck word (threshold 2) triggers a
// rebuild of the right die; an uncorrectable word is counted and never
// written; a host write between read and write-back cancels the write-back.
module tb_scrubber;
  import m3_pkg::*;
  localparam logic [LADDR_W-1:0] LAST = 29'd31;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b1, step = 1'b0, cont = 1'b0, hwr = 1'b0, busy;
  logic [3:0] maxrep = 4'd3;
  logic [7:0] sthr = 8'd2;
  logic rv, rrdy, rspv, errv, rb;
  mreq_t req; mrsp_t rsp; logic [ACT_DIES-1:0] de, edies;
  logic [LADDR_W-1:0] eaddr;
  logic [15:0] ce, ue, fix, pass; logic [7:0] stuck; logic [DIE_IDX_W-1:0] rbd;
  scrubber dut (.clk, .rst_n, .en_i (en), .step_i (step), .cont_i (cont), .host_wr_i (hwr),
    .last_i (LAST), .max_rep_i (maxrep), .stuck_thr_i (sthr), .busy_o (busy),
    .req_valid_o (rv), .req_o (req), .req_ready_i (rrdy), .rsp_valid_i (rspv), .rsp_i (rsp),
    .rsp_die_err_i (de), .err_valid_o (errv), .err_addr_o (eaddr), .err_dies_o (edies),
    .ce_cnt_o (ce), .ue_cnt_o (ue), .fix_cnt_o (fix), .stuck_cnt_o (stuck), .pass_cnt_o (pass),
    .rebuild_o (rb), .rebuild_die_o (rbd));
  tb_word_mem #(.LAT(8)) u_mem (.clk, .rst_n, .req_valid_i (rv), .req_i (req), .req_ready_o (rrdy),
                                .rsp_valid_o (rspv), .rsp_o (rsp), .rsp_die_err_o (de));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int n_err = 0, n_rb = 0, wr_at [logic [LADDR_W-1:0]];
  logic [LADDR_W-1:0] last_err; logic [ACT_DIES-1:0] last_dies; logic [DIE_IDX_W-1:0] last_rbd;
  always @(posedge clk) begin
    if (errv) begin n_err++; last_err = eaddr; last_dies = edies; end
    if (rb) begin n_rb++; last_rbd = rbd; end
    if (rv && rrdy && req.op == OP_WR) wr_at[req.laddr] = wr_at.exists(req.laddr) ? wr_at[req.laddr] + 1 : 1;
  end

  bit hwr_seen = 0, wb_after_hwr = 1, arm = 0;
  always @(posedge clk) begin
    if (hwr) hwr_seen = 1;
    if (arm && rv && rrdy && req.op == OP_WR && !hwr_seen)
      wb_after_hwr = 0;
  end

  task automatic tick();
    @(negedge clk); step = 1'b1; @(negedge clk); step = 1'b0;
    repeat (40) @(negedge clk);
  endtask

  initial begin
    #(10 * 2000000) $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int r0, w0;
    logic [LADDR_W-1:0] wa;
    for (int a = 0; a <= int'(LAST); a++) u_mem.mem[LADDR_W'(a)] = {4{$urandom}};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n_err = 0; n_rb = 0; wr_at.delete();   // drop anything seen before the first reset edge
    // background: one read per tick
    repeat (50) @(negedge clk);
    check(u_mem.n_rd[SRC_SCRUB] == 0, "no reads without ticks");
    for (int i = 0; i < 5; i++) tick();
    check(u_mem.n_rd[SRC_SCRUB] == 5, $sformatf("one read per tick: %0d", u_mem.n_rd[SRC_SCRUB]));
    // soft error at word 7 (die 2): fixed on the way
    u_mem.seu[29'd7] = 13'h004;
    for (int i = 0; i < 3; i++) tick();
    check(ce == 1 && n_err == 1 && last_err == 29'd7 && last_dies == 13'h004, "soft error reported");
    check(wr_at.exists(29'd7) && wr_at[29'd7] == 1 && !u_mem.seu.exists(29'd7), "corrected word written back");
    check(fix == 1, "re-read clean: fix counted");
    // continuous: passes
    cont = 1'b1;
    r0 = int'(pass);
    repeat (3000) @(negedge clk);
    check(int'(pass) >= r0 + 2, $sformatf("continuous sweeps: %0d passes", int'(pass) - r0));
    check(u_mem.n_wr[SRC_SCRUB] == 1, "clean sweeps write nothing");
    // stuck bits on die 9 at words 12 and 20
    u_mem.stuck[29'd12] = 13'h200;
    u_mem.stuck[29'd20] = 13'h200;
    repeat (1500) @(negedge clk);
    check(wr_at[29'd12] > 0 && wr_at[29'd12] % int'(maxrep) == 0 && wr_at[29'd20] % int'(maxrep) == 0,
          $sformatf("write-back repeated max_rep times: %0d", wr_at[29'd12]));
    check(stuck >= 2, $sformatf("stuck bits counted: %0d", stuck));
    check(n_rb >= 1 && last_rbd == 4'd9, "rebuild of die 9 requested");
    u_mem.stuck.delete();
    // step mode: a stuck word is rewritten exactly max_rep times
    cont = 1'b0;
    repeat (100) @(negedge clk);
    wa = 29'(int'(dut.a_q));
    u_mem.stuck[wa] = 13'h010;
    w0 = u_mem.n_wr[SRC_SCRUB];
    tick();
    repeat (200) @(negedge clk);
    check(u_mem.n_wr[SRC_SCRUB] - w0 == int'(maxrep),
          $sformatf("stuck word rewritten %0d times", u_mem.n_wr[SRC_SCRUB] - w0));
    u_mem.stuck.delete();
    cont = 1'b1;
    // uncorrectable word: counted, not written
    u_mem.bad[29'd3] = 1;
    r0 = wr_at.exists(29'd3) ? wr_at[29'd3] : 0;
    repeat (800) @(negedge clk);
    check(ue >= 1, "uncorrectable counted");
    check((wr_at.exists(29'd3) ? wr_at[29'd3] : 0) == r0, "uncorrectable word not written");
    u_mem.bad.delete();
    // host write between read and write-back: write-back dropped
    cont = 1'b0;
    repeat (100) @(negedge clk);
    wa = 29'(int'(dut.a_q));
    u_mem.seu[wa] = 13'h001;
    r0 = u_mem.n_wr[SRC_SCRUB];
    arm = 1;
    fork
      tick();
      begin
        while (!(rspv && rsp.ce)) @(negedge clk);
        hwr = 1'b1; u_mem.mem[wa] = 128'h1234_5678_9abc_def0_0f1e_2d3c_4b5a_6978;
        u_mem.seu.delete(wa);
        @(negedge clk); hwr = 1'b0;
      end
    join
    repeat (100) @(negedge clk);
    check(u_mem.n_wr[SRC_SCRUB] == r0, $sformatf("stale write-back dropped (%0d writes)", u_mem.n_wr[SRC_SCRUB] - r0));
    check(wb_after_hwr, "no write-back before the host write");
    check(u_mem.mem[wa] == 128'h1234_5678_9abc_def0_0f1e_2d3c_4b5a_6978, "host data kept");
    check(u_mem.n_rd[SRC_SCRUB] > 0, "re-read after host write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
