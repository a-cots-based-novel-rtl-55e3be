// tb_bist: test of the BIST engine on a word memory.
// Runs every pattern over a 64-word range and checks: write-only mode (the
// power-up zeroization) writes every word once with the pattern and no
// reads; a full run passes with n writes + n reads for the simple patterns
// and 6n operations for March X (in its element order, checked through the
// operation log); per-die offsets give die d the pattern of address a+d*off;
// a corrupted word written between elements by a fault hook makes March X
// fail with the right first failing address; corrected reads are counted.
module tb_bist;
  import m3_pkg::*;
  localparam logic [LADDR_W-1:0] LAST = 29'd63;
  localparam int unsigned N = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, wo = 1'b0, busy, done, pass;
  bist_pat_e pat = PAT_ZERO;
  logic [15:0] off = '0, fcnt, ccnt;
  logic [LADDR_W-1:0] ff;
  logic [31:0] ops;
  logic rv, rrdy, rspv;
  mreq_t req; mrsp_t rsp; logic [ACT_DIES-1:0] de;
  bist dut (.clk, .rst_n, .start_i (start), .pat_i (pat), .write_only_i (wo), .last_i (LAST),
            .die_off_i (off), .busy_o (busy), .done_o (done), .pass_o (pass), .fail_cnt_o (fcnt),
            .ce_cnt_o (ccnt), .first_fail_o (ff), .ops_o (ops), .req_valid_o (rv), .req_o (req),
            .req_ready_i (rrdy), .rsp_valid_i (rspv), .rsp_i (rsp));
  tb_word_mem #(.LAT(10)) u_mem (.clk, .rst_n, .req_valid_i (rv), .req_i (req), .req_ready_o (rrdy),
                                 .rsp_valid_o (rspv), .rsp_o (rsp), .rsp_die_err_o (de));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // operation log: op and address of each accepted request
  typedef struct { mop_e op; logic [LADDR_W-1:0] a; logic [WORD_W-1:0] d; } op_t;
  op_t log_q [$];
  always @(posedge clk) if (rv && rrdy) log_q.push_back('{req.op, req.laddr, req.wdata});

  // corrupt one word once the operation log reaches a given length
  int corrupt_at = -1;
  logic [LADDR_W-1:0] corrupt_a;
  always @(negedge clk) if (corrupt_at >= 0 && log_q.size() == corrupt_at) begin
    u_mem.mem[corrupt_a] = u_mem.mem[corrupt_a] ^ WORD_W'(1) << 77;
    corrupt_at = -1;
  end

  task automatic run(input bist_pat_e p, input bit w_only, output int cycles);
    int t;
    log_q.delete();
    @(negedge clk); pat = p; wo = w_only; start = 1'b1;
    @(negedge clk); start = 1'b0;
    t = 0;
    while (!done) begin @(negedge clk); t++; end
    cycles = t;
  endtask

  function automatic logic [15:0] die_pat(bist_pat_e p, logic [LADDR_W-1:0] a, int d, logic [15:0] o);
    logic [LADDR_W-1:0] ad;
    ad = a + LADDR_W'(o) * LADDR_W'(d);
    case (p)
      PAT_ONES: return '1;
      PAT_CHECKER: return ad[0] ? 16'hAAAA : 16'h5555;
      PAT_ADDR: return ad[15:0];
      default: return '0;
    endcase
  endfunction

  initial begin
    #(10 * 2000000) $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // zeroization: write only
    for (int a = 0; a < N; a++) u_mem.mem[LADDR_W'(a)] = {4{$urandom}};
    run(PAT_ZERO, 1, cyc);
    check(log_q.size() == N && u_mem.n_rd[SRC_BIST] == 0, "zeroization: n writes, no reads");
    for (int a = 0; a < N; a++) check(u_mem.mem[LADDR_W'(a)] == '0, "word zeroized");
    check(pass && ops == N, "zeroization done");
    // simple patterns with per-die offsets
    off = 16'd3;
    for (int p = 0; p < 4; p++) begin
      run(bist_pat_e'(p), 0, cyc);
      check(pass && fcnt == 0 && ops == 2 * N, $sformatf("pattern %0d passes, %0d ops", p, ops));
      for (int a = 0; a < N; a++)
        for (int d = 0; d < DATA_DIES; d++)
          check(u_mem.mem[LADDR_W'(a)][d*16 +: 16] == die_pat(bist_pat_e'(p), LADDR_W'(a), d, off),
                $sformatf("pattern %0d word %0d die %0d", p, a, d));
    end
    off = '0;
    // March X: element order and 6n operations
    run(PAT_MARCHX, 0, cyc);
    check(pass && ops == 6 * N && log_q.size() == 6 * N, $sformatf("March X 6n: %0d", ops));
    begin
      bit ok;
      ok = 1;
      for (int i = 0; i < N; i++) ok &= log_q[i].op == OP_WR && log_q[i].a == LAST - i && log_q[i].d == '0;
      for (int i = 0; i < N; i++) ok &= log_q[N + 2*i].op == OP_RD && log_q[N + 2*i].a == i &&
                                        log_q[N + 2*i + 1].op == OP_WR && log_q[N + 2*i + 1].d == '1;
      for (int i = 0; i < N; i++) ok &= log_q[3*N + 2*i].op == OP_RD && log_q[3*N + 2*i].a == LAST - i &&
                                        log_q[3*N + 2*i + 1].d == '0;
      for (int i = 0; i < N; i++) ok &= log_q[5*N + i].op == OP_RD && log_q[5*N + i].a == LAST - i;
      check(ok, "March X element order: dn(w0); up(r0,w1); dn(r1,w0); dn(r0)");
    end
    $display("March X on %0d words: %0d cycles", N, cyc);
    // fault: a word flipped after the up(r0,w1) element is written
    corrupt_a = 29'd20; corrupt_at = 3 * N;
    run(PAT_MARCHX, 0, cyc);
    check(!pass && fcnt == 1 && ff == 29'd20, $sformatf("March X finds the fault (%0d fails, first %0d)", fcnt, ff));
    // corrected reads are counted
    u_mem.seu[29'd5] = 13'h10;
    run(PAT_ONES, 0, cyc);
    check(pass && ccnt == 0, "write clears the soft error before the read");
    u_mem.stuck[29'd7] = 13'h4;
    run(PAT_ZERO, 0, cyc);
    check(pass && ccnt == 1, "corrected reads counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
