// tb_rebuild: test of the rebuild state machine on a word memory.
// Every word of a 48-word range has a soft error on lane 4. Checks the flow:
// reset requested until acknowledged, device attached with its lane for the
// whole pass, every word read and written back once (all errors cleared,
// words counter = n), done pulse and detach at the end. With the window
// closed the rebuild timer paces one word per interval; with the window
// open it runs at full rate. An uncorrectable word is counted and not
// written; a host write between read and write-back cancels that
// write-back and the word is read again.
module tb_rebuild;
  import m3_pkg::*;
  localparam logic [LADDR_W-1:0] LAST = 29'd47;
  localparam int unsigned N = 48;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, grant = 1'b1, hwr = 1'b0, rreq, rdone = 1'b0, att, busy, done;
  logic [DIE_IDX_W-1:0] lane = 4'd4, lane_o;
  logic [15:0] ival = '0, uec;
  logic [31:0] words;
  logic rv, rrdy, rspv;
  mreq_t req; mrsp_t rsp; logic [ACT_DIES-1:0] de;
  rebuild dut (.clk, .rst_n, .start_i (start), .lane_i (lane), .last_i (LAST), .interval_i (ival),
    .grant_i (grant), .host_wr_i (hwr), .reset_req_o (rreq), .reset_done_i (rdone),
    .attached_o (att), .lane_o (lane_o), .busy_o (busy), .done_o (done), .words_o (words),
    .ue_cnt_o (uec), .req_valid_o (rv), .req_o (req), .req_ready_i (rrdy), .rsp_valid_i (rspv),
    .rsp_i (rsp));
  tb_word_mem #(.LAT(8)) u_mem (.clk, .rst_n, .req_valid_i (rv), .req_i (req), .req_ready_o (rrdy),
                                .rsp_valid_o (rspv), .rsp_o (rsp), .rsp_die_err_o (de));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  bit acc_while_detached = 0;
  always @(posedge clk) if (rv && rrdy && !att) acc_while_detached = 1;

  task automatic run(output int cycles);
    int t, na;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    t = 0;
    while (!rreq && t < 100) begin @(negedge clk); t++; end
    check(rreq && !att, "reset requested before attaching");
    repeat (20) begin @(negedge clk); check(rreq && !att, "reset held until acknowledged"); end
    rdone = 1'b1; @(negedge clk); rdone = 1'b0;
    t = 0;
    na = 0;
    while (!done && t < 100000) begin
      @(negedge clk); t++;
      if (!done && !(att && lane_o == lane)) na++;
    end
    check(na == 1, $sformatf("attached with its lane until the remove step (%0d cycles not)", na));
    cycles = t;
    @(negedge clk);
    check(!att && !busy, "removed at the end");
  endtask

  initial begin
    #(10 * 2000000) $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int cyc, w0;
    for (int a = 0; a < N; a++) begin u_mem.mem[LADDR_W'(a)] = {4{$urandom}}; u_mem.seu[LADDR_W'(a)] = 13'h010; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(cyc);
    check(words == N && u_mem.seu.num() == 0 && u_mem.n_wr[SRC_REBUILD] == N && u_mem.n_rd[SRC_REBUILD] == N,
          $sformatf("every word rebuilt once: %0d words, %0d left", words, u_mem.seu.num()));
    check(!acc_while_detached, "no accesses while detached");
    $display("rebuild of %0d words at full rate: %0d cycles", N, cyc);
    // paced by the timer while the window is closed
    grant = 1'b0; ival = 16'd100;
    run(cyc);
    check(cyc >= N * 100 && cyc < N * 140, $sformatf("paced: %0d cycles for %0d words", cyc, N));
    grant = 1'b1;
    run(cyc);
    check(cyc < N * 40, $sformatf("window open: full rate %0d cycles", cyc));
    ival = '0;
    // uncorrectable word
    u_mem.bad[29'd9] = 1;
    w0 = u_mem.n_wr[SRC_REBUILD];
    run(cyc);
    check(uec == 1 && u_mem.bad.exists(29'd9) && u_mem.n_wr[SRC_REBUILD] == w0 + N - 1,
          "uncorrectable word counted and left alone");
    u_mem.bad.delete();
    // host write between read and write-back
    w0 = u_mem.n_wr[SRC_REBUILD];
    fork
      run(cyc);
      begin
        while (!(rspv && rsp.laddr == 29'd30)) @(negedge clk);
        hwr = 1'b1; @(negedge clk); hwr = 1'b0;
      end
    join
    check(u_mem.n_wr[SRC_REBUILD] == w0 + N && u_mem.n_rd[SRC_REBUILD] > 0,
          $sformatf("stale write-back dropped and redone (%0d writes)", u_mem.n_wr[SRC_REBUILD] - w0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
