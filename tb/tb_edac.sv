// tb_edac: test of the 128-bit EDAC across 13 dies.
// Encodes random words, feeds the 13 lanes back as read data with injected
// faults and checks 2 cycles later: clean words unflagged; any corruption
// confined to one die (a whole-die failure included) corrected, with that
// die flagged and its bit-error counter raised by the number of flipped
// bits (one cycle after the data); two dies hit in the same bit position reported uncorrectable. The
// counters clear on cnt_clr_i.
module tb_edac;
  import m3_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [WORD_W-1:0] wdata, rdata;
  logic [DIE_W-1:0]  wl [ACT_DIES];
  logic [DIE_W-1:0]  rl [ACT_DIES];
  logic              rv = 1'b0, rvo, ce, ue, clr = 1'b0;
  logic [ACT_DIES-1:0] de;
  logic [15:0]       cnt [ACT_DIES];
  edac dut (.clk, .rst_n, .wdata_i (wdata), .wlane_o (wl), .rd_valid_i (rv), .rlane_i (rl),
            .rd_valid_o (rvo), .rdata_o (rdata), .ce_o (ce), .ue_o (ue), .die_err_o (de),
            .cnt_clr_i (clr), .die_cnt_o (cnt));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #10000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  int exp_cnt [ACT_DIES];
  initial begin
    for (int d = 0; d < ACT_DIES; d++) exp_cnt[d] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      logic [WORD_W-1:0] w;
      logic [DIE_W-1:0]  m [ACT_DIES];
      int kind, d1, d2, b;
      w = {$urandom, $urandom, $urandom, $urandom};
      wdata = w;
      @(negedge clk);
      for (int d = 0; d < ACT_DIES; d++) m[d] = '0;
      kind = $urandom_range(0, 2);
      d1 = $urandom_range(0, ACT_DIES-1);
      if (kind == 1) m[d1] = ($urandom_range(0, 3) == 0) ? 16'($urandom) | 16'h1 : 16'(1) << $urandom_range(0, 15);
      if (kind == 2) begin
        d2 = (d1 + $urandom_range(1, ACT_DIES-1)) % ACT_DIES;
        b = $urandom_range(0, 15);
        m[d1][b] = 1'b1; m[d2][b] = 1'b1;
      end
      for (int d = 0; d < ACT_DIES; d++) rl[d] = wl[d] ^ m[d];
      rv = 1'b1;
      @(negedge clk);
      rv = 1'b0;
      check(!rvo, "no output after 1 cycle");
      @(negedge clk);
      check(rvo, "output 2 cycles after the lanes");
      if (kind == 0) check(!ce && !ue && rdata == w && de == '0, "clean word");
      if (kind == 1) begin
        check(ce && !ue && rdata == w && de == (ACT_DIES'(1) << d1),
              $sformatf("one-die error on die %0d corrected (de %b)", d1, de));
        exp_cnt[d1] += $countones(m[d1]);
      end
      if (kind == 2) check(ue, "two dies in one code word: uncorrectable");
      @(negedge clk);
      if (kind != 2) for (int d = 0; d < ACT_DIES; d++)
        check(cnt[d] == 16'(exp_cnt[d]), $sformatf("counter of die %0d: %0d vs %0d", d, cnt[d], exp_cnt[d]));
      else for (int d = 0; d < ACT_DIES; d++) exp_cnt[d] = cnt[d];
    end
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    for (int d = 0; d < ACT_DIES; d++) check(cnt[d] == 0, "counters cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
