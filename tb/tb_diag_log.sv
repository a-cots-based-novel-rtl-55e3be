// tb_diag_log: test of the TCAM diagnostic log against a reference model.
// Errors are drawn from a small pool of addresses so that most of them hit
// an existing entry; the insertion mask sometimes ignores the column (one
// entry per row). The model keeps the same table: lowest matching entry
// counts up, otherwise the first free entry is filled with count 1; a count
// reaching the threshold gives an event (checked one cycle after the error,
// with the die); a full log counts overflow. Clear empties the log.
module tb_diag_log;
  import m3_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned KW = BA_W + ROW_W + COL_W + DIE_IDX_W;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr = 1'b0, ev_v = 1'b0, thr;
  logic [BA_W-1:0] eba; logic [ROW_W-1:0] erow; logic [COL_W-1:0] ecol; logic [DIE_IDX_W-1:0] edie;
  logic [KW-1:0] mask;
  logic [7:0] th = 8'd5, ovf;
  logic [DIE_IDX_W-1:0] tdie;
  logic [3:0] tent;
  logic [4:0] used;
  diag_log dut (.clk, .rst_n, .clr_i (clr), .err_valid_i (ev_v), .err_ba_i (eba), .err_row_i (erow),
                .err_col_i (ecol), .err_die_i (edie), .ins_mask_i (mask), .threshold_i (th),
                .thr_event_o (thr), .thr_die_o (tdie), .thr_entry_o (tent), .used_o (used),
                .overflow_o (ovf));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [KW-1:0] mk [N], mc [N];
  bit mv [N];
  int mcnt [N], movf = 0, n_hit = 0, n_thr = 0;

  initial begin
    #10000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic [KW-1:0] pool [24];
    for (int e = 0; e < N; e++) begin mv[e] = 0; mcnt[e] = 0; end
    for (int i = 0; i < 24; i++) pool[i] = KW'({$urandom, $urandom});
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      logic [KW-1:0] k;
      int hi, fi, ent;
      bit exp_thr;
      k = pool[$urandom_range(0, (i < 400) ? 11 : 23)];
      {eba, erow, ecol, edie} = k;
      mask = ($urandom_range(0, 3) == 0) ? ~(KW'((1 << COL_W) - 1) << DIE_IDX_W) : '1;
      ev_v = 1'b1;
      hi = -1; fi = -1;
      for (int e = N-1; e >= 0; e--) begin
        if (mv[e] && ((mk[e] ^ k) & mc[e]) == '0) hi = e;
        if (!mv[e]) fi = e;
      end
      exp_thr = 0; ent = -1;
      if (hi >= 0) begin
        n_hit++;
        if (mcnt[hi] + 1 == int'(th)) begin exp_thr = 1; ent = hi; end
        mcnt[hi]++;
      end else if (fi >= 0) begin
        mv[fi] = 1; mk[fi] = k & mask; mc[fi] = mask; mcnt[fi] = 1;
      end else movf++;
      @(negedge clk);
      ev_v = 1'b0;
      check(thr == exp_thr, $sformatf("threshold event %0d vs %0d", thr, exp_thr));
      if (exp_thr) begin
        n_thr++;
        check(tent == 4'(ent) && tdie == mk[ent][DIE_IDX_W-1:0], "event entry and die");
      end
      begin
        int u; u = 0;
        for (int e = 0; e < N; e++) u += mv[e];
        check(used == 5'(u), $sformatf("used %0d vs %0d", used, u));
      end
      check(ovf == 8'(movf), "overflow count");
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    check(n_hit > 50 && n_thr > 0 && movf > 0, $sformatf("hits %0d thresholds %0d overflow %0d", n_hit, n_thr, movf));
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(used == 0 && ovf == 0, "log cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
