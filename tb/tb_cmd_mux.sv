// tb_cmd_mux: test of the host / controller MUX.
// Random commands on both sides with a random select: one cycle later the
// selected side's command, data and chip selects must be on the outputs
// (host: all active dies; controller: its die mask), host MRS must arrive as
// NOP, and every host RD (and only host reads) must give host_rvalid_o
// exactly RD_LAT cycles after the MUX registered it.
module tb_cmd_mux;
  import m3_pkg::*;
  localparam int unsigned RD_LAT = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sel = 1'b0, hrv;
  logic [NUM_DIES-1:0] act = 14'h1FFF, cm = '0, ds;
  ddr_cmd_t hcmd, ccmd, ocmd;
  logic [WORD_W-1:0] hw = '0, cw = '0, ow;
  cmd_mux #(.RD_LAT(RD_LAT)) dut (.clk, .rst_n, .sel_maint_i (sel), .phys_active_i (act),
    .host_cmd_i (hcmd), .host_wdata_i (hw), .ctrl_cmd_i (ccmd), .ctrl_die_mask_i (cm),
    .ctrl_wdata_i (cw), .cmd_o (ocmd), .die_sel_o (ds), .wdata_o (ow), .host_rvalid_o (hrv));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #10000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic [2:0] rcws [7] = '{RCW_ACT, RCW_RD, RCW_WR, RCW_PRE, RCW_MRS, RCW_REF, RCW_NOP};
    bit hrd_hist [$];
    hcmd = cmd_nop(); ccmd = cmd_nop();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 16; i++) hrd_hist.push_back(0);
    for (int i = 0; i < 2000; i++) begin
      ddr_cmd_t eh;
      bit is_hrd;
      sel  = ($urandom_range(0, 3) == 0) ? ~sel : sel;
      hcmd = mk_cmd(rcws[$urandom_range(0, 6)], 3'($urandom), 16'($urandom));
      ccmd = mk_cmd(rcws[$urandom_range(0, 6)], 3'($urandom), 16'($urandom));
      hw = {$urandom, $urandom, $urandom, $urandom};
      cw = {$urandom, $urandom, $urandom, $urandom};
      cm = 14'($urandom);
      act = ($urandom_range(0, 1) == 0) ? 14'h1FFF : 14'h3FF7;
      is_hrd = !sel && decode_cmd(hcmd) == DC_RD;
      eh = (decode_cmd(hcmd) == DC_MRS) ? cmd_nop() : hcmd;
      @(negedge clk);
      if (!sel) check(ocmd == eh && ow == hw && ds == act, "host side selected");
      else      check(ocmd == ccmd && ow == cw && ds == cm, "controller side selected");
      hrd_hist.push_back(is_hrd);
      // hrd_hist[$] is the read registered at this edge; RD_LAT-1 edges later it shows
      check(hrv == hrd_hist[hrd_hist.size() - RD_LAT], "host read valid after RD_LAT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
