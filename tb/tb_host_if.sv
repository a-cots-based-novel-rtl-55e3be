// tb_host_if: test of the host-side interface.
// Random host commands and data with a random width setting (x8 to x128):
// one cycle later the command and its decoded form must be on cmd_o/dcmd_o,
// write data must be cut to the low 8<<width bits, and read data from the
// EDAC must reach the host pins one cycle later with its valid, cut the same
// way.
module tb_host_if;
  import m3_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [2:0] w = 3'd4;
  ddr_cmd_t hc, co;
  dcmd_e dc;
  logic [WORD_W-1:0] hd = '0, ho, wo, ri = '0;
  logic hv, rv = 1'b0;
  host_if dut (.clk, .rst_n, .width_i (w), .h_cmd_i (hc), .h_dq_i (hd), .h_dq_o (ho),
               .h_dq_valid_o (hv), .cmd_o (co), .dcmd_o (dc), .wdata_o (wo), .rdata_i (ri),
               .rvalid_i (rv));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #10000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic [2:0] rcws [8] = '{RCW_ACT, RCW_RD, RCW_WR, RCW_PRE, RCW_MRS, RCW_REF, RCW_ZQ, RCW_NOP};
    dcmd_e dcs [8] = '{DC_ACT, DC_RD, DC_WR, DC_PRE, DC_MRS, DC_REF, DC_ZQ, DC_NOP};
    hc = cmd_nop();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      int k;
      logic [WORD_W-1:0] m;
      k = $urandom_range(0, 7);
      w = 3'($urandom_range(0, 4));
      hc = mk_cmd(rcws[k], 3'($urandom), 16'($urandom));
      if ($urandom_range(0, 9) == 0) hc.cs_n = 1'b1;
      if ($urandom_range(0, 9) == 0) hc.cke = 1'b0;
      hd = {$urandom, $urandom, $urandom, $urandom};
      ri = {$urandom, $urandom, $urandom, $urandom};
      rv = 1'($urandom);
      m = (WORD_W'(1) << (8 << w)) - 1;
      if (w == 3'd4) m = '1;
      @(negedge clk);
      check(co == hc, "command registered");
      check(dc == (!hc.cke ? DC_PD : hc.cs_n ? DC_DES : dcs[k]), "command decoded");
      check(wo == (hd & m), $sformatf("write data cut to width %0d", 8 << w));
      check(hv == rv && ho == (ri & m), "read data to host");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
