// tb_bank_spiral: test of the bank spiraling remap.
// With spiraling on, ACT/RD/WR/PRE to bank b must reach die p as bank
// (b + p) mod 8, so the 8 data-bearing dies of one logical bank use 8
// different physical banks; all other fields and other commands (MRS, REF)
// pass unchanged. With spiraling off every die sees the command as is.
module tb_bank_spiral;
  import m3_pkg::*;
  logic en;
  ddr_cmd_t ci, co [NUM_DIES];
  bank_spiral dut (.enable_i (en), .cmd_i (ci), .cmd_o (co));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic [2:0] rcws [6] = '{RCW_ACT, RCW_RD, RCW_WR, RCW_PRE, RCW_MRS, RCW_REF};
    for (int i = 0; i < 400; i++) begin
      logic [2:0] rcw;
      logic [7:0] seen;
      rcw = rcws[$urandom_range(0, 5)];
      en = 1'($urandom);
      ci = mk_cmd(rcw, 3'($urandom), 16'($urandom));
      #1;
      seen = '0;
      for (int p = 0; p < NUM_DIES; p++) begin
        logic [BA_W-1:0] eb;
        eb = (en && rcw != RCW_MRS && rcw != RCW_REF) ? ci.ba + BA_W'(p) : ci.ba;
        check(co[p].ba == eb && co[p].addr == ci.addr && co[p].ras_n == ci.ras_n &&
              co[p].cas_n == ci.cas_n && co[p].we_n == ci.we_n && co[p].cs_n == ci.cs_n,
              $sformatf("die %0d cmd %b en %0d", p, rcw, en));
        if (p < 8) seen[co[p].ba] = 1'b1;
      end
      if (en && rcw == RCW_ACT) check(seen == 8'hFF, "one logical bank spread over 8 banks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
