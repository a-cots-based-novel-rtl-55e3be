// tb_ddr_phy: test of one per-die PHY against the behavioural DDR3 die.
// Writes random words to random columns of open rows in all 8 banks, reads
// them back and checks that read data arrives on rdata_o exactly CL+2
// cycles after the RD entered cmd_i, with the written value. Also checks
// that an unselected PHY keeps chip select high, that a powered-off die is
// held in reset with CKE low, and that ODT stays off.
module tb_ddr_phy;
  import m3_pkg::*;
  localparam int unsigned CL = 7, CWL = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  ddr_cmd_t cmd;
  logic sel = 1'b1, pwr = 1'b1, drst = 1'b0, rv;
  logic [DIE_W-1:0] wd = '0, rd, dqo, dqi;
  logic reset_n, cke, cs_n, ras_n, cas_n, we_n, odt, oe;
  logic [BA_W-1:0] ba; logic [ADDR_W-1:0] ad; logic [1:0] dqs;
  ddr_phy #(.CL(CL), .CWL(CWL)) dut (.clk, .rst_n, .cmd_i (cmd), .sel_i (sel), .pwr_en_i (pwr),
    .die_rst_i (drst), .wdata_i (wd), .rdata_o (rd), .rvalid_o (rv), .ddr_reset_n (reset_n),
    .ddr_cke (cke), .ddr_cs_n (cs_n), .ddr_ras_n (ras_n), .ddr_cas_n (cas_n), .ddr_we_n (we_n),
    .ddr_ba (ba), .ddr_addr (ad), .ddr_odt (odt), .ddr_dq_o (dqo), .ddr_dq_oe (oe),
    .ddr_dqs_o (dqs), .ddr_dq_i (dqi));
  ddr3_die_model #(.CL(CL), .CWL(CWL)) u_die (.clk, .reset_n, .cke, .cs_n, .ras_n, .cas_n,
    .we_n, .ba, .addr (ad), .dq_i (dqo), .dq_oe (oe), .dq_o (dqi));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int rt [$];
  logic [DIE_W-1:0] re [$];
  int n_rd = 0;
  always @(posedge clk) if (rst_n && rv) begin
    int t; logic [DIE_W-1:0] e;
    if (rt.size() == 0) check(0, "unexpected read data");
    else begin
      t = rt.pop_front(); e = re.pop_front();
      n_rd++;
      check(cyc - t == CL + 2, $sformatf("read latency %0d", cyc - t));
      check(rd == e, $sformatf("read data %h vs %h", rd, e));
    end
  end

  task automatic c(input logic [2:0] rcw, input logic [2:0] b, input logic [15:0] a,
                   input logic [15:0] d = '0);
    @(negedge clk); cmd = mk_cmd(rcw, b, a); wd = d;
    if (rcw == RCW_RD) rt.push_back(cyc);
    @(negedge clk); cmd = cmd_nop();
  endtask

  initial begin
    #10000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  logic [15:0] shadow [logic [12:0]];
  initial begin
    cmd = cmd_nop();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int b = 0; b < 8; b++) c(RCW_ACT, 3'(b), 16'(b * 3));
    for (int i = 0; i < 200; i++) begin
      logic [2:0] b; logic [9:0] col; logic [15:0] d;
      b = 3'($urandom); col = 10'($urandom); d = 16'($urandom);
      c(RCW_WR, b, {6'd0, col}, d);
      shadow[{b, col}] = d;
    end
    repeat (10) @(negedge clk);
    foreach (shadow[k]) begin
      re.push_back(shadow[k]);
      c(RCW_RD, k[12:10], {6'd0, k[9:0]});
    end
    repeat (20) @(negedge clk);
    check(n_rd == shadow.num() && rt.size() == 0, "all reads returned");
    check(u_die.proto_err == 0, "die saw a clean protocol");
    sel = 1'b0;
    @(negedge clk); cmd = mk_cmd(RCW_ACT, 3'd0, 16'd5);
    @(negedge clk); cmd = cmd_nop();
    check(cs_n, "unselected die not addressed");
    sel = 1'b1; pwr = 1'b0;
    repeat (2) @(negedge clk);
    check(!reset_n && !cke, "powered-off die held in reset");
    check(!odt, "ODT off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
