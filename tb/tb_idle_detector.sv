// tb_idle_detector: test of the maintenance-window decisions.
// Checks: at power-up the controller owns the stack; a host REF hands the
// stack to the controller ref_busy + 1 cycles after the command (the
// command cycle itself plus tRFC) for ref_extra
// cycles, with grant dropping guard cycles before the end and host_ready low
// for the window; same for ZQ; a REF whose extra time is not above the guard
// opens nothing; the Idle pin and the SPI request give an unbounded window
// (long_o) that is returned only once the controller is quiet.
module tb_idle_detector;
  import m3_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  dcmd_e hc = DC_NOP;
  logic pin = 1'b0, sw = 1'b0, boot = 1'b1, busy = 1'b0;
  logic [11:0] rb = 12'd20, rx = 12'd60, zb = 12'd10, zx = 12'd40, gd = 12'd16;
  logic sel, grant, ready, long_w, wopen;
  idle_detector dut (.clk, .rst_n, .host_cmd_i (hc), .idle_pin_i (pin), .idle_sw_i (sw),
                     .boot_i (boot), .maint_busy_i (busy), .ref_busy_i (rb), .ref_extra_i (rx),
                     .zq_busy_i (zb), .zq_extra_i (zx), .guard_i (gd), .sel_maint_o (sel),
                     .grant_o (grant), .host_ready_o (ready), .long_o (long_w), .win_open_o (wopen));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // issue a host command and measure the window that follows
  task automatic timed(input dcmd_e c, input int busy_c, input int extra_c, input bit opens);
    int t_sel, t_grant, n_sel, n_grant;
    @(negedge clk); hc = c; @(negedge clk); hc = DC_NOP;
    t_sel = -1; n_sel = 0; n_grant = 0;
    for (int t = 1; t < busy_c + extra_c + 20; t++) begin
      if (sel) begin
        if (t_sel < 0) t_sel = t;
        n_sel++;
        check(!ready, "host held off in the window");
      end
      if (grant) n_grant++;
      @(negedge clk);
    end
    if (opens) begin
      check(t_sel == busy_c + 1, $sformatf("window opens after busy time: %0d vs %0d", t_sel, busy_c + 1));
      check(n_sel == extra_c, $sformatf("window length %0d vs %0d", n_sel, extra_c));
      check(n_grant == extra_c - int'(gd), $sformatf("grant %0d vs %0d", n_grant, extra_c - int'(gd)));
    end else check(n_sel == 0, "no window");
    check(ready && !sel, "stack back to host");
  endtask

  initial begin
    #10000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sel && long_w && grant && !ready, "power-up: controller owns the stack");
    busy = 1'b1; boot = 1'b0;
    repeat (5) @(negedge clk);
    check(sel && !grant, "draining after power-up");
    busy = 1'b0;
    repeat (2) @(negedge clk);
    check(!sel && ready, "host gets the stack once the controller is quiet");
    timed(DC_REF, 20, 60, 1);
    timed(DC_ZQ, 10, 40, 1);
    timed(DC_NOP, 0, 0, 0);
    rx = 12'd10;
    timed(DC_REF, 20, 10, 0);
    rx = 12'd60;
    // Idle pin
    @(negedge clk); pin = 1'b1; @(negedge clk); @(negedge clk);
    check(sel && long_w && grant && !ready, "Idle pin window");
    busy = 1'b1;
    repeat (50) @(negedge clk);
    check(sel && long_w, "Idle window unbounded");
    pin = 1'b0;
    repeat (10) @(negedge clk);
    check(sel && !long_w && !grant, "waiting for quiet controller");
    busy = 1'b0;
    repeat (2) @(negedge clk);
    check(!sel && ready, "Idle window closed");
    // SPI request
    @(negedge clk); sw = 1'b1; repeat (3) @(negedge clk);
    check(sel && long_w, "SPI idle window");
    sw = 1'b0; repeat (3) @(negedge clk);
    check(!sel && ready, "SPI window closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
