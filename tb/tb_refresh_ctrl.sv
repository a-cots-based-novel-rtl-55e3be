// tb_refresh_ctrl: test of the variable-rate refresh timer.
// A responder acknowledges each request 3 cycles after it rises. Checks:
// the time from a refresh to the next request equals the programmed
// interval (+1 cycle: the count runs from the interval down to 0); above the hot
// temperature the interval halves; zero selects the default 2340 cycles; a
// host refresh restarts the interval; outside maintenance mode no request is
// raised; every refresh gives one tick.
module tb_refresh_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [15:0] ival = 16'd100;
  logic [7:0]  temp = 8'd40, hot = 8'd85;
  logic        mm = 1'b1, href = 1'b0, ack = 1'b0, req, tick;
  refresh_ctrl dut (.clk, .rst_n, .interval_i (ival), .temp_i (temp), .temp_hot_i (hot),
                    .maint_mode_i (mm), .host_ref_i (href), .ref_ack_i (ack),
                    .ref_req_o (req), .ref_tick_o (tick));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int cyc = 0, n_tick = 0;
  always @(posedge clk) begin cyc <= cyc + 1; if (tick) n_tick++; end

  // wait for a request, acknowledge it, return the cycles since the last ack
  int last_ack = 0;
  task automatic serve(output int dt);
    while (!req) @(negedge clk);
    dt = cyc - last_ack;
    repeat (2) @(negedge clk);
    ack = 1'b1; @(negedge clk); ack = 1'b0;
    last_ack = cyc;
  endtask

  initial begin
    #100000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int dt, t0, tk;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    serve(dt);                                   // first expiry from reset
    for (int i = 0; i < 5; i++) begin
      serve(dt);
      check(dt == 100 + 1, $sformatf("interval 100: %0d", dt));
    end
    temp = 8'd90;
    serve(dt);
    for (int i = 0; i < 5; i++) begin
      serve(dt);
      check(dt == 50 + 1, $sformatf("hot interval 50: %0d", dt));
    end
    temp = 8'd40; ival = 16'd0;
    serve(dt);
    serve(dt);
    check(dt == 2340 + 1, $sformatf("default interval: %0d", dt));
    ival = 16'd100;
    serve(dt);
    // host refresh restarts the count
    repeat (60) @(negedge clk);
    href = 1'b1; @(negedge clk); href = 1'b0; t0 = cyc;
    while (!req) @(negedge clk);
    check(cyc - t0 == 100 + 1, $sformatf("host refresh restarts the interval: %0d", cyc - t0));
    repeat (2) @(negedge clk); ack = 1'b1; @(negedge clk); ack = 1'b0;
    // no requests outside maintenance mode
    mm = 1'b0;
    repeat (400) begin @(negedge clk); check(!req, "no request in host mode"); end
    mm = 1'b1;
    @(negedge clk);
    check(req, "pending refresh requested when the window opens");
    tk = n_tick;
    ack = 1'b1; @(negedge clk); ack = 1'b0; @(negedge clk);
    check(n_tick == tk + 1, "one tick per refresh");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
