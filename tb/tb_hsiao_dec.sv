// tb_hsiao_dec: test of the pipelined Hsiao decoder.
// Streams one code word per cycle: clean words, every single-bit error (all
// 13 positions) and random double-bit errors. Checks that results appear
// exactly 2 cycles after the input (the two register stages), that single
// errors are corrected with the right position, clean words pass unflagged
// and double errors are detected as uncorrectable.
module tb_hsiao_dec;
  import m3_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic valid_i = 1'b0, valid_o, det, cor;
  logic [HD_W-1:0] din = '0, dout;
  logic [HC_W-1:0] cin = '0;
  logic [HD_W+HC_W-1:0] pos;
  hsiao_dec dut (.clk, .rst_n, .valid_i, .data_i (din), .check_i (cin), .valid_o,
                 .data_o (dout), .err_detected_o (det), .correctable_o (cor), .err_pos_o (pos));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  typedef struct { logic [HD_W-1:0] d; int kind; logic [HD_W+HC_W-1:0] m; int t; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && valid_o) begin
    exp_t e;
    if (q.size() == 0) check(0, "unexpected output");
    else begin
      e = q.pop_front();
      check(cyc - e.t == 2, $sformatf("latency %0d", cyc - e.t));
      if (e.kind == 0) check(!det && dout == e.d, "clean word");
      if (e.kind == 1) check(det && cor && dout == e.d && pos == e.m, "single error corrected");
      if (e.kind == 2) check(det && !cor, "double error detected");
    end
  end

  task automatic send(input logic [HD_W-1:0] d, input logic [HD_W+HC_W-1:0] m, input int kind);
    logic [HD_W+HC_W-1:0] w;
    exp_t e;
    w = {hsiao_check(d), d} ^ m;
    @(negedge clk);
    valid_i = 1'b1; din = w[HD_W-1:0]; cin = w[HD_W +: HC_W];
    e.d = d; e.kind = kind; e.m = m; e.t = cyc;
    q.push_back(e);
  endtask

  initial begin
    #1000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      logic [HD_W-1:0] d;
      int b1, b2;
      d = 8'($urandom);
      send(d, '0, 0);
      b1 = $urandom_range(0, 12);
      send(d, 13'(1) << b1, 1);
      b2 = (b1 + $urandom_range(1, 12)) % 13;
      send(d, (13'(1) << b1) | (13'(1) << b2), 2);
    end
    @(negedge clk); valid_i = 1'b0;
    repeat (5) @(negedge clk);
    check(q.size() == 0, "all words came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
