// tb_spi_port: test of the SPI housekeeping port (mode 0, 24-bit frames:
// write flag, 7-bit register address, 16-bit data, MSB first).
// Checks the reset values, random writes to the 16 configuration registers
// (each with one cfg_wr_o pulse carrying the address), read-back of every
// configuration register, reads of the 32 status registers and that a write
// beyond the configuration range changes nothing.
module tb_spi_port;
  localparam int unsigned NC = 16, NS = 32;
  localparam logic [NC*16-1:0] RST = {16{16'hA5A5}} ^ {NC{16'h0101}};
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso, wr;
  logic [15:0] cfg [NC];
  logic [15:0] sts [NS];
  logic [6:0] wa;
  spi_port #(.N_CFG(NC), .N_STS(NS), .CFG_RESET(RST)) dut (.clk, .rst_n, .sclk_i (sclk),
    .cs_n_i (cs_n), .mosi_i (mosi), .miso_o (miso), .cfg_o (cfg), .cfg_wr_o (wr),
    .cfg_addr_o (wa), .sts_i (sts));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int n_wr = 0;
  logic [6:0] last_wa;
  always @(posedge clk) if (wr) begin n_wr++; last_wa = wa; end

  task automatic xfer(input logic [23:0] f, output logic [15:0] rd);
    rd = '0;
    cs_n = 1'b0;
    repeat (6) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin
      mosi = f[i];
      repeat (3 + $urandom_range(0, 3)) @(negedge clk);
      sclk = 1'b1;
      if (i < 16) rd = {rd[14:0], miso};
      repeat (3 + $urandom_range(0, 3)) @(negedge clk);
      sclk = 1'b0;
    end
    repeat (6) @(negedge clk);
    cs_n = 1'b1;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    #100000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic [15:0] model [NC];
    logic [15:0] r;
    for (int s = 0; s < NS; s++) sts[s] = 16'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < NC; a++) begin
      model[a] = RST[a*16 +: 16];
      check(cfg[a] == model[a], "reset value");
    end
    for (int i = 0; i < 60; i++) begin
      int a, n0;
      logic [15:0] d;
      a = $urandom_range(0, NC-1); d = 16'($urandom);
      n0 = n_wr;
      xfer({1'b1, 7'(a), d}, r);
      model[a] = d;
      check(n_wr == n0 + 1 && last_wa == 7'(a), "one write strobe with the address");
      check(cfg[a] == d, $sformatf("config %0d written", a));
    end
    for (int a = 0; a < NC; a++) begin
      xfer({1'b0, 7'(a), 16'h0}, r);
      check(r == model[a], $sformatf("config %0d read back %h vs %h", a, r, model[a]));
    end
    for (int s = 0; s < NS; s++) begin
      xfer({1'b0, 7'(NC + s), 16'h0}, r);
      check(r == sts[s], $sformatf("status %0d read %h vs %h", s, r, sts[s]));
    end
    xfer({1'b1, 7'd100, 16'h1234}, r);
    for (int a = 0; a < NC; a++) check(cfg[a] == model[a], "out-of-range write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
