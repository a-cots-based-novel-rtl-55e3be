// tb_hsiao_enc: exhaustive test of the (13,8) Hsiao encoder.
// For all 256 data values the check bits must give a zero syndrome against
// the parity-check matrix, every non-zero data value must give a non-zero
// code word of weight at least 4 (minimum distance of a SEC-DED code), and
// the encoder must be linear (c(a^b) = c(a)^c(b)).
module tb_hsiao_enc;
  import m3_pkg::*;
  logic [HD_W-1:0] d;
  logic [HC_W-1:0] c;
  hsiao_enc dut (.data_i (d), .check_o (c));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [HC_W-1:0] syn(input logic [HD_W-1:0] dd, input logic [HC_W-1:0] cc);
    logic [HC_W-1:0] s;
    s = cc;
    for (int j = 0; j < HD_W; j++) if (dd[j]) s ^= HCOL[j];
    return s;
  endfunction

  initial begin
    #1000000 $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic [HC_W-1:0] ca [256];
    for (int v = 0; v < 256; v++) begin
      d = 8'(v); #1;
      ca[v] = c;
      check(syn(d, c) == '0, $sformatf("syndrome of %02h", v));
      if (v != 0) check($countones({d, c}) >= 4, $sformatf("weight of code word %02h", v));
    end
    for (int i = 0; i < 200; i++) begin
      int a, b;
      a = $urandom_range(0, 255); b = $urandom_range(0, 255);
      check(ca[a ^ b] == (ca[a] ^ ca[b]), "linearity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
