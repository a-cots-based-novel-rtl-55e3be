// host_if: host-side DDR3 slave interface of the memory cube.
//
// The cube presents itself to the host as a DDR3 memory. This block
// registers the host's command and write data, decodes the command for the
// idle detector, and registers the read data going back. The host bus width
// is programmable (width_i: 0..4 selects x8, x16, x32, x64, x128): only the
// low 8<<width_i bits are used, unused write lanes are stored as zero and
// unused read lanes return zero, so a narrower host simply under-uses the
// 128-bit word. host_ready_o reflects whether the host may issue commands.
// Input and output each add one register stage. The programmable widths
// (x8 to x128, x128 baseline) follow the document; the lane masking and the
// register stages are this design's choices; the electrical DDR PHY is not
// modelled.
module host_if
  import m3_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        width_i,
  // host pins (one beat per clock)
  input  ddr_cmd_t          h_cmd_i,
  input  logic [WORD_W-1:0] h_dq_i,
  output logic [WORD_W-1:0] h_dq_o,
  output logic              h_dq_valid_o,
  // towards the MUX
  output ddr_cmd_t          cmd_o,
  output dcmd_e             dcmd_o,
  output logic [WORD_W-1:0] wdata_o,
  input  logic [WORD_W-1:0] rdata_i,
  input  logic              rvalid_i
);
  logic [WORD_W-1:0] mask;
  always_comb begin
    mask = '0;
    for (int b = 0; b < WORD_W; b++) mask[b] = (b < (8 << width_i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_o        <= cmd_nop();
      wdata_o      <= '0;
      h_dq_o       <= '0;
      h_dq_valid_o <= 1'b0;
    end else begin
      cmd_o        <= h_cmd_i;
      wdata_o      <= h_dq_i & mask;
      h_dq_o       <= rdata_i & mask;
      h_dq_valid_o <= rvalid_i;
    end
  end

  assign dcmd_o = decode_cmd(cmd_o);
endmodule
