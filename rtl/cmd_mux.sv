// cmd_mux: selects who drives the stack, host or controller.
//
// With sel_maint_i low the host command, its write data and a chip select
// for every active die pass through (normal, pass-through mode). With it
// high the controller's command, write data and die mask are used
// (maintenance mode). The output is registered, adding one cycle. Reads the
// host issued are tracked by a shift register of RD_LAT stages so that
// host_rvalid_o marks the host's words when they come back through the EDAC.
// Host MRS commands are not forwarded (the cube sets its own mode registers
// and latencies), every other host command is.
// The two-way MUX between host path and control logic follows the document;
// the registered output and the read tracking are this design's choices.
module cmd_mux
  import m3_pkg::*;
#(
  parameter int unsigned RD_LAT = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sel_maint_i,
  input  logic [NUM_DIES-1:0] phys_active_i,
  // host path
  input  ddr_cmd_t            host_cmd_i,
  input  logic [WORD_W-1:0]   host_wdata_i,
  // controller path
  input  ddr_cmd_t            ctrl_cmd_i,
  input  logic [NUM_DIES-1:0] ctrl_die_mask_i,
  input  logic [WORD_W-1:0]   ctrl_wdata_i,
  // to the stack
  output ddr_cmd_t            cmd_o,
  output logic [NUM_DIES-1:0] die_sel_o,
  output logic [WORD_W-1:0]   wdata_o,
  output logic                host_rvalid_o
);
  logic [RD_LAT-1:0] hrd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_o     <= cmd_nop();
      die_sel_o <= '0;
      wdata_o   <= '0;
      hrd_q     <= '0;
    end else begin
      if (sel_maint_i) begin
        cmd_o     <= ctrl_cmd_i;
        die_sel_o <= ctrl_die_mask_i;
        wdata_o   <= ctrl_wdata_i;
      end else begin
        cmd_o     <= host_cmd_i;
        // the controller owns the dies' mode registers: host MRS becomes NOP
        if (decode_cmd(host_cmd_i) == DC_MRS) cmd_o <= cmd_nop();
        die_sel_o <= phys_active_i;
        wdata_o   <= host_wdata_i;
      end
      hrd_q <= {hrd_q[RD_LAT-2:0], !sel_maint_i && decode_cmd(host_cmd_i) == DC_RD};
    end
  end

  assign host_rvalid_o = hrd_q[RD_LAT-1];
endmodule
