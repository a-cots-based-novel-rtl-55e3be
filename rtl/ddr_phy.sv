// ddr_phy: simplified low-latency PHY for one DDR3 x16 die.
//
// Each die has its own PHY and its own point-to-point nets, so there is no
// fly-by skew to train away and no read/write leveling latency. The PHY
// registers the command onto the die pins (chip select only when the die is
// selected and powered), delays write data by the CAS write latency CWL and
// drives DQ with DQ output-enable and a toggling DQS for that beat, and
// samples read data CL cycles after a read was put on the pins. Read data
// reaches rdata_o/rvalid_o CL+2 cycles after the command entered cmd_i.
// The internal data path moves one 16-bit beat per column command and per
// clock; the double-data-rate I/O cells, DLL and delay taps of a real PHY
// are outside this model. ODT is held off, as the short nets allow.
// One PHY per die and a simple, low-latency PHY follow the document; the
// latencies and pin timing are this design's choices.
module ddr_phy
  import m3_pkg::*;
#(
  parameter int unsigned CL  = 7,
  parameter int unsigned CWL = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ddr_cmd_t          cmd_i,
  input  logic              sel_i,      // die addressed by this command
  input  logic              pwr_en_i,   // die powered
  input  logic              die_rst_i,  // hold the die in reset
  input  logic [DIE_W-1:0]  wdata_i,
  output logic [DIE_W-1:0]  rdata_o,
  output logic              rvalid_o,
  // die pins
  output logic              ddr_reset_n,
  output logic              ddr_cke,
  output logic              ddr_cs_n,
  output logic              ddr_ras_n,
  output logic              ddr_cas_n,
  output logic              ddr_we_n,
  output logic [BA_W-1:0]   ddr_ba,
  output logic [ADDR_W-1:0] ddr_addr,
  output logic              ddr_odt,
  output logic [DIE_W-1:0]  ddr_dq_o,
  output logic              ddr_dq_oe,
  output logic [1:0]        ddr_dqs_o,
  input  logic [DIE_W-1:0]  ddr_dq_i
);
  dcmd_e dc;
  assign dc = decode_cmd(cmd_i);

  logic             wr_v  [CWL];
  logic [DIE_W-1:0] wr_d  [CWL];
  logic [CL:0]      rd_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ddr_reset_n <= 1'b0;
      ddr_cke     <= 1'b0;
      ddr_cs_n    <= 1'b1;
      ddr_ras_n   <= 1'b1;
      ddr_cas_n   <= 1'b1;
      ddr_we_n    <= 1'b1;
      ddr_ba      <= '0;
      ddr_addr    <= '0;
      ddr_dq_o    <= '0;
      ddr_dq_oe   <= 1'b0;
      ddr_dqs_o   <= 2'b00;
      rd_v        <= '0;
      rdata_o     <= '0;
      rvalid_o    <= 1'b0;
      for (int i = 0; i < CWL; i++) begin
        wr_v[i] <= 1'b0;
        wr_d[i] <= '0;
      end
    end else begin
      ddr_reset_n <= pwr_en_i & ~die_rst_i;
      ddr_cke     <= cmd_i.cke & pwr_en_i;
      ddr_cs_n    <= cmd_i.cs_n | ~sel_i | ~pwr_en_i;
      ddr_ras_n   <= cmd_i.ras_n;
      ddr_cas_n   <= cmd_i.cas_n;
      ddr_we_n    <= cmd_i.we_n;
      ddr_ba      <= cmd_i.ba;
      ddr_addr    <= cmd_i.addr;
      // write data: the command reaches the pins next cycle, data CWL later
      wr_v[0] <= (dc == DC_WR) && sel_i && pwr_en_i;
      wr_d[0] <= wdata_i;
      for (int i = 1; i < CWL; i++) begin
        wr_v[i] <= wr_v[i-1];
        wr_d[i] <= wr_d[i-1];
      end
      ddr_dq_oe <= wr_v[CWL-1];
      ddr_dq_o  <= wr_d[CWL-1];
      ddr_dqs_o <= wr_v[CWL-1] ? 2'b10 : 2'b00;
      // read capture: the die drives DQ CL cycles after the pins show RD
      rd_v     <= {rd_v[CL-1:0], (dc == DC_RD) && sel_i && pwr_en_i};
      rvalid_o <= rd_v[CL];
      rdata_o  <= ddr_dq_i;
    end
  end

  assign ddr_odt = 1'b0;
endmodule
