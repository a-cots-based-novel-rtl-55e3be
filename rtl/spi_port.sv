// spi_port: SPI housekeeping and configuration port.
//
// SPI mode 0 slave, oversampled by the system clock (SCLK must be slower
// than clk/4). A frame is 24 bits, MSB first, while CS_N is low:
// bit 23 = 1 for write, bits 22:16 = register address, bits 15:0 = data.
// Registers 0..N_CFG-1 are read/write configuration registers (reset to
// CFG_RESET); registers N_CFG..N_CFG+N_STS-1 are read-only status words
// supplied by the controller. For a read, MISO shifts out the addressed
// register during the 16 data bits of the same frame. A write takes effect
// (cfg_wr_o pulses) when the frame's 24th bit has been sampled.
// The SPI port for readout, configuration and test start follows the
// document; the frame format and register map are this design's choices.
module spi_port #(
  parameter int unsigned N_CFG = 16,
  parameter int unsigned N_STS = 32,
  parameter logic [N_CFG*16-1:0] CFG_RESET = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk_i,
  input  logic        cs_n_i,
  input  logic        mosi_i,
  output logic        miso_o,
  output logic [15:0] cfg_o [N_CFG],
  output logic        cfg_wr_o,
  output logic [6:0]  cfg_addr_o,
  input  logic [15:0] sts_i [N_STS]
);
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk_i};
      cs_s   <= {cs_s[1:0], cs_n_i};
      mosi_s <= {mosi_s[0], mosi_i};
    end
  end
  wire rise = sclk_s[1] & ~sclk_s[2];
  wire fall = ~sclk_s[1] & sclk_s[2];
  wire csn  = cs_s[1];

  localparam int unsigned CI_W = $clog2(N_CFG);
  localparam int unsigned SI_W = $clog2(N_STS);

  logic [23:0] sh_q;
  logic [4:0]  nb_q;
  logic [15:0] out_q;

  function automatic logic [15:0] rd_reg(input logic [6:0] a, input logic [15:0] c [N_CFG],
                                          input logic [15:0] s [N_STS]);
    if (a < 7'(N_CFG)) return c[a[CI_W-1:0]];
    if (a < 7'(N_CFG + N_STS)) return s[SI_W'(a - 7'(N_CFG))];
    return 16'hDEAD;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q <= '0; nb_q <= '0; out_q <= '0; miso_o <= 1'b0;
      cfg_wr_o <= 1'b0; cfg_addr_o <= '0;
      for (int r = 0; r < N_CFG; r++) cfg_o[r] <= CFG_RESET[r*16 +: 16];
    end else begin
      cfg_wr_o <= 1'b0;
      if (csn) begin
        nb_q <= '0;
        miso_o <= 1'b0;
      end else begin
        if (rise) begin
          sh_q <= {sh_q[22:0], mosi_s[1]};
          nb_q <= nb_q + 1'b1;
          if (nb_q == 5'd7) out_q <= rd_reg({sh_q[5:0], mosi_s[1]}, cfg_o, sts_i);
          if (nb_q == 5'd23 && sh_q[22]) begin
            if (sh_q[21:15] < 7'(N_CFG)) cfg_o[sh_q[15 +: CI_W]] <= {sh_q[14:0], mosi_s[1]};
            cfg_wr_o   <= 1'b1;
            cfg_addr_o <= sh_q[21:15];
          end
        end
        if (fall && nb_q >= 5'd8 && nb_q < 5'd24) begin
          miso_o <= out_q[15];
          out_q  <= {out_q[14:0], 1'b0};
        end
      end
    end
  end
endmodule
