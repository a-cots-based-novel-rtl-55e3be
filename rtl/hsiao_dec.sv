// hsiao_dec: pipelined Hsiao (13,8) SEC-DED decoder.
//
// Stage 1 (syndrome generation): the received check bits are XORed with the
// check bits recomputed from the received data; data and syndrome are
// registered. Stage 2 (mask generation and data correction): each data bit
// has a mask that is set when the syndrome equals that bit's matrix column;
// the masked bits are flipped. A non-zero syndrome raises err_detected; a
// syndrome equal to a data column or to a unit (check-bit) column raises
// correctable. Both flags and the corrected data are registered, so the
// latency is exactly 2 cycles and a new word is accepted every cycle.
// The two register stages and the three outputs follow the document's decoder
// drawing. err_pos_o (which of the 13 bits was flipped, data bits first) is an
// addition of this design, used to count errors per die.
module hsiao_dec
  import m3_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_i,
  input  logic [HD_W-1:0]      data_i,
  input  logic [HC_W-1:0]      check_i,
  output logic                 valid_o,
  output logic [HD_W-1:0]      data_o,
  output logic                 err_detected_o,
  output logic                 correctable_o,
  output logic [HD_W+HC_W-1:0] err_pos_o
);
  // stage 1
  logic            v1;
  logic [HD_W-1:0] d1;
  logic [HC_W-1:0] s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      d1 <= '0;
      s1 <= '0;
    end else begin
      v1 <= valid_i;
      d1 <= data_i;
      s1 <= check_i ^ hsiao_check(data_i);
    end
  end

  // stage 2: masks
  logic [HD_W+HC_W-1:0] pos;
  always_comb begin
    for (int j = 0; j < HD_W; j++) pos[j] = (s1 == HCOL[j]);
    for (int k = 0; k < HC_W; k++) pos[HD_W+k] = (s1 == HC_W'(1 << k));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o        <= 1'b0;
      data_o         <= '0;
      err_detected_o <= 1'b0;
      correctable_o  <= 1'b0;
      err_pos_o      <= '0;
    end else begin
      valid_o        <= v1;
      data_o         <= d1 ^ pos[HD_W-1:0];
      err_detected_o <= |s1;
      correctable_o  <= |pos;
      err_pos_o      <= pos;
    end
  end
endmodule
