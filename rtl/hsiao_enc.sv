// hsiao_enc: Hsiao (13,8) SEC-DED encoder for one code word.
//
// The 5 check bits are an XOR tree over the 8 data bits, one tree per row of
// the parity-check matrix m3_pkg::HCOL. Purely combinational, so encoding adds
// no clock cycle to the write path. The code size (8 data / 5 check bits) and
// the choice of a Hsiao code follow the document; the particular columns of
// the matrix are this design's choice (any 8 distinct weight-3 columns work).
module hsiao_enc
  import m3_pkg::*;
(
  input  logic [HD_W-1:0] data_i,
  output logic [HC_W-1:0] check_o
);
  always_comb check_o = hsiao_check(data_i);
endmodule
