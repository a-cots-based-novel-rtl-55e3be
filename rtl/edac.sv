// edac: error detection and correction across the 13 active dies.
//
// Write path: the 128-bit word is split into 8 data-die lanes of 16 bits
// (die d carries word bits [16d+15:16d]). For every DQ bit position i the
// 8 bits {die7[i]..die0[i]} form one Hsiao code word, and its 5 check bits go
// to bit i of the 5 ECC dies. 16 encoders therefore cover the word, and the
// write path is combinational.
// Read path: 16 pipelined decoders (2 cycles) correct the word. A copy of
// the received lanes is kept alongside; XORing it with the corrected lanes
// (data dies) and the re-encoded check bits (ECC dies) gives the failing bits
// of each die. They are reported per word (die_err_o) and accumulated in
// saturating per-die bit-error counters. Outputs are valid 2 cycles after
// rd_valid_i. The interleaving, the 16 encoder/decoder pairs and the
// XOR-with-original error counting follow the document; counter width and
// clearing are this design's choices.
module edac
  import m3_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write path
  input  logic [WORD_W-1:0]    wdata_i,
  output logic [DIE_W-1:0]     wlane_o [ACT_DIES],
  // read path
  input  logic                 rd_valid_i,
  input  logic [DIE_W-1:0]     rlane_i [ACT_DIES],
  output logic                 rd_valid_o,
  output logic [WORD_W-1:0]    rdata_o,
  output logic                 ce_o,      // at least one code word corrected
  output logic                 ue_o,      // at least one code word uncorrectable
  output logic [ACT_DIES-1:0]  die_err_o, // dies with failing bits in this word
  // statistics
  input  logic                 cnt_clr_i,
  output logic [CNT_W-1:0]     die_cnt_o [ACT_DIES]
);
  // ---------------- write path ----------------
  logic [HD_W-1:0] enc_in  [DIE_W];
  logic [HC_W-1:0] enc_out [DIE_W];

  for (genvar i = 0; i < DIE_W; i++) begin : g_enc
    hsiao_enc u_enc (.data_i (enc_in[i]), .check_o (enc_out[i]));
  end

  always_comb begin
    for (int d = 0; d < DATA_DIES; d++) wlane_o[d] = wdata_i[d*DIE_W +: DIE_W];
    for (int i = 0; i < DIE_W; i++) begin
      for (int d = 0; d < DATA_DIES; d++) enc_in[i][d] = wdata_i[d*DIE_W + i];
      for (int e = 0; e < ECC_DIES; e++) wlane_o[DATA_DIES+e][i] = enc_out[i][e];
    end
  end

  // ---------------- read path ----------------
  logic [HD_W-1:0] dec_in   [DIE_W];
  logic [HC_W-1:0] chk_in   [DIE_W];
  logic [HD_W-1:0] dec_out  [DIE_W];
  logic [DIE_W-1:0] v_o, det_o, cor_o;

  always_comb begin
    for (int i = 0; i < DIE_W; i++) begin
      for (int d = 0; d < DATA_DIES; d++) dec_in[i][d] = rlane_i[d][i];
      for (int e = 0; e < ECC_DIES; e++) chk_in[i][e] = rlane_i[DATA_DIES+e][i];
    end
  end

  for (genvar i = 0; i < DIE_W; i++) begin : g_dec
    logic [HD_W+HC_W-1:0] unused_pos;
    hsiao_dec u_dec (
      .clk, .rst_n,
      .valid_i        (rd_valid_i),
      .data_i         (dec_in[i]),
      .check_i        (chk_in[i]),
      .valid_o        (v_o[i]),
      .data_o         (dec_out[i]),
      .err_detected_o (det_o[i]),
      .correctable_o  (cor_o[i]),
      .err_pos_o      (unused_pos)
    );
  end

  // copy of the original lanes, delayed to line up with the decoder output
  logic [DIE_W-1:0] orig1 [ACT_DIES];
  logic [DIE_W-1:0] orig2 [ACT_DIES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < ACT_DIES; d++) begin
        orig1[d] <= '0;
        orig2[d] <= '0;
      end
    end else begin
      orig1 <= rlane_i;
      orig2 <= orig1;
    end
  end

  // failing bits = corrected (and re-encoded) XOR original
  logic [DIE_W-1:0] fail [ACT_DIES];
  always_comb begin
    for (int i = 0; i < DIE_W; i++) begin
      logic [HC_W-1:0] reck;
      reck = hsiao_check(dec_out[i]);
      for (int d = 0; d < DATA_DIES; d++) begin
        rdata_o[d*DIE_W + i] = dec_out[i][d];
        fail[d][i] = (dec_out[i][d] ^ orig2[d][i]) & cor_o[i];
      end
      for (int e = 0; e < ECC_DIES; e++)
        fail[DATA_DIES+e][i] = (reck[e] ^ orig2[DATA_DIES+e][i]) & cor_o[i];
    end
    rd_valid_o = v_o[0];
    ce_o = v_o[0] & |(det_o & cor_o);
    ue_o = v_o[0] & |(det_o & ~cor_o);
    for (int d = 0; d < ACT_DIES; d++) die_err_o[d] = v_o[0] & |fail[d];
  end

  // saturating next values of the per-die failing-bit counters
  logic [CNT_W-1:0] cnt_nx [ACT_DIES];
  always_comb begin
    for (int d = 0; d < ACT_DIES; d++) begin
      logic [CNT_W:0] sum;
      sum = {1'b0, die_cnt_o[d]} + (CNT_W+1)'($countones(fail[d]));
      cnt_nx[d] = sum[CNT_W] ? '1 : sum[CNT_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < ACT_DIES; d++) die_cnt_o[d] <= '0;
    end else if (cnt_clr_i) begin
      for (int d = 0; d < ACT_DIES; d++) die_cnt_o[d] <= '0;
    end else if (v_o[0]) begin
      for (int d = 0; d < ACT_DIES; d++) die_cnt_o[d] <= cnt_nx[d];
    end
  end
endmodule
