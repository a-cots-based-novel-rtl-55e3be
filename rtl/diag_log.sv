// diag_log: TCAM-based diagnostic log of EDAC errors.
//
// Each entry holds an error address {bank, row, column, die} with a care
// mask (the ternary part: masked bits match anything) and an error count in
// a companion count array. A new error is compared against all valid
// entries in parallel. On a match the lowest matching entry's count is
// incremented; without a match the address is written into the first free
// entry with count 1, using the programmable insertion mask (for example,
// masking the column groups all errors of one row into one entry). When a
// count reaches the programmable threshold, a one-cycle event reports the
// entry and its die so that sparing or rebuild can be triggered. A full log
// drops new addresses and counts them as overflow. One error is accepted
// per cycle and the log is updated in the next cycle.
// The match / increment / insert behaviour and the threshold trigger follow
// the document; the entry count, widths and the insertion mask are this
// design's choices.
module diag_log
  import m3_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned CNT_W   = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr_i,
  input  logic                 err_valid_i,
  input  logic [BA_W-1:0]      err_ba_i,
  input  logic [ROW_W-1:0]     err_row_i,
  input  logic [COL_W-1:0]     err_col_i,
  input  logic [DIE_IDX_W-1:0] err_die_i,
  input  logic [BA_W+ROW_W+COL_W+DIE_IDX_W-1:0] ins_mask_i, // 1 = bit is compared
  input  logic [CNT_W-1:0]     threshold_i,
  output logic                 thr_event_o,
  output logic [DIE_IDX_W-1:0] thr_die_o,
  output logic [$clog2(ENTRIES)-1:0] thr_entry_o,
  output logic [$clog2(ENTRIES+1)-1:0] used_o,
  output logic [CNT_W-1:0]     overflow_o
);
  localparam int unsigned KW = BA_W + ROW_W + COL_W + DIE_IDX_W;
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [KW-1:0]    key_q  [ENTRIES];
  logic [KW-1:0]    care_q [ENTRIES];
  logic             vld_q  [ENTRIES];
  logic [CNT_W-1:0] cnt_q  [ENTRIES];

  logic [KW-1:0] key;
  assign key = {err_ba_i, err_row_i, err_col_i, err_die_i};

  logic          hit, free;
  logic [IW-1:0] hit_idx, free_idx;
  always_comb begin
    hit = 1'b0; free = 1'b0; hit_idx = '0; free_idx = '0;
    for (int e = ENTRIES-1; e >= 0; e--) begin
      if (vld_q[e] && ((key_q[e] ^ key) & care_q[e]) == '0) begin
        hit = 1'b1; hit_idx = IW'(e);
      end
      if (!vld_q[e]) begin
        free = 1'b1; free_idx = IW'(e);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        key_q[e] <= '0; care_q[e] <= '0; vld_q[e] <= 1'b0; cnt_q[e] <= '0;
      end
      thr_event_o <= 1'b0;
      thr_die_o   <= '0;
      thr_entry_o <= '0;
      overflow_o  <= '0;
    end else if (clr_i) begin
      for (int e = 0; e < ENTRIES; e++) begin
        vld_q[e] <= 1'b0; cnt_q[e] <= '0;
      end
      thr_event_o <= 1'b0;
      overflow_o  <= '0;
    end else begin
      thr_event_o <= 1'b0;
      if (err_valid_i) begin
        if (hit) begin
          if (cnt_q[hit_idx] != '1) cnt_q[hit_idx] <= cnt_q[hit_idx] + 1'b1;
          if (cnt_q[hit_idx] + 1'b1 == threshold_i) begin
            thr_event_o <= 1'b1;
            thr_die_o   <= key_q[hit_idx][DIE_IDX_W-1:0];
            thr_entry_o <= hit_idx;
          end
        end else if (free) begin
          key_q[free_idx]  <= key & ins_mask_i;
          care_q[free_idx] <= ins_mask_i;
          vld_q[free_idx]  <= 1'b1;
          cnt_q[free_idx]  <= CNT_W'(1);
          if (threshold_i == CNT_W'(1)) begin
            thr_event_o <= 1'b1;
            thr_die_o   <= err_die_i;
            thr_entry_o <= free_idx;
          end
        end else if (overflow_o != '1) begin
          overflow_o <= overflow_o + 1'b1;
        end
      end
    end
  end

  always_comb begin
    used_o = '0;
    for (int e = 0; e < ENTRIES; e++) used_o += ($clog2(ENTRIES+1))'(vld_q[e]);
  end

endmodule
