// die_manager: SEFI detection, per-die power control and spare decisions.
//
// Detection (one recovery at a time, while the rebuild engine is idle):
//  * SEFI, data failure: failing-die reports from the EDAC are counted per
//    logical lane over a window of win_i cycles; a lane whose count reaches
//    sefi_thr_i in one window is declared failed.
//  * SEFI, high current: for each current sample set, a lane whose die draws
//    more than the mean of the 13 active dies plus cur_margin_i is declared
//    failed (only relative current matters, so no absolute calibration).
// A failed lane is handed to the rebuild engine (power cycle and rebuild).
// If the same lane fails again after a recovery, or the diagnostic log
// reports too many errors on one die, the lane is retired to the cold spare
// (swap request to the sparing block) and then rebuilt onto it.
// The spare die stays unpowered (cold) until a lane is moved onto it; the
// rebuild that follows the swap powers it up through the same sequence.
// Power cycle, on the rebuild engine's reset request: power off the die for
// OFF_CYC cycles, power on with reset held for RST_CYC cycles, ask for the
// die to be re-initialised (mode registers, DLL, ZQ) and acknowledge.
// Mitigations and detections follow the document's failure-mode table; the
// window counting, the mean-plus-margin current test and "second failure
// means device failure" (standing in for a BIST after power cycle) are this
// design's choices.
module die_manager
  import m3_pkg::*;
#(
  parameter int unsigned CUR_W   = 10,
  parameter int unsigned OFF_CYC = 64,
  parameter int unsigned RST_CYC = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // EDAC reports (logical lanes)
  input  logic                 err_valid_i,
  input  logic [ACT_DIES-1:0]  err_dies_i,
  input  logic [7:0]           sefi_thr_i,
  input  logic [15:0]          win_i,
  // current monitor samples (physical dies)
  input  logic                 cur_valid_i,
  input  logic [CUR_W-1:0]     cur_i [NUM_DIES],
  input  logic [CUR_W-1:0]     cur_margin_i,
  // diagnostic log threshold event (logical lane)
  input  logic                 log_thr_i,
  input  logic [DIE_IDX_W-1:0] log_die_i,
  // sparing
  input  logic [DIE_IDX_W-1:0] map_i [ACT_DIES],
  input  logic                 spare_used_i,
  output logic                 swap_req_o,
  output logic [DIE_IDX_W-1:0] swap_lane_o,
  // rebuild engine
  input  logic                 rebuild_busy_i,
  output logic                 rebuild_start_o,
  output logic [DIE_IDX_W-1:0] rebuild_lane_o,
  input  logic                 reset_req_i,
  input  logic [DIE_IDX_W-1:0] reset_lane_i,
  output logic                 reset_done_o,
  // die power and re-initialisation
  output logic [NUM_DIES-1:0]  pwr_en_o,
  output logic [NUM_DIES-1:0]  die_rst_o,
  output logic                 init_req_o,
  output logic [NUM_DIES-1:0]  init_mask_o,
  input  logic                 init_done_i,
  // statistics
  output logic [7:0]           sefi_data_cnt_o,
  output logic [7:0]           sefi_cur_cnt_o,
  output logic [7:0]           power_cycles_o
);
  // ---------------- detection ----------------
  logic [7:0]           cnt_q [ACT_DIES];
  logic [15:0]          win_q;
  logic [ACT_DIES-1:0]  hist_q;
  logic                 ev_data, ev_cur;
  logic [DIE_IDX_W-1:0] ev_data_l, ev_cur_l;

  always_comb begin
    logic [CUR_W+4-1:0] sum;
    ev_data = 1'b0; ev_data_l = '0;
    for (int l = ACT_DIES-1; l >= 0; l--)
      if (err_valid_i && err_dies_i[l] && cnt_q[l] + 1'b1 >= sefi_thr_i) begin
        ev_data = 1'b1; ev_data_l = DIE_IDX_W'(l);
      end
    sum = '0;
    for (int l = 0; l < ACT_DIES; l++) sum += (CUR_W+4)'(cur_i[map_i[l]]);
    ev_cur = 1'b0; ev_cur_l = '0;
    for (int l = ACT_DIES-1; l >= 0; l--)
      if (cur_valid_i && (CUR_W+4)'(cur_i[map_i[l]]) * (CUR_W+4)'(ACT_DIES) >
                         sum + (CUR_W+4)'(cur_margin_i) * (CUR_W+4)'(ACT_DIES)) begin
        ev_cur = 1'b1; ev_cur_l = DIE_IDX_W'(l);
      end
  end

  // ---------------- decisions ----------------
  typedef enum logic [1:0] { D_IDLE, D_SWAP, D_START, D_WAIT } d_e;
  d_e                   d_q;
  logic [DIE_IDX_W-1:0] lane_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < ACT_DIES; l++) cnt_q[l] <= '0;
      win_q <= '0; hist_q <= '0; d_q <= D_IDLE; lane_q <= '0;
      swap_req_o <= 1'b0; swap_lane_o <= '0; rebuild_start_o <= 1'b0; rebuild_lane_o <= '0;
      sefi_data_cnt_o <= '0; sefi_cur_cnt_o <= '0;
    end else begin
      swap_req_o      <= 1'b0;
      rebuild_start_o <= 1'b0;
      // window counters
      if (win_q >= win_i) begin
        win_q <= '0;
        for (int l = 0; l < ACT_DIES; l++) cnt_q[l] <= '0;
      end else begin
        win_q <= win_q + 1'b1;
        if (err_valid_i)
          for (int l = 0; l < ACT_DIES; l++)
            if (err_dies_i[l] && cnt_q[l] != '1) cnt_q[l] <= cnt_q[l] + 1'b1;
      end
      case (d_q)
        D_IDLE: if (!rebuild_busy_i) begin
          if (log_thr_i && !spare_used_i) begin
            lane_q <= log_die_i; d_q <= D_SWAP;
          end else if (ev_data || ev_cur) begin
            logic [DIE_IDX_W-1:0] l;
            l = ev_data ? ev_data_l : ev_cur_l;
            if (ev_data) sefi_data_cnt_o <= sefi_data_cnt_o + 1'b1;
            else         sefi_cur_cnt_o  <= sefi_cur_cnt_o + 1'b1;
            lane_q <= l;
            for (int k = 0; k < ACT_DIES; k++) cnt_q[k] <= '0;
            if (hist_q[l] && !spare_used_i) d_q <= D_SWAP;
            else begin
              hist_q[l] <= 1'b1;
              d_q <= D_START;
            end
          end
        end
        D_SWAP: begin
          swap_req_o  <= 1'b1;
          swap_lane_o <= lane_q;
          d_q         <= D_START;
        end
        D_START: begin
          rebuild_start_o <= 1'b1;
          rebuild_lane_o  <= lane_q;
          d_q             <= D_WAIT;
        end
        D_WAIT: if (!rebuild_busy_i && !rebuild_start_o) d_q <= D_IDLE;
        default: d_q <= D_IDLE;
      endcase
    end
  end

  // ---------------- power cycle ----------------
  typedef enum logic [2:0] { P_IDLE, P_OFF, P_RST, P_INIT, P_DONE } p_e;
  p_e                  p_q;
  logic [15:0]         pc_q;
  logic [NUM_DIES-1:0] pmask_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q <= P_IDLE; pc_q <= '0; pmask_q <= '0;
      pwr_en_o <= NUM_DIES'((1 << ACT_DIES) - 1); die_rst_o <= '0; power_cycles_o <= '0;
    end else begin
      case (p_q)
        P_IDLE: if (reset_req_i) begin
          pmask_q <= NUM_DIES'(1) << map_i[reset_lane_i];
          pwr_en_o[map_i[reset_lane_i]] <= 1'b0;
          pc_q <= 16'(OFF_CYC);
          power_cycles_o <= power_cycles_o + 1'b1;
          p_q <= P_OFF;
        end
        P_OFF: if (pc_q == '0) begin
          pwr_en_o  <= pwr_en_o | pmask_q;
          die_rst_o <= pmask_q;
          pc_q <= 16'(RST_CYC);
          p_q  <= P_RST;
        end else pc_q <= pc_q - 1'b1;
        P_RST: if (pc_q == '0) begin
          die_rst_o <= '0;
          p_q <= P_INIT;
        end else pc_q <= pc_q - 1'b1;
        P_INIT: if (init_done_i) p_q <= P_DONE;
        P_DONE: if (!reset_req_i) p_q <= P_IDLE;
        default: p_q <= P_IDLE;
      endcase
    end
  end

  assign init_req_o   = (p_q == P_INIT);
  assign init_mask_o  = pmask_q;
  assign reset_done_o = (p_q == P_DONE);
endmodule
