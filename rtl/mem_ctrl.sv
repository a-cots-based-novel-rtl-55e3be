// mem_ctrl: DDR3 memory controller of the maintenance path.
//
// Requests (read or write of one 128-bit word at a linear address) are
// steered by a crossbar into one request queue per bank (QDEPTH entries).
// Scheduling has two levels. Each bank scheduler picks its best request,
// a row hit on the open row first and otherwise the oldest, and proposes
// the DRAM command that request needs next (ACT, PRE or the column
// command) once that bank's timers allow it. The channel scheduler then
// applies first-ready first-come-first-serve (FR-FCFS): among the proposals
// that can issue this cycle it prefers column commands (row hits) and,
// among equals, the oldest request. A request leaves its queue when its
// column command issues.
// Page policy (page_mode_i): 0 open page (rows stay open), 1 close page (a
// bank with no pending hit is precharged right away), 2 automatic (a
// saturating hit/miss counter switches between the two).
// Global operations take the whole stack: a refresh request, a special
// command (MRS, ZQCL or PREA with a die mask) and the end of a maintenance
// window (grant_i low, once the queued requests have drained, which own_i
// allows while the stack is still selected) each first close all rows with
// Precharge All. The stack is also precharged when the controller has been idle for CLOSE_IDLE
// cycles. With pd_en_i set, an idle controller with all banks closed drops
// CKE (power-down) until new work arrives.
// Timing: one command per cycle on cmd_o, registered; write data is given
// with the WR command. A read's response (source and address) appears on
// rsp_* RD_LAT cycles after the RD left cmd_o, lined up with the data at
// the EDAC output. All timing parameters are in controller clock cycles.
// The two-level scheduler, FR-FCFS, open/close page switching, power-down
// and Precharge All after maintenance follow the document; queue depth,
// timing values (DDR3 numbers at a 300 MHz controller clock), the idle
// precharge and the auto-policy counter are this design's choices.
// Lint note: rst_n is used both as the asynchronous flop reset and in the
// `disable iff` of the simulation assertions below; a tool that reports the
// reset as a net used both ways is describing that, the logic itself only
// uses rst_n as an asynchronous reset.
module mem_ctrl
  import m3_pkg::*;
#(
  parameter int unsigned QDEPTH     = 4,
  parameter int unsigned RD_LAT     = 12,
  parameter int unsigned CL         = 7,
  parameter int unsigned CWL        = 6,
  parameter int unsigned T_RCD      = 5,
  parameter int unsigned T_RP       = 5,
  parameter int unsigned T_RAS      = 11,
  parameter int unsigned T_RRD      = 4,
  parameter int unsigned T_CCD      = 4,
  parameter int unsigned T_RTP      = 4,
  parameter int unsigned T_WR       = 5,
  parameter int unsigned T_WTR      = 4,
  parameter int unsigned T_RFC      = 105,
  parameter int unsigned T_MOD      = 12,
  parameter int unsigned T_ZQINIT   = 512,
  parameter int unsigned T_XP       = 3,
  parameter int unsigned PD_IDLE    = 32,
  parameter int unsigned CLOSE_IDLE = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                grant_i,
  input  logic                own_i,      // stack selected (window incl. its guard/drain time)
  input  logic                long_ok_i,  // unbounded window: refresh and MRS/ZQ allowed
  input  logic [1:0]          page_mode_i,
  input  logic                pd_en_i,
  // bank requests
  input  logic                req_valid_i,
  input  mreq_t               req_i,
  output logic                req_ready_o,
  // special commands
  input  logic                sp_valid_i,
  input  spreq_t              sp_i,
  output logic                sp_ready_o,
  output logic                sp_done_o,
  // refresh
  input  logic                ref_req_i,
  output logic                ref_ack_o,
  // to the MUX
  output ddr_cmd_t            cmd_o,
  output logic [NUM_DIES-1:0] die_mask_o,
  output logic [WORD_W-1:0]   wdata_o,
  // read response tag
  output logic                rsp_valid_o,
  output src_e                rsp_src_o,
  output logic [LADDR_W-1:0]  rsp_laddr_o,
  // status
  output logic                busy_o,
  output logic                pd_o,
  output logic                close_mode_o,
  output logic [15:0]         hits_o,
  output logic [15:0]         misses_o,
  output logic [15:0]         prea_o
);
  localparam int unsigned QI_W = $clog2(QDEPTH);
  localparam int unsigned T_W  = 10;
  localparam int unsigned T_WR2PRE = CWL + 4 + T_WR;
  localparam int unsigned T_WR2RD  = CWL + 4 + T_WTR;
  localparam int unsigned T_RD2WR  = CL + 6 - CWL;

  // ---------------- request queues ----------------
  logic              q_v   [NBANKS][QDEPTH];
  mreq_t             q_r   [NBANKS][QDEPTH];
  logic [7:0]        q_seq [NBANKS][QDEPTH];
  logic [7:0]        seq_q;

  // ---------------- bank state ----------------
  logic              open_q [NBANKS];
  logic [ROW_W-1:0]  row_q  [NBANKS];
  logic [T_W-1:0]    t_act  [NBANKS];  // until ACT allowed
  logic [T_W-1:0]    t_col  [NBANKS];  // until RD/WR allowed
  logic [T_W-1:0]    t_pre  [NBANKS];  // until PRE allowed
  logic [T_W-1:0]    g_ccd, g_rrd, g_rd, g_wr;  // channel-wide timers

  // ---------------- global operation FSM ----------------
  typedef enum logic [2:0] { G_NONE, G_PREA, G_TRP, G_ISSUE, G_WAIT, G_PD, G_XP } g_e;
  typedef enum logic [1:0] { GO_REF, GO_SP, GO_CLOSE } gop_e;
  g_e             g_q;
  gop_e           gop_q;
  spreq_t         sp_q;
  logic [T_W-1:0] g_cnt;
  logic [7:0]     idle_cnt;
  logic [3:0]     pol_q;   // auto page policy: hit/miss balance

  // read tag delay line
  logic              rl_v   [RD_LAT];
  src_e              rl_src [RD_LAT];
  logic [LADDR_W-1:0] rl_a  [RD_LAT];

  // ---------------- derived ----------------
  logic any_open, any_q, close_pol;
  always_comb begin
    any_open = 1'b0;
    any_q    = 1'b0;
    for (int b = 0; b < NBANKS; b++) begin
      any_open |= open_q[b];
      for (int i = 0; i < QDEPTH; i++) any_q |= q_v[b][i];
    end
    close_pol = (page_mode_i == 2'd1) || (page_mode_i == 2'd2 && pol_q < 4'd8);
  end

  // crossbar: accept into the addressed bank's queue
  logic [BA_W-1:0] in_ba;
  logic            in_free;
  logic [QI_W-1:0] in_slot;
  always_comb begin
    in_ba   = la_ba(req_i.laddr);
    in_free = 1'b0;
    in_slot = '0;
    for (int i = QDEPTH-1; i >= 0; i--)
      if (!q_v[in_ba][i]) begin
        in_free = 1'b1;
        in_slot = QI_W'(i);
      end
  end
  assign req_ready_o = in_free && grant_i && (g_q == G_NONE || g_q == G_PD);

  // ---------------- level 1: bank schedulers ----------------
  typedef enum logic [1:0] { BC_NONE, BC_ACT, BC_PRE, BC_COL } bc_e;
  bc_e             bc     [NBANKS];
  logic            bc_rdy [NBANKS];
  logic [QI_W-1:0] bc_idx [NBANKS];
  logic [7:0]      bc_seq [NBANKS];

  function automatic logic older(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] d;
    d = a - b;
    return d[7];
  endfunction

  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      logic found, hfound;
      logic [QI_W-1:0] bi, hi;
      found = 1'b0; hfound = 1'b0; bi = '0; hi = '0;
      for (int i = 0; i < QDEPTH; i++) begin
        if (q_v[b][i]) begin
          if (!found || older(q_seq[b][i], q_seq[b][bi])) begin
            found = 1'b1; bi = QI_W'(i);
          end
          if (open_q[b] && la_row(q_r[b][i].laddr) == row_q[b] &&
              (!hfound || older(q_seq[b][i], q_seq[b][hi]))) begin
            hfound = 1'b1; hi = QI_W'(i);
          end
        end
      end
      bc_idx[b] = hfound ? hi : bi;
      bc_seq[b] = q_seq[b][hfound ? hi : bi];
      bc[b]     = BC_NONE;
      bc_rdy[b] = 1'b0;
      if (hfound) begin
        bc[b] = BC_COL;
        if (q_r[b][hi].op == OP_RD)
          bc_rdy[b] = (t_col[b] == '0) && (g_ccd == '0) && (g_rd == '0);
        else
          bc_rdy[b] = (t_col[b] == '0) && (g_ccd == '0) && (g_wr == '0);
      end else if (open_q[b] && (found || close_pol)) begin
        bc[b]     = BC_PRE;
        bc_rdy[b] = (t_pre[b] == '0);
      end else if (found) begin
        bc[b]     = BC_ACT;
        bc_rdy[b] = (t_act[b] == '0) && (g_rrd == '0);
      end
    end
  end

  // ---------------- level 2: channel scheduler (FR-FCFS) ----------------
  logic            pick_v;
  logic [BA_W-1:0] pick_b;
  always_comb begin
    logic pick_col, is_col;
    pick_v = 1'b0; pick_b = '0; pick_col = 1'b0; is_col = 1'b0;
    for (int b = 0; b < NBANKS; b++) begin
      is_col = (bc[b] == BC_COL);
      if (bc[b] != BC_NONE && bc_rdy[b]) begin
        if (!pick_v || (is_col && !pick_col) ||
            (is_col == pick_col && older(bc_seq[b], bc_seq[pick_b]))) begin
          pick_v = 1'b1; pick_b = BA_W'(b); pick_col = is_col;
        end
      end
    end
  end

  logic sched_en;
  assign sched_en = (grant_i || (own_i && any_q)) && (g_q == G_NONE);

  logic all_pre_ok;
  always_comb begin
    all_pre_ok = 1'b1;
    for (int b = 0; b < NBANKS; b++) if (open_q[b] && t_pre[b] != '0) all_pre_ok = 1'b0;
  end

  function automatic logic [T_W-1:0] dec(input logic [T_W-1:0] t);
    return (t == '0) ? t : t - 1'b1;
  endfunction
  function automatic logic [T_W-1:0] mx(input logic [T_W-1:0] a, input int unsigned b);
    return (a > T_W'(b)) ? a : T_W'(b);
  endfunction

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANKS; b++) begin
        for (int i = 0; i < QDEPTH; i++) begin
          q_v[b][i] <= 1'b0; q_r[b][i] <= '0; q_seq[b][i] <= '0;
        end
        open_q[b] <= 1'b0; row_q[b] <= '0;
        t_act[b] <= '0; t_col[b] <= '0; t_pre[b] <= '0;
      end
      g_ccd <= '0; g_rrd <= '0; g_rd <= '0; g_wr <= '0;
      seq_q <= '0;
      g_q <= G_NONE; gop_q <= GO_CLOSE; sp_q <= '0; g_cnt <= '0;
      idle_cnt <= '0; pol_q <= 4'd8;
      cmd_o <= cmd_nop(); die_mask_o <= '0; wdata_o <= '0;
      sp_done_o <= 1'b0; ref_ack_o <= 1'b0;
      hits_o <= '0; misses_o <= '0; prea_o <= '0;
      for (int k = 0; k < RD_LAT; k++) begin
        rl_v[k] <= 1'b0; rl_src[k] <= SRC_NONE; rl_a[k] <= '0;
      end
    end else begin
      // timers
      for (int b = 0; b < NBANKS; b++) begin
        t_act[b] <= dec(t_act[b]); t_col[b] <= dec(t_col[b]); t_pre[b] <= dec(t_pre[b]);
      end
      g_ccd <= dec(g_ccd); g_rrd <= dec(g_rrd); g_rd <= dec(g_rd); g_wr <= dec(g_wr);
      g_cnt <= dec(g_cnt);

      cmd_o       <= cmd_o.cke ? cmd_nop() : cmd_o;  // hold CKE low in power-down
      die_mask_o  <= {NUM_DIES{1'b1}};
      sp_done_o   <= 1'b0;
      ref_ack_o   <= 1'b0;

      // read tag line
      rl_v[0] <= 1'b0;
      for (int k = 1; k < RD_LAT; k++) begin
        rl_v[k] <= rl_v[k-1]; rl_src[k] <= rl_src[k-1]; rl_a[k] <= rl_a[k-1];
      end

      // crossbar write into a bank queue
      if (req_valid_i && req_ready_o) begin
        q_v[in_ba][in_slot]   <= 1'b1;
        q_r[in_ba][in_slot]   <= req_i;
        q_seq[in_ba][in_slot] <= seq_q;
        seq_q                 <= seq_q + 1'b1;
      end

      idle_cnt <= (any_q || req_valid_i) ? '0 : (idle_cnt == '1 ? idle_cnt : idle_cnt + 1'b1);

      case (g_q)
        G_NONE: begin
          if (long_ok_i && ref_req_i) begin
            gop_q <= GO_REF;
            g_q   <= any_open ? G_PREA : G_ISSUE;
          end else if (long_ok_i && sp_valid_i) begin
            gop_q <= GO_SP;
            sp_q  <= sp_i;
            g_q   <= (any_open || sp_i.op == SP_PREA) ? G_PREA : G_ISSUE;
          end else if (any_open && !any_q && (!grant_i || idle_cnt >= 8'(CLOSE_IDLE))) begin
            gop_q <= GO_CLOSE;
            g_q   <= G_PREA;
          end else if (pd_en_i && grant_i && !any_q && !any_open && !req_valid_i &&
                       idle_cnt >= 8'(PD_IDLE)) begin
            g_q   <= G_PD;
            cmd_o <= '{cke: 1'b0, cs_n: 1'b1, ras_n: 1'b1, cas_n: 1'b1, we_n: 1'b1,
                       ba: '0, addr: '0};
          end else if (sched_en && pick_v) begin
            int unsigned b;
            mreq_t r;
            b = int'(pick_b);
            r = q_r[b][bc_idx[b]];
            case (bc[b])
              BC_ACT: begin
                cmd_o     <= mk_cmd(RCW_ACT, BA_W'(b), la_row(r.laddr));
                open_q[b] <= 1'b1;
                row_q[b]  <= la_row(r.laddr);
                t_col[b]  <= T_W'(T_RCD);
                t_pre[b]  <= T_W'(T_RAS);
                t_act[b]  <= T_W'(T_RAS + T_RP);
                g_rrd     <= T_W'(T_RRD);
                misses_o  <= misses_o + 1'b1;
                if (pol_q != 4'd0) pol_q <= pol_q - 1'b1;
              end
              BC_PRE: begin
                cmd_o     <= mk_cmd(RCW_PRE, BA_W'(b), '0);
                open_q[b] <= 1'b0;
                t_act[b]  <= mx(t_act[b], T_RP);
              end
              default: begin  // column command
                q_v[b][bc_idx[b]] <= 1'b0;
                hits_o <= hits_o + 1'b1;
                if (pol_q != 4'hF) pol_q <= pol_q + 1'b1;
                g_ccd <= T_W'(T_CCD);
                if (r.op == OP_RD) begin
                  cmd_o     <= mk_cmd(RCW_RD, BA_W'(b), ADDR_W'(la_col(r.laddr)));
                  t_pre[b]  <= mx(t_pre[b], T_RTP);
                  g_wr      <= T_W'(T_RD2WR);
                  rl_v[0]   <= 1'b1;
                  rl_src[0] <= r.src;
                  rl_a[0]   <= r.laddr;
                end else begin
                  cmd_o    <= mk_cmd(RCW_WR, BA_W'(b), ADDR_W'(la_col(r.laddr)));
                  wdata_o  <= r.wdata;
                  t_pre[b] <= mx(t_pre[b], T_WR2PRE);
                  g_rd     <= T_W'(T_WR2RD);
                end
              end
            endcase
          end
        end
        G_PREA: begin
          if (all_pre_ok && g_rd == '0) begin
            cmd_o  <= mk_cmd(RCW_PRE, '0, ADDR_W'(1) << 10);  // A10 = all banks
            prea_o <= prea_o + 1'b1;
            for (int b = 0; b < NBANKS; b++) begin
              open_q[b] <= 1'b0;
              t_act[b]  <= mx(t_act[b], T_RP);
            end
            g_cnt <= T_W'(T_RP);
            g_q   <= G_TRP;
          end
        end
        G_TRP: if (g_cnt == '0) g_q <= (gop_q == GO_CLOSE) ? G_NONE : G_ISSUE;
        G_ISSUE: begin
          g_q <= G_WAIT;
          if (gop_q == GO_REF) begin
            cmd_o     <= mk_cmd(RCW_REF, '0, '0);
            g_cnt     <= T_W'(T_RFC);
            ref_ack_o <= 1'b1;
          end else begin
            die_mask_o <= sp_q.die_mask;
            case (sp_q.op)
              SP_MRS: begin
                cmd_o <= mk_cmd(RCW_MRS, sp_q.ba, sp_q.addr);
                g_cnt <= T_W'(T_MOD);
              end
              SP_ZQCL: begin
                cmd_o <= mk_cmd(RCW_ZQ, '0, ADDR_W'(1) << 10);  // A10 = long
                g_cnt <= T_W'(T_ZQINIT);
              end
              default: g_cnt <= '0;  // PREA already done
            endcase
          end
        end
        G_WAIT: begin
          if (g_cnt == '0) begin
            g_q <= G_NONE;
            if (gop_q == GO_SP) sp_done_o <= 1'b1;
          end
        end
        G_PD: begin
          if (req_valid_i || ref_req_i || sp_valid_i || !grant_i || !pd_en_i) begin
            cmd_o <= cmd_nop();   // CKE high again
            g_cnt <= T_W'(T_XP);
            g_q   <= G_XP;
          end
        end
        G_XP: if (g_cnt == '0) g_q <= G_NONE;
        default: g_q <= G_NONE;
      endcase
    end
  end

  assign sp_ready_o  = (g_q == G_NONE) && long_ok_i && !ref_req_i;
  assign rsp_valid_o = rl_v[RD_LAT-1];
  assign rsp_src_o   = rl_src[RD_LAT-1];
  assign rsp_laddr_o = rl_a[RD_LAT-1];
  assign pd_o        = (g_q == G_PD);
  assign close_mode_o = close_pol;

  always_comb begin
    busy_o = any_open || any_q || (g_q != G_NONE && g_q != G_PD);
    for (int k = 0; k < RD_LAT; k++) busy_o |= rl_v[k];
  end

  // A column command may only address an open bank.
  a_col_open: assert property (@(posedge clk) disable iff (!rst_n)
    (sched_en && pick_v && bc[pick_b] == BC_COL) |-> open_q[pick_b]);
endmodule
