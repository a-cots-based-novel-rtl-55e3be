// scrubber: background scrubbing with write-back validation.
//
// Each step reads one word of the range [0, last_i] and then moves on to
// the next address, wrapping at the end (a pass counter counts full
// sweeps). A step starts on step_i (the refresh tick, for low-rate
// background scrubbing) or continuously when cont_i is set. If the read
// shows a correctable error, the error is reported to the log (err_valid_o
// with the address and the failing dies), the corrected word is written
// back and the word is read again. While the re-read still shows an error
// the write-back / re-read cycle repeats, up to max_rep_i times; a word that
// is still in error after that counts as a stuck bit. When the stuck-bit
// count reaches stuck_thr_i, rebuild_o pulses with the die of the last
// stuck bit. Uncorrectable reads are counted and reported but not written.
// If the host wrote to the stack between the read and the write-back, the
// corrected copy may be stale: the write-back is dropped and the word is
// read again.
// Scrubbing after refresh, the write-back / re-read loop with a maximum
// repeat count and the rebuild trigger on excessive stuck bits follow the
// document; counter widths and the one-word step are this design's choices.
module scrubber
  import m3_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_i,
  input  logic                 step_i,
  input  logic                 cont_i,
  input  logic                 host_wr_i,   // the host wrote to the stack
  input  logic [LADDR_W-1:0]   last_i,
  input  logic [3:0]           max_rep_i,
  input  logic [7:0]           stuck_thr_i,
  output logic                 busy_o,
  // memory controller port
  output logic                 req_valid_o,
  output mreq_t                req_o,
  input  logic                 req_ready_i,
  input  logic                 rsp_valid_i,
  input  mrsp_t                rsp_i,
  input  logic [ACT_DIES-1:0]  rsp_die_err_i,
  // reports
  output logic                 err_valid_o,
  output logic [LADDR_W-1:0]   err_addr_o,
  output logic [ACT_DIES-1:0]  err_dies_o,
  output logic [15:0]          ce_cnt_o,
  output logic [15:0]          ue_cnt_o,
  output logic [15:0]          fix_cnt_o,
  output logic [7:0]           stuck_cnt_o,
  output logic [15:0]          pass_cnt_o,
  output logic                 rebuild_o,
  output logic [DIE_IDX_W-1:0] rebuild_die_o
);
  typedef enum logic [2:0] { S_IDLE, S_RD, S_RWAIT, S_WB, S_NEXT } st_e;
  st_e                 st_q;
  logic [LADDR_W-1:0]  a_q;
  logic [WORD_W-1:0]   fix_q;
  logic [3:0]          rep_q;
  logic                pend_q;   // a step trigger arrived while busy
  logic [ACT_DIES-1:0] dies_q;
  logic                stale_q;  // host wrote since the read: write-back not safe

  function automatic logic [DIE_IDX_W-1:0] first_die(input logic [ACT_DIES-1:0] m);
    for (int d = 0; d < ACT_DIES; d++) if (m[d]) return DIE_IDX_W'(d);
    return '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; a_q <= '0; fix_q <= '0; rep_q <= '0; pend_q <= 1'b0; dies_q <= '0; stale_q <= 1'b0;
      err_valid_o <= 1'b0; err_addr_o <= '0; err_dies_o <= '0;
      ce_cnt_o <= '0; ue_cnt_o <= '0; fix_cnt_o <= '0; stuck_cnt_o <= '0; pass_cnt_o <= '0;
      rebuild_o <= 1'b0; rebuild_die_o <= '0;
    end else begin
      err_valid_o <= 1'b0;
      rebuild_o   <= 1'b0;
      if (step_i && st_q != S_IDLE) pend_q <= 1'b1;
      if (host_wr_i) stale_q <= 1'b1;
      case (st_q)
        S_IDLE: if (en_i && (step_i || cont_i || pend_q)) begin
          pend_q <= 1'b0;
          rep_q  <= '0;
          st_q   <= S_RD;
        end
        S_RD: if (req_ready_i) begin st_q <= S_RWAIT; stale_q <= 1'b0; end
        S_RWAIT: if (rsp_valid_i && rsp_i.src == SRC_SCRUB) begin
          if (rsp_i.ue) begin
            ue_cnt_o    <= ue_cnt_o + 1'b1;
            err_valid_o <= 1'b1; err_addr_o <= a_q; err_dies_o <= '0;
            st_q        <= S_NEXT;
          end else if (rsp_i.ce) begin
            if (rep_q == '0) ce_cnt_o <= ce_cnt_o + 1'b1;
            err_valid_o <= 1'b1; err_addr_o <= a_q; err_dies_o <= rsp_die_err_i;
            dies_q      <= rsp_die_err_i;
            fix_q       <= rsp_i.rdata;
            if (rep_q >= max_rep_i) begin
              stuck_cnt_o <= stuck_cnt_o + 1'b1;
              if (stuck_cnt_o + 1'b1 >= stuck_thr_i) begin
                rebuild_o     <= 1'b1;
                rebuild_die_o <= first_die(rsp_die_err_i);
              end
              st_q <= S_NEXT;
            end else begin
              rep_q <= rep_q + 1'b1;
              st_q  <= S_WB;
            end
          end else begin
            if (rep_q != '0) fix_cnt_o <= fix_cnt_o + 1'b1;
            st_q <= S_NEXT;
          end
        end
        S_WB: if (stale_q || host_wr_i) st_q <= S_RD;
              else if (req_ready_i) st_q <= S_RD;
        S_NEXT: begin
          if (a_q >= last_i) begin
            a_q <= '0;
            pass_cnt_o <= pass_cnt_o + 1'b1;
          end else a_q <= a_q + 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    req_valid_o = (st_q == S_RD) || (st_q == S_WB && !stale_q && !host_wr_i);
    req_o.op    = (st_q == S_WB) ? OP_WR : OP_RD;
    req_o.src   = SRC_SCRUB;
    req_o.laddr = a_q;
    req_o.wdata = fix_q;
  end

  assign busy_o = (st_q != S_IDLE);
endmodule
