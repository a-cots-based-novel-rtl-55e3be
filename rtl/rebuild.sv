// rebuild: device data rebuild state machine.
//
// Follows the rebuild flow: identify the failed device (start_i with its
// logical lane), reset it (reset_req_o until reset_done_i), attach it to
// the rebuild controller (attached_o, lane_o), then, for every word of the
// range [0, last_i]: wait until the maintenance window is open (grant_i, idle
// time) or the rebuild pacing timer has expired, access the word and
// reconstruct it (read; the SEC-DED code corrects the one bit per code word
// that the failed die contributes; write the corrected word back, which
// rewrites the die with good data and check bits), increment the address
// and test for completion. At the end the device is removed from the
// rebuild controller and done_o pulses. interval_i = 0 paces at maximum
// priority (no wait). If the host wrote to the stack between the read and
// the write-back, the write-back is dropped and the word read again. An
// uncorrectable word is counted and left as it is (re-encoding it would hide
// the error). Debug counters give the words rebuilt and the uncorrectable
// words met.
// The flow follows the document's rebuild flow diagram; the pacing timer
// semantics and counters are this design's choices.
module rebuild
  import m3_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  logic [DIE_IDX_W-1:0] lane_i,
  input  logic [LADDR_W-1:0]   last_i,
  input  logic [15:0]          interval_i,
  input  logic                 grant_i,
  input  logic                 host_wr_i,   // the host wrote to the stack
  output logic                 reset_req_o,
  input  logic                 reset_done_i,
  output logic                 attached_o,
  output logic [DIE_IDX_W-1:0] lane_o,
  output logic                 busy_o,
  output logic                 done_o,
  output logic [31:0]          words_o,
  output logic [15:0]          ue_cnt_o,
  // memory controller port
  output logic                 req_valid_o,
  output mreq_t                req_o,
  input  logic                 req_ready_i,
  input  logic                 rsp_valid_i,
  input  mrsp_t                rsp_i
);
  typedef enum logic [3:0] {
    S_IDLE, S_IDENT, S_RESET, S_ATTACH, S_WAIT, S_RD, S_RWAIT, S_WR, S_INCR, S_REMOVE
  } st_e;
  st_e                st_q;
  logic [LADDR_W-1:0] a_q;
  logic [WORD_W-1:0]  d_q;
  logic [15:0]        tmr_q;
  logic               stale_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; a_q <= '0; d_q <= '0; tmr_q <= '0; stale_q <= 1'b0;
      lane_o <= '0; done_o <= 1'b0; words_o <= '0; ue_cnt_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (tmr_q != '0) tmr_q <= tmr_q - 1'b1;
      if (host_wr_i) stale_q <= 1'b1;
      case (st_q)
        S_IDLE:   if (start_i) begin lane_o <= lane_i; st_q <= S_IDENT; end
        S_IDENT:  begin words_o <= '0; ue_cnt_o <= '0; st_q <= S_RESET; end
        S_RESET:  if (reset_done_i) st_q <= S_ATTACH;
        S_ATTACH: begin a_q <= '0; tmr_q <= interval_i; st_q <= S_WAIT; end
        S_WAIT:   if (grant_i || tmr_q == '0) st_q <= S_RD;
        S_RD:     if (req_ready_i) begin st_q <= S_RWAIT; stale_q <= 1'b0; end
        S_RWAIT:  if (rsp_valid_i && rsp_i.src == SRC_REBUILD) begin
          d_q <= rsp_i.rdata;
          if (rsp_i.ue) begin
            // not reconstructible: leave it detectable rather than re-encode it
            ue_cnt_o <= ue_cnt_o + 1'b1;
            st_q     <= S_INCR;
          end else st_q <= S_WR;
        end
        S_WR:     if (stale_q || host_wr_i) st_q <= S_RD;
                  else if (req_ready_i) begin words_o <= words_o + 1'b1; st_q <= S_INCR; end
        S_INCR: begin
          tmr_q <= interval_i;
          if (a_q >= last_i) st_q <= S_REMOVE;
          else begin a_q <= a_q + 1'b1; st_q <= S_WAIT; end
        end
        S_REMOVE: begin done_o <= 1'b1; st_q <= S_IDLE; end
        default:  st_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    reset_req_o = (st_q == S_RESET);
    attached_o  = (st_q >= S_ATTACH) && (st_q <= S_INCR);
    busy_o      = (st_q != S_IDLE);
    req_valid_o = (st_q == S_RD) || (st_q == S_WR && !stale_q && !host_wr_i);
    req_o.op    = (st_q == S_WR) ? OP_WR : OP_RD;
    req_o.src   = SRC_REBUILD;
    req_o.laddr = a_q;
    req_o.wdata = d_q;
  end
endmodule
