// bist: built-in self-test and zeroization engine.
//
// Runs a sequence of March elements over the address range [0, last_i]
// through the memory controller. Each element walks the range up or down
// and at every address optionally reads and compares, then optionally
// writes. Simple patterns (all 0, all 1, checkerboard, address) use two
// elements: write everything, then read and compare everything (the second
// is skipped when write_only_i is set, which is how power-up zeroization
// runs: all-0 data, with its check bits, written everywhere). March X uses
// four: down(w0); up(r0,w1); down(r1,w0); down(r0), i.e. 6n operations.
// Per-die offsets allow parallel testing: the 16 bits of data die d at word
// address a carry the pattern of address a + d*die_off_i. Reads are
// compared against the expected word after EDAC correction; mismatches are
// counted and the first failing address kept; corrected (CE) reads are
// counted separately. Writes issue back to back; a read waits for its
// response before the engine moves on.
// The patterns, March X sequence, per-die offsets, zeroization with check
// bits and full-array scan follow the document; the two-element form of the
// simple patterns and the status counters are this design's choices.
module bist
  import m3_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  bist_pat_e          pat_i,
  input  logic               write_only_i,
  input  logic [LADDR_W-1:0] last_i,
  input  logic [15:0]        die_off_i,
  output logic               busy_o,
  output logic               done_o,     // pulse at the end of a run
  output logic               pass_o,     // last run found no mismatch
  output logic [15:0]        fail_cnt_o,
  output logic [15:0]        ce_cnt_o,
  output logic [LADDR_W-1:0] first_fail_o,
  output logic [31:0]        ops_o,      // reads + writes of the last run
  // memory controller port
  output logic               req_valid_o,
  output mreq_t              req_o,
  input  logic               req_ready_i,
  input  logic               rsp_valid_i,
  input  mrsp_t              rsp_i
);
  typedef enum logic [2:0] { S_IDLE, S_ELEM, S_RD, S_RWAIT, S_WR, S_NEXT } st_e;
  st_e                st_q;
  logic [1:0]         el_q;
  logic [LADDR_W-1:0] a_q;
  bist_pat_e          pat_q;
  logic               wo_q;

  // element description
  logic el_down, el_rd, el_wr, el_rv, el_wv, el_last;
  always_comb begin
    el_down = 1'b0; el_rd = 1'b0; el_wr = 1'b0; el_rv = 1'b0; el_wv = 1'b0; el_last = 1'b0;
    if (pat_q == PAT_MARCHX) begin
      case (el_q)
        2'd0: begin el_down = 1'b1; el_wr = 1'b1; el_wv = 1'b0; end
        2'd1: begin el_rd = 1'b1; el_rv = 1'b0; el_wr = 1'b1; el_wv = 1'b1; end
        2'd2: begin el_down = 1'b1; el_rd = 1'b1; el_rv = 1'b1; el_wr = 1'b1; el_wv = 1'b0; end
        default: begin el_down = 1'b1; el_rd = 1'b1; el_rv = 1'b0; el_last = 1'b1; end
      endcase
    end else begin
      if (el_q == 2'd0) begin el_wr = 1'b1; el_last = wo_q; end
      else begin el_rd = 1'b1; el_last = 1'b1; end
    end
  end

  // pattern word for an address; march values 0/1 are all-0/all-1 words
  function automatic logic [WORD_W-1:0] pat_word(input bist_pat_e p, input logic mv,
                                                 input logic [LADDR_W-1:0] a,
                                                 input logic [15:0] off);
    logic [WORD_W-1:0] w;
    for (int d = 0; d < DATA_DIES; d++) begin
      logic [LADDR_W-1:0] ad;
      ad = a + LADDR_W'(off) * LADDR_W'(d);
      case (p)
        PAT_ONES:    w[d*DIE_W +: DIE_W] = '1;
        PAT_CHECKER: w[d*DIE_W +: DIE_W] = ad[0] ? 16'hAAAA : 16'h5555;
        PAT_ADDR:    w[d*DIE_W +: DIE_W] = ad[15:0];
        PAT_MARCHX:  w[d*DIE_W +: DIE_W] = {DIE_W{mv}};
        default:     w[d*DIE_W +: DIE_W] = '0;
      endcase
    end
    return w;
  endfunction


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; el_q <= '0; a_q <= '0; pat_q <= PAT_ZERO; wo_q <= 1'b0;
      done_o <= 1'b0; pass_o <= 1'b0; fail_cnt_o <= '0; ce_cnt_o <= '0;
      first_fail_o <= '0; ops_o <= '0;
    end else begin
      done_o <= 1'b0;
      case (st_q)
        S_IDLE: if (start_i) begin
          pat_q <= pat_i; wo_q <= write_only_i; el_q <= '0;
          fail_cnt_o <= '0; ce_cnt_o <= '0; ops_o <= '0;
          st_q <= S_ELEM;
        end
        S_ELEM: begin
          a_q  <= el_down ? last_i : '0;
          st_q <= el_rd ? S_RD : S_WR;
        end
        S_RD: if (req_ready_i) begin
          st_q  <= S_RWAIT;
          ops_o <= ops_o + 1'b1;
        end
        S_RWAIT: if (rsp_valid_i && rsp_i.src == SRC_BIST) begin
          if (rsp_i.ce) ce_cnt_o <= ce_cnt_o + 1'b1;
          if (rsp_i.rdata != pat_word(pat_q, el_rv, a_q, die_off_i)) begin
            if (fail_cnt_o == '0) first_fail_o <= a_q;
            if (fail_cnt_o != '1) fail_cnt_o <= fail_cnt_o + 1'b1;
          end
          st_q <= el_wr ? S_WR : S_NEXT;
        end
        S_WR: if (req_ready_i) begin
          st_q  <= S_NEXT;
          ops_o <= ops_o + 1'b1;
        end
        S_NEXT: begin
          if ((el_down && a_q == '0) || (!el_down && a_q == last_i)) begin
            if (el_last) begin
              st_q   <= S_IDLE;
              done_o <= 1'b1;
              pass_o <= (fail_cnt_o == '0);
            end else begin
              el_q <= el_q + 1'b1;
              st_q <= S_ELEM;
            end
          end else begin
            a_q  <= el_down ? a_q - 1'b1 : a_q + 1'b1;
            st_q <= el_rd ? S_RD : S_WR;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    req_valid_o = (st_q == S_RD) || (st_q == S_WR);
    req_o.op    = (st_q == S_WR) ? OP_WR : OP_RD;
    req_o.src   = SRC_BIST;
    req_o.laddr = a_q;
    req_o.wdata = pat_word(pat_q, el_wv, a_q, die_off_i);
  end

  assign busy_o = (st_q != S_IDLE);
endmodule
