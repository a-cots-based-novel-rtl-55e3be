// ddr3_die_model: behavioural model of one DDR3 x16 die for the testbenches.
//
// Samples the command pins on every rising clock edge and keeps a sparse
// array of 16-bit words indexed by {bank, row, column}, with one open row per
// bank. A read sampled at edge e drives its word on dq_o from edge e+CL-1 for
// one cycle (the PHY captures it at edge e+CL); a write is captured from DQ
// CWL edges after the command was sampled, when DQ output-enable is high.
// Burst transfers and DDR timing checks beyond the row state are not
// modelled: one beat per column command, as in the controller's data path.
// Protocol errors (column access to a closed bank, ACT to an open bank,
// write beat missing) are counted in proto_err. Command counters let a
// testbench see refreshes, mode-register writes, ZQ calibrations, DLL
// resets and power-down entries.
// Fault injection (testbench writes the variables directly):
//   stuck_mask/stuck_val  bits forced on every read (a stuck cell column)
//   dead                  the die answers with garbage (a SEFI); cleared when
//                         reset_n is low, as is the whole array (a power cycle
//                         loses the contents)
//   flip(ba,row,col,m)    flips stored bits once (a single-event upset)
module ddr3_die_model
  import m3_pkg::*;
#(
  parameter int unsigned CL  = 7,
  parameter int unsigned CWL = 6
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              cke,
  input  logic              cs_n,
  input  logic              ras_n,
  input  logic              cas_n,
  input  logic              we_n,
  input  logic [BA_W-1:0]   ba,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DIE_W-1:0]  dq_i,
  input  logic              dq_oe,
  output logic [DIE_W-1:0]  dq_o
);
  logic [DIE_W-1:0] mem [logic [LADDR_W-1:0]];
  logic             open_v [NBANKS];
  logic [ROW_W-1:0] open_row [NBANKS];

  logic [DIE_W-1:0] stuck_mask = '0;
  logic [DIE_W-1:0] stuck_val  = '0;
  logic             dead = 1'b0;

  int unsigned n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0, n_ref = 0, n_mrs = 0;
  int unsigned n_zq = 0, n_dll = 0, n_pd = 0, proto_err = 0, n_reset = 0;
  logic [BA_W-1:0] last_ba;
  logic            cke_q = 1'b0;

  // pending reads and writes, by edge count
  logic [DIE_W-1:0]   rd_pipe_d [CL];
  logic               rd_pipe_v [CL];
  logic [LADDR_W-1:0] wr_pipe_a [CWL+1];
  logic               wr_pipe_v [CWL+1];

  function automatic logic [LADDR_W-1:0] key(input logic [BA_W-1:0] b, input logic [ROW_W-1:0] r,
                                              input logic [COL_W-1:0] c);
    return {r, b, c};
  endfunction

  function automatic logic [DIE_W-1:0] peek(input logic [BA_W-1:0] b, input logic [ROW_W-1:0] r,
                                             input logic [COL_W-1:0] c);
    logic [LADDR_W-1:0] k;
    k = key(b, r, c);
    return mem.exists(k) ? mem[k] : '0;
  endfunction

  task automatic flip(input logic [BA_W-1:0] b, input logic [ROW_W-1:0] r,
                      input logic [COL_W-1:0] c, input logic [DIE_W-1:0] m);
    logic [LADDR_W-1:0] k;
    k = key(b, r, c);
    mem[k] = (mem.exists(k) ? mem[k] : '0) ^ m;
  endtask

  initial begin
    for (int i = 0; i < CL; i++) begin rd_pipe_v[i] = 1'b0; rd_pipe_d[i] = '0; end
    for (int i = 0; i <= CWL; i++) begin wr_pipe_v[i] = 1'b0; wr_pipe_a[i] = '0; end
    for (int b = 0; b < NBANKS; b++) begin open_v[b] = 1'b0; open_row[b] = '0; end
    dq_o = '0;
  end

  always @(posedge clk) begin
    logic [DIE_W-1:0] rd_word;
    logic             is_rd, is_wr;
    is_rd = 1'b0; is_wr = 1'b0;
    rd_word = '0;
    if (!reset_n) begin
      if (dead || mem.num() != 0) n_reset++;
      mem.delete();
      dead = 1'b0;
      for (int b = 0; b < NBANKS; b++) open_v[b] = 1'b0;
      for (int i = 0; i < CL; i++) rd_pipe_v[i] = 1'b0;
      for (int i = 0; i <= CWL; i++) wr_pipe_v[i] = 1'b0;
    end else begin
      if (cke_q && !cke) n_pd++;
      cke_q = cke;
      if (cke && !cs_n) begin
        last_ba = ba;
        case ({ras_n, cas_n, we_n})
          RCW_ACT: begin
            n_act++;
            if (open_v[ba]) proto_err++;
            open_v[ba] = 1'b1; open_row[ba] = addr;
          end
          RCW_RD: begin
            n_rd++;
            if (!open_v[ba]) proto_err++;
            is_rd = 1'b1;
            rd_word = peek(ba, open_row[ba], addr[COL_W-1:0]);
            rd_word = (rd_word & ~stuck_mask) | (stuck_val & stuck_mask);
            if (dead) rd_word = 16'(($urandom & 16'hFFFF) | 16'h0101);
          end
          RCW_WR: begin
            n_wr++;
            if (!open_v[ba]) proto_err++;
            is_wr = 1'b1;
          end
          RCW_PRE: begin
            n_pre++;
            if (addr[10]) for (int b = 0; b < NBANKS; b++) open_v[b] = 1'b0;
            else open_v[ba] = 1'b0;
          end
          RCW_REF: begin
            n_ref++;
            for (int b = 0; b < NBANKS; b++) if (open_v[b]) proto_err++;
          end
          RCW_MRS: begin
            n_mrs++;
            if (ba == 3'd0 && addr[8]) n_dll++;
          end
          RCW_ZQ: n_zq++;
          default: ;
        endcase
      end
      // write beat capture
      if (wr_pipe_v[CWL-1]) begin
        if (!dq_oe) proto_err++;
        mem[wr_pipe_a[CWL-1]] = dq_i;
      end
      for (int i = CWL-1; i > 0; i--) begin
        wr_pipe_v[i] = wr_pipe_v[i-1]; wr_pipe_a[i] = wr_pipe_a[i-1];
      end
      wr_pipe_v[0] = is_wr;
      wr_pipe_a[0] = key(ba, open_row[ba], addr[COL_W-1:0]);
      // read data: out at edge e + CL - 1
      dq_o <= rd_pipe_v[CL-2] ? rd_pipe_d[CL-2] : 16'h0;
      for (int i = CL-1; i > 0; i--) begin
        rd_pipe_v[i] = rd_pipe_v[i-1]; rd_pipe_d[i] = rd_pipe_d[i-1];
      end
      rd_pipe_v[0] = is_rd;
      rd_pipe_d[0] = rd_word;
    end
  end
endmodule
