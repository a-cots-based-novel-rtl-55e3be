// tb_word_mem: word-level stand-in for memory controller + stack + EDAC,
// used by the maintenance-engine testbenches.
// Accepts one request per cycle while ready (ready drops at random when
// RANDOM_READY is set) and answers each read LAT cycles later with the
// stored word and the EDAC flags. Per-word fault state, set by the
// testbench through the arrays below:
//   seu[a]    die mask of a soft error: read reports a corrected error on
//             those dies until the word is written
//   stuck[a]  die mask of a hard error: every read reports it, writes do
//             not clear it
//   bad[a]    the word is uncorrectable until written
// The returned data is always the stored (corrected) word, as after the
// EDAC; counters give reads and writes per source.
module tb_word_mem
  import m3_pkg::*;
#(
  parameter int unsigned LAT          = 10,
  parameter bit          RANDOM_READY = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_valid_i,
  input  mreq_t               req_i,
  output logic                req_ready_o,
  output logic                rsp_valid_o,
  output mrsp_t               rsp_o,
  output logic [ACT_DIES-1:0] rsp_die_err_o
);
  logic [WORD_W-1:0]   mem   [logic [LADDR_W-1:0]];
  logic [ACT_DIES-1:0] seu   [logic [LADDR_W-1:0]];
  logic [ACT_DIES-1:0] stuck [logic [LADDR_W-1:0]];
  bit                  bad   [logic [LADDR_W-1:0]];
  int unsigned n_rd [4], n_wr [4];

  mrsp_t               pipe   [LAT];
  logic                pipe_v [LAT];
  logic [ACT_DIES-1:0] pipe_e [LAT];

  initial begin
    for (int i = 0; i < 4; i++) begin n_rd[i] = 0; n_wr[i] = 0; end
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 1'b0; pipe[i] = '0; pipe_e[i] = '0; end
    req_ready_o = 1'b1;
  end

  always @(posedge clk) begin
    rsp_valid_o   <= pipe_v[LAT-1];
    rsp_o         <= pipe[LAT-1];
    rsp_die_err_o <= pipe_e[LAT-1];
    for (int i = LAT-1; i > 0; i--) begin
      pipe_v[i] = pipe_v[i-1]; pipe[i] = pipe[i-1]; pipe_e[i] = pipe_e[i-1];
    end
    pipe_v[0] = 1'b0;
    if (rst_n && req_valid_i && req_ready_o) begin
      logic [LADDR_W-1:0] a;
      a = req_i.laddr;
      if (req_i.op == OP_WR) begin
        n_wr[req_i.src]++;
        mem[a] = req_i.wdata;
        if (seu.exists(a)) seu.delete(a);
        if (bad.exists(a)) bad.delete(a);
      end else begin
        logic [ACT_DIES-1:0] e;
        n_rd[req_i.src]++;
        e = (seu.exists(a) ? seu[a] : '0) | (stuck.exists(a) ? stuck[a] : '0);
        pipe_v[0]      = 1'b1;
        pipe[0].src    = req_i.src;
        pipe[0].laddr  = a;
        pipe[0].rdata  = mem.exists(a) ? mem[a] : '0;
        pipe[0].ue     = bad.exists(a);
        pipe[0].ce     = !bad.exists(a) && e != '0;
        pipe_e[0]      = e;
      end
    end
    req_ready_o <= RANDOM_READY ? ($urandom_range(0, 3) != 0) : 1'b1;
  end
endmodule
