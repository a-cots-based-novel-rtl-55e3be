// maint_ctrl: maintenance control: power-up, conditioning and arbitration.
//
// Power-up: wait PWRUP_CYC cycles (DDR3 reset and CKE timing), initialise
// all dies (mode registers MR2, MR3, MR1, MR0 with DLL reset, then ZQ
// calibration long), then zeroize the array with the BIST (all-0 data and
// matching check bits, write only, over [0, zero_last_i]) so that scrubbing
// never meets uninitialised words. Then the controller is in normal mode.
// Conditioning: the same command sequence (rewrite the mode registers,
// reset the DLL, redo ZQ calibration) can be applied to any subset of dies,
// on request from SPI (cond_req_i), periodically (cond_period_i, in units
// of 1024 cycles, 0 = off) or to re-initialise a power-cycled die
// (init_req_i, acknowledged with init_done_o).
// The three request engines (rebuild, scrub, BIST) share the memory
// controller through a fixed-priority arbiter, rebuild first. mode_o
// reports the current activity. MR values are parameters (defaults: BL8,
// CL 7, CWL 6, DLL on, ODT off).
// The initialisation, BIST zeroization at power-up, the conditioning steps
// and their per-die application follow the document; the sequencing
// details, priorities and MR defaults are this design's choices.
module maint_ctrl
  import m3_pkg::*;
#(
  parameter int unsigned PWRUP_CYC = 1024,
  parameter logic [ADDR_W-1:0] MR0 = 16'h0230,
  parameter logic [ADDR_W-1:0] MR1 = 16'h0002,
  parameter logic [ADDR_W-1:0] MR2 = 16'h0008,
  parameter logic [ADDR_W-1:0] MR3 = 16'h0000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [LADDR_W-1:0]  zero_last_i,
  input  logic                cond_req_i,
  input  logic [NUM_DIES-1:0] cond_mask_i,
  input  logic [15:0]         cond_period_i,
  input  logic                init_req_i,
  input  logic [NUM_DIES-1:0] init_mask_i,
  output logic                init_done_o,
  output mode_e               mode_o,
  output logic                boot_o,
  output logic                phy_init_done_o,
  output logic [15:0]         cond_cnt_o,
  // special commands to the memory controller
  output logic                sp_valid_o,
  output spreq_t              sp_o,
  input  logic                sp_ready_i,
  input  logic                sp_done_i,
  // BIST control (boot zeroization or SPI request)
  input  logic                spi_bist_start_i,
  input  bist_pat_e           spi_bist_pat_i,
  input  logic                bist_busy_i,
  input  logic                bist_done_i,
  output logic                bist_start_o,
  output bist_pat_e           bist_pat_o,
  output logic                bist_wo_o,
  output logic                bist_boot_o,
  // engine arbitration
  input  logic                scrub_busy_i,
  input  logic                rebuild_busy_i,
  input  logic                rb_valid_i,
  input  mreq_t               rb_req_i,
  output logic                rb_ready_o,
  input  logic                sc_valid_i,
  input  mreq_t               sc_req_i,
  output logic                sc_ready_o,
  input  logic                bi_valid_i,
  input  mreq_t               bi_req_i,
  output logic                bi_ready_o,
  output logic                req_valid_o,
  output mreq_t               req_o,
  input  logic                req_ready_i
);
  typedef enum logic [2:0] { B_PWR, B_INIT, B_ZERO, B_ZWAIT, B_RUN } b_e;
  b_e                  b_q;
  logic [31:0]         cnt_q;
  // conditioning sequencer
  logic                seq_act, seq_wait;
  logic [2:0]          step_q;
  logic [NUM_DIES-1:0] smask_q;
  logic                from_init_q;
  logic                per_req;
  logic [25:0]         per_q;

  always_comb begin
    sp_o.die_mask = smask_q;
    sp_o.ba       = '0;
    sp_o.addr     = '0;
    sp_o.op       = SP_MRS;
    case (step_q)
      3'd0: begin sp_o.ba = 3'd2; sp_o.addr = MR2; end
      3'd1: begin sp_o.ba = 3'd3; sp_o.addr = MR3; end
      3'd2: begin sp_o.ba = 3'd1; sp_o.addr = MR1; end
      3'd3: begin sp_o.ba = 3'd0; sp_o.addr = MR0 | (ADDR_W'(1) << 8); end  // DLL reset
      default: sp_o.op = SP_ZQCL;
    endcase
  end
  assign sp_valid_o = seq_act && !seq_wait;

  assign per_req = (cond_period_i != '0) && (per_q >= {cond_period_i, 10'd0});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q <= B_PWR; cnt_q <= '0;
      seq_act <= 1'b0; seq_wait <= 1'b0; step_q <= '0; smask_q <= '0; from_init_q <= 1'b0;
      init_done_o <= 1'b0; bist_start_o <= 1'b0; per_q <= '0; cond_cnt_o <= '0;
    end else begin
      init_done_o  <= 1'b0;
      bist_start_o <= 1'b0;
      per_q <= per_req ? '0 : per_q + 1'b1;
      // sequencer
      if (seq_act) begin
        if (!seq_wait && sp_ready_i) seq_wait <= 1'b1;
        if (seq_wait && sp_done_i) begin
          seq_wait <= 1'b0;
          if (step_q == 3'd4) begin
            seq_act <= 1'b0;
            if (from_init_q) init_done_o <= 1'b1;
          end else step_q <= step_q + 1'b1;
        end
      end
      case (b_q)
        B_PWR: if (cnt_q >= 32'(PWRUP_CYC)) begin
          b_q <= B_INIT;
          seq_act <= 1'b1; step_q <= '0; smask_q <= '1; from_init_q <= 1'b0;
        end else cnt_q <= cnt_q + 1'b1;
        B_INIT: if (!seq_act) b_q <= B_ZERO;
        B_ZERO: begin bist_start_o <= 1'b1; b_q <= B_ZWAIT; end
        B_ZWAIT: if (bist_done_i) b_q <= B_RUN;
        B_RUN: begin
          if (!seq_act) begin
            if (init_req_i && !init_done_o) begin
              seq_act <= 1'b1; step_q <= '0; smask_q <= init_mask_i; from_init_q <= 1'b1;
            end else if (cond_req_i || per_req) begin
              seq_act <= 1'b1; step_q <= '0; from_init_q <= 1'b0;
              smask_q <= cond_req_i ? cond_mask_i : '1;
              cond_cnt_o <= cond_cnt_o + 1'b1;
            end
          end
          if (spi_bist_start_i && !bist_busy_i) bist_start_o <= 1'b1;
        end
        default: b_q <= B_RUN;
      endcase
    end
  end

  assign bist_boot_o     = (b_q != B_RUN);
  assign bist_pat_o      = bist_boot_o ? PAT_ZERO : spi_bist_pat_i;
  assign bist_wo_o       = bist_boot_o;
  assign boot_o          = (b_q != B_RUN);
  assign phy_init_done_o = (b_q == B_ZERO) || (b_q == B_ZWAIT) || (b_q == B_RUN);

  always_comb begin
    if (b_q == B_PWR)                      mode_o = MD_POWERUP;
    else if (b_q == B_INIT)                mode_o = MD_INIT;
    else if (b_q != B_RUN || bist_busy_i)  mode_o = MD_BIST;
    else if (seq_act)                      mode_o = MD_COND;
    else if (rebuild_busy_i)               mode_o = MD_REBUILD;
    else if (scrub_busy_i)                 mode_o = MD_SCRUB;
    else                                   mode_o = MD_NORMAL;
  end

  // fixed-priority arbiter: rebuild > scrub > BIST
  always_comb begin
    rb_ready_o = 1'b0; sc_ready_o = 1'b0; bi_ready_o = 1'b0;
    req_valid_o = 1'b1;
    if (rb_valid_i)      begin req_o = rb_req_i; rb_ready_o = req_ready_i; end
    else if (sc_valid_i) begin req_o = sc_req_i; sc_ready_o = req_ready_i; end
    else if (bi_valid_i) begin req_o = bi_req_i; bi_ready_o = req_ready_i; end
    else begin req_o = bi_req_i; req_valid_o = 1'b0; end
  end
endmodule
