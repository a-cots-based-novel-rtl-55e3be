// idle_detector: decides when the controller may take the stack from the host.
//
// In normal mode the stack follows the host in a pass-through fashion. The
// host makes room for maintenance by lengthening some of its operations:
// after a host REF (or ZQ calibration) the detector waits the time the stack
// really needs (t_busy) and then hands the stack to the controller for the
// extra time the host allotted (t_extra). grant_o, which allows new
// controller commands, drops guard_i cycles before the window closes so that
// open rows can be closed and reads can drain; sel_maint_o (the MUX select)
// returns to the host exactly at the end of the window. The Idle pin, the
// SPI idle request and the power-up sequence open an unbounded window
// instead; after it is released the detector waits until the controller is
// quiet (maint_busy_i low) before returning the stack, and host_ready_o tells
// the host when it may use the bus again.
// The use of the Idle pin, SPI, REF/ZQ windows and the MUX control follows the
// document; the window/guard timing scheme is this design's reading of it.
// Lint note: rst_n is used both as the asynchronous flop reset and in the
// `disable iff` of the simulation assertions below; a tool that reports the
// reset as a net used both ways is describing that, the logic itself only
// uses rst_n as an asynchronous reset.
module idle_detector
  import m3_pkg::*;
#(
  parameter int unsigned T_W = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dcmd_e          host_cmd_i,
  input  logic           idle_pin_i,
  input  logic           idle_sw_i,
  input  logic           boot_i,       // power-up init / zeroization in progress
  input  logic           maint_busy_i,
  input  logic [T_W-1:0] ref_busy_i,   // tRFC the dies need
  input  logic [T_W-1:0] ref_extra_i,  // extra refresh time allotted by the host
  input  logic [T_W-1:0] zq_busy_i,
  input  logic [T_W-1:0] zq_extra_i,
  input  logic [T_W-1:0] guard_i,
  output logic           sel_maint_o,
  output logic           grant_o,
  output logic           host_ready_o,
  output logic           long_o,       // unbounded window (Idle pin, SPI, power-up)
  output logic           win_open_o    // pulse: a timed window opened
);
  typedef enum logic [2:0] { S_HOST, S_BUSY, S_WIN, S_IDLE, S_DRAIN } st_e;
  st_e            st_q;
  logic [T_W-1:0] cnt_q, extra_q;
  logic           idle_req;

  assign idle_req = idle_pin_i | idle_sw_i | boot_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;   // the controller owns the stack at power-up
      cnt_q      <= '0;
      extra_q    <= '0;
      win_open_o <= 1'b0;
    end else begin
      win_open_o <= 1'b0;
      case (st_q)
        S_HOST: begin
          if (idle_req) st_q <= S_IDLE;
          else if (host_cmd_i == DC_REF && ref_extra_i > guard_i) begin
            st_q <= S_BUSY; cnt_q <= ref_busy_i; extra_q <= ref_extra_i;
          end else if (host_cmd_i == DC_ZQ && zq_extra_i > guard_i) begin
            st_q <= S_BUSY; cnt_q <= zq_busy_i; extra_q <= zq_extra_i;
          end
        end
        S_BUSY: begin
          if (cnt_q <= T_W'(1)) begin
            st_q <= S_WIN; cnt_q <= extra_q; win_open_o <= 1'b1;
          end else cnt_q <= cnt_q - 1'b1;
        end
        S_WIN: begin
          if (cnt_q <= T_W'(1)) st_q <= S_HOST;
          else cnt_q <= cnt_q - 1'b1;
        end
        S_IDLE:  if (!idle_req) st_q <= S_DRAIN;
        S_DRAIN: begin
          if (idle_req) st_q <= S_IDLE;
          else if (!maint_busy_i) st_q <= S_HOST;
        end
        default: st_q <= S_HOST;
      endcase
    end
  end

  always_comb begin
    sel_maint_o  = (st_q == S_WIN) || (st_q == S_IDLE) || (st_q == S_DRAIN);
    grant_o      = (st_q == S_IDLE) || (st_q == S_WIN && cnt_q > guard_i);
    host_ready_o = (st_q == S_HOST) || (st_q == S_BUSY);
    long_o       = (st_q == S_IDLE);
  end

  // The controller must be quiet when a timed window closes.
  a_quiet_at_close: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == S_WIN && cnt_q <= T_W'(1)) |-> !maint_busy_i);
endmodule
