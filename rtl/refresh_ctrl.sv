// refresh_ctrl: variable-rate refresh timer.
//
// A down-counter is reloaded with the programmed refresh interval (in clock
// cycles) every time a refresh happens, whether the host issued it or the
// controller did. While the controller owns the stack (maintenance mode) an
// expiry raises ref_req_o until the memory controller acknowledges it. When
// the die temperature reading reaches the programmed hot threshold the
// interval is halved (DDR3 doubles the refresh rate above 85 C). Every
// refresh produces a ref_tick_o pulse that paces background scrubbing.
// A zero interval register selects the parameter default. The programmable
// rate, its temperature dependence and scrubbing after each refresh follow
// the document; the halving rule and the 7.8 us / 300 MHz default
// (REFI_DEFAULT = 2340 cycles) are this design's choices.
module refresh_ctrl #(
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned REFI_DEFAULT = 2340,
  parameter int unsigned TEMP_W       = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CNT_W-1:0]  interval_i,
  input  logic [TEMP_W-1:0] temp_i,
  input  logic [TEMP_W-1:0] temp_hot_i,
  input  logic              maint_mode_i,
  input  logic              host_ref_i,   // host issued REF (pass-through)
  input  logic              ref_ack_i,    // controller issued REF
  output logic              ref_req_o,
  output logic              ref_tick_o
);
  logic [CNT_W-1:0] cnt_q, reload;
  logic             due_q;

  always_comb begin
    reload = (interval_i == '0) ? CNT_W'(REFI_DEFAULT) : interval_i;
    if (temp_i >= temp_hot_i) reload = reload >> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= CNT_W'(REFI_DEFAULT);
      due_q      <= 1'b0;
      ref_tick_o <= 1'b0;
    end else begin
      ref_tick_o <= host_ref_i | ref_ack_i;
      if (host_ref_i || ref_ack_i) begin
        cnt_q <= reload;
        due_q <= 1'b0;
      end else if (cnt_q == '0) begin
        due_q <= 1'b1;
        cnt_q <= reload;
      end else begin
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

  assign ref_req_o = due_q & maint_mode_i;
endmodule
