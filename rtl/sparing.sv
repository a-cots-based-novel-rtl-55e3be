// sparing: cold-spare die substitution and data steering.
//
// A map register gives, for each of the 13 logical lanes (8 data, 5 ECC),
// the physical die that carries it; at reset lane l is on die l and die 13
// is the unused cold spare. A swap request naming a logical lane re-points
// that lane to the spare die (once; a second request while the spare is in
// use is refused and flagged). Write data and per-die chip selects are
// steered from logical lanes to physical dies, and read data back from
// physical dies to logical lanes, combinationally. After a swap the spare
// holds no valid data until the rebuild engine has reconstructed it; the
// SEC-DED code keeps reads correct in the meantime.
// The decision to swap on error reports and the steering of data to the
// spare follow the document; the single-spare map register and the refusal
// of a second swap are this design's choices.
module sparing
  import m3_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 swap_req_i,
  input  logic [DIE_IDX_W-1:0] swap_lane_i,   // logical lane to retire
  output logic                 swap_done_o,   // pulse: the map changed
  output logic                 swap_refused_o,
  output logic                 spare_used_o,
  output logic [DIE_IDX_W-1:0] map_o [ACT_DIES], // logical lane -> physical die
  // steering
  input  logic [DIE_W-1:0]     wlane_i [ACT_DIES],
  output logic [DIE_W-1:0]     wphys_o [NUM_DIES],
  output logic [NUM_DIES-1:0]  phys_active_o,  // dies that carry a lane
  input  logic [DIE_W-1:0]     rphys_i [NUM_DIES],
  output logic [DIE_W-1:0]     rlane_o [ACT_DIES]
);
  logic [DIE_IDX_W-1:0] map_q [ACT_DIES];
  logic                 used_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < ACT_DIES; l++) map_q[l] <= DIE_IDX_W'(l);
      used_q         <= 1'b0;
      swap_done_o    <= 1'b0;
      swap_refused_o <= 1'b0;
    end else begin
      swap_done_o    <= 1'b0;
      swap_refused_o <= 1'b0;
      if (swap_req_i) begin
        if (!used_q && swap_lane_i < DIE_IDX_W'(ACT_DIES)) begin
          map_q[swap_lane_i] <= DIE_IDX_W'(NUM_DIES - 1);
          used_q             <= 1'b1;
          swap_done_o        <= 1'b1;
        end else begin
          swap_refused_o <= 1'b1;
        end
      end
    end
  end

  assign map_o        = map_q;
  assign spare_used_o = used_q;

  always_comb begin
    for (int p = 0; p < NUM_DIES; p++) wphys_o[p] = '0;
    phys_active_o = '0;
    for (int l = 0; l < ACT_DIES; l++) begin
      wphys_o[map_q[l]]       = wlane_i[l];
      phys_active_o[map_q[l]] = 1'b1;
      rlane_o[l]              = rphys_i[map_q[l]];
    end
  end
endmodule
