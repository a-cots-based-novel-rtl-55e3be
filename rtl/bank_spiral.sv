// bank_spiral: per-die bank remapping ("spiral" addressing through the stack).
//
// A particle track through the stack would hit the same bank of every die.
// To spread one logical bank over different physical bank areas, physical
// die p uses bank (ba + p) mod 8. Row and column addresses are unchanged and
// every die keeps a one-to-one bank map, so data written and read through
// the same path land at the same place. The remap applies only to commands
// whose bank field is a bank address (ACT, RD, WR, single-bank PRE); MRS/EMRS
// use BA to select a mode register and pass unchanged. Combinational.
// The idea and the 8-bank map follow the document; the rotation by the
// physical die index is this design's reading of its spiral drawing.
module bank_spiral
  import m3_pkg::*;
(
  input  logic     enable_i,
  input  ddr_cmd_t cmd_i,
  output ddr_cmd_t cmd_o [NUM_DIES]
);
  always_comb begin
    dcmd_e dc;
    dc = decode_cmd(cmd_i);
    for (int p = 0; p < NUM_DIES; p++) begin
      cmd_o[p] = cmd_i;
      if (enable_i && (dc == DC_ACT || dc == DC_RD || dc == DC_WR || dc == DC_PRE))
        cmd_o[p].ba = cmd_i.ba + BA_W'(p);
    end
  end
endmodule
