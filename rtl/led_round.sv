// led_round: one LED round, forward or inverse, purely combinational.
//
// Forward (mode = MODE_ENC), as in the document's round figure:
//   AddConstants -> SubCells -> ShiftRows -> MixColumnsSerial.
// Inverse (mode = MODE_DEC), undoing one forward round with the same constant:
//   inverse MixColumnsSerial -> inverse ShiftRows -> inverse SubCells -> AddConstants.
// The document says decryption applies the inverse operations but does not show the
// inverse datapath; building both paths side by side and selecting with a per-block mode
// bit is this design's choice. Interface: mode, 6-bit round constant rc, state d in,
// state q out; no clock.
module led_round
  import led_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  mode_e  mode,
  input  rc_t    rc,
  input  state_t d,
  output state_t q
);

  // Forward path.
  state_t f_ac, f_sc, f_sr, f_mc;
  led_add_constant #(.KEY_BITS(KEY_BITS)) u_f_ac (.d(d),    .rc(rc), .q(f_ac));
  led_sub_cells    #(.INVERSE(1'b0))      u_f_sc (.d(f_ac),          .q(f_sc));
  led_shift_rows   #(.INVERSE(1'b0))      u_f_sr (.d(f_sc),          .q(f_sr));
  led_mix_columns  #(.INVERSE(1'b0))      u_f_mc (.d(f_sr),          .q(f_mc));

  // Inverse path.
  state_t i_mc, i_sr, i_sc, i_ac;
  led_mix_columns  #(.INVERSE(1'b1))      u_i_mc (.d(d),             .q(i_mc));
  led_shift_rows   #(.INVERSE(1'b1))      u_i_sr (.d(i_mc),          .q(i_sr));
  led_sub_cells    #(.INVERSE(1'b1))      u_i_sc (.d(i_sr),          .q(i_sc));
  led_add_constant #(.KEY_BITS(KEY_BITS)) u_i_ac (.d(i_sc), .rc(rc), .q(i_ac));

  assign q = (mode == MODE_DEC) ? i_ac : f_mc;

endmodule
