// led_sub_cells: the SubCells layer of LED, purely combinational.
//
// Each of the 16 4-bit cells of the 64-bit state goes through the PRESENT S-box
// (C 5 6 B 9 0 A D 3 E F 8 4 7 1 2), as the document specifies. With INVERSE = 1 the
// inverse S-box is applied instead; the inverse is needed for decryption, which the
// document asks for without detailing, and the parameter is this design's choice.
// Interface: d is the state in, q the state out, no clock.
module led_sub_cells
  import led_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t d,
  output state_t q
);

  always_comb begin
    for (int n = 0; n < 16; n++)
      q[63-4*n -: 4] = INVERSE ? inv_sbox(d[63-4*n -: 4]) : sbox(d[63-4*n -: 4]);
  end

endmodule
