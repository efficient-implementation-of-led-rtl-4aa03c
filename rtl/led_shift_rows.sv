// led_shift_rows: the ShiftRows layer of LED, purely combinational wiring.
//
// Row i of the 4x4 cell matrix is rotated left by i cell positions, as the document
// states; with INVERSE = 1 each row is rotated right by i instead (used for
// decryption, this design's addition). Interface: d is the state in, q the state out.
module led_shift_rows
  import led_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t d,
  output state_t q
);

  always_comb begin
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++) begin
        // Forward: out(row,col) = in(row, col+row); inverse: out(row,col) = in(row, col-row).
        automatic int src = INVERSE ? (col - row + 4) % 4 : (col + row) % 4;
        q[63-4*(4*row+col) -: 4] = d[63-4*(4*row+src) -: 4];
      end
  end

endmodule
