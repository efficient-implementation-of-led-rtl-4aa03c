// led_mix_columns: the MixColumnsSerial layer of LED, purely combinational.
//
// Every column of the 4x4 cell matrix is multiplied by the MDS matrix A^4 over GF(2^4)
// (polynomial x^4 + x + 1), where A is the serial matrix whose last row is (4 1 2 2).
// The document names the layer and says an MDS matrix is applied to each column; the
// matrix itself is the cipher's standard one. This implementation applies the
// precomputed A^4 in one step (parallel rather than serial form). With INVERSE = 1 the
// inverse matrix is used, for decryption. Interface: d is the state in, q the state out.
module led_mix_columns
  import led_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t d,
  output state_t q
);

  always_comb begin
    for (int col = 0; col < 4; col++)
      for (int row = 0; row < 4; row++) begin
        automatic cell_t acc = '0;
        for (int k = 0; k < 4; k++)
          acc ^= gf_mul(INVERSE ? MDS_INV[4*row+k] : MDS[4*row+k], d[63-4*(4*k+col) -: 4]);
        q[63-4*(4*row+col) -: 4] = acc;
      end
  end

endmodule
