// led_pkg: types, constants and small functions shared by the LED cipher datapath.
//
// The 64-bit LED state is a 4x4 matrix of 4-bit cells. Cell n (n = 4*row + col) sits at
// bits [63-4n -: 4] of a flat 64-bit word, so the first (most significant) nibble of a
// block is cell (0,0) and the matrix is filled row by row, as in the cipher's
// specification. The S-box is the PRESENT S-box printed in the document's S-box table;
// the MixColumnsSerial matrix A^4 and its inverse are over GF(2^4) with the reduction
// polynomial x^4 + x + 1. The round constants come from a 6-bit LFSR
// (rc <= {rc[4:0], rc[5] ^ rc[4] ^ 1}, starting from zero) evaluated at elaboration time.
package led_pkg;

  typedef logic [3:0]  cell_t;
  typedef logic [63:0] state_t;
  typedef logic [5:0]  rc_t;

  // Per-block operating mode; it travels with the block through the pipeline.
  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } mode_e;

  localparam int unsigned ROUNDS_PER_STEP = 4;

  // Number of steps (4 rounds each): 8 for a 64-bit key, 12 for a 128-bit key.
  function automatic int unsigned steps_for_key(input int unsigned key_bits);
    return (key_bits <= 64) ? 8 : 12;
  endfunction

  function automatic cell_t get_cell(input state_t s, input int unsigned n);
    return s[63-4*n -: 4];
  endfunction

  function automatic cell_t sbox(input cell_t x);
    case (x)
      4'h0: return 4'hC;  4'h1: return 4'h5;  4'h2: return 4'h6;  4'h3: return 4'hB;
      4'h4: return 4'h9;  4'h5: return 4'h0;  4'h6: return 4'hA;  4'h7: return 4'hD;
      4'h8: return 4'h3;  4'h9: return 4'hE;  4'hA: return 4'hF;  4'hB: return 4'h8;
      4'hC: return 4'h4;  4'hD: return 4'h7;  4'hE: return 4'h1;  default: return 4'h2;
    endcase
  endfunction

  function automatic cell_t inv_sbox(input cell_t x);
    case (x)
      4'hC: return 4'h0;  4'h5: return 4'h1;  4'h6: return 4'h2;  4'hB: return 4'h3;
      4'h9: return 4'h4;  4'h0: return 4'h5;  4'hA: return 4'h6;  4'hD: return 4'h7;
      4'h3: return 4'h8;  4'hE: return 4'h9;  4'hF: return 4'hA;  4'h8: return 4'hB;
      4'h4: return 4'hC;  4'h7: return 4'hD;  4'h1: return 4'hE;  default: return 4'hF;
    endcase
  endfunction

  // Multiply by x modulo x^4 + x + 1.
  function automatic cell_t xtime(input cell_t a);
    return {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);
  endfunction

  // General GF(2^4) multiplication; with one constant operand it reduces to XORs.
  function automatic cell_t gf_mul(input cell_t a, input cell_t b);
    cell_t acc = '0;
    cell_t p   = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) acc ^= p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // MixColumnsSerial matrix A^4 and its inverse, row-major, entry (i,j) at [15-(4i+j)].
  typedef cell_t mds_t [16];
  localparam mds_t MDS = '{
    4'h4, 4'h1, 4'h2, 4'h2,
    4'h8, 4'h6, 4'h5, 4'h6,
    4'hB, 4'hE, 4'hA, 4'h9,
    4'h2, 4'h2, 4'hF, 4'hB
  };
  localparam mds_t MDS_INV = '{
    4'hC, 4'hC, 4'hD, 4'h4,
    4'h3, 4'h8, 4'h4, 4'h5,
    4'h7, 4'h6, 4'h2, 4'hE,
    4'hD, 4'h9, 4'h9, 4'hD
  };

  // Round constant of round r (0-based): the LFSR state after r+1 updates.
  function automatic rc_t round_constant(input int unsigned r);
    rc_t rc = '0;
    for (int unsigned i = 0; i <= r; i++)
      rc = {rc[4:0], rc[5] ^ rc[4] ^ 1'b1};
    return rc;
  endfunction

endpackage
