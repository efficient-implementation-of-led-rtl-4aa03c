// led_ref_pkg: software reference model of the LED cipher for the testbenches.
//
// Written independently of the RTL: the state is held as a 4x4 array of integers,
// GF(2^4) products are formed by shift-and-reduce, MixColumnsSerial is applied as four
// passes of the serial matrix A (last row 4 1 2 2), and the round constants are
// produced by stepping the 6-bit LFSR at run time. Decryption is checked in the
// testbenches by round-tripping, and the published LED test vectors anchor the model.
package led_ref_pkg;

  typedef int unsigned mat_t [4][4];

  // PRESENT S-box as a packed 64-bit string of nibbles, entry x at nibble x from the left.
  localparam logic [63:0] SBOX_STR = 64'hC56B_90AD_3EF8_4712;

  function automatic int unsigned ref_sbox(input int unsigned x);
    return int'(SBOX_STR[63 - 4*x -: 4]);
  endfunction

  function automatic int unsigned ref_inv_sbox(input int unsigned y);
    for (int unsigned x = 0; x < 16; x++)
      if (ref_sbox(x) == y) return x;
    return 0;
  endfunction

  function automatic int unsigned ref_gmul(input int unsigned a, input int unsigned b);
    int unsigned r = 0;
    for (int i = 0; i < 4; i++)
      if ((b >> i) & 1) r ^= a << i;
    for (int i = 7; i >= 4; i--)
      if ((r >> i) & 1) r ^= 'h13 << (i - 4);
    return r;
  endfunction

  function automatic mat_t to_mat(input logic [63:0] x);
    mat_t m;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        m[i][j] = int'((x >> (60 - 4*(4*i + j))) & 64'hF);
    return m;
  endfunction

  function automatic logic [63:0] from_mat(input mat_t m);
    logic [63:0] x = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        x = (x << 4) | 64'(m[i][j]);
    return x;
  endfunction

  function automatic logic [63:0] ref_sub_cells(input logic [63:0] x);
    mat_t m = to_mat(x);
    foreach (m[i, j]) m[i][j] = ref_sbox(m[i][j]);
    return from_mat(m);
  endfunction

  function automatic logic [63:0] ref_shift_rows(input logic [63:0] x);
    mat_t m = to_mat(x), o;
    foreach (m[i, j]) o[i][j] = m[i][(j + i) % 4];
    return from_mat(o);
  endfunction

  // One pass of the serial matrix A: shift the column up, new last cell 4a+b+2c+2d.
  function automatic logic [63:0] ref_mix_columns(input logic [63:0] x);
    mat_t m = to_mat(x);
    for (int c = 0; c < 4; c++)
      for (int pass = 0; pass < 4; pass++) begin
        int unsigned t = ref_gmul(4, m[0][c]) ^ m[1][c] ^ ref_gmul(2, m[2][c]) ^ ref_gmul(2, m[3][c]);
        m[0][c] = m[1][c]; m[1][c] = m[2][c]; m[2][c] = m[3][c]; m[3][c] = t;
      end
    return from_mat(m);
  endfunction

  function automatic logic [5:0] ref_rc(input int unsigned r);
    logic [5:0] rc = 0;
    repeat (r + 1) rc = {rc[4:0], ~(rc[5] ^ rc[4])};
    return rc;
  endfunction

  function automatic logic [63:0] ref_add_constant(input logic [63:0] x, input logic [5:0] rc,
                                                   input int unsigned key_bits);
    mat_t m = to_mat(x);
    int unsigned ks = key_bits & 'hFF;
    for (int i = 0; i < 4; i++) begin
      m[i][0] ^= ((i < 2) ? (ks >> 4) : (ks & 'hF)) ^ i;
      m[i][1] ^= (i % 2 == 0) ? int'(rc[5:3]) : int'(rc[2:0]);
    end
    return from_mat(m);
  endfunction

  function automatic logic [63:0] ref_round(input logic [63:0] x, input logic [5:0] rc,
                                            input int unsigned key_bits);
    return ref_mix_columns(ref_shift_rows(ref_sub_cells(ref_add_constant(x, rc, key_bits))));
  endfunction

  // LED encryption of one 64-bit block with a 64- or 128-bit key (left-aligned in key).
  function automatic logic [63:0] ref_encrypt(input logic [63:0] p, input logic [127:0] key,
                                              input int unsigned key_bits);
    int unsigned steps = (key_bits == 64) ? 8 : 12;
    logic [63:0] k1 = (key_bits == 64) ? key[63:0] : key[127:64];
    logic [63:0] k2 = (key_bits == 64) ? key[63:0] : key[63:0];
    logic [63:0] s = p;
    for (int unsigned st = 0; st < steps; st++) begin
      s ^= (st % 2 == 0) ? k1 : k2;
      for (int unsigned k = 0; k < 4; k++) s = ref_round(s, ref_rc(4*st + k), key_bits);
    end
    return s ^ k1;
  endfunction

endpackage
