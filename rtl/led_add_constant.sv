// led_add_constant: the AddConstants layer of LED, purely combinational.
//
// The round constant is XORed into the first two columns of the state:
//   column 0 gets (ks[7:4] ^ 0, ks[7:4] ^ 1, ks[3:0] ^ 2, ks[3:0] ^ 3),
//   column 1 gets (rc[5:3], rc[2:0], rc[5:3], rc[2:0]),
// where ks is the key size in bits as an 8-bit number and rc the 6-bit LFSR constant of
// the round. The document only names this layer; the constant layout is the cipher's
// standard one. Interface: d state in, rc round constant, q state out; no clock.
module led_add_constant
  import led_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  state_t d,
  input  rc_t    rc,
  output state_t q
);

  localparam logic [7:0] KS = 8'(KEY_BITS);

  state_t c;

  always_comb begin
    c = '0;
    c[63-4*0  -: 4] = KS[7:4] ^ 4'd0;
    c[63-4*4  -: 4] = KS[7:4] ^ 4'd1;
    c[63-4*8  -: 4] = KS[3:0] ^ 4'd2;
    c[63-4*12 -: 4] = KS[3:0] ^ 4'd3;
    c[63-4*1  -: 4] = {1'b0, rc[5:3]};
    c[63-4*5  -: 4] = {1'b0, rc[2:0]};
    c[63-4*9  -: 4] = {1'b0, rc[5:3]};
    c[63-4*13 -: 4] = {1'b0, rc[2:0]};
    q = d ^ c;
  end

endmodule
