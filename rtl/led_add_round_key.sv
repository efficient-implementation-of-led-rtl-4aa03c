// led_add_round_key: XORs a 64-bit sub-key into the state, purely combinational.
//
// For a 128-bit key K = K1 || K2 (K1 the upper 64 bits) the document alternates the two
// halves between steps: K1, K2, K1, ..., with K1 also added after the last step. For a
// 64-bit key there is only K1 and sel is ignored. Interface: d state in, key the full
// key, sel = 0 picks K1 and sel = 1 picks K2, q state out.
module led_add_round_key
  import led_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  state_t                d,
  input  logic [KEY_BITS-1:0]   key,
  input  logic                  sel,
  output state_t                q
);

  state_t k1, k2;

  assign k1 = key[KEY_BITS-1 -: 64];
  assign k2 = (KEY_BITS > 64) ? key[63:0] : k1;
  assign q  = d ^ (sel ? k2 : k1);

endmodule
