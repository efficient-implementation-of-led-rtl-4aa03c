# Parallel pipelined LED-128 block cipher

This is a high-throughput hardware implementation of LED. LED is a lightweight
substitution–permutation block cipher with a 64-bit block and a 64- or 128-bit key. The
core takes one 128-bit block per clock cycle. It splits the block into two 64-bit halves
and sends each half through its own LED lane. Both lanes use the same 128-bit key. Each
lane unrolls all 48 rounds of LED-128 and puts a register after every round, so every
block comes out 48 cycles after it went in. Each block carries a mode bit, so encryptions
and decryptions can be mixed freely from one cycle to the next.

Speed is bought with area. One lane holds 48 full round circuits, each with both a
forward and an inverse datapath, and 48 × 64 state flip-flops.

## The LED state and round

The 64-bit state is a 4×4 matrix of 4-bit cells. Cell *n* (n = 4·row + col) is the
nibble at bits `[63-4n -: 4]`, so the first hex digit of a block is cell (0,0) and the
matrix is filled row by row. One round applies four layers:

| Layer | Module | What it does |
|---|---|---|
| AddConstants | `led_add_constant` | Column 0 gets `(ks[7:4]^0, ks[7:4]^1, ks[3:0]^2, ks[3:0]^3)`, where `ks` = key length in bits (0x80). Column 1 gets `(rc[5:3], rc[2:0], rc[5:3], rc[2:0])`. |
| SubCells | `led_sub_cells` | The PRESENT S-box `C 5 6 B 9 0 A D 3 E F 8 4 7 1 2` on all 16 cells. |
| ShiftRows | `led_shift_rows` | Row *i* rotated left by *i* cells. |
| MixColumnsSerial | `led_mix_columns` | Each column multiplied by `A^4` over GF(2^4), x^4+x+1. |

```
A^4 = | 4 1 2 2 |      (A^4)^-1 = | C C D 4 |
      | 8 6 5 6 |                 | 3 8 4 5 |
      | B E A 9 |                 | 7 6 2 E |
      | 2 2 F B |                 | D 9 9 D |
```

`A` is the "serial" matrix. It shifts a column up by one cell and puts `4a+b+2c+2d` in
the last cell. The cipher defines the layer as four applications of `A`. The RTL applies
the precomputed `A^4` in one step instead. Constant multiplications in GF(2^4) reduce to
a few XORs.

The round constant `rc` is a 6-bit LFSR value. The LFSR starts at zero and is updated
once per round, before use: `rc <= {rc[4:0], rc[5]^rc[4]^1}`. This gives 01, 03, 07,
0F, 1F, 3E, … for rounds 0, 1, 2, …. The constants are fixed per pipeline stage and
computed at elaboration time by `led_pkg::round_constant`.

`led_round` holds the forward round and the inverse round side by side and picks one
with `mode`. The inverse round is inverse MixColumnsSerial, inverse ShiftRows, inverse
SubCells, then AddConstants (AddConstants is its own inverse).

## Steps, key additions and the decryption trick

The rounds are grouped into *steps* of four rounds. A 64-bit sub-key is XORed in before
every step and once more at the end. With a 128-bit key `K = K1 || K2` (K1 = bits
127:64), LED-128 runs 12 steps:

```
s = P
for step = 0..11:  s ^= (step even ? K1 : K2);  4 rounds
C = s ^ K1
```

With a 64-bit key (`KEY_BITS = 64`), K1 is the key itself, `ks` = 0x40 and there are
8 steps (32 rounds).

Decryption reuses the same pipeline by running the inverse rounds in reverse order.
Stage *r* of the lane therefore uses round constant *r* for an encryption and *NR-1-r*
for a decryption, with NR = 48. Both constants are wired in and the block's mode bit
picks one. The sub-key sequence K1, K2, K1, …, K2, K1 reads the same backwards, so the
key additions do not depend on the mode. Decryption starts with K1, adds K2 before the
second inverse step, and so on. Decrypting a ciphertext under the same key returns the
plaintext.

## The pipelined lane (`led_lane`)

```
in_block ─► [⊕K1] ─► round0 ─► R ─► round1 ─► R ─► round2 ─► R ─► round3 ─► R ─► [⊕K2] ─► round4 ─► R ─► … ─► round47 ─► R ─► [⊕K1] ─► out_block
```

- Each `R` is a 64-bit register plus a valid bit and a mode bit.
- The key XOR at the start of a step sits in the same stage as that step's first round.
- The final K1 XOR is combinational after the last register.
- A block sampled with `in_valid` at rising edge *t* is loaded into the first register at
  that edge. It reaches the last register at edge *t+47*. It is on
  `out_valid`/`out_block` until edge *t+48*, where the next stage samples it. That is 48
  register stages, and 48 cycles from input to output.
- There is no stall input. The pipeline advances every cycle.
- The lane reads the key combinationally from the key register. It does not carry a copy
  of the key with each block, so **the key must not change while blocks are in flight**.

## Top level (`led_parallel_pipeline`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; active-low asynchronous reset. |
| `key_load`, `key_in` | in | 1, 128 | Writes the key register; the new key is used from the next cycle. |
| `in_valid`, `in_mode`, `in_block` | in | 1, 1, 128 | One block per cycle; `in_mode` is `MODE_ENC` (0) or `MODE_DEC` (1). |
| `out_valid`, `out_mode`, `out_block` | out | 1, 1, 128 | The result, 48 cycles later. |
| `busy` | out | 1 | High while any block is in flight. |

- `in_block[127:64]` goes to lane 0, whose result (C1) is `out_block[127:64]`.
- `in_block[63:0]` goes to lane 1 (C2, `out_block[63:0]`).
- Parameters: `KEY_BITS` (128), `STEPS` (derived: 12, or 8 for a 64-bit key), `LANES` (2).
- Reset clears the key register, the valid bits and the in-flight counter. The pipeline
  data registers are not reset.
- Two assertions check the rules: `key_load` only while `busy` is low, and the lanes
  stay in lock step.

At clock *f*, throughput is 128·*f* bit/s. For example, 5.85 Gbit/s at 45.7 MHz.

## Where this design departs from, or fills in, its source

The architecture follows a published description of a parallel, sub-pipelined LED
implementation. That description leaves a lot open, so these points are this design's
own:

- **Round constants, MDS matrix and nibble order.** The source only names AddConstants
  and MixColumnsSerial. The values here come from the LED cipher specification. They are
  checked against the published LED test vectors (LED-64: `0…0 / 0…0 → 39C2401003A0C798`,
  `0123456789ABCDEF / 0123456789ABCDEF → A003551E3893FC58`; LED-128: `0…0 / 0…0 → 3DECB2A0850CDBA1`).
- **Round count.** 12 steps of 4 rounds each (48 rounds), as in LED-128. One sentence of
  the source says "12 rounds"; that is read as 12 steps.
- **Key use.** Both lanes see the whole 128-bit key, and its halves alternate within each
  lane. The 128-bit block is two independent 64-bit LED blocks (ECB over the halves).
- **Decryption.** The source says only that decryption applies the inverse operations.
  The per-block mode bit, the inverse datapath in every stage and the reversed constants
  are this design's own.
- **Interface.** The valid and mode bits, `busy`, the key-load strobe and the reset
  behaviour are this design's own.
- **Reported synthesis figures.** The source reports 384 slice registers and 281 Gbit/s
  at 45.738 MHz. These do not match a register after every round. 281 Gbit/s ÷ 45.738 MHz
  = 6144 bits per cycle = 48 × 128, so that figure appears to count every block in the
  pipeline as finished each cycle. This RTL keeps a register per round, as the source's
  architecture drawing shows, and accepts 128 bits per cycle.

## Files

- `rtl/led_pkg.sv`: types (`state_t`, `rc_t`, `mode_e`), the S-box and its inverse,
  GF(2^4) multiplication, the MDS matrices and the round-constant function.
- `rtl/led_add_constant.sv`, `led_sub_cells.sv`, `led_shift_rows.sv`, `led_mix_columns.sv`:
  the four layers. The last three take `INVERSE`.
- `rtl/led_round.sv`: forward or inverse round.
- `rtl/led_add_round_key.sv`: XOR of K1 or K2.
- `rtl/led_key_register.sv`: the shared key register.
- `rtl/led_lane.sv`: one 64-bit pipelined lane.
- `rtl/led_parallel_pipeline.sv`: the top.
- `tb/led_ref_pkg.sv`: an independent software model of LED used by the testbenches. It
  uses a 4×4 integer matrix, shift-and-reduce GF multiplication, four serial passes of
  `A`, and a run-time LFSR.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Verification

- Every layer is compared with the reference model on random states. Each inverse layer
  is checked by round-tripping.
- `tb_led_lane` runs a 128-bit-key lane and a 64-bit-key lane side by side. It checks the
  published vectors, the exact latency (48 and 32 cycles), and a stream of 400 slots with
  random gaps and random modes.
- `tb_led_parallel_pipeline` uses the default parameters. It:
  - encrypts and decrypts one 128-bit block;
  - streams 600 slots under two keys;
  - checks every result and its latency;
  - counts encryptions, decryptions, blocks on consecutive cycles, mode changes between
    consecutive blocks, key reloads and busy cycles, and fails if any of them never occurred.

All testbenches pass. Each one was also run against a deliberately broken copy of its
module, and each such run reported failures.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/led_pkg.sv tb/led_ref_pkg.sv rtl/led_*.sv tb/tb_led_parallel_pipeline.sv \
  --top-module tb_led_parallel_pipeline -o sim
./obj_dir/sim
```

The command lists `rtl/led_pkg.sv` first, and the glob matches it again. Verilator only
warns about the duplicate package. Swap the testbench name to run another one. Every
testbench finishes in about a second.
