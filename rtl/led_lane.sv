// led_lane: one fully pipelined 64-bit LED lane (encryption and decryption).
//
// The lane unrolls all NR = 4 * STEPS rounds of LED (48 for a 128-bit key, 32 for a
// 64-bit key) and puts a pipeline register after every round, as the document's
// pipeline figure does, so a new block can enter every clock cycle and leaves NR cycles
// later. Before the first round of each step the sub-key is added (K1 before even
// steps, K2 before odd ones); after the last register K1 is added once more. Every
// block carries a valid bit and its own mode bit, so encryptions and decryptions can
// be mixed from one cycle to the next.
//
// Decryption runs the inverse rounds through the same stages in reverse order: stage r
// uses round constant NR-1-r instead of r. Because the key pattern K1, K2, ..., K2, K1
// is the same read backwards, the sub-key schedule does not depend on the mode.
//
// Interface: in_valid/in_mode/in_block enter on a rising edge; out_valid/out_mode/
// out_block appear NR cycles later (the final key XOR is combinational after the last
// register). key must be stable while blocks are in flight. Valid bits reset to zero;
// the data registers are not reset.
module led_lane
  import led_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128,
  parameter int unsigned STEPS    = steps_for_key(KEY_BITS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  mode_e               in_mode,
  input  state_t              in_block,
  input  logic [KEY_BITS-1:0] key,
  output logic                out_valid,
  output mode_e               out_mode,
  output state_t              out_block
);

  localparam int unsigned NR = ROUNDS_PER_STEP * STEPS;

  // Stage s holds the state after round s-1; stage 0 is the lane input.
  state_t stage_data  [NR+1];
  logic   stage_valid [NR+1];
  mode_e  stage_mode  [NR+1];

  assign stage_data[0]  = in_block;
  assign stage_valid[0] = in_valid;
  assign stage_mode[0]  = in_mode;

  for (genvar r = 0; r < NR; r++) begin : g_round
    localparam rc_t RC_ENC = round_constant(r);
    localparam rc_t RC_DEC = round_constant(NR - 1 - r);

    state_t round_in, round_out;

    if (r % ROUNDS_PER_STEP == 0) begin : g_key
      led_add_round_key #(.KEY_BITS(KEY_BITS)) u_ark (
        .d   (stage_data[r]),
        .key (key),
        .sel (1'((r / ROUNDS_PER_STEP) % 2)),
        .q   (round_in)
      );
    end else begin : g_nokey
      assign round_in = stage_data[r];
    end

    led_round #(.KEY_BITS(KEY_BITS)) u_round (
      .mode (stage_mode[r]),
      .rc   ((stage_mode[r] == MODE_DEC) ? RC_DEC : RC_ENC),
      .d    (round_in),
      .q    (round_out)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stage_valid[r+1] <= 1'b0;
      else        stage_valid[r+1] <= stage_valid[r];
    end

    always_ff @(posedge clk) begin
      stage_data[r+1] <= round_out;
      stage_mode[r+1] <= stage_mode[r];
    end
  end

  led_add_round_key #(.KEY_BITS(KEY_BITS)) u_final_ark (
    .d   (stage_data[NR]),
    .key (key),
    .sel (1'b0),
    .q   (out_block)
  );

  assign out_valid = stage_valid[NR];
  assign out_mode  = stage_mode[NR];

endmodule
