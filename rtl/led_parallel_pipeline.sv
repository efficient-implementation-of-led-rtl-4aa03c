// led_parallel_pipeline: parallel, fully pipelined LED block cipher (top level).
//
// A 128-bit block is split into two 64-bit halves that are processed side by side by
// two identical LED lanes, both keyed by the same 128-bit key from one key register, as
// in the document's parallel pipeline figure: bits 127:64 go to the first lane (giving
// C1) and bits 63:0 to the second (giving C2); out_block = {C1, C2}. Each lane is the
// 64-bit LED cipher with a 128-bit key (12 steps of 4 rounds) and a register after every
// round, so one 128-bit block is accepted per clock cycle and its result appears
// 4 * STEPS cycles (48) later. in_mode selects encryption or decryption per block.
//
// Interface: key_load/key_in write the key register (the new key is used from the next
// cycle on; change it only while busy is low). in_valid/in_mode/in_block present a
// block; out_valid/out_mode/out_block return it. busy is high while any block is in
// flight. The valid handshake, the per-block mode bit and busy are this design's
// choices; the document gives no interface timing.
module led_parallel_pipeline
  import led_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128,
  parameter int unsigned STEPS    = steps_for_key(KEY_BITS),
  parameter int unsigned LANES    = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  key_load,
  input  logic [KEY_BITS-1:0]   key_in,
  input  logic                  in_valid,
  input  mode_e                 in_mode,
  input  logic [64*LANES-1:0]   in_block,
  output logic                  out_valid,
  output mode_e                 out_mode,
  output logic [64*LANES-1:0]   out_block,
  output logic                  busy
);

  localparam int unsigned NR = ROUNDS_PER_STEP * STEPS;

  logic [KEY_BITS-1:0] key_q;

  led_key_register #(.KEY_BITS(KEY_BITS)) u_key (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (key_load),
    .key_in (key_in),
    .key_q  (key_q)
  );

  logic  lane_valid [LANES];
  mode_e lane_mode  [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    led_lane #(.KEY_BITS(KEY_BITS), .STEPS(STEPS)) u_lane (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .in_mode   (in_mode),
      .in_block  (in_block[64*(LANES-1-l) +: 64]),
      .key       (key_q),
      .out_valid (lane_valid[l]),
      .out_mode  (lane_mode[l]),
      .out_block (out_block[64*(LANES-1-l) +: 64])
    );
  end

  // All lanes move in lock step, so lane 0 speaks for the valid and mode of the block.
  assign out_valid = lane_valid[0];
  assign out_mode  = lane_mode[0];

  // Number of blocks in flight, for busy.
  localparam int unsigned CW = $clog2(NR + 2);
  logic [CW-1:0] in_flight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_flight <= '0;
    else        in_flight <= in_flight + CW'(in_valid) - CW'(out_valid);
  end

  assign busy = (in_flight != '0);

  // The key register must not change under blocks that are still in a lane.
  a_key_stable : assert property (@(posedge clk) disable iff (!rst_n) key_load |-> !busy)
    else $error("key_load while blocks are in flight");

  for (genvar l = 1; l < LANES; l++) begin : g_lockstep
    a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
                                  lane_valid[l] == lane_valid[0] && lane_mode[l] == lane_mode[0]);
  end

endmodule
