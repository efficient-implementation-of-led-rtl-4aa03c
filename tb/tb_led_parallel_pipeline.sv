// tb_led_parallel_pipeline: end-to-end test of the two-lane pipelined LED-128 core at its
// default parameters (two 64-bit lanes, 128-bit key, 48 pipeline stages).
//
// 1. Loads a key, encrypts one 128-bit block and decrypts the result, checking both
//    halves against the reference model and the 48-cycle latency.
// 2. Streams random blocks with random gaps and random modes; every result is checked
//    against the reference model (decryptions must give back the plaintext).
// 3. Reloads the key while idle and streams again.
// Counted mechanisms, each of which must occur: encryptions, decryptions, blocks issued
// on consecutive cycles (full rate), mode changes between consecutive blocks, key
// reloads, and cycles with busy high.
module tb_led_parallel_pipeline;
  import led_pkg::*;
  import led_ref_pkg::*;

  localparam int NR = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          key_load;
  logic [127:0]  key_in;
  logic          in_valid;
  mode_e         in_mode;
  logic [127:0]  in_block;
  logic          out_valid, busy;
  mode_e         out_mode;
  logic [127:0]  out_block;

  led_parallel_pipeline dut (
    .clk, .rst_n, .key_load, .key_in, .in_valid, .in_mode, .in_block,
    .out_valid, .out_mode, .out_block, .busy
  );

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [127:0] exp; mode_e mode; int unsigned due; } entry_t;
  entry_t sb[$];

  int n_enc = 0, n_dec = 0, n_back_to_back = 0, n_mode_switch = 0, n_key_reload = 0, n_busy = 0;
  logic  prev_valid = 0;
  mode_e prev_mode  = MODE_ENC;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  function automatic logic [127:0] enc128(input logic [127:0] p, input logic [127:0] k);
    return {ref_encrypt(p[127:64], k, 128), ref_encrypt(p[63:0], k, 128)};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (busy) n_busy++;
    if (in_valid) begin
      if (in_mode == MODE_ENC) n_enc++; else n_dec++;
      if (prev_valid) n_back_to_back++;
      if (prev_valid && prev_mode != in_mode) n_mode_switch++;
    end
    prev_valid <= in_valid;
    prev_mode  <= in_mode;
    if (key_load) n_key_reload++;
    if (out_valid) begin
      check(sb.size() > 0, "output with nothing outstanding");
      if (sb.size() > 0) begin
        entry_t e;
        e = sb.pop_front();
        check(out_block === e.exp, $sformatf("data got=%h exp=%h", out_block, e.exp));
        check(out_mode === e.mode, "mode");
        check(cycle == e.due, $sformatf("latency (cycle %0d, due %0d)", cycle, e.due));
      end
    end
  end

  function automatic entry_t mk(input logic [127:0] exp, input mode_e mode, input int unsigned due);
    entry_t e;
    e.exp = exp; e.mode = mode; e.due = due;
    return e;
  endfunction

  task automatic load_key(input logic [127:0] k);
    @(negedge clk);
    check(!busy, "key loaded only while idle");
    key_load = 1; key_in = k;
    @(negedge clk);
    key_load = 0;
  endtask

  // Stream n slots; each slot carries a block with probability 3/4, random mode.
  task automatic stream(input int n, input logic [127:0] k);
    for (int i = 0; i < n; i++) begin
      logic [127:0] p, c;
      @(negedge clk);
      p = {$urandom, $urandom, $urandom, $urandom};
      c = enc128(p, k);
      if ($urandom % 4 != 0) begin
        in_valid = 1;
        if ($urandom % 2 == 0) begin
          in_mode = MODE_ENC; in_block = p; sb.push_back(mk(c, MODE_ENC, cycle + NR));
        end else begin
          in_mode = MODE_DEC; in_block = c; sb.push_back(mk(p, MODE_DEC, cycle + NR));
        end
      end else
        in_valid = 0;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    repeat (NR + 3) @(posedge clk);
    check(sb.size() == 0, "all outputs returned");
    check(!busy, "busy clears when drained");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key, p, c;
    key_load = 0; key_in = '0; in_valid = 0; in_mode = MODE_ENC; in_block = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. One 128-bit block: encrypt, then decrypt the ciphertext.
    key = 128'h0123456789ABCDEF_0123456789ABCDEF;
    load_key(key);
    p = 128'h0123456789ABCDEF_0000000000000000;
    c = {64'hD6B824587F014FC2, enc128(128'h0, key)[63:0]};
    check(enc128(p, key) == c, "reference model vector");
    @(negedge clk);
    in_valid = 1; in_mode = MODE_ENC; in_block = p; sb.push_back(mk(c, MODE_ENC, cycle + NR));
    @(negedge clk);
    in_valid = 0;
    drain();
    @(negedge clk);
    in_valid = 1; in_mode = MODE_DEC; in_block = c; sb.push_back(mk(p, MODE_DEC, cycle + NR));
    @(negedge clk);
    in_valid = 0;
    drain();

    // 2. Mixed stream under a random key.
    key = {$urandom, $urandom, $urandom, $urandom};
    load_key(key);
    stream(300, key);
    drain();

    // 3. Key reload, another stream.
    key = {$urandom, $urandom, $urandom, $urandom};
    load_key(key);
    stream(300, key);
    drain();

    $display("mechanisms: enc=%0d dec=%0d back_to_back=%0d mode_switch=%0d key_reload=%0d busy_cycles=%0d",
             n_enc, n_dec, n_back_to_back, n_mode_switch, n_key_reload, n_busy);
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_back_to_back > 0, "blocks on consecutive cycles happened");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_key_reload > 1, "key reload happened");
    check(n_busy > 0, "busy seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
