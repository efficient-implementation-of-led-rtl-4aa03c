// tb_led_lane: end-to-end test of one pipelined LED lane, with a 128-bit key (default,
// 48 rounds) and with a 64-bit key (32 rounds) side by side.
//
// Checks: the published LED test vectors; the latency of exactly 4*STEPS cycles; a
// stream of blocks with random gaps and a random encrypt/decrypt mode per block, where
// encryptions are compared with the reference model and decryptions must return the
// plaintext whose reference ciphertext was sent in.
module tb_led_lane;
  import led_pkg::*;
  import led_ref_pkg::*;

  localparam int NR128 = 48, NR64 = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid;
  mode_e        in_mode;
  logic [63:0]  in_block;
  logic [127:0] key128;
  logic [63:0]  key64;

  logic         ov128, ov64;
  mode_e        om128, om64;
  logic [63:0]  ob128, ob64;

  led_lane                  dut128 (.clk, .rst_n, .in_valid, .in_mode, .in_block, .key(key128),
                                    .out_valid(ov128), .out_mode(om128), .out_block(ob128));
  led_lane #(.KEY_BITS(64)) dut64  (.clk, .rst_n, .in_valid, .in_mode, .in_block, .key(key64),
                                    .out_valid(ov64), .out_mode(om64), .out_block(ob64));

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // For a decryption where only the ciphertext is known (by_enc), the output is checked
  // by encrypting it with the reference model and comparing with the block sent in.
  typedef struct { logic [63:0] exp; mode_e mode; int unsigned due; bit by_enc; } entry_t;
  entry_t q128[$], q64[$];

  function automatic entry_t mk(input logic [63:0] exp, input mode_e mode, input int unsigned due,
                                input bit by_enc);
    entry_t e;
    e.exp = exp; e.mode = mode; e.due = due; e.by_enc = by_enc;
    return e;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Scoreboards: each output must match the oldest outstanding entry, on its due cycle.
  always @(posedge clk) if (rst_n) begin
    if (ov128) begin
      check(q128.size() > 0, "lane128 output with nothing outstanding");
      if (q128.size() > 0) begin
        entry_t e;
        e = q128.pop_front();
        check(ob128 === e.exp, $sformatf("lane128 data got=%h exp=%h", ob128, e.exp));
        check(om128 === e.mode, "lane128 mode");
        check(cycle == e.due, $sformatf("lane128 latency (cycle %0d, due %0d)", cycle, e.due));
      end
    end
    if (ov64) begin
      check(q64.size() > 0, "lane64 output with nothing outstanding");
      if (q64.size() > 0) begin
        entry_t e;
        e = q64.pop_front();
        if (e.by_enc)
          check(ref_encrypt(ob64, {64'h0, key64}, 64) === e.exp,
                $sformatf("lane64 decryption %h does not encrypt back to %h", ob64, e.exp));
        else
          check(ob64 === e.exp, $sformatf("lane64 data got=%h exp=%h", ob64, e.exp));
        check(om64 === e.mode, "lane64 mode");
        check(cycle == e.due, $sformatf("lane64 latency (cycle %0d, due %0d)", cycle, e.due));
      end
    end
  end

  // Present one block on the next rising edge; the expected results are pushed for both lanes.
  task automatic send(input logic [63:0] blk, input mode_e mode,
                      input logic [63:0] exp128, input logic [63:0] exp64, input bit by_enc64);
    @(negedge clk);
    in_valid = 1; in_mode = mode; in_block = blk;
    q128.push_back(mk(exp128, mode, cycle + NR128, 1'b0));
    q64.push_back(mk(exp64, mode, cycle + NR64, by_enc64));
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] p, c128, c64;
    int sent_enc = 0, sent_dec = 0;
    in_valid = 0; in_mode = MODE_ENC; in_block = '0;
    key128 = '0; key64 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Published test vectors, all-zero key and plaintext.
    check(ref_encrypt(64'h0, 128'h0, 128) == 64'h3DECB2A0850CDBA1, "reference model LED-128 vector");
    check(ref_encrypt(64'h0, 128'h0, 64) == 64'h39C2401003A0C798, "reference model LED-64 vector");
    send(64'h0, MODE_ENC, 64'h3DECB2A0850CDBA1, 64'h39C2401003A0C798, 1'b0);
    send(64'h3DECB2A0850CDBA1, MODE_DEC, 64'h0, 64'h3DECB2A0850CDBA1, 1'b1);
    repeat (NR128 + 4) @(posedge clk);

    // Counting vectors: key 0123..EF (repeated for 128 bits), plaintext 0123..EF.
    key128 = 128'h0123456789ABCDEF_0123456789ABCDEF;
    key64  = 64'h0123456789ABCDEF;
    @(negedge clk);
    send(64'h0123456789ABCDEF, MODE_ENC, 64'hD6B824587F014FC2, 64'hA003551E3893FC58, 1'b0);
    send(64'hD6B824587F014FC2, MODE_DEC, 64'h0123456789ABCDEF, 64'hD6B824587F014FC2, 1'b1);
    repeat (NR128 + 4) @(posedge clk);
    check(q128.size() == 0 && q64.size() == 0, "all vector outputs returned");

    // Stream with random gaps and modes, new random key each run.
    key128 = {$urandom, $urandom, $urandom, $urandom};
    key64  = {$urandom, $urandom};
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      p = {$urandom, $urandom};
      c128 = ref_encrypt(p, key128, 128);
      c64  = ref_encrypt(p, {64'h0, key64}, 64);
      @(negedge clk);
      if ($urandom % 4 != 0) begin
        in_valid = 1;
        if ($urandom % 2 == 0) begin
          // Encryption: lane64 sees the same input, so both expectations come from p.
          in_mode = MODE_ENC; in_block = p;
          q128.push_back(mk(c128, MODE_ENC, cycle + NR128, 1'b0));
          q64.push_back(mk(c64, MODE_ENC, cycle + NR64, 1'b0));
          sent_enc++;
        end else begin
          // Decryption of c128: lane128 must return p; lane64 must return a block whose
          // LED-64 encryption is c128.
          in_mode = MODE_DEC; in_block = c128;
          q128.push_back(mk(p, MODE_DEC, cycle + NR128, 1'b0));
          q64.push_back(mk(c128, MODE_DEC, cycle + NR64, 1'b1));
          sent_dec++;
        end
      end else
        in_valid = 0;
    end
    @(negedge clk) in_valid = 0;
    repeat (NR128 + 4) @(posedge clk);
    check(q128.size() == 0 && q64.size() == 0, "all stream outputs returned");
    check(sent_enc > 0 && sent_dec > 0, "both modes exercised");
    $display("lane: %0d encryptions, %0d decryptions streamed", sent_enc, sent_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
