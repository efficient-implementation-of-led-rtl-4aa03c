// tb_led_add_round_key: checks that sel picks the upper (K1) or lower (K2) key half,
// and that a 64-bit key is used as is whatever sel says.
module tb_led_add_round_key;
  logic [63:0]  d, q1, q2, q64a, q64b;
  logic [127:0] key;
  logic [63:0]  key64;
  int checks = 0, failures = 0;

  led_add_round_key                  dut_k1 (.d(d), .key(key),   .sel(1'b0), .q(q1));
  led_add_round_key                  dut_k2 (.d(d), .key(key),   .sel(1'b1), .q(q2));
  led_add_round_key #(.KEY_BITS(64)) dut_sa (.d(d), .key(key64), .sel(1'b0), .q(q64a));
  led_add_round_key #(.KEY_BITS(64)) dut_sb (.d(d), .key(key64), .sel(1'b1), .q(q64b));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; key = 128'h0123456789ABCDEF_FEDCBA9876543210; key64 = 64'h1111_2222_3333_4444; #1;
    check(q1, 64'h0123456789ABCDEF, "K1 is the upper half");
    check(q2, 64'hFEDCBA9876543210, "K2 is the lower half");
    for (int n = 0; n < 100; n++) begin
      d = {$urandom, $urandom}; key = {$urandom, $urandom, $urandom, $urandom};
      key64 = {$urandom, $urandom}; #1;
      check(q1, d ^ key[127:64], "K1 random");
      check(q2, d ^ key[63:0], "K2 random");
      check(q64a, d ^ key64, "64-bit key, sel 0");
      check(q64b, d ^ key64, "64-bit key, sel 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
