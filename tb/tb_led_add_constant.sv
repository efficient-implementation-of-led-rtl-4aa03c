// tb_led_add_constant: checks AddConstants for 128- and 64-bit key sizes on a zero state
// (the constant matrix itself) and on random states and constants.
module tb_led_add_constant;
  import led_ref_pkg::*;

  logic [63:0] d, q128, q64;
  logic [5:0]  rc;
  int checks = 0, failures = 0;

  led_add_constant                   dut128 (.d(d), .rc(rc), .q(q128));
  led_add_constant #(.KEY_BITS(64))  dut64  (.d(d), .rc(rc), .q(q64));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: d=%h rc=%h got=%h exp=%h", what, d, rc, got, exp);
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
    // Constant matrix for rc = 6'b101_011, key size 0x80 and 0x40.
    d = '0; rc = 6'b101_011; #1;
    check(q128, 64'h8500_9300_2500_3300, "constant matrix, 128-bit key");
    check(q64,  64'h4500_5300_2500_3300, "constant matrix, 64-bit key");
    for (int n = 0; n < 200; n++) begin
      d = {$urandom, $urandom}; rc = 6'($urandom); #1;
      check(q128, ref_add_constant(d, rc, 128), "random 128");
      check(q64,  ref_add_constant(d, rc, 64),  "random 64");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
