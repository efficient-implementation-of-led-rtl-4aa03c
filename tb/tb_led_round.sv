// tb_led_round: checks the forward round against the reference round and that the
// inverse round with the same constant undoes it.
module tb_led_round;
  import led_pkg::*;
  import led_ref_pkg::*;

  logic [63:0] d, q_fwd, rt;
  logic [5:0]  rc;
  int checks = 0, failures = 0;

  led_round dut_fwd (.mode(MODE_ENC), .rc(rc), .d(d),     .q(q_fwd));
  led_round dut_inv (.mode(MODE_DEC), .rc(rc), .d(q_fwd), .q(rt));

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
    for (int n = 0; n < 300; n++) begin
      d = {$urandom, $urandom}; rc = 6'($urandom); #1;
      check(q_fwd, ref_round(d, rc, 128), "forward");
      check(rt, d, "inverse undoes forward");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
