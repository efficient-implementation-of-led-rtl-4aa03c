// tb_led_mix_columns: checks MixColumnsSerial against four passes of the serial matrix A
// in the reference model, single-cell columns, and that the inverse undoes it.
module tb_led_mix_columns;
  import led_ref_pkg::*;

  logic [63:0] d, q_fwd, q_inv, rt;
  int checks = 0, failures = 0;

  led_mix_columns #(.INVERSE(1'b0)) dut_fwd (.d(d),     .q(q_fwd));
  led_mix_columns #(.INVERSE(1'b1)) dut_inv (.d(d),     .q(q_inv));
  led_mix_columns #(.INVERSE(1'b1)) dut_rt  (.d(q_fwd), .q(rt));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: d=%h got=%h exp=%h", what, d, got, exp);
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
    // A single 1 in row 0 of column 0 picks out the first column of A^4: 4, 8, B, 2.
    d = 64'h1000_0000_0000_0000; #1;
    check(q_fwd, 64'h4000_8000_B000_2000, "unit cell row 0");
    // A single 1 in row 3 of column 2 picks out the last column of A^4: 2, 6, 9, B.
    d = 64'h0000_0000_0000_0010; #1;
    check(q_fwd, 64'h0020_0060_0090_00B0, "unit cell row 3");
    for (int n = 0; n < 300; n++) begin
      d = {$urandom, $urandom}; #1;
      check(q_fwd, ref_mix_columns(d), "forward random");
      check(rt, d, "round trip random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
