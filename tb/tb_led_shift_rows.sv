// tb_led_shift_rows: checks ShiftRows (row i rotated left by i) and its inverse on a
// state with distinct cells and on random states.
module tb_led_shift_rows;
  import led_ref_pkg::*;

  logic [63:0] d, q_fwd, q_inv, rt;
  int checks = 0, failures = 0;

  led_shift_rows #(.INVERSE(1'b0)) dut_fwd (.d(d),     .q(q_fwd));
  led_shift_rows #(.INVERSE(1'b1)) dut_inv (.d(d),     .q(q_inv));
  led_shift_rows #(.INVERSE(1'b1)) dut_rt  (.d(q_fwd), .q(rt));

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
    // Cells numbered 0..F row by row, as in the document's ShiftRows figure.
    d = 64'h0123_4567_89AB_CDEF; #1;
    check(q_fwd, 64'h0123_5674_AB89_FCDE, "numbered cells");
    check(q_inv, 64'h0123_7456_AB89_DEFC, "numbered cells inverse");
    for (int n = 0; n < 200; n++) begin
      d = {$urandom, $urandom}; #1;
      check(q_fwd, ref_shift_rows(d), "forward random");
      check(rt, d, "round trip random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
