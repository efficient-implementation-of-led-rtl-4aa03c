// tb_led_sub_cells: checks the forward and inverse SubCells layers against the reference
// S-box on every cell value and on random states, and that inverse(forward(x)) == x.
module tb_led_sub_cells;
  import led_ref_pkg::*;

  logic [63:0] d, q_fwd, q_inv, rt;
  int checks = 0, failures = 0;

  led_sub_cells #(.INVERSE(1'b0)) dut_fwd (.d(d),     .q(q_fwd));
  led_sub_cells #(.INVERSE(1'b1)) dut_inv (.d(d),     .q(q_inv));
  led_sub_cells #(.INVERSE(1'b1)) dut_rt  (.d(q_fwd), .q(rt));

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
    // Every cell value in every position: 0123456789ABCDEF and its rotations.
    for (int r = 0; r < 16; r++) begin
      d = 64'h0123_4567_89AB_CDEF;
      d = (d << (4*r)) | (d >> (64 - 4*r));
      #1;
      check(q_fwd, ref_sub_cells(d), "forward");
      check(rt, d, "round trip");
    end
    // The document's S-box table, row by row.
    d = 64'h0123_4567_89AB_CDEF; #1;
    check(q_fwd, 64'hC56B_90AD_3EF8_4712, "S-box table");
    check(q_inv, 64'h5EF8_C12D_B463_079A, "inverse S-box");
    for (int n = 0; n < 200; n++) begin
      d = {$urandom, $urandom}; #1;
      check(q_fwd, ref_sub_cells(d), "forward random");
      check(rt, d, "round trip random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
