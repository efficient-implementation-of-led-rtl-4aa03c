// tb_led_key_register: checks reset to zero, capture on load and hold without load.
module tb_led_key_register;
  logic         clk = 0, rst_n = 0, load = 0;
  logic [127:0] key_in, key_q, expected;
  int checks = 0, failures = 0;

  led_key_register dut (.clk(clk), .rst_n(rst_n), .load(load), .key_in(key_in), .key_q(key_q));

  always #5 clk = ~clk;

  task automatic check(input logic [127:0] exp, input string what);
    checks++;
    if (key_q !== exp) begin
      failures++;
      $display("FAIL %s: got=%h exp=%h", what, key_q, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_in = '1;
    #12;
    check('0, "reset value");
    rst_n = 1;
    expected = '0;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      load   = 1'($urandom);
      key_in = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk); #1;
      if (load) expected = key_in;
      check(expected, load ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
