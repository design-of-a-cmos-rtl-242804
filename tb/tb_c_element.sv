// tb_c_element: drives random inputs into the C-element and compares its
// output every cycle with the rule "follow the inputs when they agree, hold
// otherwise", one cycle later. Also checks the reset value.
`timescale 1ns/1ps
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, c;
  logic exp_c;
  int checks = 0, failures = 0;

  c_element dut (.clk, .rst_n, .a, .b, .c);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (c !== 1'b0) begin failures++; $display("FAIL: reset value %b", c); end
    rst_n = 1'b1;
    exp_c = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      a = 1'($urandom);
      b = 1'($urandom);
      if (a == b) exp_c = a;
      @(posedge clk); #1;
      checks++;
      if (c !== exp_c) begin
        failures++;
        $display("FAIL: a=%b b=%b c=%b expected %b", a, b, c, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
