// tb_domino_gate: drives random enable and function inputs into the domino
// gate and checks, in every cycle, that the output is low while e is low,
// follows f while e is high, and once high stays high until e falls.
`timescale 1ns/1ps
module tb_domino_gate;
  logic clk = 1'b0, rst_n = 1'b0, e = 1'b0, f = 1'b0, x;
  logic fired;  // the output has gone high during the current enable phase
  int checks = 0, failures = 0, n_hold = 0;

  domino_gate dut (.clk, .rst_n, .e, .f, .x);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fired = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      e = ($urandom % 8) != 0;
      f = ($urandom % 3) == 0;
      if (!e) fired = 1'b0;
      else if (f) fired = 1'b1;
      #1;
      checks++;
      if (x !== (e & (f | fired))) begin
        failures++;
        $display("FAIL: e=%b f=%b x=%b expected %b", e, f, x, e & (f | fired));
      end
      if (e && !f && fired) n_hold++;
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL: hold case never exercised"); end
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
