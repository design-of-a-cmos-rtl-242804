// tb_s_star: runs 200 request cycles into the S* module with an environment
// that answers link 2 after a random delay. Checks that every request gives
// exactly one phi pulse of one cycle, that phi_n is its complement, that the
// link 2 request follows the pulse by one cycle and only after it, and that
// the input acknowledge mirrors link 2's acknowledge.
`timescale 1ns/1ps
module tb_s_star;
  localparam int N = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rin = 1'b0, ain, phi, phi_n, r2, a2 = 1'b0;
  int checks = 0, failures = 0, cycle = 0;
  int n_pulse = 0, pulse_len = 0, t_phi = 0;

  s_star dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  // Link 2 responder.
  initial forever begin
    wait (rst_n);
    do @(posedge clk); while (!r2);
    repeat ($urandom % 4) @(posedge clk);
    a2 <= 1'b1;
    do @(posedge clk); while (r2);
    repeat ($urandom % 3) @(posedge clk);
    a2 <= 1'b0;
  end

  // Pulse monitor.
  always @(posedge clk) if (rst_n) begin
    if (phi_n !== ~phi) begin failures++; $display("FAIL: phi_n"); end
    if (ain !== a2) begin failures++; $display("FAIL: ain differs from a2"); end
    if (phi) begin
      if (pulse_len == 0) begin n_pulse++; t_phi = cycle; end
      pulse_len++;
      if (r2) begin failures++; $display("FAIL: r2 during phi"); end
    end else pulse_len = 0;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      rin <= 1'b1;
      do @(posedge clk); while (!r2);
      check(cycle - t_phi == 1, $sformatf("r2 %0d cycles after phi, expected 1", cycle - t_phi));
      do @(posedge clk); while (!ain);
      check(r2, "ain while r2 low");
      rin <= 1'b0;
      do @(posedge clk); while (ain);
      check(!r2, "r2 still high after the cycle");
      repeat ($urandom % 3) @(posedge clk);
    end
    check(n_pulse == N, $sformatf("%0d phi pulses for %0d requests", n_pulse, N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (pulse_len > 1) begin
    failures++; $display("FAIL: phi pulse longer than one cycle");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
