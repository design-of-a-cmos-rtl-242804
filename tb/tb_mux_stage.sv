// tb_mux_stage: a controller model drives the dual-rail select c0/c1 with a
// four-phase handshake on ack, choosing d0 or d1 at random, while a consumer
// takes the bytes from rout/aout with random delays. Checks that each output
// byte is the selected input, in order, that ack comes 2 cycles after the
// select is seen on an idle module, and that rout follows one cycle later.
`timescale 1ns/1ps
module tb_mux_stage;
  localparam int W = 9, N = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic c0 = 1'b0, c1 = 1'b0, ack, rout, aout = 1'b0;
  logic [W-1:0] d0 = '0, d1 = '0, dout;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, cycle = 0, n0 = 0, n1 = 0;

  mux_stage dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  int t0, ta, tr;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    d0 <= 9'h011; d1 <= 9'h122;
    c1 <= 1'b1;
    @(posedge clk); t0 = cycle;
    fork
      begin do @(posedge clk); while (!ack); ta = cycle; end
      begin do @(posedge clk); while (!rout); tr = cycle; end
    join
    check(ta - t0 == 2, $sformatf("ack after %0d cycles, expected 2", ta - t0));
    check(tr - t0 == 3, $sformatf("rout after %0d cycles, expected 3", tr - t0));
    check(dout == 9'h122, "c1 selects d1");
    c1 <= 1'b0;
    aout <= 1'b1;
    do @(posedge clk); while (rout || ack);
    aout <= 1'b0;
    fork
      for (int i = 0; i < N; i++) begin
        bit s;
        s = 1'($urandom);
        d0 <= W'($urandom);
        d1 <= W'($urandom);
        @(posedge clk);
        sent.push_back(s ? d1 : d0);
        if (s) begin c1 <= 1'b1; n1++; end else begin c0 <= 1'b1; n0++; end
        do @(posedge clk); while (!ack);
        c0 <= 1'b0; c1 <= 1'b0;
        do @(posedge clk); while (ack);
        repeat ($urandom % 3) @(posedge clk);
      end
      for (int i = 0; i < N; i++) begin
        do @(posedge clk); while (!rout);
        repeat ($urandom % 4) @(posedge clk);
        check(sent.size() > 0 && dout == sent[0], $sformatf("byte %0d: %h", i, dout));
        void'(sent.pop_front());
        aout <= 1'b1;
        do @(posedge clk); while (rout);
        aout <= 1'b0;
      end
    join
    check(n0 > 0 && n1 > 0, "both inputs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
