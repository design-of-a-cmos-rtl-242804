// tb_ud_module: runs handshakes through the Union/Decision module from one
// side at a time, chosen at random, with a multiplexor model that raises ack
// one cycle after c0/c1 and drops it a random time after they fall. Checks
// that the upper side raises only c0 and the lower only c1, that ack reaches
// only the requesting side (also when the other side is enabled but has no
// link request), and that the side's outputs stay up after its
// link request drops until its enable drops.
`timescale 1ns/1ps
module tb_ud_module;
  logic clk = 1'b0, rst_n = 1'b0;
  logic e0 = 1'b0, e1 = 1'b0, req_u = 1'b0, req_d = 1'b0, ack_u, ack_d, c0, c1, ack = 1'b0;
  int checks = 0, failures = 0, cycle = 0, nu = 0, nd = 0;

  ud_module dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  initial forever begin
    @(posedge clk);
    if (!rst_n) ack <= 1'b0;
    else if (c0 || c1) ack <= 1'b1;
    else if ($urandom % 2) ack <= 1'b0;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      bit s;
      s = 1'($urandom);
      if (s) nd++; else nu++;
      do @(posedge clk); while (ack);
      // The other side's enable may be up with no link request, as when that
      // side waits at the arbiter: it must get nothing.
      if (s) begin e1 <= 1'b1; req_d <= 1'b1; e0 <= 1'($urandom); end
      else   begin e0 <= 1'b1; req_u <= 1'b1; e1 <= 1'($urandom); end
      @(posedge clk); #1;
      check(c0 == !s && c1 == s, "select rail matches requesting side");
      do @(posedge clk); while (!(ack_u || ack_d));
      #1 check(ack_u == !s && ack_d == s, "ack returned to requesting side only");
      // link request drops first: outputs held by the enable
      req_u <= 1'b0; req_d <= 1'b0;
      @(posedge clk); #1;
      check((c0 | c1) && (ack_u | ack_d), "outputs held while enabled");
      e0 <= 1'b0; e1 <= 1'b0;
      @(posedge clk); #1;
      check(!c0 && !c1 && !ack_u && !ack_d, "outputs low after enable falls");
    end
    check(nu > 0 && nd > 0, "both sides used");
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
