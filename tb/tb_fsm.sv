// tb_fsm: feeds the state machine a stream of random packets (2 to 6 bytes,
// random address bit in bit 0 of the first byte) over a four-phase link, and
// answers the ru/rd requests like the distributed structures do. For every
// byte it checks that exactly one of ru/rd is raised and that it is the one
// chosen by the packet's first byte (ru for 0, rd for 1), and that fb, lb and
// dir are correct while the request is up.
`timescale 1ns/1ps
module tb_fsm;
  localparam int NPKT = 150;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rin = 1'b0, ain, d0_in = 1'b0, lb_in = 1'b0;
  logic fb, lb, ru_req, ru_ack = 1'b0, rd_req, rd_ack = 1'b0;
  int checks = 0, failures = 0, cycle = 0, nu = 0, nd = 0;

  fsm dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NPKT; k++) begin
      int len;
      bit addr;
      len  = 2 + $urandom % 5;
      addr = 1'($urandom);
      if (addr) nd++; else nu++;
      for (int b = 0; b < len; b++) begin
        bit first, last;
        first = (b == 0);
        last  = (b == len - 1);
        d0_in <= first ? addr : 1'($urandom);
        lb_in <= last;
        @(posedge clk);
        rin <= 1'b1;
        do @(posedge clk); while (!(ru_req || rd_req));
        check(ru_req != rd_req, "exactly one request");
        check(rd_req == addr, $sformatf("packet %0d byte %0d went to the wrong side", k, b));
        check(fb == first && lb == last && dut.dir == addr,
              $sformatf("predicates fb=%b lb=%b dir=%b, expected %b %b %b", fb, lb, dut.dir, first, last, addr));
        repeat ($urandom % 3) @(posedge clk);
        if (ru_req) ru_ack <= 1'b1; else rd_ack <= 1'b1;
        do @(posedge clk); while (!ain);
        rin <= 1'b0;
        d0_in <= 1'($urandom);
        do @(posedge clk); while (ru_req || rd_req);
        ru_ack <= 1'b0; rd_ack <= 1'b0;
        do @(posedge clk); while (ain);
      end
    end
    check(nu > 0 && nd > 0, "both directions used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
