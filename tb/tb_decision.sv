// tb_decision: checks both forms of the D-module. The static two-way module
// (as in the state machine) gets random handshakes with a random predicate and
// must route each request to T or F and return that link's acknowledge. The
// domino one-way module (as in the distributed structure) must pass true
// requests to T, acknowledge false ones at once, and hold its outputs high
// after its inputs fall until the enable falls.
`timescale 1ns/1ps
module tb_decision;
  logic clk = 1'b0, rst_n = 1'b0;
  // static two-way
  logic p = 1'b0, req = 1'b0, ack, t_req, t_ack = 1'b0, f_req, f_ack = 1'b0;
  // domino one-way
  logic e2 = 1'b0, p2 = 1'b0, req2 = 1'b0, ack2, t_req2, t_ack2 = 1'b0, f_req2;
  int checks = 0, failures = 0, cycle = 0, nt = 0, nf = 0;

  decision #(.TWO_WAY(1'b1), .DOMINO(1'b0)) u_s (
    .clk, .rst_n, .e(1'b1), .p, .req, .ack, .t_req, .t_ack, .f_req, .f_ack);
  decision #(.TWO_WAY(1'b0), .DOMINO(1'b1)) u_d (
    .clk, .rst_n, .e(e2), .p(p2), .req(req2), .ack(ack2),
    .t_req(t_req2), .t_ack(t_ack2), .f_req(f_req2), .f_ack(1'b0));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  // T/F responders of the static module.
  initial forever begin
    @(posedge clk);
    if (rst_n) t_ack <= t_req;
    if (rst_n) f_ack <= f_req;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      bit pv;
      pv = 1'($urandom);
      p <= pv;
      @(posedge clk);
      req <= 1'b1;
      @(posedge clk); #1;
      check(t_req == pv && f_req == !pv, "static: request routed by predicate");
      if (pv) nt++; else nf++;
      do @(posedge clk); while (!ack);
      req <= 1'b0;
      do @(posedge clk); while (ack);
      #1 check(!t_req && !f_req, "static: requests low after return to zero");
    end
    check(nt > 0 && nf > 0, "both predicate values used");

    // Domino one-way form.
    for (int i = 0; i < 100; i++) begin
      bit pv;
      pv = 1'($urandom);
      @(negedge clk);
      p2 = pv; e2 = 1'b1; req2 = 1'b1;
      #1;
      check(t_req2 == pv, "domino: T request iff predicate true");
      check(ack2 == !pv, "domino: false predicate acknowledged at once");
      check(f_req2 == 1'b0, "domino: no F link in one-way form");
      if (pv) begin
        @(negedge clk); t_ack2 = 1'b1; #1;
        check(ack2, "domino: T acknowledge returned");
      end
      // Inputs fall while the enable stays: outputs must hold.
      @(negedge clk); req2 = 1'b0; t_ack2 = 1'b0; p2 = ~pv;
      @(negedge clk); #1;
      check(ack2 && t_req2 == pv, "domino: outputs held while enabled");
      @(negedge clk); e2 = 1'b0; #1;
      check(!ack2 && !t_req2, "domino: outputs low when enable falls");
      @(negedge clk); e2 = 1'b1; #1;
      check(!ack2 && !t_req2, "domino: outputs stay low on a fresh enable with no request");
      @(negedge clk); e2 = 1'b0;
    end
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
