// tb_arbiter_circuit: two clients make random four-phase request cycles on the
// arbiter circuit, often at the same time; each client raises out_ack when
// granted and drops it a random time after dropping its request. Checks
// mutual exclusion, that a side is never granted while the other side's
// acknowledge is still up, that every request is eventually granted, that
// simultaneous requests are shared between the two sides, and that in_ack
// follows out_ack.
`timescale 1ns/1ps
module tb_arbiter_circuit;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_req [2] = '{0, 0};
  logic in_ack [2];
  logic out_req [2];
  logic out_ack [2] = '{0, 0};
  int checks = 0, failures = 0, cycle = 0;
  int grants [2] = '{0, 0};
  int n_tie = 0, tie_win [2] = '{0, 0};

  arbiter_circuit dut (
    .clk, .rst_n,
    .in1_req(in_req[0]), .in1_ack(in_ack[0]), .in2_req(in_req[1]), .in2_ack(in_ack[1]),
    .out1_req(out_req[0]), .out1_ack(out_ack[0]), .out2_req(out_req[1]), .out2_ack(out_ack[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  logic prev_g [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    check(!(out_req[0] && out_req[1]), "mutual exclusion");
    for (int k = 0; k < 2; k++) begin
      if (out_req[k] && !prev_g[k]) begin
        check(!out_ack[1-k] && !prev_g[1-k], "granted while the other side still busy");
        grants[k]++;
      end
      check(in_ack[k] == out_ack[k], "in_ack follows out_ack");
      prev_g[k] = out_req[k];
    end
    if (in_req[0] && in_req[1] && !out_req[0] && !out_req[1] && !out_ack[0] && !out_ack[1]) n_tie++;
  end

  for (genvar k = 0; k < 2; k++) begin : g_client
    initial begin
      @(posedge rst_n);
      for (int i = 0; i < 200; i++) begin
        if (k == 0 || $urandom % 2) @(posedge clk);
        in_req[k] <= 1'b1;
        do @(posedge clk); while (!out_req[k]);
        out_ack[k] <= 1'b1;
        repeat ($urandom % 4) @(posedge clk);
        in_req[k] <= 1'b0;
        do @(posedge clk); while (out_req[k]);
        repeat ($urandom % 3) @(posedge clk);
        out_ack[k] <= 1'b0;
        @(posedge clk);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (grants[0] == 200 && grants[1] == 200);
    repeat (5) @(posedge clk);
    // Directed ties: both request on the same edge; the winners must alternate.
    begin
      int last_w = -1;
      for (int t = 0; t < 6; t++) begin
        int w;
        in_req[0] <= 1'b1; in_req[1] <= 1'b1;
        do @(posedge clk); while (!(out_req[0] || out_req[1]));
        w = out_req[0] ? 0 : 1;
        if (last_w >= 0) check(w != last_w, "tie winners alternate");
        last_w = w;
        in_req[0] <= 1'b0; in_req[1] <= 1'b0;   // withdraw both
        repeat (3) @(posedge clk);
        check(!out_req[0] && !out_req[1], "grant dropped after withdrawal");
      end
    end
    check(n_tie > 0, "simultaneous requests happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (grants %0d %0d)", grants[0], grants[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
