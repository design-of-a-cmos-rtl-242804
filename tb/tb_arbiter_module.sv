// tb_arbiter_module: two ports each run random "packets": an Engage
// handshake, a random number of cycles holding, then a Release handshake. A
// scoreboard checks that the two ports are never engaged at the same time
// (engaged = from eng_ack rising to the Release request), that each engage
// and release is acknowledged, and that a port really waits while the other
// holds the arbiter.
`timescale 1ns/1ps
module tb_arbiter_module;
  logic clk = 1'b0, rst_n = 1'b0;
  logic eng_req [2] = '{0, 0}, rel_req [2] = '{0, 0};
  logic eng_ack [2], rel_ack [2];
  bit   owner [2] = '{0, 0};
  int checks = 0, failures = 0, cycle = 0, n_wait = 0;
  int done_pk [2] = '{0, 0};

  arbiter_module dut (
    .clk, .rst_n,
    .eng1_req(eng_req[0]), .eng1_ack(eng_ack[0]), .rel1_req(rel_req[0]), .rel1_ack(rel_ack[0]),
    .eng2_req(eng_req[1]), .eng2_ack(eng_ack[1]), .rel2_req(rel_req[1]), .rel2_ack(rel_ack[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(!(owner[0] && owner[1]), "both ports engaged");
    if ((eng_req[0] && owner[1]) || (eng_req[1] && owner[0])) n_wait++;
  end

  for (genvar k = 0; k < 2; k++) begin : g_port
    initial begin
      @(posedge rst_n);
      for (int i = 0; i < 100; i++) begin
        repeat ($urandom % 3) @(posedge clk);
        eng_req[k] <= 1'b1;
        do @(posedge clk); while (!eng_ack[k]);
        owner[k] = 1'b1;
        eng_req[k] <= 1'b0;
        do @(posedge clk); while (eng_ack[k]);
        repeat ($urandom % 8) @(posedge clk);
        owner[k] = 1'b0;
        rel_req[k] <= 1'b1;
        do @(posedge clk); while (!rel_ack[k]);
        repeat ($urandom % 3) @(posedge clk);
        rel_req[k] <= 1'b0;
        do @(posedge clk); while (rel_ack[k]);
        done_pk[k]++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (done_pk[0] == 100 && done_pk[1] == 100);
    check(n_wait > 0, "a port waited for the other");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (%0d %0d)", done_pk[0], done_pk[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
