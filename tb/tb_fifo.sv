// tb_fifo: four-phase producer and consumer around the FIFO at its default
// depth. Checks the fall-through time of an empty queue (3 cycles per stage),
// that exactly DEPTH words are accepted while the output is not acknowledged,
// and that 500 random words with random stalls come out in order.
`timescale 1ns/1ps
module tb_fifo;
  localparam int W = 9, DEPTH = 4, N = 500;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rin = 1'b0, ain, rout, aout = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, cycle = 0;
  int accepted = 0;

  fifo dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  task automatic put(logic [W-1:0] v);
    sent.push_back(v);
    din <= v;
    @(posedge clk);
    rin <= 1'b1;
    do @(posedge clk); while (!ain);
    rin <= 1'b0;
    do @(posedge clk); while (ain);
    accepted++;
  endtask

  task automatic take(int i);
    do @(posedge clk); while (!rout);
    check(sent.size() > 0 && dout == sent[0], $sformatf("word %0d: %h expected %h", i, dout, sent[0]));
    void'(sent.pop_front());
    aout <= 1'b1;
    do @(posedge clk); while (rout);
    aout <= 1'b0;
  endtask

  int t0, t1;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // Fall-through of one word.
    din <= 9'h0c3; sent.push_back(9'h0c3);
    rin <= 1'b1;
    @(posedge clk); t0 = cycle;
    do @(posedge clk); while (!rout);
    t1 = cycle;
    check(t1 - t0 == 3 * DEPTH, $sformatf("fall-through %0d cycles, expected %0d", t1 - t0, 3 * DEPTH));
    rin <= 1'b0;
    do @(posedge clk); while (ain);
    take(0);
    // Capacity: output held, count accepted words.
    accepted = 0;
    fork
      begin
        for (int i = 0; i < DEPTH + 2; i++) put(W'(i + 16));
      end
      begin
        repeat (200) @(posedge clk);
        check(accepted == DEPTH, $sformatf("%0d words accepted while blocked, expected %0d", accepted, DEPTH));
        for (int i = 0; i < DEPTH + 2; i++) take(i);
      end
    join
    // Random traffic.
    fork
      for (int i = 0; i < N; i++) begin
        put(W'($urandom));
        repeat ($urandom % 3) @(posedge clk);
      end
      for (int i = 0; i < N; i++) begin
        if ($urandom % 10 == 0) repeat (30) @(posedge clk);
        take(i);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
