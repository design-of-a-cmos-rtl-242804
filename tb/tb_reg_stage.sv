// tb_reg_stage: four-phase producer and consumer around one register module.
// Sends 300 random words with random gaps and consumer delays and checks that
// they come out in order and intact. Also checks the timing of an empty stage:
// with the request seen at edge k, ain is high after edge k+2 and rout after
// edge k+3 (x, then DONE, then the rout C-element).
`timescale 1ns/1ps
module tb_reg_stage;
  localparam int W = 9, N = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rin = 1'b0, ain, rout, aout = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, cycle = 0;

  reg_stage #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  int t_req, t_ain, t_rout;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // Timing of a single word through an empty stage.
    din <= 9'h1a5;
    rin <= 1'b1;
    @(posedge clk); t_req = cycle;
    fork
      begin do @(posedge clk); while (!ain); t_ain = cycle; end
      begin do @(posedge clk); while (!rout); t_rout = cycle; end
    join
    check(t_ain - t_req == 2, $sformatf("ain after %0d cycles, expected 2", t_ain - t_req));
    check(t_rout - t_req == 3, $sformatf("rout after %0d cycles, expected 3", t_rout - t_req));
    check(dout == 9'h1a5, "first word");
    rin <= 1'b0;
    do @(posedge clk); while (ain);
    aout <= 1'b1;
    do @(posedge clk); while (rout);
    aout <= 1'b0;
    // Random stream.
    fork
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] v;
        v = W'($urandom);
        sent.push_back(v);
        din <= v;
        @(posedge clk);
        rin <= 1'b1;
        do @(posedge clk); while (!ain);
        rin <= 1'b0;
        din <= W'($urandom);  // data may change once acknowledged
        do @(posedge clk); while (ain);
        repeat ($urandom % 3) @(posedge clk);
      end
      for (int i = 0; i < N; i++) begin
        do @(posedge clk); while (!rout);
        repeat ($urandom % 5) @(posedge clk);
        check(sent.size() > 0 && dout == sent[0], $sformatf("word %0d: %h", i, dout));
        void'(sent.pop_front());
        aout <= 1'b1;
        do @(posedge clk); while (rout);
        aout <= 1'b0;
      end
    join
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
