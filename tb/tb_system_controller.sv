// tb_system_controller: the two system controllers wired together as in the
// router, with a model of each input FIFO's head (offering one byte at a time
// over a four-phase link with its address bit and Last-Byte flag) and a model
// of each output multiplexor (answering c0/c1 with ack). Random packets of 2
// to 6 bytes with random destinations are sent from both inputs. Checks that
// every byte is selected exactly once, at the output its packet's first byte
// addressed, from the right input rail, that packets are not interleaved at
// an output, that the selects are dual-rail, and that both straight and
// crossing traffic and contention occurred.
`timescale 1ns/1ps
module tb_system_controller;
  localparam int NPKT = 120;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rin [2] = '{0, 0};
  logic ain [2];
  logic d0 [2] = '{0, 0}, lbi [2] = '{0, 0};
  logic c0 [2], c1 [2];
  logic mack [2] = '{0, 0};
  logic fb [2], lb [2];
  logic x_req [2], x_ack [2];
  int checks = 0, failures = 0, cycle = 0;
  int cur_dst [2] = '{0, 0};
  bit cur_first [2] = '{0, 0};
  int owner [2] = '{-1, -1};
  int pk_done [2] = '{0, 0};
  int n_sel = 0, n_sent = 0, n_cross = 0, n_straight = 0, n_contend = 0;
  bit selected [2];

  for (genvar i = 0; i < 2; i++) begin : g_ctl
    system_controller #(.LOWER(i == 1)) u_ctl (
      .clk, .rst_n,
      .rin(rin[i]), .ain(ain[i]), .d0_in(d0[i]), .lb_in(lbi[i]),
      .c0(c0[i]), .c1(c1[i]), .mux_ack(mack[i]),
      .fb(fb[i]), .lb(lb[i]), .fb_o(fb[1-i]), .lb_o(lb[1-i]),
      .x_req(x_req[i]), .x_ack(x_ack[i]),
      .y_req(x_req[1-i]), .y_ack(x_ack[1-i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (rin[0] && rin[1] && cur_first[0] && cur_first[1] && cur_dst[0] == cur_dst[1]) n_contend++;
  end

  // Output multiplexor models.
  for (genvar o = 0; o < 2; o++) begin : g_mux
    initial forever begin
      wait (rst_n);
      do @(posedge clk); while (!(c0[o] || c1[o]));
      begin
        int s;
        s = c1[o] ? 1 : 0;
        check(!(c0[o] && c1[o]), "dual rail");
        check(rin[s] && !selected[s], $sformatf("output %0d selected input %0d with no new byte", o, s));
        check(cur_dst[s] == o, $sformatf("input %0d byte for output %0d selected at %0d", s, cur_dst[s], o));
        if (owner[o] == -1) begin
          check(cur_first[s], "packet starts with its first byte");
          owner[o] = s;
        end
        check(owner[o] == s, "packets interleaved at an output");
        if (lbi[s]) owner[o] = -1;
        selected[s] = 1'b1;
        n_sel++;
        repeat (1 + $urandom % 2) @(posedge clk);
        mack[o] <= 1'b1;
        do @(posedge clk); while (c0[o] || c1[o]);
        repeat ($urandom % 3) @(posedge clk);
        mack[o] <= 1'b0;
      end
    end
  end

  // Input FIFO head models.
  for (genvar i = 0; i < 2; i++) begin : g_src
    initial begin
      @(posedge rst_n);
      for (int p = 0; p < NPKT; p++) begin
        int len, dst;
        len = 2 + $urandom % 5;
        dst = $urandom % 2;
        if (dst == i) n_straight++; else n_cross++;
        for (int b = 0; b < len; b++) begin
          d0[i]  <= (b == 0) ? dst[0] : 1'($urandom);
          lbi[i] <= (b == len - 1);
          cur_dst[i] = dst;
          cur_first[i] = (b == 0);
          selected[i] = 1'b0;
          @(posedge clk);
          rin[i] <= 1'b1;
          do @(posedge clk); while (!ain[i]);
          check(selected[i], $sformatf("input %0d acknowledged before its byte was taken", i));
          rin[i] <= 1'b0;
          do @(posedge clk); while (ain[i]);
          n_sent++;
        end
        pk_done[i]++;
        repeat ($urandom % 3) @(posedge clk);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (pk_done[0] == NPKT && pk_done[1] == NPKT);
    repeat (10) @(posedge clk);
    check(n_sel == n_sent, $sformatf("%0d selects for %0d bytes", n_sel, n_sent));
    check(n_cross > 0 && n_straight > 0, "straight and crossing traffic");
    check(n_contend > 0, "contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
