// tb_ds: two state-machine models send random packets (2 to 6 bytes) into
// one distributed structure, one four-phase request per byte with the fb and
// lb predicates set up before the request; a multiplexor model answers c0/c1
// with ack and drops ack some time after the select falls. Checks that c0 and
// c1 are never both high, that every byte causes exactly one select on its own
// side's rail, that the bytes of a packet are never interleaved with the other
// side's bytes (the arbiter is held from first to last byte), that a request
// is acknowledged only after the multiplexor ack, and that contention between
// the two sides actually happened.
`timescale 1ns/1ps
module tb_ds;
  localparam int NPKT = 120;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req [2] = '{0, 0};
  logic ack [2];
  logic fb [2] = '{1, 1}, lb [2] = '{0, 0};
  logic c0, c1, mux_ack = 1'b0;
  int checks = 0, failures = 0, cycle = 0;
  int sel_cnt [2] = '{0, 0}, sent_cnt [2] = '{0, 0};
  int owner = -1;       // side whose packet is passing the multiplexor
  int n_contend = 0;
  int pk_done [2] = '{0, 0};

  ds dut (
    .clk, .rst_n,
    .ru_req(req[0]), .ru_ack(ack[0]), .fb_u(fb[0]), .lb_u(lb[0]),
    .rd_req(req[1]), .rd_ack(ack[1]), .fb_d(fb[1]), .lb_d(lb[1]),
    .c0, .c1, .mux_ack);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  // Multiplexor model.
  initial forever begin
    wait (rst_n);
    do @(posedge clk); while (!(c0 || c1));
    begin
      int s;
      s = c1 ? 1 : 0;
      check(!(c0 && c1), "dual rail");
      if (owner == -1) begin
        check(fb[s], "a packet starts with a first byte");
        owner = s;
      end
      check(owner == s, $sformatf("side %0d interleaved into side %0d's packet", s, owner));
      sel_cnt[s]++;
      if (lb[s]) owner = -1;
      repeat (1 + $urandom % 2) @(posedge clk);
      mux_ack <= 1'b1;
      do @(posedge clk); while (c0 || c1);
      repeat ($urandom % 4) @(posedge clk);
      mux_ack <= 1'b0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    check(!(c0 && c1), "c0 and c1 both high");
    if (req[0] && req[1] && fb[0] && fb[1]) n_contend++;
    for (int k = 0; k < 2; k++)
      if (ack[k] && !mux_ack && req[k]) check(1'b0, "acknowledge without multiplexor ack");
  end

  for (genvar k = 0; k < 2; k++) begin : g_src
    initial begin
      @(posedge rst_n);
      for (int p = 0; p < NPKT; p++) begin
        int len;
        len = 2 + $urandom % 5;
        for (int b = 0; b < len; b++) begin
          fb[k] <= (b == 0);
          lb[k] <= (b == len - 1);
          @(posedge clk);
          req[k] <= 1'b1;
          do @(posedge clk); while (!ack[k]);
          req[k] <= 1'b0;
          do @(posedge clk); while (ack[k]);
          sent_cnt[k]++;
        end
        pk_done[k]++;
        repeat ($urandom % 3) @(posedge clk);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (pk_done[0] == NPKT && pk_done[1] == NPKT);
    repeat (10) @(posedge clk);
    for (int k = 0; k < 2; k++)
      check(sel_cnt[k] == sent_cnt[k], $sformatf("side %0d: %0d selects for %0d bytes", k, sel_cnt[k], sent_cnt[k]));
    check(n_contend > 0, "contention happened");
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
