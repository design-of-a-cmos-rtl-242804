// tb_router_workloads: timing and sharing measurements on the router at its
// default size, alongside the end-to-end test.
//
// 1. Latency: one 2-byte packet into an empty router. The first byte's
//    output request must come 17 cycles after its input request is seen:
//    12 cycles through the four FIFO stages, then S* (1), the arbiter grant
//    (1), the multiplexor's x and DONE (2) and its rout C-element (1).
// 2. Parallel streams: input 0 streams to output 0 and input 1 to output 1
//    at the same time, consumers always ready. Each output must run at the
//    single-stream rate of 8 cycles per byte, i.e. the two paths do not slow
//    each other.
// 3. Sharing: both inputs send a run of packets to output 0 back to back.
//    The arbiter must hand the output over at every packet boundary, so the
//    sources of consecutive packets at output 0 alternate, and every packet
//    must arrive intact.
`timescale 1ns/1ps
module tb_router_workloads;
  import router_pkg::*;

  localparam int LATENCY = 17;
  localparam int CPB     = 8;
  localparam int NSHARE  = 20;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [1:0]  in_req = '0;
  logic [1:0]  in_ack;
  flit_t       in_data [2];
  logic [1:0]  out_req;
  logic [1:0]  out_ack = '0;
  flit_t       out_data [2];

  router_2x2 dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  task automatic send_byte(int i, flit_t f);
    in_data[i] <= f;
    @(posedge clk);
    in_req[i] <= 1'b1;
    do @(posedge clk); while (!in_ack[i]);
    in_req[i] <= 1'b0;
    do @(posedge clk); while (in_ack[i]);
  endtask

  task automatic send_packet(int src, int dst, int len, int tag);
    for (int b = 0; b < len; b++) begin
      flit_t f;
      f.lb = (b == len - 1);
      f.data = (b == 0) ? 8'({tag[5:0], src[0], dst[0]}) : 8'(b);
      send_byte(src, f);
    end
  endtask

  // Always-ready consumers that log each output byte and the cycle of its
  // request edge.
  flit_t log_d [2][$];
  int    log_t [2][$];
  logic  prev_req [2] = '{0, 0};
  for (genvar o = 0; o < 2; o++) begin : g_sink
    always @(posedge clk) begin
      if (rst_n && out_req[o] && !prev_req[o]) begin
        log_d[o].push_back(out_data[o]);
        log_t[o].push_back(cycle);
      end
      prev_req[o] <= out_req[o];
      out_ack[o]  <= rst_n && out_req[o];
    end
  end

  int t_in;
  initial begin
    in_data[0] = '0;
    in_data[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. Latency.
    fork
      send_packet(0, 1, 2, 1);
      begin
        do @(posedge clk); while (!in_req[0]);
        t_in = cycle;
      end
    join
    wait (log_t[1].size() == 2);
    $display("latency, first byte: %0d cycles", log_t[1][0] - t_in);
    check(log_t[1][0] - t_in == LATENCY, $sformatf("latency %0d, expected %0d", log_t[1][0] - t_in, LATENCY));
    repeat (20) @(posedge clk);
    log_t[1] = {}; log_d[1] = {};

    // 2. Two parallel streams of 30 bytes.
    fork
      send_packet(0, 0, 30, 2);
      send_packet(1, 1, 30, 3);
    join
    wait (log_t[0].size() == 30 && log_t[1].size() == 30);
    for (int o = 0; o < 2; o++) begin
      int span;
      span = log_t[o][29] - log_t[o][10];
      $display("output %0d under parallel load: %0.2f cycles/byte", o, real'(span) / 19.0);
      check(span == 19 * CPB, $sformatf("output %0d: %0d cycles for 19 bytes, expected %0d", o, span, 19 * CPB));
      check(log_d[o][0].data[1:0] == 2'(o * 3), "stream routed straight through");
    end
    repeat (20) @(posedge clk);
    log_t[0] = {}; log_d[0] = {};
    log_t[1] = {}; log_d[1] = {};

    // 3. Both inputs share output 0.
    fork
      for (int k = 0; k < NSHARE; k++) send_packet(0, 0, 3, k);
      for (int k = 0; k < NSHARE; k++) send_packet(1, 0, 3, k);
    join
    wait (log_d[0].size() == 2 * 3 * NSHARE);
    begin
      int prev_src, n_alt, next_tag [2];
      prev_src = -1; n_alt = 0; next_tag = '{0, 0};
      for (int p = 0; p < 2 * NSHARE; p++) begin
        int src;
        src = int'(log_d[0][3 * p].data[1]);
        check(log_d[0][3 * p].data[7:2] == 6'(next_tag[src]), "packets of one source in order");
        next_tag[src]++;
        check(log_d[0][3 * p + 1] == flit_t'({1'b0, 8'd1}) && log_d[0][3 * p + 2] == flit_t'({1'b1, 8'd2}),
              "packet body intact and not interleaved");
        if (prev_src >= 0 && src != prev_src) n_alt++;
        prev_src = src;
      end
      $display("shared output: %0d hand-overs in %0d packets", n_alt, 2 * NSHARE);
      // The first packet may start before the other input's arrives, so
      // allow one non-alternation at each end.
      check(n_alt >= 2 * NSHARE - 3, $sformatf("only %0d hand-overs between sources", n_alt));
    end
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
