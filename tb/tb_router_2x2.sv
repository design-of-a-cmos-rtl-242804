// tb_router_2x2: end-to-end test of the two by two router at its default size.
//
// Two producers send random packets (2 to 9 bytes) on the input links; each
// packet's first byte carries the destination in bit 0, the source in bit 1 and
// a serial number in bits 7:2. Two consumers take bytes from the output links,
// sometimes after long pauses so that outputs stall and FIFOs fill up. Each
// output's byte stream is cut into packets at the Last-Byte flag and every
// packet is compared with the next packet expected from its source to that
// destination, so lost, duplicated, reordered, interleaved or misrouted bytes
// are all caught. The test also counts how often each mechanism of the router
// happened (straight and crossing packets, arbiter contention, both outputs
// busy at once, output stall, a full FIFO, engage and release) and fails if
// one never did. A separate phase measures the steady-state cycles per byte of
// one input streaming to one free output.
`timescale 1ns/1ps
module tb_router_2x2;
  import router_pkg::*;

  localparam int NPKT     = 400;  // packets per input in the random phase
  localparam int WATCHDOG = 400000;

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

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef flit_t pkt_t [$];
  pkt_t exp_q [2][2][$];   // [src][dst] queue of packets
  int   n_recv [2] = '{0, 0};
  int   sent_pkts = 0;
  bit   long_stall [2] = '{0, 0};
  bit   stream_mode = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------- producer ----------------
  task automatic send_byte(int i, flit_t f);
    in_data[i] <= f;
    @(posedge clk);
    in_req[i] <= 1'b1;
    do @(posedge clk); while (!in_ack[i]);
    in_req[i] <= 1'b0;
    do @(posedge clk); while (in_ack[i]);
  endtask

  task automatic send_packet(int src, int dst, int len, int serial, bit gaps);
    pkt_t p;
    flit_t f;
    for (int b = 0; b < len; b++) begin
      f.lb = (b == len - 1);
      if (b == 0) f.data = {serial[5:0], src[0], dst[0]};
      else        f.data = 8'($urandom);
      p.push_back(f);
    end
    exp_q[src][dst].push_back(p);
    foreach (p[b]) begin
      send_byte(src, p[b]);
      if (gaps && ($urandom % 4 == 0)) repeat ($urandom % 4) @(posedge clk);
    end
    sent_pkts++;
  endtask

  // ---------------- consumers ----------------
  pkt_t cur [2];
  for (genvar o = 0; o < 2; o++) begin : g_sink
    initial begin
      wait (rst_n);
      forever begin
        do @(posedge clk); while (!out_req[o]);
        if (!stream_mode) begin
          if (long_stall[o]) repeat (60 + $urandom % 60) @(posedge clk);
          else if ($urandom % 3 == 0) repeat ($urandom % 6) @(posedge clk);
        end
        cur[o].push_back(out_data[o]);
        if (out_data[o].lb) check_packet(o);
        out_ack[o] <= 1'b1;
        do @(posedge clk); while (out_req[o]);
        out_ack[o] <= 1'b0;
      end
    end
  end

  task automatic check_packet(int o);
    pkt_t p, e;
    int src;
    p = cur[o];
    cur[o] = {};
    checks++;
    src = int'(p[0].data[1]);
    if (p[0].data[0] != o[0]) begin
      fail($sformatf("output %0d got a packet addressed to %0d", o, p[0].data[0]));
      return;
    end
    if (exp_q[src][o].size() == 0) begin
      fail($sformatf("output %0d got an unexpected packet from %0d", o, src));
      return;
    end
    e = exp_q[src][o].pop_front();
    if (p.size() != e.size()) fail($sformatf("output %0d: length %0d, expected %0d", o, p.size(), e.size()));
    else foreach (p[b]) if (p[b] != e[b]) begin
      fail($sformatf("output %0d byte %0d: %h expected %h", o, b, p[b], e[b]));
      break;
    end
    n_recv[o]++;
  endtask

  // ---------------- mechanism counters ----------------
  int n_straight = 0, n_cross = 0, n_contend = 0, n_parallel = 0;
  int n_outstall = 0, n_fifo_full = 0, n_engage = 0, n_release = 0;
  logic prev_rel [2], prev_wait [2], prev_par, prev_full [2];
  int   stall_run [2];

  wire eng_u0 = dut.g_port[0].u_ctl.g_upper.u_ds.eng_u_req;
  wire eng_d0 = dut.g_port[0].u_ctl.g_upper.u_ds.eng_d_req;
  wire eng_u1 = dut.g_port[1].u_ctl.g_lower.u_ds.eng_u_req;
  wire eng_d1 = dut.g_port[1].u_ctl.g_lower.u_ds.eng_d_req;
  wire eng_s [4] = '{eng_u0, eng_d0, eng_u1, eng_d1};
  logic prev_eng_s [4];
  wire rel_any [2] = '{dut.g_port[0].u_ctl.g_upper.u_ds.rel_u_req | dut.g_port[0].u_ctl.g_upper.u_ds.rel_d_req,
                       dut.g_port[1].u_ctl.g_lower.u_ds.rel_u_req | dut.g_port[1].u_ctl.g_lower.u_ds.rel_d_req};
  // An engage request waiting while the other input holds the arbiter.
  wire wait_any [2] = '{(eng_u0 & dut.g_port[0].u_ctl.g_upper.u_ds.u_arb.g2) |
                        (eng_d0 & dut.g_port[0].u_ctl.g_upper.u_ds.u_arb.g1),
                        (eng_u1 & dut.g_port[1].u_ctl.g_lower.u_ds.u_arb.g2) |
                        (eng_d1 & dut.g_port[1].u_ctl.g_lower.u_ds.u_arb.g1)};
  wire par = (dut.g_port[0].u_ctl.g_upper.u_ds.u_arb.g1 | dut.g_port[0].u_ctl.g_upper.u_ds.u_arb.g2) &
             (dut.g_port[1].u_ctl.g_lower.u_ds.u_arb.g1 | dut.g_port[1].u_ctl.g_lower.u_ds.u_arb.g2) &
             out_req[0] & out_req[1];
  wire full [2] = '{dut.g_port[0].u_fifo.r[1] & dut.g_port[0].u_fifo.r[2] &
                    dut.g_port[0].u_fifo.r[3] & dut.g_port[0].u_fifo.r[4],
                    dut.g_port[1].u_fifo.r[1] & dut.g_port[1].u_fifo.r[2] &
                    dut.g_port[1].u_fifo.r[3] & dut.g_port[1].u_fifo.r[4]};

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) begin
      if (rel_any[k] && !prev_rel[k]) n_release++;
      if (wait_any[k] && !prev_wait[k]) n_contend++;
      if (full[k] && !prev_full[k]) n_fifo_full++;
      if (out_req[k] && !out_ack[k]) stall_run[k]++; else stall_run[k] = 0;
      if (stall_run[k] == 20) n_outstall++;
      prev_rel[k] = rel_any[k];
      prev_wait[k] = wait_any[k]; prev_full[k] = full[k];
    end
    for (int k = 0; k < 4; k++) begin
      if (eng_s[k] && !prev_eng_s[k]) n_engage++;
      prev_eng_s[k] = eng_s[k];
    end
    if (par && !prev_par) n_parallel++;
    prev_par = par;
  end

  task automatic expect_seen(string name, int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) fail($sformatf("mechanism never happened: %s", name));
  endtask

  // ---------------- main ----------------
  // Output byte rate while streaming, worked out by hand from the handshake
  // chain with one cycle per state-holding element. Edge 0: the FIFO head
  // raises its request. 1: S* delay register -> ru -> D(fb) -> UD -> c0.
  // 2: mux x0, LOAD0. 3: mux DONE -> Ack -> D(lb) -> fsm ack -> FIFO head
  // aout. 4: head rout falls. 5: S* delay register clears -> ru and c0 fall;
  // head x rises for the next byte. 6: mux x0 falls; head DONE rises.
  // 7: mux DONE falls -> Ack -> fsm ack falls. 8: head rout rises again.
  localparam int STREAM_CPB = 8;
  int n_rise = 0, t_first = 0, t_last = 0;
  logic prev_oreq0 = 1'b0;
  always @(posedge clk) begin
    if (stream_mode && out_req[0] && !prev_oreq0) begin
      if (n_rise == 0) t_first = cycle;
      t_last = cycle;
      n_rise++;
    end
    prev_oreq0 = out_req[0];
  end
  initial begin
    in_data[0] = '0;
    in_data[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // Phase 1: random traffic from both inputs.
    fork
      for (int k = 0; k < NPKT; k++) begin
        int dst;
        dst = $urandom % 2;
        if (dst == 0) n_straight++; else n_cross++;
        send_packet(0, dst, 2 + $urandom % 8, k, 1'b1);
      end
      for (int k = 0; k < NPKT; k++) begin
        int dst;
        dst = $urandom % 2;
        if (dst == 1) n_straight++; else n_cross++;
        send_packet(1, dst, 2 + $urandom % 8, k, 1'b1);
      end
      begin
        // Stall each output for a while at times so that the queues fill.
        repeat (4) begin
          repeat (2000) @(posedge clk);
          long_stall[$urandom % 2] = 1'b1;
          repeat (800) @(posedge clk);
          long_stall = '{0, 0};
        end
      end
    join
    wait (n_recv[0] + n_recv[1] == 2 * NPKT);
    repeat (20) @(posedge clk);
    for (int s = 0; s < 2; s++) for (int d = 0; d < 2; d++) begin
      checks++;
      if (exp_q[s][d].size() != 0) fail($sformatf("%0d packets from %0d to %0d never arrived", exp_q[s][d].size(), s, d));
    end

    // Phase 2: one input streams a long packet to a free output, consumer
    // always ready; measure steady-state cycles per byte.
    stream_mode = 1;
    n_rise = 0;
    send_packet(0, 0, 40, 63, 1'b0);
    wait (exp_q[0][0].size() == 0);
    repeat (4) @(posedge clk);
    $display("stream of 40 bytes: first output byte at %0d, last at %0d: %0.2f cycles/byte",
             t_first, t_last, real'(t_last - t_first) / 39.0);
    checks++;
    if (n_rise != 40) fail($sformatf("stream: %0d output bytes seen, expected 40", n_rise));
    checks++;
    if (t_last - t_first != 39 * STREAM_CPB)
      fail($sformatf("stream: %0d cycles for 39 byte intervals, expected %0d", t_last - t_first, 39 * STREAM_CPB));

    $display("mechanisms:");
    expect_seen("straight packets", n_straight);
    expect_seen("crossing packets", n_cross);
    expect_seen("arbiter engage", n_engage);
    expect_seen("arbiter release", n_release);
    expect_seen("arbiter contention waits", n_contend);
    expect_seen("both outputs busy", n_parallel);
    expect_seen("output stalls", n_outstall);
    expect_seen("fifo full", n_fifo_full);
    checks++;
    if (n_engage != 2 * NPKT + 1 || n_release != 2 * NPKT + 1)
      fail($sformatf("engage %0d / release %0d, expected %0d each", n_engage, n_release, 2 * NPKT + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (received %0d + %0d packets)", n_recv[0], n_recv[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
