// router_2x2: self-timed two by two packet router.
//
// Packets arrive byte-serially on two input links (index 0 = upper, 1 =
// lower), each byte carrying a Last-Byte flag. Bit 0 of a packet's first byte
// is its address: 0 sends the packet to the upper output, 1 to the lower. The
// router is a store-and-forward element of a multiprocessor network.
//
// Each input has a FIFO of self-timed register modules. The FIFO's head byte is
// offered to both output multiplexors and to that input's state machine, which
// works out whether the byte is a first or last byte and which output it goes
// to, and sends a request to that output's distributed structure. The
// structure engages the output's arbiter on a packet's first byte (so a packet
// from the other input waits), selects the input at the multiplexor with the
// dual-rail pair c0/c1, and releases the arbiter on the last byte. The
// multiplexor latches the byte and offers it on the output link. Both outputs
// work at the same time when the two inputs go to different outputs.
//
// Every link is a four-phase request/acknowledge handshake with bundled data:
// data stay valid from req rising until ack rises. The address bit is not
// stripped or rotated (the description does not say it is). Packets must be
// at least two bytes long.
//
// Timing: the self-timed circuit is emulated with one clock cycle per gate or
// state-holding element delay; all flip-flops share clk and the active-low
// asynchronous reset rst_n.
module router_2x2 #(
  parameter int unsigned DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          in_req,
  output logic [1:0]          in_ack,
  input  router_pkg::flit_t   in_data [2],
  output logic [1:0]          out_req,
  input  logic [1:0]          out_ack,
  output router_pkg::flit_t   out_data [2]
);

  localparam int unsigned W = router_pkg::FLIT_W;

  logic              q_req [2];
  logic              q_ack [2];
  router_pkg::flit_t q_data [2];
  logic              c0 [2], c1 [2], m_ack [2];
  logic              fb [2], lb [2];
  logic              x_req [2], x_ack [2];  // crossing request of input i and its ack

  for (genvar i = 0; i < 2; i++) begin : g_port
    fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .rin(in_req[i]), .ain(in_ack[i]), .din(in_data[i]),
      .rout(q_req[i]), .aout(q_ack[i]), .dout(q_data[i]));

    mux_stage #(.W(W)) u_mux (
      .clk, .rst_n,
      .c0(c0[i]), .c1(c1[i]), .ack(m_ack[i]),
      .d0(q_data[0]), .d1(q_data[1]),
      .rout(out_req[i]), .aout(out_ack[i]), .dout(out_data[i]));

    system_controller #(.LOWER(i == 1)) u_ctl (
      .clk, .rst_n,
      .rin(q_req[i]), .ain(q_ack[i]),
      .d0_in(q_data[i].data[0]), .lb_in(q_data[i].lb),
      .c0(c0[i]), .c1(c1[i]), .mux_ack(m_ack[i]),
      .fb(fb[i]), .lb(lb[i]), .fb_o(fb[1-i]), .lb_o(lb[1-i]),
      .x_req(x_req[i]),   .x_ack(x_ack[i]),
      .y_req(x_req[1-i]), .y_ack(x_ack[1-i]));
  end

endmodule
