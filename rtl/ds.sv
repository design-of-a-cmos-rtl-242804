// ds: distributed control structure of one router output.
//
// Two request links arrive, one from each input's state machine: ru from the
// upper input, rd from the lower input, each with that input's predicates fb
// (first byte) and lb (last byte). For each link a Sequence module activates
// three links in turn:
//   1. a D-module on fb: on a first byte, Engage the arbiter for this link;
//      otherwise acknowledge at once;
//   2. the UD-module: raise c0 (upper input) or c1 (lower input) to the
//      multiplexor and wait for its ack;
//   3. a D-module on lb: on a last byte, Release the arbiter; otherwise
//      acknowledge at once;
// and then acknowledges the state machine. Because the arbiter stays engaged
// from a packet's first byte to its last, the bytes of one packet leave the
// output together and a packet from the other input waits at step 1.
//
// The Sequence modules are plain wiring, each link's acknowledge being the
// next link's request, so that the whole chain returns to zero in parallel.
// The D-module on fb and the UD-module are domino gates enabled by the
// incoming request (one domain); the D-module on lb is enabled by the
// multiplexor's ack (a second domain), which holds the acknowledge to the
// state machine until the multiplexor has finished its own cycle. This
// partitioning follows the design.
//
// Timing: combinational from request to engage and to c0/c1; the arbiter adds
// one cycle per engage and per release.
module ds (
  input  logic clk,
  input  logic rst_n,
  // link from the upper input's state machine
  input  logic ru_req,
  output logic ru_ack,
  input  logic fb_u,
  input  logic lb_u,
  // link from the lower input's state machine
  input  logic rd_req,
  output logic rd_ack,
  input  logic fb_d,
  input  logic lb_d,
  // multiplexor
  output logic c0,
  output logic c1,
  input  logic mux_ack
);

  logic a1_u, a1_d, a2_u, a2_d;
  logic eng_u_req, eng_u_ack, eng_d_req, eng_d_ack;
  logic rel_u_req, rel_u_ack, rel_d_req, rel_d_ack;
  logic unused_f_u1, unused_f_d1, unused_f_u3, unused_f_d3;

  // Step 1: engage on a first byte.
  decision #(.TWO_WAY(1'b0), .DOMINO(1'b1)) u_dfb_u (
    .clk, .rst_n, .e(ru_req), .p(fb_u), .req(ru_req), .ack(a1_u),
    .t_req(eng_u_req), .t_ack(eng_u_ack), .f_req(unused_f_u1), .f_ack(1'b0));
  decision #(.TWO_WAY(1'b0), .DOMINO(1'b1)) u_dfb_d (
    .clk, .rst_n, .e(rd_req), .p(fb_d), .req(rd_req), .ack(a1_d),
    .t_req(eng_d_req), .t_ack(eng_d_ack), .f_req(unused_f_d1), .f_ack(1'b0));

  // Step 2: select the multiplexor input.
  ud_module u_ud (
    .clk, .rst_n, .e0(ru_req), .e1(rd_req),
    .req_u(a1_u), .ack_u(a2_u), .req_d(a1_d), .ack_d(a2_d),
    .c0, .c1, .ack(mux_ack));

  // Step 3: release on a last byte.
  decision #(.TWO_WAY(1'b0), .DOMINO(1'b1)) u_dlb_u (
    .clk, .rst_n, .e(mux_ack), .p(lb_u), .req(a2_u), .ack(ru_ack),
    .t_req(rel_u_req), .t_ack(rel_u_ack), .f_req(unused_f_u3), .f_ack(1'b0));
  decision #(.TWO_WAY(1'b0), .DOMINO(1'b1)) u_dlb_d (
    .clk, .rst_n, .e(mux_ack), .p(lb_d), .req(a2_d), .ack(rd_ack),
    .t_req(rel_d_req), .t_ack(rel_d_ack), .f_req(unused_f_d3), .f_ack(1'b0));

  arbiter_module u_arb (
    .clk, .rst_n,
    .eng1_req(eng_u_req), .eng1_ack(eng_u_ack), .rel1_req(rel_u_req), .rel1_ack(rel_u_ack),
    .eng2_req(eng_d_req), .eng2_ack(eng_d_ack), .rel2_req(rel_d_req), .rel2_ack(rel_d_ack));

endmodule
