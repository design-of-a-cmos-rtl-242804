// system_controller: one input's state machine together with one output's
// distributed structure, the unit that appears twice in the router.
//
// The controller with LOWER = 0 holds the upper input's state machine and the
// upper output's distributed structure; LOWER = 1 the lower ones. A byte whose
// packet goes straight through (upper to upper, lower to lower) stays inside
// one controller; a byte that crosses is passed to the other controller on the
// x_* link, and the other controller's crossing bytes arrive on the y_* link
// together with that input's predicates (fb_o, lb_o). The grouping follows the
// router's block diagram; the port names are this design's.
//
// Timing: no logic of its own beyond the two sub-blocks.
module system_controller #(
  parameter bit LOWER = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  // this input's FIFO
  input  logic rin,
  output logic ain,
  input  logic d0_in,
  input  logic lb_in,
  // this output's multiplexor
  output logic c0,
  output logic c1,
  input  logic mux_ack,
  // predicates: this input's, and the other input's
  output logic fb,
  output logic lb,
  input  logic fb_o,
  input  logic lb_o,
  // crossing request from this input to the other output
  output logic x_req,
  input  logic x_ack,
  // crossing request from the other input to this output
  input  logic y_req,
  output logic y_ack
);

  logic ru_req, ru_ack, rd_req, rd_ack;

  logic s_req, s_ack;  // straight-through request to this controller's ds

  fsm u_fsm (
    .clk, .rst_n, .rin, .ain, .d0_in, .lb_in,
    .fb, .lb,
    .ru_req, .ru_ack, .rd_req, .rd_ack);

  if (!LOWER) begin : g_upper
    assign s_req  = ru_req;
    assign ru_ack = s_ack;
    assign x_req  = rd_req;
    assign rd_ack = x_ack;
    ds u_ds (
      .clk, .rst_n,
      .ru_req(s_req), .ru_ack(s_ack), .fb_u(fb),   .lb_u(lb),
      .rd_req(y_req), .rd_ack(y_ack), .fb_d(fb_o), .lb_d(lb_o),
      .c0, .c1, .mux_ack);
  end else begin : g_lower
    assign s_req  = rd_req;
    assign rd_ack = s_ack;
    assign x_req  = ru_req;
    assign ru_ack = x_ack;
    ds u_ds (
      .clk, .rst_n,
      .ru_req(y_req), .ru_ack(y_ack), .fb_u(fb_o), .lb_u(lb_o),
      .rd_req(s_req), .rd_ack(s_ack), .fb_d(fb),   .lb_d(lb),
      .c0, .c1, .mux_ack);
  end

endmodule
