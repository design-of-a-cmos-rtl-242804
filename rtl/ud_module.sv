// ud_module: Union/Decision module between the two request paths of a
// distributed structure and the output multiplexor.
//
// A request from the upper link (req_u, coming from the input that is upper
// in the router) raises c0; one from the lower link raises c1. The
// multiplexor's single ack is routed back only to the link whose request is
// up. Both halves are domino gates: the upper half is enabled by e0, the lower
// by e1, so each side resets as soon as its enabling request falls. At most
// one link is active at a time because the output arbiter lets only one
// packet through.
//
// Mapping upper link -> c0 and lower link -> c1, the ack steering and the
// enables follow the design; qualifying each returned ack with the side's own
// request is this design's choice.
//
// Timing: combinational from requests to c0/c1 and from ack to ack_u/ack_d.
module ud_module (
  input  logic clk,
  input  logic rst_n,
  input  logic e0,
  input  logic e1,
  input  logic req_u,
  output logic ack_u,
  input  logic req_d,
  output logic ack_d,
  output logic c0,
  output logic c1,
  input  logic ack
);

  domino_gate u_c0   (.clk, .rst_n, .e(e0), .f(req_u),       .x(c0));
  domino_gate u_c1   (.clk, .rst_n, .e(e1), .f(req_d),       .x(c1));
  domino_gate u_acku (.clk, .rst_n, .e(e0), .f(ack & req_u), .x(ack_u));
  domino_gate u_ackd (.clk, .rst_n, .e(e1), .f(ack & req_d), .x(ack_d));

endmodule
