// decision: D-module (Decision) of the control structures.
//
// A request on the input link is passed to link T when the predicate p is
// true and to link F when it is false; the acknowledge of whichever link was
// taken is returned on ack. With TWO_WAY = 0 the module has only a T link: a
// request with a false predicate is acknowledged at once (the F request is
// looped back to ack).
//
// With DOMINO = 1 every output is a domino gate enabled by e: outputs are low
// while e is low and, once high, stay high until e falls. This is how the
// modules of the distributed structure reset in parallel. With DOMINO = 0 the
// module is static logic and e is unused (the module inside the state
// machine; clk, rst_n and e are then unused). The two-way and one-way forms and the domino enable follow the
// design; static gating by the predicate is the logic of the module.
//
// Timing: combinational from request and acknowledges to the outputs.
module decision #(
  parameter bit TWO_WAY = 1'b1,
  parameter bit DOMINO  = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic e,
  input  logic p,
  input  logic req,
  output logic ack,
  output logic t_req,
  input  logic t_ack,
  output logic f_req,
  input  logic f_ack
);

  logic t_f, f_f, a_f;

  assign t_f = req & p;
  assign f_f = req & ~p;
  assign a_f = TWO_WAY ? (t_ack | f_ack) : (t_ack | f_f);

  if (DOMINO) begin : g_domino
    domino_gate u_t (.clk, .rst_n, .e, .f(t_f), .x(t_req));
    domino_gate u_a (.clk, .rst_n, .e, .f(a_f), .x(ack));
    if (TWO_WAY) begin : g_f
      domino_gate u_f (.clk, .rst_n, .e, .f(f_f), .x(f_req));
    end else begin : g_nof
      assign f_req = 1'b0;
    end
  end else begin : g_static
    assign t_req = t_f;
    assign f_req = TWO_WAY ? f_f : 1'b0;
    assign ack   = a_f;
  end

endmodule
