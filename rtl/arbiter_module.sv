// arbiter_module: arbiter with Engage and Release links for two ports.
//
// An Engage request from a port passes to the arbiter circuit; when the port
// is granted, eng_ack is raised. The grant then stays locked after the Engage
// handshake has returned to zero, locking the other port out, until a Release
// request from the same port drops it; rel_ack is raised once the grant is
// gone. An Engage and a Release of one port must not overlap (the controller
// guarantees this for packets of two or more bytes).
//
// Structure: the request into the arbiter circuit for port i is
// eng_req_i OR (grant_i AND NOT rel_req_i); the circuit's acknowledge for
// port i is grant_i OR rel_req_i, so the other port is not served until the
// Release handshake has returned to zero (by then the released port's
// multiplexor select has fallen, which keeps c0/c1 dual-rail);
// eng_ack_i = eng_req_i AND grant_i; rel_ack_i = rel_req_i AND NOT grant_i.
// The circuit's own acknowledge outputs are not needed: taking eng_ack from
// them would close a combinational loop through the control chain. Engage/Release behaviour follows the design; these equations are
// this design's reading of it.
//
// Timing: grant one cycle after an engage request on a free arbiter; release
// acknowledged one cycle after rel_req.
module arbiter_module (
  input  logic clk,
  input  logic rst_n,
  input  logic eng1_req,
  output logic eng1_ack,
  input  logic rel1_req,
  output logic rel1_ack,
  input  logic eng2_req,
  output logic eng2_ack,
  input  logic rel2_req,
  output logic rel2_ack
);

  logic in1, in2, g1, g2, oa1, oa2;

  assign in1 = eng1_req | (g1 & ~rel1_req);
  assign in2 = eng2_req | (g2 & ~rel2_req);
  assign oa1 = g1 | rel1_req;
  assign oa2 = g2 | rel2_req;

  arbiter_circuit u_arb (
    .clk, .rst_n,
    .in1_req(in1), .in1_ack(),
    .in2_req(in2), .in2_ack(),
    .out1_req(g1), .out1_ack(oa1),
    .out2_req(g2), .out2_ack(oa2)
  );

  assign eng1_ack = eng1_req & g1;
  assign eng2_ack = eng2_req & g2;
  assign rel1_ack = rel1_req & ~g1;
  assign rel2_ack = rel2_req & ~g2;

endmodule
