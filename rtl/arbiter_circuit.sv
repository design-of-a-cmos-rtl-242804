// arbiter_circuit: two-way self-timed mutual exclusion element.
//
// in1_req and in2_req compete; at most one of out1_req/out2_req is high. A
// granted side keeps its grant until its own request falls, and the other
// side is not granted until the first side's acknowledge has fallen too, so
// each side goes through a complete request/acknowledge cycle before the
// other is served. The acknowledges pass straight back (out_ack -> in_ack).
// A global reset clears both grants.
//
// In the chip a cross-coupled flip-flop with a threshold detector resolves
// simultaneous requests and may take unbounded time doing so; in this clocked
// form simultaneous requests are resolved in one cycle, in favour of the side
// that lost (or did not win) the previous contest. That tie rule is this
// design's choice.
//
// Timing: a grant appears one cycle after the request is seen and the other
// side is free; it falls one cycle after the request falls.
module arbiter_circuit (
  input  logic clk,
  input  logic rst_n,
  input  logic in1_req,
  output logic in1_ack,
  input  logic in2_req,
  output logic in2_ack,
  output logic out1_req,
  input  logic out1_ack,
  output logic out2_req,
  input  logic out2_ack
);

  logic last2;  // side 2 won the last contest
  logic busy1, busy2;

  // A side is busy from its grant until its acknowledge has returned to zero.
  assign busy1 = out1_req | out1_ack;
  assign busy2 = out2_req | out2_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out1_req <= 1'b0;
      out2_req <= 1'b0;
      last2    <= 1'b0;
    end else begin
      out1_req <= in1_req & ~busy2 & (out1_req | ~in2_req | last2);
      out2_req <= in2_req & ~busy1 & (out2_req | ~in1_req | ~last2);
      if (in1_req && in2_req && !busy1 && !busy2) last2 <= ~last2;
    end
  end

  assign in1_ack = out1_ack;
  assign in2_ack = out2_ack;

  a_mutex : assert property (@(posedge clk) disable iff (!rst_n) !(out1_req && out2_req));

endmodule
