// domino_gate: precharged (domino) gate with enable, as used for the
// distributed control structure.
//
// While the enable e is low the gate is in its reset phase and the output x is
// low. While e is high the gate evaluates its pull-down function f (computed by
// the caller, for example a sum of products); once x has gone high it stays
// high, even if f falls again, until e goes low. This monotonic hold is what
// lets a whole chain of non-pipelined control modules reset in parallel from
// one enabling signal.
//
// Timing: clocked emulation. x responds to f combinationally (same cycle); the
// held state is a flip-flop updated every clock, cleared while e is low and by
// the global reset.
module domino_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic e,
  input  logic f,
  output logic x
);

  logic held;

  assign x = e & (f | held);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= 1'b0;
    else        held <= x;
  end

endmodule
