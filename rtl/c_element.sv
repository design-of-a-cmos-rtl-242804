// c_element: Muller C-element, the basic state-holding gate of the self-timed
// controllers.
//
// The output goes high when both inputs are high, goes low when both are low,
// and otherwise keeps its value. Inputs drawn with an inversion bubble are
// inverted by the caller.
//
// Timing: the router is written as a clocked emulation of the self-timed
// circuit. Every state-holding node is a flip-flop that takes one clock cycle
// to respond, which stands for one gate delay; the speed-independent control
// circuits behave the same under any gate delay, including this one. The reset
// value INIT is this design's choice (the global reset of the chip is only
// described for the arbiter).
module c_element #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic c
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      c <= INIT;
    else if (a == b) c <= a;
  end

endmodule
